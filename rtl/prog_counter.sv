// prog_counter -- the programmable counter (PC) that addresses the PID table.
//
// At the start of each sweep it loads a - b (plus the table offset); afterwards it
// counts up on every ATC step, in lock step with the staircase address. When the
// comparator flips, the ATC address equals y2(k) and so the PC equals
// y2(k) + a - b: the PID table output for the new measurement is already on the
// table's output and only has to be latched. This is what removes the A/D
// conversion and arithmetic from the loop delay. Loading and counting are the
// document's; saturation at the top instead of wrap-around is this design's.
//
// Timing: load in cycle t gives address_p = init from cycle t+1; each tick adds 1
// at the next edge.
module prog_counter
#(
  parameter int unsigned PC_W = dpwm_pkg::PC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [PC_W-1:0] init,
  input  logic            tick,
  output logic [PC_W-1:0] address_p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      address_p <= '0;
    else if (load)
      address_p <= init;
    else if (tick && address_p != {PC_W{1'b1}})
      address_p <= address_p + 1'b1;
  end

endmodule
