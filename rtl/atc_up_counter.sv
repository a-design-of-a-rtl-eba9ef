// atc_up_counter -- staircase address counter of the analog-timing converter (ATC).
//
// Every switching period the ATC sweeps a falling staircase through the DAC and
// waits for the comparator to flip; the address reached at that moment is the
// measurement y2. This counter produces that address. A sweep_start pulse clears
// it; afterwards it advances by one every ATC_DIV clock cycles and stops at the
// last address. The step strobe `tick`, high whenever the address advances, is
// also given to the programmable counter so that both count in lock step, and
// both stop together at the end of the staircase.
//
// Timing: sweep_start in cycle t gives address 0 from cycle t+1 for ATC_DIV
// cycles, then 1, 2, ... `tick` is high in the last cycle of each step.
// The step rate (one step per ATC_DIV clock cycles, so that 256 steps fill a
// 512-cycle period) is this design's choice; the 8-bit width is the original paper's.
module atc_up_counter
#(
  parameter int unsigned ADDR_W  = dpwm_pkg::ADDR_W,
  parameter int unsigned ATC_DIV = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sweep_start,
  output logic [ADDR_W-1:0] address,
  output logic              tick
);

  localparam int unsigned DIV_W = (ATC_DIV > 1) ? $clog2(ATC_DIV) : 1;

  logic [DIV_W-1:0] div_q;
  logic             last_addr;

  assign last_addr = (address == {ADDR_W{1'b1}});
  assign tick      = !sweep_start && !last_addr && (div_q == DIV_W'(ATC_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q   <= '0;
      address <= '0;
    end else if (sweep_start) begin
      div_q   <= '0;
      address <= '0;
    end else begin
      div_q <= (div_q == DIV_W'(ATC_DIV - 1)) ? '0 : div_q + 1'b1;
      if (tick) address <= address + 1'b1;
    end
  end

endmodule
