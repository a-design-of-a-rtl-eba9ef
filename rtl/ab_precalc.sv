// ab_precalc -- forms the programmable counter's start value a - b.
//
// With a = (K_I/A) n_I(k-1) and b = (K_D/A) y2(k-1) known during term k-1, the PID
// table address of term k is address' = y2(k) + a - b. This block computes a - b
// ahead of time; the programmable counter loads it at the start of the sweep and
// adds y2 by counting. Because a - b may be negative while the counter is an
// unsigned 10-bit address, PC_OFFSET is added and the result clamped to the
// counter range; the PID table removes the offset again. Subtraction is the
// document's; the offset and the clamp are this design's.
//
// Interface: combinational.
module ab_precalc
#(
  parameter int unsigned AB_W      = dpwm_pkg::AB_W,
  parameter int unsigned PC_W      = dpwm_pkg::PC_W,
  parameter int unsigned PC_OFFSET = 512
) (
  input  logic signed [AB_W-1:0] a,
  input  logic signed [AB_W-1:0] b,
  output logic [PC_W-1:0]        pc_init
);

  always_comb begin
    pc_init = PC_W'(dpwm_pkg::clamp(int'(a) - int'(b) + int'(PC_OFFSET), 0, 2 ** PC_W - 1));
  end

endmodule
