// derivative_rom -- Memory4: b = (K_D / A) * y2(k-1), with A = K_P + K_I + K_D.
//
// Companion of integral_rom: returns the derivative term's share of the previous
// measurement, in y2 units, rounded to the nearest integer. Gains are in tenths.
// The formula and widths are the original paper's; the rounding is this design's.
//
// Interface: combinational read, 2^Y_W entries.
module derivative_rom
#(
  parameter int unsigned Y_W    = dpwm_pkg::Y_W,
  parameter int unsigned AB_W   = dpwm_pkg::AB_W,
  parameter int unsigned KP_X10 = 50,
  parameter int unsigned KI_X10 = 5,
  parameter int unsigned KD_X10 = 10
) (
  input  logic [Y_W-1:0]         y2,
  output logic signed [AB_W-1:0] b
);

  localparam int unsigned DEPTH = 2 ** Y_W;
  localparam int          A_X10 = int'(KP_X10 + KI_X10 + KD_X10);
  localparam int          AMAX  = 2 ** (AB_W - 1) - 1;

  logic signed [AB_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = AB_W'(dpwm_pkg::clamp(dpwm_pkg::round_div(int'(KD_X10) * i, A_X10), -AMAX - 1, AMAX));
  end

  assign b = rom[y2];

endmodule
