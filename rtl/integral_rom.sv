// integral_rom -- Memory3: a = (K_I / A) * n_I(k-1), with A = K_P + K_I + K_D.
//
// The PID law is rewritten so that the only quantity unknown until the crossing
// is y2(k); the integral and derivative contributions are scaled by 1/A and read
// from two small tables during the previous term. This table takes the signed
// integral state and returns its contribution a in y2 units, rounded to the
// nearest integer. Gains are given in tenths (KP_X10 = 10 * K_P). The formula and
// port widths are the original paper's; signed coding and rounding are this design's.
//
// Interface: combinational read, 2^NI_W entries.
module integral_rom
#(
  parameter int unsigned NI_W   = dpwm_pkg::NI_W,
  parameter int unsigned AB_W   = dpwm_pkg::AB_W,
  parameter int unsigned KP_X10 = 50,
  parameter int unsigned KI_X10 = 5,
  parameter int unsigned KD_X10 = 10
) (
  input  logic signed [NI_W-1:0] ni,
  output logic signed [AB_W-1:0] a
);

  localparam int unsigned DEPTH = 2 ** NI_W;
  localparam int          A_X10 = int'(KP_X10 + KI_X10 + KD_X10);
  localparam int          AMAX  = 2 ** (AB_W - 1) - 1;

  logic signed [AB_W-1:0] rom [DEPTH];

  // index i holds the entry for the two's-complement value of i
  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      int n;
      n = (i >= DEPTH / 2) ? i - int'(DEPTH) : i;
      rom[i] = AB_W'(dpwm_pkg::clamp(dpwm_pkg::round_div(int'(KI_X10) * n, A_X10), -AMAX - 1, AMAX));
    end
  end

  assign a = rom[unsigned'(ni)];

endmodule
