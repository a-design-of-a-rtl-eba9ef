// staircase_rom -- Memory1: the digital staircase sent to the DAC.
//
// The DAC full scale equals the output reference plus a margin, so code 2^DAC_W-1
// stands for V_ref+alpha. The table holds a staircase that falls by one DAC LSB
// per address, from full scale down to zero. The DAC and the analog comparator
// react only after a propagation delay T_d; to cancel it, the stored data are
// shifted forward by SHIFT = T_d * f (the step rate) addresses: address m holds
// the code the unshifted staircase has at m + SHIFT, so the address latched when
// the comparator flips matches the level that made it flip. The default shift of
// 4 is the original paper's measured value; the exact table contents are this design's
// reading of the staircase drawings.
//
// Interface: combinational (asynchronous) read, cm = table[address].
module staircase_rom
#(
  parameter int unsigned ADDR_W = dpwm_pkg::ADDR_W,
  parameter int unsigned DAC_W  = dpwm_pkg::DAC_W,
  parameter int unsigned SHIFT  = 4
) (
  input  logic [ADDR_W-1:0] address,
  output logic [DAC_W-1:0]  cm
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;
  localparam int          TOP   = 2 ** DAC_W - 1;

  logic [DAC_W-1:0] rom [DEPTH];

  // c(m) = max(0, TOP - (m + SHIFT) * TOP / (DEPTH - 1)), one LSB per step for 8/8 bits
  initial begin
    for (int m = 0; m < DEPTH; m++)
      rom[m] = DAC_W'(dpwm_pkg::clamp(TOP - dpwm_pkg::round_div((m + int'(SHIFT)) * TOP, DEPTH - 1), 0, TOP));
  end

  assign cm = rom[address];

endmodule
