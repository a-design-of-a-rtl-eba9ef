// pid_lut_rom -- Memory2: the PID look-up table.
//
// The discrete PID law
//   u(k) = u_Ref + K_P e(k) + K_I n_I(k) + K_D (e(k) - e(k-1)),  e(k) = y2(k) - r,
// is rearranged to
//   u(k) = u_Ref - (K_P + K_I) r + A * address',  address' = y2(k) + a - b,
// with A = K_P + K_I + K_D, a = (K_I/A) n_I(k-1), b = (K_D/A) y2(k-1). This table
// holds the right-hand side for every address', so the duty word for a new
// measurement is a single table read. The index carries the offset PC_OFFSET of
// the programmable counter: entry p is for address' = p - PC_OFFSET. Entries are
// rounded to the nearest integer and clamped to the 9-bit duty range. Gains are in
// tenths. The formula is the original paper's; u_Ref, r, offset, rounding and clamping
// are this design's.
//
// Interface: combinational read, 2^PC_W entries of U_W bits.
module pid_lut_rom
#(
  parameter int unsigned PC_W      = dpwm_pkg::PC_W,
  parameter int unsigned U_W       = dpwm_pkg::U_W,
  parameter int unsigned KP_X10    = 50,
  parameter int unsigned KI_X10    = 5,
  parameter int unsigned KD_X10    = 10,
  parameter int unsigned U_REF     = 154,
  parameter int unsigned R_REF     = 30,
  parameter int unsigned PC_OFFSET = 512
) (
  input  logic [PC_W-1:0] address_p,
  output logic [U_W-1:0]  u
);

  localparam int unsigned DEPTH = 2 ** PC_W;
  localparam int          A_X10 = int'(KP_X10 + KI_X10 + KD_X10);
  localparam int          UMAX  = 2 ** U_W - 1;

  logic [U_W-1:0] rom [DEPTH];

  initial begin
    for (int p = 0; p < DEPTH; p++) begin
      int num;
      num = 10 * int'(U_REF) - int'(KP_X10 + KI_X10) * int'(R_REF)
          + A_X10 * (p - int'(PC_OFFSET));
      rom[p] = U_W'(dpwm_pkg::clamp(dpwm_pkg::round_div(num, 10), 0, UMAX));
    end
  end

  assign u = rom[address_p];

endmodule
