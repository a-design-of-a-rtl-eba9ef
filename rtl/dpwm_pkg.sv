// dpwm_pkg -- widths and shared arithmetic of the look-up-table PID DPWM controller.
//
// The bus widths are those of the controller block diagram: an 8-bit staircase
// address and DAC code, 8-bit y2 and integral state, 11-bit table outputs a and b,
// a 10-bit programmable-counter address into the PID table and a 9-bit duty word
// u(k) compared against a 9-bit DPWM counter. The rounding helper is used by the
// three tables, which are filled from their formulas at elaboration time.
package dpwm_pkg;

  localparam int unsigned ADDR_W = 8;   // ATC staircase address
  localparam int unsigned DAC_W  = 8;   // staircase code c(m) to the DAC
  localparam int unsigned Y_W    = 8;   // measured step count y2
  localparam int unsigned NI_W   = 8;   // integral state n_I (signed)
  localparam int unsigned AB_W   = 11;  // outputs a and b of the small tables (signed)
  localparam int unsigned PC_W   = 10;  // address' of the PID table
  localparam int unsigned U_W    = 9;   // duty word u(k)
  localparam int unsigned CNT_W  = 9;   // DPWM counter

  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [DAC_W-1:0]         dac_t;
  typedef logic [Y_W-1:0]           y2_t;
  typedef logic signed [NI_W-1:0]   ni_t;
  typedef logic signed [AB_W-1:0]   ab_t;
  typedef logic [PC_W-1:0]          pc_t;
  typedef logic [U_W-1:0]           u_t;
  typedef logic [CNT_W-1:0]         cnt_t;

  // num/den rounded to the nearest integer, halves upward (den > 0).
  function automatic int round_div(input int num, input int den);
    int n2;
    n2 = 2 * num + den;
    if (n2 >= 0) return n2 / (2 * den);
    else         return -((-n2 + 2 * den - 1) / (2 * den));
  endfunction

  // Clamp v into lo..hi.
  function automatic int clamp(input int v, input int lo, input int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

endpackage
