// trigger_latches -- the registers that the comparator trigger loads each term.
//
// On the capture strobe of term k three things happen in the same clock edge:
//   * y2(k), the staircase step count at the crossing, is latched. It measures the
//     output voltage downward from V_ref+alpha (a larger count is a lower voltage).
//   * the integral state is updated, n_I(k) = n_I(k-1) + e(k) with e(k) = y2(k) - r,
//     saturating at the limits of its signed register.
//   * u(k), the PID table output being read at that moment, is latched.
// Between captures the registers hold y2 and n_I of the last term; these are the
// y2(k-1) and n_I(k-1) from which the tables pre-compute a and b for the next term.
// The latch structure and widths follow the original paper's block diagram; the
// saturating accumulator, the sign conventions and the reset values (y2 = r,
// n_I = 0, u = 0 so that the PWM stays off until the first measurement) are this
// design's choices.
//
// Timing: all outputs change one clock edge after capture.
module trigger_latches
#(
  parameter int unsigned Y_W   = dpwm_pkg::Y_W,
  parameter int unsigned NI_W  = dpwm_pkg::NI_W,
  parameter int unsigned U_W   = dpwm_pkg::U_W,
  parameter int unsigned R_REF = 30
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   capture,
  input  logic [Y_W-1:0]         address,
  input  logic [U_W-1:0]         lut_u,
  output logic [Y_W-1:0]         y2,
  output logic signed [NI_W-1:0] ni,
  output logic [U_W-1:0]         u
);

  localparam int NI_MAX = 2 ** (NI_W - 1) - 1;
  localparam int NI_MIN = -(2 ** (NI_W - 1));

  int                    ni_sum;
  logic signed [NI_W-1:0] ni_next;

  always_comb begin
    ni_sum  = int'(ni) + int'(address) - int'(R_REF);
    ni_next = NI_W'(dpwm_pkg::clamp(ni_sum, NI_MIN, NI_MAX));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y2 <= Y_W'(R_REF);
      ni <= '0;
      u  <= '0;
    end else if (capture) begin
      y2 <= address;
      ni <= ni_next;
      u  <= lut_u;
    end
  end

endmodule
