// digital_comparator -- produces the PWM signal from u(k).
//
// The PWM output is high while the DPWM count is below the duty word u(k), so the
// on-time is T_on = u(k) / f_S' (u(k) = 0 keeps the switch off, u(k) >= PERIOD
// keeps it on). The compare is the original paper's; registering its result, which
// delays both PWM edges by one cycle but keeps the gate signal free of glitches,
// is this design's choice.
//
// Timing: pwm reflects cnt < u one clock edge later.
module digital_comparator
#(
  parameter int unsigned CNT_W = dpwm_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cnt,
  input  logic [CNT_W-1:0] u,
  output logic             pwm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (cnt < u);
  end

endmodule
