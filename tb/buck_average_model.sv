// buck_average_model -- strongly simplified behavioural model of the buck power
// stage for closed-loop tests: the output voltage follows E_i * pwm - R_S * i_o
// through a first-order lag of TAU_CYC clock cycles (about ten switching periods
// by default), integrated once per clock cycle. It stands for a well-damped
// output filter; it does not reproduce the L-C resonance of a real converter.
// Simulation only; not part of the controller.
module buck_average_model #(
  parameter real TAU_CYC = 5120.0,
  parameter real R_S     = 0.05
) (
  input  logic clk,
  input  logic pwm,
  input  real  ei,
  input  real  io,
  input  real  eo_init,
  input  logic load_init,
  output real  eo
);

  always @(posedge clk) begin
    if (load_init) eo <= eo_init;
    else           eo <= eo + ((pwm ? ei : 0.0) - R_S * io - eo) / TAU_CYC;
  end

endmodule
