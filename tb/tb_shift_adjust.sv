// tb_shift_adjust -- propagation-delay compensation of the staircase.
// Two controllers see the same output voltages through identical DAC +
// comparator models with a 6-cycle delay: one with the staircase shifted forward
// by 4 steps (the default), one unshifted. For a sweep of output voltages the
// latched y2 is compared with the ideal step count 255 - e_o*255/1.7: with the
// shift the mean error must stay within one step, without it the measurement
// must read about 4 steps (the shift) too low a voltage.
module tb_shift_adjust;
  logic clk = 1'b0, rst_n = 1'b0;
  logic vc4, vc0, pwm4, pwm0, cap4, cap0;
  logic [7:0] cm4, cm0, y4, y0;
  logic [8:0] u4, u0;
  real eo = 1.5, vr4, vr0;
  int checks = 0, failures = 0;
  real err4_sum = 0.0, err0_sum = 0.0;
  int n4 = 0, n0 = 0;

  dpwm_controller_top dut4 (.clk, .rst_n, .vcomp(vc4), .detect_advance(9'd0), .cm(cm4),
                            .pwm(pwm4), .u(u4), .y2(y4), .capture(cap4));
  dpwm_controller_top #(.SHIFT(0)) dut0 (.clk, .rst_n, .vcomp(vc0), .detect_advance(9'd0),
                            .cm(cm0), .pwm(pwm0), .u(u0), .y2(y0), .capture(cap0));
  dac_comparator_model #(.DELAY_CYC(6)) afe4 (.clk, .cm(cm4), .eo, .vcomp(vc4), .vref_p(vr4));
  dac_comparator_model #(.DELAY_CYC(6)) afe0 (.clk, .cm(cm0), .eo, .vcomp(vc0), .vref_p(vr0));

  always #8 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit measuring = 0;
  always @(negedge clk) begin
    if (measuring && cap4) begin err4_sum += real'(dut4.address) - (255.0 - eo * 150.0); n4++; end
    if (measuring && cap0) begin err0_sum += real'(dut0.address) - (255.0 - eo * 150.0); n0++; end
  end

  initial begin
    real m4, m0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      eo = 0.3 + 1.3 * real'(i) / 40.0;
      measuring = 0;
      repeat (512) @(negedge clk);
      measuring = 1;
      repeat (2 * 512) @(negedge clk);
    end
    m4 = err4_sum / real'(n4);
    m0 = err0_sum / real'(n0);
    $display("captures %0d/%0d, mean y2 error with shift %f steps, without %f steps", n4, n0, m4, m0);
    checks++; if (n4 != 80 || n0 != 80) failures++;
    checks++; if (m4 < -1.0 || m4 > 1.0) failures++;
    checks++; if (m0 < 3.0 || m0 > 5.0) failures++;
    checks++; if ((m0 - m4) < 3.5 || (m0 - m4) > 4.5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
