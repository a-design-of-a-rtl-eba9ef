// tb_static_characteristics -- closed-loop regulation of the controller on a
// first-order averaged model of the buck power stage (1.5 V output, K_P = 5,
// K_I = 0.5, K_D = 1). It runs the operating points of the converter's static tests:
//   * load current 0..5 A at E_i = 5 V, for detection timings 0, 2, 5, 10 %;
//   * input voltage 4..8 V at 2 A;
// and a 0.5 A -> 3 A load step. At each point the output voltage, averaged over
// the last periods, must be within 5 % of 1.5 V; the load step's largest
// deviation and its settling time (back inside 2 %) are reported.
module tb_static_characteristics;
  localparam int PERIOD = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  logic vcomp, pwm, capture, load_init = 1'b1;
  logic [8:0] detect_advance = '0, u;
  logic [7:0] cm, y2;
  real eo, vref_p, ei = 5.0, io = 0.5;
  int checks = 0, failures = 0;

  dpwm_controller_top dut (.clk, .rst_n, .vcomp, .detect_advance, .cm, .pwm, .u, .y2, .capture);
  dac_comparator_model #(.DELAY_CYC(6)) afe (.clk, .cm, .eo, .vcomp, .vref_p);
  buck_average_model plant (.clk, .pwm, .ei, .io, .eo_init(1.5), .load_init, .eo);

  always #8 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // settle, then average e_o over 20 periods
  task automatic point(input string what, output real avg);
    real s;
    repeat (150 * PERIOD) @(negedge clk);
    s = 0.0;
    for (int i = 0; i < 20 * PERIOD; i++) begin
      @(negedge clk);
      s += eo;
    end
    avg = s / real'(20 * PERIOD);
    checks++;
    if (avg < 1.425 || avg > 1.575) begin
      failures++;
      $display("FAIL %s: e_o = %f V", what, avg);
    end else
      $display("%s: e_o = %f V, u = %0d", what, avg, u);
  endtask

  initial begin
    int advs[4] = '{0, 10, 26, 51};
    real v, vmin;
    int settle;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_init = 1'b0;
    foreach (advs[j]) begin
      detect_advance = 9'(advs[j]);
      for (int a = 0; a <= 5; a++) begin
        io = real'(a);
        point($sformatf("detection %0d cycles, i_o = %0d A", advs[j], a), v);
      end
    end
    detect_advance = 9'd0;
    io = 2.0;
    for (int e = 4; e <= 8; e++) begin
      ei = real'(e);
      point($sformatf("E_i = %0d V, i_o = 2 A", e), v);
    end
    // load step 0.5 A -> 3 A at 250 mA/us (10 us ramp)
    ei = 5.0; io = 0.5;
    point("before load step, i_o = 0.5 A", v);
    vmin = 10.0; settle = 0;
    for (int c = 0; c < 300 * PERIOD; c++) begin
      @(negedge clk);
      if (io < 3.0) io = io + 0.25e6 / 61.44e6 * 1.0;
      if (io > 3.0) io = 3.0;
      if (eo < vmin) vmin = eo;
      if (eo < 1.47 || eo > 1.53) settle = c;
    end
    $display("load step: largest drop %0.0f mV, settled within 2 %% after %0.0f us",
             (v - vmin) * 1000.0, real'(settle) / 61.44);
    checks++;
    if (eo < 1.425 || eo > 1.575) begin failures++; $display("FAIL after load step: %f", eo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
