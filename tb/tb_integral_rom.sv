// tb_integral_rom -- exhaustive check of Memory3 against a = round(K_I n_I / A)
// computed in real arithmetic, K_P = 5, K_I = 0.5, K_D = 1.
module tb_integral_rom;
  logic signed [7:0] ni;
  logic signed [10:0] a;
  int checks = 0, failures = 0;

  integral_rom dut (.ni, .a);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = -128; n < 128; n++) begin
      int exp_a;
      ni = 8'(n);
      #1;
      exp_a = int'($floor(0.5 * real'(n) / 6.5 + 0.5));
      checks++;
      if (int'(a) != exp_a) begin
        failures++;
        $display("n_I=%0d: a=%0d expected %0d", n, a, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
