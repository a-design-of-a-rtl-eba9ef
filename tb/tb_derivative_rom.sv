// tb_derivative_rom -- exhaustive check of Memory4 against b = round(K_D y2 / A)
// computed in real arithmetic, K_P = 5, K_I = 0.5, K_D = 1; also with K_D = 5.
module tb_derivative_rom;
  logic [7:0] y2;
  logic signed [10:0] b, b5;
  int checks = 0, failures = 0;

  derivative_rom dut (.y2, .b);
  derivative_rom #(.KD_X10(50)) dut5 (.y2, .b(b5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 256; y++) begin
      int e1, e5;
      y2 = 8'(y);
      #1;
      e1 = int'($floor(1.0 * real'(y) / 6.5 + 0.5));
      e5 = int'($floor(5.0 * real'(y) / 10.5 + 0.5));
      checks += 2;
      if (int'(b) != e1) begin failures++; $display("y2=%0d: b=%0d expected %0d", y, b, e1); end
      if (int'(b5) != e5) begin failures++; $display("y2=%0d: b(K_D=5)=%0d expected %0d", y, b5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
