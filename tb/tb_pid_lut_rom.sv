// tb_pid_lut_rom -- exhaustive check of Memory2 against
// u = clamp(round(u_Ref - (K_P + K_I) r + A (p - 512)), 0, 511) computed in real
// arithmetic with u_Ref = 154, r = 30, K_P = 5, K_I = 0.5, K_D = 1 (A = 6.5).
module tb_pid_lut_rom;
  logic [9:0] address_p;
  logic [8:0] u;
  int checks = 0, failures = 0;

  pid_lut_rom dut (.address_p, .u);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 1024; p++) begin
      real x;
      int e;
      address_p = 10'(p);
      #1;
      x = 154.0 - 5.5 * 30.0 + 6.5 * real'(p - 512);
      e = int'($floor(x + 0.5));
      if (e < 0) e = 0;
      if (e > 511) e = 511;
      checks++;
      if (int'(u) != e) begin
        failures++;
        $display("address' %0d: u=%0d expected %0d", p, u, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
