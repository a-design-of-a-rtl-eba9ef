// tb_ab_precalc -- random and corner values of a and b; the PC start value must
// be a - b + 512, clamped to 0..1023.
module tb_ab_precalc;
  logic signed [10:0] a, b;
  logic [9:0] pc_init;
  int checks = 0, failures = 0;

  ab_precalc dut (.a, .b, .pc_init);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int av, bv, e;
      if (i < 4) begin
        av = (i[0]) ? 1023 : -1024;
        bv = (i[1]) ? 1023 : -1024;
      end else begin
        av = int'($urandom_range(0, 2047)) - 1024;
        bv = (i % 2 == 0) ? int'($urandom_range(0, 2047)) - 1024 : int'($urandom_range(0, 60));
      end
      a = 11'(av); b = 11'(bv);
      #1;
      e = av - bv + 512;
      if (e < 0) e = 0;
      if (e > 1023) e = 1023;
      checks++;
      if (int'(pc_init) != e) begin
        failures++;
        $display("a=%0d b=%0d: pc_init=%0d expected %0d", av, bv, pc_init, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
