// tb_staircase_rom -- exhaustive check of Memory1: every address must hold the
// falling staircase shifted forward by 4 steps, max(0, 255 - (m + 4)).
module tb_staircase_rom;
  logic [7:0] address, cm;
  int checks = 0, failures = 0;

  staircase_rom dut (.address, .cm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      int exp_v;
      address = 8'(m);
      #1;
      exp_v = 255 - m - 4;
      if (exp_v < 0) exp_v = 0;
      checks++;
      if (int'(cm) != exp_v) begin
        failures++;
        $display("address %0d: cm=%0d expected %0d", m, cm, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
