// tb_dpwm_counter -- the DPWM counter must count 0..511 and give exactly one
// sweep_start per period, one cycle before count (512 - detect_advance) mod 512,
// for the detection timings 0, 2, 5 and 10 % of the period.
module tb_dpwm_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [8:0] detect_advance, cnt;
  logic sweep_start;
  int checks = 0, failures = 0;

  dpwm_counter dut (.clk, .rst_n, .detect_advance, .cnt, .sweep_start);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int adv_list[4] = '{0, 10, 26, 51};
    int exp_cnt;
    detect_advance = '0;
    @(negedge clk);
    rst_n = 1'b1;
    exp_cnt = 0;
    foreach (adv_list[j]) begin
      int starts;
      detect_advance = 9'(adv_list[j]);
      // let a possible boundary effect of the change pass, then watch 3 periods
      for (int c = 0; c < 512 * 4; c++) begin
        if (c >= 512) begin
          checks++;
          if (int'(cnt) != exp_cnt ||
              sweep_start != (((exp_cnt + 1 + adv_list[j]) % 512) == 0)) begin
            failures++;
            $display("adv %0d: cnt=%0d exp %0d sweep_start=%0d", adv_list[j], cnt, exp_cnt, sweep_start);
          end
          if (sweep_start) starts++;
        end else starts = 0;
        @(negedge clk);
        exp_cnt = (exp_cnt + 1) % 512;
      end
      checks++;
      if (starts != 3) begin failures++; $display("adv %0d: %0d sweep starts in 3 periods", adv_list[j], starts); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
