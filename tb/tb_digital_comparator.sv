// tb_digital_comparator -- random counts and duty words, including the limits;
// the registered PWM output must equal (cnt < u) of the previous cycle.
module tb_digital_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [8:0] cnt, u;
  logic pwm;
  int checks = 0, failures = 0;
  logic expected;

  digital_comparator dut (.clk, .rst_n, .cnt, .u, .pwm);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = '0; u = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      cnt = 9'($urandom);
      case (i % 4)
        0: u = cnt;
        1: u = cnt + 9'd1;
        default: u = 9'($urandom);
      endcase
      expected = int'(cnt) < int'(u);
      @(negedge clk);
      checks++;
      if (pwm !== expected) begin
        failures++;
        $display("cnt=%0d u=%0d pwm=%0d", cnt, u, pwm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
