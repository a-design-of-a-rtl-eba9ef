// tb_atc_up_counter -- self-checking test of the ATC staircase address counter.
// Restarts the sweep at random moments and lets it run past the last address;
// every cycle the address and step strobe are compared with a cycle counter
// kept by the testbench (address = min(n / ATC_DIV, 255) n cycles after a start).
module tb_atc_up_counter;
  localparam int DIV = 2;
  logic clk = 1'b0, rst_n = 1'b0, sweep_start = 1'b0;
  logic [7:0] address;
  logic tick;
  int checks = 0, failures = 0;
  int n;  // cycles since the last sweep start

  atc_up_counter #(.ATC_DIV(DIV)) dut (.clk, .rst_n, .sweep_start, .address, .tick);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp_addr, input logic exp_tick);
    checks++;
    if (address !== 8'(exp_addr) || tick !== exp_tick) begin
      failures++;
      $display("mismatch n=%0d address=%0d exp=%0d tick=%0d exp=%0d", n, address, exp_addr, tick, exp_tick);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int sweep = 0; sweep < 6; sweep++) begin
      int len;
      len = (sweep == 2) ? 700 : 50 + int'($urandom_range(0, 450));
      sweep_start = 1'b1;
      #1;
      checks++;  // during the start pulse the strobe is off
      if (tick !== 1'b0) begin failures++; $display("tick during sweep_start"); end
      @(negedge clk);
      sweep_start = 1'b0;
      n = 0;
      for (int c = 0; c < len; c++) begin
        check((n / DIV > 255) ? 255 : n / DIV, 1'b1 == (((n % DIV) == DIV - 1) && (n / DIV < 255)));
        n++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
