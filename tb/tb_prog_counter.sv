// tb_prog_counter -- random loads and count strobes; the PC must equal the last
// loaded value plus the strobes since, stopping at 1023.
module tb_prog_counter;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, tick = 1'b0;
  logic [9:0] init, address_p;
  int checks = 0, failures = 0, model = 0, sat = 0;

  prog_counter dut (.clk, .rst_n, .load, .init, .tick, .address_p);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      load = ($urandom_range(0, 199) == 0);
      tick = $urandom_range(0, 1) == 1;
      init = 10'($urandom_range(0, 1023));
      if (load) model = int'(init);
      else if (tick) begin
        if (model == 1023) sat++;
        else model++;
      end
      @(negedge clk);
      checks++;
      if (int'(address_p) != model) begin
        failures++;
        $display("step %0d: address'=%0d expected %0d", i, address_p, model);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
