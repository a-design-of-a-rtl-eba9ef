// tb_vcomp_trigger -- checks the comparator trigger: one capture pulse exactly
// SYNC_STAGES+1 edges after the first rising edge of V_comp in a sweep, none
// before the trigger is armed, none for later edges of the same sweep, and none
// in a sweep where V_comp never rises.
module tb_vcomp_trigger;
  localparam int SYNC = 2;
  logic clk = 1'b0, rst_n = 1'b0, vcomp = 1'b1, sweep_start = 1'b0, capture;
  int checks = 0, failures = 0;
  int cyc = 0, exp_cycle;
  int captures_seen;

  vcomp_trigger #(.SYNC_STAGES(SYNC)) dut (.clk, .rst_n, .vcomp, .sweep_start, .capture);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run `len` cycles; count captures and remember the cycle of the first one
  int first_cap;
  task automatic run(input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      if (capture) begin
        if (captures_seen == 0) first_cap = cyc;
        captures_seen++;
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // not armed yet: a rising edge must be ignored
    vcomp = 1'b0; captures_seen = 0;
    run(5); vcomp = 1'b1; run(10);
    checks++; if (captures_seen != 0) begin failures++; $display("capture while unarmed"); end

    for (int s = 0; s < 40; s++) begin
      int low_at, rise_at;
      logic never;
      never = (s % 5 == 4);
      low_at  = int'($urandom_range(1, 8));
      rise_at = low_at + int'($urandom_range(2, 300));
      captures_seen = 0;
      sweep_start = 1'b1;
      @(negedge clk);
      sweep_start = 1'b0;
      for (int c = 1; c < 400; c++) begin
        if (c == low_at && !never) vcomp = 1'b0;
        if (c == rise_at)          vcomp = 1'b1;
        if (c == rise_at) exp_cycle = cyc + SYNC;
        // later glitches in the same sweep must not trigger again
        if (c == rise_at + 20 && !never) vcomp = 1'b0;
        if (c == rise_at + 30) vcomp = 1'b1;
        run(1);
      end
      checks++;
      if (never) begin
        if (captures_seen != 0) begin failures++; $display("sweep %0d: capture without crossing", s); end
      end else if (captures_seen != 1 || first_cap != exp_cycle) begin
        failures++;
        $display("sweep %0d: %0d captures, first at %0d expected %0d", s, captures_seen, first_cap, exp_cycle);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
