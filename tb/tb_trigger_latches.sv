// tb_trigger_latches -- drives random addresses, table outputs and capture
// strobes into the trigger latches and compares y2, n_I and u with a model of
// n_I(k) = sat8(n_I(k-1) + y2(k) - r). Long runs of large or small addresses
// drive the integral into both saturation limits.
module tb_trigger_latches;
  localparam int R = 30;
  logic clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  logic [7:0] address;
  logic [8:0] lut_u;
  logic [7:0] y2;
  logic signed [7:0] ni;
  logic [8:0] u;
  int checks = 0, failures = 0;
  int m_y2, m_ni, m_u, sat_hi = 0, sat_lo = 0;

  trigger_latches #(.R_REF(R)) dut (.clk, .rst_n, .capture, .address, .lut_u, .y2, .ni, .u);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    address = '0; lut_u = '0;
    m_y2 = R; m_ni = 0; m_u = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int phase;
      phase = (i / 100) % 4;
      capture = ($urandom_range(0, 3) != 0);
      case (phase)
        0: address = 8'($urandom_range(0, 255));
        1: address = 8'($urandom_range(120, 255));
        2: address = 8'($urandom_range(0, 20));
        default: address = 8'($urandom_range(R - 3, R + 3));
      endcase
      lut_u = 9'($urandom);
      if (capture) begin
        m_ni = m_ni + int'(address) - R;
        if (m_ni > 127)  begin m_ni = 127;  sat_hi++; end
        if (m_ni < -128) begin m_ni = -128; sat_lo++; end
        m_y2 = int'(address);
        m_u  = int'(lut_u);
      end
      @(negedge clk);
      checks++;
      if (int'(y2) != m_y2 || int'(ni) != m_ni || int'(u) != m_u) begin
        failures++;
        $display("step %0d: y2=%0d/%0d ni=%0d/%0d u=%0d/%0d", i, y2, m_y2, ni, m_ni, u, m_u);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
