// dpwm_counter -- the DPWM up counter and the switching-period timing.
//
// A free-running counter at the fast DPWM clock f_S' counts 0 .. PERIOD-1; one
// round is one switching period and the PWM turns on at count 0. The counter also
// starts each staircase sweep. The start may be moved ahead of the PWM turn-on by
// detect_advance cycles (the "detection timing": 0 % starts the measurement right
// at the off-to-on transition, where the switching surge disturbs e_o; a few
// percent of the period earlier avoids it). sweep_start is issued one cycle ahead
// so that staircase address 0 appears exactly at count (PERIOD - detect_advance)
// mod PERIOD. The 9-bit width and the idea of a variable detection timing are the
// document's; PERIOD = 512 and the start alignment are this design's.
//
// Timing: cnt advances every cycle; sweep_start is a one-cycle pulse per period.
module dpwm_counter
#(
  parameter int unsigned CNT_W  = dpwm_pkg::CNT_W,
  parameter int unsigned PERIOD = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] detect_advance,
  output logic [CNT_W-1:0] cnt,
  output logic             sweep_start
);

  int start_pos;

  always_comb begin
    // count at which address 0 must appear, minus one cycle for the counter load
    start_pos   = (2 * int'(PERIOD) - int'(detect_advance) - 1) % int'(PERIOD);
    sweep_start = (int'(cnt) == start_pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= '0;
    else if (int'(cnt) == int'(PERIOD) - 1)
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) < int'(PERIOD));
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    sweep_start && $stable(detect_advance) |=> !sweep_start);

endmodule
