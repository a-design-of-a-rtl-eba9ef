// vcomp_trigger -- turns the comparator output V_comp into the measurement strobe.
//
// During a sweep the DAC ramp falls from V_ref+alpha; V_comp is low while the ramp
// is above the output voltage e_o and goes high where the ramp crosses e_o. That
// rising edge is the trigger that latches y2(k), n_I(k) and u(k). V_comp comes
// from an analog part and is asynchronous, so it passes through SYNC_STAGES
// flip-flops before its rising edge is detected. The trigger is armed by
// sweep_start and fires once: only the first rising edge of a sweep counts, and
// if V_comp never rises (e_o outside the staircase range) no strobe is given.
//
// Timing: capture is high for one cycle, starting SYNC_STAGES clock edges after
// V_comp rises; the latches it enables load at the following edge, SYNC_STAGES+1
// edges after the rise. The staircase shift in staircase_rom
// is meant to absorb this together with the analog delay. The original paper clocks
// the latches with V_comp directly; the synchroniser and the one-shot arming are
// this design's choices.
module vcomp_trigger #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vcomp,
  input  logic sweep_start,
  output logic capture
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   prev_q;
  logic                   armed_q;
  logic                   vc_s;

  assign vc_s    = sync_q[SYNC_STAGES-1];
  assign capture = armed_q && !sweep_start && vc_s && !prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= '0;
      prev_q  <= 1'b0;
      armed_q <= 1'b0;
    end else begin
      sync_q <= SYNC_STAGES'({sync_q, vcomp});
      prev_q <= vc_s;
      if (sweep_start)  armed_q <= 1'b1;
      else if (capture) armed_q <= 1'b0;
    end
  end

  // at most one capture per sweep: a capture is never followed by another
  // before the next sweep start
  a_one_shot: assert property (@(posedge clk) disable iff (!rst_n)
    capture |=> (!capture until_with sweep_start));

endmodule
