// dpwm_controller_top -- low-delay digital PWM controller for a DC-DC converter,
// measuring the output voltage without an A/D converter.
//
// Each switching period the controller sweeps a falling staircase (Memory1)
// through an external 8-bit DAC whose full scale is V_ref+alpha. An external
// analog comparator flips when the ramp falls below the output voltage e_o; the
// staircase step count at that moment is the measurement y2(k). In parallel, a
// programmable counter, preloaded with a - b, addresses the PID look-up table
// (Memory2) so that the table already shows u(k) for whatever y2(k) turns out to
// be; the comparator edge merely latches it. a and b, the integral and derivative
// shares, come from Memory3 and Memory4 and are prepared during the previous
// term. u(k) sets the on-time of the PWM through a 9-bit counter and a digital
// comparator.
//
// Interface: cm goes to the DAC, vcomp comes from the comparator (asynchronous),
// pwm goes to the gate driver. detect_advance moves the start of the staircase
// ahead of the PWM turn-on, in clock cycles. u, y2 and capture are brought out
// for observation.
//
// Timing: one clock (f_S'); a switching period is PERIOD cycles; the staircase
// advances once every ATC_DIV cycles; u(k) is latched SYNC_STAGES+1 cycles after
// V_comp rises and acts on the PWM one cycle later. The block structure follows
// the original paper; the single clock, the synchroniser and the default u_Ref, r and
// PERIOD are this design's choices.
module dpwm_controller_top
  import dpwm_pkg::*;
#(
  parameter int unsigned PERIOD      = 512,
  parameter int unsigned ATC_DIV     = 2,
  parameter int unsigned SHIFT       = 4,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned KP_X10      = 50,
  parameter int unsigned KI_X10      = 5,
  parameter int unsigned KD_X10      = 10,
  parameter int unsigned U_REF       = 154,
  parameter int unsigned R_REF       = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vcomp,
  input  logic [CNT_W-1:0] detect_advance,
  output logic [DAC_W-1:0] cm,
  output logic             pwm,
  output logic [U_W-1:0]   u,
  output logic [Y_W-1:0]   y2,
  output logic             capture
);

  localparam int unsigned PC_OFFSET = 2 ** (PC_W - 1);

  cnt_t  cnt;
  logic  sweep_start;
  addr_t address;
  logic  tick;
  ni_t   ni;
  ab_t   a, b;
  pc_t   pc_init, address_p;
  u_t    lut_u;

  dpwm_counter #(.PERIOD(PERIOD)) u_dpwm_counter (
    .clk, .rst_n, .detect_advance, .cnt, .sweep_start
  );

  atc_up_counter #(.ATC_DIV(ATC_DIV)) u_atc_up_counter (
    .clk, .rst_n, .sweep_start, .address, .tick
  );

  staircase_rom #(.SHIFT(SHIFT)) u_memory1 (
    .address, .cm
  );

  vcomp_trigger #(.SYNC_STAGES(SYNC_STAGES)) u_vcomp_trigger (
    .clk, .rst_n, .vcomp, .sweep_start, .capture
  );

  trigger_latches #(.R_REF(R_REF)) u_trigger_latches (
    .clk, .rst_n, .capture, .address, .lut_u, .y2, .ni, .u
  );

  integral_rom #(.KP_X10(KP_X10), .KI_X10(KI_X10), .KD_X10(KD_X10)) u_memory3 (
    .ni, .a
  );

  derivative_rom #(.KP_X10(KP_X10), .KI_X10(KI_X10), .KD_X10(KD_X10)) u_memory4 (
    .y2, .b
  );

  ab_precalc #(.PC_OFFSET(PC_OFFSET)) u_ab_precalc (
    .a, .b, .pc_init
  );

  prog_counter u_prog_counter (
    .clk, .rst_n, .load(sweep_start), .init(pc_init), .tick, .address_p
  );

  pid_lut_rom #(
    .KP_X10(KP_X10), .KI_X10(KI_X10), .KD_X10(KD_X10),
    .U_REF(U_REF), .R_REF(R_REF), .PC_OFFSET(PC_OFFSET)
  ) u_memory2 (
    .address_p, .u(lut_u)
  );

  // the PC and the staircase address advance together, so during a sweep
  // address' - address stays at the value loaded at the sweep start
  pc_t pc_base;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pc_base <= '0;
    else if (sweep_start) pc_base <= pc_init;
  end
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
    !sweep_start && !$past(sweep_start) && (int'(pc_base) + int'(address) <= 2 ** PC_W - 1)
      |-> (int'(address_p) == int'(pc_base) + int'(address)));

  digital_comparator u_digital_comparator (
    .clk, .rst_n, .cnt, .u, .pwm
  );

endmodule
