// tb_dpwm_controller_top -- end-to-end test of the controller at its default
// parameters, with a behavioural DAC + comparator and, in the last phase, an
// averaged buck converter closing the loop.
//
// Every measurement strobe is checked against a model written from the PID law:
//   * y2 must match the step count of the output voltage below V_ref+alpha
//     (255 - e_o * 255 / 1.7) within one step, which only holds because the
//     staircase shift cancels the DAC/comparator/synchroniser delay;
//   * u(k) must equal the rearranged law u = u_Ref - (K_P+K_I) r + A address',
//     address' = y2 + round(K_I n_I/A) - round(K_D y2(k-1)/A), clamped to 0..511,
//     and lie within one table rounding step of the direct form
//     u_Ref + K_P e + K_I n_I(k) + K_D (e(k) - e(k-1));
//   * the capture must fall 2*y2 or 2*y2+1 cycles after the staircase start,
//     which moves ahead of the PWM turn-on by the detection advance;
//   * in every period in which u(k) does not change, the PWM on-time is u(k) cycles.
// Phases: open-loop voltages (including ones that saturate u and n_I), no
// crossing (e_o above the staircase top and at zero), the four detection timings
// 0/2/5/10 %, and closed-loop regulation through a 0.5 A -> 3 A load step.
// Each of these mechanisms is counted and must occur at least once.
module tb_dpwm_controller_top;
  localparam int    PERIOD = 512;
  localparam real   VFULL  = 1.7;
  localparam int    R      = 30;
  localparam real   KP = 5.0, KI = 0.5, KD = 1.0, UREF = 154.0;
  localparam real   A  = KP + KI + KD;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vcomp, pwm, capture;
  logic [8:0] detect_advance = '0;
  logic [7:0] cm, y2;
  logic [8:0] u;
  real eo = 1.5, vref_p;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_capture = 0, n_missed = 0, n_u_clamp_hi = 0, n_u_clamp_lo = 0;
  int n_ni_sat = 0, n_ontime = 0, n_load_step = 0, n_regulated = 0;
  int n_adv[4] = '{0, 0, 0, 0};

  dpwm_controller_top dut (
    .clk, .rst_n, .vcomp, .detect_advance, .cm, .pwm, .u, .y2, .capture
  );

  dac_comparator_model #(.V_FULL(VFULL), .DELAY_CYC(6)) afe (
    .clk, .cm, .eo, .vcomp, .vref_p
  );

  always #8 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int rnd(input real x);
    return int'($floor(x + 0.5));
  endfunction

  // ---------------- reference model of the PID state ----------------
  int m_ni = 0, m_y2p = R;
  int sweep_cyc = 0;  // cycles since staircase address 0
  // set when e_o or the detection timing is stepped: the first capture after a
  // step compares e_o against a stale ramp or an unfinished sweep and is only
  // checked for the PID law
  bit settling = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      // staircase address 0 appears at count (512 - advance) mod 512
      if (int'(dut.cnt) == (PERIOD - int'(detect_advance)) % PERIOD) sweep_cyc = 0;
      else sweep_cyc++;
      if (capture) begin
        int yv, e, ep, av, bv, adr, uexp, ni_new;
        real udirect, vcode;
        yv = int'(dut.address);
        n_capture++;
        // measurement accuracy: the comparator flips at the first code below e_o,
        // and the residual latency (4.5 steps against a shift of 4) adds up to
        // half a step, so y2 lies between 255 - code and 255 - code + 1.5
        vcode = eo * 255.0 / VFULL;
        if (!settling) begin
          check((real'(yv) >= 255.0 - vcode - 0.5) && (real'(yv) <= 255.0 - vcode + 2.0),
                $sformatf("y2=%0d for e_o=%f (expected about %f)", yv, eo, 255.0 - vcode));
          // capture position within the sweep
          check(sweep_cyc >= 2 * yv && sweep_cyc <= 2 * yv + 1,
                $sformatf("capture %0d cycles after sweep start for y2=%0d", sweep_cyc, yv));
        end
        settling = 0;
        // PID law in rearranged form, with the tables' rounding
        e   = yv - R;
        ep  = m_y2p - R;
        av  = rnd(KI * real'(m_ni) / A);
        bv  = rnd(KD * real'(m_y2p) / A);
        adr = yv + av - bv;
        uexp = rnd(UREF - (KP + KI) * real'(R) + A * real'(adr));
        if (uexp < 0)   begin uexp = 0;   n_u_clamp_lo++; end
        if (uexp > 511) begin uexp = 511; n_u_clamp_hi++; end
        ni_new = m_ni + e;
        if (ni_new > 127)  begin ni_new = 127;  n_ni_sat++; end
        if (ni_new < -128) begin ni_new = -128; n_ni_sat++; end
        // direct form of the PID law; differs by the table rounding only
        udirect = UREF + KP * e + KI * real'(m_ni + e) + KD * real'(e - ep);
        m_ni  = ni_new;
        m_y2p = yv;
        @(posedge clk);
        #1;
        check(int'(u) == uexp, $sformatf("u=%0d expected %0d (y2=%0d)", u, uexp, yv));
        if (udirect > 10.0 && udirect < 500.0 && m_ni > -128 && m_ni < 127)
          check((real'(u) - udirect) <= 7.0 && (udirect - real'(u)) <= 7.0,
                $sformatf("u=%0d far from direct PID value %f", u, udirect));
        check(int'(y2) == yv, "y2 output");
      end
    end
  end

  // ---------------- PWM on-time per period ----------------
  int on_cnt = 0;
  logic [8:0] u_at_start, u_prev, cnt_prev;
  bit u_changed = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      // pwm now shows (count < u) of the previous cycle
      if (pwm) on_cnt++;
      if (u !== u_prev) u_changed = 1;
      if (cnt_prev == 9'(PERIOD - 1)) begin
        if (!u_changed) begin
          n_ontime++;
          check(on_cnt == int'(u_at_start), $sformatf("on-time %0d, u=%0d", on_cnt, u_at_start));
        end
        on_cnt = 0;
        u_changed = 0;
        u_at_start = u;
      end
      cnt_prev = dut.cnt;
      u_prev   = u;
    end
  end

  // ---------------- helpers ----------------
  task automatic periods(input int n);
    repeat (n * PERIOD) @(negedge clk);
  endtask

  // run n periods and count those without any capture
  task automatic periods_expect_no_capture(input int n);
    int n_before;
    n_before = n_capture;
    periods(n);
    check(n_capture == n_before, "capture although e_o is outside the staircase");
    if (n_capture == n_before) n_missed += n;
  endtask

  // averaged buck converter: the output follows E_i * PWM through a first-order
  // lag (time constant about 10 switching periods) minus a resistive load drop
  real ei = 5.0, io = 0.5;
  bit  closed = 0;
  always @(posedge clk) begin
    if (closed)
      eo <= eo + ((pwm ? ei : 0.0) - io * 0.05 - eo) / 5120.0;
  end

  initial begin
    real vlist[11] = '{1.5, 1.45, 1.55, 1.3, 1.62, 1.66, 1.66, 1.66, 0.9, 1.2, 1.5};
    int advs[4] = '{0, 10, 26, 51};
    u_prev = '0; cnt_prev = '0; u_at_start = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: open-loop voltages
    foreach (vlist[i]) begin
      eo = vlist[i];
      settling = 1;
      periods(4);
    end
    // phase 2: no crossing
    eo = 1.75; periods(1); periods_expect_no_capture(3);
    eo = 0.0;  periods(1); periods_expect_no_capture(3);
    // phase 3: detection timing 0, 2, 5, 10 % of the period
    foreach (advs[j]) begin
      int n_before;
      eo = 1.48 + 0.01 * j;
      detect_advance = 9'(advs[j]);
      settling = 1;
      periods(1);
      n_before = n_capture;
      periods(4);
      n_adv[j] = n_capture - n_before;
      check(n_adv[j] == 4, $sformatf("advance %0d: %0d captures in 4 periods", advs[j], n_adv[j]));
    end
    // phase 4: closed loop, start-up then load step
    detect_advance = 9'd26;
    eo = 1.0;
    settling = 1;
    closed = 1;
    periods(150);
    check(eo > 1.5 * 0.95 && eo < 1.5 * 1.05, $sformatf("regulated to %f V at 0.5 A", eo));
    if (eo > 1.5 * 0.95 && eo < 1.5 * 1.05) n_regulated++;
    io = 3.0; n_load_step++;
    periods(150);
    check(eo > 1.5 * 0.95 && eo < 1.5 * 1.05, $sformatf("regulated to %f V at 3 A", eo));
    if (eo > 1.5 * 0.95 && eo < 1.5 * 1.05) n_regulated++;
    $display("e_o after load step: %f V, u=%0d, n_I=%0d", eo, u, m_ni);
    // every mechanism must have happened
    check(n_capture > 0,    "no capture");
    check(n_missed > 0,     "no missed crossing");
    check(n_u_clamp_hi > 0, "u never clamped high");
    check(n_u_clamp_lo > 0, "u never clamped low");
    check(n_ni_sat > 0,     "n_I never saturated");
    check(n_ontime > 0,     "no on-time measured");
    check(n_regulated == 2, "loop did not regulate");
    foreach (n_adv[j]) check(n_adv[j] > 0, "detection timing not exercised");
    $display("captures=%0d missed=%0d u_clamp_hi=%0d u_clamp_lo=%0d ni_sat=%0d ontime=%0d adv=%0d/%0d/%0d/%0d load_steps=%0d regulated=%0d",
             n_capture, n_missed, n_u_clamp_hi, n_u_clamp_lo, n_ni_sat, n_ontime,
             n_adv[0], n_adv[1], n_adv[2], n_adv[3], n_load_step, n_regulated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
