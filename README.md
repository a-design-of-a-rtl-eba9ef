# Low-delay digital PWM controller for a DC-DC converter, without an A/D converter

A digitally controlled point-of-load converter normally digitises its output
voltage with an A/D converter (often behind a sample-and-hold) and then runs a
PID calculation before the new duty cycle is known. Both steps sit inside the
feedback loop and add delay. This controller removes them:

* The output voltage is measured **in time** instead of with an ADC. Every
  switching period the controller plays a falling digital staircase through a
  cheap 8-bit DAC, and an analog comparator flips when the staircase passes
  the output voltage. The staircase step reached at that instant, `y2`, *is* the
  measurement.
* The PID law is rearranged so that, once `y2` is known, the duty word is a
  **single table read** whose address has been counting up alongside the
  staircase. The comparator edge only has to latch the table output.

The RTL in `rtl/` is the digital part: staircase generator, comparator trigger,
the PID state registers, three look-up tables, a programmable counter and the
DPWM counter/comparator. The DAC and the comparator stay outside (the staircase
code leaves the chip on `cm`, the comparator output comes back on `vcomp`).
It follows the architecture of the paper "A Design of a Low-Delay DPWM Control
Circuit for DC-DC Converter"; section *Departures and own choices* lists where
the RTL fills gaps or departs from it.

```
            +-------------------- dpwm_controller_top ---------------------+
            |                                                              |
 clk ------>| dpwm_counter --cnt--------------------------> digital_comp --+--> pwm
            |     | sweep_start                                  ^ u(k)    |
            |     v                                              |         |
            | atc_up_counter --address--> staircase_rom (Mem1) --+---------+--> cm  (to DAC)
            |     | tick      |                                  |         |
            |     |           v                                  |         |
 vcomp ---->| vcomp_trigger --capture--> trigger_latches --------+         |
            |                              y2, n_I | ^ table output        |
            |                                      v |                     |
            |     integral_rom (Mem3): a   derivative_rom (Mem4): b        |
            |                  \             /                           |
            |                  ab_precalc: a - b                           |
            |                        | init                                |
            |     prog_counter (PC) --address'--> pid_lut_rom (Mem2) ------+
            +--------------------------------------------------------------+
```

## Measuring the output voltage with a staircase

The DAC's full scale is set to `V_ref + alpha` (1.7 V for a 1.5 V output), so
DAC code 255 is the top of the measurable range. `staircase_rom` holds a
staircase that falls one code per step. `atc_up_counter` restarts at the start of
each sweep and advances the staircase address once every `ATC_DIV` (= 2) clock
cycles, so the 256 steps fill one 512-cycle switching period.

The comparator has `e_o` on its + input and the staircase voltage on its
− input. `vcomp` is low while the staircase is above `e_o` and rises where the
staircase crosses `e_o`. That rising edge is the measurement. `vcomp_trigger`
synchronises `vcomp` (two flip-flops) and detects the edge. It is armed by each
sweep start and fires once, so later comparator chatter in the same sweep is
ignored. If `vcomp` never rises, nothing is latched and the previous duty word
stays in force. That happens when `e_o` is above the top of the staircase or at
its bottom.

**What `y2` means.** `y2` is the staircase step count at the crossing. It counts
*down* from `V_ref + alpha`: a large `y2` means a low output voltage. Code 225
(1.5 V) corresponds to `r = 30`. The error `e(k) = y2(k) - r` is therefore
positive when the output is too low, so positive gains give negative feedback.

### Cancelling the analog delay

The DAC and the comparator respond only after a delay `T_d`. The synchroniser
adds its own latency. By the time the edge is latched, the address has moved on
by a few steps, so the raw measurement reads the voltage too low. The staircase
table is therefore stored **shifted forward**: address `m` holds the code the
ideal staircase has at `m + SHIFT`:

    c(m) = max(0, 255 - (m + SHIFT)),    SHIFT = T_d * (step rate)

`SHIFT = 4` is the measured value for a 130 ns analog delay. With a 6-cycle
analog delay plus the 3-cycle trigger latency (4.5 steps in all),
`tb_shift_adjust` measures a mean `y2` error of +0.46 steps with the shift and
+4.46 steps without it. One side effect is that the top of the staircase drops to
code 251, so the measurable range ends at about 1.67 V.

## The PID law as one table read

The controller implements the discrete PID law

    u(k) = u_Ref + K_P e(k) + K_I n_I(k) + K_D (e(k) - e(k-1)),
    n_I(k) = n_I(k-1) + e(k),    e(k) = y2(k) - r

Expanding it and writing `A = K_P + K_I + K_D` gives

    u(k) = u_Ref - (K_P + K_I) r + A * address'
    address' = y2(k) + a - b,   a = (K_I/A) n_I(k-1),   b = (K_D/A) y2(k-1)

Only `y2(k)` is new in term `k`. The quantities `a` and `b` depend on the
previous term only, so they are ready long before the crossing:

* `integral_rom` (Memory3) maps `n_I(k-1)` to `a`. `derivative_rom` (Memory4) maps
  `y2(k-1)` to `b`. `ab_precalc` forms `a - b`.
* At the start of the sweep, `prog_counter` (the PC) loads `a - b`. From then on
  it counts up on the **same strobe** as the staircase address. At any instant
  the PC therefore equals `(steps so far) + a - b`. At the crossing that is
  exactly `address' = y2(k) + a - b`.
* `pid_lut_rom` (Memory2) holds `u_Ref - (K_P + K_I) r + A * address'` for every
  PC value. Its output is always the duty word for "the crossing happens now".
* On the trigger, `trigger_latches` latches this table output as `u(k)`, stores
  `y2(k)`, and updates `n_I(k) = n_I(k-1) + y2(k) - r`. Between triggers these
  registers hold `y2` and `n_I` of the last term. They are the `y2(k-1)` and
  `n_I(k-1)` from which Memory3 and Memory4 prepare the next term.

No arithmetic lies between the comparator edge and the new duty word, only a
register load.

### Number formats

| signal | width | format |
|---|---|---|
| staircase address, `cm`, `y2` | 8 | unsigned step count / DAC code |
| `n_I` | 8 | two's complement, saturating at −128 / +127 |
| `a`, `b` | 11 | two's complement, in `y2` steps, rounded to nearest |
| PC, `address'` | 10 | unsigned, holds `address' + 512`, saturating |
| `u(k)`, DPWM count | 9 | unsigned; on-time = `u` cycles of 512 |

`a - b` can be negative, but the PC is unsigned. `ab_precalc` therefore adds
`PC_OFFSET = 512` and clamps to 0..1023, and Memory2's entry `p` is for
`address' = p - 512`. All three tables are computed from their formulas at
elaboration time, in `initial` loops. The gains are integer parameters in
tenths (`KP_X10 = 50` means `K_P = 5`). Entries are rounded to the nearest
integer, with halves rounded up, and Memory2 is clamped to 0..511. With the
defaults (`K_P = 5`, `K_I = 0.5`, `K_D = 1`, `u_Ref = 154`, `r = 30`):

    Memory3: a = round(0.5 n / 6.5)        Memory4: b = round(y / 6.5)
    Memory2: u = clamp(round(154 - 165 + 6.5 (p - 512)), 0, 511)

## One switching period

All logic runs on one clock, the DPWM clock. `dpwm_counter` counts 0..511. The
PWM is on while the count is below `u(k)`, so `T_on = u(k) / f_clk`. At
120 kHz switching this clock is 61.44 MHz.

1. One cycle before the staircase is due to start, `dpwm_counter` pulses
   `sweep_start`. The staircase address and its clock divider clear, the PC
   loads `a - b + 512`, and the trigger arms.
2. The staircase starts at count `(512 - detect_advance) mod 512`. With
   `detect_advance = 0` the measurement begins exactly when the PWM turns on.
   That is when switching noise disturbs `e_o` most. Starting a few percent of
   the period earlier avoids it. The values tested correspond to 0, 2, 5 and
   10 % of the period (0, 10, 26, 51 cycles). `detect_advance` is an input, so it
   can change at run time. A change in mid-period may shorten one sweep.
3. The address and the PC step together every 2 cycles.
4. `vcomp` rises at the crossing. Three clock edges later (2 synchroniser stages
   and the latch) `y2`, `n_I` and `u(k)` are updated. The PWM comparator output
   is registered, so the new `u(k)` acts on `pwm` one cycle after that.
5. The new `u(k)` applies to the current period at once. The measurement
   normally completes early in the period, before the count reaches `u(k)`.
   The digital comparator is a plain `count < u(k)` compare with no
   once-per-period latch. A late measurement that raises `u(k)` after the count
   has already passed the old value therefore turns the PWM on again until the
   count reaches the new value.

After reset, `u = 0`, so the PWM stays off until the first measurement. At reset
`n_I = 0` and `y2 = r`.

## Files

| file | role |
|---|---|
| `rtl/dpwm_pkg.sv` | widths, types, rounding and clamp helpers |
| `rtl/dpwm_controller_top.sv` | the controller (top) |
| `rtl/atc_up_counter.sv` | staircase address counter and step strobe |
| `rtl/staircase_rom.sv` | Memory1, shifted falling staircase |
| `rtl/vcomp_trigger.sv` | comparator synchroniser, one-shot edge trigger |
| `rtl/trigger_latches.sv` | `y2`, `n_I` (with the accumulator) and `u(k)` registers |
| `rtl/integral_rom.sv`, `rtl/derivative_rom.sv` | Memory3 (`a`), Memory4 (`b`) |
| `rtl/ab_precalc.sv` | `a - b` with offset and clamp |
| `rtl/prog_counter.sv` | programmable counter addressing Memory2 |
| `rtl/pid_lut_rom.sv` | Memory2, the PID table |
| `rtl/dpwm_counter.sv` | switching-period counter, sweep start, detection timing |
| `rtl/digital_comparator.sv` | `pwm = cnt < u(k)`, registered |

Top-level parameters (defaults in brackets): `PERIOD` (512), `ATC_DIV` (2),
`SHIFT` (4), `SYNC_STAGES` (2), `KP_X10` (50), `KI_X10` (5), `KD_X10` (10),
`U_REF` (154), `R_REF` (30). The bus widths are fixed in `dpwm_pkg`.

Changing gains, `U_REF` or `R_REF` only changes table contents. If the analog
delay or the clock changes, retune `SHIFT` to
`round((T_d * f_clk + SYNC_STAGES + 1) / ATC_DIV)`, taking `SYNC_STAGES` from the
trigger.

## Departures and own choices

These points are not given by the paper, or the RTL resolves them differently.

* **Clocking.** The paper shows a 33.3 MHz system clock for the staircase and a
  PLL-generated clock for the DPWM counter. Here a single clock drives
  everything, and the staircase advances every second cycle. There is no PLL or
  oscillator in the RTL.
* **Trigger.** The paper clocks the latches directly with the comparator output.
  Here `vcomp` is synchronised first. This costs 3 cycles (about 49 ns at
  61.44 MHz), which is more than the 30 ns total delay reported for the
  prototype. `SYNC_STAGES` can be reduced if metastability risk is acceptable.
  The shift absorbs part of this latency in the measurement, but it does not
  remove it from the loop.
* **Comparator polarity.** The latch fires on the rising edge, where `e_o`
  climbs above the falling staircase. This matches the comparator inputs and
  waveforms of the original block diagram. It does not match one sentence of
  the original text, which has the comparator go high while the staircase is
  above `e_o`.
* **`y2` is the step count itself.** The original diagram draws an inverted
  flip-flop output for `y2`. The table addressing only adds up, however, when
  `y2` grows with the counter. The count is therefore latched unchanged, and `y2`
  measures the voltage downward from full scale.
* **One `y2` register.** The diagram has a second flip-flop for `y2(k-1)`. Chained
  on the same trigger, it would feed Memory4 with `y2(k-2)`. The `y2` register
  already holds `y2(k-1)` whenever Memory4 is read, so it is used directly.
* **The integral adder** `n_I(k) = n_I(k-1) + e(k)` is not drawn in the diagram.
  It is added here, with saturation as anti-windup.
* **Values not given in the paper:** `u_Ref = 154`, which is the 1.5 V duty at an
  assumed 5 V input, and `r = 30`, derived from 1.5 V / 1.7 V. Other choices
  are `K_D = 1` (only `K_P = 5` and `K_I = 0.5` are quoted for the experiments),
  the rounding rule, `PC_OFFSET`, the clamps and all reset values.
* **Limits of the widths.** `n_I` is 8 bits and `a` is an integer in steps. With
  `K_I/A ≈ 0.077`, the integral moves `u` in steps of 6.5 counts, and its full
  authority is about ±65 counts. With `u_Ref = 154`, steady regulation at zero
  error reaches down to an input of about 3.6 V, not the 2 V bottom of the
  original input range.
* **No crossing in a sweep** leaves `u(k)` unchanged. This covers an output
  voltage above the staircase (more than about 1.67 V) or at zero. There is no
  dedicated over-voltage action.
* **Size.** At the block diagram's widths, Memory2 alone is 1024 × 9 bits, and
  the four tables total about 15.6 kbit. The prototype is reported at
  149 logic elements. How its tables were made that small is not described.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator, for example:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/dpwm_pkg.sv tb/tb_dpwm_controller_top.sv --top-module tb_dpwm_controller_top
    ./obj_dir/Vtb_dpwm_controller_top

* `tb_dpwm_controller_top` runs the controller at its default parameters. A
  behavioural DAC and comparator (`tb/dac_comparator_model.sv`, with a 6-cycle
  delay) close the measurement path. The testbench steps the output voltage,
  including values that saturate `u` and `n_I` and values with no crossing. It
  then runs all four detection timings, and finally closes the loop through
  `tb/buck_average_model.sv`, including a 0.5 A → 3 A load step. Every capture is
  checked against a model of the PID law (exactly in rearranged form, and
  within one table step of the direct form), along with the `y2` accuracy, the
  capture position in the sweep and the PWM on-time. Each mechanism must occur
  at least once.
* `tb_shift_adjust` compares the default controller with an unshifted one.
* `tb_static_characteristics` regulates on the averaged power-stage model. It
  covers 0–5 A at each detection timing, 4–8 V input, and a load step. In that
  model the output stays within 1.49–1.56 V. The load step's largest drop and
  its settling time are reported.
* Concurrent assertions inside the RTL check three rules during every simulation:
  the PC and the staircase address stay in lock step through a sweep, the
  trigger fires at most once per sweep, and the DPWM count stays below `PERIOD`
  with one sweep start per period.
* Unit testbenches: `tb_atc_up_counter`, `tb_staircase_rom`,
  `tb_vcomp_trigger`, `tb_trigger_latches`, `tb_integral_rom`,
  `tb_derivative_rom`, `tb_ab_precalc`, `tb_prog_counter`, `tb_pid_lut_rom`,
  `tb_dpwm_counter`, `tb_digital_comparator`.

The power-stage model is a first-order lag. It stands for a well-damped filter
and does not model the L-C resonance of a real converter. With a lightly damped
17 µH / 500 µF stage (50 mΩ series resistance), the default gains (a loop gain of about 9 at DC, from
6.5 duty counts per measurement step) do not give a stable loop in simulation.
Closed-loop numbers from these testbenches show that the controller works.
They do not predict a real converter's transient response.
