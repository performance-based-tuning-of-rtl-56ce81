# Performance-driven auto-tuning of an integrated buck regulator

A fully integrated inductive voltage regulator (IVR) sits on the same die as
the digital core it supplies. There is no board-level decoupling, so the
regulator's control loop alone sets the supply noise the core sees: the dip
after a load step, the ringing that follows, and how fast a new reference
voltage is reached. The loop's transient behaviour depends on the inductor
and capacitor values, which vary from part to part. How much a given amount
of supply noise hurts depends on the core, because a slow-threshold core loses
far more speed per millivolt of droop than a fast one.

Conventional auto-tuners adjust the compensator to minimise the regulator's
own output error. This design tunes the compensator against **the timing of
the core itself**. A replica of the core's critical path, running from the
regulated supply, is digitised every sample by a Vernier time-to-digital
converter. A coefficient sweep then runs every candidate compensator through
the same scripted stress: a reference step followed by a load step. Each
candidate is scored with one of two performance costs:

* **delay-sum**: the sum of |delay slack| over the evaluation window,
  ignoring samples inside a dead band that only reflects switching ripple.
  This keeps the path delay as close to the target period as possible.
* **error-count**: the number of samples in which the path is slower than
  the target period (or in which the core's own error-detecting latches
  fire). This suits error-tolerant cores that replay failed operations.

The lowest-cost pair of coefficients is then kept in the running loop.

Everything that is digital is synthesizable SystemVerilog in `rtl/`. The
analog parts (the power stage, the error ADC, the replica path and the
Vernier chain) are behavioural models that use `real` arithmetic, so the
whole closed loop simulates in plain Verilator.

## System at a glance

```
            vtarget_mv / vstep_mv
                    |                     +------------------------------+
                    v                     |   tuning_engine              |
   +----------> window_adc --err--> dig_compensator --duty--> dpwm --pwm-->  power_stage --vout--+
   |             (model)     |      (b0,b1,b2)                (1024 ticks)   (model, L C ESR     |
   |                         |           ^ coefs / loop_closed / d_fixed     + load I_BASE/STEP) |
   |                         v           |                                          ^            |
   |                   slack_band_cal ---+-- ref_code, band_lo/hi                   | load_step  |
   |                         ^           |                                          |            |
   |                       dcode         v                                          |            |
   |  trc_vernier_tdc --thermo--> tdc_encoder --slack--> delay_sum_cost ------> tuning_engine    |
   |   (model)                                     \--> error_count_cost ----/   (sweep, score,  |
   |                                                      ^ razor_err            keep best)      |
   +-----------------------------------------------------------------------------------vout-----+
```

Not drawn: `coef_bank`, between `tuning_engine` and `dig_compensator`,
keeps the winning pair of each operating point.

| Clock | Rate (default) | Who uses it |
|---|---|---|
| `clk_fine` | 1024 x 125 MHz (7.8125 ps step) | DPWM counter, power-stage integration |
| `clk_s` | 250 MHz, exactly 512 `clk_fine` periods, rising together | ADC, compensator, TDC, calibration, costs, tuner |

The regulator switches at 125 MHz and samples twice per switching period.
The DPWM latches a new duty once per period, so it uses every second
compensator output.

## The regulator loop

**Compensator** (`dig_compensator`). This is a direct-form type-III
(PID-like) law, an integrator with two zeros, which is the standard way to
compensate the LC double pole when the capacitor's ESR zero lies far out:

```
u[n] = clamp( u[n-1] + (b0*e[n] + b1*e[n-1] + b2*e[n-2]) / 16 ,  0 .. 1023 )
duty = integer part of u
```

`e` is the 8-bit error code and `b0..b2` are 7-bit signed integers. `u`
keeps 4 fraction bits. While the loop is open, the output is the fixed duty
`d_fixed` and the integrator is preloaded with it, so closing the loop does
not make the duty jump. The tuner sweeps the pair (b1, b2) with b0 held at a
fixed value. The latency is one `clk_s` cycle.

**DPWM** (`dpwm`). A 10-bit counter on `clk_fine` drives the output high for
the first `duty` ticks of each 1024-tick period (trailing-edge modulation).
The duty is latched when the counter wraps. In silicon a 7.8 ps step would
come from a delay line; here the counter plays that role.

**Error ADC** (`window_adc`, behavioural model). It digitises
`V_REF - V_OUT` with a 5 mV step, rounding to nearest and saturating at
-128..127. One duty step moves the output by 1.2 V / 1024 = 1.17 mV. Several
adjacent duty codes therefore read as zero error, which the band calibration
relies on.

**Power stage** (`power_stage`, behavioural model). This models a half
bridge from 1.2 V with 0.1 ohm switches, 6 nH, 10 nF with 50 mohm ESR, and a
current-source load of 10 mA, or 110 mA while `load_step` is high. It is
stepped once per `clk_fine` edge: first the inductor current, then the
capacitor voltage using the new current (semi-implicit Euler, which does not
let the lossless LC tank gain energy). The state updates are nonblocking, so
the ADC, which samples on the same edge, reads the value from before the
edge.

## Measuring the core: replica path, Vernier chain, slack

`trc_vernier_tdc` (behavioural model) stands for the core's critical path.
The replica is assembled from four fixed segments worth 50, 25, 15 and 10
inverter delays, each switched in by a bit of `trc_seg_en`, so that it can
be matched to whatever path synthesis reports. 0..15 trim inverters
(`trc_trim`) are appended for the last few picoseconds. With every segment
on and no trim it is a chain of 100 inverters. The segment split is this
design's choice. The replica is powered by `vout`, and its delay follows the
alpha-power law:

```
t = (segments + trim) * 7.1 ps * f(V, VT) / f(1 V, 0.5 V),   f(v, vt) = v / (v - vt)^1.5,   VT = 0.5 V * VT_SCALE
```

That puts the nominal path at about 0.71 ns (1.4 GHz) at 1 V. `VT_SCALE` =
0.8 or 1.2 gives the fast or slow process corner. Each `clk_s` edge, a
127-stage Vernier chain reports the path delay as a thermometer code. Stage
*i* reads 1 when the path edge arrived by `win0_ps + (i+1)*step_ps`.
`win0_ps` (the capture-clock phase) and `step_ps` (the stage-delay
difference) are run-time inputs. Suitable settings:

| operating point | `tdc_win0_ps` | `tdc_step_ps` | window |
|---|---|---|---|
| 1.0 V (default) | 75 | 10 | 0.075 .. 1.345 ns |
| 0.7 V, nominal VT | 700 | 20 | 0.70 .. 3.24 ns |
| 0.7 V, +20 % VT | 3000 | 40 | 3.0 .. 8.1 ns |

`tdc_encoder` counts the ones. The **delay code** is 127 minus that count,
the number of stages the edge had not reached; counting makes the encoder
insensitive to bubbles. The **slack** is `ref_code - delay code`, so slack
is positive when the path is faster than the reference period. Both outputs
are registered.

## Calibrating the ripple band (`slack_band_cal`)

Switching ripple moves the path delay by a few codes even in perfect steady
state, and no choice of coefficients can remove it. Counting that ripple
would make the cost noisy and punish every candidate equally, so the
calibration measures it once, with the loop open:

1. The DPWM is driven with fixed duties `cal_d_lo .. cal_d_hi` (for example
   846..862 around 1 V). After each step the block waits `N_SETTLE` = 128
   samples.
2. For `N_OBS` = 32 samples it keeps every delay code taken while the error
   code is exactly zero. These are the states the closed loop can legitimately
   settle into, since the ADC cannot tell them apart.
3. It takes the rounded **mean** of the kept codes as the reference
   (`ref_code`, the target period in delay-code units). A bit-serial divider
   forms the mean in 25 cycles.
4. It takes the slack range `[ref - max, ref - min]` of the kept codes,
   widens it by 1.25 (floor for the lower edge, ceiling for the upper), and
   outputs it as `band_lo .. band_hi`.

`cal_ok` is low if no level produced a zero error code; the previous outputs
are then kept. At 1 V with the default model the result is about
`ref_code` = 63 and band = [-3, 3]. At 0.7 V with a +20 % VT core the band
grows to about [-20, 20], because that core is far more sensitive to
ripple.

## Scoring a coefficient pair

`delay_sum_cost` adds `|slack|` for every enabled sample whose slack lies
outside `[band_lo, band_hi]`. It penalises running too slow and also running
needlessly fast (over-voltage). `error_count_cost` adds one for every enabled
sample with `slack < band_lo`. That is a path slower than the upper edge of
the ripple band, which is where the target clock period is placed so that
ripple alone never fails. With `err_ext_sel` high it counts the core's own
error flag `razor_err` instead. Both accumulators are 24 bits, saturating,
cleared by `cost_clear` and registered.

## The tuning sequence (`tuning_engine`)

Every candidate goes through an identical script, so the costs are
comparable even though a real workload's droop pattern is unknown:

| phase | samples (default) | loop | reference | load | costs |
|---|---|---|---|---|---|
| OPEN (+1 NEXT cycle) | 128 + 1 | open, duty `d_open` | - | I_BASE | - |
| PRE | 64 | closed, trial (b1,b2) | V_TARGET - V_STEP | I_BASE | cleared |
| EVAL, first half | 87 | closed | **V_TARGET** (reference step) | I_BASE | accumulate |
| EVAL, second half | 88 | closed | V_TARGET | **I_BASE + I_STEP** | accumulate |
| SCORE | 1 | closed | V_TARGET | I_BASE | compare |

The OPEN phase resets the output to the same starting condition for every
candidate. `d_open` ≈ (V_TARGET − V_STEP)/1.2 V × 1024, e.g. 725 for
0.85 V. The evaluation lasts 175 samples = 700 ns, 88 switching periods.
SCORE keeps the pair only if its cost is strictly lower than the best so
far, so ties keep the first pair found.

The sweep runs b2 in the inner loop: `b2_min..b2_max` in steps of `b2_step`,
inside `b1_min..b1_max`. A step of 0 counts as 1. One pair takes 369
samples (1.48 us). The exhaustive 7-bit sweep, 16384 pairs, therefore takes
about 24 ms.

After the last pair the loop is opened once more for 128 samples (FINAL).
It is then closed at V_TARGET with the winning pair (RUN), and `tune_done`
pulses. Without the final open phase the winner would inherit whatever state
the last, possibly unstable, candidate left behind. Unstable candidates do
occur: a grid easily contains pairs whose integral gain b0+b1+b2 is negative
or whose phase margin is gone. They saturate the duty, collapse the supply,
push the replica path off the end of the Vernier chain and receive the
largest costs.

The cost units see the EVAL samples 2–3 clocks late (ADC, TDC and encoder
registers). The window is therefore shifted slightly against the load-step
timing. It is shifted by the same amount for every candidate.

## Top level (`ivr_autotune_top`)

The top instantiates all of the blocks above. Its ports:

* **Clocks and reset:** `clk_fine`, `clk_s`, `rst_n` (asynchronous, active low).
* **Operating point:** `vtarget_mv`, `vstep_mv` (11-bit millivolts), `op_idx` (which stored coefficient pair applies), `trc_seg_en`, `trc_trim`, `tdc_win0_ps`, `tdc_step_ps`.
* **Calibration:** `cal_start` (one-cycle pulse), `cal_d_lo`, `cal_d_hi` in;
  `cal_busy`, `cal_done`, `cal_ok`, `ref_code`, `band_lo`, `band_hi`, `cal_n_kept` out.
* **Tuning:** `tune_start` (pulse), `cost_mode` (`COST_DELAY_SUM` / `COST_ERROR_COUNT`), `b0`,
  `b1_min/max/step`, `b2_min/max/step`, `d_open` in;
  `tune_busy`, `tune_done`, `best_b1`, `best_b2`, `best_cost`, `n_evals`, `op_tuned`, `run_coefs` out.
* **Core interface:** `razor_err`, `err_ext_sel`, and `ext_load_step`, which applies the load step outside the tuner.
* **Observation:** `loop_closed`, `load_step`, `ref_low`, `duty`, `err`, `dcode`, `slack`, `err_event`,
  `cost_dsum`, `cost_ecnt`, `period_start`, and the real-valued `vout`, `il`, `path_delay`.

A typical use: hold reset, let the output rise with the loop open, pulse
`cal_start` and wait for `cal_done`, then pulse `tune_start` and wait for
`tune_done`. The calibration owns the open-loop duty while `cal_busy` is
high. The tuner must not run during calibration.

**One pair per operating condition (`coef_bank`).** The best pair for one
output level is rarely the best for another, so each tuning run stores its
winner in a small register bank under the current `op_idx`. The bank is
written on the clock edge after `tune_done`. While the tuner sits in RUN,
the compensator takes b1 and b2 from the bank entry of the present `op_idx`
(`op_tuned` says that entry has been written; if not, the pair the tuner
ended with stays in use). A DVFS change is then just new `vtarget_mv`,
`vstep_mv` and `op_idx` values. The pair switches in the same sample, the
compensator's integrator carries the duty over, and no retuning is needed.
Recalibrating the band for the new level is still the caller's job, since
the replica delay changes with the supply. `N_OP` (default 2, the two output
levels 1 V and 0.7 V) sets the number of entries.

Compile-time parameters of the top: `L_H`, `C_F`, `ESR_OHM`, `VIN_V`
(power stage), `VT_SCALE` (core corner), and `N_OPEN`, `N_PRE`, `N_EVAL`,
`N_SETTLE`, `N_OBS` (phase lengths), `N_OP` (stored operating points). Shared widths and types are in
`ivr_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends it if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ivr_pkg.sv tb/tb_ivr_autotune_top.sv --top-module tb_ivr_autotune_top
./obj_dir/Vtb_ivr_autotune_top
```

Replace the testbench name for the others. `-Wno-fatal` keeps Verilator's
width warnings in the testbenches from stopping the build. All of them run in
a few seconds.

| testbench | what it establishes |
|---|---|
| `tb_ivr_autotune_top` | Whole design at default parameters, 1 V. Calibration (mean and band checked against samples the bench collects itself), then delay-sum and error-count tuning over a 3x3 grid: 9 evaluations each, exact sweep length, 175-sample windows, load step from sample 87, minimum kept. A third sweep counts an external error flag instead (a stand-in for the core's error-detecting latches) and must score each pair with exactly the flags the bench saw. Then regulation within 3 % and recovery from a load step. Then a second operating point, 0.7 V with a 100 mV step, is calibrated and tuned under `op_idx` = 1, and the output is switched between 1 V and 0.7 V twice; each switch must pick up the stored pair and settle. Finally one replica segment is switched off and the delay code must drop by the expected amount. Counts reference steps, load steps, in-band and out-of-band samples, error events and best-cost updates, and fails if any never happened. |
| `tb_ivr_workloads` | Five corners run concurrently: L +20 %/VT +20 % and L −20 %/VT −20 % at 1 V; nominal, VT +20 %, and L +20 %/VT +20 % at 0.7 V. Each is calibrated, tuned with both costs and checked to regulate with its winner (helper `tb/ivr_corner_run.sv`). |
| `tb_ivr_freq_gain` | What tuning buys the core, on five systems at 1 V and 0.7 V (helper `tb/ivr_freq_run.sv`): each is tuned with both costs and also run with a baseline pair, all under the same periodic load step. Compares the timing-error rate at the calibrated target period and the shortest clock period that keeps the error rate at 0 and at 5 %. |
| `tb_tuning_engine` | The sequencer against a synthetic cost surface: phase lengths, load-step position, argmin, RUN state, and an exhaustive 128x128 sweep. |
| `tb_coef_bank` | Random writes and reads against a reference array, reset state, out-of-range indices. |
| `tb_slack_band_cal` | Duty sweep schedule, zero-error sample selection, rounded mean, band rounding, and the no-zero-error case. |
| `tb_dig_compensator`, `tb_dpwm`, `tb_tdc_encoder`, `tb_delay_sum_cost`, `tb_error_count_cost` | Bit-exact comparison with independent models, including clamps and saturation. |
| `tb_power_stage`, `tb_window_adc`, `tb_trc_vernier_tdc` | The models against closed-form expectations: DC point, load-step droop, ADC rounding, alpha-power delay and Vernier code. |

Results with the default model, to give a sense of scale: at 1 V, with
b0 = 32 and the grid b1 ∈ {−64, −48, −32}, b2 ∈ {16, 32, 48}, both costs pick
(−48, 32). The delay-sum costs range from about 900 to 11 000; the
error-count costs range from 63 to 175 samples out of 175. At L −20 % and
VT −20 %, the two costs choose different pairs on the finer grid. At
0.7 V (finer grid, b1 ∈ {−64, −56, −48}, b2 ∈ {24, 32, 40}) the delay-sum cost
picks (−64, 40).

`tb_ivr_freq_gain` puts tuned and untuned pairs through the same
run-time stress: a load step every 352 ns. The untuned pair is the one the
nominal system picks at that output level. The bench reports the fraction
of samples slower than the calibrated target period, and the shortest
clock period that keeps that fraction at zero:

| system | baseline pair: errors / period | delay-sum pair | error-count pair |
|---|---|---|---|
| 1 V, L +20 %, VT +20 % | (−48, 32): 52 % / >1630 ps | (−64, 40): 8 % / 1310 ps | (−64, 40): 7 % / 1320 ps |
| 1 V, L nom, VT +20 % | (−48, 32): 36 % / 1450 ps | (−56, 32): 11 % / 1260 ps | (−64, 40): 8 % / 1300 ps |
| 1 V, L +20 %, VT nom | (−48, 32): 52 % / 1355 ps | (−56, 32): 9 % / 875 ps | (−64, 40): 6 % / 875 ps |
| 0.7 V, L +20 %, VT +20 % | (−64, 40): 10 % / — | same pair | (−64, 40): 9 % / — |
| 0.7 V, L nom, VT +20 % | (−64, 40): 8 % / — | same pair | (−64, 24): 100 % / — |

"—" means the slowest samples are beyond the end of the Vernier window
(8.1 ns). These numbers come from the simple models here. They show the
direction of the effect, not its size in silicon.

The last row shows a real weakness of the **error-count cost**. It counts
only samples that are too slow. (−64, 24) is unstable at that corner.
While it was being scored, its output ran away upward, so the core was fast
throughout and the pair collected a single error. In operation the same
pair ran away downward. The delay-sum cost, which penalises both
directions, gave that evaluation 11 293 against a best of 1 588. When the
error-count cost is used, the sweep range should exclude unstable pairs, or
candidates should also be screened with the delay-sum cost, which runs in
parallel anyway. The RTL leaves this to the user.

## How far to trust it, and where it departs from the original description

What follows the description: the overall architecture (voltage-mode digital
loop with a direct-form compensator, replica path plus Vernier TDC, dead-band
calibration by an open-loop duty sweep, the two costs, the open / close-low /
step / load-step evaluation script) and the numbers 1.2 V, 6 nH, 10 nF,
50 mohm, 125 MHz / 250 MHz, 8-bit error, 7-bit coefficients, 10-bit DPWM,
700 ns evaluation, 10 mA / 100 mA load, 100-inverter path, ±20 % corners.

Choices made here, each of which can matter:

* **Compensator:** the exact difference equation, the 4 fraction bits, b0
  fixed while (b1, b2) are swept, and the bumpless preload.
* **Analog parameters:** the ADC step (5 mV), the switch resistance
  (0.1 ohm) and all alpha-power parameters are assumed.
* **Replica path:** the split into 50/25/15/10-inverter segments and the
  0..15 trim range.
* **Vernier chain:** the window and step (run-time settings here, chosen per
  operating point), the 127-stage length, and applying the reference
  digitally (slack = ref − code) rather than by re-timing a capture clock.
* **Calibration:** the band factor 1.25, the settle and observe lengths,
  and qualifying samples one by one on a zero error code.
* **Tuning schedule:** the PRE length, the final open phase before RUN, and
  the tie rule.
* **Timing errors:** taken from the replica slack, or from an external error
  input. The error-detecting latches themselves are not part of this RTL.

Not covered:

* The tuner is run once per operating condition; the host decides when to
  recalibrate and retune. Nothing here detects a change of condition on its
  own.
* The baseline tuner that minimises the regulator's own output error is not
  included.
* The error-rate and frequency-gain figures (`tb_ivr_freq_gain`) are taken
  from the replica delay code rather than from a
  gate-level core. With these simplified models the absolute costs, the
  chosen pairs and the gains should not be expected to match silicon.
* The DPWM counter would need a 128 GHz clock as written. A real
  implementation splits it into a coarse counter and a delay line with the
  same interface.
