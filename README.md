# Tri-mode digital controller for a point-of-load synchronous buck converter

A buck converter feeding a battery-powered system spends most of its life
either idle (stand-by), holding a steady load, or riding through a load step.
A single compensator tuned for fast transients wastes power in the first two
situations. This controller keeps **three compensators** and runs only the
one the situation needs:

| Mode | Situation | Compensator | Update rate |
|------|-----------|-------------|-------------|
| I    | stand-by      | PID                       | every 4th switching period |
| II   | transient     | robust RST (two-degree-of-freedom) | every switching period |
| III  | steady state  | PID                       | every switching period |

A mode arbiter chooses the mode from the size of the regulation error and an
external *activity* signal `m` supplied by the system (for example, `m = 1`
when a phone leaves stand-by). The RST compensator is the most expensive one
and runs only around load changes. The stand-by PID runs at a quarter of the
rate. The duty word from the active compensator goes to an 11-bit DPWM made of
a second-order sigma-delta modulator and a 6-bit counter. This needs only
64 system clocks per switching period, where a plain 11-bit counter would need
2048.

All RTL is synthesizable SystemVerilog in `rtl/`. Each module has a
self-checking testbench in `tb/`. One closed-loop testbench drives a
behavioural model of the buck power stage.

## Signal path and timing

```
 vo_adc ─┐                      ┌──────────── pid_controller ──┐
 vref ───┼─ error_comparator ─ e┤                              ├─ mux ─ duty ─ sigma_delta_dpwm ─ c ─ deadtime_generator ─ gate_hs / gate_ls
 e_th ───┘          │ e_over    └──────────── rst_controller ──┘  ▲                 │ sample (period start)
                    ▼                                  ▲  ▲       │                 ▼
 m ────────── mode_arbiter ── pid_en / rst_en / sel / pid_quarter ┘         control_tick_divider ── tick_full / tick_pid
```

* **One switching period = 64 system clocks.** The DPWM counter sets the
  period. A 2 MHz switching frequency therefore needs a 128 MHz system clock.
* `sample` is high in the first clock of every period. It is the ADC
  sampling strobe and the control tick. `vo_adc` must be valid at the end of
  that clock. The closed-loop testbench's ADC model converts at the falling
  edge inside it.
* On the tick, the enabled compensators compute in a single clock. The new
  duty word is registered one clock later. The modulator takes the word in
  the last clock of the period, and the new pulse width starts at the next
  counter zero. **Control latency is one switching period.**
* The PID is clocked by `tick_pid`. In stand-by that tick occurs every fourth
  period. The RST and the mode arbiter always use the full-rate tick.
* Everything runs on one clock with an asynchronous active-low reset. The
  "divided clocks" are clock-enable pulses. A compensator that is disabled
  holds all of its registers. This is where a clock-gating flow saves its
  power.

## Mode arbitration (`mode_arbiter`)

This is the part that needs the most care. The arbiter is a three-state
machine that steps on the full-rate tick. Here `e_over = |Vref − Vo| > e_th`:

| From | To | Condition |
|------|----|-----------|
| I stand-by   | II transient | `e_over` or `m = 1` |
| II transient | III steady   | `!e_over`, `m = 1`, and more than `T_TUNE1` ticks spent in II |
| II transient | I stand-by   | `!e_over`, `m = 0`, and more than `T_TUNE2` ticks spent in II |
| III steady   | II transient | `e_over` or `m = 0` |

In any other case the mode holds. A typical cycle is
I → II → III → II → I: load arrives, the RST handles the step, the PID holds
the load, the load goes away, and the RST handles the release.

* **Tuning time.** The RST keeps control for at least the tuning time, even
  if the error is already small. This lets its response finish before a
  simpler compensator takes over. The tick that enters Mode II counts as the
  first, and the exit needs the count to be strictly above `T_TUNE`. Mode II
  therefore lasts at least `T_TUNE + 1` ticks. `m` selects which of the two
  tuning times applies. The defaults are 80 ticks, which is 40 µs at a 2 MHz
  control rate.
* **Overlapped hand-over.** A compensator whose history is stale produces a
  large wrong duty in its first periods. At each mode change the arbiter
  therefore:
  1. enables the compensator of the new mode at once;
  2. keeps the output multiplexer (`sel`) on the old compensator, which stays
     enabled, for `OVERLAP` more ticks. `sel` moves on the `(OVERLAP+1)`-th
     tick after the change.

  Entering Mode II, the RST thus runs beside the quarter-rate or full-rate PID
  before it takes the output (pre-operation). Leaving Mode II, the RST keeps
  the output while the PID warms up (post-operation). `pid_quarter` switches
  to the new rate at the moment of the change, so a PID that is warming up
  already runs at the rate of its new mode.
* **Enable preset** (inside the compensators). On its first tick after being
  enabled, a compensator loads its histories instead of computing:
  * the past duty values are set to the duty the DPWM is using now;
  * the past errors or samples are set to the present ones.

  Together with the overlap, this makes the hand-over bumpless.
* The reset state is Mode I with the PID selected at quarter rate.

Timing of `sel` and `mode` relative to the tick: both are registered and
change in the clock after a tick. `mode_arbiter` asserts that the selected
compensator is always enabled.

## Compensators

Both compensators are single-cycle multiply-accumulate units with saturating
duty state.

**PID** (`pid_controller`), with `e[n] = Vref[n] − Vo[n]` in ADC codes:

    d[n] = a1·d[n−1] + a2·d[n−2] + b0·e[n] + b1·e[n−1] + b2·e[n−2]

**RST** (`rst_controller`), with `w` = reference and `y` = measured output,
both in ADC codes:

    d[n] = t0·w[n] + t1·w[n−1] + t2·w[n−2] + t3·w[n−3]
         − r0·y[n] − r1·y[n−1] − r2·y[n−2] − s1·d[n−1] − s2·d[n−2]

R and S set disturbance rejection and robustness. T sets reference tracking
independently. S should contain the integrator `(1 − z⁻¹)`.

Number formats (in `trimode_pkg`):

* coefficients are signed 24-bit with 14 fraction bits (Q14, range ±512);
* duty words are 11-bit unsigned;
* the internal duty state keeps 10 extra fraction bits, so that small
  integral steps accumulate;
* the state saturates to [0, 2048) and cannot wind up.

All coefficients are **input ports** (`pid_coef`, `qpid_coef`, `rst_coef`),
so they can be tuned off line and loaded by a host. The stand-by PID has its
own set, because it samples four times more slowly. For the plant below, the
steady-state set is not stable at a quarter of the rate.

Coefficients used in the testbenches, designed for L = 4.7 µH, C = 22 µF,
R = 5 Ω, Vin = 3 V, fs = 2 MHz, one period of delay, error in 2 V/1024 codes
and duty in 1/2048 codes. Values are given as real numbers; multiply by
16384 for the port codes:

| Set | Values |
|-----|--------|
| PID, steady state | a1 = 1, a2 = 0, b0 = 31.04, b1 = −61, b2 = 30 (kp 1, ki 0.04, kd 30) |
| PID, stand-by (fs/4) | a1 = 1, a2 = 0, b0 = 8.54, b1 = −16.5, b2 = 8 |
| RST | r = 97.3, −187, 90; s1 = −1, s2 = 0; t0 = R(1) = 0.3, t1..t3 = 0 |

The RST set has the same integrator as the PID, with a stiffer R. Its
closed-loop poles have a spectral radius of 0.93, against 0.98 for the PID.
Its T applies the reference without the derivative kick.

## Sigma-delta DPWM (`sigma_delta_dpwm`)

The 11-bit duty word `d` is reduced to a 6-bit word `v` once per period by
an error-feedback modulator:

    u[n] = d[n] − 2·E[n−1] + E[n−2]           (ORDER = 2; ORDER = 1 uses d[n] − E[n−1])
    v[n] = floor(clamp(u[n], 0, 2047) / 32)
    E[n] = 32·v[n] − clamp(u[n], 0, 2047)     (−31 ≤ E ≤ 0)

As a result, `V(z) = D(z) + (1 − z⁻¹)²·E(z)`. The quantization error is pushed
to high frequency, where the LC output filter removes it, and the average of
`32·v` equals `d`. The counter-comparator PWM holds `c` high for the first `v`
of the 64 clocks of the period.

**Idle tones.** A low-order modulator fed with a constant word near a
multiple of 32 produces a slow periodic pattern. For example, the word 1025
makes a first-order loop emit 33 once every 32 periods, which is a 62.5 kHz
tone that passes the output filter. The noisiest words are

    d = I·2^(n−m) ± 1 = I·32 ± 1,   q_th ≤ I ≤ 2^m − q_th  (q_th = 8)

while words that are exact multiples of 32 give a constant output word.
Therefore:

* the design uses the second-order loop;
* `idle_tone_detector` raises `idle_tone` whenever the duty word sits on one
  of these codes. The system can use this to move the reference by a code.
  The flag does not alter the loop.

In the closed-loop testbench, the dead time shortens the effective pulse. The
steady-state duty settles at 1089 = 34·32 + 1, which is a flagged code.

## Dead time (`deadtime_generator`)

The high-side gate follows `c = 1` and the low-side gate follows `c = 0`.
Each gate switches off one clock after its phase ends. It switches on only
after `c` has held the new level for `DT` clocks (default 2). Phases of `DT`
clocks or fewer leave both gates off. An assertion checks that the gates never
overlap.

## Top level (`trimode_top`)

Parameters:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `T_TUNE1`, `T_TUNE2` | 80 | minimum time in Mode II on loading and on unloading, in ticks |
| `OVERLAP` | 8 | hand-over overlap, in ticks |
| `DEADTIME` | 2 | gate dead time, in clocks |
| `Q_TH` | 8 | idle-tone central-range threshold |

Ports:

* **Inputs:** `vref`, `vo_adc`, `e_th` (10-bit ADC codes), `m`, and the three
  coefficient structs.
* **Outputs:**
  * `sample` (ADC strobe);
  * `c`, `gate_hs`, `gate_ls`;
  * status: `mode`, `sel`, `pid_en`, `rst_en`, `duty`, `sd_word`, `e_over`,
    `idle_tone`.
* **Stand-alone DPWM:** a second `sigma_delta_dpwm` with its own duty input
  `sa_d` and outputs `sa_c`, `sa_period_start`, for testing the modulator
  outside the loop (the test chip carries one too).

The ADC, the gate drivers and the power stage are outside the design. A
10-bit, 2 V full-scale ADC matches the codes used here: 1.5 V is code 768, and
one code is 1.95 mV. In the testbench, `e_th` = 8 codes (about 15 mV, 1 % of
the output).

## Where this RTL makes its own choices

These points go beyond, or depart from, the published controller:

* **Clocking.** It uses clock enables instead of a divided, multiplexed
  controller clock. Control runs once per switching period. The published
  test set-up sampled its ADC at 1 MHz with switching at up to 2 MHz.
* **Arbitration.** It is written as the three-state machine above. It is not
  the flip-flop delay chains and gates of the original block diagram.
  Counters measure the tuning time. `m` decides whether Mode II exits to III
  or to I.
* **Error magnitude.** The comparison uses `|e|`, so an unload step, where Vo
  rises, also wakes the transient mode.
* **Hand-over.** The overlap length, the enable preset of the histories, and
  the separate stand-by coefficient set are this design's own.
* **Fixed-point formats** are this design's own, as are the saturation
  limits and the modulator's input clamp range.
* **Modulator filter.** The second-order filter is `H_e = 2z⁻¹ − z⁻²`, which
  gives the noise transfer `(1 − z⁻¹)²`.
* **DPWM mode input.** The DPWM has no mode input; it steps every period in
  all modes.
* **Dead time.** The dead-time generator is a minimal design of its own.
* **Idle-tone flag.** The idle-tone detector is a status flag in hardware.
  The original treats the sensitive codes as an off-line design rule.
* **Coefficients** are inputs. The example values above were derived for the
  test plant and are not taken from the original.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and has a watchdog.

| Testbench | What it establishes |
|-----------|---------------------|
| `tb_error_comparator` | error value and threshold flag, including the equal-to-threshold and negative cases |
| `tb_control_tick_divider` | quarter tick on every 4th period, PID tick follows the selected rate |
| `tb_mode_arbiter` | scripted I→II→III→II→I cycle with exact Mode II durations (`T_TUNE+1`), exact hand-over timing, error-held transients; 5000 random ticks against a reference model |
| `tb_pid_controller`, `tb_rst_controller` | bit-exact comparison with 64-bit integer models of the difference equations, covering presets, hold while disabled, both saturation limits and random coefficients |
| `tb_sigma_delta_dpwm` | period length, pulse width = word, word sequence against an integer model, bounded running error (the average is exact), constant word 31 for input 992 |
| `tb_idle_tone_detector` | all 2048 words against the enumerated sensitive set (98 codes) |
| `tb_deadtime_generator` | gate timing against the "last DT+1 samples" rule and no overlap |
| `tb_dpwm_idle_tone` | duty sweep 1015–1065 through first- and second-order modulators with a filtered in-band noise measure (see below) |
| `tb_trimode_top` | closed loop at default parameters (see below) |

In `tb_dpwm_idle_tone`, the noisiest first-order words are 1023, 1025, 1055
and 1057, all of the form I·32 ± 1. The second-order loop is about 15 times
quieter on those words.

`tb_trimode_top` closes the loop through `buck_plant_model` (Euler
integration of the LC filter every clock, with a 10-bit ADC). It runs this
scenario:

1. start-up from 0 V;
2. a 0.3 → 0.45 A step with `m = 1`;
3. a further step to 0.6 A with no change of `m`, so that the error alone
   triggers;
4. unloading with `m = 0`.

It checks the following:

* the output is regulated to within ±4 codes (in practice 0–1 codes) in every
  mode;
* the period is 64 clocks;
* the gates never overlap;
* the stand-alone DPWM, held at word 992 = 31·32, gives 31 high clocks in
  every period.

It requires each of these to happen at least once: every transition, an
error-triggered and an activity-triggered wake, both overlap directions,
quarter-rate updates, dead-time clocks and idle-tone detections. The whole
run takes about 2 s of wall-clock time.

Power consumption is not modelled. The savings of the scheme come from the
enables and from the quarter-rate tick, which is the behaviour that is
simulated here.

## Simulating

Any testbench runs with plain Verilator (5.x):

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/trimode_pkg.sv tb/tb_trimode_top.sv --top-module tb_trimode_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_trimode_top` with any other testbench name. `trimode_pkg.sv`
must come first. All other modules are found through `-y`.

## Files

| File | Contents |
|------|----------|
| `rtl/trimode_pkg.sv` | widths, number formats, mode and select enums, coefficient structs |
| `rtl/trimode_top.sv` | the complete controller |
| `rtl/mode_arbiter.sv` | mode state machine, tuning time, hand-over |
| `rtl/error_comparator.sv` | `e = Vref − Vo`, `|e| > e_th` |
| `rtl/control_tick_divider.sv` | full- and quarter-rate control ticks |
| `rtl/pid_controller.sv` | PID compensator |
| `rtl/rst_controller.sv` | RST compensator |
| `rtl/sigma_delta_dpwm.sv` | sigma-delta modulator and 6-bit counter PWM |
| `rtl/idle_tone_detector.sv` | sensitive duty-code flag |
| `rtl/deadtime_generator.sv` | complementary gates with dead time |
| `tb/buck_plant_model.sv` | behavioural buck power stage and ADC (simulation only) |
| `tb/tb_*.sv` | testbenches |
