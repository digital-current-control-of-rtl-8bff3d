# Digital average-current control of a synchronous Boost converter

This is an FPGA controller that regulates the **average inductor current** of a
5 V → 12 V, 5 W synchronous Boost converter switching at 125 kHz. Regulating
the input current of a Boost stage is what a photovoltaic maximum-power
tracker or a power-factor-correction front end needs. The hard part is the
size of the ripple. At the nominal point (1 A average) the inductor current
ripple is about 2.3 A peak to peak, larger than the value being regulated. A
sample taken at an arbitrary instant would be useless. The controller
therefore uses a **symmetrical (triangle-carrier) PWM** and takes **one A/D
sample per period, in the middle of the switch on-time**. For a triangular
current waveform that instant gives the period average exactly. A **fixed-point
PI compensator** closes the loop, and the same datapath can act as a pure
integral controller or as a full PID.

All logic runs on one 50 MHz clock. The RTL is plain synthesizable
SystemVerilog (IEEE 1800-2017) and is verified with Verilator.

## Signal flow

```
            +-------------------+   u (0..200)   +----------------+  pwm  +---------------+ gate_ls
 iref ----->| setpoint_gen      |                | dpwm_symmetric |------>| sync_gate_gen |-------> main switch
 step_ref ->| vref = iref(+step)|--vref--+       | up-down carrier|       | dead time     |-------> sync. rectifier
            +-------------------+        |       +----------------+       +---------------+ gate_hs
                                         v        ^ latch     | peak (mid on-time)
 adc_data -->+-------------+ v_sense +-----------------+      |
 (11 bit) -->| adc_sampler |-------->| pid_compensator |------+  (open loop: u_open instead)
             | mask LSBs   |<--------|  e = vref - v   |
             +-------------+  peak   +-----------------+
```

`boost_current_ctrl` is the top level. It wires these five blocks together and
adds the open/closed-loop selector.

## One switching period, clock by clock

The timing inside a period is what makes the scheme work. One period is
400 clocks (8 µs):

| clock in period | event |
|---|---|
| 0 (`period_start`, the carrier *valley*) | The DPWM latches the new command `u` and the set-point generator updates `vref`. The carrier starts its up ramp 0, 1, …, 199. |
| 200 − u | The main-switch PWM goes high (`carrier >= 200 - u`). |
| 200 (`sample_strobe`, the carrier *peak*) | This is the middle of the on-interval. `adc_sampler` keeps the A/D word, which equals the period-average current. The carrier runs down 199, …, 0. |
| 201 | `v_sense` is valid, with `n_reduce` LSBs cleared. |
| 204 | `pid_compensator` presents the new `u` (3-stage pipeline). |
| 200 + u | The PWM goes low. |
| 400 = 0 of the next period | The new `u` is latched. |

So a sample acts on the converter half a period after it was taken. The
modulator therefore adds a T_s/2 delay, and the compensator gains were
designed for that delay. Because every carrier value occurs twice, the
on-time is exactly 2u clocks and the duty cycle is exactly `d = u / 200`.
`u = 116` gives the nominal D = 0.58 and V_o = 12 V from 5 V.

The real switch edges come out of `sync_gate_gen` one clock later. The main
switch turns on a further `DEAD` clocks late. Its on-time is therefore
2u − DEAD clocks (227 clocks for u = 116), and its centre lies about DEAD/2
clocks after the sampling strobe. At 0.01 A per clock of current slope, that
is an error of about 25 mA. The closed-loop tests allow for it.

## Symmetrical DPWM (`dpwm_symmetric`)

The carrier is an up-down counter with amplitude N_r = 200, so
50 MHz / (2 · 200) = 125 kHz. The command is compared with the carrier on
every clock. Leading and trailing edges both move, symmetrically about the
carrier peak. Commands above 200 are clamped. The command changes only at the
valley. A mid-period change of `u_in` waits for the next period, and the unit
test checks this. `en` low parks the carrier at 0 with the gate low.

The quantization is coarse: one command step is 0.5 % of duty. Near D = 0.58
one step moves the average inductor current by about 2·I_L/(1−D)/N_r ≈ 24 mA.
At 512 LSB per ampere that is about 12 A/D LSB. This is why the A/D
resolution has to be reduced (next section).

## Sampling and LSB reduction (`adc_sampler`)

The A/D converter on the power board runs continuously and presents an 11-bit
word, `adc_data`, every clock. Its scale is 1 V full scale, a 10 mΩ shunt and
a sensing gain of 25, giving 0.25 V/A, i.e. **512 LSB per ampere** and about
1.95 mA per LSB. The shunt carries the switch current. It reads the inductor
current during the on-time and zero otherwise, so the sample must fall inside
the on-interval.

If one A/D step is finer than the current step that one DPWM count causes,
the loop can never settle. The integrator hunts between two DPWM counts, and
the result is a **limit cycle**. The cure is to make the A/D step coarser than
the DPWM step:

    2^n_reduce  >  (2 · I_L · q_D / (1 − D)) / q_AD  ≈ 43.5   ->   n_reduce >= 6

`tb_limit_cycle` reproduces this. The command hunts for every `n_reduce`
below 6 and is constant from 6 on. `n_reduce` is a run-time input. The sampler clears that many LSBs of the
sampled word, leaving steps of 64 LSB (125 mA) for n_reduce = 6. Because
clearing truncates, every current between the set point and one step above it
reads as the set point. **Set points should be multiples of 2^n_reduce**,
e.g. 576 or 640 for about 1 A, 896/960 for 1.5 A and 1152/1216 for 2 A. The
regulated average then lies between `vref` and `vref + 2^n_reduce` LSB.

## Fixed-point compensator (`pid_compensator`)

Once per period, on the sample's `valid` pulse:

| quantity | format | formula |
|---|---|---|
| e[k] | 12-bit signed, LSB = 1 A/D step | vref − v_sense |
| Δe[k] | 12-bit signed (clamped) | e[k] − e[k−1] |
| u_p | Kp · e, scale 2^-9 | shifted left 4 to the 2^-13 grid |
| u_d | Kd · Δe, scale 2^-6 | shifted left 7 to the 2^-13 grid |
| u_i[k] | 24-bit signed, scale 2^-13 | clamp(u_i[k−1] + Ki · e, 0, 200 · 2^13) |
| u[k] | 8 bits, 0..200 | clamp(floor((u_p + u_i + u_d) · 2^-13), 0, 200) |

This is the discrete PID `Kp + Ki/(1 − z^-1) + Kd(1 − z^-1)` with the error
counted in A/D steps and the output in DPWM counts. The gains are 10-bit
unsigned inputs. A controller gain K designed with the error in volts and the
output in DPWM counts becomes the integer

    K_HDL = round(K · λ / 2^-frac),   λ = 1/2048 V per A/D step

| design | K (continuous design) | K_HDL | frac | value used |
|---|---|---|---|---|
| PI, f_c = 12.5 kHz, 45° phase margin | Kp = 36.12 | **9** | 9 | 0.0176 |
| | Ki = 16.49 | **66** | 13 | 0.0081 |
| integral only, f_c = 5 Hz | Ki = 0.041 | **1** (rounded up from 0.17) | 13 | 0.00012 |

The PI gains were found by bilinear-transform design of the discretized loop
gain. That loop gain is |T_u| = 0.0194 and ∠T_u = −105° at the prewarped
crossover, which gives ω_PI = 4.64·10^4 rad/s and G_PI∞ = 44.36. Note that
**Kp_HDL = 9 and Ki_HDL = 66**, not the reverse. These are the values that
reproduce the scaled gains 0.0176 and 0.0080.

The integral term is the only one that carries state and needs range. It is
clamped to the command range [0, 200] (anti-windup). The proportional and
derivative products are only aligned to it. `clear` empties the integrator
and the error history. The top holds `clear` while the loop is open or the
modulator is disabled, so closing the loop starts from u = 0.

`u_sum` (unsaturated) and `u_int` are brought out to the top as observation
ports for a logic analyser, as are `v_sense`, `vref` and `u_pid`.

## Set point and periodic step (`setpoint_gen`)

`vref = iref`, or `iref + step_ref` on alternate intervals of
`STEP_PERIODS` = 125 periods (1 ms per level) when `step_en` is set.
`step_ref` is an 11-bit signed word. Stepping 576 → 896 is `step_ref = 320`,
a 0.5 A step, and 576 → 1152 is `step_ref = 576`, a 1 A step. The sum is
clamped to 0..2047. The set point changes only at the period start.

## Synchronous rectifier drive (`sync_gate_gen`)

In the synchronous Boost, the output diode is replaced by a MOSFET driven in
complement to the main switch. Each gate turns on only after the PWM has been
stable for `DEAD` clocks (default 5 = 100 ns). Turn-off is immediate. An
assertion states that the two gates are never high together. `sync_en` low
keeps the rectifier off, so the body diode conducts. The top also forces it
off when `en` is low.

## Top-level interface (`boost_current_ctrl`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | 50 MHz clock, asynchronous active-low reset |
| en | in | 1 | modulator enable (both gates off when low) |
| adc_data | in | 11 | A/D word, 512 LSB/A |
| mode | in | `loop_mode_e` | `MODE_OPEN_LOOP`: DPWM takes `u_open`; `MODE_CLOSED_LOOP`: DPWM takes the compensator |
| u_open | in | 8 | open-loop command (116 → D = 0.58) |
| iref | in | 11 | current set point in LSB |
| step_en, step_ref | in | 1, 11 signed | periodic set-point step |
| gains | in | `pid_gains_t` {kp, ki, kd} | 10-bit gain integers |
| n_reduce | in | 4 | A/D LSBs to clear (6 recommended) |
| sync_en | in | 1 | drive the synchronous rectifier |
| gate_ls, gate_hs | out | 1 | main switch, synchronous rectifier |
| sample_strobe, period_start | out | 1 | sampling instant, carrier valley |
| v_sense, vref, u_pid, u_active, u_int, u_sum, carrier, carrier_up, step_active, int_sat, out_sat | out | various | observation |

The input registers (mode, gains, set point, step, `n_reduce`, `u_open`) are
meant to be written by a host through any register interface. That interface
is not part of this RTL. The inputs are assumed to be synchronous to `clk`.
Shared constants and the `loop_mode_e` and `pid_gains_t` types are in
`rtl/boost_ctrl_pkg.sv`.

## Files

| file | content |
|---|---|
| `rtl/boost_ctrl_pkg.sv` | constants (N_r, widths, gain scales, default gains) and types |
| `rtl/boost_current_ctrl.sv` | top level |
| `rtl/dpwm_symmetric.sv`, `rtl/adc_sampler.sv`, `rtl/setpoint_gen.sv`, `rtl/pid_compensator.sv`, `rtl/sync_gate_gen.sv` | the blocks |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/boost_power_stage_model.sv` | behavioural (non-synthesizable) model of the power board |
| `tb/tb_current_setpoints.sv` | closed-loop run of all experimental current levels and steps |
| `tb/tb_limit_cycle.sv` | steady state for `n_reduce` = 0..7: the limit cycle and its removal |

## Verification

Every testbench checks the design against values it works out independently.
Each ends with `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dpwm_symmetric`: period = 400 clocks, on-time = 2u for u = 0, 1, 57,
  116, 199 and 200, clamping of 250, strobe exactly at mid-period inside the
  on-interval, command held until the valley, stop on `en` low.
* `tb_adc_sampler`: random words and strobes, every `n_reduce` from 0 to 11,
  one-clock latency, hold between strobes; 610 → 576 with 6 bits cleared.
* `tb_setpoint_gen`: step alternation every `STEP_PERIODS` periods, negative
  steps, clamping at both ends, no change between strobes.
* `tb_pid_compensator`: compares every output and the integrator with a 64-bit
  integer reference of the equations above. It covers the PI and integral
  gains, 1000 random samples with random Kp, Ki and Kd, both clamps, `clear`,
  and the 3-clock latency.
* `tb_sync_gate_gen`: clock-by-clock comparison with a reference on random
  PWM patterns, no overlap, minimum gap = DEAD, rectifier off with `sync_en` low.
* `tb_boost_current_ctrl` runs the whole controller at its default parameters
  in closed loop with the power-stage model. It runs open loop at U = 116,
  then the PI at 576 LSB, the periodic step 576 ↔ 896, a load step
  416 → 466 mA, an input step 5 → 6 V, both compensator clamps, the
  integral-only gain, the return to open loop and a disable. It counts each
  mechanism and fails if one never occurs. It takes about 10 s.
* `tb_current_setpoints` runs set points 576, 640, 768, 896, 960, 1024, 1152
  and 1216 LSB and the steps of 320 and 576 LSB. It checks that the average
  inductor current lies between the set point and one reduced step above it.
* `tb_limit_cycle` holds the model's output at 12 V so the loop has a true
  steady state. It then sweeps `n_reduce` from 0 to 7 around 1.2 A. With
  0–5 bits cleared, the command keeps hunting between two or three DPWM
  counts (119–121) and the samples spread over up to 64 LSB. With 6 or 7 bits
  cleared, the command and the sample are constant. The test checks both
  cases.

The power-stage model integrates the converter equations with one Euler step
per clock. It uses L = 10 µH, r_L = 30 mΩ, C = 311 µF and R = 28.8 Ω, with the
body diode blocking negative current during dead time. The A/D sees the shunt
current of the main switch only. The model's input voltage and load can be
changed from the testbench, and its output can be held at a fixed voltage
(stiff dc bus). It has no sensor offset, no A/D noise and no
switching transients.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/boost_ctrl_pkg.sv rtl/*.sv tb/boost_power_stage_model.sv tb/tb_boost_current_ctrl.sv \
    --top-module tb_boost_current_ctrl -Mdir obj_top
./obj_top/Vtb_boost_current_ctrl
```

For a block testbench, list the package, the block's file and its testbench,
e.g. `rtl/boost_ctrl_pkg.sv rtl/pid_compensator.sv tb/tb_pid_compensator.sv`.
Lint with `verilator --lint-only -Wall -Irtl rtl/boost_ctrl_pkg.sv rtl/<file>.sv`.
The remaining lint warnings are unused package constants, plus an
`rst_n` used both as asynchronous reset and in an assertion's `disable iff`.

## Design choices and departures

These follow the reference design: the symmetrical modulator with N_r = 200
at 50 MHz, the latch at the valley, sampling at mid on-time, the 11-bit A/D
word and set point, masking of LSBs, the 12-bit error, the 10-bit gains with
scales 2^-9, 2^-13 and 2^-6, alignment to the integral term, and saturation of
the integral and of the output.

These are this implementation's own choices:

* **Counting sequence**: each carrier value occurs twice, so the on-time is
  exactly 2u clocks.
* **Integrator limits**: [0, 200] command units.
* **Derivative difference**: clamped to 12 bits.
* **Output rounding**: floor.
* **Compensator pipeline**: 3 stages.
* **Dead time**: 5 clocks.
* **Step interval**: 125 periods.
* **Loop-mode behaviour**: the compensator is cleared in open loop, with no
  bumpless transfer.
* **Disable**: `en` low stops the modulator with both gates off.
* **A/D interface**: one parallel word per clock, with no handshake.

Not included:

* The phase-margin measurement by injecting a sinusoid at the compensator
  output was a simulation procedure, and the RTL has no injection input.
* The current-sensing offset of the real board (about 59 mA) is not
  compensated in hardware. It was handled by choosing a larger set point
  (about 610 LSB instead of 512 for 1 A), which remains the user's
  calibration.
