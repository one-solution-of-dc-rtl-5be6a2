# Adaptive delta-modulation controller for a digital PWM DC/DC converter

A switch-mode supply with a digital PWM moves its duty factor in discrete
steps. With a fixed step (one LSB per switching period), the output settles
to within one quantum. However, after a load step it needs as many periods
as the error holds quanta. A larger fixed step shortens that recovery but
also enlarges the steady-state ripple.

This controller resolves the conflict the way adaptive delta modulation does
in telecommunications. Each period it receives only one bit: is the output
voltage above the reference or not? It keeps the signs of its last four duty
changes. While the output stays on one side of the reference, the duty keeps
moving the same way in growing steps. When the output crosses the reference,
the direction reverses and the step shrinks. In steady state the duty
alternates by ±1 LSB around the operating point.

The design is the digital part of the scheme described in *One Solution of
DC/DC Converter with Adaptive Feedback Control*. That scheme is an 8-bit
digital PWM for a 20 kHz forward converter, with a comparator, a four-bit
sign memory and a programmable step table. The comparator and the power
stage are analog and are not part of the RTL. Behavioural models of both
are provided for simulation.

## The loop

```
          U_o ──►┌────────────┐ comp_in  ┌───────┐        ┌───────────┐  fi  ┌────────────────────┐
 V_REF ─────────►│ comparator │─────────►│ sync2 │───────►│ error_gate│─────►│ adaptive_step_ctrl │
          (analog, outside)   └──────┘   └───────┘        └───────────┘      └────────────────────┘
                                                              ▲ sign_hist[0]      │ sign_new   │ lut_addr
                                                              │                   ▼            ▼
                                                         ┌────┴───────┐      ┌──────────┐  ┌──────────┐
                                                         │ delay_line │◄─────│ (shift)  │  │ step_lut │
                                                         │ 4 signs    │      └──────────┘  │ 16 x 8 b │
                                                         └────────────┘                    └────┬─────┘
                                                                                                │ duty_step
            gate  ┌──────────────────────────────────────────────────┐                          ▼
 power  ◄─────────│ pwm_generator: duty += step (clamped), count < duty │◄─────────────────────────┘
 switch           └──────────────────────────────────────────────────┘──► period_end (decision strobe)
```

The top module `dcdc_adaptive_ctrl` wires these blocks together. Its ports
are the comparator input, the gate output, a write port for the step table,
and status outputs: duty, step, fi, sign history, run length, reversal and
clamp flags.

## One switching period

The PWM counter runs from 0 to 2^N_BITS − 1. One clock is one duty LSB, so
at N_BITS = 8 a period is 256 clocks, and a 20 kHz switching frequency needs
a 5.12 MHz clock.

* Cycles 0 … duty−1: `gate` is high. It is registered, so it is high in the
  cycle where the counter holds k exactly when k < duty.
* Last cycle (`period_end`): the decision is taken combinationally from:
  * the comparator level, as seen through the two-flop synchronizer (that is,
    the level two clocks earlier);
  * the stored signs;
  * the step table.

  On the closing clock edge, three things happen together:
  * the new sign is shifted into the delay line;
  * the duty register takes duty + step, clamped to [DUTY_MIN, DUTY_MAX];
  * the status registers update.
* The new duty applies from the first cycle of the next period.

So the output voltage sampled at the end of period *i* reflects the duty of
period *i*, and it decides the duty of period *i*+1.

## Direction: the error gate

`comp_in` is 1 when the output is above the reference. A stored sign is 1
when that change increased the duty. The gate output `fi` means:

| comp (output above ref) | last sign | fi | next change |
|---|---|---|---|
| 0 | 0 (decreased) | 0 | reverse: increase |
| 0 | 1 (increased) | 1 | keep: increase |
| 1 | 0 (decreased) | 1 | keep: decrease |
| 1 | 1 (increased) | 0 | reverse: decrease |

So `fi = comp XOR last_sign`, and the new sign is always "towards the
reference". `fi = 1` says the error is still there. A run of ones on `fi` is
what the step table turns into larger steps.

The original description of the gate also contains a truth table with the
opposite function (fi = 1 for equal inputs). Combined with the stated
comparator polarity, that table would drive the duty away from the
reference. It matches a comparator with swapped inputs. Use the `INVERT`
parameter of `error_gate` when the comparator is wired that way.

## Step size: the sign history and the step table

This is the part that gives the controller its dynamics.

`adaptive_step_ctrl` addresses the table with `{sign[t-3], sign[t-2],
sign[t-1], sign_new}`: the sign being decided now (bit 0) and the three
before it. The address therefore tells both the direction of this step
(bit 0) and how long the output has been on the same side: the run of equal
bits at the low end. A run of *r* equal signs is *r − 1* consecutive
"keep" decisions (`fi = 1`).

The table has 16 signed entries. After reset, each holds the value given by
`dcdc_pkg::default_step()`:

| run r at the low end | meaning | step magnitude |
|---|---|---|
| 2 | one "keep" | BASE |
| 3 | two "keeps" | K1 · BASE |
| 4 | three "keeps" (longest visible) | K1 · K2 · BASE |
| 1, previous run p = 1 | steady-state alternation | BASE |
| 1, previous run p ≥ 2 | reversal after a boosted run | max(BASE, ½ · magnitude of run p) |

The sign of the entry is the direction in bit 0. With the defaults (BASE = 1,
K1 = K2 = 2) the table is, by address 0 … 15 (bit 0 = newest):

```
-4 +1 -1 +1 -1 +1 -1 +2 -2 +1 -1 +1 -1 +1 -1 +4
```

Rules taken from the published scheme:
* the step grows by K1 after two consecutive "ones";
* it grows by K2 after three;
* on a reversal following a boosted run, the step is cut to half.

Choices made in this design:
* the base step;
* the K values;
* counting the "ones" as `fi = 1` decisions.

The published flow chart applies K1 one decision earlier. Under test, that
variant (steps 1, 2, 4, 8) settled into a wide limit cycle with the test
plant, so it was not adopted.

A further boost for four consecutive "ones" would need a fifth stored sign,
so it is not implemented.

### Reprogramming the table

The table is a register file. It can be rewritten at any time through
`lut_wr_en`, `lut_wr_addr` and `lut_wr_step`; a write takes effect on the
next clock edge. Reset restores the defaults.

* Writing `+BASE` to the odd addresses and `−BASE` to the even ones turns the
  controller into the plain uniform-step converter.
* Larger entries at the long-run addresses give faster recovery and more
  overshoot.

A table whose entry signs disagree with bit 0 of the address is allowed, but
an assertion in `adaptive_step_ctrl` warns about it.

### What to expect from the defaults

There is always a trade-off between recovery time and overshoot. With the
behavioural forward converter used in the tests:

| Setup | Result |
|---|---|
| Test plant | 110 V input, turns ratio 2.5, output filter τ = ¼ period, 60 V reference |
| Soft start | output reaches 60 V in 17 periods |
| Load step 10 % → 100 % (extra 10.8 V loss drop), adaptive table | back inside ±5 V for good in 5 periods |
| Same load step, uniform ±1 steps | 7 periods |

The steady state depends on where the reference falls between two duty
levels. In some cases the duty alternates by ±1 LSB. In others the runs
regrow to the largest step before each crossing, giving a small limit cycle.
At 60 V that cycle is about ±4 V with a period of 8 switching periods.
Smaller K values reduce it, at the cost of slower recovery.

## Duty limits and resolution

`pwm_generator` clamps the duty to [DUTY_MIN, DUTY_MAX]:

* The minimum stands for the shortest pulse the switch can make,
  (t_rise + t_fall)/T.
* The maximum stands for the topology's limit. The default of 128/256 = 50 %
  is the usual limit of a single-switch forward converter.

Neither number is given for the original hardware. `sat_hi` and `sat_lo`
report that the last update was clamped.

One duty LSB is 1/256 of the secondary voltage. For a 10 V output this is
about 39 mV, or 47 mV with 20 % losses.

## Parameters (top level)

| Parameter | Default | Origin |
|---|---|---|
| N_BITS | 8 | 8-bit PWM of the described converter |
| STEP_W | 8 | step width, own choice |
| DUTY_MIN / DUTY_INIT | 2 | own choice |
| DUTY_MAX | 128 | own choice (50 %, forward converter) |
| BASE_STEP | 1 | own choice |
| K1, K2 | 2, 2 | own choice; the description leaves the K values to tuning |

The history length (4) is fixed in `dcdc_pkg::HIST_BITS`.

## Files

| File | Contents |
|---|---|
| `rtl/dcdc_pkg.sv` | history length, sign type, default step-table rule |
| `rtl/dcdc_adaptive_ctrl.sv` | top level |
| `rtl/error_gate.sv` | keep/reverse gate |
| `rtl/delay_line.sv` | four-sign shift register |
| `rtl/adaptive_step_ctrl.sv` | direction decision and table address |
| `rtl/step_lut.sv` | programmable step table |
| `rtl/pwm_generator.sv` | counter-compare PWM with clamped duty update |
| `rtl/sync2.sv` | comparator synchronizer |
| `tb/tb_*.sv` | self-checking testbench per block |
| `tb/comparator_model.sv`, `tb/forward_stage_model.sv` | behavioural models of the analog parts |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
cycle watchdog.

* `tb_error_gate`: all input combinations, both polarities.
* `tb_delay_line`: random shifts against a queue model, the reset value and
  an asynchronous reset.
* `tb_step_lut`: the reset contents against hand-worked tables for two
  parameter sets, random writes and reads, and restore on reset.
* `tb_adaptive_step_ctrl`: random fi, histories and strobes. Checks the new
  sign, the address and the status registers.
* `tb_pwm_generator`: 300 periods with random steps, hitting both clamps.
  Checks the 256-clock period, the high time equal to the duty, and the
  clamped update.
* `tb_dcdc_adaptive_ctrl`: the closed loop at default parameters, with a
  behavioural comparator and power stage. An independent reference model of
  the decision rule and table is compared with the design every period, as
  is the gate's high time. The sequence covers:
  * soft start;
  * steady state;
  * a load step and its release;
  * an unreachable reference (upper clamp) and a 0 V reference (lower clamp);
  * reprogramming to uniform steps and repeating the load step.

  It counts every mechanism and fails if one never occurs: reversal, runs
  of 2/3/4, reduced step after a run, both clamps, table writes and ±1
  alternation. It also requires the adaptive table to recover faster than
  the uniform one.

* `tb_brake_converter_range`: the operating range of a 110 V forward
  converter whose output is set between 30 V and 120 V. At 30, 60, 90 and
  120 V the mean output over 64 periods stays within 1.5 V of the reference,
  and the duty never clamps. The load step and its release are recovered
  within 20 periods. Measured: mean error below 0.5 V, duty 30 … 113, and
  recovery in 4–5 periods.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dcdc_pkg.sv tb/tb_dcdc_adaptive_ctrl.sv --top-module tb_dcdc_adaptive_ctrl -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The end-to-end run takes
well under a second.

## Limits of this model

* The loop dynamics in the tests come from a first-order average model of
  the power stage. They show the mechanisms, not the recovery times or
  overshoot of a real converter.
* The comparator has no hysteresis and no offset.
* There is no enable, soft-start ramp limit or fault shutdown. The described
  controller has none either.
