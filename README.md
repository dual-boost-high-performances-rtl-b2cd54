# Dual boost PFC controller with 24-bit floating point arithmetic

This is the digital controller of a single-phase power factor corrector
(PFC) built from two boost converters in parallel behind one diode bridge.
All of its arithmetic is done in a compact 24-bit floating point format
("sfloat24"), so the control law can be written in physical units (volts,
amperes) on a small FPGA without fixed-point scaling work.

The two boost converters have different jobs:

* **Main boost** (switch T_b1, large choke). It carries the power. Its
  hysteresis band b_m is wide, so it switches slowly. Its switching losses
  are low even though its current is high.
* **Filtering boost** (switch T_b2, small choke). It carries only the
  difference between the wanted total current and the main current. It has a
  narrow band b_f and switches fast, but its current is small. It acts as an
  active filter that cancels the ripple of the main boost.

The sum of the two currents follows a rectified sine in phase with the mains.
Its amplitude comes from a PI regulator that holds the DC output voltage.
The idea is that the total switching loss, roughly frequency times switched
current, is lower than with one boost converter switching fast at full
current.

The design follows the paper *"Dual Boost High Performances control strategy
on a Power Factor Correction (PFC) implementation by using a 24 bit custom
floating point library"*. Widths, timing, interfaces and several details are
this design's own choices. Each one is listed under
[Where this RTL goes beyond the paper](#where-this-rtl-goes-beyond-the-paper).

## The control law

One **control task** runs every 2.5 us (`task_timer`, 125 clocks at the
assumed 50 MHz). Each task does the following:

```
 four A/D codes ──> value = float(code) * gain - offset        (adc_scale x4)
                      v_ac, v_dc, i_b1, i_b2

 err = V*_DC - v_dc ──> PI ──> amp        (or amp = cfg.i_amp, cfg.use_pi = 0)
 shape = |sin(wt)| from CORDIC            (cfg.use_cordic = 1)
       = |v_ac| * cfg.k_vac               (cfg.use_cordic = 0)
 i*  = amp * shape                        total PFC current reference
 e_b = i* - i_b1                          reference of the filtering boost

 main boost:      T_b1 := 0 if i_b1 > i*,         := 1 if i_b1 < i* - b_m
 filtering boost: T_b2 := 0 if i_b2 > e_b + b_f,  := 1 if i_b2 < e_b - b_f
                  (otherwise each switch keeps its state)
```

A switch command of 1 closes the switch, and the boost current then rises.

**The main band is one-sided.** It reaches from i* - b_m up to i*, not
i* ± b_m/2. So the main current never rises above the reference, and e_b is
never negative. This matters because the filtering boost, like any boost,
can only carry positive current: it can add current, never take it away. The
filtering boost then keeps i_b2 within ±b_f of e_b, so the total current
i_b1 + i_b2 stays close to i*.

`cfg.filt_en = 0` holds T_b2 open. The circuit then works as a classic single
boost PFC with the main band, which is the usual reference point for
comparison.

### Timing of a task

| step | clocks after the task tick |
|---|---|
| four conversions started together (WR pulse, 2 us conversion, RD, settle) | about 110 |
| all four codes in, control task started | +1 |
| latch codes, scale, PI (3 clocks), i*, e_b, hysteresis update | +9 |

The gates change about 120 clocks after the tick. That fits in the 125-clock
period with a few clocks to spare. The currents act on samples taken at the
start of the conversion, so the reaction time is nearly one task period plus
the sampling interval. A faster converter, or a slower clock, is
handled by changing `PERIOD` and the `adc_if` parameters.

Inside `pfc_control` the task is a small state machine. Each state uses its
own arithmetic units, which are combinational, and registers the result.
`pi_reg` shares one adder between the integral update and the output. It
clamps both to [0, `pi_lim`], so the integral cannot wind up and the current
amplitude is never negative.

### Choosing the bands: a caveat found in simulation

The hysteresis decision is taken only once per task. The current samples
are taken when the conversions start, and the gates change almost a whole
task later. So a current can run about two tasks' worth of slope past its
threshold before its switch turns. For the filtering boost that is
2 · v_b · 2.5 us / L2. With the paper's 0.6 mH choke and a 155 V mains
crest, that is about 1.3 A.

The testbenches model the power circuit with the paper's plant values
(3.6 mH, 0.6 mH, 1100 uF, 200 ohm). Below, "rms error" is the rms error of
the total current against i*, and "main alone" is the rms error of i_b1
against i*. These are the results over one mains period:

| operating point | main switching | filtering switching | rms error | main alone |
|---|---|---|---|---|
| 325 V crest, 400 V out, b_m 5 A, b_f 1 A | 0.9 kHz | 27.6 kHz | 1.20 A | 3.02 A |
| 155 V crest, 200 V out, b_m 1 A, b_f 0.15 A | 7.8 kHz | 41 kHz | 0.40 A | single boost: 0.59 A |
| 155 V crest, 200 V out, b_m 0.5 A, b_f 0.15 A | 14.8 kHz | 39.0 kHz | 0.38 A | 0.31 A |
| 155 V crest, 200 V out, b_m 0.25 A, b_f 0.15 A | 23.9 kHz | 32.2 kHz | 0.30 A | 0.18 A |

With a wide main band the filtering boost does its job. The main switch
runs at a fraction of the filtering switch's frequency, and the total
current is much closer to the reference than the main current alone.

With a main band of 0.5 A or less, the per-task step of the filtering
current is larger than the main band. The filtering stage then adds ripple
instead of removing it. To gain from the filtering stage, keep b_m clearly
above that step, or shorten the task period.

The frequencies in this table belong to the simple plant model. They are
not a prediction for real hardware.

## The sfloat24 format

```
 23   22 ........ 15   14 ................ 0
 sign  exponent (8)      fraction f (15)         value = (-1)^s · 2^(exp-127) · 1.f
```

The bias is 127 = 2^(8-1) - 1. For example, the 10-bit A/D code 0000001010
has its leading one at bit 3. It becomes 2^3 · 1.010b = 10.0, which is
`0 10000010 010000000000000` = `24'h412000`.

| exponent field | meaning |
|---|---|
| 0 | zero (signed); subnormals are not supported and read as zero |
| 1 .. 254 | normal number |
| 255 | infinity (fraction 0) or NaN (fraction ≠ 0) |

All results are rounded to nearest, ties to even. A result that overflows
becomes infinity. A result whose exponent would be 0 or less becomes zero.
Compared with IEEE single precision, the range is almost the same; the
precision is 16 significant bits instead of 24, about 1.5e-5 relative.

The type `sf24_t` (packed struct `{sign, exp, frac}`), the constants and the
shared rounding function `round_pack` are in `rtl/sf24_pkg.sv`.

### Library units

| module | operation | latency | notes |
|---|---|---|---|
| `sf24_addsub` | a ± b | combinational | align, add/subtract with guard/round/sticky, renormalise |
| `sf24_mul` | a · b | combinational | sign = xor, exponents added, 16×16 mantissa product |
| `sf24_recip` | 1 / a | 1 clock if f = 0, else 21 | f = 0: exponent field 254 - exp directly; else restoring division 2^34 / 1.f, one bit per clock |
| `sf24_div` | a / b | recip + 1 | computed as a · (1/b); two roundings, so it may be 1 ulp off a correctly rounded quotient |
| `sf24_cmp` | gt / lt / eq | combinational | sign xor first; magnitudes compared as unsigned {exp, frac}; flags swapped for two negatives; +0 = -0; NaN unordered |
| `sf24_from_int` | integer → sfloat24 | combinational | parameters `IW` (default 10), `SIGNED`; exact up to 16 bits |
| `sf24_to_int` | sfloat24 → integer | combinational | truncates toward zero, saturates with `ovf` |
| `sf24_fpu` | any of the above by opcode | 1 clock (2–23 for recip/div) | start/done handshake; opcodes in `sf24_op_e` |

`sf24_fpu` is a general-purpose unit. The controller does not use it: it
instantiates the units it needs directly. The top brings the unit out on its
own `fpu_*` ports.

## The mains reference: `mod_sine`

The paper offers two ways to give the current reference its shape, and both
are built:

1. **Scaled line voltage.** |v_ac| · k_vac, computed inside `pfc_control`.
2. **CORDIC sine.** This uses an external comparator that turns the mains into
   a square wave `zc`. Each edge of `zc` (after a two-flop synchroniser)
   starts a half period and clears a 16-bit phase (2^16 = half a mains
   period). The phase advances by `cfg.phase_inc` per task and stops at the
   end of the half period if the next edge is late. The phase is folded into
   the first quadrant. A 16-iteration rotation-mode CORDIC with 20-bit
   internal words then computes the sine. Its angle unit is π/2 = 2^17, the
   arctangent table is round(atan(2^-i) · 2^18 / π), and the start value is
   x0 = round(0.6072529 · 2^16). The result is clamped to [0, 2^16] and
   converted to sfloat24. The measured error is below 1.4e-4.

For 50 Hz mains and a 2.5 us task, `phase_inc` = 65536 / 4000 ≈ 16.

## The A/D handshake: `adc_if`

There is one instance per converter (10-bit, AD1061 style, all signals active
low). The sequence is:

1. Pulse WR low for 5 clocks to start a conversion.
2. Wait for INT low.
3. Pull RD low.
4. Wait 3 clocks (50 ns plus margin) for the bus, latch the code, release RD,
   and pulse `valid`.

If INT does not come within 200 clocks, `timeout` pulses. The top then drops
that task and sets `adc_timeout` until `fault_clr`.

## Protection: `protection`

On every task, i_b1 and i_b2 are compared with `i_max` and v_dc with `v_max`.
Any excess sets a sticky flag (`status.oc`, `status.ov`). While either flag is
set, both switches are held open. `fault_clr` clears the flags.

## Top level: `dual_boost_pfc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (50 MHz assumed), asynchronous active-low reset |
| `en` | in | 1 | run control tasks |
| `cfg` | in | `pfc_cfg_t` | configuration, see below |
| `fault_clr` | in | 1 | clear the overcurrent, overvoltage and A/D timeout flags |
| `ad_wr_n`, `ad_rd_n` | out | 4 | converter strobes; channels 0 v_ac, 1 v_dc, 2 i_b1, 3 i_b2 |
| `ad_int_n` | in | 4 | converter end-of-conversion |
| `ad_data` | in | 4×10 | converter data buses |
| `zc` | in | 1 | mains zero-crossing comparator output |
| `t_b1`, `t_b2` | out | 1 | main / filtering switch, 1 = closed |
| `status` | out | `pfc_status_t` | v_ac, v_dc, i_b1, i_b2, amplitude, i*, e_b, oc, ov of the last task |
| `task_done` | out | 1 | pulses when the gates were updated |
| `adc_timeout` | out | 1 | a converter did not answer |
| `fpu_*` | | | stand-alone sfloat24 unit: `start, op, a, b` in; `busy, done, r, flags` out |

The top has one parameter, `PERIOD = 125`: clocks per task.

`pfc_cfg_t` (in `rtl/pfc_pkg.sv`) holds these fields, all sfloat24 unless
noted:

* `v_ref`: the DC voltage set point.
* `kp` and `ki`: the PI gains. `ki` already includes the 2.5 us task period.
* `pi_lim`: the PI limit.
* `i_amp`: the fixed amplitude used when `use_pi` = 0.
* `k_vac`: the scale of |v_ac|.
* `b_m` and `b_f`: the two hysteresis bands.
* `i_max` and `v_max`: the protection limits.
* `gain[4]` and `offset[4]`: the sensor scaling, one pair per A/D channel.
* `phase_inc` (16 bits): the CORDIC phase step per task.
* `use_pi`, `use_cordic` and `filt_en` (1 bit each): the mode bits.

The values used in the end-to-end test show one sensor scaling that works:
currents at 40 codes/A around mid-scale, v_dc at 2 codes/V, v_ac at 2.5
codes/V around mid-scale.

## Simulating

Every testbench checks its unit against an independent model, ends by
printing `TB_RESULT checks=N failures=M`, and has a watchdog. The
floating-point references compute in double precision and round to sfloat24
with `tb/sf24_ref_pkg.sv`. The tests also check latencies.

For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/sf24_pkg.sv rtl/pfc_pkg.sv tb/sf24_ref_pkg.sv tb/tb_dual_boost_pfc_top.sv \
  --top-module tb_dual_boost_pfc_top
obj_dir/Vtb_dual_boost_pfc_top
```

Use the same command with another `tb_<module>.sv` for each unit.

`tb_dual_boost_pfc_top` uses the default parameters and runs about 23 ms of
closed-loop operation in well under a minute. It uses a behavioural model of
the power circuit, integrated every clock, and four converter models
(`tb/ad1061_model.sv`). It runs these phases in order:

1. Dual boost with the CORDIC shape and the PI regulator.
2. Single boost.
3. The |v_ac| shape with a fixed amplitude.
4. An overvoltage shutdown and its clear.
5. A converter that never answers.
6. Two operations on the stand-alone unit.

The test checks four things:

* Every task's gate commands against the hysteresis rule.
* That the filtering stage lowers the ripple.
* That the filtering switch switches faster than the main one.
* That each mechanism happened at least once.

`tb_pfc_workloads` runs the operating points in the table above. It takes
about 20 seconds.

## Where this RTL goes beyond the paper

The paper gives the number format, the product, reciprocal and comparison
rules, the control scheme, the hysteresis rule, the A/D handshake, the
2.5 us task and the plant values. These are this design's own choices:

* **Clock.** 50 MHz, assumed. All cycle counts follow from it.
* **Rounding and special values.** Round to nearest even; subnormals
  flushed; infinity/NaN encoding.
* **Adder.** The internal structure of the adder.
* **Reciprocal.** The general case when the fraction is not zero (a bit-serial
  divider). Only the power-of-two case is a given rule.
* **Integer to float.** Signed integers and rounding for integers wider than
  16 bits.
* **PI regulator.** Its form, the [0, lim] clamp and the three-clock
  schedule. The paper specifies neither gains nor limits.
* **CORDIC sine.** The phase accumulator driven from the zero-crossing edges,
  the iteration count and the widths.
* **A/D interface.** The WR pulse width and the timeout. This interface is
  larger than the roughly 18 logic elements the paper quotes for its
  four-converter handshake.
* **Protection.** Latching and clearing of faults; the limits themselves are
  run-time inputs.
* **Run-time mode selection.** The paper describes the direct reference and
  the PI version, and the CORDIC and scaled-voltage shapes, as separate
  builds. Here mode bits select among them.
* **Opcode unit.** The opcode unit `sf24_fpu` and its handshake.

These parts are not included:

* **Analog parts.** The sensors, the analog conditioning (gain, 2.5 V offset,
  5 V clamp), the converter chips, the zero-crossing comparator and the power
  stage. They appear only as testbench models.
* **AC line current sensing.** The prototype used it only to validate
  measurements.
* **Logic-element budgets.** Whether the design fits the paper's device
  budgets (5 980 and 12 060 logic elements) is not known. The RTL has only
  been synthesised to generic cells: about 8 100 word-level cells and 914
  flip-flop bits for the whole top, including the stand-alone unit.
