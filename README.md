# Buck converter model in parametrizable fixed-point arithmetic

A hardware-in-the-loop (HIL) simulator stands in for a power converter
while you test a real controller against it. To follow converters that
switch at hundreds of kHz, the model has to advance by a very small time
step. Tens of nanoseconds rule out floating point on an FPGA. Plain fixed
point is fast enough, but every binary point is frozen at synthesis time.
A model sized for a 60 V / 2 A converter saturates on a 20 A one, and it
loses resolution on a 3.3 V / 0.1 A one. Each new converter then means a
new design.

This RTL uses **parametrizable fixed point** instead. All arithmetic is
plain signed integer arithmetic, sized to fit the FPGA's DSP multipliers.
Each variable's binary point, its *scale* (the number of fractional bits),
is a run-time value. Barrel shifters placed where operands must be aligned
apply those scales. To retarget the model to another converter, you load
new scales and constants. You never re-synthesize.

The converter modelled is the synchronous buck. It has an upper switch
SW1, a lower switch SW2, an inductor L carrying iL, and a capacitor C
with voltage vC feeding a load that draws iR. The model advances one
explicit-Euler step per clock, with no pipeline, so the simulation step
equals the clock period.

## The equations

    iL(k) = iL(k-1) + (dt/L) * vL(k-1)
    vC(k) = vC(k-1) + (dt/C) * (iL(k-1) - iR(k-1))

The inductor voltage vL depends on which switch conducts:

| gates (SW1, SW2) | condition | vL |
|---|---|---|
| 1, x | upper switch closed | vin - vC |
| 0, 1 | lower switch closed | -vC |
| 0, 0 (dead time) | iL > 0, lower diode conducts | -vC |
| 0, 0 | iL < 0, upper diode conducts | vin - vC |
| 0, 0 | iL = 0 | 0 (iL stays at zero) |

If both gates are high at once, SW1 wins. That is a choice of this design.

## Datapath and scales

```
 vin(14) ─┐
          ├─[vl_select]─ vL(14) ─[x dt/L(14)]─ 28 ─[scale (a)]─(+)─[iL reg 28]─┬─ il
 vc_fb ───┘                                                    └────────────┘ │
   ▲                                                                  [scale (b)] 28->14
   │                                                                          │ il_fb
   │                              iR(14) ──(-)────────────────────────────────┘
   │                                        │ iC(14)
   │                                  [x dt/C(14)]─ 28 ─[scale (a)]─(+)─[vC reg 28]─┬─ vc
   │                                                                 └────────────┘ │
   └──────────────────────────────── [scale (b)] 28->14 ────────────────────────────┘
```

The widths are fixed: 14-bit inputs, feedbacks and constants, 28-bit
products and 28-bit states (27 magnitude bits plus sign). The scales are
six 8-bit signed inputs, bundled in the `scales_t` struct:

| scale | applies to |
|---|---|
| `v_in` | vin, the vC feedback and vL (all three are subtracted or selected together) |
| `i_in` | the iL feedback and iR |
| `dt_l`, `dt_c` | the constants dt/L and dt/C |
| `il_st`, `vc_st` | the two 28-bit state registers |

Two rules drive the design:

* **Multiplication needs no alignment.** The product of two integers with
  scales a and b has scale a + b. The constants can therefore use all 13 of
  their magnitude bits, whatever their actual size. For example, dt/L =
  20 ns / 22 µH ≈ 9.1e-4 is stored as 7626 at scale 23.
* **Addition and subtraction need equal scales.** The **(a)** changers move
  each product to the scale of its state before the accumulation. This keeps
  the tiny per-step increments at full resolution. The **(b)** changers
  truncate the 28-bit states to 14-bit feedbacks. That loss is harmless,
  because the feedback is multiplied by dt/L or dt/C again, and only its
  magnitude matters there.

The model computes each changer's shift from the scales, as target minus
source:

| changer | shift |
|---|---|
| (a) inductor branch | `il_st - (v_in + dt_l)` |
| (a) capacitor branch | `vc_st - (i_in + dt_c)` |
| (b) iL feedback | `i_in - il_st` |
| (b) vC feedback | `v_in - vc_st` |

A positive shift adds fractional bits (left shift). A negative shift
removes them (arithmetic right shift, truncating toward minus infinity).

### Choosing the scales

Host software picks each scale from the largest value the variable will
reach in this run:

    scale = magnitude_bits - integer_bits(max_value)

Here `integer_bits(x)` = floor(log2 x) + 1, the bits needed to hold
|v| < 2^n. Magnitude bits are 13 for 14-bit signals and 27 for the states.
A written form with ceil(log2 x) gives the same result except at exact
powers of two. There it is one bit short: a 16 V input would need 16·2^9 =
8192, one more than a 14-bit signal holds.

Worked example: a 400 V state needs 9 integer bits, so its scale is 27 − 9 = 18.
Its resolution is 2^-18 V ≈ 3.8 µV. For a 5 V run the same register gets
24 fractional bits.

The formats used for the three reference converters:

| case | C | L | Vin | Vout | f_sw | iL state | vC state | v_in | i_in | dt_l | dt_c |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 1 | 100 µF | 22 µH | 60 V | 5 V | 200 kHz | 4.23 | 4.23 | 7 | 9 | 23 | 25 |
| 2 | 150 µF | 100 µH | 16 V | 12 V | 200 kHz | 5.22 | 5.22 | 8 | 8 | 25 | 25 |
| 3 | 100 µF | 10 µH | 3.3 V | 2.7 V | 600 kHz | 1.26 | 2.25 | 11 | 12 | 21 | 25 |

In case 3 the capacitor state uses 2 integer bits, because 2.7 V does not
fit in 1. All runs use a 20 ns step.

## Saturation and the dead-time zero stop

These mechanisms are choices of this design. None of them is needed to
reproduce the equations.

* **Scale changer saturation.** A left shift that would push significant
  bits out, or a 28→14 narrowing whose result does not fit, clamps to the
  largest value with the input's sign.
* **Accumulator saturation.** The accumulators saturate at the 28-bit
  limits.
* **`status` flags.** Every clamp raises a flag in `status` for the step
  in which it happens. A flag means the chosen scales are too fine for this
  run.
* **Zero stop in dead time.** A fixed-step model never lands exactly on
  iL = 0. So during dead time, a step that would carry iL across zero stores
  exactly zero instead. From then on the "iL = 0" row of the table applies,
  and the current stays at zero: discontinuous conduction.

## Timing

* **Gate synchronizer.** `sw1_in` and `sw2_in` are asynchronous. Each passes
  through two flip-flops (`pwm_sync`). A gate edge therefore reaches the
  equations 2 clocks later, and the state 3 clocks after the edge is
  applied.
* **One step per clock.** There is no pipeline, because every step needs the
  previous step's result. The critical path runs: state register → (b)
  changer → subtract → 14×14 multiply → (a) changer → 28-bit add → state
  register.
* **Resources.** After synthesis the model holds 56 state flip-flops plus 4
  in the synchronizer, and two 14×14 multipliers.
* **Reset.** Reset is synchronous and active high. It loads `il_init` and
  `vc_init` and clears the synchronizer to "switch open".

## Modules

| file | role |
|---|---|
| `rtl/pfp_pkg.sv` | widths, `in_t`/`prod_t`/`state_t`/`scale_t`, `scales_t`, `status_t`, `vl_mode_t`, saturating helpers, shift-amount function |
| `rtl/buck_pfp_model.sv` | top: the whole model |
| `rtl/pwm_sync.sv` | two-flop gate synchronizer |
| `rtl/vl_select.sv` | inductor-voltage subtractor and switch multiplexer |
| `rtl/pfp_mult.sv` | signed 14×14 → 28 multiplier |
| `rtl/scale_changer.sv` | logarithmic barrel shifter with saturation |
| `rtl/state_integrator.sv` | saturating Euler accumulator with zero stop |

The top's ports are plain signals and packed structs. Every scale and
constant is a top-level input. On a real FPGA they would come from
registers written by a processor. That register interface is not part of
this RTL.

## Testbenches

Every testbench is self-checking and ends by printing `TB_RESULT checks=N
failures=M`.

* `tb_scale_changer`, `tb_pfp_mult`, `tb_vl_select`, `tb_state_integrator`,
  `tb_pwm_sync` check each block against an independent reference: wide
  integers, exhaustive corners and random values. The synchronizer test also
  checks the 2-cycle latency.
* `tb_buck_pfp_model` runs the top at its default sizes and compares it bit
  for bit, every clock, with a reference written from the equations. It
  covers:
  * a 60 V → 5 V converter with PWM and dead time, and a light load that
    drives iL negative
  * a long dead time where iL decays and stops at zero
  * scales changed at run time
  * scales chosen to force every changer and both accumulators to saturate
  * 200 random phases

  It counts each mechanism and fails if any never happened. It also checks
  the 3-clock gate-to-state latency.
* `tb_buck_cases` acts as the configuration software for the three cases.
  For each one it computes the scales and constants and runs the model for
  the settling time of a transient from 80 % to 100 % output voltage (up to
  660 000 steps). It also makes steady-state and start-up runs. A resistive
  load and a double-precision Euler reference are modelled in the
  testbench. The mean absolute error, relative to the mean reference value,
  must stay within:

  | | case 1 iL | case 1 vC | case 2 iL | case 2 vC | case 3 iL | case 3 vC |
  |---|---|---|---|---|---|---|
  | transient | 0.66 % | 0.30 % | 0.035 % | 0.015 % | 1.36 % | 0.069 % |
  | steady state | 0.64 % | 0.41 % | 0.023 % | 0.014 % | 1.75 % | 0.021 % |

  The measured errors are well below the bounds: about 0.1 % / 0.08 %,
  0.018 % / 0.009 % and 0.42 % / 0.026 %. Two more runs show the point of
  the scheme, by running the same hardware with case 1's formats, as a
  classic fixed-point design would:
  * **Case 2 start-up.** iL peaks at 18 A. It clamps at 16 A and the
    current error grows to about 5 %.
  * **Case 3 steady state.** The current error grows from 0.27 % to about
    6.5 %.

The load resistances are 2.5 Ω, 1 Ω and 36.45 Ω. They were picked to give
the steady currents of about 2 A, 12 A and 0.075 A that these converters
run at.

To simulate with Verilator, list the package first:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/pfp_pkg.sv \
    tb/tb_buck_cases.sv --top-module tb_buck_cases
./obj_dir/Vtb_buck_cases
```

Every testbench finishes in a few seconds.

## Where this departs from, or adds to, the reference design

* **Separate state scales.** iL and vC each have their own scale, where a
  single "state" scale is conceivable.
* **One voltage scale.** The input-voltage and vC-feedback scales are one
  value, `v_in`, since the two are subtracted.
* **Explicit negation.** The lower-switch input of the multiplexer is −vC,
  negated explicitly.
* **This design's own additions.** The dead-time zero stop, all saturation
  logic, the status flags, the reset-loaded initial states, the 8-bit scale
  format, and the computation of the shifts in hardware from the scales.
* **Not included.** Electrical losses, other converter topologies, the
  processor link that writes the scales, and the floating-point and
  fixed-format designs it is compared against.
* **Clock rate.** The achievable clock rate, about 15 ns per step on a
  small FPGA for this kind of datapath, was not measured for this RTL.
