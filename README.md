# FM modulator with a Runge-Kutta oscillator as its carrier

Most digital FM modulators build the carrier with a phase accumulator and a sine
table (DDS) or with CORDIC iterations. This design takes another route. The carrier is a
small dynamical system, solved numerically in hardware, one integration step per
clock. The system comes from a modified single op-amp "jerk" oscillator (an inductor, two
capacitors, an op-amp and a pair of anti-parallel diodes). Once its diode
nonlinearity is linearised and a tiny diode constant is neglected, it reduces to a
harmonic oscillator. Its frequency is proportional to one parameter, the product
`g*h` of the normalised circuit constant `g` and the integration step `h`. Drive that
parameter with the message and the oscillator becomes a frequency modulator. It needs
no phase accumulator, no table and no iteration.

The RTL computes in IEEE 754 single precision (binary32) and delivers its samples as
signed Q16.16 fixed point. It contains:

- the oscillator (`mjerk_osc`) and its coefficient unit (`rk4_coef`);
- the floating-point operators they are built from (`fp32_mul`, `fp32_add`,
  `fp32_to_sfix`, `sfix_to_fp32`);
- a triangular test message (`triangular_wave`);
- the top level that connects them (`fm_modulator`).

The digital-to-analog converter that turns the output words into an analog FM signal is
not part of the RTL. In the reference setup it is the audio codec of an FPGA board.

## From the circuit to a rotation

With its nonlinearity linearised and the diode term dropped, the normalised circuit
equations keep two state variables:

    x2' =  g * x3
    x3' = -g * x2

One classical fourth-order Runge-Kutta (RK4) step of size `h` applied to this pair is
exactly linear. With `t = g*h` it is

    x2[n+1] =  a1 * x2[n] + a2 * x3[n]
    x3[n+1] = -a2 * x2[n] + a1 * x3[n]

    a1 = 1 - t^2/2 + t^4/24        a2 = t - t^3/6

`a1` and `a2` are the Taylor series of `cos t` and `sin t`, truncated after the terms
that RK4 keeps. The step matrix is therefore very nearly a rotation by
`phi = atan2(a2, a1)`, which is about `t` radians. So:

- **Frequency.** The state turns by about `t` radians per clock. The output frequency
  is `t / (2*pi)` times the step rate, which here is the clock rate. At `t = 0.05` a
  period is 125.66 clocks; at `t = 0.01` it is 628.3 clocks.
- **Amplitude.** The gain per step is `sqrt(a1^2 + a2^2) = 1 - t^6/144 + ...`. That is 1
  to within 1e-10 for the `t` used here. The amplitude is set by the initial state
  alone (0.1 by default) and does not depend on `t`. Changing `t` from one clock to
  the next changes the speed of the rotation but not its radius. That is what makes it
  a clean frequency modulator.
- **Limits of `t`.** Stability does not limit `t`: the gain stays below 1 for every
  `t < 2*sqrt(2)`. Resolution does. Above about 0.5 the carrier has few samples per
  period, and `phi` drifts away from `t`. `a1` crosses zero near `t = 1.59` and again
  near `t = 3.08`. The message range used here, 0.02 to 0.06, is far below both.

A forward-Euler step of the same equations would have a gain of `sqrt(1 + t^2)`, above
1, and the oscillation would grow without bound. This is why the
solver is RK4.

## The datapath

```
                      fm_modulator
  +----------------------------------------------------------------------+
  |  triangular_wave (utri)          mjerk_osc (uosc)                    |
  |  +-------------------+  x        +------------------------------+    |
  |  | Q16.16 up/down    |--binary32>| rk4_coef: t -> a1, a2        |    |
  |  | counter  -> sfix_ |  (g*h)    |  (6 fp32_mul, 3 fp32_add)    |    |
  |  | to_fp32           |           | 4 fp32_mul, 2 fp32_add       |--> x (x2, Q16.16)
  |  +-------------------+           | state regs x2, x3 (binary32) |--> y (x3, Q16.16) = FM
  |           |  z (Q16.16)          | fp32_to_sfix on each output  |    |
  +-----------|----------------------+------------------------------+----+
              +------------------------------------------------------------> z (message)
```

Per clock, all of it combinational between the registers:

1. `rk4_coef` forms the coefficients from `t` in this order, each operation rounded
   to nearest even:

       t2 = t*t
       t3 = t2*t
       t4 = t2*t2
       a1 = (1 - t2*0.5) + t4*(1/24)
       a2 = t - t3*(1/6)

   `1/6` and `1/24` are binary32 constants. The coefficients follow `t` in the same
   cycle, so a message that changes every clock is tracked with no delay.
2. `mjerk_osc` computes `a1*x2 + a2*x3` and `a1*x3 - a2*x2` with four multipliers and
   two adders, and loads the results into the two 32-bit state registers.
3. The registered state is converted to Q16.16 for the outputs. The conversion rounds
   to nearest (ties away from zero) and saturates outside +-32768.

There is no pipeline. The critical path runs through three multipliers and two adders
in `rk4_coef`, then one multiplier and one adder in the state update. That sets the
clock, and with it the carrier frequency, since the output frequency is a fraction
`t/(2*pi)` of the clock. To put the carrier in the audio band, for an audio codec as
DAC, run the design from a slow clock or gate its clock. The design has no step
enable of its own.

### Number formats

| Signal | Format | Notes |
|---|---|---|
| `g*h` (oscillator input `gam`, message `x`) | binary32 | `float(8 downto -23)` in VHDL-2008 terms |
| state `x2`, `x3` | binary32 | two registers |
| `a1`, `a2` and the powers of `t` | binary32 | combinational |
| outputs `x`, `y`, message `z` | Q16.16, 32-bit two's complement | `sfixed(15 downto -16)` |

The binary32 operators cover normal numbers, signed zeros, infinities and NaN, with
round-to-nearest-even. They read subnormal inputs as zero and flush results below
2^-126 to zero. The oscillator's values stay near 0.1 and its coefficients near 1 and
near `t`, nowhere close to that limit.

## Amplitude drift from binary32 rounding

The rotation in exact arithmetic keeps the amplitude to 1e-10 over millions of steps.
In binary32, `a1` is rounded to a 24-bit significand, an error of up to 6e-8. That
error is the same in every step for a given `t`. It acts as a constant gain error per
step, so the amplitude grows or shrinks geometrically, slowly and deterministically.
Measured on this RTL, from an amplitude of 0.1:

| `t` | amplitude after 4 million clocks |
|---|---|
| 0.01 | 0.0974 |
| 0.02 | 0.1082 |
| 0.05 | 0.0859 |
| 0.06 | 0.0986 |

So expect a few percent per million clocks, in a direction that depends on `t`. Under
a message that keeps changing, the errors of different `t` partly cancel. Nothing in
the design regulates the amplitude. A periodic reset, or wider arithmetic, are the
obvious remedies if long runs matter. The state rounding itself (random, zero-mean) is
much smaller.

## The message generator

`triangular_wave` is an up/down counter on the Q16.16 grid. It runs from `MIN` = 1311
(0.020004) to `MAX` = 3932 (0.059998) and moves by `STEP` = 2 LSB per clock. When a step
would reach or pass an end, the counter lands exactly on the end and turns. The period
is `2*ceil((MAX-MIN)/STEP)` = 2622 clocks. Within one message period the carrier period
swings between about 105 and 314 clocks, roughly 17 carrier cycles per message
period. The value leaves twice:

- as `z`, in Q16.16, the copy that is shown or sent to the DAC next to the FM signal;
- converted by `sfix_to_fp32` to binary32, as the oscillator's `g*h`.

The conversion is exact, because every message value has fewer than 24 significant
bits.

## Interfaces and timing

`fm_modulator` (top):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one solver step per rising edge |
| `reset` | in | 1 | synchronous, active high |
| `x` | out | 32 | oscillator state `x2`, Q16.16 |
| `y` | out | 32 | FM signal, oscillator state `x3`, Q16.16 |
| `z` | out | 32 | triangular message, Q16.16 |

| Parameter | Default | Meaning |
|---|---|---|
| `MSG_MIN`, `MSG_MAX` | 1311, 3932 | message range in Q16.16 (0.02, 0.06) |
| `MSG_STEP` | 2 | message slope, Q16.16 LSB per clock |
| `X0`, `Y0` | `32'h00000000`, `32'h3DCCCCCD` | initial `x2` = 0, `x3` = 0.1, binary32 |

Timing:

- While `reset` is high at a clock edge, the state is loaded with `(X0, Y0)` and the
  message with `MSG_MIN`.
- In the first cycle after reset: `x = 0`, `y = 6554` (0.1), `z = 1311`.
- Each later edge applies one RK4 step with the message value that was present before
  that edge, and advances the message by one step.
- All outputs come straight from registers through combinational converters. There is
  no handshake: a new sample every clock.

`mjerk_osc` can be used alone with a constant `gam`: a fixed-frequency quadrature
oscillator with ports `clk`, `reset`, `gam` (binary32) and `x`, `y` (Q16.16), and
parameters `X0`, `Y0`.

## Files

| File | Contents |
|---|---|
| `rtl/fmjerk_pkg.sv` | binary32 struct type, Q16.16 type, constants (1, 0.5, 1/6, 1/24, 0.1, message ends) |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | binary32 multiplier and adder, combinational |
| `rtl/fp32_to_sfix.sv`, `rtl/sfix_to_fp32.sv` | binary32 to and from Q16.16 |
| `rtl/rk4_coef.sv` | `a1`, `a2` from `t` |
| `rtl/mjerk_osc.sv` | the RK4 oscillator |
| `rtl/triangular_wave.sv` | triangular message |
| `rtl/fm_modulator.sv` | top level |
| `tb/fp_ref_pkg.sv` | reference binary32 arithmetic on `real`, for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. A
watchdog counts a failure if a run hangs. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/fmjerk_pkg.sv tb/fp_ref_pkg.sv tb/tb_fm_modulator.sv \
    --top-module tb_fm_modulator -o sim
./obj_dir/sim
```

Replace `tb_fm_modulator` with any other testbench name. Each run takes a fraction of a
second.

What the testbenches establish:

- **Operators.** `tb_fp32_mul`, `tb_fp32_add`, `tb_sfix_to_fp32` and `tb_fp32_to_sfix`
  compare bit for bit with `real` arithmetic, rounded once to binary32. This is a
  correct reference for +, - and * because a double has more than twice the binary32
  precision. They use tens of thousands of random operands each, plus ties,
  cancellations, overflow, underflow and special values.
- **Coefficients.** `tb_rk4_coef` checks `a1` and `a2` bit for bit against the same
  operation sequence. It also checks them against the exact formulas, within 4e-7
  relative.
- **Oscillator.** `tb_mjerk_osc` checks every output sample bit for bit against a
  binary32 model. It runs `t` = 0.05 and 0.01 for 20000 clocks each and a random
  message for 30000 clocks. It also measures the period (125.66 and 628.3 clocks, as
  `2*pi/phi` predicts), the amplitude (0.1) and the value right after reset.
- **Message generator.** `tb_triangular_wave` compares the message with a closed-form
  triangle at the default parameters and at a second set, checks the 2622-clock period,
  and checks a restart by reset.
- **Whole design.** `tb_fm_modulator` runs at the default parameters. It checks `x`, `y`
  and `z` bit for bit against a model of the whole chain over four message periods and
  a reset. For every carrier cycle it checks that the rotation angles sum to 2*pi, and
  it checks that the carrier period shrinks by more than half from the bottom of the
  message to the top.

## Where this RTL departs from, or adds to, its source description

- **The `a2` coefficient.** The source's closed form for `a2` has a fifth-power term,
  `t - t^5/6`. Its RK4 expansion, and the mathematics, give `t - t^3/6`, which is used
  here. With the fifth power, `a1^2 + a2^2 = 1 + t^4/3`, and the oscillation would grow
  by about 2e-6 per step at `t = 0.05`.
- **No pipeline.** The source mentions a parallelised, pipelined RK4 solver but does
  not describe one. Its register count (96) fits an unpipelined datapath. This RTL
  takes one whole step per clock, with 97 flip-flops.
- **Internals are this design's own.** The source states binary32 arithmetic, but not
  the operation order, the rounding modes or the subnormal handling. The operators,
  their flush-to-zero behaviour, the order in which `a1` and `a2` are evaluated, and
  the rounding of the Q16.16 outputs are all this design's choices.
- **Multiplier count.** The datapath has ten binary32 multipliers. Each needs at most
  eight 9-bit embedded multiplier elements on a Cyclone IV E, which is more than the 35
  elements the reference implementation reports. An EP4CE115 still holds it
  comfortably, with at most 80 of its 532 elements in use. This is an estimate, not a
  synthesis result for that device.
- **Values the source does not give:**
  - the initial state (0, 0.1), chosen to give the 0.1 amplitude of the published
    waveforms;
  - the message slope and period;
  - the reset style;
  - the ratio of solver steps to clock cycles (one here).
- **The `x` output.** The published top level brings out only `y` and `z`. `x` is
  added because the experiment displays both oscillator states.
- **No DAC path.** Nothing drives a codec. The serial audio and configuration
  interfaces that a board codec needs are outside the design.
