# Pipelined CORDIC polar modulator

A polar transmitter does not send I and Q to a linear power amplifier. It
splits each baseband sample into an **envelope** (magnitude) and a **phase**.
The phase drives the carrier oscillator. The envelope modulates the supply of
a switching, high-efficiency amplifier. This RTL is the digital front end of
such a transmitter, a *polar modulator*. It takes unsigned 10-bit I/Q samples
and produces:

* a PWM bit stream carrying the envelope, for a switch-mode supply regulator;
* a 10-bit phase word, delay-matched to the envelope, on a port that is
  either parallel or serial.

The core is a rectangular-to-polar **CORDIC** processor: an 8-stage pipeline
of shift-and-add elements that computes `sqrt(I²+Q²)` and `atan2(Q, I)` with no
multiplier. The shifts are plain wiring, and each stage's arctan constant is
hard-wired, so every stage is just three adders and a register.

```
            slow rate (1 sample per 4 clocks)             full rate
          +---------------------------------+  R  +--------------+   +---------+   +---------+
 i_in --->| cordic_processor                |---->| interpolator |-->| barrel_ |-->| dac_pwm |--> pwm_out
 q_in --->|  preproc -> 8 x CE -> postproc  |     |  (x4)        |   | shifter |   |         |--> amp_par, overflow
          |   0 clk     8 clk     2 clk     |  A  +--------------+   +---------+   +---------+
          |                                 |---->| interpolator |-->| angle_output (2-clock delay,  |--> angle_out
          +---------------------------------+     | (x4, mod 1024)   |  parallel / serial port mux)  |
                 ^ en                              +--------------+   +-------------------------------+
                 |
          interp_counter (full rate) --> sample_req, phase
```

## Number formats

| quantity | format |
|---|---|
| `i_in`, `q_in` | unsigned 10 bit. The origin is (512, 512), so `I' = i_in - 512` lies in -512..511 |
| magnitude R | unsigned 10 bit, the true `sqrt(I'²+Q'²)` (the CORDIC gain is removed) |
| angle A | 10-bit binary angle: 1024 units = 360°, so 256 = 90°. It wraps modulo 1024 |
| CE datapath | 14-bit two's complement: 10 data bits, 2 integer bits for the sign and the CORDIC gain of 1.65, and 2 fraction bits |

## The CORDIC processor (`cordic_processor`)

### Pre-processing: origin move and quadrant-1 move (0 clocks)

`cordic_preproc` subtracts 512 from each input. It then replaces the vector by
`(|I'|, |Q'|)` and keeps a 2-bit quadrant code:

| quadrant | condition |
|---|---|
| Q1 | I' ≥ 0, Q' ≥ 0 |
| Q2 | I' < 0, Q' ≥ 0 |
| Q3 | I' < 0, Q' < 0 |
| Q4 | I' ≥ 0, Q' < 0 |

The processor also has a third input, `zi`: a start angle that comes out
added to the result, so `A = zi + atan2(Q', I')` (mod 1024). To get this,
z starts at `+zi` in quadrants 1 and 3 and at `−zi` in quadrants 2 and 4,
because the post-processing negates the accumulated angle there. No extra
pipeline register is needed. The modulator ties `zi` to 0.

Folding every vector into the first quadrant keeps the angle that the CORDIC
must resolve within 0..90°. That range is inside what eight stages can reach:
the constants add up to 279 units, or 98°. The magnitudes get two zero
fraction bits.

### CORDIC elements (8 clocks)

Stage `i` (i = 0..7, `cordic_element #(.STAGE(i))`) computes, with
`s = +1` if `y ≥ 0` and `s = -1` otherwise:

```
x' = x + s·(y >>> i)
y' = y − s·(x >>> i)
z' = z + s·a_i
```

This is vectoring mode: y is driven to zero, x grows to `|v|/K`, and z
accumulates the angle. The right shift is arithmetic and truncates. Each
stage has its own constant `a_i ≈ arctan(2^-i)` in binary-angle units:

| stage | arctan | degrees | a_i (hex) |
|---|---|---|---|
| 1 | 2^0  | 45.0000 | 7F |
| 2 | 2^-1 | 26.5651 | 4B |
| 3 | 2^-2 | 14.0362 | 27 |
| 4 | 2^-3 | 7.1250 | 14 |
| 5 | 2^-4 | 3.5763 | A |
| 6 | 2^-5 | 1.7899 | 5 |
| 7 | 2^-6 | 0.8952 | 2 |
| 8 | 2^-7 | 0.4476 | 1 |

Most of these values are truncated, not rounded. 45° is 127 rather than 128.
These values are kept as published. They cost up to about 2 units of angle
bias, which the accuracy figures below include.

The quadrant code and a valid bit travel down the pipeline in the same
register (`cordic_pkg::ce_t`) as x, y and z.

### Post-processing: scaling and quadrant recovery (2 clocks)

`cordic_postproc` multiplies x by the CORDIC scale factor K = 0.607259 using
only wired shifts and adders:

```
K ≈ 2^-1 + 2^-3 − 2^-6 − 2^-9 = 0.60742
```

It then rounds away the two fraction bits. It also maps the angle back to
the original quadrant:

| quadrant | A |
|---|---|
| Q1 | z |
| Q2 | 512 − z |
| Q3 | 512 + z |
| Q4 | 1024 − z (mod 1024) |

Register stage 1 holds the two partial sums and the recovered angle. Stage 2
holds the difference, the rounding and a clip to 10 bits. With 10-bit inputs
the clip never acts, because the largest magnitude is about 724.

### Accuracy

Measured against real-valued `sqrt` and `atan2` over the whole input range,
for |v| ≥ 16:

* magnitude: within 1.7 LSB;
* angle: within 4.6 units (1.6°).

The angle error is the sum of the truncated constants and the 0.45°
resolution of the last stage. It grows for very short vectors. Seven
reference points, from a post-layout simulation of the original chip, are
checked as a test:

| I | Q | R (this RTL) | A (this RTL) | R, A (reference) |
|---|---|---|---|---|
| 612 | 562 | 112 | 75  | 112, 75 |
| 612 | 612 | 142 | 127 | 142, 127 |
| 612 | 712 | 224 | 179 | 224, 181 |
| 512 | 712 | 200 | 253 | 200, 255 |
| 412 | 712 | 224 | 333 | 224, 331 |
| 412 | 612 | 142 | 385 | 142, 385 |
| 412 | 562 | 112 | 437 | 112, 437 |

The magnitudes match exactly. Three angles differ by 2 units. The reference
datapath's rounding details are unknown, so this RTL was not tuned to
reproduce them.

### Timing

The pipeline advances only when `en` is high. Latency is 10 enabled clocks
(0 + 8 + 2), and a new sample can enter on every enabled clock. While `en`
is low, the whole pipeline holds, including the valid bits.

## Rate structure: interpolation by 4

The CORDIC produces one (R, A) pair per input sample. The envelope and phase
outputs need four times that rate, for example to go from 8 to 32 samples per
chip. Only `interp_counter` counts at the full rate. It cycles `phase` through
0..3, and in phase 3 it raises `sample_req`. `sample_req` serves three
purposes:

* it tells the I/Q source that the pair on `i_in`/`q_in` is taken at this
  clock edge;
* it is the clock enable of the CORDIC;
* it is the load strobe of the interpolators.

The slow logic therefore switches at a quarter of the clock rate. A real
divided clock would save clock-tree power as well. This design uses a clock
enable, which keeps the whole design in one clock domain.

Each `interpolator` keeps the previous sample `s0`, the current sample `s1`
and their difference `d`. In each full-rate clock it outputs
`s0 + floor(d·k/4)` for k = `phase`, which gives four evenly spaced points per
segment. The angle instance (`MODULAR = 1`) takes `d` modulo 1024, read as
signed, so the phase moves the short way across 0°/360°. For example, from
1020 it goes to 1021, 1022, 1023, 0 rather than sweeping back through 512.

## Amplitude output

* **`barrel_shifter`**: `dout = din << gain`, where `gain` is a 3-bit
  external input (gain 1..128). It is a logarithmic shifter with one output
  register. The output is 17 bits wide, so nothing is lost.
* **`dac_pwm`**: values above 1023 raise `overflow`, and `amp_par` is then
  held at 1023. Otherwise `amp_par` is the value itself (one register). A
  free-running 10-bit counter forms the PWM. When the counter wraps, the duty
  register takes `amp_par`, and `pwm_out` is high while `counter < duty`. One
  PWM period is 1024 clocks, so each period carries one amplitude word as a
  pulse width.

## Angle output and delay matching

The amplitude leaves its interpolator and then passes through two registers:
the barrel shifter and the clip. `angle_output` gives the angle the same two
registers, so a given sample appears on `amp_par` and on the parallel
`angle_out` in the same clock. The `angle_out` port is multiplexed:

* `ser_mode = 0`: `angle_out` is the delayed 10-bit angle;
* `ser_mode = 1`: `angle_out[0]` is serial data and `angle_out[1]` is a word
  sync; the other bits are 0. Every 10 clocks a shift register loads the
  delayed angle and sends it MSB first. The sync is high while the MSB is on
  the line. In this mode, one angle word in ten clocks is sent.

## End-to-end latency

The I/Q pair is taken at a `sample_req` edge E0. The output then behaves as
follows:

| clocks after E0 | event |
|---|---|
| 36 | CORDIC result ready (10 enabled edges) |
| 40 | interpolator loads the result (next strobe) |
| 44, 45, 46 | `amp_par` and the parallel `angle_out` show the points at 1/4, 2/4 and 3/4 of the way from the old sample to the new one |
| 47 | the new sample is reached |

`pwm_out` then shows the new duty from the next PWM period on.

## Where this design departs from, or adds to, the reference architecture

These parts follow the reference architecture:

* the block chain;
* the 10-bit data;
* the eight hard-wired CEs and their arctan values;
* the 0/8/2 latency split;
* origin and quadrant moves;
* scaling by K in the post-processing;
* interpolation by 4 with only the counter at full rate;
* external gain through the barrel shifter;
* clip-to-maximum with an overflow flag;
* delay-matching registers and a serial/parallel angle port.

The reference gives the function of these parts but not their details, so
this design chooses them:

* **Sign convention of the CE.** It is the standard vectoring-mode rule
  above, with the shift by `i`.
* **Internal word.** The CE word is 14 bits. The 2 fraction bits are given;
  the 2 extra integer bits are this design's choice.
* **Scaling.** K is approximated by the shift-add split shown above.
* **Axis points.** A point on an axis is counted with the non-negative side.
* **Clocking.** A clock enable replaces the divided clock.
* **Interpolator arithmetic.** The arithmetic, and the modular difference for
  the angle, are this design's.
* **Barrel shifter.** It shifts left (gain ≥ 1) over 3 bits.
* **PWM.** It is a counter-compare PWM with a 1024-clock period on the same
  clock.
* **Serial angle format.** The format, including the sync bit, is this
  design's.
* **Delay match.** It is exact in clocks. The reference states a residual
  amplitude/phase skew under 1 ns.
* **Reset.** Reset is asynchronous and active low, and clears every register.

This RTL does not include the parts of the transmitter that are analog or
external:

* the I/Q modulator that produces `i_in`/`q_in`;
* the phase DAC and the VCO/synthesizer driven by `angle_out`;
* the switch-mode supply driven by `pwm_out`;
* the RF power amplifier.

## Files

| file | contents |
|---|---|
| `rtl/cordic_pkg.sv` | widths, `quad_e`, the pipeline word `ce_t`, the arctan constants |
| `rtl/cordic_preproc.sv` | origin and quadrant-1 move |
| `rtl/cordic_element.sv` | one CE, parameter `STAGE` |
| `rtl/cordic_postproc.sv` | scaling by K and quadrant recovery |
| `rtl/cordic_processor.sv` | pre-processing + 8 CEs + post-processing |
| `rtl/interp_counter.sv` | full-rate phase counter and sample strobe |
| `rtl/interpolator.sv` | linear interpolator, parameters `W`, `UP`, `MODULAR` |
| `rtl/barrel_shifter.sv` | gain shifter |
| `rtl/dac_pwm.sv` | clip, overflow, PWM |
| `rtl/angle_output.sv` | delay matching, serial/parallel port |
| `rtl/polar_modulator.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The top-level parameters are:

* `UP` (interpolation factor, a power of two, default 4);
* `GAIN_W` (default 3);
* `PWM_W` (default 10).

The CORDIC widths are constants in `cordic_pkg`. There are eight arctan
constants, so `N_STAGES` cannot exceed 8.

## Simulation

Every testbench checks its results against reference values that the
testbench computes itself, and ends by printing
`TB_RESULT checks=N failures=M`. The testbenches are as follows:

* **`tb_polar_modulator`** runs the top at its default parameters. It checks
  the interpolated transitions clock by clock and the steady-state
  amplitude, overflow and angle in both port modes. It also checks one full
  PWM period. It counts each mechanism and fails if any of them never
  occurred: all four quadrants, an interpolated point, an angle wrap across
  0, an overflow, a non-zero gain, serial mode, parallel mode, and a PWM
  period.
* **`tb_cordic_processor`** compares random inputs bit-exactly with an
  integer model of the algorithm. It also checks the inputs against `$sqrt`
  and `$atan2`, checks the seven reference points, and checks the 10-clock
  latency and stalls.

With Verilator 5:

```sh
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          --top-module tb_polar_modulator rtl/cordic_pkg.sv tb/tb_polar_modulator.sv
./obj_dir/Vtb_polar_modulator
```

Replace the testbench name to run any other test. Every test finishes in
seconds.
