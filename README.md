# Multiplierless DA PID controller

A digital PID controller for the speed loop of a DC motor, built without a
single multiplier. The controller's difference equation is an inner product of
a few constant coefficients with a few signal words. Distributed arithmetic (DA)
evaluates that inner product one bit position at a time. At each bit position,
one bit of every operand addresses a small table of precomputed coefficient
sums, and a shift-and-add accumulator combines the table words. For the default
controller the whole arithmetic is an 8-word x 16-bit table (128 bits), three
16-bit shift registers and one adder/subtractor. One output is produced every
18 clocks.

## The control law

A PID controller with gains Kp, Ki, Kd, sampled with period T, discretised with
the trapezoidal rule for the integral and a backward difference for the
derivative, becomes

    m(n) = a0*e(n) + a1*e(n-1) + a2*e(n-2) + m(n-1)

    a0 =  Kp + Ki*T/2 +   Kd/T
    a1 = -Kp + Ki*T/2 - 2*Kd/T
    a2 =                  Kd/T

Here e is the error (set-point minus measured speed) and m is the drive to the
motor. The feedback coefficient on m(n-1) is exactly 1: this is the integrator.

The default configuration is the PI case used for the motor: Kp = 0.75,
Ki = 4.75, Kd = 0 at a 10 kHz sampling rate. This gives a0 = 0.7502,
a1 = -0.7498 and a2 = 0. The e(n-2) operand is then dropped, and the law is
`m(n) = a0*e(n) + a1*e(n-1) + m(n-1)`.

## How distributed arithmetic evaluates it

Write each B-bit two's-complement fraction as its bits: x = -x_0 + sum_{k=1}^{B-1} x_k 2^-k
(bit 0 is the sign bit, bit B-1 the LSB). Substituting this into the law and
swapping the two sums gives

    m(n) = sum_{k=1}^{B-1} F_k 2^-k  -  F_0
    F_k  = a0*e_k(n) + a1*e_k(n-1) + 1*m_k(n-1)

Each F_k depends only on three bits, so it can take just eight values. These are
stored in a table addressed by `{e_k(n), e_k(n-1), m_k(n-1)}`:

| address | 000 | 001 | 010 | 011  | 100 | 101  | 110   | 111     |
|---------|-----|-----|-----|------|-----|------|-------|---------|
| F       | 0   | 1   | a1  | a1+1 | a0  | a0+1 | a0+a1 | a0+a1+1 |

The operands are shifted out LSB first. The accumulator runs the following
sequence:

1. Clear the accumulator.
2. For k = B-1 down to 1: `acc = (acc + F_k) / 2`.
3. For the sign bits (k = 0): `acc = acc - F_0`.

After B steps the accumulator holds m(n). No product is ever formed.

Two details make the delay line cheap:

- **e(n-1):** the e(n) register shifts its bits straight into the e(n-1)
  register. After the B shifts of one sample, the e(n-1) register holds what
  was e(n), so no parallel copy is needed.
- **m(n-1):** this register is reloaded with the new result at the start of
  each sample.

With `USE_A2 = 1` a third error register is chained behind e(n-1). Its bit
becomes a fourth address bit, `{e_k(n), e_k(n-1), e_k(n-2), m_k(n-1)}`, and the
table grows to 16 words.

## Number formats

| quantity | format | notes |
|----------|--------|-------|
| e(n), m(n) | 16-bit Q1.15, range [-1, 1) | |
| table word F | 16-bit Q2.14 | Needs two integer bits because a0+1 = 1.7502 |
| a0 | 12291 | Default coefficient, 0.7502 x 2^14 rounded |
| a1 | -12285 | Default coefficient, -0.7498 x 2^14 rounded |
| accumulator | 33 bits, 29 fraction bits | |

- **Accumulator width.** The accumulator is wide enough that the bits shifted
  out to the right are never lost. The DA result is therefore the exact value of
  `A0*e(n) + A1*e(n-1) + 2^14*m(n-1)` in units of 2^-29. Overflow is
  impossible for any table contents.
- **Output conversion.** The result is truncated to Q1.15, which rounds toward
  minus infinity. It is then clamped to [-1, 1).
- **Feedback.** The clamped word goes both to the D/A output buffer and back
  into the m(n-1) register. As a result, the integrator saturates instead of
  wrapping around.

### Consequence of the integrator's resolution

In the default tuning, the integral action per sample is
(a0 + a1) * e = 6/16384 * e. With truncation, m(n) rises only when the error
exceeds about 8.3 % of full scale (2731 codes). It falls by at least one LSB per
sample for any negative error.

In a closed loop this leaves a steady-state error band. How wide it is depends
on how the converter range is matched to the set-point. This is a property of
16-bit operands and a coefficient sum of 0.0004, not of the DA technique.
Widening `DATA_W` or moving to a larger converter range narrows it.

## Sample schedule

The control unit repeats a B+2 = 18 clock period:

| clock | state    | strobes | effect |
|-------|----------|---------|--------|
| 0     | ST_LOAD  | `lr`    | Result to the output buffer and to the m(n-1) register; A/D sample `e_in` to the e(n) register |
| 1     | ST_CLEAR | `clacc`, `sc` | Accumulator cleared; next A/D conversion started |
| 2..16 | ST_ACC   | `shift`, `lacc` | Add F_k and halve, k = 15..1 |
| 17    | ST_SUB   | `shift`, `lacc`, `s_a` | Subtract F_0 |

- **Latency.** A sample taken at one `lr` clock yields its output at the next
  `lr` clock. `m_out` shows it one clock later.
- **Conversion window.** The A/D converter has 17 clocks between `sc` and the
  `lr` that samples its result.
- **Clock rate.** 10 kHz sampling needs only a 180 kHz clock. The bit clock is
  an enable (`shift`) in the single clock domain.

## Blocks

| file | role |
|------|------|
| `rtl/pid_pkg.sv` | Default sizes and coefficients, state type, partial-product function |
| `rtl/da_rom.sv` | Table of partial products (8 words, or 16 with `USE_A2`), computed at elaboration, asynchronous read |
| `rtl/shift_reg.sv` | Parallel-in serial-out register, LSB first, with serial input for chaining |
| `rtl/scaling_acc.sv` | Add-and-halve / subtract accumulator with clear (`clacc`), enable (`lacc`), subtract select (`s_a`) |
| `rtl/out_buffer.sv` | Truncation and clamping to a 16-bit word; D/A buffer loaded by `lr` |
| `rtl/control_unit.sv` | State register and bit counter producing `sc`, `lr`, `clacc`, `shift`, `lacc`, `s_a` |
| `rtl/da_pid.sv` | Top: wires the above; ports `clk`, `rst_n`, `e_in[15:0]`, `sc`, `lr`, `m_out[15:0]` |

The A/D converter, the D/A converter and the motor with its tachometer are
outside the chip. The testbench `tb/dc_motor_model.sv` models the motor,
G(s) = 20/(s+4) with a 0.2 tachometer ratio, for simulation only.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 16 | Width B of e(n) and m(n); sets the sample period B+2 |
| `ROM_W`   | 16 | Table word width |
| `ROM_FRAC`| 14 | Table word fraction bits; lower it when a coefficient sum reaches 2 |
| `A0_Q`, `A1_Q`, `A2_Q` | 12291, -12285, 0 | Coefficients x 2^ROM_FRAC |
| `USE_A2`  | 0 | Builds the e(n-2) operand for Kd != 0 |

**Retuning.** Recompute a0..a2 from the formulas above, scale them by
2^ROM_FRAC and round. The table rebuilds itself at elaboration. An elaboration
assertion reports any table entry that does not fit in `ROM_W` bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_da_pid \
        rtl/pid_pkg.sv tb/tb_da_pid.sv -o sim
    ./obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_da_rom` | All 8 words against hand-computed values; the 16-word variant against coefficient sums |
| `tb_shift_reg` | Random load/shift against a model; LSB-first order; chaining into a second register |
| `tb_scaling_acc` | 500 random word sequences against the exact integer inner product; hold; clear |
| `tb_out_buffer` | Floor conversion, clamping at both ends, load enable |
| `tb_control_unit` | 200 periods, clock by clock: 18 clocks, strobe pattern and order |
| `tb_da_pid` | Top at default size (full-size test) |
| `tb_da_pid_d` | Same as `tb_da_pid` with `USE_A2 = 1`; checks the e(n-2) path (Kd/T = 0.25, Q3.13 table) |
| `tb_motor_loop` | Closed-loop motor speed control (below) |

`tb_da_pid` runs 4200 samples from a modelled A/D converter. It compares every
output with the law computed by plain multiplication, and checks the 18-clock
period and one `sc` per period. It also requires that each mechanism occurs at
least once:

- negative operands (sign-bit subtraction)
- the e(n) to e(n-1) transfer
- holding at zero error
- clamping at both ends

`tb_motor_loop` closes the loop around the motor model. The set-point is
100 mV. The converters are ideal with a ±125 mV range, and one controller
period stands for T = 0.1 ms. It checks three things:

- **Bit exactness.** Every output matches the fixed-point reference.
- **Without the controller.** The same motor driven by the bare error settles
  at half the desired speed (0.2499 of 0.5).
- **With the controller.** The speed reaches 0.4698 of 0.5 after 1 s (within
  10 %, and at least 1.7 times the uncontrolled speed).

An unquantised model of the same loop reaches about 0.49 after 0.8 s. The
remaining gap is the integrator resolution effect described above.

## Departures from the original description

- **Input width.** The error input is 16 bits wide. The original text also
  speaks of an 8-bit A/D converter. A 16-bit pin count and a common operand
  width are needed for the bit-serial scheme, so 16 bits were used.
- **Design choices not specified in the original.** The following are this
  design's own choices:
  - the table's fixed-point split (Q2.14)
  - the exact-width accumulator
  - truncation and clamping of the output
  - the reset input
  - the extra `lr` output for latching a D/A converter
  - the single clock domain with a bit-clock enable
  - the exact clock-by-clock order of `lr`, `clacc`/`sc` and the shifts
- **Default coefficients.** The coefficients are the rounded values given for
  the motor experiment, 0.7502 and -0.7498. The gain formulas would give
  0.7502375 and -0.7497625.
- **Derivative term.** The derivative operand is optional and off by default,
  matching the configuration that was built and measured (Kd = 0). Its place in
  the table address is this design's choice.
- **Not included.** The A/D and D/A converters and the motor are not part of
  the RTL.
