# Pipelined unified CORDIC co-processor

CORDIC computes rotations, and from them a long list of elementary
functions, with nothing but shifts and additions. This design unrolls the
algorithm into a pipeline: every iteration has its own hardware stage,
so one result leaves the unit every clock cycle. The same pipeline
works in all three CORDIC coordinate systems (circular, linear,
hyperbolic) and in both modes (rotation and vectoring). The function is
chosen per sample, so a host processor can mix sines, divisions and
logarithms back to back. The unit is meant to sit next to a DSP as a
co-processor.

The architecture follows the article *A Fast CORDIC Co-Processor
Architecture for Digital Signal Processing Applications*. That article
gives the block structure (R, P, S, ATR and a control block), the CORDIC
element and the pipeline of elements. It does not give word lengths, the
iteration count, the host interface, the control logic or the inside of
the scaling block. Those are this design's own choices, and each one is
marked as such below.

## The arithmetic

Every stage `i` performs one *pseudorotation* of the vector `(x, y)` and
updates the angle accumulator `z`:

    x' = x - m * c * 2^-S(m,i) * y
    y' = y +     c * 2^-S(m,i) * x
    z' = z -     c * alpha(m,i)

- `m` selects the coordinate system: `1` circular, `0` linear, `-1`
  hyperbolic.
- `c` is `+1` or `-1`. The mode decides it:
  - rotation: `c = sign(z)`, which drives `z` to zero and turns the
    vector by the initial `z`;
  - vectoring: `c = -sign(x*y)`, which drives `y` to zero and collects the
    vector's angle in `z`.

  The sign of `x*y` comes from the two sign bits. Zero counts as positive.
- `alpha(m,i)` is the step angle: `atan(2^-S)`, `2^-S` or `atanh(2^-S)`.
- `S(m,i)` is the shift sequence:

  | system     | S(m,i), i = 0..15                           | largest angle |
  |------------|---------------------------------------------|---------------|
  | circular   | 0, 1, 2, ..., 15                            | 1.743287      |
  | linear     | 1, 2, 3, ..., 16                            | 1.000000      |
  | hyperbolic | 1, 2, 3, 4, **4**, 5, ..., 13, **13**, 14   | 1.118173      |

  The hyperbolic sequence repeats shifts 4, 13, 40, ... (each is 3k+1 of
  the one before). Without those repeats the hyperbolic iteration does not
  converge. With 16 stages the sequence ends exactly at `13, 13, 14`, and
  the angle ranges reached by the RTL match the table above to six digits.

Because `x` and `y` are added to shifted copies of each other, the vector
grows. After n iterations it is `K_m(n)` times too long:
`K_m(n) = prod sqrt(1 + m * 2^(-2 S(m,i)))`. This is about 1.64676
circular, 0.82816 hyperbolic and 1 linear. The S block multiplies by
`1/K` at the end, so the results need no correction.

## Pipeline

    in ──► R ──► P: C.E. ─ reg ─ C.E. ─ reg ─ ... (16) ──► S: 17 shift-add stages ──► out
                         ▲        ▲
                         └── ATR: one step angle per stage ──┘
           cordic_ctrl: valid bit per stage, handshakes, common stall enable

- **R, `cordic_rot90`**: one register stage that rotates circular samples
  by exactly +90 or -90 degrees. It swaps `x` and `y`, negates one of them
  and moves ±pi/2 into `z`. No gain correction is needed. Rotation mode
  turns when `|z| > pi/2`. Vectoring mode turns when `x < 0`, and the
  sign of `y` picks the direction. After this stage the iterations never
  need more than pi/2. So rotation mode accepts any `z` in [-pi, pi], and
  vectoring mode accepts vectors in all four quadrants. The article names
  the purpose of R. The rules for when to turn are this design's choice.
  Linear and hyperbolic samples pass through R unchanged.
- **P, `cordic_pseudorot`**: 16 CORDIC elements, each followed by a
  register. The operation tag (coordinate system and mode) travels with
  the data.
- **C.E., `cordic_ce`**: three adder/subtractors and two shifters. A stage's
  shift distances are constants, so each shifter is a fixed wiring chosen
  among three (one per coordinate system). No barrel shifter is used.
- **ATR, `cordic_atr`**: every stage gets its own constants, which are
  computed at elaboration from `$atan`/`$atanh` and rounded to 16 fraction
  bits. The stage picks one through a three-input multiplexer driven by the
  coordinate system of the sample it holds. There is no shared ROM.
- **S, `cordic_scale`**: multiplies `x` and `y` by `C = 1/K_m(16)`, held as
  a 17-bit constant (1 integer bit, 16 fraction bits). Stage `j` adds
  `x << j` to a wide accumulator when bit `j` of `C` is set. Each stage's
  shift is fixed and no multiplier is used. The product is exact until a
  single round-to-nearest at the output. The linear system has `C = 1.0`
  and passes through exactly. The article asks for a fast pipelined
  scaling block but does not say how to build it; this shift-and-add
  array is this design's choice.
- **Control, `cordic_ctrl`**: a 34-bit shift register of valid bits and
  one gate, `en = !out_valid || out_ready`. The article names this block
  but does not describe it.

The datapath registers have no reset. Only the valid bits are reset
(asynchronous, active low).

## Interface and timing (`cordic_coproc`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | input handshake; a sample is taken on an edge where both are high |
| `in_op` | in | 3 | `op_t`: `m` (`CS_LINEAR` 00, `CS_CIRCULAR` 01, `CS_HYPERBOLIC` 10) and `mode` (`MODE_ROTATION` 0, `MODE_VECTORING` 1) |
| `in_x`, `in_y`, `in_z` | in | W | initial values |
| `out_valid` / `out_ready` | out / in | 1 | output handshake |
| `out_op`, `out_x`, `out_y`, `out_z` | out | 3, W | the operation's tag and results |
| `busy` | out | 1 | a sample is somewhere in the pipeline |

- **Throughput**: one operation per clock.
- **Latency**: `LAT = 1 + N + (FRAC + 1)`, which is 34 clock edges with
  the defaults, counting the edge that accepts the sample.
- **Stall**: when a result waits at the output with `out_ready` low, the
  whole pipeline freezes and `in_ready` is low. Bubbles are not squeezed
  out during a stall.
- **Number format**: W-bit two's complement with FRAC fraction bits. With
  the defaults (W = 20, FRAC = 16) values lie in [-8, 8) and the LSB is
  2^-16. Angles are in radians.

### What comes out

| m, mode | x | y | z |
|---|---|---|---|
| circular, rotation | x0 cos z0 - y0 sin z0 | y0 cos z0 + x0 sin z0 | ≈ 0 |
| circular, vectoring | sqrt(x0² + y0²) | ≈ 0 | z0 + atan2(y0, x0) |
| linear, rotation | x0 | y0 + x0·z0 | ≈ 0 |
| linear, vectoring | x0 | ≈ 0 | z0 + y0/x0 |
| hyperbolic, rotation | x0 cosh z0 + y0 sinh z0 | y0 cosh z0 + x0 sinh z0 | ≈ 0 |
| hyperbolic, vectoring | sqrt(x0² - y0²) | ≈ 0 | z0 + atanh(y0/x0) |

Valid input ranges:

| system | rotation mode | vectoring mode |
|---|---|---|
| circular | \|z0\| ≤ pi | any direction |
| linear | \|z0\| ≤ 1 | \|y0/x0\| ≤ 1 |
| hyperbolic | \|z0\| ≤ 1.118 | \|y0/x0\| ≤ 0.806 with x0 > 0 |

No result may leave [-8, 8). There is no overflow detection. For circular
operations, keep |x0| and |y0| below about 2, because the unscaled vector
inside P grows by 1.65.

### Getting the elementary functions

| function | operation | x0 | y0 | z0 | result |
|---|---|---|---|---|---|
| sin, cos | circular rotation | 1 | 0 | a | y = sin a, x = cos a |
| atan, magnitude | circular vectoring | x | y | 0 | z = atan2(y, x), x = \|(x, y)\| |
| multiply | linear rotation | a | 0 | b | y = a·b |
| divide | linear vectoring | b | a | 0 | z = a/b |
| sinh, cosh | hyperbolic rotation | 1 | 0 | a | y = sinh a, x = cosh a |
| exp | hyperbolic rotation | 1 | 1 | a | x = e^a |
| atanh | hyperbolic vectoring | 1 | a | 0 | z = atanh a |
| ln | hyperbolic vectoring | a+1 | a-1 | 0 | z = ½ ln a |
| sqrt | hyperbolic vectoring | a+¼ | a-¼ | 0 | x = sqrt a |
| tan, tanh | two passes | | | | (cos, sin) or (cosh, sinh), then linear vectoring |

Measured at the default size, circular and linear results are within
about 7e-5 (5 LSB). Hyperbolic results are within about 2e-4. The worst
is `ln` at 2.1e-4 (14 LSB), because it doubles z.

## Parameters

`cordic_coproc #(W = 20, FRAC = 16, N = 16)`.

- **N** sets the number of pseudorotation stages.
- **FRAC** sets the resolution. It also sets the depth of S (FRAC + 1
  stages).
- **W** must leave room for the integer part.

All constants (step angles, pi/2, `1/K` for the actual N) are
recomputed at elaboration. The testbenches are written for the defaults:
their reference model holds the 16-entry hyperbolic shift sequence and
uses `K_m(16)`.

## Files

- `rtl/cordic_pkg.sv`: types (`coord_e`, `mode_e`, `op_t`, `turn_e`) and
  the elaboration-time functions (shift sequence, step angles, `1/K`,
  pi/2).
- `rtl/cordic_ce.sv`, `cordic_pseudorot.sv`, `cordic_atr.sv`,
  `cordic_rot90.sv`, `cordic_scale.sv`, `cordic_ctrl.sv`: the blocks
  described above.
- `rtl/cordic_coproc.sv`: the top.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_cordic_model_pkg.sv`: a real-arithmetic reference model and
  stimulus generator, shared by the testbenches.
- `tb/tb_cordic_coproc.sv`: end-to-end test at the default size. It checks
  the 34-cycle latency, sends 4000 mixed operations with random input gaps
  and output stalls, and checks full-rate streaming. It counts each
  mechanism (every operation, both quarter turns, stalls, operation
  changes, hyperbolic repeat stages) and fails if one never occurred.
- `tb/tb_cordic_functions.sv`: the function recipes above, and rotations
  at the convergence limits of each system.

To simulate with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cordic_pkg.sv tb/tb_cordic_model_pkg.sv tb/tb_cordic_coproc.sv \
        --top-module tb_cordic_coproc
    ./obj_dir/Vtb_cordic_coproc

Replace the last file and the top module to run another testbench. Leave
out `tb/tb_cordic_model_pkg.sv` for a testbench that does not import it.
Each testbench runs in well under a second.

## Where this RTL goes beyond or differs from the article

- **Own choices**: word length, iteration count, rounding of the
  constants, the rules for when R turns, the shift-and-add structure of S,
  the valid/ready interface and the stall control. The article leaves all
  of these open.
- **Shifters**: the article describes the C.E. as having two "shift
  registers". Here they are fixed shifts (wiring). This matches the
  article's remark that the shifters need not be programmable.
- **Gain formula**: the gain is taken as `prod sqrt(1 + m·2^(-2S))`, the
  standard CORDIC gain.
- **Tag in every stage**: the coordinate system and mode travel with each
  sample. This lets one pipeline switch functions every cycle. A unit
  fixed to one function per run would need no tag and fewer multiplexers.
- **Not included**:
  - the host DSP;
  - the decimal/binary conversion mentioned among the applications;
  - the DSP algorithms (transforms, filters, matrix factorisations). These
    are sequences of co-processor operations driven by the host, not part
    of the unit.
- **No overflow flag**: nothing reports operands outside the ranges above.
