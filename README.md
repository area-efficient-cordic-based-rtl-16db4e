# Multiplier-free 8x8 DCT and inverse DCT with CORDIC rotators

HEVC codes every prediction residual through an integer approximation of the
DCT-II and, to rebuild its reference pictures, through the matching inverse.
A fast 8-point DCT (Loeffler-style) needs only butterflies (an add and a
subtract) and a handful of plane rotations; the rotations are where the
multipliers would go. This design replaces every rotation by a
**fixed-angle CORDIC rotator**: a short chain of micro-rotations by
±atan(2^-s), each just two shifts and two adds, followed by a shift-add
gain correction. The result is a transform unit with no multiplier and no
coefficient table, built from adders and hard-wired shifts only.

On top of the 1-D unit the design provides the usual row-column 2-D 8x8
transform, an inverse 1-D unit (the same flow graph transposed, with the
rotations reversed), a 2-D inverse, and a top level that holds the forward
and inverse transforms of the encoder loop side by side.

## What it computes

Let `F = sqrt(8) * C8`, with `C8` the orthonormal 8-point DCT-II matrix:

    Y[k] = s_k * sum_{n=0..7} x[n] * cos((2n+1) k pi / 16),   s_0 = 1, s_k = sqrt(2)

This is the HEVC 8-point core transform divided by 64, before HEVC's
rounding shifts. The scale keeps every butterfly exact: `Y[0]` is simply the
sum of the inputs. The 2-D forward transform produces `Z = F X F^T`. That is
8 times the orthonormal 2-D DCT, kept at full precision with no shift between
the passes. The inverse computes `X = F^T Z F / 64`, dividing by 8 in each
pass.

| unit | input | output | scale |
|---|---|---|---|
| `dct8_cordic` | 8 x 9-bit residual | 8 x 13-bit | `F x` |
| `dct4_cordic` | 4 x W-bit | 4 x (W+2)-bit | `2 * C4 * a` |
| `idct8_cordic` | 8 x IW-bit | 8 x OW-bit, saturated | `F^T y / 8` |
| `dct2d_8x8` | rows, 9-bit | columns, 17-bit | `F X F^T` |
| `idct2d_8x8` | columns, 17-bit | rows, 9-bit, saturated | `F^T Z F / 64` |

## The 8-point flow graph

Outputs are produced in natural order. The flow graph has four stages. Each
stage is one pipeline register (`dct8_cordic.sv`).

| stage | even half (`dct4_cordic`) | odd half |
|---|---|---|
| 1 | `a[i] = x[i] + x[7-i]` | `b[i] = x[i] - x[7-i]` |
| 2 | `c0 = a0+a3, c1 = a1+a2, c2 = a1-a2, c3 = a0-a3` | `(d4,d7) = rot(b3, b0, 3pi/16)`, `(d5,d6) = rot(b2, b1, pi/16)` |
| 3 | `Y0 = c0+c1, Y4 = c0-c1, (Y2,Y6) = sqrt2*rot(c2, c3, 3pi/8)` | `e4 = d4+d6, e6 = d4-d6, e7 = d7+d5, e5 = d7-d5` |
| 4 | (registered through) | `Y1 = e7+e4, Y7 = e7-e4, Y3 = sqrt2*e5, Y5 = sqrt2*e6` |

where `rot(x, y, t) = (x cos t + y sin t, -x sin t + y cos t)`. The even
half is a complete 4-point DCT of `a[]`. It is its own module, and it is also
why the 8-point unit computes a 4-point DCT when `x[4..7]` are held at zero:
then `a[i] = x[i]`, and `Y0, Y2, Y4, Y6` are the 4-point results.

The two `sqrt2` factors on `Y3` and `Y5` are also shift-add constants
(`sqrt2_scale`: `2 - 1/2 - 1/16 - 1/32 + 1/128 = 1.41406`).

## The fixed-angle CORDIC rotators

`cordic_rot` rotates a pair by a constant angle. Its micro-rotation `i` is

    x += sg_i * (y >>> s_i);   y -= sg_i * (x >>> s_i)

These micro-rotations add up to an angle `sum sg_i * atan(2^-s_i)`. They also
stretch the vector by `K = prod sqrt(1 + 2^-2 s_i)`. A final sum of shifted
copies multiplies by `G/K`, where `G` is the gain the flow graph wants.
The tables live in `cordic_dct_pkg.sv`:

| angle | gain G | shifts s_i | signs | angle error | correction G/K |
|---|---|---|---|---|---|
| 3pi/8 | sqrt2 | 0, 1, 4, 7 | + + - - | 0.041 deg | 1 - 2^-3 + 2^-6 + 2^-9 |
| pi/16 | 1 | 0, 1, 3 | + - - | 0.060 deg | 2^-1 + 2^-3 + 2^-9 |
| 3pi/16 | 1 | 1, 3 | + + | 0.060 deg | 1 - 2^-3 + 2^-6 - 2^-8 |

Each sequence is the shortest one whose angle error stays below 0.12 degree.
Each correction is a signed power-of-two sum within about 2^-10 of `G/K`.
The inverse transform uses the same tables with every micro-rotation sign
flipped (`INVERSE = 1`), which rotates by `-theta`.

To keep the truncation of the `>>>` shifts small, the units carry `FRAC = 4`
fraction bits through each rotator and round to nearest once at the output.

**Arithmetic cost.** The 8-point forward unit uses 20 butterfly adders, 34
adders in its three rotators and 8 in the two sqrt2 constants: 62
additions/subtractions in all, plus 6 rounding adders. A coarser rotator
table needs fewer adders. With micro-rotation counts as low as the 38
additions and 16 shifts sometimes quoted for CORDIC-based Loeffler DCTs, the
unit would be noticeably less accurate. This table favours accuracy. The
table in `cordic_dct_pkg` is the only thing to change to trade one for the
other.

**Accuracy, as measured by the testbenches:**

- 8-point forward, 9-bit inputs, outputs up to +/-2048: the largest error
  against the exact DCT is 2.6 LSB.
- 2-D forward, outputs up to +/-16384: the largest error is 20 LSB, about
  0.12 %.
- Forward then inverse, with no quantization: residuals come back within
  1 LSB.

## 2-D transform, transpose buffer and data order

`dct2d_8x8` is the row-column method:

    row dct8 -> transpose_buffer -> column dct8

- **Input.** Rows of a block go in one per clock, in order. There may be idle
  clocks between rows.
- **Transpose buffer.** Once a block's eighth row is written, the buffer reads
  the block out as columns, one per clock. It has two register banks:
  - While one block is read out, the next block is written into the other
    bank.
  - A block takes at least 8 clocks to write and exactly 8 to read, so a bank
    is always empty again before it is reused.
  - There is therefore no back-pressure: one vector per clock goes in and one
    comes out, sustained.
- **Output.** The forward output comes column by column: on the c-th output
  clock of a block, `out_col[k1] = Z[k1][c]`.

`idct2d_8x8` takes the coefficients in exactly that column order. It runs
`column idct8 -> transpose_buffer -> row idct8`, and returns the residual
block row by row in natural order. A forward unit and an inverse unit can
therefore be chained directly.

Each inverse pass saturates its output: to 13 bits after the first pass and
to 9 bits at the end. Coefficients altered by a quantizer can reconstruct to
values outside the residual range, and saturation keeps them from wrapping
around.

## Timing

All units are fully pipelined and accept one vector per clock. Latencies are
named constants in `cordic_dct_pkg`.

| unit | latency |
|---|---|
| `dct4_cordic` | 2 clocks |
| `dct8_cordic`, `idct8_cordic` | 4 clocks |
| `transpose_buffer` | 2 clocks from the last row written to the first column out |
| `dct2d_8x8`, `idct2d_8x8` | 10 clocks from a block's last input vector to its first output vector |

Reset is synchronous and active low. It clears only the valid flags and the
transpose bookkeeping; data registers are not reset.

## Top level: the encoder's transform pair

`cordic_dct_top` instantiates one `dct2d_8x8` and one `idct2d_8x8`. In an
encoder these two are joined through quantization and dequantization, which
are outside this design. The top therefore exposes both halves:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `fwd_in_valid`, `fwd_in_row` | in | 1, 8 x 9 | residual rows |
| `fwd_out_valid`, `fwd_out_col` | out | 1, 8 x 17 | coefficient columns, to the quantizer |
| `inv_in_valid`, `inv_in_col` | in | 1, 8 x 17 | dequantized coefficient columns |
| `inv_out_valid`, `inv_out_row` | out | 1, 8 x 9 | reconstructed residual rows |

Parameters: `DW` (sample width, default 9) and `FRAC` (guard fraction bits,
default 4). The coefficient width follows as `DW + 8`.

## Limits and departures

- **Block sizes.** Only 8x8 is built, plus a 4-point 1-D DCT (`dct4_cordic`,
  or `dct8_cordic` with zeroed upper inputs). HEVC also uses 16- and 32-point
  transforms, which are not included. No 4x4 2-D wrapper is included either.
- **Scaling.** The scaling is not HEVC's bit-exact integer transform:
  - Coefficients are `1/64` of HEVC's matrix, computed with CORDIC rounding
    rather than HEVC's integer constants (64, 83, 36, 89, 75, 50, 18).
  - No intermediate shift is applied between the passes.
  - Output differs from the HEVC reference transform by the scale and by a
    few LSB.
- **Rotators.** The CORDIC rotators rotate the data directly. No cosine
  values are generated or stored.
- **Other encoder blocks.** The matrix-based shift-add 8-point DCT, a common
  comparison point, is not part of this design. Neither are quantization,
  entropy coding, prediction, loop filtering or frame storage.
- **Unchecked choices.** The word widths, the pipelining, the reset scheme,
  the output orders and the saturation are choices of this implementation.
  No external specification checks them.

## Files

| file | contents |
|---|---|
| `rtl/cordic_dct_pkg.sv` | angle enum, micro-rotation and correction tables, latencies |
| `rtl/cordic_rot.sv` | fixed-angle shift-add CORDIC rotator (combinational) |
| `rtl/sqrt2_scale.sv` | shift-add sqrt2 constant multiplier |
| `rtl/dct4_cordic.sv` | pipelined 4-point DCT, the even half of the 8-point unit |
| `rtl/dct8_cordic.sv` | pipelined 8-point DCT |
| `rtl/idct8_cordic.sv` | pipelined 8-point inverse DCT |
| `rtl/transpose_buffer.sv` | ping-pong 8x8 transpose registers |
| `rtl/dct2d_8x8.sv`, `rtl/idct2d_8x8.sv` | row-column 2-D forward and inverse |
| `rtl/cordic_dct_top.sv` | forward and inverse 2-D transforms side by side |
| `tb/tb_dct_ref_pkg.sv` | floating-point reference DCT/IDCT for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Testbenches and simulation

Every testbench compares the RTL with floating-point transforms computed from
the definitions (`$cos`), not with a copy of the flow graph. Each one also
checks the latency and ends with one line:

    TB_RESULT checks=<n> failures=<n>

`tb_cordic_dct_top` runs the top at its default parameters. It plays the
encoder loop: residual blocks go into the forward transform, and every output
column is quantized and dequantized by the testbench. The step is one of 1
(lossless), 16, 64 or 10000. The result is fed to the inverse on the next
clock, and the testbench checks:

- the forward coefficients against the exact 2-D DCT;
- the reconstruction against the exact inverse of what was fed in;
- for lossless blocks, the original block too.

It also counts five events and fails if any of them never occurred:

- idle clocks between input rows;
- rows written while the transpose buffer is read;
- lossless round trips;
- quantized round trips;
- saturated reconstructions.

To build and run it with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cordic_dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_cordic_dct_top.sv \
        --top-module tb_cordic_dct_top
    ./obj_dir/Vtb_cordic_dct_top

Replace the testbench name to run the others: `tb_cordic_rot`,
`tb_dct4_cordic`, `tb_dct8_cordic`, `tb_idct8_cordic`,
`tb_transpose_buffer`, `tb_dct2d_8x8`, `tb_idct2d_8x8`. Each runs in well
under a second.

## Changing the design

- **Rotation accuracy.** Edit `ROT_*` and `COMP_*` in `cordic_dct_pkg`. The
  rule for a valid entry:
  - the angles `sum sg_i * atan(2^-s_i)` add up to the target angle;
  - `sum c_j * 2^-e_j` equals `G / prod sqrt(1 + 2^-2 s_i)`.

  `tb_cordic_rot` checks both rules, within 0.12 degree and 0.2 %. Raise
  `MAX_MICRO` or `MAX_COMP` for longer chains.
- **Sample width.** Set `DW` on the top. Internal widths follow.
- **Guard bits.** `FRAC` sets the guard bits. It must be at least 1.
- **Pipeline depth.** To cut the combinational depth of the rotators, add
  registers inside `cordic_rot`. Then update the latency constants in the
  package; the testbenches check against them.
