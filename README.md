# Multi-mode HEVC forward transform: 32 samples per clock, no multipliers

HEVC codes the prediction residual in transform units (TUs) of 4x4, 8x8,
16x16 and 32x32 samples. An encoder that wants to keep up with UHD video
(3840x2160 at 30 frames/s) needs a forward transform that handles all four
sizes at a high, size-independent rate. This design is the 1-D core of such a
transform. Every clock it takes 32 samples and returns 32 coefficients,
whatever the TU size. A 32x32 mode vector is one 32-point row. In the smaller
modes the 32 samples are packed with several independent rows, and the same
adders are shared between them. The HEVC integer coefficients are built from
shifts and adds, so the datapath has no multipliers.

## Pipeline

```
transin[0..31] --> pre_arith --> shifter ----------> toadder ----------> round_stage --> transout_e[0..15]
  (8-bit)          butterfly     32 x sft_unit       32 adders           32 x radd         transout_o[0..15]
  mode             e/o lanes     x * |c| for all     +/- products,       (+2^(s-1))>>>s    (14-bit)
  transin_valid    (9-bit)       29 magnitudes       mode-selected sum   limit to 14 bit   transout_valid
```

There are four register stages. A vector presented in cycle t has its results
on the outputs in cycle t+4. There is no back-pressure: a vector is accepted
on every clock where `transin_valid` is high. The TU mode is sampled together
with each vector and travels down the pipeline with it, so the mode may change
on any clock. Fed back to back, the 32 rows of a 32x32 TU are all out
35 cycles after the first row went in (32 + 3). The end-to-end testbench
measures this.

`reset` is synchronous and active high. It clears every pipeline register.

## Lane layout: packing rows of several sizes into 32 samples

This is the part to understand before using the block.

| `mode` | TU    | rows per vector | row r uses samples |
|--------|-------|-----------------|--------------------|
| 0      | 4x4   | 8               | 4r .. 4r+3         |
| 1      | 8x8   | 4               | 8r .. 8r+7         |
| 2      | 16x16 | 2               | 16r .. 16r+15      |
| 3      | 32x32 | 1               | 0 .. 31            |

For an N-point row, `pre_arith` forms N/2 even terms `e[k] = x[k] + x[N-1-k]`
and N/2 odd terms `o[k] = x[k] - x[N-1-k]`. The terms of row r go to lanes
`r*N/2 .. r*N/2 + N/2 - 1`. So whatever the mode, there are always 16 even
lanes and 16 odd lanes. The outputs use the same layout:

* even coefficient `Y[2k]` of row r is on `transout_e[r*N/2 + k]`;
* odd coefficient `Y[2k+1]` of row r is on `transout_o[r*N/2 + k]`.

In 32x32 mode this is simply `transout_e[k] = Y[2k]` and
`transout_o[k] = Y[2k+1]`.

The split works because the HEVC matrix is symmetric. Even rows of the
N-point matrix are symmetric about the row's centre, and odd rows are
antisymmetric. The even coefficients are therefore the (N/2)-column product
of the even rows with `e`, and the odd coefficients the same with `o`. Each
adder thus sums at most 16 products in every mode.

## Multiplierless constant multiplication (`sft_unit`, `shifter`)

Each of the 32 lanes has an `sft_unit`. The unit multiplies the lane's term by
all 29 distinct magnitudes that occur in the HEVC matrices of all four sizes:

```
64 80 88 89 90 87 85 82 83 78 75 73 70 67 61 57 54 50 46 43 36 38 31 25 22 18 13 9 4
```

Each magnitude is a sum of shifted copies of the input, for example
89 = <<6 + <<4 + <<3 + <<0, and 43 = <<5 + <<3 + <<1 + <<0. Products that
extend a shorter one reuse it: 88 is built from 80, 89 and 90 from 88, 83 from
82, and 38 from 36. `prod[i]` is `v * mag_value(i)`, in the order above. The
`shifter` stage registers these 29 x 32 products. Each product is 16 bits, so
none overflows.

## Coefficient sums (`toadder`)

Output lane j of bank b (even or odd), in mode m, is the sum over the input
lanes i of the same row of `sign * product[i][|c|]`. Here c is the HEVC matrix
entry for that coefficient and sample. These choices are all constants. The
package function `lane_coef(m, b, j, i)` works them out at elaboration. It
derives every N-point matrix from the 32-point one (`coef32`): row k of the
N-point matrix is row `k*32/N` of the 32-point matrix. Each adder builds one
sum per mode and a 4:1 mux picks the one for the current mode. The sums are
20 bits wide and exact.

## Rounding and output width (`round_stage`)

Each lane computes `(sum + 2^(s-1)) >>> s` with `s = log2(N) - 1`, which is
1, 2, 3 and 4 for 4x4 to 32x32. This is the first forward stage of HEVC for
8-bit video. The result is then limited to the signed 14-bit output range.
Full-scale input can exceed that range. For example, a 4x4 row of four -128
samples gives a DC coefficient of -16384. Such values are clipped, and the
extra outputs `sat_e` / `sat_o` flag the lanes that were clipped. For typical
residuals the limit is never reached.

## Interface (`hevc_mt_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | clock, synchronous active-high reset |
| `transin_valid` | in | 1 | vector valid |
| `mode` | in | 2 | 0: 4x4, 1: 8x8, 2: 16x16, 3: 32x32 (`tu_mode_e`) |
| `transin[32]` | in | 8, signed | samples |
| `transout_valid` | out | 1 | result valid, 4 cycles after input |
| `transout_mode` | out | 2 | mode of the result vector |
| `transout_e[16]`, `transout_o[16]` | out | 14, signed | coefficients, layout above |
| `sat_e`, `sat_o` | out | 16 | lane was clipped to 14 bits |

Parameters: `IN_W = 8` and `OUT_W = 14`. The internal widths follow from
them: 9-bit butterfly terms, 16-bit products and 20-bit sums.

## Files

| file | content |
|------|---------|
| `rtl/hevc_mt_pkg.sv` | mode type, lane counts, coefficient tables and functions |
| `rtl/pre_arith.sv` | butterfly stage |
| `rtl/sft_unit.sv` | shift-and-add multiplier for one lane |
| `rtl/shifter.sv` | 32 `sft_unit`s and the product registers |
| `rtl/toadder.sv` | 32 mode-selected adders |
| `rtl/round_stage.sv` | rounding, shift and clipping |
| `rtl/hevc_mt_top.sv` | the four stages wired together |
| `tb/tb_ref_pkg.sv` | reference model (see below) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The reference model in `tb/tb_ref_pkg.sv` does not use the RTL's
tables. It computes each matrix entry as `64*sqrt(2)*cos(pi*k*(2n+1)/(2N))`
and snaps it to the nearest value of the HEVC coefficient set. It then forms
each coefficient as a plain dot product over the whole row, with no butterfly.
The end-to-end test (`tb_hevc_mt_top`) also checks a few of those entries
against the published 8x8 HEVC matrix.

`tb_hevc_mt_top` runs the top with its default parameters. It covers:

* one 32x32 TU of 32 rows, checking that it completes in 35 cycles;
* whole 16x16, 8x8 and 4x4 TUs;
* about 600 random vectors with random modes, idle clocks and full-scale
  inputs.

Each result is checked for value, clip flag, mode and its 4-cycle latency.
The test counts how often each of these happened and fails if one never did:
each mode, a mode change between consecutive vectors, an idle clock, and a
clipped coefficient. The module testbenches are exhaustive (`sft_unit`, all
512 inputs) or random with boundary values (`round_stage`: exact rounding
ties and the clipping edges).

`tb_tu_workloads` measures throughput per TU size. For each mode it streams
a 64x64 region of residuals, cut into TUs of that size, back to back. That is
128 vectors, which finish in 131 cycles. It checks every coefficient, and it
counts what finishes in the first 35 cycles:

| TU size | rows finished | whole TUs finished |
|---------|---------------|--------------------|
| 32x32   | 32            | 1                  |
| 16x16   | 64            | 4                  |
| 8x8     | 128           | 16                 |
| 4x4     | 256           | 64                 |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hevc_mt_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_hevc_mt_top.sv \
  --top-module tb_hevc_mt_top
./obj_dir/Vtb_hevc_mt_top
```

Every test finishes in well under a second.

## What the design does not include, and where it is its own

* **Only the 1-D transform.** A full 2-D forward transform also needs a
  transpose buffer and a column pass with 16-bit inputs and a different
  shift. Neither is built. Because the inputs are 8 bits wide, this core
  cannot run the column pass on its own 14-bit results.
* **Chen's algorithm is used only for the first level.** The even half is
  multiplied by its half-size matrix directly, not split again into
  further butterflies.
* **Own choices.** The following are all decisions of this design:
  * the `mode` port and its place in the pipeline;
  * the packing of small rows into lanes;
  * the rounding shift;
  * clipping to 14 bits, and the `sat_*` outputs;
  * a synchronous reset;
  * signed 8-bit inputs.
* **Widths.** The internal widths are wider than 8 and 14 bits, so the
  arithmetic is exact up to the output clip.
* **Throughput of the smaller TU sizes.** In every mode the design handles
  32 samples per clock. Per 35-cycle window, that is:
  * 32x32: one TU (32 rows);
  * 16x16: 64 rows;
  * 8x8: 128 rows;
  * 4x4: 256 rows.

  Higher row counts for the smaller sizes would need more than 32 samples
  per clock.
* **UHD rate.** At a 400 MHz clock the core processes 12.8 G samples/s. One
  1-D pass over 3840x2160 at 30 frames/s needs 0.25 G samples/s (luma only).
  This design's timing has not been taken through synthesis to a clock rate.
