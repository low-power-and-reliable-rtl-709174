# Approximate subtractor cells for image-processing datapaths

Image-processing arithmetic can tolerate small errors. Pixel differences,
pixel ratios and change masks still look right when their low-order bits are
slightly off. This design takes advantage of that. It uses 1-bit subtractor
cells that are deliberately wrong for half of their input combinations,
always by exactly one unit. In exchange, each cell is very small: 10 or 12
transistors in the gate-diffusion-input circuit style these cells were
designed for.

There are two such cells, **Proposed-1** and **Proposed-2**. This RTL gives:

* their logic functions;
* the exact full subtractor, which fills every position that is not
  approximated;
* an N-bit ripple-borrow subtractor whose low bits use approximate cells,
  used to take the difference of two images;
* an unsigned non-restoring array divider whose cells are approximated by one
  of four placement patterns, used for pixel division;
* a top level that instantiates all of these, one lane per approximate cell.

Everything is combinational, synthesizable SystemVerilog (IEEE 1800-2017).

## The cells

A subtractor cell computes `x - y - bin` as a two-bit result, a difference
`d` and a borrow `bout`. The value of the result is `d - 2*bout`, so it ranges
from -2 to +1. For the exact cell:

    d    = x ^ y ^ bin
    bout = (~x & y) | (~(x ^ y) & bin)

The approximate cells drop the XOR chain entirely:

| cell       | `bout`           | `d`          |
|------------|------------------|--------------|
| Proposed-1 | `~x \| (y & bin)` | `~x \| y`     |
| Proposed-2 | `~x \| (y & bin)` | `~x \| bin`   |

The two cells share the borrow and differ only in the difference output.
Truth tables (`bout d`), with the wrong entries marked `*`:

| x y bin | exact value | exact | Proposed-1 | Proposed-2 |
|---------|-------------|-------|------------|------------|
| 0 0 0   |  0          | 00    | 11 *       | 11 *       |
| 0 0 1   | -1          | 11    | 11         | 11         |
| 0 1 0   | -1          | 11    | 11         | 11         |
| 0 1 1   | -2          | 10    | 11 *       | 11 *       |
| 1 0 0   |  1          | 01    | 00 *       | 00 *       |
| 1 0 1   |  0          | 00    | 00         | 01 *       |
| 1 1 0   |  0          | 00    | 01 *       | 00         |
| 1 1 1   | -1          | 11    | 11         | 11         |

Each cell is wrong for 4 of the 8 combinations, and every wrong value is off
by exactly 1. Over the 8 equally likely inputs this gives the following
figures for each cell:

* error rate 0.5;
* normalised mean error distance 1/6 (mean distance 0.5, divided by the
  largest result magnitude, 3);
* mean relative error distance 0.4375 (distance divided by |exact|, or by 1
  when the exact value is 0).

These three figures are the published characteristics of the two cells, and
`tb_approx_sub_p1` / `tb_approx_sub_p2` measure them on the RTL. The cells
were published as transistor schematics together with a truth table. The
equations above are the functions closest to that truth table that also give
exactly these error figures. They differ from the printed table in rows
`100` and `101` of the borrow, and for Proposed-2 also in row `110` of the
difference. The published cells are also described as built from XOR and
NOT gates. The equations here need NOT, AND and OR only. If you have another
source for the exact truth tables, the two cell files are five lines each.

Power, delay and noise robustness were the main point of the original
circuits (CNTFET devices, dynamic-threshold gates). None of that can be
expressed in RTL. Synthesized from this code, the cells are just small
AND/OR gates.

## Approximating a multi-bit subtractor: depth

`ripple_sub` chains N cells through their borrows. The `DEPTH` least
significant cells are approximate cells of kind `APPROX`; the rest are exact.
An error in the low part reaches the exact part only through the borrow into
bit `DEPTH`. So the error stays bounded by the weight of the approximate
part: with 8 bits and depth 4, the signed result `{bout, diff}` is never more
than 15 away from `a - b` for either cell (checked exhaustively). A greater
depth makes errors both more frequent and larger.

## The approximate non-restoring divider

`nr_divider` divides a 2N-bit dividend by an N-bit divisor. The result is an
N-bit quotient and an N-bit remainder. It is an array of N rows of N+1 cells,
plus a correction row.

**Non-restoring rows.** The partial remainder `P` is an (N+1)-bit two's
complement number. It starts as the upper half of the dividend. Row `r`
shifts `P` left, brings in dividend bit `N-1-r`, and then:

* subtracts the divisor `B` if `P` was not negative;
* adds `B` if `P` was negative. This is the non-restoring rule: a negative
  remainder is never restored inside the array; the next row adds instead.

Quotient bit `N-1-r` is 1 when the new `P` is not negative. After the last
row, a negative `P` gets `B` added once (the correction row), and that gives
the remainder. The intermediate value `2P + bit` can need N+2 bits, but each
row's result fits in N+1 bits. Computing modulo 2^(N+1) is therefore exact.

**Adding with a subtractor.** Every row is a `ripple_sub`, used as a
controlled add/subtract unit. With `add` equal to the sign of the previous
`P`, the row computes

    S - (B ^ {W{add}}) - add

This is `S - B` when `add = 0`. When `add = 1` it is `S - ~B - 1 = S + B`
(two's complement). The approximate cells therefore take part in both the
subtract and the add-back rows.

**Where the approximate cells go.** `PATTERN` and `DEPTH` choose the cells.
Every pattern approximates some number of the least significant cells of
each row, so a pattern is a list of depths, one per row
(`sub_pkg::row_depth`). Row 0 is the top row, which gives the quotient MSB.

| pattern          | approximate cells                                        |
|------------------|----------------------------------------------------------|
| `PAT_VERTICAL`   | the `DEPTH` low columns of every row                     |
| `PAT_HORIZONTAL` | all cells of the `DEPTH` bottom rows                     |
| `PAT_SQUARE`     | the `DEPTH` low columns of the `DEPTH` bottom rows       |
| `PAT_TRIANGLE`   | `DEPTH-k` low columns in the row `k` rows above the bottom |

The four pattern names belong to the original design. The placement rules
in the table are this implementation's, following common use in the
approximate-divider literature. The correction row is always exact.

**Overflow.** `overflow` is 1 when the upper half of the dividend is not
below the divisor, which includes division by zero. The quotient then does
not fit in N bits, and `quotient`/`remainder` carry no meaning. The flag is
computed exactly, and is an addition of this implementation.

**How inaccurate it is.** These cells are wrong for half of their inputs,
so a divider with many of them is rarely exact. The table below was measured
with `tb_divider_patterns` on 20 000 random 16/8 divisions whose quotients
fit. ER is the share of divisions where the quotient or remainder differs
from exact division. MRED(q) is the mean of |quotient error| / exact
quotient. Results are for Proposed-1 cells; Proposed-2 gives similar
figures.

| pattern    | depth 1: ER / MRED(q) | depth 2       | depth 3       | depth 4       |
|------------|-----------------------|---------------|---------------|---------------|
| vertical   | 0.963 / 0.036         | 0.995 / 0.078 | 0.999 / 0.167 | 1.000 / 0.341 |
| horizontal | 0.975 / 0.015         | 0.995 / 0.040 | 0.997 / 0.082 | 0.998 / 0.147 |
| square     | 0.499 / 0.000         | 0.845 / 0.001 | 0.972 / 0.005 | 0.994 / 0.020 |
| triangle   | 0.499 / 0.000         | 0.765 / 0.000 | 0.908 / 0.001 | 0.964 / 0.003 |

The remainder is almost always wrong, but the quotient stays close. The
square and triangular patterns touch only the last rows, so the quotient's
upper bits stay exact. The default top (vertical, depth 4) is the least
accurate setting; choose `DIV_PATTERN`/`DIV_DEPTH` to suit the application.

## Top level: `approx_sub_top`

Two lanes share the same inputs:

| lane | cell       | outputs                                                   |
|------|------------|-----------------------------------------------------------|
| 1    | Proposed-1 | `p1_quotient`, `p1_remainder`, `p1_pix_diff`, `p1_pix_borrow` |
| 2    | Proposed-2 | `p2_quotient`, `p2_remainder`, `p2_pix_diff`, `p2_pix_borrow` |

`dividend`/`divisor` drive one `nr_divider` per lane. `pix_a`/`pix_b` drive
one `ripple_sub` per lane, which computes `pix_a - pix_b`. The pixel borrow
is the sign of the difference, so `{pix_borrow, pix_diff}` is a 9-bit signed
difference. `div_overflow` is common to both lanes. There is no clock: put
registers around the top if it is to sit in a pipeline.

| parameter     | default        | meaning                                |
|---------------|----------------|----------------------------------------|
| `DIV_N`       | 8              | divisor width (dividend is `2*DIV_N`)  |
| `DIV_PATTERN` | `PAT_VERTICAL` | placement of approximate divider cells |
| `DIV_DEPTH`   | 4              | depth of that pattern                  |
| `PIX_W`       | 8              | pixel width                            |
| `PIX_DEPTH`   | 4              | approximate low cells of the pixel subtractor |

All defaults are this implementation's choices; the original work fixes no
word sizes.

## Files

| file                     | content                                             |
|--------------------------|-----------------------------------------------------|
| `rtl/sub_pkg.sv`         | cell-kind and pattern enums, `row_depth`            |
| `rtl/exact_sub_cell.sv`  | exact full subtractor                               |
| `rtl/approx_sub_p1.sv`   | Proposed-1 cell                                     |
| `rtl/approx_sub_p2.sv`   | Proposed-2 cell                                     |
| `rtl/sub_cell.sv`        | selects one of the three cells by parameter         |
| `rtl/ripple_sub.sv`      | N-bit subtractor with approximate low bits          |
| `rtl/nr_divider.sv`      | approximate non-restoring array divider             |
| `rtl/approx_sub_top.sv`  | both lanes                                          |
| `tb/tb_sub_model_pkg.sv` | bit-level reference models used by the testbenches  |

## Verification

Every testbench checks its results and ends with
`TB_RESULT checks=<n> failures=<n>`:

* `tb_exact_sub_cell`, `tb_approx_sub_p1`, `tb_approx_sub_p2`: all 8
  inputs against the truth tables, plus error rate, NMED and MRED.
* `tb_ripple_sub`: all 2^17 inputs of three 8-bit instances. The exact one
  is checked against integer subtraction. Proposed-1 at depth 3 and an
  all-Proposed-2 instance are checked against the bit-level model.
* `tb_nr_divider`: 40 000 random and directed divisions. The exact
  instance is checked against `/` and `%`. Eight approximate instances (four
  patterns times two cells) are checked against a row-by-row model. For the
  horizontal, square and triangular patterns it also checks that the
  quotient bits above the approximated rows are exact. The test requires
  that overflow, the remainder correction and approximate errors each occur.
* `tb_approx_sub_top`: the top at its default parameters. It runs every
  pixel pair and 50 000 divisions, and counts add-back rows, remainder
  corrections, overflows, negative differences and approximate errors; each
  must occur at least once.
* `tb_divider_patterns`: 32 divider instances (four patterns, depths 1-4,
  two cells) on the same random divisions. Each is checked against the
  model. The error rate must not fall as the depth grows. The test prints
  the accuracy table above.
* `tb_image_change`: a change-detection workload. Two generated 128x128
  images differ by noise of at most +-8 grey levels, except in a rectangle
  that is 80 levels brighter. Both lanes' difference images are thresholded
  at 32. Because the error is at most 15, the change mask must be exact for
  both lanes. The test also prints each lane's PSNR (about 32-33 dB against
  the exact difference).

The reference models in `tb_sub_model_pkg` are written from the truth
tables and integer arithmetic, independently of the RTL structure.

To run one test with Verilator 5:

    verilator --binary --top-module tb_approx_sub_top -Irtl -Itb \
        rtl/sub_pkg.sv tb/tb_sub_model_pkg.sv tb/tb_approx_sub_top.sv \
        rtl/exact_sub_cell.sv rtl/approx_sub_p1.sv rtl/approx_sub_p2.sv \
        rtl/sub_cell.sv rtl/ripple_sub.sv rtl/nr_divider.sv rtl/approx_sub_top.sv
    ./obj_dir/Vtb_approx_sub_top

Each test runs in well under a second.

## Changing it

* To change a cell's function, edit its two `assign` lines, then edit the
  matching table in `tb_sub_model_pkg::cell_model` and the test's expected
  figures.
* To try another placement pattern, add an enum value and a case in
  `sub_pkg::row_depth`. The divider needs no other change, because every
  row is a `ripple_sub` with its own depth.
* To add a lane with a new cell, add the cell module, a `cell_kind_e` value
  and a branch in `sub_cell`.
