# Approximate 8x8 unsigned multipliers from carry-free 4:2 compressors

Multipliers for error-tolerant work (image processing, neural-network
inference) can trade a little accuracy for a lot of area and power. Most of
a multiplier's cost is in reducing the partial products, so this design
approximates that step. It uses 4:2 compressors that have no carry-in and no
carry-out, and that are built from six gates or from no gates at all. Two
complete 8x8 multipliers are built from them:

* **proposed_mul1** uses *ACFG I* compressors in the middle columns. Their sum
  output is always 1, so the final adder shrinks to an inverter, XNOR and OR
  cells.
* **proposed_mul2** uses *ACFG II* compressors in the middle columns. Each
  output is one of the inputs, passed through.

Both truncate the four least significant columns. Both use six-gate *AC6G*
compressors and exact half adders in the upper columns, where errors cost
the most.

The approximations are chosen so that their errors tend to cancel. Stage-1
compressors are fed by AND gates, so each input is 1 with probability 1/4.
All input patterns with the same number of ones are therefore equally likely.
If a compressor errs by +1 on as many of those patterns as it errs by -1, two
compressors in one column cancel each other's errors more often. Neighbouring
columns share operand bits, so their inputs are correlated. The variant used
in each column is picked with that correlation in mind.

The RTL follows the structure of the original publication (L. Sayadi,
S. Timarchi, A. Sheikh-Akbari, "Two Efficient Approximate Unsigned Multipliers
by Developing New Configuration for Approximate 4:2 Compressors"). Where that
description leaves a detail open, the choice made here is stated below.

## The three compressor families

Each compressor takes four bits x1..x4 of equal weight. It returns `sum`
(weight 1) and `carry` (weight 2), so it can represent 0..3 and never 4.

| family | variants | sum | carry | gates |
|---|---|---|---|---|
| AC6G-n (`ac6g`) | 16 | OR of all four inputs, as (xi\|xj)\|(xk\|xl) | (xA & (xB\|xC)) \| (xD & xE) | 6 |
| ACFG I-n (`acfg1`) | 4 | constant 1 | xn | 0 |
| ACFG II-n (`acfg2`) | 12 | one input | another input | 0 |

The variants of a family are input permutations of one another. The selection
tables are in `approx_mul_pkg.sv`. For example, AC6G-12 has
`sum = (x1|x3)|(x2|x4)` and `carry = x3&(x2|x4) | x1&x4`.

**AC6G.** Every AC6G variant is exact for zero, one or three ones. For the
six patterns with two ones, it gives three +1 errors and three -1 errors. It
reads 1111 as 3. Its critical path is OR, then AND, then OR, where an exact
4:2 compressor has two XORs in series.

**ACFG I.** ACFG I-4 represents `1 + 2*x4`, which is wrong for 0000. It is
still balanced on the two-ones patterns.

**ACFG II.** ACFG II-1 represents `x1 + 2*x2`. It is exact on 0000, the most
likely pattern, and wrong on ten of the sixteen patterns.

The testbenches check all of these properties exhaustively.

## How the multipliers are wired

The 64 partial products `b[r] & a[j]` are laid out as a dot diagram.
`pp_array8` produces it as `pc[R][c]`:

* row `R = r + 1` (1..8) holds the bits of one bit of `b`;
* column `c = r + j + 1` (1..15) has weight `2^(c-1)`.

Column 8 is the tallest, with 8 bits. The multipliers index `pc[R][c]`
directly, so their source reads like the diagram.

Both multipliers reduce the array in two stages to at most two bits per
column, then add the two rows with a ripple adder. A box `{...}` below lists
a compressor's inputs in the order x1, x2, x3, x4. `S` is a stage-1 sum from
the same column. `C` is a stage-1 carry from the column below. Where a column
has two stage-1 compressors, `S1`/`C1` come from the upper box and `S2`/`C2`
from the lower one. Rows not listed for stage 1 pass down to stage 2.

| column | stage 1, mul1 | stage 1, mul2 | stage 2, mul1 | stage 2, mul2 |
|---|---|---|---|---|
| 1-4 | truncated | truncated | - | - |
| 5 | ACFG I-4 {R1..R4} | ACFG II-1 {R1..R4} | ACFG I-4 {R5, S} | ACFG II-1 {R5, S} |
| 6 | ACFG I-4 {R1..R4} | ACFG II-1 {R1..R4} | ACFG I-4 {R5, R6, S, C} | ACFG II-1 {R5, R6, S, C} |
| 7 | ACFG I-4 {R1..R4}, {R5..R7} | ACFG II-1 {R1..R4}, {R5..R7} | ACFG I-4 {S1, S2, C} | ACFG II-1 {S1, S2, C} |
| 8 | ACFG I-4 {R1..R4}, {R5..R8} | ACFG II-1 {R1..R4}, {R5..R8} | ACFG I-4 {S1, S2, C1, C2} | ACFG II-1 {S1, S2, C1, C2} |
| 9 | ACFG I-4 {R2..R5}, {R6..R8} | ACFG II-5 {R2..R5}, {R6..R8} | ACFG I-4 {S1, S2, C1, C2} | ACFG II-1 {S1, S2, C1, C2} |
| 10 | ACFG I-2 {R3..R6}, {R7, R8} | ACFG II-11 {R3..R6}, {R7, R8} | ACFG I-3 {S1, S2, C1, C2} | ACFG II-10 {S1, S2, C1, C2} |
| 11 | AC6G-12 {R4..R7} | same | AC6G-7 {R8, S, C1, C2} | same |
| 12 | AC6G-14 {R5..R8} | same | half adder {S, C} | same |
| 13 | - | - | AC6G-7 {R6, R7, R8, C} | same |
| 14 | - | - | half adder {R7, R8} | same |
| 15 | - | - | R8 passes | same |

A compressor with fewer than four inputs has its missing inputs in the last
positions, tied to 0. The gate-free compressors ignore most of their inputs.
As a result, most partial products in columns 5-10 never reach the output, and
synthesis removes their AND gates. The RTL still wires them as in the diagram.

**Final adder of mul1.** All ACFG I sums are 1, so:

* product bits 4 and 5 are the constant 1;
* column 7 adds 1 + carry with `half_adder_one` (`s = ~a`, `c = a`);
* columns 8-10 add 1 + carry + ripple carry with `full_adder_one`
  (`s = ~(a^b)`, `c = a|b`);
* columns 11-15 use exact `full_adder` cells, and the last carry is bit 15.

One consequence is that `proposed_mul1` returns 1008 (bits 4..9 set) for a
zero operand.

**Final adder of mul2.** Column 5 passes straight to bit 4. Column 6 uses a
`half_adder`. Columns 7-15 are a `full_adder` ripple chain.

Neither multiplier has any compensation for the truncated columns. Product
bits 3..0 are always 0.

## Accuracy

Over all 65536 operand pairs:

| | error rate | NMED | MRED | largest \|error\| | exact / over / under |
|---|---|---|---|---|---|
| proposed_mul1 | 99.93 % | 0.0184 | 0.509 | 10450 | 45 / 41251 / 24240 |
| proposed_mul2 | 98.86 % | 0.0178 | 0.151 | 9811 | 748 / 22506 / 42282 |

NMED is the mean |error| divided by 255². MRED is the mean of |error| divided
by the exact product, where pairs with a zero product count 0.

* The error rate, NMED and MRED agree with the published figures to the
  precision printed: 99.93 % / 0.018 / 0.509 and 98.86 % / 0.017 / 0.151.
* The largest error does not agree. The publication gives 7120 and 7148. No
  reading of the structure reaches those values: the operand pair 255 × 255
  alone already loses more than 8000 in the AC6G columns.

On pixel-wise multiplication of two generated 128x128 images, both give
about 32.5 dB PSNR, with 255² as the peak value.

## Choices made where the description is open

* **Input order.** The order of x1..x4 within each compressor box is read top
  to bottom. Missing inputs are the last positions. This reading explains
  which partial products the diagrams mark as unused, with three exceptions:
  * In mul1, the fourth input of the upper compressors in columns 6-8 is
    marked unused. Their carries do enter stage 2, but at a position that
    ACFG I-4 ignores, so these bits really are unused.
  * In mul2, row 5 of column 5 is marked unused in stage 1 but drawn as used
    later. It is used here, as the stage-2 ACFG II-1 sum.
  * In mul2, the lower box of column 10 has rows 7 and 8. Here row 8 is its
    carry. The diagram marks row 7 as the used bit instead. Taking row 7 would
    give MRED 0.148 instead of the published 0.151.
* **Upper columns.** AC6G compressors are in columns 11-13, as the
  description of the 8-bit multipliers states. A general n-bit formula given
  alongside it would put column 11 in the middle section; the 8-bit
  description was followed.
* **Timing.** The multipliers are purely combinational. There are no
  registers, clock or reset.
* **Fixed size.** The structures are hand-placed for 8-bit operands and are
  not parameterised. The publication also reports 16-bit versions but does not
  give their compressor placement, so they are not provided.
* **Applications.** Neural-network or image-filter datapaths built around the
  multipliers are not part of this RTL.

## Files

RTL (`rtl/`), one unit per file:

| file | contents |
|---|---|
| `approx_mul_pkg.sv` | variant tables of AC6G and ACFG II, input-packing function `xin(x1,x2,x3,x4)` |
| `ac6g.sv`, `acfg1.sv`, `acfg2.sv` | the compressors, variant chosen by parameter `N` |
| `pp_array8.sv` | partial-product AND array in dot-diagram coordinates |
| `half_adder.sv`, `full_adder.sv` | exact adder cells |
| `half_adder_one.sv`, `full_adder_one.sv` | adder cells with one input fixed to 1 |
| `proposed_mul1.sv`, `proposed_mul2.sv` | the two multipliers: `a[7:0]`, `b[7:0]` in, `p[15:0]` out |
| `approx_mul8_top.sv` | both multipliers on shared operands, outputs `p_mul1`, `p_mul2` |

Testbenches (`tb/`) are all self-checking and print
`TB_RESULT checks=N failures=M`.

* `mul_ref_pkg.sv` holds an arithmetic reference model of both multipliers.
  It also holds exhaustive-sweep totals from an independent software model.
* `tb_approx_mul8_top.sv` sweeps all operand pairs through both multipliers.
  It checks the published accuracy figures and counts that every behaviour
  occurs: exact, over- and under-estimates, a constant-1 output for a zero
  operand, AC6G fed 1111, and a carry into bit 15.
* `tb_image_mul.sv` runs the image-multiplication experiment.
* `tb_pp_array8.sv` checks the AND array. It also counts how the input
  patterns of columns 4 and 5 occur together, and compares the counts with
  the published table of those conditional probabilities. Twelve of its
  sixteen rows match exactly. That table names the bottom bit of a column x1.
* There is one exhaustive testbench per compressor, adder cell and
  multiplier.

To simulate, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_approx_mul8_top \
    rtl/approx_mul_pkg.sv tb/mul_ref_pkg.sv rtl/*.sv tb/tb_approx_mul8_top.sv
./obj_dir/Vtb_approx_mul8_top
```

Each run takes well under a second.

## Changing it

To try a different compressor variant at one position, change the `N`
parameter of that instance in `proposed_mul1.sv` or `proposed_mul2.sv`. All
variants of a family share the same ports. This is how the placement is meant
to be searched: try each variant at a position, keep the one with the lowest
NMED, and move on to the next position.

If you change a variant, update the reference model and its sweep totals in
`tb/mul_ref_pkg.sv` to match, or the multiplier testbenches will report the
difference.

`proposed_mul1` contains assertions that its constant-1 sums really are 1.
These catch a change that breaks the simplified adder cells.
