# 16 x 16 vertical-and-crosswise multiplier with compressor adders

A fast combinational multiplier for two 16-bit unsigned numbers, giving a
32-bit product. It works on the product one column at a time. A
conventional array multiplier adds partial-product rows in pairs. Here
each result bit k is written as a single column sum instead: all one-bit
products `a[i] & b[k-i]`, plus every carry of weight 2^k that the columns
to its right produce. This column view is the "vertically and crosswise"
(Urdhva-tiryagbhyam) rule of Vedic arithmetic. Each column sum is
computed in one step by a *compressor adder*, a circuit that counts how
many of its up to 20 equal-weight inputs are 1. Bit 0 of a column's count
is the result bit. The higher bits are carries into the columns one, two,
three or four places to the left.

The RTL is plain synthesizable SystemVerilog with no clock. It follows a
published design that was described at the level of compressor schematics
and per-column equations. Where that description left something open,
the choice made here is stated below and in each file's header comment.

## Columns and their counters

For N = 16 there are 32 result columns. Column k receives `pp_count(k)`
crosswise products. That is k+1 products for k < 16, then 31-k, and none
in column 31. It also receives the carries aimed at it. Column by column,
from the right:

| column k | products | carries in | inputs | count bits | counter |
|---|---|---|---|---|---|
| 0 | 1 | 0 | 1 | 1 | wire |
| 1 | 2 | 0 | 2 | 2 | half adder |
| 2 | 3 | 1 | 4 | 3 | 5-3 |
| 3 | 4 | 1 | 5 | 3 | 5-3 |
| 4 | 5 | 2 | 7 | 3 | 7-4 |
| 5-7 | 6-8 | 2 | 8-10 | 4 | 10-4 |
| 8-11 | 9-12 | 3 | 12-15 | 4 | 15-4 |
| 12-15 | 13-16 | 3 | 16-19 | 5 | 20-5 |
| 16-19 | 15-12 | 4 | 19-16 | 5 | 20-5 |
| 20 | 11 | 4 | 15 | 4 | 15-4 |
| 21-23 | 10-8 | 4 | 14-12 | 4 | 15-4 |
| 24-26 | 7-5 | 3 | 10-8 | 4 | 10-4 |
| 27 | 4 | 3 | 7 | 3 | 7-4 |
| 28 | 3 | 3 | 6 | 3 | 7-4 |
| 29 | 2 | 3 | 5 | 3 | 5-3 |
| 30 | 1 | 2 | 3 | 2 | full adder |
| 31 | 0 | 2 | 2 | 2 (1 used) | half adder |

A column with n inputs needs ceil(log2(n+1)) count bits. Bit j of column
k's count is a carry into column k+j. These numbers match the published
column equations s0 to s30 exactly, which the top-level testbench checks.
The widest columns, 15 and 16, add 19 bits at once.

The equations stop at bit 30. Two carries land on bit 31: one from
column 29 and one from column 30. A half adder sums them. Its own carry
would have weight 2^32. That carry is always 0, because all the weighted
bits together add up to exactly a*b < 2^32. It is dropped, and an
assertion confirms it is 0.

Nothing in the RTL is laid out by hand. The package `vedic_pkg` holds
constant functions that repeat the column walk above at elaboration
time:

- `pp_count`: products per column.
- `carries_in`: carries per column.
- `col_inputs`: inputs per column.
- `col_width`: count bits per column.
- `carry_slot`: where each carry enters its destination column.

Inside a column, the products come first, ordered by rising i. The
carries follow, ordered by the column they come from, the rightmost
first. The multiplier is one `generate` loop over the columns.

The longest path runs from the operands, through one AND gate, then
through a chain of column counters. Each column waits for carries from
up to four columns to its right.

## The compressor adders

Every compressor is a ones-counter: its output is the binary count of the
1s among its inputs. They are built from one another.

**5-3 (`compressor_5_3`)** counts 5 bits into 3. There are two forms,
chosen by the parameter `MUX_BASED`:

- `MUX_BASED = 1` (default, used in the multiplier) is the multiplexer
  form. Each output bit is a 4:1 multiplexer selected by `{X4, X3}`. The
  data inputs depend only on X0..X2, so they can settle before the select
  lines do. Let p be the parity of X0..X2, m their majority, t their AND
  and o their OR. The multiplexers then carry:

  | X4 X3 | O1 | O2 | O3 |
  |---|---|---|---|
  | 00 | p | m | 0 |
  | 01, 10 | ~p | o & ~t | t |
  | 11 | p | ~m | m |

  The published form gives the three multiplexers, their select lines and
  the constant 0 input. The data-input functions in this table were
  derived from the count.
- `MUX_BASED = 0` is the form built from two full adders and two half
  adders. A full adder takes X0..X2 and a half adder takes X3, X4. A half
  adder on their two sums gives O1. A full adder on the three carries
  gives O2 and O3.

**7-4 (`compressor_7_4`)**: a 5-3 counts X0..X4. X5 and X6 become a
weight-1 bit (XOR) and a weight-2 bit (AND). A half adder, a full adder
and a half adder then add these to the 5-3's count. The top bit is
always 0, because seven inputs count to at most 7.

**10-4 (`compressor_10_4`)**: two 5-3s count X0..X4 and X5..X9. A ripple
chain (half adder, full adder, full adder) adds the two 3-bit counts.

**15-4 (`compressor_15_4`)**: five full adders each take a triple of
inputs. One 5-3 counts their five sum bits, giving weights 1 to 4. The
other counts their five carries, giving weights 2 to 8. A 4-bit ripple
adder (`parallel_adder_4`) adds `{A3,A2,A1,0}` and `{0,B2,B1,B0}`.

**20-5 (`compressor_20_5`)**: a 15-4 counts X0..X14 and a 5-3 counts
X15..X19. A half adder / full adder / full adder / half adder chain adds
the two counts. The published description lists these parts but gives no
drawing, so the way they are joined here is this design's own.

`column_adder` gives each column the smallest counter that holds it, and
ties unused inputs to 0. The rule is: 1 input is a wire, 2 a half adder,
3 a full adder, 4-5 a 5-3, 6-7 a 7-4, 8-10 a 10-4, 11-15 a 15-4 and 16-20
a 20-5.

## Interface and timing

```
module vedic_mult_16x16 #(parameter int unsigned N = 16)
  (input logic [N-1:0] a, b, output logic [2*N-1:0] r);   // r = a * b, unsigned
```

- The multiplier is purely combinational: no clock, no reset, no
  registers. `r` is valid one propagation delay after `a` or `b`
  changes. Register the inputs or outputs outside the module if you need
  a pipeline.
- The operands are unsigned. The design has no signed mode.
- The published figure for this design was a combinational delay of about
  29.5 ns on a Spartan-3E (speed grade -4). No timing has been measured
  for this RTL.

## How far it can be trusted, and where it departs

- **Function.** Every compressor is checked exhaustively, up to all 2^20
  inputs of the 20-5. The multiplier is checked exhaustively at N = 4 and
  N = 8. At N = 16 it is checked on 1,000,000 random products plus corner
  and one-hot operands. The published simulation vectors of the 5-3,
  10-4, 15-4 and 20-5 compressors are part of their testbenches.
- **Published maxima.** The published text gives the largest result of
  the 7-4 as 0110 and of the 20-5 as 10010. These blocks count correctly:
  seven 1s give 0111 and twenty give 10100.
- **Published equations.** Some of the printed column equations repeat
  terms from a neighbouring column or list a wrong operand index. The
  RTL follows the regular pattern instead: products `a[i]&b[k-i]` plus
  all carries of weight 2^k. Only that pattern gives the correct product.
  The input counts and count widths still agree with every equation.
- **Choice of compressor per column.** The published text lists the 5-3,
  7-4, 10-4, 15-4 and 20-5. One passage omits the 7-4. The 7-4 is used
  here for columns of 6 or 7 inputs.
- **Design choices, not taken from the published description:**
  - the 20-5 wiring;
  - the ripple structure of the 4-bit parallel adder;
  - the data inputs of the 5-3 multiplexers;
  - the column-to-compressor rule;
  - unsigned operands;
  - no registers.

## Parameters

- `vedic_mult_16x16.N`: operand width. Any N up to 16 elaborates. Above
  16 a column would need more than 20 inputs, and elaboration stops with
  an error.
- `compressor_5_3.MUX_BASED`: selects between the two 5-3 forms. The
  multiplier uses the default.
- `column_adder.NIN`: column size, 1 to 20.
- `parallel_adder_4.W`: adder width, 4 in the 15-4.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>` and stops. `tb_vedic_mult_small`
runs the exhaustive N = 4 and N = 8 checks. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv \
          tb/tb_vedic_mult_16x16.sv --top-module tb_vedic_mult_16x16
./obj_dir/Vtb_vedic_mult_16x16
```

`vedic_pkg.sv` must be read first. The other files are found through
`-Irtl`. The full-size testbench does more than compare products:

- It compares the column input counts and widths with the published
  equations.
- For each counter type (half adder, full adder, 5-3, 7-4, 10-4, 15-4,
  20-5), it counts how often some column of that type set its highest
  count bit. A type that never did counts as a failure.
- It runs in about two seconds.

## Files

- `rtl/vedic_mult_16x16.sv`: top level, the column network.
- `rtl/vedic_pkg.sv`: the column bookkeeping functions.
- `rtl/partial_product_gen.sv`: the N x N AND matrix.
- `rtl/column_adder.sv`: picks the counter for one column.
- `rtl/compressor_5_3.sv`, `compressor_7_4.sv`, `compressor_10_4.sv`,
  `compressor_15_4.sv`, `compressor_20_5.sv`: the compressors.
- `rtl/parallel_adder_4.sv`, `full_adder.sv`, `half_adder.sv`: the
  adders the compressors are built from.
- `tb/`: one testbench per module, plus `tb_vedic_mult_small.sv`.
