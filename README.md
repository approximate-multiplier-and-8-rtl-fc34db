# 8x8 Dadda multiplier with a 4-2 compressor tree

This is an unsigned 8x8 multiplier. Its partial products are summed by a
Dadda-style tree built mainly from 4-2 compressors, not from full adders. The
published design uses this tree as a test vehicle for *approximate* 4-2
compressors. Those cells drop a little accuracy to save power and delay, and
image-processing workloads tolerate the error. The tree has two stages:

* **stage 1** cuts the partial-product matrix down to at most four bits per
  column;
* **stage 2** cuts those four rows down to two;
* then an exact carry-propagate adder forms the 16-bit product.

The structure and the cell count of each stage follow the published
description. The published text never gives the logic of the approximate
compressors. This RTL therefore uses an **exact** 4-2 compressor in every
compressor position, and the multiplier is exact (see *What is not here*).
The compressor is a module of its own with a fixed port list. An approximate
cell with the same ports can be dropped in without touching the tree.

A second, smaller design sits beside the main one: a 4x4 multiplier built
from the same cells. The original work used it to try out the compressors.

Everything is combinational. There is no clock and no reset: outputs follow
inputs after the delay of the tree and the final adder.

## The cells

| module | function |
|---|---|
| `half_adder` | `s = a^b`, `c = a&b` |
| `full_adder` | `s = a^b^ci`, `co = maj(a,b,ci)` |
| `compressor42` | `x0+x1+x2+x3+cin = sum + 2*(carry+cout)` |
| `pp_gen #(N)` | `pp[i][j] = b[i] & a[j]`, weight 2^(i+j) |
| `cla_adder #(W)` | `{co,s} = a + b`, carry lookahead |

The 4-2 compressor takes four bits from one column plus `cin`. It returns
`sum` in the same column, and `carry` and `cout` one column to the left.
`cin` comes from the `cout` of the compressor one column to the right.
Inside are two full adders:

* the first adds `x0, x1, x2` and gives `cout`;
* the second adds that sum, `x3` and `cin` and gives `sum` and `carry`.

Because `cout` never depends on `cin`, a horizontal row of compressors chained
`cout -> cin` has no rippling carry. Its delay is one compressor plus one hop.

The final adder computes generate and propagate for every bit. It writes each
carry out as a sum of products of those signals, so no carry passes from bit to
bit. The same module adds the last two rows in both multipliers: W = 16 for
the 8x8 and W = 8 for the 4x4.

## The reduction tree (`dadda8_stage1`, `dadda8_stage2`)

This is the part that takes the most care. The 8x8 partial-product matrix has
these column heights, for columns 0..14:

    column : 0 1 2 3 4 5 6 7 8 9 10 11 12 13 14
    height : 1 2 3 4 5 6 7 8 7 6  5  4  3  2  1

Between the stages the bits travel as *rows*: 16-bit words (`mult_pkg::row16_t`)
in which bit k has weight 2^k. Column k's remaining bits sit in `row[0][k]`,
`row[1][k]`, and so on. Positions a column does not use are 0, so the rows
simply add up to the product. Each testbench checks exactly this invariant.

**Stage 1** uses 2 half adders, 2 full adders and 8 compressors, as specified.
The published dot diagram shows the boxes but not which column each sits in,
so the placement below is this design's own:

| column | cells | bits left |
|---|---|---|
| 0-3 | none | 1 2 3 4 |
| 4 | HA on 2 bits | 4 |
| 5 | compressor C5 (cin = 0) | 4 |
| 6 | compressor C6 (cin = C5.cout), HA on 2 bits | 4 |
| 7 | C7a (cin = C6.cout), C7b (cin = 0) | 4 |
| 8 | C8a (cin = C7a.cout); C8b on 3 bits + C7a.carry (cin = C7b.cout) | 3 |
| 9 | C9 (cin = C8a.cout), FA on 2 bits + C8a.carry | 4 |
| 10 | C10 (cin = C9.cout) | 4 |
| 11 | FA on 3 bits | 4 |
| 12-14 | none | 4 2 1 |

**Stage 2** uses 1 half adder, 1 full adder and 10 compressors, again as
specified. Its layout is one chained row:

* column 2: the half adder takes two of the three bits;
* columns 3 to 12: one compressor per column, each `cin` fed by the `cout` to
  its right, with `cin = 0` in column 3;
* column 8: it has only three bits of its own, so column 7's `carry` fills
  its compressor's fourth input;
* column 13: the full adder takes the two bits and column 12's `cout`.

After stage 2 every column holds at most two bits, and `cla_adder` adds the
two rows. No carry reaches column 15 inside the tree. The adder's carry out
is always 0, because 255*255 < 2^16.

## The 4x4 multiplier (`mult4x4_exact`)

Its ports come from the original simulation: `x` and `t` are 4 bits, `y` is 8
bits. It has 16 AND gates, a half adder, compressors and a generate/propagate
final adder. The reduction plan is this design's own:

* column 2: a half adder;
* column 3: a compressor, with the half adder's carry as `cin`;
* column 4: a compressor on three bits and column 3's `carry`, with `cin`
  from column 3;
* column 5: a full adder;
* then an 8-bit `cla_adder`.

The published example x = 1001, t = 0001 gives y = 00001001. It is one of the
test vectors.

## Top level (`approx_mult_top`)

It instantiates both multipliers side by side with separate ports:

* `a`, `b` (8 bits each) and `p` (16 bits) for the 8x8;
* `x`, `t` (4 bits each) and `y` (8 bits) for the 4x4.

`mult_pkg` holds the shared widths and row types.

## What is not here, and where this departs from the original

* **Approximate compressors.** Two approximate compressor designs are
  mentioned, and one has simulation and timing results. Neither has
  equations or a truth table, so neither is built. Both multipliers use the
  exact compressor. They are therefore exact multipliers with the published
  tree structure, and they do not reproduce the published error or power
  figures.
* **Radix-8 Booth multiplier and MIMO receiver.** Both are named as further
  uses of the compressors, with no description, and are not built.
* **Cell placement** inside both reduction stages and in the 4x4 multiplier
  is this design's own choice. The cell counts per stage follow the original.
* **Final adder type.** The original asks only for an exact carry-propagate
  adder. Carry lookahead was chosen here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_half_adder`, `tb_full_adder`, `tb_compressor42` | exhaustive. Also checks that `cout` does not depend on `cin` |
| `tb_pp_gen` | every bit: N = 4 exhaustive, N = 8 random plus corners |
| `tb_cla_adder` | W = 8 exhaustive, W = 16 corners plus 50k random pairs |
| `tb_dadda8_stage1` | all 65536 operand pairs: the four rows sum to a*b |
| `tb_dadda8_stage2` | 200k random fills up to each column's height: the value is preserved |
| `tb_dadda8_mult` | all 65536 operand pairs. Also reports the error metrics: mean error distance, its normalised form and mean relative error distance. All three are 0 with exact compressors |
| `tb_mult4x4_exact` | the published vector, then all 256 pairs |
| `tb_approx_mult_top` | both multipliers exhaustively, at default parameters |
| `tb_image_workload` | a 255x255 8-bit image through the 8x8 multiplier |

`tb_approx_mult_top` also counts how often each mechanism fires and fails if
one never does. The mechanisms are:

* half-adder, full-adder and compressor carries in each stage;
* the `cout -> cin` chains;
* generates in the final adder;
* the carries of the 4x4 multiplier.

`tb_image_workload` generates its image from a formula. It scales the image by
four gains and checks every product and a checksum of each scaled image.

Every testbench was also run against a copy of its module with one deliberate
bug, and it reported failures each time.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/mult_pkg.sv tb/tb_approx_mult_top.sv \
              -y rtl --top-module tb_approx_mult_top
    ./obj_dir/Vtb_approx_mult_top

Replace the testbench name to run another one. Each testbench takes well
under a second.

## Changing it

* **Approximate compressor.** Write a module with `compressor42`'s ports. Put
  it in place of `compressor42`, either in the file or as the cell used by the
  stages. The row-sum checks in `tb_dadda8_stage1` and `tb_dadda8_stage2` will
  then report the error. Turn them into error statistics, such as mean error
  distance, rather than pass/fail.
* **Other widths.** The reduction wiring is written out for 8x8, and
  `dadda8_mult` stops elaboration for any other `N`. `pp_gen` and `cla_adder`
  take any width.
