# Approximate 8x8 multiplier with pruned 5:2 compressors

An unsigned 8 x 8 -> 16-bit multiplier that gives up a little accuracy to save
power and area in the partial-product reduction. Reduction is where a multiplier
spends most of its area, power and delay. It is split by weight:

* In the **middle-weight columns**, where the partial-product matrix is tallest,
  the design uses **approximate 5:2 compressors**. Each one is an exact 5:2
  compressor with one XNOR leg removed ("probabilistic pruning").
* In the **high-weight columns** it uses **exact 4:2 compressors**, so the
  most significant bits of the product stay exact.
* The low columns are exact too.

The result is never larger than the true product. It is exact for 63 % of all
operand pairs. Its largest error is 992.

The RTL is written from the published description of this design
("Low Power High Accuracy Approximate Multiplier Using Approximate High Order
Compressors"). The description gives the pruned compressor as a
multiplexer schematic and states the exact/approximate split by weight. It does
not give the tree: how the columns are split and how the bits are wired are
this implementation's own. The section "What is specified and what is chosen"
below lists every such choice.

## Structure

```
a[7:0], b[7:0]
   |
pp_gen        64 AND gates: pp[i][j] = a[j] & b[i], weight 2^(i+j)
   |
pp_tree       level 1: FA / approximate 5:2 / exact 4:2 per column -> <= 4 bits per column
   |          level 2: chain of exact 4:2 compressors              -> two 16-bit rows
final_adder   16-bit carry-propagate adder
   |
p[15:0]
```

Everything is combinational. There is no clock and no handshake. `p` is valid
one propagation delay after `a` and `b` change.

| Module | Role |
|---|---|
| `amul_pkg` | widths (`N = 8`, `PW = 16`) and the partial-product matrix type |
| `full_adder` | 3:2 compressor |
| `compressor_4_2` | exact 4:2 compressor (two full adders; `cout` does not depend on `cin`) |
| `compressor_5_2` | pruned 5:2 compressor; `APPROX = 0` keeps the pruned leg, which makes it exact |
| `pp_gen` | AND array |
| `pp_tree` | the two-level compressor tree |
| `final_adder` | final adder |
| `approx_mult_8x8` | top: `a`, `b` in, `p` out, parameter `APPROX` (default 1) |

## The pruned 5:2 compressor

A 5:2 compressor takes seven bits of one weight: `x1..x5`, plus `cin1` and
`cin2`, which come from the compressor one column lower. It returns `sum` at
that weight and three bits at twice the weight: `carry`, `cout1` and `cout2`.
`cout1` and `cout2` go to the compressor one column higher. Neither depends on
`cin2`. They depend on `cin1` only through `cout2`, and `cin1` is itself the
lower column's `cout1`, which depends only on that column's `x`. So a row of
these compressors has no carry ripple.

The circuit is built from multiplexers:

| Element | Output |
|---|---|
| carry block (x1, x2, x3) | `cout1 = maj(x1, x2, x3)` |
| XOR-XNOR gate + MUX1 (select x3) | `s1 = x1 ^ x2 ^ x3`, in true and complement form |
| XOR gate on x4, x5 + MUX2 (select cin1) | exact: `m2 = x4 ^ x5 ^ cin1`; **pruned: `m2 = cin1 ? 0 : x4 ^ x5`** |
| MUX6 (select x4 ^ x5) | `cout2 = (x4 ^ x5) ? cin1 : x4`, i.e. `maj(x4, x5, cin1)` |
| MUX3 (select m2) | `t = s1 ^ m2` |
| MUX4 (select cin2) | `sum = t ^ cin2` |
| MUX5 (select t) | `carry = t ? cin2 : s1` |

Pruning removes the XNOR output of the x4/x5 gate and ties MUX2's "1" input to
ground. When `cin1 = 1` and `x4 = x5`, `m2` should be 1 but is 0. Then
`sum + 2*(carry + cout1 + cout2)` is exactly one less than the number of ones
at the inputs. This happens for 32 of the 128 input patterns. Every other
pattern is counted exactly, and the error is never positive.

## The compressor tree

Column `k` holds the partial products `a[j] & b[i]` with `i + j = k`. In
`pp_tree`, bit `m` of column `k` is the one with `i = max(0, k-7) + m`.
The column heights are 1, 2, ..., 8, ..., 2, 1.

Level 1 (A = pruned 5:2, E = exact 4:2, FA = full adder):

| Column | Height | Level-1 elements | Bits left for level 2 |
|---|---|---|---|
| 0-3 | 1-4 | none | 1-4 |
| 4 | 5 | FA on bits 0-2 | 3 |
| 5 | 6 | A5: x = bits 0-4, cin1 = bit 5, cin2 = FA carry from column 4 | 1 |
| 6 | 7 | A6: x = bits 0-4, cins from A5 | 4 |
| 7 | 8 | A7 (x = bits 0-4) and FA on bits 5-7 | 3 |
| 8 | 7 | A8 (x = bits 0-4) and FA on bits 5, 6 and A7's carry | 3 |
| 9 | 6 | A9 (x = bits 0-4) | 4 |
| 10 | 5 | E10: x = bits 0-3, cin = A9's carry | 4 (includes A9's cout1 and cout2) |
| 11 | 4 | E11: cin = E10's cout | 2 |
| 12 | 3 | E12 | 1 |
| 13, 14 | 2, 1 | none | 4, 1 |

Level 2 is one exact 4:2 compressor per column from 2 to 14. Each gets at most
four bits, with unused inputs tied to 0, and the columns are chained
`cout -> cin`. The sums form `row_a`. The carries, shifted up one column, form
`row_b`. The cout of column 14 becomes bit 15 of `row_a`. Zero-padded inputs make a few
row bits constant 0, and synthesis removes the logic behind them.

The approximate compressor in column `k` can only subtract `2^k`. So

```
p = a*b - sum over k in 5..9 of 2^k * fire_k
fire_k = cin1_k & (x4_k == x5_k)
cin1_5 = column-5 bit 5,   cin1_k = maj(column k-1 bits 0..2) for k > 5
```

`tb/amul_tb_pkg.sv` implements this formula as the reference model.

## Accuracy

These figures come from simulating all 65536 operand pairs
(`tb_approx_mult_8x8` prints them):

| Metric | Value |
|---|---|
| exact results | 41518 of 65536 (error rate 36.65 %) |
| mean error distance | 96.5 |
| normalised mean error distance (MED / 65025) | 0.148 % |
| mean relative error (over non-zero products) | 1.36 % |
| largest error | 992 (all five middle compressors fire, e.g. 255 x 255 = 64033) |

How often each middle column errs: column 5 in 10240 pairs, columns 6 and 7
in 5632 each, columns 8 and 9 in 6400 each.

## What is specified and what is chosen

Taken from the source design:
* the 8 x 8 size and the three stages (generate, reduce, add);
* exact 4:2 compressors in the high weights and approximate 5:2 compressors in
  the middle weights;
* the multiplexer structure of the 5:2 compressor, and its pruning: the XNOR
  leg is removed and the MUX2 input is grounded.

Chosen here:
* which columns count as middle (5-9) and high (10-12), and that the low columns
  are exact;
* the two-level tree, the bit-to-input wiring, and the use of exact 4:2
  compressors in level 2 across all columns;
* the select of MUX6 (`x4 ^ x5`), which the schematic does not show;
* unsigned operands, a plain AND array with no Booth recoding, a plain adder as
  the final stage, and no registers;
* the `APPROX` parameter. Setting it to 0 gives an exact multiplier with the
  same tree, useful as a reference and as a wiring check.

One point in the source is inconsistent. In its prose, the exact 5:2 compressor
adds x1-x3 first, then the first sum with x4 and x5, then that sum with both
carry-ins. The schematic of the pruned circuit instead adds x4, x5 and cin1
together, and combines the result with the x1-x3 sum and cin2. The RTL follows
the schematic. Both orders count the same when exact.

The source also names a radix-256 approximate multiplier and a radix-4 Booth
multiplier as goals, without describing either. They are not included.
Performance figures from an FPGA implementation (area and power) are not
reproduced here.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/amul_pkg.sv tb/amul_tb_pkg.sv \
    tb/tb_approx_mult_8x8.sv --top-module tb_approx_mult_8x8
obj_dir/Vtb_approx_mult_8x8
```

Replace the testbench name to run another one:

| Testbench | What it checks |
|---|---|
| `tb_full_adder`, `tb_compressor_4_2` | every input pattern; `cout` independent of `cin` |
| `tb_compressor_5_2` | all 128 patterns of the pruned and the exact version, the error rule, `cout1`/`cout2` independent of `cin2`, a worked example |
| `tb_pp_gen`, `tb_final_adder` | every operand pair / 20000 random pairs |
| `tb_pp_tree` | all 65536 pairs: exact tree equals `a*b`, pruned tree equals the model; every middle column errs at least once |
| `tb_approx_mult_8x8` | all 65536 pairs through the top at default parameters, against the model; `p <= a*b`; counts of each error source; accuracy figures |

## Changing the design

* **Moving the approximate region.** The middle range is `MID_LO..MID_HI` in
  `pp_tree`, and the level-1 wiring is written out column by column. To move the
  range, rewire level 1 so that every column keeps at most four bits. Then
  update `MID_LO`/`MID_HI` in `amul_tb_pkg` to match. Checking with
  `APPROX = 0` (the exact product for every pair) catches wiring slips.
* **Operand width.** `N` is in `amul_pkg`, but the tree is hand-wired for 8 bits.
