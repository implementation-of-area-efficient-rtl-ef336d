# Urdhva-Tiryakbhyam ("vertically and crosswise") multipliers

These are unsigned binary multipliers based on the Urdhva-Tiryakbhyam rule from
Vedic arithmetic. The rule forms every partial product of the two operands at
the same moment and adds them column by column, "vertically" for the bits of
equal weight and "crosswise" for the cross terms. No partial product waits for
another. The result is a fully combinational multiplier with a regular
structure. It has no clock, no reset and no state: a product is valid one
combinational delay after the operands change.

The design has two forms of the rule:

* **Hierarchical (block level), 32 x 32 bits.** A 2x2 cell is the leaf. Four of
  them and three 4-bit adders make a 4x4 multiplier. The same pattern, four
  half-size multipliers and three adders, is repeated to give 8, 16 and
  32 bits.
* **Bit level, 8 x 8 bits.** The 64 partial-product bits are added directly in
  their 16 columns, using half adders and full adders over four stages. A short
  ripple-carry addition finishes the product.

The top level, `vedic_top`, puts the two side by side. They share nothing.

## Files

| file | module | role |
|---|---|---|
| `rtl/vedic_top.sv` | `vedic_top` | top: 32x32 multiplier (`a`,`b`→`p`) and 8x8 multiplier (`a8`,`b8`→`p8`) |
| `rtl/vedic_mul.sv` | `vedic_mul #(N=32)` | hierarchical N x N multiplier |
| `rtl/vedic_mul4x4.sv` | `vedic_mul4x4` | 4x4 block: four 2x2 blocks, three 4-bit adders |
| `rtl/vedic_mul2x2.sv` | `vedic_mul2x2` | 2x2 leaf: 4 AND gates, 2 half adders |
| `rtl/urdhva_mul8.sv` | `urdhva_mul8 #(N=8, FINAL_LO_W=5)` | 8x8 bit-level column-compression multiplier |
| `rtl/ripple_carry_adder.sv` | `ripple_carry_adder #(W=4)` | chain of full adders |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | | one-bit cells |
| `tb/<module>_tb.sv` | | one self-checking testbench per module |

All operands are unsigned. `p` is `2N` bits wide, so it can never overflow.

## The 2x2 leaf

For `a = a1 a0` and `b = b1 b0`:

* `p0 = a0·b0` (vertical)
* `a1·b0 + a0·b1` → half adder → `p1` and a carry (crosswise)
* `a1·b1 + carry` → half adder → `p2` and `p3` (vertical)

## One level of the hierarchy (4x4 and above)

Split each operand into halves of `H = N/2` bits: `a = {aH, aL}`, `b = {bH, bL}`.
Four half-size multipliers work in parallel:

    q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH      (N bits each)

Three N-bit ripple-carry adders then combine the four products:

    adder 1:  s1 = q1 + q2                         carry c1
    adder 2:  s2 = s1 + (q0 >> H)                  carry c2
    adder 3:  s3 = q3 + {c1 | c2, s2[N-1:H]}       carry out always 0
    p = {s3, s2[H-1:0], q0[H-1:0]}

Notes on the adder arrangement:

* **c1 and c2 have the same weight.** Both are worth `2^(N+H)`, so both enter
  adder 3 at bit `H`.
* **They are never 1 together, so one OR merges them.** If `q1 + q2 >= 2^N`,
  the N-bit remainder is at most `2^N - 2^(H+2) + 2`. Adding `q0 >> H`, which
  is at most `2^H - 2`, cannot then carry again.
* **The OR is not a shortcut.** Both carries really occur, and c2 is rare with
  random data. At 32 bits, `a = FFFFFFFF`, `b = 0002FFFF` gives
  `q1 + q2 = 2^32 - 1` and `q0 >> 16 = FFFE`, so only adder 2 carries. The
  testbenches include that vector.
* **The assertions.** An immediate assertion in `vedic_mul` and `vedic_mul4x4`
  checks that adder 3 never carries out.

In the RTL, `vedic_mul` lays the hierarchy out level by level instead of
instantiating itself:

* **Level 0** is an array of `vedic_mul4x4` blocks, one for every pair of 4-bit
  chunks of `a` and `b`. Its entry `g_lvl[0].prod[i][j]` is chunk `i` of `a`
  times chunk `j` of `b`.
* **Level l** works on chunks of `4 << l` bits. Each entry takes the four
  products of level l-1 that make it up and runs them through the three adders
  above.
* **The last level** holds one entry, the full product.

For `N = 4` the module is just a `vedic_mul4x4`, and for `N = 2` a
`vedic_mul2x2`. `N` must be a power of two; otherwise elaboration stops with
an error. At `N = 32` the design holds:

* 256 `vedic_mul2x2` cells
* 64 `vedic_mul4x4` blocks, each with three 4-bit adders
* 63 wider ripple-carry adders: 3 of 32 bits, 12 of 16 bits and 48 of 8 bits

The carry path of the largest adders is long. Every adder is a ripple-carry
chain, which keeps the area small but makes the delay grow linearly with N.

## The 8x8 bit-level multiplier (`urdhva_mul8`)

This is the least obvious part of the design.

**Partial products.** All 64 bits `a[i] & b[j]` are formed at once and placed
in column `i + j`. There are 16 columns, numbered from 0 on the right. Column
`c` starts with `min(c+1, 15-c)` bits.

**Reduction stages.** In each stage every column is treated on its own:

* its bits go three at a time into full adders;
* a remaining pair goes into a half adder;
* a single leftover bit passes to the next stage unchanged.

Sums stay in their column and carries move one column to the left. The stages
repeat until no column holds more than two bits. For 8x8 this takes **four
stages**, with the tallest column going 8 → 6 → 4 → 3 → 2. The heights after
each stage are:

    stage 1: 1 1 2 3 3 4 5 5 6 4 4 4 2 2 2 0   (column 0 first)
    stage 2: 1 1 1 2 2 3 3 4 4 4 3 3 2 2 2 1
    stage 3: 1 1 1 1 2 2 2 3 3 3 2 2 2 2 2 2
    stage 4: 1 1 1 1 1 2 2 2 2 2 2 2 2 2 2 2

**Final addition.** Columns 0–4 end with one bit each, and those bits are
product bits 0–4. Columns 5–15 still hold two bits each. They are added by
carry-propagate addition in two places:

* a **5-bit** ripple-carry adder for columns 5–9;
* a 6-bit ripple-carry adder for columns 10–15.

The first adder's carry feeds the second. Ripple carry is chosen here because
this addition is off the critical path, and it costs the least area and power.
An immediate assertion checks that nothing carries out of column 15.

**How the RTL is generated.** The column heights depend only on N, so the
constant function `col_h(stage, column)` works them out during elaboration.
Generate loops then place one `full_adder` or `half_adder` instance for each
group. Each stage's bits live in their own array, `g_lvl[s].col[c][k]`, with
`k` the slot within the column. The slots of a column after a stage hold, in
this order:

1. the full-adder sums;
2. the half-adder sum;
3. the passed bit;
4. the carries from the column to the right.

A slot that is not used is tied to 0. `N` is a parameter, and any size gives a
correct multiplier. The stage count and final adder width follow from N.
`FINAL_LO_W` sets the width of the first final adder.

## What is fixed by the scheme and what is a choice here

These points follow the design description:

* the 2x2 / 4x4 block structure (four 2x2 blocks, three 4-bit adders);
* the 16- and 32-bit sizes, with 32 as the main one;
* the fully parallel, clock-free formation of partial products;
* for the 8x8 multiplier: the half-adder and full-adder grouping with
  untouched bits passed on, 16 columns, four stages down to two rows, and a
  final ripple-carry addition done in two places, the first one 5 bits wide.

These are choices made in this design:

* **Wiring inside the 4x4 block.** Which product feeds which adder, and the OR
  that merges the two middle carries.
* **Building 8/16/32 bits by repeating the 4x4 pattern**, with N-bit
  ripple-carry adders at level N.
* **The greedy grouping rule of the 8x8 reduction.** It is the grouping
  described above.
* **Two separate multipliers in the top.** The 8x8 bit-level multiplier stands
  beside the 32-bit one instead of serving as its 8x8 sub-block.
* **Unsigned operands.**

Known departure: the 8x8 scheme calls for a final addition 9 columns wide, done
as a 5-bit adder and a 4-bit adder. With the greedy grouping used here, 11
columns remain, so the second adder is 6 bits wide. The product is exact
either way. Only the split of the final addition differs.

Not included:

* the transistor-level leakage technique the multiplier was meant to use
  (lengthening the channel of selected transistors in non-critical paths),
  which changes power and delay but not logic;
* an ALU and a multiply-accumulate wrapper that would use the multiplier, since
  neither is specified;
* the Booth and Baugh-Wooley multipliers mentioned only for comparison.

## Verification

Each testbench drives its module, compares the outputs with products or sums
computed in plain integer arithmetic, and prints
`TB_RESULT checks=<n> failures=<m>`. It has a time-out that fails the run.

* `half_adder_tb`, `full_adder_tb`, `vedic_mul2x2_tb`: exhaustive.
* `vedic_mul4x4_tb`: all 256 operand pairs. Also checks that both middle
  carries (c1, c2) occur.
* `ripple_carry_adder_tb`: the 4-bit adder exhaustively, plus a 32-bit instance
  on corner and random vectors.
* `vedic_mul_tb`: the default 32-bit multiplier on corner, directed and about
  22,000 random vectors; a 16-bit instance on 20,000 random vectors; an 8-bit
  instance on all 65,536 pairs. Checks that c1 and c2 occur at the 32-bit
  level.
* `urdhva_mul8_tb`: all 65,536 pairs. Checks the structure (4 stages, 16
  columns, 5-bit first final adder) and that the carry between the two final
  adders occurs.
* `vedic_top_tb`: the top at its default parameters, both multipliers driven
  together. Counts c1, c2, the carry between the two final adders and the
  all-ones corner, and fails if any of them never happens.

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl --top-module vedic_top_tb \
        tb/vedic_top_tb.sv rtl/*.sv
    ./obj_dir/Vvedic_top_tb

Each run takes a second or two.

Changing the design:

* `vedic_top #(.N(16))` gives the 16-bit multiplier.
* `urdhva_mul8 #(.N(...))` builds the bit-level scheme at another size.
* Swapping `ripple_carry_adder` for a faster adder in `vedic_mul` shortens the
  critical path without touching anything else.
