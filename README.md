# Four 8-bit multipliers around a reduced-complexity Wallace tree

Every parallel multiplier does the same three jobs. It forms partial
products, reduces that matrix of bits to two rows with adders that pass no
carries along a row, and adds the two rows with one carry-propagate adder.
Designs differ in how they do each job. This RTL holds four 8-bit unsigned
multipliers (16-bit product) that make different choices, so they can be
synthesised and compared on equal terms:

| multiplier | partial products | reduction | final adder | module |
|---|---|---|---|---|
| reduced-complexity Wallace (the main design) | 64 AND gates | Wallace tree that uses as few half adders as possible | modified carry save adder (MCSA) | `rcw_mult` |
| Dadda | 64 AND gates | Dadda tree | ripple carry | `dadda_mult` |
| compressor ("counter") multiplier | 64 AND gates | 4-3 ... 7-3 compressors | ripple carry | `comp_mult` |
| radix-4 modified Booth | 5 recoded rows | word-level 3:2 carry-save tree | MCSA | `booth_mult` |

The main design combines two ideas. First, the reduction tree leaves out
half adders that do not shorten it. Second, the final adder is
carry-select: the carry no longer ripples the whole 16 bits. Instead it
hops from group to group through small multiplexers. The MCSA is the hardest
part to follow, so it comes first.

`mult_suite_top` instantiates all four on shared operands, next to a 16×16
version of the compressor multiplier (`comp16_mult`). Everything is
combinational except the Booth multiplier's two input registers.

## The modified carry save adder (`mcsa`)

`mcsa #(N=16)` computes `sum = a + b + cin` and returns N+2 bits (x0..x17).
The top bit is always 0. It is kept because the last group of the adder is
defined as four bits wide.

**Stage 1.** This is a row of half adders, with a full adder at bit 0 that
takes `cin`. It turns `a`, `b` into a save vector `s` and a carry vector `c`.

**Stage 2.** This stage adds `s` and `c << 1`. A conventional carry save
adder uses one ripple chain here: half adder at bit 1, full adders at bits
2..15, half adder at bit 16. Counting both stages gives 17 half adders and
15 full adders. The MCSA cuts that chain into groups:

```
 bits:   17 16 15 14 | 13 12 11 | 10  9  8 |  7  6  5 |  4  3  2  1  0
         last group  | group 3  | group 2  | group 1  | group 0
         (4 bits)    | (3 bits) | (3 bits) | (3 bits) | ripples normally -> c4
```

* Group 0 (bits 4..0) ripples normally. Its bits are final, and its carry
  out is `c4`.
* Groups 1 to 3 are three bits each. Each one is computed as if its
  carry-in were 0, so its first cell becomes a half adder. Each gives a
  4-bit value `{c_hi, x_hi..x_lo}`.
* The last group (bits 17..14) is also computed with carry-in 0.

Every group after group 0 also forms its value plus one with a **binary to
excess-1 converter** (`bec`). The BEC inverts bit 0 and flips every higher
bit whose lower bits are all 1. The group's real carry-in then picks the
plain value or the incremented one. Groups 1 to 3 output their own true
carry with the result. So the only path that crosses groups is the select
chain `c4 -> c7 -> c10 -> c13`: one multiplexer delay per group, not three
full-adder delays.

**The multiplexer (`ha_mux`)** is made only of half adders:

* A half adder on `a` and `1 ^ s` gives `a & ~s` on its carry output.
* A half adder on `s` and `b` gives `b & s`.
* A third half adder XORs the two. They are never both 1, so the XOR equals
  `a·~s + b·s`.

The multiplexer and the BEC are parameterised (`W`). For N other than 16
the middle groups stay three bits wide and the last group takes the
remaining 3 to 5 bits. That rule is this design's own. The testbench checks
N = 32 and N = 64 as well as 16.

## Reduced-complexity Wallace tree (`rcw_tree`, `rcw_mult`)

The 64 partial products `pp[i][j] = b[i] & a[j]` (weight i+j) form columns
of height 1, 2, ..., 8, ..., 2, 1. Each stage visits the columns from least
significant to most:

* every group of three bits goes into a full adder (sum stays, carry moves
  up one column);
* a leftover pair of bits is passed on untouched. A conventional Wallace
  tree would use a half adder here;
* a leftover pair gets a half adder only when the column would otherwise end
  the stage taller than a conventional Wallace tree allows. Those limits are
  8 -> 6 -> 4 -> 3 -> 2, so the stage count stays at four.

The three rules come from the reduced-complexity Wallace method. The exact
half-adder test is this design's reading of the third rule. The result is
39 full adders and 3 half adders in four stages. Column heights after each
stage (column 0 first):

```
start   1 2 3 4 5 6 7 8 7 6 5 4 3 2 1
stage 1 1 2 1 3 4 3 5 6 5 4 5 3 2 3 1
stage 2 1 2 1 1 3 2 4 3 4 4 4 2 3 1 2
stage 3 1 2 1 1 1 3 2 2 3 3 3 3 1 2 2
stage 4 1 2 1 1 1 1 2 2 2 2 2 2 2 2 2
```

The two final rows come out as

* `sum`: 15 bits, weights 2^0..2^14;
* `carry`: 14 bits, where `carry[k]` has weight 2^(k+1);

so that `product = sum + 2*carry`. Bit 0 of the product is `sum[0]`. The
16-bit MCSA adds `sum[14:1]` and `carry` to give `result` (15 bits), and
`product = {result, sum[0]}`. `sum`, `carry` and `result` are module outputs
because they are the values normally watched when this multiplier is
simulated. Two reference vectors are checked in the testbench:
0x71 × 0x15 = 0x0945 and 0x31 × 0x1D = 0x058D. How the tree's outputs are
split between `sum` and `carry` depends on where each adder's outputs are
placed. Another implementation of the same rules can therefore show
different `sum`/`carry` values with the same `result`.

The tree files are structural netlists of `full_adder`/`half_adder` (and,
for the compressor tree, compressor) instances. They were produced
mechanically from the rules described in each file's header and checked for
all 65,536 operand pairs. To change a rule, regenerate the tree.

## Radix-4 Booth multiplier (`booth_encoder`, `booth_ppg`, `booth_mult`)

The multiplier `y` is read in overlapping groups `{y(2i+1), y(2i), y(2i-1)}`.
Each group stands for the digit `-2·y(2i+1) + y(2i) + y(2i-1)`, which is one
of -2, -1, 0, +1, +2. For unsigned 8-bit `y` there are five groups, with
`y(-1) = y(8) = y(9) = 0`.

**Encoder.** For each group it produces:

| signal | function | meaning |
|---|---|---|
| `neg`  | `y(2i+1)` | complement the row |
| `x1_b` | `~(y(2i) ^ y(2i-1))` | low for a ±1 digit |
| `z`    | `~(y(2i+1) ^ y(2i-1))` | with `x2_b`, selects ±2 when both are low |
| `x2_b` | `y(2i) ^ y(2i-1)` | |
| `cor`  | `y(2i+1) & ~(y(2i) & y(2i-1))` | +1 correction for -X and -2X; also the row's sign |

Put another way, `neg` gives the direction (sign) of the multiple, the
x1/x2 selects say whether it is shifted (2X) or not, and "zero" (neither
select) says whether anything is added at all.

The group 111 ("-0") has `neg = 1` but selects nothing. Its row is all zeros
and its `cor` is 0.

**Partial product generator.** Each bit is
`pp[j] = ~((~(x[j]^neg) | x1_b) & (~(x[j-1]^neg) | z | x2_b))`. That is a
NAND of two ORs, giving the one's complement of the selected multiple in 9
bits.

**Summing the rows.** Each row is sign-extended to 16 bits with its `cor`
bit and shifted by 2i. A sixth row holds the `cor` bits at positions 2i. Four
word-level 3:2 carry-save adders (`csa3`) reduce the six rows to two
(6 -> 4 -> 3 -> 2), and the MCSA adds those two.

**Timing.** `x` and `y` pass through input registers (reset to 0 by
`rst_n`), so `product` is valid one clock after the operands. This is the
only multiplier with a latency.

The full sign extension, the separate correction row and the shape of the
carry-save tree are this design's choices. Cheaper sign-extension schemes
exist and could replace them.

## Dadda tree (`dadda_tree`, `dadda_mult`)

The stage targets follow `d1 = 2`, `d(j+1) = floor(1.5·dj)`, giving 2, 3, 4,
6, so an 8-high matrix reduces as 8 -> 6 -> 4 -> 3 -> 2. Within a stage,
columns are visited from least significant to most. Each column's height
includes the carries it receives in this stage. A column exactly one over
the target gets a half adder. A column further over gets a full adder, and
this repeats until the column meets the target. The result is the classic
35 full adders and 7 half adders. A 16-bit ripple-carry adder (`rca`) adds
the two rows.

The rounding matters: with `ceil(1.5·dj)` the targets would be 2, 3, 5, 8,
and no single stage of 3:2 and 2:2 counters can take an 8-high column to 5.

## Compressor tree (`comp_4_3` ... `comp_7_3`, `comp_tree`, `comp_mult`)

A k-3 compressor counts the ones among k bits of weight j. It sends the 3-bit
count to columns j, j+1 and j+2 of the next stage, so one compressor can take
a whole short column at once.

* `comp_4_3`: a full adder on x1..x3; a second full adder on that sum, x4
  and a carry-in; a half adder on the two carries. It counts up to five ones.
* `comp_5_3`: a half adder on i5, i4 and a full adder on i3..i1. A small
  2-bit adder (a half adder and a full adder) adds their two results.
* `comp_6_3`, `comp_7_3`: two full adders, one more half or full adder for
  bit 0, and a full adder on the three carries. This structure is this
  design's own.

**Schedule.** While some column is taller than three bits, each column feeds
up to seven bits to one compressor, and again while at least four bits are
left. Three leftover bits go to a full adder; one or two are passed on. (A
10-bit column would become one 7-3 compressor and one full adder.) A last
stage of full and half adders then gives two rows, and a ripple-carry adder
adds them.

For 8×8 this takes three stages and uses three 7-3, two 6-3, two 5-3 and
four 4-3 compressors, 10 full adders and 5 half adders. The 4-3 compressor's
carry-in is tied to 0 in this tree. Compressor outputs that would land at
weight 2^16 or above are always 0 for an 8×8 product and are dropped. The
schedule is this design's own.

`comp16_mult` is the 16×16 version (32-bit product) built the same way
(`comp16_tree`). There, column 9 holds ten bits and so gets one 7-3
compressor plus one full adder. The 256 partial products reduce in four
stages: three of compressors and one of adders. The published 16-bit tree
uses five stages, and its exact layout is not reproduced. Its final adder is
a 32-bit ripple-carry adder.

## Top level (`mult_suite_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | only the Booth input registers use them |
| `a`, `b` | in | 8 | multiplicand, multiplier (unsigned) |
| `rcw_product` | out | 16 | combinational |
| `rcw_sum`, `rcw_carry`, `rcw_result` | out | 15, 14, 15 | Wallace tree rows and MCSA output |
| `dadda_product`, `comp_product` | out | 16 | combinational |
| `booth_product` | out | 16 | one clock after `a`, `b` |
| `a16`, `b16` | in | 16 | operands of the 16×16 compressor multiplier |
| `comp16_product` | out | 32 | combinational |

Shared types are in `mult_pkg`: the operand width `OP_W = 8` and the Booth
control bundle `booth_ctrl_t`. The reduction trees are fixed netlists (8×8, and
16×16 for `comp16_tree`). `mcsa`,
`bec`, `ha_mux`, `booth_ppg`, `csa3` and `rca` take a width parameter.

## How far to trust it, and where it departs

Every testbench checks itself against values it works out independently.
All of them pass:

* every 8-bit multiplier, and the top, exhaustively over all 65,536 operand
  pairs;
* the 16×16 compressor multiplier on corner operands, all single-bit
  products and 200,000 random pairs;
* every compressor, `bec` and `ha_mux` exhaustively;
* the Booth encoder against the recoding truth table;
* the Booth row generator for all 256 multiplicands × 8 groups;
* the MCSA on corner cases and about 100,000 random additions at 16, 32 and
  64 bits.

The top-level test also counts how often each Booth digit (including "-0")
occurred, and how often each MCSA group used its incremented value. It fails
if any of them never happened.

Points where this RTL makes its own choices:

* Final adders of the Dadda and compressor multipliers: ripple carry. No
  final adder is specified for them.
* The exact half-adder test in the reduced-complexity Wallace tree, and the
  compressor schedules (see above). The 16×16 compressor tree uses four
  stages, not five.
* Booth: full sign extension, a separate correction row, a carry-save tree
  of word-level full-adder rows, and input registers with an asynchronous
  active-low reset.
* MCSA: group sizes for widths other than 16.
* The 6-3 and 7-3 compressor internals, the 5-3 compressor's final 2-bit
  adder, and the BEC internals.
* Dadda stage targets rounded down (`floor(1.5·d)`), as Dadda's method
  requires.
* In the Booth encoder `neg` is `y(2i+1)` for the "-0" group too. A truth
  table that shows `neg = 0` there describes the same row, because nothing
  is selected.

Timing, area and power of the four designs are not modelled here. They come
from synthesising the RTL for a target.

## Simulating

Each `tb/<module>_tb.sv` ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test of all
four multipliers:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/mult_pkg.sv tb/mult_suite_top_tb.sv --top-module mult_suite_top_tb
./obj_dir/Vmult_suite_top_tb
```

Swap in any other testbench and its `--top-module`. `mult_pkg.sv` must come
first because the multipliers import it. Every testbench finishes in
seconds.
