# 32-bit Brent-Kung adder in Complementary Pass-Transistor Logic

A ripple-carry adder is slow because the carry of each bit has to wait for the carry of the bit
below it. A parallel-prefix adder removes that chain. It treats the carry as a prefix computation
over (generate, propagate) pairs, which an associative operator combines in a tree of logarithmic
depth. The Brent-Kung tree is the sparsest such tree. It uses the fewest combining cells and at
most one cell per pair of columns in any row, so its wiring is short. The price is
2·log2(N) − 1 levels of logic: 9 for 32 bits, against 5 for a Kogge-Stone tree.

This RTL describes such an adder at the gate level, as it would be built in **Complementary
Pass-Transistor Logic (CPL)**. In CPL every signal has two wires, the value and its complement.
Every gate is a pair of nMOS pass-transistor multiplexers followed by restoring inverters. The
RTL keeps that structure: every internal signal is a dual-rail pair, and every logic gate is one
instance of the same generic CPL cell. It is purely combinational. There is no clock, no
register and no reset: the outputs settle one propagation delay after the inputs change.

## The three steps of the addition

For operand bits numbered 1 to 32, with the carry-in treated as a bit 0:

| step | what it computes | where |
|---|---|---|
| 1. bitwise generate/propagate | G_i = A_i·B_i, P_i = A_i ⊕ B_i for i = 1..32; G_0 = cin, P_0 = 0 | `pg_cell` (one per bit) |
| 2. group generate (carries) | G_i:0 for i = 0..31, the carry into bit i+1 | `bk_prefix_tree` |
| 3. sums and carry-out | S_i = P_i ⊕ G_i-1:0; cout = G_32:0 = G_32 + P_32·G_31:0 | CPL EXOR per bit, one extra gray cell |

Treating the carry-in as column 0 with P = 0 means every group that reaches column 0 has a
propagate of 0. Only its generate matters, and that generate is the carry itself.

**Bit numbering.** The ports are ordinary `[31:0]` vectors, so port bit `k` is operand bit `k+1`
in the numbering above. `a[0]` is bit 1, and `sum[31]` is the sum of bit 32, which needs the
carry G_31:0.

## CPL gates: one cell, three functions

`cpl_cell` is the only gate in the design. It has a dual-rail select `s` and two dual-rail data
inputs. On each rail, one pass transistor gated by `s.t` passes `d1` and one gated by `s.f` passes
`d0`. The multiplexer of each rail drives a node of the opposite polarity, and a `cpl_not`
restores it to a full logic level:

    Y  = d1 ·S + d0 ·S'
    Y' = d1'·S + d0'·S'

AND, OR and EXOR differ only in what is wired to the pass inputs. Operand B is always the select:

| gate | passed when B = 1 | passed when B = 0 | so |
|---|---|---|---|
| `cpl_and` | A | 0 | Y = A·B, Y' = A'·B + 1·B' |
| `cpl_or`  | 1 | A | Y = B + A·B', Y' = A'·B' |
| `cpl_xor` | A' | A | Y = A'·B + A·B', Y' = A·B + A'·B' |

A' costs nothing: the two wires of A are crossed (`swap_rail`). This is why all three gates have
the same transistor count. The constants 0 and 1 are the supply rails (`RAIL0`, `RAIL1`).

In the RTL each pass network is written as the sum of products of its two transistors:
`(s.t & d1) | (s.f & d0)`. This gives the right value whenever the select rails are
complementary, which the design guarantees by construction. Because simulation has only two
states, a node that both transistors leave floating reads as 0.

## Prefix cells

The carry network is built from two cells. Each combines an upper group i:k with the adjacent
lower group k−1:j:

* **gray cell**: G_i:j = G_i:k + P_i:k·G_k−1:j. It is a CPL AND (select P_i:k, passing G_k−1:j)
  feeding a CPL OR with G_i:k. It is used when the merged group reaches column 0, where only the
  generate is needed.
* **black cell**: a gray cell plus one more CPL AND for P_i:j = P_i:k·P_k−1:j. It is used
  everywhere else.

A third cell, the buffer, is two inverters in series. It only restores drive strength, so it has
no logic function and no module. The CPL gates already contain the inverters.

## The Brent-Kung tree (`bk_prefix_tree`)

This part needs the most care. The tree works on N = 32 columns: column 0 is the carry-in and
columns 1..31 are operand bits 1..31. Bit 32 never enters the tree. Its sum needs only G_31:0,
and the carry-out is formed from G_31:0 by the separate gray cell.

An **up-sweep** of log2 N = 5 stages builds aligned groups of 2, 4, 8, 16 and 32 columns. Stage l
puts a cell in every column i with (i+1) a multiple of 2^l and merges it with column i − 2^(l−1).
A **down-sweep** of 4 stages then completes the other columns. Stage 2·log2 N − l (level l, from
4 down to 1) puts a cell in every column with (i+1) mod 2^l = 2^(l−1), above the first such
column. The cell merges that column's partial group with the finished prefix 2^(l−1) columns
below. For 32 columns the placement is:

| stage | level | columns with a cell | gray / black | notable cells |
|---|---|---|---|---|
| 1 | 1 | 1, 3, 5, …, 31 | 1 / 15 | G1:0 |
| 2 | 2 | 3, 7, 11, …, 31 | 1 / 7 | G3:0 |
| 3 | 3 | 7, 15, 23, 31 | 1 / 3 | G7:0 |
| 4 | 4 | 15, 31 | 1 / 1 | G15:0, G31:16 |
| 5 | 5 | 31 | 1 / 0 | G31:0 = G31:16 ∘ G15:0 |
| 6 | 4 | 23 | 1 / 0 | G23:0 = G23:16 ∘ G15:0 |
| 7 | 3 | 11, 19, 27 | 3 / 0 | |
| 8 | 2 | 5, 9, 13, …, 29 | 7 / 0 | |
| 9 | 1 | 2, 4, 6, …, 30 | 15 / 0 | |

That makes 57 cells (2N − 2 − log2 N): 31 gray and 26 black. Every column from 1 to 31 ends in
exactly one gray cell. The 16-bit tree is the lower half of this one, with 7 stages. The 32-bit
tree adds the upper 16 columns, the gray cell for G31:0 in stage 5 and the gray cell for G23:0 in
stage 6.

The longest logic path runs from operand bit 1 through G1:0 → G3:0 → G7:0 → G15:0 → G31:0 and
then the sum EXOR of bit 32: one pg cell, five gray cells and one EXOR. The test vector
`FFFFFFFF + 00000001` exercises this path.

The placement is computed, not listed. `cpl_pkg` has constant functions `bk_has_cell`,
`bk_is_gray`, `bk_offset` and `bk_stages`, and the tree is a two-level generate loop over stages
and columns. `lvl[s][i]` holds the group G/P of column i after stage s. A column with no cell at a
stage is a plain wire.

**Fanout.** The textbook drawing of this tree puts buffers in the empty positions, so that no
cell drives more than two loads. Like most real implementations, this one omits them. A finished
prefix therefore drives every later cell that merges with it. G15:0, for example, feeds G31:0,
G23:0, G19:0, G17:0, G16:0 and the sum gate of bit 16. This matters only electrically.

## Size

The 32-bit adder uses 238 CPL gates:

* 32 pg cells (64 gates);
* 31 gray cells in the tree plus 1 for the carry-out (64 gates);
* 26 black cells (78 gates);
* 32 sum EXORs.

It also has 65 input inverters that make the complement rails of a, b and cin. Each CPL gate is
one `cpl_cell`: four pass transistors and two restoring inverters. Built this way in silicon, the
adder is reported at 2162 transistors. The same tree in static CMOS needs 1812. The CPL version
is larger because every gate carries its two output inverters.

## Interface of the top, `bk_adder`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry-in |
| `sum` | out | WIDTH | a + b + cin, low WIDTH bits |
| `sum_n` | out | WIDTH | complement rail of `sum` |
| `cout` | out | 1 | carry-out G_WIDTH:0 |
| `cout_n` | out | 1 | complement rail of `cout` |

`WIDTH` defaults to 32. It must be a power of two of at least 2, and `bk_prefix_tree` stops
elaboration with an error otherwise. `WIDTH = 16` gives the 7-stage 16-bit adder.

## What is modelled, and how far to trust it

* **Modelled:** the logic function of every gate and cell, the dual-rail signalling, the
  cell-by-cell structure of the tree and the carry-in/carry-out handling. Both output rails are
  checked in every test.
* **Not modelled:** anything electrical. That includes transistor sizes, the weak logic 1 that an
  nMOS pass transistor delivers (which the inverters restore), delays and power. For reference,
  switch-level simulation of a 0.18 µm, 5 V layout gives a critical path of 21.4 ns in CPL against
  10.6 ns for a static-CMOS version, with 2162 against 1812 transistors. The RTL says nothing
  about those numbers.
* **Design choices not fixed by the original design:**
  * single-rail input ports, with one inverter per input bit to make the complement rails;
  * both output rails brought out;
  * operand B chosen as the select input of every CPL gate, and P_i:k as the select of a gray
    cell's AND;
  * the carry-out formed by an extra gray cell from G_32, P_32 and G_31:0;
  * the down-sweep cells other than G23:0 placed by the standard recursive Brent-Kung
    construction;
  * the drive buffers omitted.
* **Verification:**
  * Every gate and cell is tested exhaustively.
  * The tree is checked at 32 and 16 columns against a serial carry recurrence, with directed and
    2000 random G/P patterns. The test also checks its placement: 9 stages, 57 cells, G31:0 in
    stage 5, G23:0 in stage 6 and G31:16 in stage 4.
  * The 32-bit adder runs seven reference additions, the critical-path vector, full-width
    carry-in ripples and 20,000 random additions, all against `a + b + cin`.
  * For every module there is a broken variant, and the matching test catches it.

## Files

| file | contents |
|---|---|
| `rtl/cpl_pkg.sv` | dual-rail types `rail_t`, `pg_t`; rail constants; tree placement functions |
| `rtl/cpl_not.sv` | inverter (restoring stage; two make a buffer) |
| `rtl/cpl_cell.sv` | generic CPL gate |
| `rtl/cpl_and.sv`, `rtl/cpl_or.sv`, `rtl/cpl_xor.sv` | the three CPL gates |
| `rtl/pg_cell.sv` | bitwise generate/propagate |
| `rtl/gray_cell.sv`, `rtl/black_cell.sv` | prefix cells |
| `rtl/bk_prefix_tree.sv` | Brent-Kung carry network |
| `rtl/bk_adder.sv` | top: the complete adder |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_bk_adder16.sv` | the adder at WIDTH = 16 |

## Simulating

Each testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. With
Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/cpl_pkg.sv tb/tb_bk_adder.sv --top-module tb_bk_adder
    ./obj_dir/Vtb_bk_adder

Replace `tb_bk_adder` with any other testbench name. Verilator finds the modules in `rtl/` by
file name. The package has to be listed first because the modules import it. All tests finish in
well under a second.

To lint or synthesize the adder on its own, use `rtl/cpl_pkg.sv` plus the module files, with
`bk_adder` as top. To change the width, set `WIDTH` on `bk_adder`. To study another prefix tree,
replace the four placement functions in `cpl_pkg`. The cells and the adder do not depend on the
tree shape, but gray cells must stay exactly where a group reaches column 0.
