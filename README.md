# Reduced-complexity Wallace tree multiplier with a multiplexer full adder

An unsigned 8x8 combinational multiplier (`product = x * y`, 16-bit result) built
around two ideas:

1. **One adder cell for everything.** Every full addition uses a one-bit adder made
   of a single XOR gate and two 2:1 multiplexers, instead of the usual two-XOR /
   AND-OR full adder.
2. **Half adders only where they are unavoidable.** The partial products are
   compressed with a Wallace tree that uses full adders on every group of three
   bits and passes leftover pairs through untouched. A half adder does not reduce
   the number of bits (two in, two out), so one is placed only where leaving a pair
   alone would cost an extra tree stage. The tree keeps the stage count of a
   conventional Wallace tree, with far fewer half adders: the 8x8 tree has 39 full
   adders and 3 half adders in four stages.

Everything is parameterised by the operand width `N` (default 8, tested also at 4).

## Data path

```
 x[N-1:0] ─┐
           ├─ pp_gen ── pp[i][j] = x[j] & y[i] ── rc_wallace_tree ── row_a, row_b ── final_adder ── product[2N-1:0]
 y[N-1:0] ─┘                                     (mux_adder, half_adder)             (ripple of mux_adder)
```

| Module | File | Role |
|---|---|---|
| `wtm_multiplier` | `rtl/wtm_multiplier.sv` | top: ports `x`, `y`, `product` |
| `pp_gen` | `rtl/pp_gen.sv` | N×N AND array |
| `rc_wallace_tree` | `rtl/rc_wallace_tree.sv` | column compression to two rows |
| `final_adder` | `rtl/final_adder.sv` | ripple-carry adder made of `mux_adder` cells |
| `mux_adder` | `rtl/mux_adder.sv` | XOR + two multiplexers full adder |
| `half_adder` | `rtl/half_adder.sv` | multiplexer-style half adder |
| `wtm_pkg` | `rtl/wtm_pkg.sv` | constant functions that compute the tree's schedule |

There is no clock and no reset. The product is valid one propagation delay after
the operands settle. The longest path runs through four tree stages and then along
the 16-cell ripple adder.

## The multiplexer full adder

With `sel = B xor C`:

| `sel` | meaning | `sum` | `carry` |
|---|---|---|---|
| 0 | B equals C | A | B (both operands agree, so they decide the carry) |
| 1 | B differs from C | ~A | A (B and C cancel, so A decides the carry) |

This is an ordinary full adder: `sum = A xor B xor C` and `carry = majority(A, B, C)`.
The two multiplexers share one select signal. The half adder is the same cell with
its third input tied to 0, simplified to `sum = b ? ~a : a` and `carry = b ? a : 0`.
In RTL the multiplexers are plain `?:` selects. Whether they become pass-transistor
multiplexers, LUTs or standard cells is up to the implementation flow.

## The reduction schedule

This is the part of the design that needs the most explanation. All of it is
computed at elaboration time by `wtm_pkg::sched_at()`, and `rc_wallace_tree`
instantiates cells from the result.

The partial products are viewed as columns. Column `c` holds every `x[j]&y[i]`
with `i + j = c`, so its height is `min(c+1, 2N-1-c)`. A conventional Wallace tree
reduces the *row* count per stage as

    r(0) = N,   r(k+1) = 2*floor(r(k)/3) + r(k) mod 3

until two rows remain. For N = 8 that is 8 → 6 → 4 → 3 → 2, which is four stages.
For N = 4 it is 4 → 3 → 2, which is two stages. The row count `r(k+1)` is used as a
**height budget** for every column after stage `k`. Within a stage, each column is
handled as follows, working from column 0 upward:

* each complete group of three bits goes into a full adder. The sum stays in the
  column and the carry goes to column `c+1` of the next stage;
* one leftover bit is passed on unchanged;
* two leftover bits are passed on unchanged, *unless* the column's next height
  (its sums, its passed bits, and the carries arriving from column `c-1`) would
  then exceed the budget. Only in that case do the two bits go into a half
  adder.

Because columns are decided from the least significant upward, each column already
knows how many carries it receives from below. `rc_wallace_tree` checks at
elaboration that every column meets its budget and stops with `$error` otherwise.
For N from 2 to 32 no column exceeds its budget, so the tree always needs exactly
the conventional number of stages. Widths above 32 need `MAX_N` in `wtm_pkg` raised.

### 4x4 worked example

| stage | column heights in (c6 … c0) | cells |
|---|---|---|
| 0 | 1 2 3 4 3 2 1 | full adders in columns 2, 3 and 4; the pairs in columns 1 and 5 and the fourth bit of column 3 pass on |
| 1 | 1 3 2 3 1 2 1 | full adders in columns 3 and 5; **half adder** in column 4, where passing the pair plus the incoming carry would give 3 > 2 |
| out | 2 2 2 1 1 2 1 | two rows go to the final adder |

This is 5 full adders and 1 half adder.

### 8x8

| stage | budget | full adders | half adders (column) |
|---|---|---|---|
| 0 | 6 | 16 | – |
| 1 | 4 | 11 | 1 (column 8) |
| 2 | 3 | 7 | – |
| 3 | 2 | 5 | 2 (columns 6, 7) |

In the final two rows, columns 1 and 6 to 14 hold two bits, columns 0 and 2 to 5
hold one, and column 15 holds none. Those empty slots appear as constant-zero bits
of `row_b`, and synthesis removes them.

Inside a column, the next stage's bits are stored in this order: full-adder sums,
then the half-adder sum, then passed bits, then carries from below. This order is
an implementation choice and has no effect on the result.

## Final adder

The two rows are added by a ripple chain of `mux_adder` cells, with carry-in 0 and
the top carry discarded. The top carry is always zero for an N×N product.
A ripple adder was chosen because it is the simplest adder built from the same
cell. It sets the length of the critical path. A faster carry-propagate adder can
replace `final_adder` without touching anything else, since its interface is only
`a`, `b`, `sum`.

## Design choices and limits

* Operands are **unsigned**. There is no sign handling or Booth recoding.
* The 8x8 placement of cells follows the rule above. Published hand-drawn 8x8
  reduction diagrams for this style of multiplier differ in where they put their
  few two-bit adders. The stage count (four) and the use of full adders everywhere
  else are the same.
* The final adder type is a choice made here: ripple carry, built from the
  multiplexer cell.
* The design is purely combinational. Put registers around `wtm_multiplier` if a
  pipelined unit is wanted.
* Area and timing were never measured on an FPGA or in a standard-cell flow.
  Generic synthesis of the 8x8 gives about 225 word-level cells.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`:

| Testbench | What it checks |
|---|---|
| `tb/mux_adder_tb.sv` | all 8 input combinations, arithmetic and multiplexer cases |
| `tb/half_adder_tb.sv` | all 4 input combinations |
| `tb/pp_gen_tb.sv` | every partial-product bit and their weighted sum, random and corner operands |
| `tb/final_adder_tb.sv` | 16-bit sums, including full-length carry ripples |
| `tb/rc_wallace_tree_tb.sv` | stage and cell counts of the 4x4 and 8x8 schedules; `row_a + row_b == x*y` for all 4x4 and all 8x8 operand pairs |
| `tb/wtm_multiplier_tb.sv` | the default 8x8 top with all 65,536 operand pairs. It also requires that every half adder produced a carry, that the final adder carried into its top bit, and that the zero product and 255×255 both appeared |
| `tb/wtm_4x4_tb.sv` | the top built with `N = 4`: all 256 operand pairs, plus the cell counts of the 4x4 tree |

All of them pass. Each testbench except `wtm_4x4_tb` was also run against a copy
of its module with one deliberate bug, and that run failed, as it should. The bugs
were: swapped carry multiplexer legs, a wrong row select, a broken carry link, and
dropped half-adder carries.

## Simulating

With Verilator 5. The package must be listed first, and `-y rtl` finds the rest:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/wtm_pkg.sv \
    tb/wtm_multiplier_tb.sv --top-module wtm_multiplier_tb
./obj_dir/Vwtm_multiplier_tb
```

Replace the testbench file and top name to run another testbench. To build a
different width, set `N` on `wtm_multiplier` (2 ≤ N ≤ 32). The schedule, cell
placement and widths follow from it automatically.
