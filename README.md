# Approximate radix-4 Booth multiplier with a 4:2 compressor

A signed 8x8 multiplier that gives up a little accuracy in exchange for a
smaller, faster partial-product adder tree. Radix-4 Booth recoding turns the
eight multiplier bits into four partial-product rows. The tree then adds those
rows with ordinary full and half adders everywhere except in the two tallest
columns, where the four bits are squeezed by a cheap *approximate 4:2
compressor*. That compressor is the only inexact part of the datapath, so the
error is confined to two known columns and is easy to bound: the product is
never too large and never more than 384 too small.

Next to it, the same top level holds a small sequential radix-2 Booth
multiplier. It is the textbook shift-and-add/subtract form of the algorithm,
one multiplier bit per clock, useful as a reference for the recoding idea.

Everything is synthesizable SystemVerilog with no vendor primitives.

## Module map

```
approx_booth_top
├── approx_booth_mult           8x8 signed, combinational, approximate
│   ├── booth_encoder  x4       3-bit group -> {neg, one, two}
│   ├── booth_pp_gen   x4       0 / ±x / ±2x row (one's complement + neg bit)
│   ├── full_adder     x4 + stage 2
│   ├── approx_compressor x2    columns 6 and 7
│   └── half_adder     x2 + stage 2
└── booth_seq_mult              N x N signed, sequential, exact (N = 4 by default)
booth_pkg                       booth_sel_t (the recoded digit)
```

## Booth recoding

The multiplier `y` is read in overlapping groups of three bits,
`{y[2i+1], y[2i], y[2i-1]}` for i = 0..3, with `y[-1] = 0`. Each group is one
radix-4 digit:

| group | digit | | group | digit |
|-------|-------|-|-------|-------|
| 000 | 0   | | 100 | −2 |
| 001 | +1  | | 101 | −1 |
| 010 | +1  | | 110 | −1 |
| 011 | +2  | | 111 | 0  |

`booth_encoder` returns the digit as three flags (`booth_sel_t`): `one`,
`two` and `neg`. `booth_pp_gen` selects `x` (sign-extended to 9 bits), `2x`
or zero, then inverts the row when `neg` is set. The inversion gives only the
one's complement, so the missing +1 comes out separately as `neg_bit` and is
added later in the tree, at the row's lowest column. Groups 000 and 111 both
give a zero row with `neg = 0`.

Row *i* therefore contributes `(pp[i] + neg[i]) · 4^i`. `pp[i]` is a 9-bit
signed row.

## The partial-product array and stage 1

Only the low eight bits `pp[i][7:0]` of each row go into the first
reduction stage. Row *i* is shifted left by 2*i* columns, giving this dot
diagram (column 13 on the left, column 0 on the right):

```
col:        13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 0:                         o  o  o  o  o  o  o  o
row 1:                   o  o  o  o  o  o  o  o
row 2:             o  o  o  o  o  o  o  o
row 3:       o  o  o  o  o  o  o  o
height:      1  1  2  2  3  3  4  4  3  3  2  2  1  1
stage 1:     -  -  HA HA FA FA C4 C4 FA FA -  -  -  -
```

- **C4** marks the approximate compressor. It is used in the two 4-high
  columns, 6 and 7. Its inputs are taken top row first: `w = row 0`,
  `x = row 1`, `y = row 2`, `z = row 3`.
- **FA** marks a full adder. It is used in the 3-high columns 4, 5, 8 and 9.
- **HA** marks a half adder. It is used in columns 10 and 11.
- Columns 0–3, 12 and 13 pass straight to stage 2. Columns 2 and 3 have two
  bits but are not reduced in stage 1.

Each cell leaves its sum in its own column and its carry in the next column.
After stage 1, every column holds at most two bits. These form the sum row
`row_a` and the carry row `row_b` in `approx_booth_mult`.

## The approximate compressor

An exact 4:2 counter must be able to output any count from 0 to 4, so it
needs a carry-in/carry-out chain or three output bits. The approximate cell
has no carry-in and no carry-out, and it only has two output bits:

```
g     = w | x | y
sum   = g ^ z
carry = g & z          // 2·carry + sum = g + z
```

It counts how many of `w`, `x` and `y` are set, but only as 0 or 1. When two
or three of them are set it under-counts by one or two. The cell is a single
OR gate feeding a half adder: two gate levels, with nothing that ripples
sideways. With `y = 0` it reduces to the three-input cell whose truth table
is:

| X1 X2 X3 | exact C S | approx C S |
|----------|-----------|------------|
| 0 0 0 | 0 0 | 0 0 |
| 0 0 1 | 0 1 | 0 1 |
| 0 1 0 | 0 1 | 0 1 |
| 0 1 1 | 1 0 | 1 0 |
| 1 0 0 | 0 1 | 0 1 |
| 1 0 1 | 1 0 | 1 0 |
| 1 1 0 | 1 0 | 0 1 ← error 1 |
| 1 1 1 | 1 1 | 1 0 ← error 1 |

(X1 → w, X2 → x, X3 → z). The four-input version applies the same OR-merge
to three inputs instead of two. The testbench replays this table row by row.

## Sign handling, stage 2 and the final adder

Each row's ninth bit `s[i] = pp[i][8]` is its sign. Copying it into every
higher column would make the array much taller. The design uses the identity
`−s·2^8 = ~s·2^8 − 2^8` instead, so each sign becomes one inverted bit plus a
constant. The *correction row* `row_c` holds:

- `neg[i]` at column 2i (columns 0, 2, 4, 6),
- `~s[i]` at column 8 + 2i (columns 8, 10, 12, 14).

The constants of the four rows add up to `−(2^8 + 2^10 + 2^12 + 2^14)`. Mod
2^16 that is `16'hAB00`.

Stage 2 reduces `row_a`, `row_b` and `row_c` once more, column by column. It
uses a full adder where all three rows have a bit, a half adder where two do,
and a wire where only one does. Which case applies is fixed at elaboration
from three column masks. A final carry-propagate adder then adds the stage-2
sum row, the shifted stage-2 carry row and `16'hAB00`. It is written as `+`,
so synthesis picks the adder architecture.

If the two compressors were exact, `out` would equal `x*y` exactly. The
testbenches check this by construction: their model is the exact product
plus the compressor error.

## Accuracy

The error is `out − x·y = Σ_{c=6,7} ((b0|b1|b2) − (b0+b1+b2)) · 2^c`, where
`b_i` is bit `c−2i` of one's-complement row *i*. Its properties:

- The error is always ≤ 0, so the multiplier never overestimates.
- Each column loses at most 2, so `|error| ≤ 2·64 + 2·128 = 384`.
- Over all 65,536 operand pairs, 32,704 products are exact and 32,832 are
  not. The worst error is −384 and the mean |error| is 70.9. The testbench
  prints these figures on every run.

The rows are in one's complement, and the row order at the compressor inputs
is a design choice. Both affect which operand pairs hit the error. The bound
does not depend on either.

## Sequential Booth multiplier (`booth_seq_mult`)

This unit has three registers: `A` (accumulator), `Q` (multiplier) and `Q-1`
(one extra bit to the right of Q). `B` holds the multiplicand. Each clock it
does one iteration:

1. Look at `{Q[0], Q-1}`. On 01, `A ← A + B`. On 10, `A ← A − B`. On 00 or
   11, leave A unchanged.
2. Shift `{A, Q, Q-1}` right arithmetically by one bit and decrement the
   counter.

After N iterations the product is `{A, Q}`. Example with N = 4, multiplier
0100 and multiplicand 1011 (4 × −5): the unit shifts twice, subtracts,
shifts, adds, shifts, and ends with `A,Q = 1110 1100` (−20).

Interface:

- `start` is sampled while `busy` is low. The operands are captured in that
  same cycle.
- `busy` is then high for N cycles.
- `done` pulses for one cycle N cycles after the start cycle. `product` holds
  its value until the next start.
- A `start` while busy is ignored.
- `rst_n` is an active-low synchronous reset.

`A` has one guard bit more than N. Without it, `A − B` overflows when the
multiplicand is −2^(N−1).

## Interfaces and timing

`approx_booth_top` ports:

| port | dir | width | unit |
|------|-----|-------|------|
| `x`, `y` | in | 8 | approx. multiplier: multiplicand, multiplier |
| `out` | out | 16 | approx. multiplier: product |
| `clk`, `rst_n`, `start` | in | 1 | sequential unit |
| `multiplicand`, `multiplier` | in | `SEQ_N` | sequential unit |
| `busy`, `done` | out | 1 | sequential unit |
| `product` | out | `2*SEQ_N` | sequential unit |

All operands and products are two's complement. `approx_booth_mult` has no
clock: `out` settles one combinational delay after `x` and `y` change. To
pipeline it, register its inputs and outputs outside the module.
`SEQ_N` (default 4) sets the width of the sequential unit. The 8-bit width of
the approximate multiplier is fixed, because its stage-1 wiring is written
out cell by cell.

## What follows the original design, and what is this implementation's own

These parts follow the original design:

- the radix-4 recoding table,
- four rows of eight bits, each shifted by two columns,
- the stage-1 assignment of compressors, full adders and half adders to
  columns,
- the choice of the two-gate-level approximate compressor ("compressor 4")
  as the one used,
- the compressor's behaviour as given by its truth table,
- the full-adder and half-adder equations,
- the flow of the sequential Booth algorithm.

These parts are this implementation's own:

- The 9-bit partial products, the neg bits, the sign-handling correction row
  and the `16'hAB00` constant. The original speaks of 8-bit partial products.
  Those cannot hold ±2x or the two's-complement +1, so they cannot give a
  correct signed product.
- The stage-2 rule and the behavioural final adder. The original shows a
  second stage of full and half adders whose carry bookkeeping is not
  specified precisely enough to copy.
- The compressor's input order (row 0 → w … row 3 → z), and extending its
  OR-merge to three inputs. The truth table shows only the two-input case.
- Everything about the sequential unit's timing and interface: one iteration
  per clock, the start/busy/done handshake, the synchronous reset and the
  guard bit.

Not included: the exact 4:2 compressor and the three other approximate
compressors that the original compares against, and the plain
full/half-adder Booth multiplier it uses as a baseline. Only the chosen
configuration is built.

## Simulating

Every testbench in `tb/` checks its results itself. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog.
With Verilator 5:

```sh
verilator --binary --timing -Irtl rtl/booth_pkg.sv tb/tb_approx_booth_top.sv \
          --top-module tb_approx_booth_top
./obj_dir/Vtb_approx_booth_top
```

Replace the name to run another testbench:

- `tb_approx_booth_top`: end to end at the default parameters. It runs all
  65,536 operand pairs through the approximate multiplier and every 4-bit
  pair through the sequential unit, and checks the 4-cycle latency. It also
  counts that every Booth group, both exact and inexact products, and the
  add, subtract and shift-only iterations all occur.
- `tb_approx_booth_mult`: exhaustive check against the integer error model.
  It prints the accuracy figures above.
- `tb_booth_seq_mult`: exhaustive at N = 4 and N = 8. It checks the latency,
  the worked example and that a start while busy is ignored.
- `tb_booth_pp_gen`, `tb_booth_encoder`, `tb_approx_compressor`,
  `tb_full_adder`, `tb_half_adder`: exhaustive unit tests.

Each run takes well under a second.
