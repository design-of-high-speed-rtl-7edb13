# Rounding-based approximate multiplier

Many signal-processing, vision and learning workloads can tolerate a small
error in each product. This multiplier trades that tolerance for a simpler
computation. Before the partial products are formed, one operand is rounded to
the nearest power of two, so only one row of the partial product array can
hold data. The result is

    p = a * round(b)

The multiplicand `a` is used exactly. `round(b)` is the power of two nearest to
`b`. The main configuration is 8 x 8 bits with a 16-bit product and a clock and
reset, for example `6 x 3 -> 6 x 2 = 12`.

Because the rounded operand has so few set bits, most rows of the partial
product matrix are all zeros. The design builds only the rows that can hold
data, its *active rows*, and sends just those to the reduction tree and the
final adder. The reduction tree is a Wallace tree of full adders and the final
adder is a parallel prefix adder. Two parameters set the trade-offs:

- `ROUND_BITS` sets how many significant bits of `b` survive rounding, and
  with it the number of active rows. It runs from 1 (the default) up to
  `WIDTH`, which gives the exact product.
- `ACTIVE_ONLY = 0` builds the complete AND matrix instead of only the active
  rows, and reduces the inactive rows as zeros. The product is the same.

## The rounding rule

`round_unit` finds the leading one of `b`, at position `n`. It keeps
`ROUND_BITS` bits from there down and drops the remaining
`d = n + 1 - ROUND_BITS` low bits. If the dropped part is more than half of
`2^d`, the kept part is incremented by `2^d`. If it is exactly half, the value
rounds **down**. Some examples with `ROUND_BITS = 1`:

| b   | rounded | why                                  |
|-----|---------|--------------------------------------|
| 0   | 0       | nothing to round                     |
| 3   | 2       | exact half between 2 and 4 -> down   |
| 6   | 4       | exact half between 4 and 8 -> down   |
| 7   | 8       | above half -> up                     |
| 96  | 64      | exact half -> down                   |
| 97  | 128     | above half -> up                     |
| 255 | 256     | rounds up past the operand width     |

Rounding up can carry into bit `WIDTH`, for example 255 -> 256. For that
reason the rounded operand `b_round` is `WIDTH + 1` bits wide and the array has
`WIDTH + 1` rows. The product still fits in `2*WIDTH` bits because
`a <= 2^WIDTH - 1`.

Two choices here are this design's own. The source material does not fix the
tie direction, and it does not say which operand is rounded. The reference
result 6 x 3 = 12 settles both:

- Rounding both operands to powers of two cannot give 12.
- Rounding `b` with ties going down gives 6 x 2 = 12.

`b` is the operand whose bits select the partial product rows, so rounding
`b` is what empties rows.

**Error.** `a` is exact, so the relative error of `p` equals the relative
error of `round(b)`. It does not depend on `a`. For 8-bit `b` from 1 to 255:

| ROUND_BITS | live rows (max) | mean relative error | worst relative error |
|------------|-----------------|---------------------|----------------------|
| 1          | 1               | 16.9 %              | 33.3 % (b = 3*2^k)   |
| 2          | 2               | 8.5 %               | 20.0 %               |
| 3          | 3               | 4.2 %               | 11.1 %               |
| 8          | 8               | 0                   | 0                    |

The error is not unbiased: exact-half ties always go down.

## Datapath

```
  b ──► round_unit ──► mant, shift   (b_round = mant << shift)
                          │
  a ──────────────► active_row_select ──► ROUND_BITS rows of 2*WIDTH bits
                                              │
                                         wallace_tree ──► sum row, carry row
                                                              │
                                                        prefix_adder ──► p
```

**Normalised rounding output.** Besides `b_round`, `round_unit` gives the same
value as `mant << shift`. `mant` is `ROUND_BITS` bits wide and has its top bit
set. When rounding up produces a kept part of exactly `2^ROUND_BITS`, `mant`
becomes `2^(ROUND_BITS-1)` and `shift` goes up by one. An example is 7 -> 8
with two kept bits.

**Active rows (`active_row_select`).** In the full matrix, row `i` is `a`
ANDed with bit `i` of the rounded operand and shifted left by `i`. Only rows
`shift .. shift+ROUND_BITS-1` can be non-zero. This block builds exactly those
rows: row `k` is `a & {WIDTH{mant[k]}}` shifted left by `shift + k`. The
number of rows entering the tree is therefore fixed at `ROUND_BITS`, whatever
the operand. With the default `ROUND_BITS = 1` there is a single row, a shifted
copy of `a`. The tree and adder then pass it through, and synthesis reduces the
8-bit multiplier to a leading-one detector, a rounding incrementer and a
barrel shifter.

**Full matrix (`pp_generator`, `ACTIVE_ONLY = 0`).** This is the textbook AND
matrix, `WIDTH + 1` rows of `2*WIDTH` bits. Bit `j` of row `i` is
`a[j] & b_round[i]`, placed at weight `2^(i+j)`. A row is active when its bit
of `b_round` is 1, and `row_active` on the core reports this. Every row goes
into the tree, inactive ones as zeros. Use this form to compare against a
conventional multiplier: with `ROUND_BITS = WIDTH` it is an exact Wallace
multiplier with a prefix adder.

**Reduction (`wallace_tree`, using `csa_3to2`).** The rows are reduced in layers
of 3:2 compressors. Each compressor is a row of full adders. Every group of
three rows becomes a sum row and a carry row shifted up by one column. Rows
left over in a layer pass through. A layer maps `n` rows to
`2*floor(n/3) + n mod 3`. For example, 9 rows go 9 -> 6 -> 4 -> 3 -> 2 in
four layers. The layer count and the wiring are computed from `ROWS` at
elaboration. One or two rows pass straight through. The tree groups whole rows,
not column by column. Where a full adder sees a constant zero, synthesis
reduces it to a half adder.

**Final adder (`prefix_adder`).** This is a Kogge-Stone parallel prefix adder.
Each bit first forms its generate and propagate signals. `ceil(log2 W)` levels
then combine them at distances 1, 2, 4 and so on. The carry depth grows with
`log2` of the width instead of linearly. The carry-in is folded into bit 0. The
multiplier ties the carry-in to 0 and ignores the carry-out, which is always 0.

## The clocked top, `rounding_multiplier8x8`

| port | dir | width     | meaning                                   |
|------|-----|-----------|-------------------------------------------|
| clk  | in  | 1         | clock, rising edge                        |
| rst  | in  | 1         | synchronous reset, active high, clears p  |
| a    | in  | WIDTH     | multiplicand (used exactly)               |
| b    | in  | WIDTH     | multiplier operand (rounded)              |
| p    | out | 2*WIDTH   | approximate product, registered           |

Parameters are `WIDTH` (default 8), `ROUND_BITS` (default 1) and
`ACTIVE_ONLY` (default 1).

Timing: the operands are combined combinationally, and `p` is loaded on every
rising edge. The product of the `a` and `b` present before edge *k* is on `p`
after edge *k*. That is one cycle of latency and one new product per cycle.
There is no handshake.

The combinational core is also usable on its own as `rounding_multiplier`. It
has the same `a`, `b` and `p` ports and no clock. It also has the observation
outputs `b_round`, `row_active`, `rounded_up` and `exact`.

## Files

| file                          | contents                                     |
|-------------------------------|----------------------------------------------|
| `rtl/round_unit.sv`           | input rounding                               |
| `rtl/active_row_select.sv`    | only the active partial product rows         |
| `rtl/pp_generator.sv`         | full AND-matrix partial products             |
| `rtl/csa_3to2.sv`             | one row of full adders (3:2 compressor)      |
| `rtl/wallace_tree.sv`         | layered reduction to two rows                |
| `rtl/prefix_adder.sv`         | Kogge-Stone adder                            |
| `rtl/rounding_multiplier.sv`  | combinational multiplier                     |
| `rtl/rounding_multiplier8x8.sv` | clocked top                                |
| `tb/tb_ref_pkg.sv`            | reference rounding model (brute force)       |
| `tb/tb_*.sv`                  | one self-checking testbench per module, plus `tb_rounding_multiplier_wide` |

## Verification

Each testbench compares against values it computes independently of the RTL.
The reference rounding in `tb_ref_pkg` does not reuse the RTL's mask
arithmetic. It scans every candidate value, keeps those whose set bits span at
most `ROUND_BITS` positions, and picks the nearest, taking the smaller one on a
tie. Every testbench ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_round_unit` runs all 256 operands for `ROUND_BITS` = 1, 2 and 3. It
  checks the value, both flags and the normalised `mant`/`shift` form, plus
  hand-picked corner cases.
- `tb_pp_generator` checks every row bit, the row sum and `row_active`.
- `tb_wallace_tree` checks trees of 1, 2, 3, 5, 9 and 17 rows on random rows.
- `tb_prefix_adder` checks 16- and 7-bit instances on corner cases and random
  operands.
- `tb_active_row_select` checks one- and three-row instances for every
  mantissa and shift.
- `tb_rounding_multiplier` runs all 65,536 operand pairs on the default core
  and on the full-matrix core. `ROUND_BITS = 8` must give the exact product.
  `ROUND_BITS = 3` is checked on random pairs in both forms. It also checks
  that at most one row is active.
- `tb_rounding_multiplier8x8` runs the top at its default parameters. It checks
  reset and the one-cycle latency, then holds 6 x 3 (expects 12). It then
  streams all 65,536 pairs one per clock and resets once mid-stream. It counts
  every rounding case and fails if any never occurs: up, down, exact-half tie,
  unchanged, carry into bit 8, zero operand, and reset.
- `tb_rounding_multiplier_wide` builds the top with `WIDTH = 16` and
  `WIDTH = 32` and checks 20,000 random pairs each.

To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rounding_multiplier8x8 tb/tb_rounding_multiplier8x8.sv
./obj_dir/Vtb_rounding_multiplier8x8
```

## Departures and open points

- **Register placement.** The original 8x8 implementation reports three
  flip-flops and an unregistered path from inputs to output. How its clock and
  reset are used is not specified. Here the full 16-bit product is registered
  instead, with a synchronous, active-high reset. For a purely combinational
  multiplier, use `rounding_multiplier`.
- **Signed operands.** Signed data is mentioned as a use case of the technique,
  but its handling is not specified. This RTL is unsigned only. A
  sign-magnitude wrapper around `rounding_multiplier` would be the natural
  extension.
- **Dynamic row selection.** Varying the number of active rows per operand is
  suggested as a further option, and is not built. Here the count is fixed at
  `ROUND_BITS` when the design is elaborated.
- **Choices not fixed by the source.** The following are all choices of this
  design, and each is described in the header comment of its module:
  - the tie direction and which operand is rounded;
  - selecting the active rows with one shifter per row;
  - the Kogge-Stone prefix network;
  - grouping whole rows in the Wallace tree, and using 3:2 compressors.
- The 16- and 32-bit configurations are obtained with `WIDTH = 16` and
  `WIDTH = 32`. The default build is the 8-bit one.
