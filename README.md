# Radix-4 Booth multiplier with a Wallace tree of 3:2 compressors

This is a signed N x N multiplier (N = 8 by default) built to make partial
product reduction short. Radix-4 (modified) Booth encoding halves the number of
partial product rows, from N to N/2. A Wallace tree then squeezes those rows
down to two. Its carry-save cells are 3:2 compressors made of an XOR/XNOR stage
and two multiplexers, which puts one XOR and one mux on the critical path of
each cell. A carry look-ahead adder sums the last two rows.

The circuit is purely combinational: `z = a * x`, with both operands and the
2N-bit product in two's complement. It has no clock, no reset and no handshake.
A product is ready one combinational settling time after the operands change.

```
 a (multiplicand) ──┬─────────────────────────────┐
                    └─> ones_complement ── a_n ──┤
                                                   v
 x (multiplier) ──> booth_encoder x N/2 ── sel ──> partial_product_gen x N/2
                                                   │ N/2 rows of N+1 bits, N/2 cor bits
                                                   v
                                            wallace_tree ──> row0, row1 ──> cla_adder ──> z
```

## Files

| file | module | role |
|---|---|---|
| `rtl/booth_pkg.sv` | package | `booth_sel_t` and the elaboration-time functions that lay out the bit matrix |
| `rtl/booth_wallace_mult.sv` | top | wires the blocks below together |
| `rtl/ones_complement.sv` | | `a_n = ~a` |
| `rtl/booth_encoder.sv` | | one multiplier triplet in, `{neg, two, one, zero, cor}` out |
| `rtl/partial_product_gen.sv` | | one partial product row, built from N+1 `pp_gen_cell`s |
| `rtl/pp_gen_cell.sv` | | the two-multiplexer cell for one bit of a row |
| `rtl/wallace_tree.sv` | | the bit matrix and its reduction stages |
| `rtl/compressor_3_2.sv` | | the XOR/XNOR + mux 3:2 compressor |
| `rtl/half_adder.sv` | | the half adder the tree uses for pairs of left-over bits |
| `rtl/cla_adder.sv` | | the final carry look-ahead adder |

Each file starts with a comment on what it does, its ports and its timing.

## Booth digits and the correction bit

The multiplier `x` is scanned in overlapping triplets
`{D2, D1, D0} = {x[2i+1], x[2i], x[2i-1]}` for `i = 0 .. N/2-1`, with
`x[-1] = 0`. Each triplet stands for one digit
`M_i = -2*D2 + D1 + D0`, which is one of -2, -1, 0, +1 or +2, so that
`x = sum M_i * 4^i` and `a * x = sum (M_i * a) * 4^i`.

The encoder does not produce `M_i` as a number. It produces five select lines:

| D2 D1 D0 | digit | neg | two | one | zero | cor |
|---|---|---|---|---|---|---|
| 000 | +0 | 0 | 0 | 0 | 1 | 0 |
| 001 | +1 | 0 | 0 | 1 | 0 | 0 |
| 010 | +1 | 0 | 0 | 1 | 0 | 0 |
| 011 | +2 | 0 | 1 | 0 | 0 | 0 |
| 100 | -2 | 1 | 1 | 0 | 0 | 1 |
| 101 | -1 | 1 | 0 | 1 | 0 | 1 |
| 110 | -1 | 1 | 0 | 1 | 0 | 1 |
| 111 | -0 | 1 | 0 | 0 | 1 | 0 |

The key trick is the handling of negative digits. A row never builds a true
two's complement `-A`, which would need an incrementer in every row. It takes the
one's complement `~A = -A-1` instead, which is only an inversion.
The missing `+1` is the `cor` bit. It is added at the row's least significant
column inside the Wallace tree, together with all other bits of the same weight,
where it costs almost nothing. `cor` is 0 for the digit -0 (`111`), because
that row is forced to zero rather than complemented.

## One partial product row

Each bit `j` of a row is one `pp_gen_cell` with two multiplexers:

1. `na_j = neg ? ~a_j : a_j`. This is the multiplicand bit, complemented for
   negative digits.
2. The one-hot `{two, one, zero}` picks the row bit `p_ij`. `zero` gives 0,
   `one` gives `na_j`, and `two` gives `na_(j-1)`, the first-mux output of the
   bit to the right. That is the left shift that makes 2A.

A row is N+1 bits wide (bit N repeats the multiplicand's sign bit), so `+-2A`
fits. Below bit 0 the shift chain is fed with `neg`. For a -2 digit the row then
shifts in a 1, and the row equals `~(2A)`. The same single `cor` bit then makes
it `-2A`. So every row is a signed N+1 bit number, and
`row_i + cor_i = M_i * A`.

## The bit matrix (the part worth reading twice)

`wallace_tree` does not add sign-extended rows. That would put up to 2N bits in
every row and make the tree much taller on the left. Instead, the stage-0 matrix
of 2N columns holds:

* row `i` at columns `2i .. 2i+N`, **with its sign bit inverted**;
* `cor_i` at column `2i`;
* one row of constant ones, the bits of
  `K = -(sum over i of 2^(2i+N)) mod 2^(2N)`, which is `0xAB00` for N = 8.

This works because a row's signed value is `-s*2^N + rest`, and
`-s = (1 - s) - 1 = ~s - 1`. Inverting each sign bit therefore leaves a constant
`-2^(2i+N)` per row, and K collects all of them. Constant bits enter
compressors like any other bit. Synthesis folds them away.

For N = 8 the column heights, from column 15 on the left to column 0 on the
right, are:

| stage | heights (col 15 .. col 0) |
|---|---|
| 0 (matrix) | 1 1 2 2 3 3 4 5 4 5 3 4 2 3 1 2 |
| 1 | 1 2 2 2 2 2 4 3 4 3 2 3 2 1 2 1 |
| 2 | 2 2 2 2 2 2 3 2 3 2 2 2 1 2 1 1 |
| 3 (out) | 2 2 2 2 2 2 2 2 2 2 2 1 2 1 1 1 |

## Reduction stages

Each stage treats every column the Wallace way:

* each full group of three bits goes into a `compressor_3_2`;
* two left-over bits go into a `half_adder`;
* a single left-over bit passes straight down.

Sums stay in their column and carries move one column left. A carry out of
column 2N-1 is dropped, because the product is taken modulo 2^(2N). Stages
repeat until no column holds more than two bits. That takes 3 stages for N = 8
and 4 stages for N = 16. Inside a column of the next stage, bits are ordered as
follows: compressor sums, half-adder sum, passed bit, then the carries from the
column to the right.

None of this is written out by hand. The functions in `booth_pkg`
(`wt_height`, `wt_num_stages`, ...) work out every column's height at every
stage during elaboration. The generate loops in `wallace_tree` then place one
cell per group. Changing `N` therefore rebuilds the whole tree. Before the tree
runs, the matrix holds 16 compressor and 25 half-adder positions for N = 8. The
ones fed only by constants disappear in synthesis.

The compressor computes `x = P1 ^ P2`, `S = P3 ? ~x : x` and
`C = x ? P3 : P1`. That is a full adder's function with one XOR and one mux in
series.

## Final adder

`cla_adder` adds the two remaining rows. It uses 4-bit look-ahead groups. Inside
a group, each carry is a sum of products of the group's generate and propagate
bits and the group's carry-in. Each group also forms a group generate and
propagate, and these feed the carry into the next group.

## Parameters and interface

`booth_wallace_mult #(parameter int N = 8)`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N | multiplicand, two's complement |
| `x` | in | N | multiplier, two's complement |
| `z` | out | 2N | product `a * x`, two's complement |

N must be even. The package supports N up to 128 (`WT_MAX_N`). Widths 4, 6, 8,
16 and 32 have been simulated.

## What is a design choice here

The block structure follows the published architecture of this multiplier. The
same goes for the encoder's truth table, the two-multiplexer partial product
cell and the compressor's equations. The following are choices made here,
where that description gives no detail:

* **Signed only.** The operands are two's complement. The description mentions
  telling signed from unsigned operands, but gives no unsigned mode, so none is
  built. An unsigned N-bit multiply fits in an (N+2)-bit signed instance with
  zero-extended operands.
* **Combinational.** There are no pipeline registers or output register.
* **Sign extension** uses the inverted sign bits and the constant K described
  above.
* **`cor` placement.** Each `cor_i` goes into the column of its own row's least
  significant bit, not into one row.
* **Final adder internals.** The group size and the chain between groups are
  choices made here. Only "carry look-ahead" is given.
* **Row count.** There are N/2 partial product rows (4 for N = 8).
* **Digit for `100`.** The triplet `100` is taken as the digit -2, as its `neg`
  and `cor` outputs and the digit formula say.
* **Half adders.** They stay in the tree for pairs of left-over bits. Only the
  full adders are replaced by compressors.

No gate-level structure is implied beyond what is written. The encoder is
written as Boolean expressions of its truth table, and synthesis picks the
gates.

## Verification

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_booth_wallace_mult` | the top at N = 8 on all 65536 operand pairs against `$signed(a) * $signed(x)`. It also checks that every Booth triplet, the `cor` bit and the (-128) x (-128) corner all occurred. |
| `tb_booth_wallace_mult_sizes` | the top at N = 4 and 6 (exhaustive) and at N = 16 and 32 (20000 random pairs plus edge values) |
| `tb_booth_encoder` | all 8 triplets against the digit `-2*D2+D1+D0`, and that two/one/zero is one-hot |
| `tb_partial_product_gen` | every multiplicand with every digit: `row + cor == M*A` |
| `tb_wallace_tree` | random rows and `cor` bits: `row0 + row1 == sum (row_i + cor_i) * 4^i mod 2^(2N)` |
| `tb_compressor_3_2` | all 8 inputs: `S + 2C == P1 + P2 + P3` |
| `tb_cla_adder` | carry-chain corners plus 20000 random pairs |
| `tb_ones_complement` | all 256 inputs |

Every testbench was also run against a deliberately broken copy of its module,
and each one reported failures.

Timing, area and power have not been measured here. Only the logic function is
verified.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv \
    tb/tb_booth_wallace_mult.sv --top-module tb_booth_wallace_mult
./obj_dir/Vtb_booth_wallace_mult
```

Replace the testbench name to run any other testbench. The package must come
first on the command line. The other modules are found through `-Irtl`. To
change the width, set `N` on `booth_wallace_mult`. The tree, the number of
Booth rows and the adder width all follow from it.
