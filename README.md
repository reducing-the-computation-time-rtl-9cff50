# Radix-4 Booth multiplier with an N/2-row partial-product array

This is a combinational N x N two's complement multiplier. It uses radix-4
Modified Booth Encoding (MBE) and produces only N/2 partial-product rows. The
default is N = 8: 8-bit operands, four rows and a 16-bit product.

A textbook radix-4 MBE multiplier produces N/2 rows of selected multiples
(0, ±X, ±2X). A negative multiple is formed as the one's complement of the
multiple plus a `neg` bit at the row's least significant column. Most of
those `neg` bits fit in gaps of the next row down. The `neg` bit of the last
row has no row below it, so it needs an extra row of its own. The array then
has N/2 + 1 rows, and the reduction tree must be one level deeper or less
regular.

This design removes that extra row. The last `neg` bit is added into the first
row with a short three-position carry chain. The chain runs in parallel with
the generation of the other rows. The first row has the same budget as the
other rows because its Booth encoder is simpler: the bit below y[0] is always
zero. The resulting array is exactly N/2 rows high.

## Structure

```
 mr ─┬─ mbe_enc_first ─ first-row select ───────────────┐
     │     first_row_msb x3 ── neg_adder ◄── neg(N/2-1) ├─ k[0]
     │                                                   │
     └─ mbe_enc ─ pp_row   (rows 1 .. N/2-1, in parallel) ─ k[1..N/2-1]
 md ────────────────────────────────────────────────────┘
                                  │
                      pp_reduce (carry-save, N/2 -> 2 rows)
                                  │
                      final_adder (carry-propagate)  ──► km
```

| module          | role |
|-----------------|------|
| `sbw_mult`      | top: array generation, reduction and final addition |
| `pp_gen`        | builds the N/2 aligned rows `k` |
| `first_row_gen` | row 0, including the folded-in last `neg` bit |
| `mbe_enc_first` | Booth encoder of row 0 (y[-1] = 0) |
| `first_row_msb` | one of the three top bits of row 0, straight from y[1:0] |
| `neg_adder`     | the three-position addition of the last `neg` bit |
| `mbe_enc`       | general Booth encoder, triplet y[2i+1], y[2i], y[2i-1] |
| `pp_row`        | selects X or 2X and conditionally inverts, N+1 bits |
| `pp_reduce`     | chain of carry-save rows, N/2 rows down to 2 |
| `csa_row`       | one W-bit 3:2 carry-save row |
| `final_adder`   | W-bit `+` |
| `sbw_mult_pkg`  | `mbe_sel_t`, the one/two/neg selection struct |

## The array

For N = 8 the four rows `k[0..3]`, as brought out on the top's `k` port, are
(`pij` is bit j of row i's selected pattern, `ni` is row i's `neg` bit, `~si`
is the inverted sign of row i's pattern, and `.` is zero):

```
              15  14  13  12  11  10   9   8   7   6   5   4   3   2   1   0
k[0]           .   .   .   .   . ~q9  q9  q8  q7  q6 p05 p04 p03 p02 p01 p00
k[1]           .   .   .   .   1 ~s1 p17 p16 p15 p14 p13 p12 p11 p10   .  n0
k[2]           .   .   1 ~s2 p27 p26 p25 p24 p23 p22 p21 p20   .  n1   .   .
k[3]           1 ~s3 p37 p36 p35 p34 p33 p32 p31 p30   .  n2   .   .   .   .
```

Row i ≥ 1 starts at column 2i. Its `neg` bit is at column 2i, in row i+1.
Sign extension is avoided in the usual way: the inverted sign and then a
constant 1 go above each row. The `neg` bit of the last row, n3, belongs at
column 6. No row has a free slot there, so a plain design would add a fifth
row for it.

### Folding n3 into row 0

Before folding, row 0 holds its pattern bits p00..p07 and ~p08 at column 8.
Its sign-extension constants are a 1 at column 8 and a 1 at column 9. Take
the constants together with n3 as a second operand over columns 6..10. That
operand is `0 1 1 0 n3`. Its sum with `0 0 ~p08 p07 p06` is

```
  q6  = p06 ^ n3             c6 = p06 & n3
  q7  = p07 ^ c6             c7 = p07 & c6
  q8  = p08 ^ c7             c8 = ~p08 | c7      (~p08 + 1 + c7)
  q9  = ~c8
  q10 = c8 = ~q9
```

The carry chain is three positions long, whatever N is. The fifth bit is
always the complement of the fourth. `neg_adder` implements these equations
as written.

The three input bits p06, p07 and p08 are on this short chain's path, so
they are not taken from the row-0 encoder. They come from three
`first_row_msb` cells. Each cell forms its bit directly from y[0], y[1] and
two multiplicand bits:

```
pp0j = ((y0 & x[j]) | (~y0 & y1 & x[j-1])) ^ y1
```

Row 0's digit is -2·y1 + y0. Its encoder therefore reduces to one = y0,
two = y1 & ~y0 and neg = y1. The general encoder also has to decode the
zero triplet 111, which costs an extra gate level
(`neg = y[2i+1] & ~(y[2i] & y[2i-1])`). Row 0 does not need that gate, and
the saved level pays for the short chain.

### Why the sum is right

Let row i's pattern be P_i, which is d_i·X − neg_i as N+1 bits. With the
constants above:

* row 0 is worth d0·X − n0 + 2^(N+2) + n_last·2^(N−2);
* row i ≥ 1 is worth (d_i·X − n_i + 3·2^N)·4^i + n_(i−1)·4^(i−1).

The n terms cancel between rows. The constants add up to 2^(2N), which is
zero modulo 2^(2N). The unit testbenches check each row against these
formulas.

## Interface and timing

`sbw_mult #(N)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `mr` | in  | N        | multiplier, two's complement (this operand is Booth-recoded) |
| `md` | in  | N        | multiplicand, two's complement |
| `k`  | out | N/2 × 2N | partial-product rows, aligned to product columns |
| `km` | out | 2N       | product mr × md, exact (2N bits always suffice) |

The multiplier has no clock, reset or handshake. `km` settles one
combinational delay after the inputs change. At N = 8 the ports total
8 + 8 + 64 + 16 = 96 bits. N must be even and at least 4. Assertions in
`first_row_gen` and `pp_reduce` check this when simulation starts.

## What is specified and what is chosen here

These parts follow the design as specified:

* the Booth recoding table;
* the split of the first row;
* the placement of the last `neg` bit and the `0 1 1 0 neg` operand;
* the three-position carry chain;
* direct generation of the three top bits of row 0;
* the simplified first-row encoder;
* generation of the other rows in parallel;
* N = 8 and the rows brought out as k1..k4.

These are this design's own choices:

* **Gate equations of the cells.** The select/invert logic and the
  first-row MSB cell are derived from the recoding table. No gate diagram
  specifies them.
* **Positions of the other `neg` bits and sign-extension constants.** The
  standard layout shown above is used.
* **Reduction.** `pp_reduce` is a linear chain of N/2 − 2 carry-save rows. At
  N = 8 that is two levels, a 4:2 compressor. A Wallace or Dadda tree would
  be the choice for large N. The rows are four high, which is the whole point
  of the array, but the tree shape itself is not specified.
* **Final adder.** `final_adder` is a plain `+`, and synthesis picks the
  adder architecture.
* **Odd N.** It is not supported. An odd width needs different MSB padding.
* **Zero triplet 111.** The general encoder clears `neg` for it, which gives
  a clean zero. Leaving `neg` set would also give the right product.

Synthesis leaves some output bits constant. These are the zero and constant-1
positions of `k`, and `mbe_enc_first`'s `one`/`neg`, which are wires from its
inputs. That is inherent to the array.

The design targets speed through the shape of the array. Nothing in this RTL
forces a gate-level netlist: the cells are written as boolean equations, and
synthesis may restructure them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

* `tb_sbw_mult`: all 65,536 operand pairs at the default N = 8. It checks
  `km`, the sum of the `k` rows, and the width of row 0. It also counts the
  following, and fails if any never happens:
  * every Booth digit in every row (row 0 cannot produce +2);
  * the zero triplet 111;
  * the last `neg` bit being folded into row 0;
  * the short chain carrying through all three positions;
  * the short chain carrying out.
* `tb_sbw_mult_sizes`: N = 4 and 6 exhaustively, N = 16 and 32 with random
  and extreme operands.
* `tb_pp_gen`: every row of the N = 8 array against the formulas above, for
  all operand pairs.
* `tb_first_row_gen` (N = 8 and 6), `tb_neg_adder`, `tb_first_row_msb`,
  `tb_mbe_enc`, `tb_mbe_enc_first` and `tb_pp_row`: exhaustive.
* `tb_pp_reduce`, `tb_csa_row` and `tb_final_adder`: random values plus
  corner cases.

Every testbench finishes in well under a second.

## Simulating

Run from the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sbw_mult_pkg.sv rtl/*.sv tb/tb_sbw_mult.sv --top-module tb_sbw_mult
./obj_dir/Vtb_sbw_mult
```

The package must come first. For another testbench, substitute its name.
Verilator prints a duplicate-package warning when the package appears twice
on the command line. The warning is harmless. To change the operand width,
set `N` on `sbw_mult` (`pp_reduce` and `final_adder` take their sizes from
it).
