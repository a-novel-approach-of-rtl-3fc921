# Regular-array modified Booth multiplier (8 × 8, signed)

A radix-4 modified Booth (MBE) multiplier halves the number of partial
products: an 8 × 8 product needs 4 rows instead of 8. The usual MBE array,
though, is not quite 4 rows. A negative Booth row (−A or −2A) is stored in
one's complement, and the "+1" that completes its negation (the `neg` bit) is
added at the row's least significant position. For the last row that bit has
nowhere to go but a fifth row of its own. That row costs one more carry-save
level in the reduction tree and makes the array irregular.

This design removes the fifth row. The last partial product is not stored in
one's complement. It is negated exactly by a two's-complement converter that
needs no carry chain: it finds the rightmost 1 with a logarithmic OR tree.
The result is a regular array of exactly N/2 rows. A Wallace tree reduces the
rows to two, and a carry look-ahead adder adds them.

The RTL is written in SystemVerilog. It is purely combinational and
parameterised by the operand width `N`, which defaults to 8. Any even
`N >= 6` works.

```
 a[N-1:0] ──┬────────────────────────────────────────────┐
 b[N-1:0] ──┤                                            │
            ▼                                            ▼
   mbe_row_gen × (N/2-1)                          mbe_last_row
   (booth encoder + selectors,                    (encoder, 0/A/2A mux,
    one's-complement rows + neg bits)              carry-free negation)
            └──────────────┬─────────────────────────────┘
                           ▼
                 mbe_pp_array: N/2 rows × 2N bits
                           ▼
                 wallace_tree (3:2 full-adder rows)
                           ▼
                 cla_adder (two-level carry look-ahead)
                           ▼
                    product[2N-1:0] = a × b
```

## The partial-product array

This is the part that takes the most care. The listing below shows the four
rows for N = 8. Bit positions are product bits. `pij` is bit j of Booth row
i, `si` is the sign of row i, `ni` is `neg_i`, and `t` is the exact last row:

```
bit    15  14  13  12  11  10   9   8   7   6   5   4   3   2   1   0
PP0                         ~s0  s0  s0 p07 p06 p05 p04 p03 p02 p01 p00
PP1                      1  ~s1 p17 p16 p15 p14 p13 p12 p11 p10      n0
PP2         1   1  ~s2 p27 p26 p25 p24 p23 p22 p21 p20      n1
PP3   ~t9  t8  t7  t6  t5  t4  t3  t2  t1  t0      n2
```

Row i handles the multiplier group `{b[2i+1], b[2i], b[2i-1]}` (`b[-1] = 0`)
and starts at bit 2i. The constants work as follows:

* **Sign extension.** Each signed row would normally be sign-extended to
  bit 15. The usual trick replaces that with the row's inverted sign bit plus
  a constant. All the constants are summed into one constant, and its 1 bits
  are placed where they cost nothing. Row 0's `~s0 s0 s0` prefix holds the
  constant bits 8 and 9, and the `1` of PP1 holds bit 11.
* **The missing neg.** PP3 is already the exact value −2A … 2A. Its sign
  therefore needs no correction constant, and the total constant changes.
  The two extra 1s (bits 13 and 14) sit in PP2, and bit 15 is absorbed by
  inverting PP3's top bit (`~t9`): adding 2^15 to a 16-bit sum only flips
  that bit.
* **neg bits.** `neg_i` (the +1 of a negative row i) goes to bit 2i, in the
  empty slot of the next row. The last row has no `neg`, so no fifth row
  exists.
* **Width of the last row.** `t` is 10 bits (N+2), not 9, because
  −2 × (−128) = +256. The published array shows the top two bits as the
  row's sign `~s3 s3`. They equal `~t9 t8` in every case but that one, where
  the 9-bit form would give a wrong product. This design uses `~t9 t8`.

For general N the same pattern holds. Row N/2−2 carries the two extra 1s,
and the last row sits at bits 2N−1 … N−2. `mbe_pp_array` also brings out the
`neg_i` of every row, which is useful for observing the recoding.

## Booth recoding ("neg-first")

`booth_encoder` turns a group into three signals. `one_n` and `two_n` are
active low, as in the gate-level encoder this design follows:

| b2i+1 b2i b2i−1 | operation | neg | two | one | p_ij     |
|-----------------|-----------|-----|-----|-----|----------|
| 000             | +0        | 0   | 0   | 0   | 0        |
| 001, 010        | +A        | 0   | 0   | 1   | a_j      |
| 011             | +2A       | 0   | 1   | 0   | a_j−1    |
| 100             | −2A       | 1   | 1   | 0   | ~a_j−1   |
| 101, 110        | −A        | 1   | 0   | 1   | ~a_j     |
| 111             | −0        | 0   | 0   | 0   | 0        |

The inversion is applied to the multiplicand bit before the 1×/2× choice, so
the group 111 gives an all-zero row with `neg = 0`. In the selector
(`booth_selector`), `na_j = ~(a_j ^ neg)` is the conditioned, inverted bit,
and `p_ij = ~((two_n | na_j−1) & (one_n | na_j))`. Each selector passes its
`na_j` to its left neighbour. The correction bit is `c_i = b2i+1 & ~(b2i & b2i−1)`,
which is the same function as `neg_i`.

## One Booth row: encoder plus decoders

`mbe_row_gen` follows the published row structure:

* **Row encoder** (`mbe_row_encoder`). It takes the group and the
  multiplicand's two end bits `y_msb` and `y_lsb`. It produces the selects
  (`X1_b = one_n`, `X2_b = two_n`), `Neg`, and a zero-row flag `Z`. It also
  produces the row's bit 0 (`Row_LSB`), its sign bit `se = ~Z & (y_msb ^ Neg)`
  and the correction bit `Neg_cin`.
* **N−1 decoders** (`booth_selector`). Each one has the XNOR that conditions
  one multiplicand bit with `Neg`. Together they produce `ppt_out[N-1:1]`.

The row value is `{se, ppt_out}` as an (N+1)-bit signed number, plus
`neg_cin`. That sum equals factor × A.

## Carry-free two's complement

`twos_complement_converter` negates a word by a simple rule. Every bit up to
and including the rightmost 1 is kept, and every bit above it is inverted:
001010 → 110110. The inversion mask bit ("conversion signal") `CS_j` is the
OR of all bits below j.

The converter does not ripple this OR up the word. It merges groups that
double in size at each level. When a 2-bit, 4-bit or 8-bit group is joined
to the group on its right, the leftmost signal of the right group says
whether that group held any 1. If it did, it forces every signal of the left
group to 1. W bits take ⌈log2 W⌉ levels; this is a Sklansky prefix-OR. In
`mbe_last_row` the converter negates the selected magnitude 0, A or 2A,
sign-extended to N+2 bits, whenever the group is negative.

## Reduction and final addition

* **`wallace_tree`.** It takes the rows three at a time and adds each triple
  with a row of full adders. The sum stays in place and the carries move one
  bit left. Leftover rows pass through unchanged. The 4 rows of the 8 × 8
  array need two levels. `ROWS` and `W` are parameters, and the tree is also
  tested with 9 rows.
* **`pe_full_adder`.** The full-adder cell, with a separate sum block and
  carry block. In the published design these are low-power transistor
  circuits (pseudo-NMOS stages with keepers). Only their logic function is
  modelled here.
* **`cla_adder`.** A two-level carry look-ahead adder with 4-bit groups (the
  `GROUP` parameter). Bit generate/propagate signals feed group
  generate/propagate signals. A look-ahead unit computes every group's
  carry-in directly, and every carry inside a group is a direct function of
  the group's carry-in.

## Files

| file | contents |
|------|----------|
| `rtl/mbe_pkg.sv` | `booth_ctrl_t` (neg, one_n, two_n), `booth_op_e`, `booth_op_of()`, `booth_factor()` |
| `rtl/booth_encoder.sv` | group → neg / one_n / two_n |
| `rtl/booth_selector.sv` | one partial-product bit |
| `rtl/mbe_row_encoder.sv` | row encoder: selects, Z, Row_LSB, se, Neg_cin |
| `rtl/mbe_row_gen.sv` | one one's-complement Booth row |
| `rtl/twos_complement_converter.sv` | carry-free negation, parameter `W` (10) |
| `rtl/mbe_last_row.sv` | exact last row |
| `rtl/mbe_pp_array.sv` | the N/2-row array |
| `rtl/pe_full_adder.sv` | full adder |
| `rtl/wallace_tree.sv` | carry-save reduction, parameters `ROWS` (4), `W` (16) |
| `rtl/cla_adder.sv` | carry look-ahead adder, parameters `W` (16), `GROUP` (4) |
| `rtl/mbe_multiplier.sv` | top: `a`, `b` → `product`, parameter `N` (8) |

Each `tb/tb_<module>.sv` is a self-checking testbench for the matching module.
Each one ends with the line `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/mbe_pkg.sv \
    tb/tb_mbe_multiplier.sv --top-module tb_mbe_multiplier -o sim
./obj_dir/sim
```

Replace `tb_mbe_multiplier` with any other testbench to run it. Lint a
module with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/mbe_pkg.sv rtl/<module>.sv`.

## How far it is verified

* **End to end.** `tb_mbe_multiplier` runs the top at its default width and
  applies all 65,536 operand pairs. Every product equals the signed product.
  The test also confirms that every Booth operation occurs in every row (row 0
  cannot produce +2A or −0). It confirms that the last row is negated by the
  converter 24,480 times, and that the one case needing the full 10-bit last
  row (A = −128, top group −2A) occurs.
* **Exhaustive block tests.** The encoder, selector, row encoder, row
  generator, last row, full adder and partial-product array are tested
  exhaustively. The array test checks that the rows sum to a × b for all
  pairs, and it also checks where the rows' bits fall.
* **Random and exhaustive mixes.** The converter is tested exhaustively at
  10 bits and randomly at 16 bits. The Wallace tree and the CLA get random
  vectors plus carry-chain corner cases.
* **Mutation checks.** Each testbench was also run against a deliberately
  broken copy of its module, and each of them detected the fault.

Only the logic is verified. No timing, power or area figures can be derived
from this RTL: the published power, delay and power-delay results come from
transistor-level circuits in 65, 90 and 120 nm processes.

## Choices and departures

* **Last row's top bits.** This design uses `~t9 t8` where the published
  array shows `~s3 s3`. It is exact for all operands; see above.
* **Position of the neg bits.** `neg_i` stays at bit 2i, at the end of the
  next row. This matches the published 8 × 8 array. The accompanying text
  also speaks of moving each `neg_i` one bit left, as a correction bit `c_i`,
  but the array it presents does not do so.
* **Number of decoders.** The row has N−1 decoders, and the encoder makes
  bit 0 and the sign. The published description says 8 decoders for the
  8-bit row, but its structure drawing shows the decoders producing only
  bits N−1 … 1.
* **Meaning of Z.** The meaning of the encoder output `Z` is not specified.
  Here it is the zero-row flag, and it gates the sign bit.
* **Own choices.** The Wallace tree organisation, the CLA group size, the
  0/A/2A multiplexer of the last row and the generalisation to any even N are
  this design's own.
* **No clock.** There are no registers or reset. Register the ports outside
  if a pipelined multiplier is wanted.
