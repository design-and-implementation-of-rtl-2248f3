# Dynamic-range-detection Booth multiplier

A multiplier's power depends a lot on which operand is Booth encoded. In
radix-4 Booth recoding, every 3-bit group `000` or `111` of the encoded
operand (the *multiplier*) gives a partial product row of all zeros, and a
zero row barely toggles the adder tree beneath it. Small-magnitude numbers,
positive or negative, are mostly sign extension, so they are full of such
groups. The main design here is a 16 × 16 signed multiplier. A small
*dynamic range detector* looks at both operands, estimates which one would
give more zero rows, and routes that one to the Booth encoder. The product is
unchanged, but fewer rows switch.

The rest of the datapath is a conventional parallel multiplier:

```
 a, b ──► dynamic range detection ──► multiplicand, multiplier
                                          │
                       radix-4 Booth partial products (N/2 rows)
                                          │
           carry-save accumulation with 3:2 / 4:2 / 5:2 / 7:2 compressors
                                          │
                        ripple-carry final adder ──► p = a × b
```

Next to it, the RTL also holds a separate study of reduction trees: unsigned
Wallace and Dadda tree multipliers built from full and half adders.

Everything is combinational. No clock, reset or handshake is involved: a
product is valid one propagation delay after the operands change.

## How the detector decides

`drd_detector` works on 8-bit slices. In each slice of each operand it checks
three overlapping groups, bits (7,6,5), (5,4,3) and (3,2,1). A group counts
as a "zero group" when its three bits are equal, since it is then a Booth
triplet that encodes to 0. Bit 0 of each slice is not examined. The three
group flags become a thermometer code:

| signal | meaning |
|---|---|
| `ge1`  | at least one zero group |
| `ge2`  | at least two zero groups |
| `all3` | all three groups are zero groups |

The switching signal of a slice is

```
sw = (ge1A & ~ge1B) | (ge2A & ~ge2B) | (all3A & ~all3B)
```

`sw` is 1 exactly when operand A has more zero groups than operand B in that
slice. In that case using A as the Booth-encoded operand makes more rows zero.
`sw[0]` is called SW_LL (bits 7..0) and `sw[1]` SW_HH (bits 15..8).

`drd_unit` interchanges the **whole** operands when SW_LL or SW_HH is 1.
Interchanging only one byte of each operand would change the product, so the
swap always covers both halves. Example: for `a = -1` (`0xFFFF`) and
`b = 3`, every group of `a` is a zero group, while the low byte of `b`
(`00000011`) has only two. So SW_LL = 1, SW_HH = 0, and `-1` becomes the
Booth-encoded operand. All eight Booth digits of `-1` are zero except the
lowest (−1), so the generator emits a single non-zero row, −3.

The detector also outputs range flags: `a_r71`/`b_r71` (bits 7..1 of a slice
all equal) and `a_r73`/`b_r73` (bits 7..3 all equal). They show where an
operand is only sign extension. The multiplier does not use them.

A heuristic that looks at 6 of the 8 Booth triplets cannot always pick the
better operand. The detector only promises a cheap estimate, and the product
is correct either way.

## Partial products

`booth_encoder` maps a triplet to a digit in {−2, −1, 0, +1, +2}, given as
`one`, `two` and `neg` signals. `booth_pp_gen` computes `mp = X` and
`negmp = −X` once, N+1 bits wide, so that −(−2¹⁵) is exact. Each row then
selects 0, ±X or ±2X, sign extends it to 32 bits and shifts it left by 2i.
The result is exactly N/2 = 8 full-width rows whose sum modulo 2³² is the
product. This design uses no correction bits and no sign-encoding tricks;
sign extension is paid for in width.

## Compressors and accumulation

The accumulation never propagates a carry along a row. Its cells are:

- **3:2** (`full_adder`): three bits of rank j → sum (j) + carry (j+1).
- **4:2** (`compressor_4_2`): two 3:2 cells in series. It takes four bits
  plus `cin` from column j−1 and gives `sum`, `cout1`, and `cout2` (to column
  j+1). `cout2` does not depend on `cin`, so a row of these cells has no
  ripple.
- **5:2** (`compressor_5_2`): three 3:2 cells in series. `cout1` and
  `cout2` go sideways into the next column's `cin1`/`cin2`. `sum` and `cout3`
  are the column's two output bits.
- **7:2** (`compressor_7_2`): five 3:2 cells. Two cells add six inputs, a
  third adds their sums and the seventh input, and a fourth adds that sum and
  the two carry-ins, giving `sum` and `cout1`. A fifth cell adds the three
  rank-1 carries, giving `cout2` (rank j+1), which goes to column j+1, and
  `cout3` (rank j+2), which goes to column j+2. Only the carry-ins depend on
  neighbouring columns, and the lateral carries depend on local inputs only.

`compressor_row` places one cell per column across a group of ORDER rows.
`pp_accumulator` splits its rows, in order, into groups of ORDER. Each group
becomes a sum row and a carry row. A leftover group of three or more rows is
padded with zero rows, and one of one or two rows passes through. This
repeats until two rows remain. For the 16-bit multiplier (8 rows) that takes:

| ORDER | stages |
|---|---|
| 3 (3:2) | 4 (8 → 6 → 4 → 3 → 2) |
| 4 (4:2) | 2 (8 → 4 → 2) |
| 5 (5:2) | 2 (8 → 4 → 2) |
| 7 (7:2) | 2 (8 → 3 → 2) |

The default is 7:2, the highest order, which needs the fewest stages.
`ripple_carry_adder` then adds the two 32-bit rows.

## Wallace and Dadda trees

`tree_multiplier` takes unsigned operands. An N × N array of AND gates forms
the partial product bits, and full and half adders reduce the array to two
rows:

- **Wallace** (`TREE = WALLACE`) works row-wise. Rows are taken in groups
  of three. Within a group, a column with three bits gets a full adder, one
  with two bits a half adder, and a lone bit passes. One or two leftover rows
  pass unchanged. For 8 × 8 this places 38 full adders and 15 half adders in
  four stages of 6, 4, 3 and 2 rows.
- **Dadda** (`TREE = DADDA`) works column-wise. The target heights are
  d₁ = 2 and dⱼ₊₁ = ⌊1.5·dⱼ⌋, used from the top down (6, 4, 3, 2 for 8 × 8).
  Each column gets only as many adders as it needs to stay at the target,
  counting the carries from the column to its right. For 8 × 8: 35 full
  adders and 7 half adders.

The functions in `mult_pkg` compute the adder placement while the design
elaborates: `wallace_mask` gives, per stage and row, the columns that can hold
a bit, and `dadda_plan` gives the column heights and adder counts. The
generate loops then place the cells. Both trees end in a ripple-carry adder
over the full 16-bit width.

## Files and parameters

| module | role | parameters (default) |
|---|---|---|
| `multiplier_top` | 16 × 16 DRD multiplier plus 8 × 8 Wallace and Dadda multipliers, side by side, each with its own ports | — |
| `drd_multiplier` | the DRD Booth multiplier | `N` (16), `ORDER` (7), `USE_DRD` (1) |
| `drd_unit`, `drd_detector` | detection and operand interchange | `N` (16, multiple of 8), `USE_DRD` |
| `booth_encoder`, `booth_pp_gen` | radix-4 recoding and rows | `N` |
| `pp_accumulator`, `compressor_row` | carry-save accumulation | `ROWS` (8), `W` (32), `ORDER` (3, 4, 5 or 7) |
| `full_adder`, `half_adder`, `compressor_4_2/5_2/7_2` | cells | — |
| `ripple_carry_adder` | final adder | `W` (32) |
| `tree_multiplier` | Wallace / Dadda multiplier | `N` (8), `TREE` (`DADDA`) |
| `mult_pkg` | `tree_e` type, planning functions | — |

Parameter settings give the other configurations: `N = 8` for the 8 × 8 DRD
multiplier, `USE_DRD = 0` for the same datapath without the detector, and
`N = 4` for the 4 × 4 trees.

## Simulating

Every module except the helper `compressor_row` (covered through
`pp_accumulator`) has a self-checking testbench, `tb/tb_<module>.sv`, that prints
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test at
default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
          tb/tb_multiplier_top.sv --top-module tb_multiplier_top
./obj_dir/Vtb_multiplier_top
```

The testbenches check:

- **Cells:** all input patterns. For the compressors this includes the
  independence of the lateral carries from the carry-ins.
- **`drd_detector`, `drd_unit`:** comparison with a reference count of zero
  groups, plus the −1 × 3 example.
- **`booth_pp_gen`:** every row against dᵢ·X·4ⁱ.
- **`pp_accumulator`:** all four orders, plus a 9-row case that needs
  padding.
- **`drd_multiplier`:** 16 × 16 with every order and without DRD, and 8 × 8
  with 3:2 and 4:2, including the extreme operands.
- **`tree_multiplier`:** exhaustive over 4 × 4 and 8 × 8, plus the adder
  counts above.
- **`tb_multiplier_top`:** all three multipliers at once. It counts operand
  interchanges, non-interchanges, zero Booth digits and negative products,
  and requires each to occur.

Each simulation finishes in well under a second once built.

## Where this RTL makes its own choices

- **Whole-operand swap.** SW_LL and SW_HH each name one byte. Here either
  one swaps both whole operands, because swapping a single byte would give a
  wrong product. Only these two same-byte comparisons are produced; no
  signal compares a byte of A with the other byte of B.
- **Partial product width.** Rows are N+1 bits before sign extension, and
  −X is kept N+1 bits wide, so the most negative operand is handled exactly.
- **Grouping of rows.** How rows are grouped into compressor stages, and the
  padding of leftover groups, is a choice of this RTL. So is the lateral
  wiring of the 5:2 and 7:2 cells, which is derived from the ranks of their
  outputs.
- **Final adders.** They add full-width rows rather than only the columns
  that still hold two bits. The ripple adder uses a full adder at bit 0 as
  well, with its carry-in tied to 0.
- **Not built:** truncation of the product, an 8/16-bit mode switch, radix-2
  and radix-8 Booth recoding, and carry-lookahead final adders. These are
  alternatives or extensions, not part of this design.
- **No timing, power or area figures are claimed.** The structure is meant to
  be faithful, but gate-level delay and power depend on the target
  technology.
