# Shared-segmentation vector multiply-accumulator (64-bit)

A processor that wants SIMD multiply-accumulate usually either builds one
multiplier per element size and muxes the results, or builds wide multipliers
out of narrow ones over several passes. This design does neither. It takes a
single scalar 64x64-bit multiply-accumulator (MAC) and cuts its datapath into
segments with a few mode-dependent gates, so that the same hardware computes

| `mode` | operation                       | element width `w` |
|--------|---------------------------------|-------------------|
| `1000` | one 64x64 -> 128 MAC            | 64                |
| `0100` | two 32x32 -> 64 MACs            | 32                |
| `0010` | four 16x16 -> 32 MACs           | 16                |
| `0001` | eight 8x8 -> 16 MACs            | 8                 |

signed or unsigned (`uns`), all as `R = C + A * B` per element. The scalar
structure is standard: a radix-4 Booth partial product generator, a Wallace
carry-save tree with the accumulator fed in as one more row, and a
carry-lookahead final adder. "Vectorizing" it takes only three things:

1. masking in the partial product generator, so that each element's partial
   products carry only that element's operand bits, signs and two's-complement
   corrections;
2. carry kills at element boundaries in every level of the Wallace tree;
3. carry kills at element boundaries in the final adder.

The idea is published as *shared segmentation* (Tan, Danysh, Liebelt, ARITH-16,
2003). This RTL rebuilds that architecture from the published description. Where
the description stops short, the choices made here are listed under
"Departures and choices" below.

## Interface and timing

`rtl/vmac.sv` is the top. It is purely combinational, with no registers and no
clock. The reference timing was also given for an unpipelined unit. The
architecture can be pipelined, but no stage boundaries are given, so none are
drawn here.

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `a`    | in  | 64    | multiplicand A |
| `b`    | in  | 64    | multiplier B |
| `c`    | in  | 128   | accumulator C |
| `mode` | in  | 4     | one-hot mode, see table above |
| `uns`  | in  | 1     | 1: both operands unsigned, 0: both two's complement |
| `r`    | out | 128   | result R |

Element `i` of width `w` reads `A[w*i +: w]`, `B[w*i +: w]` and
`C[2w*i +: 2w]`, and writes `R[2w*i +: 2w] = (C_i + A_i*B_i) mod 2^(2w)`. There is
no saturation: a carry out of an element is dropped, because the carry into
the next element is killed. A `mode` word that is not one-hot is decoded by
its lowest set bit, and `0000` acts as 64-bit mode.

## How the partial products are built

This is the hard part of the design. All of it lives in `vmac_booth_mask`,
`vmac_booth_recoder`, `vmac_booth_mux` and `vmac_vppg`.

**Booth digits.** With radix-4 Booth recoding, digit `j` (0..31) reads the bit
triplet `{B[2j+1], B[2j], B[2j-1]}` and selects one of 0, +A, +2A, -A or -2A
(`selze, selp1, selp2, seln1, seln2`). In the vector modes the triplet of a
digit that starts an element (`2j` a multiple of `w`) gets a 0 in place of
`B[2j-1]`, which is the previous element's MSB. This "zero insertion" is an
AND mask on B that depends on the mode and the bit position. Each element also
gets its own extra digit `{s, s, msb}` with `s = msb & ~uns`. That is the
element's multiplier extended by two sign bits. The extra digit is +1 exactly
when the element is unsigned with its MSB set, and 0 otherwise.

**Rows stay in place.** Row `j` is the partial product of digit `j`, weighted
`2^(2j)`. It belongs to the element `e` that owns multiplier bit `2j`. The
multiplicand bits are not moved: row `j` keeps `A`'s bits of element `e` where
they are and clears all others. Their weight is then `2^(2j + w*e)`, which is
exactly inside element `e`'s result columns `[2we, 2we+2w)`. So every row of
every mode lies on the rows of the scalar multiplier. Only a few bit positions
per row need a choice between modes. In 8-bit mode the array looks like this
(columns 15..0 of element 0; `x` = data, `h` = hot one, `n` = row sign, `p` = ~n):

```
column   1111119876543210
         543210
row 0        pnnxxxxxxxxx    data 0..8, {p,n,n} at 9..11
row 1       1pxxxxxxxxxhh    data 2..10, {1,p} at 11..12, hot ones of row 0 at 0..1
row 2     1pxxxxxxxxxhh      data 4..12, {1,p} at 13..14, hot ones of row 1 at 2..3
row 3    pxxxxxxxxxhh        data 6..14, p at 15; its "1" would be column 16 and is dropped
row 32   xxxxxxxxhh          A_0 at 8..15 if unsigned with B msb set; hot ones of row 3 at 6..7
```

Rows 4..7 do the same for element 1 in columns 16..31, and so on.

**Sign extension and sign encoding.** The element's multiplicand is extended
by one bit: its MSB when signed, 0 when unsigned. After the Booth mux the row
holds `w+1` data bits and a sign `n`. A negatively weighted sign bit would need
sign extension up to bit 127. Instead it is replaced by constant-corrected bits
just above the data: `{p, n, n}` on the first row of an element and `{1, p}` on
the others, with `p = ~n`. Summed over an element's `w/2` rows, the constants
give `2^(2w+1)`, which is invisible modulo `2^(2w)`. That is why the top "1" of an
element's last row can simply be dropped.

**Two's complement by "hot ones".** -A and -2A are produced by inverting only
(`vmac_booth_mux`). -2A shifts the inverted A with a 0 coming in, so
`-2A = (~A << 1) + 2`. The missing +1 or +2 is placed as the bits
`{seln2, seln1}` of the row below, at the bottom of that row's data. They go
into the next row of the same element. For an element's last row they go into
row 32.

**The unsigned row.** Row 32 is shared by all elements. Per element it holds
the +1 x A of the extra digit, at columns `2we + w ..`, plus the last row's hot
ones. The extra digit is never negative, so this row needs neither sign
encoding nor a hot one of its own.

The published design realises the per-bit mode selection with 4:1, 3:1 and
2:1 muxes and AND gates at fixed bit positions. Here it is written as masks and
shifts that depend on `mode`, and synthesis reduces them to the same kind of
per-bit selection.

## Reduction tree with carry kills (`vmac_pprt`, `vmac_csa_row`, `vmac_fa_kill`)

The 33 partial products and `C` make 34 rows of 128 bits. A Wallace tree of
3:2 compressor rows reduces them to two rows in 8 levels
(34 -> 23 -> 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2). Sums stay in their column.
Carries move up one column, and those are the only signals that can cross an
element boundary. The tree therefore knows, at elaboration time, which rows are
carry rows. Where a carry row enters a compressor, bits in boundary columns
(`kmask`, set at every multiple of `2w` above 0) are removed:

- in the full adder's carry-in input, by `kill` in
  `sum = a^b^(cin&~kill)`, `cout = ab | (a|b)(cin&~kill)`, which puts no gate
  in the a/b path;
- by a 2-input AND when the carry row lands on the a or b input;
- at the tree output, if a carry row is one of the final two.

The alternative of building a separate tree per mode and muxing the results
was rejected in the original work as slower. It is not built here.

## Final adder (`vmac_cpa`, `vmac_cla4`)

The final adder is a 128-bit carry-lookahead adder built as a tree of 4-bit
lookahead blocks. There are four levels over 256 columns, and the top 128
columns are constant zero. Each block can kill the carry into any of its four
positions. At the bit level only the block carry-in is ever killed, because
boundaries fall on multiples of 8. That case is the published 4-bit block
equation with the `~kill` term on the carry-in. Higher blocks also kill at
inner positions, for example a boundary at column 8 inside a 16-column group.
There the block propagate and the generate terms from below a killed position
are cleared too. The carry out of column 127 is dropped.

## Files

| file | contents |
|------|----------|
| `rtl/vmac_pkg.sv` | sizes, `booth_sel_t`, mode constants, `elem_width()`, `result_kill()` |
| `rtl/vmac.sv` | top: wires the blocks below |
| `rtl/vmac_booth_mask.sv` | zero insertion and per-element sign digits of B |
| `rtl/vmac_booth_recoder.sv` | radix-4 Booth recoder |
| `rtl/vmac_booth_mux.sv` | 0 / ±A / ±2A selection of one row |
| `rtl/vmac_vppg.sv` | 33 partial products, result aligned |
| `rtl/vmac_fa_kill.sv` | full adder with carry-in kill |
| `rtl/vmac_csa_row.sv` | one row of 3:2 compressors with kill masks |
| `rtl/vmac_pprt.sv` | Wallace tree with carry kills |
| `rtl/vmac_cla4.sv` | 4-bit lookahead block with kills |
| `rtl/vmac_cpa.sv` | 128-bit lookahead adder with kills |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_vmac_edge_patterns.sv` | edge-bit pattern sweep of the whole unit |

## Verification

Every testbench checks its module against a reference that is written
differently from the RTL. Each prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog.

- `tb_vmac`: the whole unit at its default size, in every mode, signed and
  unsigned. Element 0 sweeps all combinations in which the two top and two
  bottom bits of A and B vary and the middle bits are all 0 or all 1 (32 x 32
  patterns); the other elements and C are random. It adds 1000 fully random
  operations per mode and sign, 16,192 checks in all. It also counts and
  requires boundary carries actually being killed, use of the unsigned row,
  and negative Booth digits.
- `tb_vmac_edge_patterns`: the same edge-bit patterns in every element at
  once, with C patterned the same way over 2w bits. It walks all 32 x 32 x 32
  A/B/C pattern triples for every mode and sign, 262,144 operations, in about
  7 seconds.
- `tb_vmac_vppg`: the rows of each element sum to that element's product, and
  no row leaves its element. The Booth selects come from an independent
  recoding in the testbench.
- `tb_vmac_pprt`, `tb_vmac_cpa`: segmented sums per element, for every mode.
- `tb_vmac_cla4`, `tb_vmac_fa_kill`, `tb_vmac_booth_recoder`: exhaustive.
- `tb_vmac_booth_mask`, `tb_vmac_booth_mux`, `tb_vmac_csa_row`: random against
  arithmetic references.

Run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary -Wno-fatal -Irtl -Itb rtl/vmac_pkg.sv tb/tb_vmac.sv --top-module tb_vmac -Mdir obj_tb_vmac
./obj_tb_vmac/Vtb_vmac
```

Swap in any other `tb_*` name. The full-size end-to-end test takes about one
second.

Not verified: timing, area and any gate-level equivalence with the published
circuits. The original reports a critical path of about 2.47 ns in a 0.13 um
process, 8 % slower and 2 % larger than the scalar MAC. Those figures come
from the original implementation and say nothing measured about this RTL.

## Departures and choices

- **Row width.** Partial products are handled as full 128-bit rows aligned to
  the result, not as the published 69-bit rows at per-row offsets. Constant
  columns are removed by synthesis. The arithmetic is the same.
- **Per-element extra digit.** The extra Booth digit is recoded per element, by
  a second 8-digit recoder. There is no single 33rd digit, because each element
  needs its own select.
- **Hot ones of an element's last row** go into the shared unsigned row 32.
  The first row of each element therefore carries no correction bits.
- **Tree depth.** The tree uses 8 levels. The usual `ceil(log N / log 1.5)`
  estimate gives 9 for 34 rows. The row grouping (sums, then carries, then
  pass-through, in threes) is this design's own. The cell count (32 rows of
  128 full adders before constant removal) is not tuned to the roughly 3,100
  adders of the original.
- **Lookahead tree.** The levels above the 4-bit blocks, and the kills inside
  higher blocks, are this design's own extension of the 4-bit block equation.
- **Operand and result registers, pipelining, saturation**: none.
- **Mode decoding.** Non-one-hot mode words are decoded by their lowest set
  bit.
- **Not built.** The alternatives the original compares against: a per-mode
  4:1 mux in front of every Booth mux, a per-mode reduction tree with a final
  4:1 mux, a 136-bit final adder with inserted kill bits, separate MACs per
  element size, and multi-pass schemes.
