# 8 x 8 Wallace multiplier on 4-2 compressors

A tree multiplier spends most of its delay and power squeezing the partial
products down to two rows. This design does the squeezing with 4-2
compressors instead of full and half adders. A 4-2 compressor takes four
bits of one column and reduces them to two. An 8-row partial-product array
therefore reaches two rows after two compressor levels (8 → 4 → 2). With
full and half adders alone it takes four levels (8 → 6 → 4 → 3 → 2). A
carry propagate adder then turns the last two rows into the product.

The compressor itself is built from two kinds of cell only: a dual-rail
XOR-XNOR gate and a transmission-gate 2:1 multiplexer. The full and half
adders in the tree use the same two cells.

The multiplier is unsigned and purely combinational: `p = a * b` for 8-bit
`a` and `b`, with no clock and no registers.

## The 4-2 compressor (`compressor_4_2`)

Five inputs of weight 1 (`x1..x4`, `cin`) and three outputs:

    x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)

`carry` and `cout` both have weight 2. The difference between them is what
makes the cell fast in a row. `cout` depends only on `x1..x4`, never on
`cin`. A compressor's `cout` feeds the `cin` of its neighbour one column up,
and that `cin` does not affect the neighbour's `cout`. So a row of chained
compressors settles after one cell delay, with no ripple.

Inside, the cell uses two XOR levels and three muxes:

| signal | built as | cell |
|---|---|---|
| `p12 = x1 ^ x2`, `p34 = x3 ^ x4` | both rails | `xor_xnor` |
| `t = p12 ^ p34`, both rails | mux selected by `p12`, choosing `p34` or `~p34` | two `tg_mux2` |
| `sum = t ^ cin` | | `xor_xnor` |
| `cout = p12 ? x3 : x1` | | `tg_mux2` |
| `carry = t ? cin : x4` | | `tg_mux2` |

The muxes need both a select and its complement, just as a real
transmission-gate mux does. The XOR-XNOR cell supplies both rails, so no
inverters are needed. `tg_mux2` models the two transmission gates directly:
`y = (s & d1) | (s_n & d0)`. It is only correct when `s_n == ~s`, and every
instance in the design is wired that way.

`full_adder` is `s = (a^b)^ci` with the carry `(a^b) ? ci : a`.
`half_adder` is `s = a^b` with the carry `(a^b) ? 0 : a`.

The XOR-XNOR cell this models is an 8-transistor circuit, and the mux is a
6-transistor circuit. RTL keeps their logic function and their dual-rail
wiring. Transistor sizing, drive strength, supply voltage and power are
outside what RTL can express.

## The reduction schedule

This is the part that needs the most care. `pp_gen` produces eight rows.
Row `j` is `a & {8{b[j]}}`, shifted to bits `j..j+7` of a 16-bit grid. The
column heights are 1, 2, …, 8, …, 2, 1.

### How a stage picks its cells

`reduction_stage` compresses four rows into a sum row and a carry row. Its
parameters `LO[k]`/`HI[k]` give the only bit range in which row `k` can be
nonzero. From them, constant functions pick one cell per column, walking
upward from column 0:

| bits in column | cin from the column below? | cell |
|---|---|---|
| 4 | either | 4-2 compressor (`cin` tied low if none) |
| 3 | yes | 4-2 compressor with one input tied low |
| 3 | no | full adder |
| 2 | yes | full adder (`cin` as third input) |
| 2 | no | half adder |
| 1 | yes | half adder |
| 1 | no | bypass to the next stage |
| 0 | yes | bypass the `cin` |
| 0 | no | constant 0 |

A column receives a `cin` exactly when the column below holds a compressor.
Each cell puts its sum at the column's own position and its carry one
position up. So every column emits at most one sum bit and one carry bit,
which keeps the output at two rows. A column with three bits plus a `cin`
(four bits in all) needs a compressor; a full adder there would leave a
third bit behind. At elaboration the stage checks that its top column
produces no carry, because that carry would fall off the grid.

### The stages of the 8 x 8 multiplier (`wallace42_mult`)

Stage 1 is two `reduction_stage` blocks working in parallel. One takes
partial-product rows 0–3 and the other rows 4–7. Heights per column, for
rows 0–3 (bits 0..10):

    column  0    1   2   3   4   5   6   7   8        9        10
    bits    1    2   3   4   4   4   4   4   3+cin    2+cin    1
    cell    pass HA  FA  C42 C42 C42 C42 C42 C42(0)   FA       pass

Rows 4–7 give the same pattern shifted up by four columns. The outputs are:

| row | live bits |
|---|---|
| sum, rows 0–3 | 0..10 |
| carry, rows 0–3 | 2..10 |
| sum, rows 4–7 | 4..14 |
| carry, rows 4–7 | 6..14 |

Stage 2 is one `reduction_stage` on those four rows:

    column  0    1    2   3   4   5   6..10  11      12  13  14  15
    bits    1    1    2   2   3   3   4      2+cin   2   2   2   0
    cell    pass pass HA  HA  FA  FA  C42    FA      HA  HA  HA  -

Its sum row is live in bits 0..14 and its carry row in bits 3..15. Product
bits 0..2 are final at this point.

Stage 3 is `cpa`, a 13-bit ripple-carry adder over bits 3..15. It has a half
adder at the bottom and full adders above. Its carry out is always 0,
because 255 × 255 < 2^16.

Cell totals:

| part | 4-2 compressors | full adders | half adders |
|---|---|---|---|
| reduction tree | 17 | 7 | 7 |
| final adder | – | 12 | 1 |

The live ranges handed from stage to stage are written out in
`wallace42_mult`. They follow from the cell rules above. The end-to-end
testbench checks, for every input, that no stage output has a 1 outside its
stated range. If you change the grouping or the operand width, you must
recompute these ranges. A wrong range makes a stage ignore live bits.

## Where this RTL departs from, or adds to, the design it implements

- **Stage count.** The design is described as having three stages, against
  five for a Wallace tree of full and half adders, where the fifth of those
  five is the final adder. Read the same way, the three stages here are two
  compressor levels and the final adder. Two compressor levels are the
  minimum for eight rows.
- **Cell counts differ.** The figures quoted for the original design were
  31 compressors, 24 full adders and 20 half adders. These cannot all fit
  in an 8 × 8 array. A chained compressor removes two bits and a full adder
  one, so that many cells would remove more bits than the 64 partial-product
  bits allow. The schedule here is this design's own (table above).
- **Row grouping and cell choice** (rows 0–3 / 4–7 in stage 1, the column
  rules) are this design's own choices.
- **Compressor wiring.** The make-up of the compressor (XOR-XNOR cells plus
  transmission-gate muxes, with a modified mux for the second XOR level)
  follows the design. The exact wiring is the standard XOR/MUX 4-2
  decomposition shown above.
- **Final adder** is a plain ripple-carry adder. The design asks only for a
  carry propagate adder.
- **Unsigned only**, because the partial products come from a plain AND
  array. No signed or Booth mode.
- **Not built:** the conventional compressor made of two full adders, and
  the Wallace and Dadda multipliers without compressors. These are reference
  designs, not part of this one. Delay and power figures are transistor-level
  results that cannot be reproduced in RTL.

## Files

| file | contents |
|---|---|
| `rtl/mult42_pkg.sv` | operand width `N = 8`, product width, `cell_e` enum |
| `rtl/xor_xnor.sv` | dual-rail XOR/XNOR cell |
| `rtl/tg_mux2.sv` | transmission-gate style 2:1 mux with complementary selects |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | adders built from the two cells |
| `rtl/compressor_4_2.sv` | the 4-2 compressor |
| `rtl/pp_gen.sv` | AND-array partial products, parameter `N` |
| `rtl/reduction_stage.sv` | 4-row → 2-row stage, parameters `W`, `LO[4]`, `HI[4]` |
| `rtl/cpa.sv` | ripple-carry adder, parameter `W` |
| `rtl/wallace42_mult.sv` | top: `a[7:0]`, `b[7:0]` → `p[15:0]` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the block against arithmetic it computes itself.
Each prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

- The cells (`xor_xnor`, `tg_mux2`, `full_adder`, `half_adder`,
  `compressor_4_2`) are tested exhaustively. For the compressor, the test
  also checks that `cout` never depends on `cin`.
- `pp_gen` and `cpa` are tested with random and corner operands. The `cpa`
  test includes carries that run the full length of the chain.
- `reduction_stage` is tested in two configurations: the stage-1 defaults
  and the stage-2 ranges. Each gets 5000 random row sets and must preserve
  the sum and keep its outputs inside their stated ranges.
- `tb_wallace42_mult` applies all 65536 operand pairs and checks every
  product. It also counts how often these happen, and fails if any never
  does:
  - a compressor `cout` chain carries a 1 (stage 1 and stage 2);
  - the carry row entering the final adder is nonzero;
  - a carry runs through at least 8 bits of the final adder;
  - the all-ones operands are applied.

  It runs at the design's only size, 8 × 8, in well under a second.

Simulate a testbench with Verilator, for example:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/mult42_pkg.sv rtl/*.sv tb/tb_wallace42_mult.sv \
        --top-module tb_wallace42_mult
    ./obj_dir/Vtb_wallace42_mult

Verilator's lint reports some unused signals. These are the spare rail of
an XOR-XNOR cell where only one output is used, partial-product bits
outside a stage's live range, and the final adder's always-zero carry out.
They are deliberate.
