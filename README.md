# 8x8 multiplier from 4:2 compressors

A multiplier spends most of its hardware adding up partial products. A 4:2
compressor takes four bits of one column plus a carry from the column below
and turns them into one bit of the same weight and two bits of double
weight:

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

Because `cout` depends only on `x1..x3`, a whole row of compressors can be
chained (`cout` of column *i* into `cin` of column *i+1*) without a carry
rippling through more than one cell. That makes the compressor the natural
cell for a partial-product reduction tree.

This RTL builds an 8x8 unsigned multiplier the recursive way: each operand
is cut into nibbles, four 4x4 multipliers form the nibble products, and a row
of 4:2 compressors plus one carry-propagate adder sums them. Every 4:2
compressor in it is the multiplexer-based structure described below.

The architecture is meant for *approximate* multiplication. Only the most
significant nibble product (`ah*bh`) needs an accurate 4x4 multiplier. The
three less significant ones may use approximate 4x4 multipliers built from
approximate 4:2 compressors, which cost less power, delay and area and give
slightly wrong results. **The approximate compressors and the approximate
4x4 multiplier are not specified in enough detail to build, so this RTL
uses the accurate 4x4 multiplier in all four positions and its product is
exact.** The three positions are kept separate (`u_hl`, `u_lh`, `u_ll` in
`mul88`), so an approximate 4x4 block with the same ports can be dropped in.

## The 4:2 compressor in two forms

### Two full adders in series (`compressor42_fa`)

This is the conventional form. The first full adder adds `x1, x2, x3`. Its
carry leaves as `cout`. Its sum goes to a second full adder together with
`x4` and `cin`, which gives `sum` and `carry`.

### XOR-XNOR cells steering multiplexers (`compressor42_xm`, the default)

Two XOR-XNOR cells, each giving a bit pair's XOR and XNOR at once, drive
four 2:1 multiplexers:

| signal  | multiplexer                     | why it is right                                   |
|---------|---------------------------------|---------------------------------------------------|
| `s12`   | XOR-XNOR of `x1, x2`            |                                                   |
| `s34`   | XOR-XNOR of `x3, x4`            |                                                   |
| `cout`  | `s12 ? x3 : x1`                 | majority of `x1, x2, x3`                          |
| `t`     | `s12 ? ~s34 : s34`              | `t = x1^x2^x3^x4`, chosen from the second cell's two outputs |
| `sum`   | `t ? ~cin : cin`                | `sum = t ^ cin`                                   |
| `carry` | `t ? cin : x4`                  | carry of `t`-parity bits plus `cin`               |

The reference structure gives the blocks and how they connect: two XOR-XNOR
cells, a multiplexer for `cout`, a middle multiplexer that feeds the `sum`
and `carry` multiplexers, and `x4` and `cin` reaching the `carry`
multiplexer. It does not say which signal selects each multiplexer. The
selects in the table are this design's reading, chosen so that the
compressor equation holds. The exhaustive testbench proves it does.

At transistor level this form saves devices. At the logic level modelled
here, both forms compute the same function. `mul_pkg::compressor_impl_e`
selects the form for the whole multiplier through the `IMPL` parameter
(`CMP_XOR_MUX`, the default, or `CMP_FA`). Results never change.

## The accurate 4x4 multiplier (`mul44_acc`)

The partial products `pp[i][j] = a[j] & b[i]` form columns 0..6 of heights
1, 2, 3, 4, 3, 2, 1. One reduction stage brings every column down to at most
two bits:

| column | cell          | inputs                                        |
|--------|---------------|-----------------------------------------------|
| 2      | full adder    | its three partial products                    |
| 3      | 4:2 compressor | its four partial products, `cin = 0`         |
| 4      | 4:2 compressor | three partial products and column 3's `carry`; `cin` = column 3's `cout` |
| 5      | 4:2 compressor | two partial products and column 4's `carry`, `x4 = 0`; `cin` = column 4's `cout` |
| 6      | full adder    | `a3&b3` and column 5's `carry` and `cout`     |

The two rows that remain are added with an 8-bit carry-propagate adder.
Since 15*15 = 225, the product always fits in 8 bits. The exact allocation
is this design's own choice. The only given is an accurate 4x4 multiplier
whose partial products are reduced with 4:2 compressors.

## Summing the nibble products (`mul88`)

With `a = {ah, al}` and `b = {bh, bl}`:

    a*b = (ah*bh << 8) + (ah*bl << 4) + (al*bh << 4) + al*bl

Bits 0..3 of the product are bits 0..3 of `al*bl`. Over columns 4..15 the
four shifted products are at most four bits deep. A row of twelve 4:2
compressors, with `cout` chained into the next column's `cin`, reduces them
to a sum row and a carry row. A 16-bit adder adds the two rows. The `carry`
and `cout` of column 15 would weigh 2^16. They are provably zero, because
a*b < 2^16, so they are dropped.

## Interface and timing

| module            | ports                                                   |
|-------------------|---------------------------------------------------------|
| `mul88` (top)     | `a[7:0]`, `b[7:0]` in; `p[15:0] = a*b` out              |
| `mul44_acc`       | `a[3:0]`, `b[3:0]` in; `p[7:0]` out                     |
| `compressor42_xm`, `compressor42_fa`, `compressor42` | `x1..x4`, `cin` in; `sum`, `carry`, `cout` out |
| `xor_xnor`        | `a`, `b` in; `x = a^b`, `xn = ~(a^b)` out               |
| `full_adder`      | `a`, `b`, `c` in; `s`, `co` out                         |
| `mux2`            | `d0`, `d1`, `sel` in; `y` out                           |

Operands are unsigned. Everything is combinational: there is no clock,
reset, register or handshake, so the product is valid one propagation delay
after the operands. Put registers around `mul88` if it sits in a clocked
pipeline.

Files: `rtl/mul_pkg.sv` holds the compressor-selection enum. Every other
file in `rtl/` holds one module, named after it. `compressor42` is a thin
wrapper that picks one of the two compressor forms.

## Departures and open points

- **No approximation.** The approximate 4:2 compressors (two variants),
  the approximate 4x4 multiplier and the two approximate 16-bit multipliers
  that this architecture is meant for are not specified beyond their names.
  None is built. Power, delay and error figures quoted for such designs do
  not apply to this RTL, which is exact.
- The two 8x8 variants that differ in how many approximate sub-products
  they use are not distinguished. There is one 8x8 multiplier.
- The multiplexer selects in `compressor42_xm`, the tree allocation in
  `mul44_acc`, the compressor row in `mul88`, unsigned operands and the
  purely combinational timing are all this design's own choices.
- Image-processing use is not modelled. It needs only a multiplier per
  pixel operation, which this block provides.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a time-out watchdog:

- `tb_full_adder`, `tb_xor_xnor`: all input combinations.
- `tb_compressor42_xm`, `tb_compressor42_fa`: all 32 inputs. Each checks
  the compressor equation and that `cout` is the majority of `x1..x3`,
  independent of `cin`.
- `tb_mul44_acc`: all 256 operand pairs, with both compressor forms.
- `tb_mul88`: all 65,536 operand pairs, with both compressor forms side by
  side. It also counts how often each of four things happened: `cout`
  chaining in the compressor row, a non-zero carry row, a nibble product of
  8 bits, and all four nibble products non-zero. It fails if any count is
  zero.
- `tb_mul88_full`: all 65,536 operand pairs, on `mul88` with its default
  parameters.

Each testbench was also run against a deliberately broken copy of its
module, and it reported failures every time.

To run one with Verilator (5.x), from the folder that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
        rtl/mul_pkg.sv tb/tb_mul88.sv --top-module tb_mul88 -Mdir obj
    ./obj/Vtb_mul88

Each run finishes in well under a second.
