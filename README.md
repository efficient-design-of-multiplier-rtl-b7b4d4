# Compressor-based Wallace tree multipliers (8x8 and 4x4)

A parallel multiplier spends most of its delay adding up partial products.
This design replaces the usual layers of half and full adders in that
reduction by *adder compressors*: blocks that take many bits of one column
of the partial-product matrix and return one bit of the same weight plus
several bits of the next weight.  Because their carry-outs do not depend on
their carry-ins, a row of compressors placed on neighbouring columns can be
chained without a ripple-carry path.

Three unsigned, purely combinational multipliers are provided:

| module              | operands | reduction                                          |
|---------------------|----------|----------------------------------------------------|
| `wallace_mult8_c82` | 8 x 8    | four chained 8-2 compressors + half/full-adder final sum (the main design) |
| `wallace_mult4_c42` | 4 x 4    | a stage with 4-2 compressors + half/full-adder final sum |
| `wallace_mult8_c42` | 8 x 8    | two-level tree of 4-2 compressor rows + ripple-carry adder |

`mult_top` places the three side by side, each with its own ports:
`a8, b8 -> p8` (8-2 design), `a4, b4 -> p4` (4x4) and `a8q, b8q -> p8q`
(4-2 tree).  Its parameters `METHOD8` and `METHOD4` are passed to the first
two.

## The compressors

Every compressor obeys one identity: the number of ones among its inputs
equals `sum + 2*(number of ones among its weight-2 outputs)`.

| module           | inputs (weight 1)      | outputs                         | built from |
|------------------|------------------------|---------------------------------|------------|
| `compressor_3_2` | a, b, c                | sum, carry                      | 2 XOR + 1 MUX |
| `compressor_4_2` | x[3:0], cin            | sum, carry, cout                | 3 XOR levels + 2 MUX |
| `compressor_5_2` | x[4:0], cin[1:0]       | sum, carry, cout[1:0]           | three 3-2 in series (6 XOR deep) |
| `compressor_7_2` | x[6:0]                 | sum, carry, cout[1:0]           | three 3-2 (two levels) |
| `compressor_8_2` | x[7:0], cin[4:0]       | sum, carry, cout[4:0]           | one of four mixes, see below |

`compressor_3_2` doubles as the mux-based full adder: `sum = (a^b)^c`,
`carry = (a^b) ? c : a`.  The 4-2 compressor is the standard mux-based
one: `cout = (x0^x1) ? x2 : x0` depends only on x, and
`carry = (x0^x1^x2^x3) ? cin : x3`.

The 7-2 compressor here has no carry input: seven bits need exactly the
four outputs `sum, carry, cout[1:0]` (0..7), and its carry-outs are taken
up by the carry-ins of the 8-2 compressor of the next column.

### The 8-2 compressor and its four structures

Eight bits plus five carry-ins (13 units) map onto one sum and six weight-2
bits (five carry-outs and one carry).  The parameter `METHOD`
(`mult_pkg::c82_method_e`) picks how it is assembled:

| METHOD              | value | structure (s = internal sum) |
|---------------------|-------|------------------------------|
| `C82_ONLY_4_2`      | 1 | 4-2(x0..x3; cin0), 4-2(x4..x7; cin1), 4-2(sA, sB, cin2, cin3; cin4) |
| `C82_5_2_4_2_3_2`   | 2 | 5-2(x0..x4; cin0, cin1), 4-2(x5, x6, x7, s; cin2), 3-2(s, cin3, cin4) |
| `C82_4_2_3_2`       | 3 | 4-2(x0..x3; cin0), 4-2(x4..x7; cin1), 3-2(sA, sB, cin2), 3-2(s, cin3, cin4) |
| `C82_7_2_3_2`       | 4 | 7-2(x0..x6), 3-2(s, x7, cin0), 3-2(s, cin1, cin2), 3-2(s, cin3, cin4) |

The subtle part is the numbering of the carry-outs.  In a chain, `cin[k]`
of column i+1 is `cout[k]` of column i.  Each structure is wired so that
`cout[k]` never depends on `cin[k]` or any higher carry-in; `cout[0..1]`
(and in methods 2 to 4 also `cout[2]`) depend on x alone.  Following any
path through a chain, the carry index therefore strictly decreases from
one column to the previous one, so the path crosses at most five columns
whatever the chain length: no ripple, and no combinational loop.
`tb_compressor_8_2` checks this property exhaustively for all four
structures.  Method 4 is the default; the other three are kept because
they trade delay against area differently.

## The 8x8 multiplier

1. **Partial products.** `a[j] & b[i]` goes to column i+j.  Column heights
   are 1,2,...,8,...,2,1 over columns 0..14.
2. **Compressor stage.** One 8-2 compressor on each of the four central
   columns 6, 7, 8, 9 (heights 7, 8, 7, 6).  Column 6 gets zero carry-ins;
   the five carry-outs of column 9 join column 10.  Each compressor leaves
   `sum` in its own column and `carry` in the next.
3. **Final sum (`final_sum`).** What is left has heights
   1,2,3,4,5,6,1,2,2,2,11,4,3,2,1 over columns 0..14.  It is reduced to two
   rows by Wallace rounds of full adders and half adders, and those two
   rows are added by a ripple-carry adder.

The placement of the compressors and the final-sum circuit are choices of
this implementation: the outer columns (0..5 and 10..14) are left to the
half/full-adder stage, and column 10, which collects the chain's
carry-outs, is its tallest column.

## The 4x4 multiplier

Columns 0..6 have heights 1,2,3,4,3,2,1.  The parameter `METHOD` selects
one of two reduction arrangements:

* `METHOD = 3` (default), only 4-2 compressors in the first stage.  A 4-2
  compressor sits on each of columns 2..5 (unused inputs tied to 0).  They
  are chained cout to cin from column 2 (cin = 0) to column 5, whose cout
  goes to column 6.  Left for the final sum: heights 1,2,1,2,2,2,3.
* `METHOD = 1`, half/full adders mixed with a 4-2 compressor.  Full adders
  (`compressor_3_2`) sit on the three-bit columns 2 and 4, and a 4-2
  compressor with cin = 0 on the four-bit column 3.  Left: heights
  1,2,1,2,3,3,1.

In both cases the remainder, at most three bits per column, goes to
`final_sum`.

## The 8x8 tree of 4-2 compressors

`wallace_mult8_c42` is the simpler way to use 4-2 compressors in an 8x8
multiplier.  Each partial-product row, `(a & {8{b[i]}}) << i`, is a
16-bit operand.  A `csa_row_4_2` is sixteen 4-2 compressors side by side,
with cout of bit i feeding cin of bit i+1.  It turns four operands into two
(`sum`, `carry`) with the same total modulo 2^16, and its carries never
ripple.  Rows 0-3 and rows 4-7 each pass through one such row.  A third
row combines the four results, and `final_sum` adds the last two operands.
Carries pushed past bit 15 are dropped; they are zero because the product
is below 2^16.

## `final_sum`

A generic adder of a bit matrix whose column heights are parameters
(`W` columns, `MAXH` rows, `HEIGHTS[c]` valid bits in column c; the bits
above a column's height are ignored).  It is written as a loop in one
`always_comb` block.  The heights are constants, so the loop elaborates to
a fixed network of full adders (`^` and majority) and half adders.  Each
round handles every column taller than two bits.  Groups of three go to a
full adder, a left-over pair to a half adder, and a single left-over bit
passes through.  `ROUNDS` (default 10) bounds the number of rounds; rounds
after the matrix is down to two rows are plain wires.  The final
ripple-carry adder is made of `half_adder` and `full_adder` instances.
The result is the sum modulo 2^W.

## Timing, interface conventions

* Everything is combinational.  There is no clock, reset, register or
  handshake; a product is valid one propagation delay after its operands.
* Operands and products are unsigned.
* `mult_pkg` holds the `c82_method_e` enum and `C82_NCARRY = 5`.

## How far it can be trusted

* Every block has a self-checking testbench in `tb/`.  The compressors are
  checked exhaustively: all input patterns, plus the independence of the
  carry-outs from the carry-ins.  Both multipliers are checked exhaustively
  against `a*b`: the 8-2 design with all four `METHOD` values, the 4x4
  one with both arrangements, and the 4-2 tree.  `final_sum`
  is checked with 20,000 random matrices in two shapes.
* `tb_mult_top` runs the top at its default parameters over all 65,536
  operand pairs on both 8x8 multipliers (all 256 on the 4x4 one).  It also counts how often each mechanism fires, and fails
  if one never does: carries passing along the 8-2 chain, every possible
  carry-out bit, carry-outs spilling out of the last compressor of each
  chain, carries moving along the 4-2 rows of the tree, and the top
  product bit.
* Not modelled: any gate-level or transistor-level delay.  The XOR depths
  quoted above describe the logic structure; no timing figure from an
  FPGA or a cell library is reproduced or guaranteed.

## Departures and open points

* The internal gate arrangement of the 7-2 compressor is not the
  ten-XOR-deep structure that the original 7-2 design is reported to have.
  Here it is the shallowest structure built from 3-2 compressors.
* In the source, the 8-bit results come with 64 flip-flops for every
  variant.  No register stage is described, so none is built; the
  multipliers are purely combinational.
* In the original design the placement of every compressor and adder is
  given by dot diagrams.  Here the placements are this implementation's
  own: which columns get the 8-2 and 4-2 compressors, the FA/4-2 mix of the
  4x4 `METHOD = 1`, and the row-wise organisation of the 4-2 tree (rather
  than a column-by-column Dadda placement).  All of them are exact
  multipliers.  Their area and delay will differ from those of the
  original layouts.
* The conventional half/full-adder Wallace multipliers (4x4 and 8x8) are
  only baselines for comparison and are not built.

## Simulating

Each testbench is a top-level module in `tb/` that prints one line
`TB_RESULT checks=N failures=M` and calls `$finish`.  For example:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/tb_mult_top.sv \
          --top-module tb_mult_top -Mdir obj_top
./obj_top/Vtb_mult_top
```

Replace `tb_mult_top` by any other `tb_*` name.  The package
`rtl/mult_pkg.sv` must come first; the other modules are found through
`-Irtl`.  To change the 8-2 structure of the top, override
`mult_top #(.METHOD8(...), .METHOD4(...))`.  The testbenches run in well under a second.
