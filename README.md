# 32-bit square-root carry select adder with add-one circuits

A carry select adder cuts the operands into groups and adds every group
twice in parallel: once assuming the carry into the group is 0 and once
assuming it is 1. When the real carry arrives from the group below, a
multiplexer picks one result. The carry then crosses each group through a
single multiplexer instead of rippling through every bit. The price is a
second ripple-carry adder in every group.

This adder removes that second adder. The carry-in-1 result of a group is
its carry-in-0 result plus one, and adding one to a binary number only
inverts the bits from the least significant one up to and including the
first 0. So each group keeps one ripple-carry adder with carry in 0. A
*first-zero finder* marks which bits would flip, and the flip is applied only
when the incoming carry is 1. Logically the adder computes
`{cout, sum} = a + b + cin`. It is purely combinational, with no clock,
register or reset.

## Group layout

The groups widen towards the most significant end, as in any square-root
carry select adder. A higher group has more time to finish its own
addition while the carry is still on its way from below. At the default 32
bits there are seven groups:

| group | bits  | width | built as                     | carry in | carry out |
|-------|-------|-------|------------------------------|----------|-----------|
| 1     | 1:0   | 2     | ripple-carry adder (`rca`)   | `cin`    | C1        |
| 2     | 3:2   | 2     | carry select stage           | C1       | C3        |
| 3     | 6:4   | 3     | carry select stage           | C3       | C6        |
| 4     | 10:7  | 4     | carry select stage           | C6       | C10       |
| 5     | 16:11 | 6     | carry select stage           | C10      | C16       |
| 6     | 23:17 | 7     | carry select stage           | C16      | C23       |
| 7     | 31:24 | 8     | carry select stage           | C23      | `cout`    |

Group 1 needs no selection because its carry in is already known. It is a
plain ripple-carry adder that takes the adder's carry input.

## One carry select stage (`csla_stage`)

```
   a[W-1:0]  b[W-1:0]
        |      |
   +---------------+
   | rca, cin = 0  |---- c0
   +---------------+
        | s0[W-1:0]
   +---------------+
   | first zero    |---- node 1..W (active low)
   | finder        |
   +---------------+
        |
   +-----------------------------+
   | select_mux_block            |<--- cin (carry of the group below)
   |  W+1 x two_in_two_sel cells |
   +-----------------------------+
        |            |
     sum[W-1:0]     cout
```

### Add one by inversion

Say the carry-in-0 result of a group is `s0` with carry `c0`. The carry-in-1
result is `{c0, s0} + 1`. Bit *k* of that sum is `s0[k]` inverted exactly
when `s0[k-1:0]` is all ones. For example, 0111 + 1 = 1000 flips bits 0 to
3, and 0110 + 1 = 0111 flips only bit 0.

`first_zero_finder` computes this condition for every bit as a serial chain.
It uses active-low *nodes*:

- node 0 is always 0, because nothing lies below bit 0;
- node *k* = node *k-1* OR NOT `s0[k-1]`.

Node *k* is therefore 0 while no zero has been seen below bit *k*, and 1
from the first zero on. Only nodes 1..W are brought out. Node W covers the
whole group sum.

The carry works the same way. It is treated as bit W of `{c0, s0}`, so the
carry-in-1 carry is `c0` inverted when node W is 0. That is exact, because
`s0` can only be all ones when `c0` is 0: the largest sum of two W-bit
numbers is 2·(2^W − 1) = 2^(W+1) − 2.

### Two multiplexers folded into one (`two_in_two_sel`)

A straightforward version puts two multiplexers on each result bit. The
first sits in the add-one circuit and picks `s0[k]` or its inverse by the
node. The second picks the carry-in-0 or the carry-in-1 bit by the incoming
carry. Both choose between the same two values, `s0[k]` and `~s0[k]`, so one
multiplexer is enough. Its select is a NAND of the inverted node and the
carry in:

```
sel_a = NAND(~s1, s2)        s1 = node k (active low), s2 = group carry in
o     = sel_a ? a : b        a  = s0[k],               b  = ~s0[k]
```

The bit is inverted only when the carry in is 1 and every lower bit of `s0`
is 1. `select_mux_block` holds the inverters and W+1 of these cells. They
cover bits 0..W-1 and the carry. The cell for bit 0 has its node tied to 0,
so bit 0 is simply inverted whenever the carry in is 1. A dedicated add-one
multiplexer is never needed there.

### Timing

The incoming carry reaches the group's carry out through a single cell.
That is what makes the structure fast, as in any carry select adder. The
local path is longer than in a dual-adder stage: it runs through the
ripple-carry adder to the most significant sum bit, then through the
zero-finder chain. The group widths are meant to balance these two paths.
The RTL models only the logic, so none of these delays shows in
simulation.

## Parameters and other word sizes

`sqrt_csla_add_one` has three parameters. Their defaults give the 32-bit
adder:

| parameter | default             | meaning                            |
|-----------|---------------------|------------------------------------|
| `NGROUPS` | 7                   | number of groups                   |
| `GROUP_W` | '{2,2,3,4,6,7,8}    | group widths, least significant first |
| `N`       | 32                  | operand width; must equal the sum of `GROUP_W` (checked at elaboration) |

`csla_pkg` also holds two smaller splits:

- a 16-bit split of 2,2,3,4,5;
- an 8-bit split of 2,2,4.

`rca`, `first_zero_finder`, `select_mux_block` and `csla_stage` each take a
`WIDTH` parameter.

## Where this RTL departs from, or adds to, the published design

- **Cells are logic, not transistors.** The published adder uses mirror
  adders, which have no inverter on the carry path. It builds the
  first-zero finder from NMOS/PMOS chains. Here both are written as their
  logic functions.
- **Faster MSB sum.** The published design speeds up the most significant
  sum bit of each group by computing it with two XOR levels. The full-adder
  cell here already computes every sum bit as `(a ^ b) ^ cin`, so this
  change has no separate form in the RTL.
- **Multiplexer polarity.** The published description of the multiplexer
  says it picks the plain sum when its control is 0. That does not match
  its own node polarity: node 0 means no zero was found. This RTL follows
  the add-one arithmetic. A bit flips when its node is 0 and the carry in
  is 1.
- **Merged-multiplexer select polarity.** The NAND of `~S1` and `S2` is as published.
  The published figure does not say which multiplexer input the NAND
  selects. Here NAND = 0 selects the inverted bit, because the arithmetic
  requires it.
- **Group 6 (bits 23:17).** This group is not drawn in the published
  figure. It follows from the seven-group count and the carries C16 and
  C23.
- **Smaller word sizes.** The 16-bit split 2,2,3,4,5 is inferred from the
  published per-group gate counts. The 8-bit split 2,2,4 is this design's
  own choice. No 64-bit split is given.
- **Gate counts.** Published gate counts put two inverters in the 2-bit
  group. This design has W+1 inverters per stage, because the carry is
  inverted like a sum bit. No attempt is made to match the published
  per-group gate counts.
- **Not included.** The two adders that this design is compared against
  are not part of this RTL. One is the classic dual-RCA square-root carry
  select adder. The other replaces the second adder with a binary-to-excess-1
  converter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. Expected values come from
integer arithmetic in the testbench, not from the design.

| testbench              | what it does |
|------------------------|--------------|
| `tb_full_adder`        | all 8 input combinations |
| `tb_rca`               | exhaustive at widths 2, 5, 8 |
| `tb_first_zero_finder` | all 256 values at width 8, against a scan for the lowest zero |
| `tb_two_in_two_sel`    | all 16 combinations, against two cascaded multiplexers |
| `tb_select_mux_block`  | exhaustive at width 4: `{cout,sum}` = `{c0,s0}` + `cin` |
| `tb_csla_stage`        | exhaustive at widths 2, 3, 8 |
| `tb_sqrt_csla_add_one` | 32-bit adder at its defaults; details below |
| `tb_word_sizes`        | 8-bit adder exhaustive (2^17 cases); 16- and 32-bit adders with 100,000 random vectors each |

`tb_sqrt_csla_add_one` applies three kinds of vectors:

- corner cases;
- vectors aimed at each group;
- 200,000 random vectors.

For every carry select stage it counts four events:

- carry in 0;
- carry in 1;
- add-one rippling across the whole group, so that the group's carry out
  comes from the add-one path;
- a carry generated by the group's own adder.

It fails if any of these never happens. It also counts carries that ripple
through all seven groups.

All testbenches pass. Verilator's `-Wall` lint reports only unused
constants in `csla_pkg`: each user of the package needs only one of its
word-size splits.

## Simulating

Every testbench runs the same way; for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/csla_pkg.sv tb/tb_sqrt_csla_add_one.sv \
    --top-module tb_sqrt_csla_add_one -Mdir obj -o sim
./obj/sim
```

`-Irtl` lets Verilator find each module in the `rtl/<name>.sv` file of the
same name. Each run takes well under a second.

## Files

- `rtl/csla_pkg.sv`: group-width constants for 32, 16 and 8 bits
- `rtl/full_adder.sv`: one-bit full adder
- `rtl/rca.sv`: ripple-carry adder
- `rtl/first_zero_finder.sv`: active-low first-zero nodes
- `rtl/two_in_two_sel.sv`: one multiplexer plus NAND, replacing two multiplexers
- `rtl/select_mux_block.sv`: inverters plus W+1 select cells per group
- `rtl/csla_stage.sv`: one carry select stage
- `rtl/sqrt_csla_add_one.sv`: the top-level adder
- `tb/tb_*.sv`: the testbenches listed above
