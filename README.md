# GD multiplier: an 8×8 unsigned multiplier built by grouping and decomposition

A Grouping and Decomposition (GD) multiplier does not reduce all 64 partial
products of an 8×8 multiplication in one tree. It splits each operand into two
4‑bit halves, which divides the partial products into four equal 4×4 groups.
Each group is reduced on its own, in parallel with the others, by a small
4×4 multiplier: two Dadda and two Wallace trees. The four 8‑bit
sub‑products are then added column by column in one row of single‑column
cells. The main cell in that row is a 5:2 adder (the "5LA", five‑input logic
adder) that takes three product bits and two carries in and sends out a sum and two
carries.

This repository holds synthesizable SystemVerilog for the whole 8×8 design,
down to the full and half adder cells. It is purely combinational: there is
no clock, no register and no reset.

```
        a[3:0] b[3:0]   a[3:0] b[7:4]   a[7:4] b[3:0]   a[7:4] b[7:4]
              |               |               |               |
        +-----------+   +-----------+   +-----------+   +-----------+
        | Dadda 4x4 |   |Wallace 4x4|   |Wallace 4x4|   | Dadda 4x4 |
        |  group 1  |   |  group 2  |   |  group 3  |   |  group 4  |
        +-----------+   +-----------+   +-----------+   +-----------+
          q1 (x2^0)       q2 (x2^4)       q3 (x2^4)       q4 (x2^8)
              \_______________|_______________|_______________/
                                      |
              column adders, carries ripple from column 4 to 15
                                      |
                                  p[15:0]
```

## Files

| file | module | what it is |
|---|---|---|
| `rtl/gd_mult8x8.sv` | `gd_mult8x8` | top: the four groups and the column adder row |
| `rtl/wallace4x4.sv` | `wallace4x4` | 4×4 Wallace‑tree multiplier (groups 2 and 3) |
| `rtl/dadda4x4.sv` | `dadda4x4` | 4×4 Dadda multiplier (groups 1 and 4) |
| `rtl/five_la.sv` | `five_la` | 5:2 logic adder, two chained full adders |
| `rtl/pp_gen4.sv` | `pp_gen4` | 4×4 AND array of partial products |
| `rtl/full_adder.sv` | `full_adder` | single‑bit full adder (mirror‑adder equations) |
| `rtl/half_adder.sv` | `half_adder` | single‑bit half adder |

Each module has a testbench `tb/tb_<module>.sv`.

## How the sub-products are added

The four sub-products overlap like this (`1` means a bit of q1, and so on):

```
column   15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
q1                               1  1  1  1  1  1  1  1
q2                   2  2  2  2  2  2  2  2
q3                   3  3  3  3  3  3  3  3
q4        4  4  4  4  4  4  4  4
```

Columns 0–3 hold only q1, so `p[3:0] = q1[3:0]` with no logic. From column 4
upwards each column gets one cell:

| column | cell | inputs |
|---|---|---|
| 4 | full adder | q1[4], q3[0], q2[0] |
| 5 | 5LA | q1[5], q3[1], q2[1], carry of column 4, constant 0 |
| 6, 7 | 5LA | q1[k], q2/q3[k‑4], C1 and C2 of the column below |
| 8 – 11 | 5LA | q4[k‑8], q3[k‑4], q2[k‑4], C1 and C2 of the column below |
| 12 | full adder | q4[4], C1 and C2 of column 11 |
| 13, 14 | half adder | q4[k‑8], carry of the column below |
| 15 | half adder | q4[7], carry of column 14 |

Columns 5 to 11 hold at most three product bits plus two carries. That is
five bits, so their sum fits in one sum bit and two carries:
`a+b+c+d+e = s + 2·(c1+c2)`. This is why the 5LA's two carry outputs are
enough. The carry out of the column-15 half adder is always 0, because an
8×8 product fits in 16 bits. The testbench checks this for every operand pair.

### The 5:2 logic adder and carry propagation

`five_la` is two full adders in series. The first adds the three product bits
of the column (a, b, c). Its carry leaves as C1, and its sum goes to the
second full adder together with the two carries from the column below (d, e).
The second adder gives the column's result bit S and its second carry C2.

C1 depends only on the product bits of its own column. The carries coming
from below enter only the second full adder. So once the four 4×4 products
are ready, the carry chain from column 5 to column 11 passes through one full
adder per column, not two. The first adders of all the 5LAs work in
parallel. The longest path through the design is one 4×4 multiplier, then
the column-4 full adder, then the second full adder of each 5LA, then the
full adder and half adders of columns 12–15.

## The 4×4 multipliers

**Wallace (`wallace4x4`).** This follows the published cell-level schematic. There
are two reduction layers and a terminal ripple layer. It uses 4 half adders
and 8 full adders. The header of the file lists the exact netlist.
Wallace reduces every column as far as it can in each layer.

**Dadda (`dadda4x4`).** The design calls for a 4×4 Dadda multiplier but no
netlist for it was published. This one is the textbook Dadda reduction. It
brings the columns down to 3 rows, then to 2, and reduces only as much as
each target height needs. A ripple-carry adder then adds the last two rows.
It also uses 4 half adders and 8 full adders. Any correct 4×4 unsigned
multiplier can take its place without changing the rest of the design.

Both use `pp_gen4`, sixteen AND gates with `pp[j][i] = a[i] & b[j]`.

## Cells

`full_adder` is written at logic level from the static CMOS mirror adder.
It first forms an inverted-carry node `f = ~(ab + c(a+b))`, with
`cout = ~f`. It then forms the inverted-sum node
`~(f(a+b+c) + abc)`, and an output inverter turns that into the sum.
`half_adder` is `carry = ab` and `sum = a'b + ab'`. No transistor sizes or
layout are modelled.

## Where this RTL departs from the published design

- **Bit 15.** The published schematic takes P15 from the carry of the
  column-14 half adder and never uses q4[7], the top bit of group 4. That
  gives wrong products whenever q4[7] is 1, for example 255 × 255. Here an
  extra half adder adds q4[7] to the column-14 carry, and its sum is P15.
  A copy of the published wiring fails 8192 of the 65536 operand pairs.
- **5LA of column 5.** It has only four inputs to add. Its fifth input is
  tied to 0.
- **Dadda netlist.** This design's own, as described above.
- **Group numbering.** Groups 2 and 3 are numbered as on the published
  block schematic: group 2 is a[3:0] × b[7:4]. Both have weight 2⁴, so
  swapping them changes nothing.
- **Signedness.** The design is an unsigned multiplier. Nothing in it
  handles two's complement.
- **What is not modelled.** The speed and power results for the 180 nm
  CMOS implementation are not reproduced: that is about 56 % less
  computation time and 53 % lower power-delay product than parallel
  multipliers. Neither is the layout. These depend on transistors and
  routing, and RTL simulation cannot measure them.

## Verification

Every testbench checks its module against values it computes itself with
integer arithmetic. Each prints `TB_RESULT checks=<n> failures=<n>` at the
end and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_gd_mult8x8` | all 65 536 operand pairs against `a*b`. Also checks 168 × 169 = 0x6EE8 and 60 × 60 = 0x0E10 directly; these are the two products on the published simulation waveform. |
| `tb_wallace4x4`, `tb_dadda4x4` | all 256 operand pairs |
| `tb_five_la` | all 32 inputs: the column identity, and that C1 is the carry of a, b, c alone |
| `tb_pp_gen4` | every AND output for all 256 operand pairs, and the weighted sum |
| `tb_full_adder`, `tb_half_adder` | exhaustive |

`tb_gd_mult8x8` also counts how often each part of the column adder row is
used. A part that is never used counts as a failure. It covers:

- both carries of each 5LA in columns 6–11 set at once;
- the carry of the column-4 full adder;
- the carries into columns 13, 14 and 15;
- q4[7] reaching P15.

The testbenches reach the design's internal signals by hierarchical name
(`dut.c1[k]`, `dut.q4`, …). If you rename those signals, update the
testbench too.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl tb/tb_gd_mult8x8.sv --top-module tb_gd_mult8x8
./obj_dir/Vtb_gd_mult8x8
```

Replace the module name to run any other testbench. Each one finishes in well
under a second.
