# 4-bit reversible ALU built from TSG gates

A reversible gate maps each input pattern to exactly one output pattern,
so no information is erased. In principle such a gate can work without the
kT·ln2 energy loss per erased bit. This ALU is built only from such gates.
Its workhorse is the 4×4 Thapliyal–Srinivas gate (TSG): with one input tied
to 0, a single TSG is a complete full adder. The design uses:

- TSG gates for every adder, and for the XOR that turns the adder into a subtractor;
- Fredkin (controlled-swap) gates for the multiplier's partial products and for selection;
- Feynman, R and BJN gates for the comparator cell.

The RTL describes each gate by its Boolean equations and wires the gates
together structurally, so the netlist keeps the reversible structure: the
gate count, constant inputs and garbage outputs. It is ordinary synthesizable
logic. Nothing here is physically reversible once it is mapped to CMOS or an
FPGA.

Everything is combinational. There is no clock, no reset and no state.

## Top level: `ralu4`

```
            +-----------+   sum, cout1
 q1[3:0] -->| addsub4   |----------------+
 q2[3:0] -->| (a1,cin1) |                |      per bit i:
            +-----------+                |      +---------+
            | mux2_word |  q1 / q2 (a1)  +----->| mux4to1 |--> q3[i]
            +-----------+                +----->|  s1=S0  |
            |comparator4|  min(q1,q2)    +----->|  s2=S1  |
            +-----------+  cmp_eq/gt/lt  +----->|         |
            | mult4x4   |  product[7:0]         +---------+
            +-----------+  product[7:4] --> q3_hi
```

| `{s2,s1}` | `q3` | notes |
|---|---|---|
| 00 | `q1 + q2 + cin1` (a1=0), `q1 - q2 - cin1` (a1=1), mod 16 | `cout1` is the carry out; when subtracting it is 1 if there was no borrow |
| 01 | `q1` (a1=0) or `q2` (a1=1) | the same `a1` line drives the multiplexer and the add/subtract mode |
| 10 | the smaller of `q1`, `q2` | `cmp_eq`, `cmp_gt`, `cmp_lt` are always valid |
| 11 | product bits 3..0 | `q3_hi` always carries product bits 7..4 |

All four units compute all the time. The result bus is four 1-bit 4:1
multiplexers, one per bit. The select order in the table is this design's
own choice: the original work selects with two lines but does not publish its
code table. The names and order are in `ralu_pkg::alu_op_e`. `cout1` and the
comparator flags do not depend on `s1`/`s2`.

Beside the ALU, the top also holds the 5×5 signed multiplier `bw_mult5`
(ports `sx`, `sy`, `sz`). It is not connected to the ALU.

## The gates

| gate | inputs → outputs | used as |
|---|---|---|
| `tsg_gate` | P=A, Q=A'C'⊕B', R=Q⊕D, S=(Q·D)⊕(AB⊕C) | full adder with C=0: Q=A⊕B, R=sum, S=carry (D = carry in); XOR with C=D=0 (output Q) |
| `fredkin_gate` | P=A, Q=A?C:B, R=A?B:C | AND with C=0 (output R); 2:1 select (output Q), with the select passed on through P |
| `feynman_gate` | P=A, Q=A⊕B | inverter with A=1 |
| `r_gate` | P=A⊕B, Q=A, R=AB⊕C' | XNOR and AND-with-inverted-input in the comparator cell |
| `bjn_gate` | P=A, Q=B, R=(A+B)⊕C | NOR with C=1 |

The TSG equations agree with the gate's published 16-row truth table, and
`tb_tsg_gate` checks that table row by row. The Fredkin, Feynman and R gates
are used by name in the original work. Their equations here are the usual
definitions.

## Arithmetic units

**`tsg_rca`**: a ripple-carry adder with one TSG per bit. Each gate also
leaves two garbage lines (P = x, Q = x⊕y), which are brought out as
`g_p`/`g_q`. WIDTH defaults to 4.

**`tsg_csa`**: the same chain with a carry-skip path. If every bit
propagates (all TSG Q outputs are 1), the block's carry out is its carry in:
`cout = c4 | (&p & cin)`. This is available in `addsub4` through
`USE_CARRY_SKIP = 1`. The default is the plain ripple chain.

**`addsub4`**: TSGs used as XOR gates invert `y` and `cin` when `a = 1`,
so subtraction is `x + ~y + ~cin`. `cin` therefore acts as a borrow in when
subtracting, and `cout` as "no borrow". That convention is this design's
choice.

**`mult4x4`** (8-bit unsigned product) is the part that takes most study.
Sixteen Fredkin gates with C=0 form the partial products `x1[i]·x2[j]`
(written xiyj below). Three 4-bit TSG ripple adders and one extra TSG then
sum the columns:

```
right  adder (columns 1-4): {x1y3, x0y3, x0y2, x0y1} + {0, x3y0, x2y0, x1y0}
left   adder (columns 2-5): {x2y3, x3y1, x1y2, x1y1} + {x3y2, x2y2, x2y1, 0}
bottom adder (columns 2-5): {right carry, right sum[3:1]} + left sum
last TSG     (column 6):    x3y3 + left carry + bottom carry -> y1[6], y1[7]
y1[0] = x0y0, y1[1] = right sum[0], y1[5:2] = bottom sum
```

This circuit has 34 constant inputs and 58 garbage outputs, the counts
reported for the original TSG/Fredkin multiplier. That agreement is the
reason the partial products come from Fredkin gates. The original
description is not consistent on this point: one passage generates them with
TSGs.

**`bw_mult5`**: a signed N×N multiplier (N = 5) using the Baugh–Wooley
matrix. Any partial product that has exactly one sign bit is inverted, by a
Feynman gate with A=1. The product of the two sign bits stays as it is. A
constant 1 is added in column N and in column 2N−1. The original algorithm
shows only the second constant, but the result is wrong without both. The
rows are summed one after another with 2N-bit TSG ripple adders. This is
simpler than a column-wise tree, and slower.

## Selection and comparison

**`mux2_word`**: `w3 = ss1 ? w2 : w1`. It uses one Fredkin gate per bit,
and the select travels through each gate's P output, so the select line has
no fan-out.

**`mux4to1`**: `z = S1'S0'I0 + S1'S0I1 + S1S0'I2 + S1S0I3` from three
gates. The first two pick under S0 (the first passes S0 to the second), and
the third picks under S1. The original calls these R gates. With the R-gate
equations above, one gate cannot select, so Fredkin gates are used. Both
multiplexers are affected.

**`cmp_cell`**: a Feynman gate (1, b) gives b'. An R gate (b', a, 1) gives
a XNOR b and a·b'. A BJN gate (XNOR, a·b', 1) passes both and adds
NOR(XNOR, a·b') = a'·b. The three outputs are one-hot: eq, gt, lt.

**`comparator4`**: four cells, combined from the MSB down. The first bit
that differs decides gt/lt. `c` is the smaller operand. The only published
behaviour for `c` is a set of cases with a < b, all giving c = a. Returning
the minimum matches them, but is an interpretation.

## Where this RTL departs from or adds to the original

- The operation codes on `{s2, s1}` are this design's choice.
- `q3_hi` and `cmp_eq/gt/lt` are extra top-level outputs. `q3` is 4 bits
  wide, so without `q3_hi` the high half of the product would be lost.
- The original block symbol shows the multiplier output as 4 bits. Its
  worked example (1010 × 0010 = 00010100) and its circuit give 8 bits, and 8
  are used.
- The comparator's word output `c` is read as min(a, b).
- The multiplexers use Fredkin gates, not R gates.
- `bw_mult5` adds the missing column-N constant.
- When subtracting, `cin` is a borrow in and `cout` means "no borrow".
- The comparator is 4 bits wide; one passage speaks of 5-bit operands.
- The published delay and power figures (for example, 10.42 ns for the
  multiplier) come from FPGA tool runs. They are not reproduced or checked
  here.
- The processor around the ALU (control unit, program counter, register
  file) is only named in the original and is not provided.

## Simulating

Every testbench in `tb/` checks its outputs against an independent
computation and prints `TB_RESULT checks=N failures=M`. Most are exhaustive
over all inputs. `tb_ralu4` walks every select code, `a1`, `cin1` and all
256 operand pairs, plus all 1024 signed-multiplier pairs (about 20,000
checks). It also counts each mechanism: add, subtract, carry, borrow, each
multiplexer input, each comparison outcome, a product over 4 bits, and a
negative signed product. It fails if any of them never happens.

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ralu_pkg.sv tb/tb_ralu4.sv --top-module tb_ralu4 -o sim
./obj_dir/sim
```

Replace `tb_ralu4` with any other `tb_<module>` to test one block. Lint
reports unused signals: these are the gates' garbage outputs, and they are
left unconnected on purpose.

## Files

- `rtl/ralu_pkg.sv`: width and select-code enum.
- `rtl/*_gate.sv`: the five gate primitives.
- `rtl/tsg_rca.sv`, `rtl/tsg_csa.sv`, `rtl/addsub4.sv`: adders.
- `rtl/mult4x4.sv`, `rtl/bw_mult5.sv`: multipliers.
- `rtl/mux2_word.sv`, `rtl/mux4to1.sv`: multiplexers.
- `rtl/cmp_cell.sv`, `rtl/comparator4.sv`: comparator.
- `rtl/ralu4.sv`: the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
