# Ternary (radix-3) multipliers: 1-trit and 2-trit

This is a functional RTL model of a family of unsigned ternary multipliers.
Each wire carries a *trit*, a digit with three levels: 0, 1 and 2. One trit
multiplier takes two trits and returns their product as two trits,
`PP1 PP0`. Four of them, plus ten ternary half adders, form a 2-trit
multiplier. It computes `(A1 A0)_3 * (B1 B0)_3` as a four-trit product
`PP3 PP2 PP1 PP0`. Operands run from 0 to 8, and the largest product is
`(22)_3 * (22)_3 = 64 = (2101)_3`.

The circuits come from the paper *Design and Implementation of Low Power 1
and 2 Trit Multipliers*. There they are transistor-level, multi-threshold
CMOS gates that use three voltage levels (0 V, 0.9 V, 1.8 V). They also use
a "forced stack" to cut leakage: each transistor is replaced by two stacked
transistors of half the width. That technique changes power, not logic, so
it has no RTL form here. What this RTL keeps is the logic of every gate and
the gate networks that the paper draws. Every module is therefore a
gate-for-gate model of the paper's ternary circuit, not just a `*` operator.

Everything is combinational. There is no clock or reset, and outputs follow
inputs after delta cycles.

## Representing a trit

`rtl/ternary_pkg.sv` defines `trit_t`, a two-bit enum whose value is the
level: `T0 = 0`, `T1 = 1`, `T2 = 2`. Code `2'b11` is not a level. Each gate
asserts that its inputs never carry it. Multi-trit values are packed arrays
`trit_t [N-1:0]`, with index k having weight 3^k. This binary encoding is a
modelling choice. Real hardware would put one of three voltages on a single
wire.

## The gate family

All gates work on levels: "AND" is minimum, "OR" is maximum and inversion
is a reflection.

| gate | module | function | in 0,1,2 → out |
|---|---|---|---|
| simple inverter STI | `sti` | 2 − x | 2, 1, 0 |
| positive inverter PTI | `pti` | 0 only for x = 2 | 2, 2, 0 |
| negative inverter NTI | `nti` | 2 only for x = 0 | 2, 0, 0 |
| TNAND | `tnand` | 2 − min(a,b) | |
| TNOR | `tnor` | 2 − max(a,b) | |
| TAND | `tand` | min(a,b) = STI(TNAND) | |
| TOR | `tor` | max(a,b) = STI(TNOR) | |

PTI and NTI output only the extreme levels, which makes them threshold
detectors. TAND and TOR are built as a NAND/NOR followed by an STI, as in
the paper.

## Decoding: from one trit to three one-hot lines

Ternary AND and OR do not give sum-of-products logic on their own. The trick
the whole design rests on is to decode each operand first.
`tdecoder` turns trit `a` into three lines `d0 d1 d2`. The line whose index
equals `a` is at level 2, and the other two are at 0:

    d0 = NTI(a)          // high only when a = 0
    d2 = NTI(PTI(a))     // high only when a = 2
    d1 = TNOR(d0, d2)    // high when neither, i.e. a = 1

Each product of decoded lines, such as `A2.B1` (TAND of two lines), is 2
for exactly one operand pair and 0 for the rest. It works as a minterm, and
ORing minterms selects table rows. The result is only ever 0 or 2, so an
output digit of 1 needs one more step. That step is the term
`1.(...)`: a TAND with the constant middle level, which clamps a 2 down
to 1. In the paper this constant is a 0.9 V source.

## One-trit multiplier from logic expressions (`tmul1`)

From the 3×3 product table (only 2·2 = 4 = `(11)_3` carries):

    PP0 = A2.B1 + A1.B2 + 1.(A1.B1 + A2.B2)    // digit 2 for 2·1, 1·2; digit 1 for 1·1, 2·2
    PP1 = 1.(A2.B2)                            // carry only for 2·2

The network is two decoders, seven TANDs and three TORs, wired as the
paper's schematic shows. As in that schematic, `A2.B2` is built twice, once
in each output cone. Lines `A0` and `B0` are decoded but not used.

## One-trit multiplier steered by switches (`tmul1_spmt`)

This is the paper's alternative, which uses fewer gates. The ternary AND of
the operands, `m = min(A,B)`, already nearly tells the product:

| m | cases | PP0 | PP1 |
|---|---|---|---|
| 0 | either operand 0 | 0 | 0 |
| 1 | 1·1, 1·2, 2·1 | max(A,B) | 0 |
| 2 | 2·2 | 1 | 1 |

`spmt_switch` is a single pole, multiple throw switch. It passes one of its
`THROWS` inputs to the output, chosen by a ternary control level. A control
at or above the last throw's index selects the last throw. A triple-throw
switch steered by `m` picks PP0 from `{0, TOR(A,B), 1}`. A double-throw
switch picks PP1 from `{0, 1}`, steered by `NTI(PTI(m))`, which is high
only when `m = 2`.

The paper fixes two things: the TAND as the primary element, and a
double-throw switch that moves the carry between 0 and 1. How the throws are
assigned and how the switches are steered is this design's own choice,
because the paper's schematic does not show it clearly. The paper also
counts five TANDs and two switches. This version uses one TAND, one TOR, a
PTI, an NTI and two switches.

## Ternary half adder (`tha`)

The half adder adds two trits of the same weight: `sum = (A+B) mod 3`, and
`cout = 1` when `A+B >= 3`. It uses the same decode-then-sum-of-products
method:

    Sum   = A0.B2 + A2.B0 + A1.B1 + 1.(A0.B1 + A1.B0 + A2.B2)
    Carry = 1.(A1.B2 + A2.B1 + A2.B2)

That comes to 11 TANDs and 7 TORs (18 two-input gates) plus two decoders,
which matches the paper's count. A carry is never more than 1.

## Two-trit multiplier (`tmul2`): the adder array

This is the part that needs the most care. The four 1-trit multipliers give
a digit `p_ij` of weight 3^(i+j) and a carry `c_ij` of weight 3^(i+j+1):

    weight 3^0: p00                                   -> PP0 directly
    weight 3^1: p01, p10, c00
    weight 3^2: c01, c10, p11  (+ carries from 3^1)
    weight 3^3: c11            (+ carries from 3^2)

Each column is reduced by a chain of half adders. Every adder's carry goes
to the next column as one more input:

| column | adders | chain order | output |
|---|---|---|---|
| 3^1 | 2 | (p01 + p10) + c00 | PP1, 2 carries |
| 3^2 | 4 | (c01 + c10) + p11 + carry1a + carry1b | PP2, 4 carries |
| 3^3 | 4 | c11 + carry2a + carry2b + carry2c + carry2d | PP3, 4 carries |

That makes ten half adders, the number the paper gives. The four carries out
of column 3^3 are left open. This is safe because 8·8 = 64 < 81 = 3^4, so
the column's total is never above 2. An assertion in `tmul2` checks that
they are zero. The paper fixes the number of adders in each column. The
order in which each chain takes its inputs is this design's reading of the
paper's block diagram, and any order gives the same result.

The paper's schematic also draws separate decoders on the four input trits.
Here each 1-trit multiplier and half adder decodes its own inputs.

## Top level (`ternary_mult_top`)

The top level holds both designs side by side:

| port | dir | type | meaning |
|---|---|---|---|
| `a`, `b` | in | `trit_t [1:0]` | 2-trit operands, index 1 is the upper trit |
| `pp` | out | `trit_t [3:0]` | `a*b`, `pp[k]` has weight 3^k |
| `s_a`, `s_b` | in | `trit_t` | operands of the switch-steered 1-trit multiplier |
| `s_pp0`, `s_pp1` | out | `trit_t` | its product digit and carry |

The 2-trit multiplier is built from the logic-expression 1-trit multiplier,
as in the paper.

## Where this departs from the paper

- Levels are two-bit codes, not voltages. Power, delay and leakage (the
  paper's main measurements), and the forced-stack structure behind them,
  are not modelled.
- The paper names the 1-trit multiplier's outputs two ways: PP0/PP1 in the
  text and PP1/PP2 in the schematic. The RTL uses `pp0` (digit) and `pp1`
  (carry).
- The steering of the switch-based multiplier is this design's own. Its
  gate count differs from the paper's, as described above.
- The order of the adder chains in `tmul2` is this design's own.
- Not built:
  - the ternary XOR gate, which is listed with the gate family but used by
    no multiplier;
  - the variant of the 2-trit multiplier that uses full adders, which the
    paper mentions only as an alternative;
  - the binary 2-bit and 3-bit multipliers, which the paper uses only as
    comparison baselines.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each
testbench prints `TB_RESULT checks=N failures=M`.

- The gates and the decoder are checked against their truth tables for
  every input.
- `spmt_switch_tb` runs both a triple-throw and a double-throw switch, with
  random throw levels and every control level.
- `tmul1_tb`, `tmul1_spmt_tb` and `tha_tb` check every operand pair against
  integer arithmetic.
- `tmul2_tb` checks all 81 operand pairs, and checks `(22)*(22) = (2101)`
  by name.
- `ternary_mult_top_tb` runs all 729 input combinations of the top level.
  It also counts how often each mechanism fires: a partial-product carry,
  overflow from column 3^1 and from column 3^2, a nonzero PP3, every throw
  of the product switch, and the carry switch. It fails if any of them
  never happens.

To simulate with Verilator, for example the top level:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ternary_pkg.sv tb/ternary_mult_top_tb.sv \
        --top-module ternary_mult_top_tb -o sim
    ./obj_dir/sim

Any other block works the same way: swap in its testbench. Lint with
`verilator --lint-only -Wall -Irtl rtl/ternary_pkg.sv rtl/<module>.sv`.
