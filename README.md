# Application-specific 8-bit ALU with selectable adders and multipliers

Different applications weigh delay, area and power differently, and no single
adder or multiplier is best at all three. This ALU therefore carries several
implementations of the same arithmetic side by side: two adders and five
multipliers, plus logical and bitwise operators. A 4-bit select line `N`
chooses which unit does the work. Only the chosen unit sees its operands;
every other unit's inputs are held at zero, so the idle units do not switch
and burn no dynamic power. An application that needs the smallest multiplier
uses the array multiplier; one that needs the best balance uses the radix-4
Booth multiplier, and so on.

Everything is combinational: there is no clock, no reset and no state.

## Select codes

| `N` | unit | operation | result port |
|----:|------|-----------|-------------|
| 1 | `ripple_carry_adder` | `A + B + CIN` | `{COUT, SUM}` |
| 2 | `qfa_adder` | `A + B + CIN` | `{COUT, SUM}` |
| 3 | `array_multiplier` | `X * Y`, unsigned | `Product` |
| 4 | `booth_radix2_multiplier` | `X * Y`, signed | `Product` |
| 5 | `booth_radix4_multiplier` | `X * Y`, signed | `Product` |
| 6 | `wallace_multiplier` | `X * Y`, unsigned | `Product` |
| 7 | `simple_multiplier` | `X * Y`, unsigned | `Product` |
| 8 | `logical_unit` | `X \|\| Y` | `LOGICOP[0]` |
| 9 | `logical_unit` | `X && Y` | `LOGICOP[0]` |
| 10 | `bitwise_unit` | `X \| Y` | `LOGICOP` |
| 11 | `bitwise_unit` | `X & Y` | `LOGICOP` |
| 12 | `bitwise_unit` | `X ^ Y` | `LOGICOP` |
| 13 | `logical_unit` | `!X` | `LOGICOP[0]` |
| 14 | `bitwise_unit` | `~X` | `LOGICOP` |
| 0, 15 | none | idle | all zero |

Codes 1 to 12 are the original assignment. Logical NOT and bitwise NOT belong
to the operator set, but the original assignment gives them no code. This
design gives them codes 13 and 14 and leaves 0 and 15 idle, which fills the
16 codes of a 4-bit select.

The adders take their own operands (`A`, `B`, `CIN`). The multipliers and the
logic operators share `X` and `Y`. Each group has its own output: `SUM`/`COUT`,
`Product` (16 bits) and `LOGICOP` (8 bits). An output group that does not
belong to the selected unit reads zero. For example, `SUM` is zero while a
multiplier is selected.

## Operand isolation

`alu` decodes `N` into one enable per unit. Each unit's operands are ANDed
with that enable, and for the multipliers `mul_bank` does the same with a
one-hot vector. An unselected unit therefore sees all-zero inputs and drives
all-zero outputs. That is why the outputs of the units in one group can simply
be ORed together instead of going through a multiplexer. The one exception is
bitwise NOT: with isolated (zero) inputs it gives all ones, so `LOGICOP` also
gates each unit's output with its enable.

The cost is one AND gate per operand bit per unit. The gain is that a change
on `X` or `Y` toggles only one multiplier instead of five. The original design
only implies that one unit is active at a time. Gating the operands is this
design's way of making that true in hardware.

## Adders

**Ripple carry adder** (`ripple_carry_adder`). Eight `full_adder` cells are
chained, each passing its carry to the next. It is the smallest adder and the
best choice for narrow operands.

**Quaternary adder** (`qfa_adder`). The operands are read as four base-4
digits, with digit *k* in bits `[2k+1:2k]`. Four quaternary full adder cells
(`qfa_cell`) each add two digits and a carry in. Each cell gives a digit
`(a+b+ci) mod 4` and a carry `(a+b+ci) >= 4`, and the digit carry ripples
through four cells instead of eight. The original circuit is a multi-valued
logic adder, in which one wire carries one of four signal levels. Here a digit
is a 2-bit binary code instead. The arithmetic is identical, but the
multi-level electrical realisation, which gives the original its power and
delay advantage at large widths, is not modelled.

## Multipliers

All five multipliers are parameterised by `W` (default 8) and give a `2W`-bit
product. `mul_bank` instantiates all five. The two Booth multipliers read `X`
and `Y` as two's complement numbers; the other three read them as unsigned.
So the same `X`, `Y` bit patterns can give different `Product` values under
codes 3 and 5. For example, `X = 8'h12`, `Y = 8'hF1` gives 4338 unsigned but
-270 signed.

### Array multiplier (`array_multiplier`)

Partial product *j* is `X & {W{Y[j]}}`: the multiplicand when bit *j* of the
multiplier is one, zero otherwise. Row *j* (for *j* = 1 to W-1) is a W-bit
ripple adder of `full_adder` cells. It adds partial product *j* to the upper W
bits of row *j-1*'s result, with that row's carry out as the top bit. The
lowest sum bit of each row is one product bit, and the last row gives the
upper W bits. At 4x4 this is 16 AND terms and three rows of four full adders.
It has the smallest area but the longest carry path.

### Radix-2 Booth multiplier (`booth_radix2_multiplier`)

Each bit pair `(Y[i], Y[i-1])` of the multiplier, with `Y[-1] = 0`, is recoded
as a digit:

| `Y[i] Y[i-1]` | digit |
|---|---|
| 00, 11 | 0 |
| 01 | +1 |
| 10 | -1 |

Partial product *i* is digit × `X`, sign-extended to 2W bits and shifted
left by *i*. The W partial products are summed. Runs of ones in `Y` turn into
a single +1 and a single -1, but isolated ones gain nothing. The number of
nonzero partial products therefore depends on the data.

### Radix-4 Booth multiplier (`booth_radix4_multiplier`)

The multiplier is recoded three bits at a time. The groups overlap by one bit:
group *k* is `(Y[2k+1], Y[2k], Y[2k-1])`, and its digit is
`-2·Y[2k+1] + Y[2k] + Y[2k-1]`:

| group | digit | group | digit |
|---|---|---|---|
| 000 | 0 | 100 | -2 |
| 001 | +1 | 101 | -1 |
| 010 | +1 | 110 | -1 |
| 011 | +2 | 111 | 0 |

Partial product *k* is digit × `X`, which is 0, ±X or ±2X. It is shifted left
by 2*k*, so W/2 partial products replace W. The module also outputs
`partial_sum[k]`, the running total after partial product *k* has been added.

Worked example with `X = 18` and `Y = -15` (`8'b1111_0001`). The digits are
+1, 0, -1 and 0 (1 + 0·4 - 1·16 + 0·64 = -15). The running sums are
18, 18, 18 - 18·16 = -270, and -270. The testbench checks exactly these four
values.

### Wallace tree multiplier (`wallace_multiplier`)

This is the least obvious block. Partial product bit `X[i] & Y[j]` lands in
column `i+j`, so the columns are 1, 2, …, W, …, 2, 1 bits tall. One reduction
stage processes every column at once:

- each full group of three bits goes into a full adder (a 3:2 counter): its
  sum stays in the column and its carry moves to the next column up;
- a leftover pair goes into a half adder, with the same rule;
- a single leftover bit passes straight through.

No carry ripples inside a stage. Stages repeat until no column is taller than
two bits. A single carry-propagate adder then adds the two remaining rows.
That adder is written as `+`, so synthesis can map it to a fast adder. The
number of stages grows with log(W): four stages at W = 8.

The tree is laid out at elaboration time. The constant function
`col_height(s, c)` replays the reduction to find how many bits column *c*
holds before stage *s*, and `num_stages()` counts the stages. In stage *s*,
the generate block for column *c* places the next stage's bits in a fixed
order:

1. its own full-adder sums;
2. its half-adder sum or passed-through bit;
3. the carries arriving from column *c-1*, full-adder carries first.

That order gives every wire a fixed index. An elaboration-time `$error` fires
if the bits produced ever differ from the replayed height. Each stage's
columns live in their own generate block (`g_stage[s].nxt`), so simulators see
no false combinational loop.

### Conventional multiplier (`simple_multiplier`)

This is the plain `*` operator, with the structure left to the synthesis tool.
It is the reference point the other four are compared against.

### How they compare

Published synthesis results for 4x4 versions:

| multiplier | delay (ns) | area | power (µW) |
|---|---|---|---|
| array | 1.791 | 78 | 1.369 |
| radix-2 Booth | 1.744 | 158 | 2.555 |
| radix-4 Booth | 0.779 | 96 | 1.18 |
| Wallace | 1.517 | 87 | 1.573 |
| conventional | 0.992 | 85 | 1.453 |

The array multiplier is the smallest. The radix-4 Booth multiplier has the
best overall balance. These numbers come from a particular tool and library.
This RTL has not been characterised, and its figures will differ.

## Logical and bitwise operators

`logical_unit` treats each whole operand as one truth value: zero is false,
anything else is true. `X || Y`, `X && Y` and `!X` give a single bit, placed
in `LOGICOP[0]` with the upper bits zero. For example, with `X = 2` and
`Y = 0`: `X && Y = 0`, `X || Y = 1` and `!X = 0`.

`bitwise_unit` works bit by bit. For example, with `X = 4'b1010` and
`Y = 4'b1101` zero-extended to 8 bits: `X & Y = 1000`, `X | Y = 1111`,
`X ^ Y = 0111`, and the low nibble of `~X` is `0101`. An operand narrower than
8 bits should be zero-extended before it reaches the ALU.

## Where this RTL departs from or adds to the original design

- Codes 13 and 14 (`!X`, `~X`) and the idle codes 0 and 15 are this design's.
- Operand isolation, and zeroing of unused output groups, are this design's.
- The quaternary adder uses binary-coded digits, not multi-level signals.
- Signedness is this design's reading: Booth signed, the other three
  multipliers unsigned. The original only shows a signed example for radix-4
  and calls the array multiplier unsigned.
- The Booth recoding tables, the Wallace grouping rule (half adders on
  leftover pairs), and the summation of Booth partial products with `+` are
  standard choices, not taken from a given circuit.
- The radix-4 recoding halves the number of partial products (four at
  W = 8).
- The multipliers default to 8x8 to match the 8-bit ALU. The published
  comparison uses 4x4 versions; set `W = 4` to get them.

## Files

| file | contents |
|---|---|
| `rtl/alu_pkg.sv` | `ALU_W`, the select-code enum `alu_op_e`, and the unit-level enums |
| `rtl/alu.sv` | top level: decode, isolation, output merging |
| `rtl/ripple_carry_adder.sv`, `rtl/full_adder.sv` | binary adder |
| `rtl/qfa_adder.sv`, `rtl/qfa_cell.sv` | quaternary adder |
| `rtl/mul_bank.sv` | the five multipliers with one-hot isolation |
| `rtl/array_multiplier.sv`, `rtl/booth_radix2_multiplier.sv`, `rtl/booth_radix4_multiplier.sv`, `rtl/wallace_multiplier.sv`, `rtl/simple_multiplier.sv` | multipliers |
| `rtl/logical_unit.sv`, `rtl/bitwise_unit.sv` | operators |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example:

```sh
verilator --binary --timing --assert -Irtl rtl/alu_pkg.sv tb/tb_alu.sv --top-module tb_alu
./obj_dir/Vtb_alu
```

Replace `alu` with any module name to run that module's testbench. The
adders, multipliers and operators are checked exhaustively at 8 bits against
plain integer arithmetic, and the multipliers at 4 bits as well. The Wallace
multiplier is also checked exhaustively at 5 bits and with random operands at
16 bits. The worked examples above are checked literally.

`tb_alu` drives the top level at its default width. It runs all 16 select
codes with corner and random operands and checks all three output groups
against a reference model. It also checks, through hierarchical references,
that at most one unit ever sees nonzero operands. It counts carries out of
both adders, negative products from both Booth multipliers, and isolation
events, and it fails if any of these never happens. Each run takes well under
a second.

To change the width, override `W` on `alu`. The QFA adder and the radix-4
multiplier need an even `W`.
