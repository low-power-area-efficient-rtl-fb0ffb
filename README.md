# An 8-bit ALU built from RC-1 reversible gates

This is a small combinational ALU in which every arithmetic and logical
result comes from one kind of primitive: the **RC-1 gate**. RC-1 is a
3-input, 3-output reversible gate. Each input vector gives a different
output vector, so no information is lost inside the gate. Reversible logic
is studied because, in principle, a gate that destroys no information need
not dissipate the kT·ln2 of energy per erased bit that Landauer's principle
charges an ordinary gate.

The ALU has ten operations, six arithmetic and four logical. Three select
inputs choose which results appear on six 8-bit result buses. The operand
width is a parameter `W`, with a default of 8. The design has no clock and
no state.

## The RC-1 gate

```
P = A
Q = (~A & B) ^ C
R = (A & ~B) ^ C
```

| A B C | P Q R |
|-------|-------|
| 0 0 0 | 0 0 0 |
| 0 0 1 | 0 1 1 |
| 0 1 0 | 0 1 0 |
| 0 1 1 | 0 0 1 |
| 1 0 0 | 1 0 1 |
| 1 0 1 | 1 1 0 |
| 1 1 0 | 1 0 0 |
| 1 1 1 | 1 1 1 |

The whole design depends on how the gate behaves when one input is tied
to a constant or used as a control:

| use | inputs | output |
|-----|--------|--------|
| set / clear | A = control | P = control |
| XOR | A = 0 | Q = B ^ C (R passes C through) |
| XNOR | A = 1 | R = ~B ^ C (Q passes C through) |
| inverter | A = 0, C = 1 | Q = ~B |
| AND with one input inverted | C = 0 | Q = ~A & B, R = A & ~B |
| OR with one input inverted | C = 1 | Q = A \| ~B, R = ~A \| B |

A plain AND or OR needs one input inverted first, and that takes one more
RC-1 gate used as an inverter. A 2:1 multiplexer takes three gates
(`rc1_mux2`). The first gate inverts `x1`. The second forms `sel & x1`. The
third, with A = `sel`, B = `x0` and C = `sel & x1`, gives
`(~sel & x0) ^ (sel & x1)`. The two terms can never both be 1, so the XOR
acts as the OR that a multiplexer needs.

The outputs of a gate that are not used are the circuit's *garbage
outputs*. In the RTL they are left unconnected (Verilator reports these
as `PINCONNECTEMPTY` warnings; they are intended).

## Operation table

The select inputs are `z0`, `z1` and the control `a`. The operands are
`b`, `c` and `d`. All arithmetic is modulo 2^W.

| z0 z1 | a | p | q | r | s | t | u |
|-------|---|---|---|---|---|---|---|
| 0 0 | 0 | 0 (clear) | b + 1 (increment) | ~b (1's complement) | 0 | 0 | 0 |
| 0 0 | 1 | all ones (set) | b (transfer) | −b (2's complement) | 0 | 0 | 0 |
| 0 1 | x | b & d | b ^ c | c \| d | b \| ~d | b & ~d | ~(b ^ c) |
| 1 0 | 0 | 0 | b + 1 | ~b | b & d | b ^ c | c \| d |
| 1 0 | 1 | all ones | b | −b | b \| ~d | b & ~d | ~(b ^ c) |
| 1 1 | x | same as `1 0` with a = 1 | | | | | |

- **Arithmetic mode** (`00`): p, q and r carry the six arithmetic operations, three for each value of `a`.
- **Logical mode** (`01`): all six buses carry logical results. These cover AND, OR, EX-OR and EX-NOR. `a` is ignored.
- **Combined mode** (`10`): p, q and r carry the arithmetic results. s, t and u carry one half of the logical results, and `a` picks which half.

Reference vector, with the values written MSB first:
`b = 10101010`, `c = 01010101`, `d = 11110000`. For these inputs the
design gives, for example:

- `00`, `a=0`: p, q, r = `00000000 10101011 01010101`.
- `01`: p..u = `10100000 11111111 11110101 10101111 00001010 00000000`.

## How the arithmetic is built (`rc1_arith_unit`)

This is the least obvious part. The six arithmetic results reduce to three
formulas:

```
p = {W{a}}      q = b + ~a      r = ~b + a
```

`p` is just the P output of one gate per bit, with A = `a`. Set and clear
therefore need no other logic.

`q` and `r` are two ripple incrementers, each built from RC-1 gates only.
Their carry-ins are `~a` and `a`:

- **q chain (b + carry).** Per bit, the sum is an RC-1 XOR:
  A = 0, B = `b[i]`, C = `kq[i]`, output Q. The carry `kq[i+1] = kq[i] & b[i]`
  is an RC-1 AND (A = `kq[i]`, B = `~b[i]`, C = 0, output R). `~b[i]` comes
  from an RC-1 inverter.
- **r chain (~b + carry).** Per bit, the sum is an RC-1 XNOR:
  A = 1, B = `b[i]`, C = `kr[i]`, output R, which is `~b[i] ^ kr[i]`. The
  carry `kr[i+1] = ~b[i] & kr[i]` is the Q output of A = `b[i]`,
  B = `kr[i]`, C = 0. No inverter is needed here: the gate's built-in
  inversion of A supplies the complement of b.

The carry out of the top bit is dropped, so the top bit has no carry
gates. At W = 8 the unit uses 46 RC-1 gates. Its longest path is 7 carry
gates plus one sum gate.

## Logical unit (`rc1_logic_unit`)

The unit uses seven RC-1 gates per bit and produces all six logical
results at once. Two of the results, `b | ~d` and `b & ~d`, are what one
RC-1 gate gives directly (A = `d`, B = `b`, C = 1 or 0). `b & d` and
`c | d` use a shared inverter on `d`. `b ^ c` and `~(b ^ c)` are the XOR
and XNOR uses of the gate.

## Combined unit, select decoder and top

- **`rc1_arith_logic_unit`** (the combined unit) has its own arithmetic and logical units. It picks s, t and u with three `rc1_mux2` multiplexers controlled by `a`. All of its logic is RC-1 gates.
- **`alu_mode_mux`** decodes `z0`, `z1` and `a` into a mode of type `alu_pkg::alu_mode_e` (`MODE_ARITH`, `MODE_LOGIC` or `MODE_COMBO`). It also outputs the effective control `a_eff`, which is forced to 1 for code `11`. It is ordinary decode logic.
- **`rc1_alu`** (the top) runs the three units side by side and steers the chosen unit's results onto p..u with an `always_comb` case on the mode. This steering is ordinary logic, not RC-1 gates.

At W = 8 the three units hold 276 RC-1 gates:

- 46 in the arithmetic unit;
- 56 in the logical unit;
- 174 in the combined unit.

## Where this design makes its own choices

The operation set and the example results above are fixed. The following
points are choices of this implementation:

- **Transfer and increment.** q is the increment at `a = 0` and the transfer at `a = 1`. A summary table that has also been published for this ALU puts transfer with `a = 0` and increment with `a = 1`. This design follows the published example results, which show the order used here.
- **Operands.** The only published example has `c = ~b`. Because of that, the choice between b and c as operand, and most operand pairings of the logical results, cannot be fixed from it. The pairings chosen reproduce the example exactly, and each result is one named operation. Other pairings would match the example just as well.
- **Operand `c` in the arithmetic unit.** `c` is wired into the arithmetic unit, but no arithmetic result uses it.
- **`a` in the logical results.** Where the logical results are picked by `a`, the `a = 1` set ends with EX-NOR (`~(b ^ c)`). A summary elsewhere names that third result EX-OR, but the example value (`00000000`) fits EX-NOR.
- **Arithmetic mode, s/t/u.** In arithmetic mode s, t and u are driven to zero. The reference behaviour leaves them undriven.
- **Select code `11`.** Code `11` gives the combined mode with `a` forced to 1.
- **Garbage outputs.** The design is not garbage-free. Every RC-1 gate used as a one-output function leaves two outputs unused, and many gates need constant inputs. Making the circuit fully reversible (no garbage, no constants) was not attempted.
- **Plain logic outside the gates.** The select decoder and the output steering in the top are ordinary logic, not RC-1 gates.
- **No power or area claim.** RTL can describe the function of a reversible circuit but not its energy behaviour. A synthesis tool turns every RC-1 instance into ordinary AND/XOR logic.

## Files

| file | content |
|------|---------|
| `rtl/alu_pkg.sv` | default width `ALU_WIDTH`, mode enum `alu_mode_e` |
| `rtl/rc1_gate.sv` | the RC-1 gate |
| `rtl/rc1_mux2.sv` | W-bit 2:1 multiplexer from RC-1 gates |
| `rtl/rc1_arith_unit.sv` | set/clear, transfer/increment, 1's/2's complement |
| `rtl/rc1_logic_unit.sv` | six logical results |
| `rtl/rc1_arith_logic_unit.sv` | combined unit |
| `rtl/alu_mode_mux.sv` | select decoder |
| `rtl/rc1_alu.sv` | top |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/rc1_alu_widths_tb.sv` | the top at W = 1 and W = 4, all inputs |

## Verification

Each testbench compares the outputs with values it works out itself. At
the end it prints `TB_RESULT checks=N failures=M`. A time-based watchdog
stops a run that hangs.

- **`rc1_gate_tb`** checks all eight rows of the gate's truth table and that the gate is one-to-one.
- **`rc1_arith_unit_tb`** checks all 256 values of b for both values of `a`.
- **`rc1_logic_unit_tb`**, **`rc1_mux2_tb`** and **`rc1_arith_logic_unit_tb`** use random operands plus the reference vector.
- **`rc1_alu_tb`** runs the top at its default width. It checks:
  - the six published example cases;
  - every select code with random operands;
  - the wrap-around cases: `b + 1` with b all ones, and `−0`.

  It counts each mode and each wrap-around. A case that never occurs counts as a failure.
- **`rc1_alu_widths_tb`** checks the top exhaustively at 1-bit and 4-bit widths.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb rtl/alu_pkg.sv tb/rc1_alu_tb.sv --top-module rc1_alu_tb
./obj_dir/Vrc1_alu_tb
```

To change the width, override `W` on `rc1_alu` (or on any unit). Every
width from 1 up works.
