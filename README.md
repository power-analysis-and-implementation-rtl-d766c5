# Toggle clock-gated 8-bit ALU

An ALU's registers, and the logic they feed, switch on every clock edge
whether or not the result is needed. This design puts a clock gate in front
of a small 8-bit ALU so that the ALU can be slowed down or stopped from a
single enable pin. The gate is a T flip-flop whose output is ANDed with the
system clock:

```
            EN ──► T   Q ──┐
                  T-FF      │      ┌────┐
  clk ──────────► ▷ (fall)  └─────►│    │
     │                             │AND ├──► gclk ──► arithmetic unit
     └────────────────────────────►│    │          ──► logic unit
                                   └────┘          ──► output-select register
```

* **EN high**: Q toggles every cycle, so only every other clock pulse gets
  through. The ALU runs at half the clock frequency.
* **EN low**: Q holds. If it holds at 1, the ALU sees every clock pulse; if it
  holds at 0, the gated clock stays low, the ALU registers stop, and the
  output keeps the last result until the gate is opened again.

So one pin selects between full rate, half rate and stopped, depending on the
state it leaves the flip-flop in. The ALU itself executes eleven
instructions, split between an arithmetic unit and a logic unit.

## The clock gate (`tff_clock_gate`)

The part that needs the most care is the AND gate. A gated clock is only
clean if the gating signal never changes while the clock is high: a change
then would cut a pulse short or create a sliver of a pulse. Here the T
flip-flop is clocked on the **falling** edge of `clk`. Q therefore only
changes while `clk` is low, when the AND output is 0 whatever Q does, and
every pulse on `gclk` is a complete copy of a `clk` pulse. EN is sampled on
the falling edge, so to affect the next gated pulse it must be stable around
the falling edge before it.

The consequences for a user:

* The EN pin does not say directly whether the clock is on. With EN low, the
  clock runs if the last toggle left Q at 1 and is stopped if it left Q at 0.
  To stop the ALU, hold EN high for the one falling edge that brings Q to 0,
  then drop EN. The `gate_q` output shows the flip-flop's state for this
  purpose.
* Reset sets Q to 1 (parameter `RESET_Q`), so the ALU is clocked right after
  reset.
* `gclk` is a derived clock produced by logic. In an FPGA or ASIC flow it
  must be declared as a generated clock of `clk`; the AND gate should be a
  clock-tree cell or a clock buffer with enable, not general logic.

## The ALU (`arithmetic_unit`, `logic_unit`, `gated_alu`)

Both units take the gated clock. On a rising `gclk` edge the 4-bit opcode is
decoded (`alu_pkg::decode`); the unit that owns the instruction registers its
result while the other unit keeps its register unchanged, and a small
register records which unit that was. The output stage shows the recorded
unit's register, so the output changes only on a gated edge and holds while
the clock is stopped.

| opcode | instruction | unit | result | carry |
|---|---|---|---|---|
| 0 | ADD  | arithmetic | A + B | carry out |
| 1 | SUB  | arithmetic | A − B | borrow (A < B) |
| 2 | INC  | arithmetic | A + 1 | carry out |
| 3 | DEC  | arithmetic | A − 1 | borrow (A = 0) |
| 4 | AND  | logic | A & B | 0 |
| 5 | OR   | logic | A \| B | 0 |
| 6 | XOR  | logic | A ^ B | 0 |
| 7 | NAND | logic | ~(A & B) | 0 |
| 8 | NOR  | logic | ~(A \| B) | 0 |
| 9 | XNOR | logic | ~(A ^ B) | 0 |
| 10 | NOT | logic | ~A | 0 |
| 11–15 | none | — | 0 | 0 |

Codes 11 to 15 update neither unit; after one of them the output reads 0
until the next instruction.

### Top-level ports (`gated_alu`, parameter `WIDTH = 8`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears all registers, sets the gate open |
| `en` | in | 1 | T input of the gating flip-flop, sampled on the falling edge of `clk` |
| `opcode` | in | 4 | instruction, see table; sampled on rising `gclk` |
| `a`, `b` | in | WIDTH | operands; sampled on rising `gclk` |
| `result` | out | WIDTH | result of the last instruction |
| `carry` | out | 1 | carry/borrow of the last instruction (0 for logic ones) |
| `gate_q` | out | 1 | state of the gating flip-flop (1 = next clock pulse passes) |
| `gclk` | out | 1 | the gated clock |

Latency is one gated edge: inputs present at a rising `gclk` edge show on
`result` right after it. With EN high that is one result every two clock
cycles.

## What is from the original design and what is not

Taken from the published design: the T flip-flop plus AND-gate clock gate
and its behaviour (half frequency with EN high, held state with EN low), an
8-bit ALU made of an arithmetic and a logic unit that both run on the gated
clock, and a total of eleven instructions.

Choices made here, where the description gives no detail:

* which eleven instructions, their encoding, the carry/borrow output and the
  handling of codes 11–15;
* the falling-edge T flip-flop and reset to Q = 1;
* registering each unit's result, with a load qualifier so the idle unit
  holds, and the output-select register;
* the asynchronous active-low reset.

Known differences from the original:

* The description has one sentence saying the clock sleeps whenever the
  enable is 0, and others saying that EN low holds the flip-flop's previous
  output and that with T = 0 the flip-flop's high output clocks the ALU. The
  design follows the latter, a true T flip-flop; with EN low the clock stops
  only if Q was left at 0.
* The published FPGA utilisation for the gating logic is 4 LUTs and 5
  registers. The gate here uses one flip-flop and one AND gate; the whole
  design has about twenty flip-flops (two 8-bit result registers, the carry,
  the output-select register and the gate). What the other published
  registers hold is not known.
* A latch-based (D flip-flop) gated ALU appears in the original only as the
  design it is compared against, and is not included.
* The published power figures (roughly 5 to 24 mW dynamic power from 100 to
  500 MHz on Xilinx Artix-7 and Spartan-6 parts) are measurements of an FPGA
  implementation. Nothing here reproduces them, and whether the design closes
  timing at 500 MHz on those parts has not been checked.

## Files

| file | contents |
|---|---|
| `rtl/alu_pkg.sv` | opcode, unit and operation enums; the decode function |
| `rtl/tff_clock_gate.sv` | T flip-flop and AND gate |
| `rtl/arithmetic_unit.sv` | ADD, SUB, INC, DEC with registered result and carry |
| `rtl/logic_unit.sv` | seven bitwise operations with registered result |
| `rtl/gated_alu.sv` | top level: gate, units, output select |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the design with a model written independently in the
testbench and ends with a line `TB_RESULT checks=N failures=M`.

* `tb_tff_clock_gate` predicts Q and `gclk` in both clock phases, checks
  that `gclk` only ever changes at a clock edge (no clipped pulses), and
  counts pulses: 20 of 20 with Q held high, 10 of 20 with EN high, 0 with Q
  held low.
* `tb_arithmetic_unit` and `tb_logic_unit` run corner cases and a few
  thousand random vectors, with load both high and low.
* `tb_gated_alu` runs the top at its default size. It first replays the
  reference sequence (EN high for ten cycles must give five gated edges;
  then, with the gate closed, ten cycles of changing inputs must leave the
  output unchanged; then twelve cycles with the gate held open must give
  twelve results), then 6000 cycles of random EN stretches and random
  opcodes. The output is checked every cycle. It also fails unless each of
  the following happened at least once: half-rate edges, full-rate edges,
  stopped-clock cycles with changing inputs, every one of the eleven
  instructions, a carry or borrow, and an unused code.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
    rtl/alu_pkg.sv tb/tb_gated_alu.sv --top-module tb_gated_alu -o sim
./obj_dir/sim
```

Replace `tb_gated_alu` with any other testbench name. Each run takes well
under a second.

## Changing the design

* `WIDTH` on `gated_alu`, `arithmetic_unit` and `logic_unit` sets the operand
  width. The testbenches use 8, and `tb_gated_alu`'s model assumes 8-bit
  carry limits.
* To add an instruction, extend `opcode_e` and `NUM_INSTR` in `alu_pkg`,
  map it in `decode`, and add the operation to the unit's case statement and
  to the testbench model. Sixteen codes are available with a 4-bit opcode.
* `RESET_Q = 0` on `tff_clock_gate` makes the ALU start with its clock
  stopped.
