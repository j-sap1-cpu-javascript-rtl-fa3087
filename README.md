# J-SAP1: a "Simple As Possible" CPU in SystemVerilog

SAP-1 is the smallest machine that still works like a CPU. Every block sits on one
8-bit bus. In each clock cycle a 16-bit **control word** picks one block to drive the
bus and one or more blocks to latch it. An instruction is just a short list of
control words, one per step. The list lives in a small programmable **microcode**
store, addressed by the instruction and the step number. This RTL follows the
J-SAP1 teaching emulator, Ben Eater's breadboard version of the SAP-1 in Malvino's
*Digital Computer Electronics*. It keeps the emulator's front panel: every control line
can be set by hand and the clock stepped one pulse at a time. The same machine can
therefore be run by hand, as a teaching exercise, or from microcode.

The source defines two instructions, NOP and LDA, and gives their microcode. The
microcode store is writable, so further instructions are defined by programming it.
Only the datapath needed for them is built in: add, subtract, output and jump.

## The datapath

| Block | Module | Width | Loads on | Drives the bus on |
|---|---|---|---|---|
| Program counter | `sap1_pc` | 4 | CE (count), J (load from bus 3:0) | CO |
| Memory address register | `sap1_mar` | 4 | MI (bus 3:0) | – |
| RAM, 16 bytes | `sap1_ram` | 16 x 8 | RI (write at MAR address) | RO |
| Instruction register | `sap1_ir` | 8 | II | IO (bits 3:0 only) |
| Register A | `sap1_reg_a` | 8 | AI | AO |
| Register B | `sap1_reg_b` | 8 | BI | – (feeds the ALU only) |
| ALU | `sap1_alu` | 8 | – (A+B, or A−B with SU) | EO (Σ-out) |
| Output register | `sap1_out` | 8 | OI | – (three 7-segment digits) |
| Bus | `sap1_bus` | 8 | – | – |
| Step counter | `sap1_step_counter` | 3 | trailing clock edge | – |
| Microcode store | `sap1_microcode` | 128 x 16 | manual store | – |
| Clock | `sap1_clock` | – | – | – |

`sap1_top` wires these together. `sap1_pkg` holds the control-word struct, the
opcodes and the widths.

An instruction byte holds the instruction in bits 7:4 and an optional operand
address in bits 3:0. So `0001 1110` is LDA 14: load A from address 14. IO puts only
the operand nibble on the bus, with bits 7:4 at zero. That is how an instruction
hands an address to the MAR. Opcodes 0000 (NOP) and 0001 (LDA) are defined; the
other 14 are free.

## Control word and microcode addressing

The 16 control lines, from bit 15 down to bit 0:

```
15  14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
HLT MI RI RO IO II AI AO EO SU BI OI CE CO J  FI
```

`EO` is the Σ-out line, which puts the ALU result on the bus. In a two-chip EEPROM
build the low byte would sit in ROM #0 and the high byte in ROM #1. Here they are one
16-bit word.

The microcode address is `0AAAABBB`. `AAAA` is the instruction (IR bits 7:4) and
`BBB` is the step count. Bit 7 is always 0, so only 128 words exist. Each
instruction takes five steps, T0 to T4. T0 and T1 are the fetch, which is the same
for every instruction. T2 to T4 are the execute steps.

| Address | Step | Control lines | Effect |
|---|---|---|---|
| `0000 1000` | T0 | MI CO | MAR ← PC |
| `0000 1001` | T1 | RO II CE | IR ← RAM[MAR], PC ← PC+1 |
| `0000 1010` | T2 | MI IO | MAR ← operand |
| `0000 1011` | T3 | RO AI | A ← RAM[MAR] |
| `0000 1100` | T4 | – | nothing |

That is LDA. NOP occupies addresses `0000 0000` to `0000 0100`. It holds the same
two fetch words followed by three empty steps.

NOP's fetch words are what start the machine. After reset the IR holds 0, so the
first instruction executed is NOP. If NOP's fetch words are missing, no instruction
is ever fetched. The step counter still cycles T0 to T4, but nothing else happens.
The top testbench shows this case.

The store starts empty. Reset and power-off leave it alone. It is written through
`mc_manual_sel`, `mc_manual_addr`, `mc_manual_value` and `mc_store`, and erased by
`mc_clear`.

## Two clock edges, one system clock

The clock has two edges, and blocks act on different ones:

- Outputs drive the bus combinationally as soon as their out line is set.
- Every register latches on the **leading** (rising) edge.
- The step counter advances on the **trailing** (falling) edge.

Because of the trailing-edge step counter, the next step's control word is ready a
half period before the next leading edge. That half period is when the registers
act.

The design has no separate CPU clock net. Everything runs on the system clock `clk`.
`sap1_clock` produces a `level` signal (the clock LED) and two one-cycle strobes,
`rise` and `fall`. The registers use `rise` as an enable, and the step counter uses
`fall`.

While running freely, the clock period is `delay_ms × TICKS_PER_MS` system cycles,
high for the first half. The default is 1000 ms, with `TICKS_PER_MS` = 50 000 for a
50 MHz board. Pulse `delay_update` to load a new `delay_ms`.

The clock halts when the `hlt_sw` switch or the control word's HLT line is set. A
halted clock makes one pulse per `pulse` request: `rise` comes in the next cycle and
`fall` one cycle after that. A half period that has already started always
finishes, so every `rise` is followed by a `fall`.

## Running it by hand

When `mc_enable` is low, the control word comes from `manual_cw` rather than from
the microcode. Set the lines, then pulse the clock. The source's first exercise adds
28 and 14 this way, with 28 at address 0 and 14 at address 1. The control words,
pulsed one after another, are:

```
MI|CO        MAR ← PC (0)
CE|RO|AI     A ← 28, PC ← 1        ALU now shows 28
MI|CO        MAR ← 1
RO|BI        B ← 14                ALU now shows 42
OI|EO        output ← 42           display reads 042
```

RAM is loaded from the panel:

1. Set `mar_manual_sel`, which makes RAM use `mar_manual_addr` instead of the MAR
   register.
2. Put the byte on `ram_manual_value`.
3. Pulse `ram_store`.

`ram_clear` erases RAM.

`rst_n` works like the RESET button. It clears every register and the step counter
but keeps RAM and the microcode. `power` = 0 holds the machine in reset and clears
RAM, but not the microcode.

`id_enable` starts and stops the step counter. While it is low the counter holds its
count.

## Bus rules

Exactly one source should drive the bus at a leading edge. The RTL ORs all enabled
sources together and raises `bus_conflict` if more than one is enabled. An assertion
in `sap1_top` flags a conflict at a leading edge. With no source enabled, the bus
reads 0. The 4-bit sources, PC and IR operand, fill bits 7:4 with zero.

## What follows the source and what is this design's own

**Taken from the source:**

- the bus and register widths
- the 16-byte RAM
- the 4-bit counter that wraps from 15 to 0
- the IR split and IO driving only the low nibble
- B with no bus output
- the ALU's add and subtract
- the leading-edge and trailing-edge rules
- the five steps T0 to T4
- the 16 control lines and their order
- the `0AAAABBB` microcode address
- the NOP and LDA microcode
- RESET keeping RAM, power-off clearing RAM but keeping the microcode
- the default period of 1000 ms

**Choices of this design:**

- J (jump) loads the PC from bus bits 3:0 and wins over CE. The source only names
  the J line.
- The output shows an unsigned decimal number. The segment encoding is the usual
  one, ordered g…a, with 1 = lit.
- The bus is an OR of the enabled sources rather than a tri-state bus.
- The clock is built as a divider of the system clock, with a 50/50 duty cycle and
  manual pulses one system cycle long.
- The RAM and the microcode store are read asynchronously.
- Manual store works at any time, not only on a clock edge.
- The step counter holds while disabled.
- All registers reset to 0.

**Not built:**

- **The flags register.** The FI line is in the control word and comes out of the
  top as `fi`, but which flags exist, and how a conditional jump would use them, is
  not defined.
- **The emulator's built-in programs**, apart from "CLR".
- **Microcode for any instruction beyond NOP and LDA.** The top testbench programs
  one extra instruction, opcode 0010 with HLT at T2, to try out the HLT line. That
  instruction is part of the test, not of the design.

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_sap1_top` runs the whole CPU
at its default parameters, in five parts:

1. manual RAM programming, then the program counter walking through RAM on the
   free-running clock
2. the hand-driven 28 + 14 (and 28 − 14)
3. a power cycle, then the fetch cycle, LDA and a jump by hand
4. microcode programming: first without NOP's fetch words, then with them
5. a free-running clock at 1 ms that halts itself through the HLT line

It counts each mechanism it exercises, such as manual and automatic pulses, step
wrap, jump, subtract and RAM clear on power-off. If any mechanism never happened,
that counts as a failure. The run takes about a second.

```
verilator --binary --timing --assert -y rtl rtl/sap1_pkg.sv tb/tb_sap1_top.sv \
          --top-module tb_sap1_top --Mdir obj_top
./obj_top/Vtb_sap1_top +verilator+rand+reset+2
```

Replace `top` with `clock`, `pc`, `mar`, `ram`, `ir`, `reg_a`, `reg_b`, `alu`,
`out`, `bus`, `step_counter` or `microcode` to run a single block's test.
`tb_sap1_clock` sets `TICKS_PER_MS` = 2 and a 3 ms default delay, which gives a
6-cycle period. The others use the default parameters. `tb_sap1_clock_default`
times one full 1000 ms period at the defaults (50 million system cycles). It runs
in about a minute.

## Changing it

- **A new instruction.** Pick a free opcode and write its T2 to T4 control words at
  `{opcode, step}`. Also copy the two fetch words into T0 and T1 of that opcode,
  since every opcode's microcode starts with the fetch.
- **Clock rate.** Set `TICKS_PER_MS` on `sap1_top` to match the board clock.
- **Wider memory.** `sap1_ram` has `AW` and `DW` parameters. However, the PC, the MAR
  and the IR operand are fixed at 4 bits by `ADDR_W` in `sap1_pkg`, so a larger
  memory also needs a different instruction format.
