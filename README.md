# risc8 — an 8-bit pipelined RISC processor

risc8 is a small load/store processor. It has an 8-bit datapath, 32-bit
MIPS-format instructions and a four-stage pipeline: instruction fetch,
instruction decode, execute and write back. Besides the usual ALU, the execute
stage has two more units. A *universal shifter* copies a register or shifts it
by one place. A *barrel rotator* rotates a register by 0–7 places in one step.
Its structure comes from the description of an 8-bit RISC core written in VHDL
for a Spartan-3E FPGA. That structure is a fetch unit, a decode unit with a
register file, a main control unit with nine control signals, an ALU-control
decoder, an ALU, a data memory and a four-phase timing generator. That
description gives the blocks and how they connect, but not an instruction
encoding, a memory size or a hazard scheme. Those parts are this design's own,
and are marked as such below.

All of it is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench. The whole processor is tested against an
instruction-level model.

## Instruction set

Instructions are 32 bits wide and use the MIPS field positions:

| type | 31:26  | 25:21 | 20:16 | 15:11 | 10:6  | 5:0   |
|------|--------|-------|-------|-------|-------|-------|
| R    | 0x00   | rs    | rt    | rd    | shamt | funct |
| I    | opcode | rs    | rt    | immediate (only bits 7:0 used) ||
| J    | 0x02   | target (only bits 5:0 used) ||||

Data is 8 bits wide, so an immediate is simply instruction bits [7:0]. It is
used as it is and never sign-extended. The branch offset is the one exception:
it is read as a signed word offset.

| instruction          | encoding            | effect                                         | unit    |
|----------------------|---------------------|------------------------------------------------|---------|
| `add rd, rs, rt`     | R, funct 0x20       | rd = rs + rt                                   | ALU     |
| `sub rd, rs, rt`     | R, funct 0x22       | rd = rs − rt                                   | ALU     |
| `and/or/xor/nor`     | R, funct 0x24–0x27  | bitwise                                        | ALU     |
| `slt rd, rs, rt`     | R, funct 0x2A       | rd = (signed rs < signed rt)                   | ALU     |
| `shl rd, rs`         | R, funct 0x00       | rd = rs << 1, zero fill                        | shifter |
| `ld rd, rs`          | R, funct 0x01       | rd = rs (the shifter's "load")                 | shifter |
| `shr rd, rs`         | R, funct 0x02       | rd = rs >> 1, zero fill                        | shifter |
| `rol rd, rs, n`      | R, funct 0x04       | rd = rs rotated left by shamt[2:0]             | rotator |
| `ror rd, rs, n`      | R, funct 0x06       | rd = rs rotated right by shamt[2:0]            | rotator |
| `addi rt, rs, imm`   | 0x08                | rt = rs + imm                                  | ALU     |
| `lw rt, imm(rs)`     | 0x23                | rt = mem[rs + imm]                             | ALU+mem |
| `sw rt, imm(rs)`     | 0x2B                | mem[rs + imm] = rt                             | ALU+mem |
| `beq rs, rt, off`    | 0x04                | if rs == rt: PC = PC+4 + (sext(imm) << 2)      | ALU     |
| `j target`           | 0x02                | PC = target << 2                               | —       |

Register 0 always reads zero. An unknown opcode does nothing, and an unknown
funct adds. The all-zero word is `shl r0, r0`, which changes nothing, so it
works as a NOP. A jump to its own address is the usual way to stop a program.

The PC is an 8-bit byte address. The instruction memory holds 64 words and is
read at PC[7:2]. The data memory holds 256 bytes and is addressed by the 8-bit
execute result.

## Control: two decoders

Decoding is split across two decoders.

`control_unit` turns the opcode into the nine control signals (`ctrl_t` in
`risc8_pkg`):

| opcode | RegDst | Jump | Branch | MemRead | MemtoReg | ALUOp | MemWrite | ALUSrc | RegWrite |
|--------|:------:|:----:|:------:|:-------:|:--------:|:-----:|:--------:|:------:|:--------:|
| R-type | 1 | 0 | 0 | 0 | 1 | 10 | 0 | 0 | 1 |
| lw     | 0 | 0 | 0 | 1 | 0 | 00 | 0 | 1 | 1 |
| sw     | 0 | 0 | 0 | 0 | 0 | 00 | 1 | 1 | 0 |
| beq    | 0 | 0 | 1 | 0 | 0 | 01 | 0 | 0 | 0 |
| addi   | 0 | 0 | 0 | 0 | 1 | 00 | 0 | 1 | 1 |
| j      | 0 | 1 | 0 | 0 | 0 | 00 | 0 | 0 | 0 |

**MemtoReg is inverted compared with textbook MIPS.** 1 selects the execute
result and 0 the memory read data, following the multiplexer numbering of the
original decode-unit drawing. RegDst = 1 selects rd and ALUSrc = 1 selects the
immediate. The next-PC mux uses 0 for PC+4 and 1 for the branch or jump target.

`alu_control` is the second decoder. For ALUOp 00 it makes the ALU add, and for
01 it makes it subtract. For ALUOp 10 it reads funct and chooses which unit
produces the result: ALU, universal shifter or barrel rotator. It also drives
that unit's control lines.

## The pipeline and its hazards

```
        IF                ID                     EX                          WB
  PC -> instr_mem -> [IF/ID] -> control_unit -> [ID/EX] -> fwd mux -> execution_unit -> [EX/WB] -> MemtoReg -> reg_file
                               decode_unit/reg_file         data_memory (addr = result)
```

Four stages hold at most four instructions, so the data memory is accessed in
EX, right after the ALU has formed the address. This choice decides how hazards
are handled:

* **Read after write, distance 1.** The instruction in EX reads a register that
  the instruction in WB is writing. The EX operand multiplexers take the WB
  value (`fwd_a`/`fwd_b` in `risc8_top`). A load's data is already in the EX/WB
  register, so a load followed directly by an instruction that uses the loaded
  value needs **no stall**.
* **Read after write, distance 2.** The instruction in ID reads a register that
  WB is writing in the same cycle. The register file is write-through: a read
  of the register being written returns the new value.
* **Control hazards.** `beq` and `j` are resolved in EX. When the branch is
  taken (Branch AND Zero) or a jump executes, the PC is loaded with the target.
  The two younger instructions in IF/ID and ID/EX are squashed through their
  valid bits.

The processor never stalls. Timing:

* The first instruction after reset writes back at the end of the third clock.
* Straight-line code completes one instruction per clock.
* Each taken branch or jump adds two bubbles. A program that executes D
  instructions with R taken branches or jumps retires them in exactly D + 2R
  cycles, counted from the first write back. The end-to-end testbench checks
  this number.

The forwarding, the write-through register file and the flush are this
design's own. The original description states the four stages but not how
they handle hazards.

## Timing generator

`timing_gen` produces four phases, t1..t4. Exactly one is high at a time and
they rotate t1 → t2 → t3 → t4 → t1, starting at t1 after reset. The phase
names come from the original simulation waveform. Each phase lasts one clock
(parameter `PHASE_CLKS`); that length is an assumption. The pipeline itself
advances on every clock edge and does not use the phases. They are brought out
on the `phase` port of `risc8_top`.

## Module map

| file | role |
|------|------|
| `rtl/risc8_pkg.sv`          | opcodes, funct codes, ALU/shifter enums, `ctrl_t` |
| `rtl/risc8_top.sv`          | pipeline registers, forwarding, flush, top-level ports |
| `rtl/fetch_unit.sv`         | PC, PC+4 adder, next-PC mux; contains `instr_mem` |
| `rtl/instr_mem.sv`          | 64 × 32 instruction memory with a load port |
| `rtl/decode_unit.sv`        | field split, RegDst and MemtoReg muxes; contains `reg_file` |
| `rtl/reg_file.sv`           | 32 × 8 registers, two read ports, write-through |
| `rtl/control_unit.sv`       | main decoder (nine control signals) |
| `rtl/execution_unit.sv`     | ALUSrc mux, `alu_control`, `alu`, `universal_shifter`, `barrel_rotator`, result mux, branch adder |
| `rtl/alu_control.sv`        | second decoder |
| `rtl/alu.sv`                | add, sub, and, or, xor, nor, slt; Zero flag |
| `rtl/universal_shifter.sv`  | load / shift left / shift right |
| `rtl/barrel_rotator.sv`     | log-depth rotate by 0..W−1, either direction |
| `rtl/data_memory.sv`        | 256 × 8 data memory |
| `rtl/timing_gen.sv`         | four-phase generator |

Top-level ports of `risc8_top`:

| port | purpose |
|------|---------|
| `clk`, `rst` | clock; synchronous, active-high reset |
| `prog_we`, `prog_addr`, `prog_data` | load instruction words; hold `rst` while loading |
| `pc` | current fetch address |
| `wb_valid`, `wb_we`, `wb_reg`, `wb_data` | a trace of every instruction as it retires |
| `dbg_raddr` → `dbg_rdata`, `dmem_dbg_addr` → `dmem_dbg_data` | read a register or a data byte without disturbing the core |
| `phase` | t1..t4 from the timing generator |

## Where this departs from the original description

* **Cycles per instruction.** The original claims that every instruction,
  jumps included, runs in one clock. Here taken branches and jumps cost two
  extra cycles; everything else runs at one per clock.
* **Instruction count.** The original speaks of a 35-instruction set but does
  not list it. This design implements the 17 instructions above.
* **Memories.** The original calls the processor "Von Neumann" but draws a
  separate instruction memory and data memory. This design follows the
  drawings and has two memories.
* **Accumulator.** One passage says results always go to an accumulator. The
  datapath drawings show a register file. This design uses the register file,
  and the destination register plays the accumulator's role.
* **Instruction width.** One passage speaks of an 8-bit instruction. The fetch
  unit adds 4 to the PC and uses byte addressing, and the immediate is
  instruction bits [7:0]. This design uses 32-bit words.
* **Not built.** The original also shows the block diagram of a PIC16F84A
  microcontroller: 1K × 14 flash, an 8-level stack, 68 × 8 file registers,
  a 64 × 8 EEPROM, TMR0, I/O ports, watchdog and power-on circuits. No
  function is given for any of these. Only its timing generator appears here.
* **Single-cycle version.** A single-cycle version of the processor is
  mentioned only as the starting point for the pipelined one, and is not
  provided.

Choices that are entirely this design's own: the opcode and funct values, the
widths of the PC (8 bits) and of the memories, 32 registers with register 0
fixed to zero, the ALU operation list, one-place shifts with zero fill, the
rotate amount taken from shamt, the jump target format, the reset values (PC,
registers and pipeline cleared; memories not cleared), the program-load port
and the hazard handling.

## How far it is tested

Each module has a testbench in `tb/` that compares its outputs with values
computed independently in the testbench. Examples:

* The ALU, shifter, rotator, control unit and ALU-control decoder are checked
  exhaustively or over corner and random values.
* The register file, memories, fetch and decode units are checked against
  model arrays over thousands of random cycles.

`tb/tb_risc8_top.sv` runs the full processor at its default sizes. It contains
a one-instruction-at-a-time model of the instruction set. It runs a directed
program: a counting loop with a backward branch, a load used immediately,
shifts, rotates and stores. It then runs 39 random programs with forward
branches and jumps. For every program it checks:

* every register write, in order;
* the final register file and all 256 data bytes;
* the three-cycle latency and the D + 2R cycle count.

It also counts how often each mechanism occurs and fails if any of them never
occurs: forwarding, forwarding of a loaded value, write-through, taken and
untaken branches, jumps, loads, stores, shifter and rotator.

Not verified: behaviour on an FPGA, timing closure, and anything about area or
power.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/risc8_pkg.sv tb/tb_risc8_top.sv \
          --top-module tb_risc8_top -o sim
./obj_dir/sim
```

Replace `tb_risc8_top` with any other `tb_<module>`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

Writing a program: hold `rst` high, write each word with `prog_we`,
`prog_addr` (word address) and `prog_data`, then release `rst`. The encoder
functions `r_op`, `i_op` and `j_op` in `tb/tb_risc8_top.sv` show how to build
the words.

## Changing it

* `DATA_W` sets the datapath width; the barrel rotator needs a power of two.
* `PC_W` sets the PC width; the instruction memory has 2^(PC_W−2) words.
* `NREGS` sets the number of registers, at most 32 with 5-bit register fields.
* `DMEM_WORDS` sets the data memory size; addresses are the low bits of the
  execute result.
* New instructions go in `control_unit` (new opcode) or `alu_control` (new
  funct). Codes go in `risc8_pkg`.
* A memory with a registered read would need a load-use stall, which the
  pipeline does not have now.
