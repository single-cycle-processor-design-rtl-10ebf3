# A single-cycle MIPS-subset processor

This is a processor that executes every instruction in exactly one clock
cycle. There is no pipeline, no multi-step controller and no stall: the
program counter addresses the instruction memory, and everything that
follows — register read, sign or zero extension, ALU operation, data memory
access, write-back selection and next-PC computation — is one combinational
path that settles before the next rising clock edge. On that edge the PC,
the destination register and (for a store) one data memory word are updated
together. CPI is 1 by construction; the price is a clock period as long as
the slowest instruction, which is the load.

It implements sixteen MIPS instructions:

| class      | instructions                        | encoding (op / funct)                         |
|------------|-------------------------------------|-----------------------------------------------|
| R-type ALU | add, sub, and, or, xor, slt         | op 0x00, funct 0x20 0x22 0x24 0x25 0x26 0x2a  |
| I-type ALU | addi, slti, andi, ori, xori         | op 0x08 0x0a 0x0c 0x0d 0x0e                   |
| memory     | lw, sw                              | op 0x23, 0x2b                                 |
| branch     | beq, bne                            | op 0x04, 0x05                                 |
| jump       | j                                   | op 0x02                                       |

There are 32 general registers of 32 bits, with R0 hard-wired to zero, and
separate instruction and data memories (Harvard organisation).

## Datapath

```
         +-----+     +-------------+   Rs,Rt   +----------+  BusA  +-----+  result  +--------+
  PC --->| IM  |---->| instruction |---------->| register |------->|     |--------->|  data  |--+
  ^  |   +-----+     |   fields    |  RW (Rt   |   file   |  BusB  | ALU |          | memory |  |
  |  |               +-------------+   or Rd)  |          |--+---->|     |          +--------+  |
  |  +--> +1 --+          | imm16            +----------+  |  ^   +-----+             |      |
  |            |          v                      ^ BusW    |  |ALUSrc mux           |      |
  |            |      extender ------------------+---------+--+                     v      |
  |            v                                 +------------- MemtoReg mux <------+------+
  +---- PCSrc mux <---- next PC (branch adder, jump concatenation, PCSrc logic)
```

The PC register holds only bits [31:2] of the address (30 bits): word
alignment makes the low two bits always 00, so the incrementer and the
branch adder work on 30-bit word addresses, and "PC + 4" is "+1".

Four 2-to-1 multiplexers steer the data:

| mux      | select   | 0                     | 1                          |
|----------|----------|-----------------------|----------------------------|
| RegDst   | RegDst   | Rt is written         | Rd is written              |
| ALUSrc   | ALUSrc   | BusB                  | extended immediate         |
| MemtoReg | MemtoReg | ALU result on BusW    | memory data on BusW        |
| PCSrc    | PCSrc    | PC + 4                | branch or jump target      |

### Next PC

`next_pc` computes both possible targets and the PC multiplexer select:

* branch target = (PC + 4) + 4 × sign_extend(imm16), i.e. on word addresses
  `inc_pc + sign_extend30(imm16)`;
* jump target = {(PC + 4)[31:28], imm26, 00};
* `PCSrc = J | (Beq & Zero) | (Bne & ~Zero)`.

For a branch the main control asks the ALU for a subtraction of Rt from Rs,
and the ALU's zero flag decides the branch. Note that the upper four bits of
a jump target come from the *incremented* PC, not from the PC itself; the
two differ only for a jump in the last word of a 256 MB region.

### Register file

Two read ports and one write port. Reads are combinational. Each read port
is built as a tri-state bus: every register drives BusA and BusB through its
own tri-state buffer, and a decoder of the read address enables exactly one
buffer per bus. Register 0 has no storage; its buffer slot drives the
constant 0, and writes to it are dropped. Writes happen on the rising edge
when RegWrite is 1. Because all state changes on one edge, an instruction
can read a register and write the same register in the same cycle.

Tools that do not resolve tri-state buses (for example a generic synthesis
flow without tri-state mapping) report the two buses as nets with several
drivers. That is expected: one driver is enabled at a time.

### ALU

The ALU has four units working in parallel and a 4-way result multiplexer:

| unit       | select (`sel`) | operations and their codes                      |
|------------|----------------|-------------------------------------------------|
| shifter    | 00             | none 00, SLL 01, SRL 10, SRA 11 (`shift_op`)    |
| SLT        | 01             | uses the adder in SUB mode                      |
| arithmetic | 10             | ADD (`sub` = 0), SUB (`sub` = 1)                |
| logic      | 11             | AND 00, OR 01, NOR 10, XOR 11 (`logic_op`)      |

Subtraction is A + ~B + 1: B passes through XOR gates driven by `sub`, which
is also the carry in. SLT takes `sign XOR overflow` of A − B, so it is
correct even when the subtraction overflows (for example
0x8000_0000 < 0x7fff_ffff). `zero` is the NOR of all result bits;
`overflow` is the two's-complement overflow of the adder. The processor does
not use `overflow` (there are no exceptions), and no instruction of the
subset selects the shifter or NOR; both are there and tested.

The shifter shifts B by A[4:0]. Which operand is shifted and which supplies
the amount is this design's choice.

### Extender

Lower 16 bits are the immediate; each upper bit is `ExtOp AND imm16[15]`.
ExtOp = 1 sign-extends (addi, slti, lw, sw), ExtOp = 0 zero-extends (andi,
ori, xori).

## Control

Control is split in two levels: the **main control** decodes only the
opcode; the **ALU control** combines the main control's ALUOp with the
funct field.

### Main control

| op     | RegDst | RegWrite | ExtOp | ALUSrc | ALUOp  | Beq | Bne | J | MemRead | MemWrite | MemtoReg |
|--------|--------|----------|-------|--------|--------|-----|-----|---|---------|----------|----------|
| R-type | 1 (Rd) | 1        | 1     | 0      | R-type | 0   | 0   | 0 | 0       | 0        | 0        |
| addi   | 0 (Rt) | 1        | 1     | 1      | ADD    | 0   | 0   | 0 | 0       | 0        | 0        |
| slti   | 0      | 1        | 1     | 1      | SLT    | 0   | 0   | 0 | 0       | 0        | 0        |
| andi   | 0      | 1        | 0     | 1      | AND    | 0   | 0   | 0 | 0       | 0        | 0        |
| ori    | 0      | 1        | 0     | 1      | OR     | 0   | 0   | 0 | 0       | 0        | 0        |
| xori   | 0      | 1        | 0     | 1      | XOR    | 0   | 0   | 0 | 0       | 0        | 0        |
| lw     | 0      | 1        | 1     | 1      | ADD    | 0   | 0   | 0 | 1       | 0        | 1        |
| sw     | 0      | 0        | 1     | 1      | ADD    | 0   | 0   | 0 | 0       | 1        | 0        |
| beq    | 0      | 0        | 1     | 0      | SUB    | 1   | 0   | 0 | 0       | 0        | 0        |
| bne    | 0      | 0        | 1     | 0      | SUB    | 0   | 1   | 0 | 0       | 0        | 0        |
| j      | 0      | 0        | 1     | 1      | ADD    | 0   | 0   | 1 | 0       | 0        | 0        |

Many of these entries are don't-cares for the instruction concerned (RegDst
of a store, ExtOp of a branch, ...); the table shows what the logic
equations actually produce:

```
RegDst   = R-type
RegWrite = R-type + addi + slti + andi + ori + xori + lw
ExtOp    = not (andi + ori + xori)
ALUSrc   = not (R-type + beq + bne)
MemRead  = lw     MemWrite = sw     MemtoReg = lw
Beq = beq   Bne = bne   J = j
```

An opcode outside the subset writes nothing, branches nowhere and simply
falls through to PC + 4.

### ALU control

ALUCtrl is 4 bits and equals the low four bits of the funct code of the
matching R-type instruction: ADD 0000, SUB 0010, AND 0100, OR 0101,
XOR 0110, SLT 1010. For R-type instructions the ALU control copies
funct[3:0]; otherwise ALUOp names the operation. `mips_pkg::alu_fields`
translates an ALUCtrl code into the ALU's select fields (for example
XOR 0110 becomes `sel` = logic, `logic_op` = 11). ALUOp is a 3-bit
enumeration of this design's own.

## Timing

All state is updated on the rising edge. The critical path is the load:

```
PC clk-to-q + instruction memory + max(register read, control + extender + ALUSrc mux)
  + 32-bit ALU add + data memory read + MemtoReg mux + register setup (+ clock skew)
```

Other instruction classes use a prefix of this path (store and ALU
instructions skip one memory or the write-back; a branch stops after the
ALU; a jump needs only fetch and decode), but the clock must fit the load.
With illustrative delays of 200 ps per memory, 180 ps for the ALU and
150 ps for register read or write, the load takes 880 ps against 680 ps for
an ALU instruction and 300 ps for a jump.

## Where this RTL departs from the textbook design

The datapath, the control table, the ALU structure, the extender, the
next-PC logic and the register file organisation are those of the classic
single-cycle MIPS design this follows. The following are choices or
changes made here:

* **Register write:** the textbook register file gates the clock of each
  register with RegWrite and the decoded write address. Here every
  register is an ordinary edge-triggered flip-flop with a write enable,
  which stores the same values without a gated clock.
* **Jump target:** the upper four bits come from PC + 4 (as in the next-PC
  circuit), not from the PC itself; see "Next PC".
* **RegWrite equation:** written as the OR of the writing instructions
  instead of "not (sw + beq + bne + j)". Both agree on the sixteen
  instructions; the form used makes undefined opcodes harmless.
* **Unsupported R-type funct codes** pass their low four bits to the ALU
  control unchanged; codes the ALU does not know execute as ADD.
* **Reset, memory sizes, memory loading and the observation ports** are
  additions (see below); the textbook design does not specify them.
* **ALUOp width and encoding** (3 bits) and the **shifter operand order**
  are this design's own.
* The ALU's **overflow** output is produced but not used.

## Reset and memories (this design's choices)

* `rst` is synchronous and active high. It loads the PC with `RESET_PC`
  (default 0) and, while held, suppresses register and memory writes so
  that whatever word the PC points at during reset has no effect.
  Registers and memories themselves are not cleared.
* Both memories hold 1024 words by default (`IMEM_WORDS`, `DMEM_WORDS`).
  Addresses are byte addresses; the low two bits and the bits above the
  memory size are ignored, so the memory repeats through the address
  space.
* The instruction memory reads combinationally and is never written by the
  datapath. The data memory reads combinationally while MemRead is 1
  (and outputs 0 otherwise) and writes on the rising edge while MemWrite
  is 1.
* Programs and initial data are loaded with `$readmemh` from `IMEM_INIT` /
  `DMEM_INIT` (one hex word per line), or placed directly by a testbench.
* The top also brings out what it does each cycle — `pc`, `instr`,
  `reg_we`/`reg_waddr`/`reg_wdata`, `mem_we`/`mem_addr`/`mem_wdata` — for
  observation only.

## Files

| file                      | contents                                                |
|---------------------------|---------------------------------------------------------|
| `rtl/mips_pkg.sv`         | opcodes, funct codes, ALUCtrl/ALUOp enums, control struct, `alu_fields` |
| `rtl/mips_single_cycle.sv`| top: datapath and control wired together                |
| `rtl/main_control.sv`     | opcode decoder and control equations                    |
| `rtl/alu_control.sv`      | ALUOp + funct → ALUCtrl                                  |
| `rtl/alu.sv`              | multifunction ALU                                       |
| `rtl/shifter.sv`          | 32-bit shifter used by the ALU                          |
| `rtl/register_file.sv`    | 32 × 32 register file with tri-state read buses         |
| `rtl/tristate_buffer.sv`  | tri-state buffer                                        |
| `rtl/register_en.sv`      | register with write enable (the PC)                      |
| `rtl/extender.sv`         | immediate sign/zero extender                            |
| `rtl/next_pc.sv`          | branch/jump target and PCSrc                            |
| `rtl/adder.sv`, `rtl/mux2.sv` | adder and 2-to-1 multiplexer                        |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | memories                                    |
| `tb/tb_<module>.sv`       | one self-checking testbench per module                  |
| `tb/imem_test.hex`        | eight words used to test `$readmemh` loading             |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mips_single_cycle \
    -y rtl -y tb +libext+.sv -Irtl rtl/mips_pkg.sv tb/tb_mips_single_cycle.sv
./obj_dir/Vtb_mips_single_cycle
```

Replace the top-module and file name for any other testbench; the package
must come first. `tb_instr_mem` reads `tb/imem_test.hex` by a path relative
to the directory the simulator is started from.

`tb_mips_single_cycle` runs the processor with all parameters at their
defaults against an instruction-set model written inside the testbench,
comparing PC, instruction, register write and memory write every cycle and
the full register file and data memory at the end of each program:

1. a small hand-assembled program that stores 10..1 to memory, loads and
   sums them and stores the sum; it checks the sum (55) and that the final
   store happens on cycle 104, i.e. one instruction per cycle;
2. twelve random programs filling the instruction memory, drawn with an
   instruction mix of 40 % ALU, 20 % loads, 10 % stores, 20 % branches and
   10 % jumps, 3000 cycles each.

It counts and requires every instruction, taken and not-taken `beq` and
`bne`, sign and zero extension of a negative immediate, a dropped write to
R0 and `slt`/`slti` producing 1, and checks that retired instructions equal
cycles.

`tb_instruction_mix` runs exactly that mix as one straight-line program of
1000 instructions (branch offsets of 0 and jumps to the next word keep
control flowing forward whether a branch is taken or not), checks it
against the same kind of model, checks that it finishes in exactly 1000
cycles, and works out the textbook comparison for the mix: 1000 × 880 ps
single-cycle against 3800 × 200 ps multicycle, a speedup of about 1.16.

## Changing it

* Adding an R-type instruction whose funct low bits do not collide with the
  existing codes: add the funct code and ALUCtrl code to `mips_pkg`, and a
  line to `alu_fields`. Shifts (funct 0x00/0x02/0x03) collide with ADD/SUB
  under the "low four bits of funct" rule and need a wider ALUCtrl.
* Adding an I-type instruction: a decoder line and equation terms in
  `main_control`, possibly a new ALUOp value.
* The testbench's model (`model_step` in `tb_mips_single_cycle.sv`) must be
  extended alongside.
