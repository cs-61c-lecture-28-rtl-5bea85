# MIPS-lite single-cycle processor

This is a processor for a six-instruction subset of MIPS ("MIPS-lite"):
`addu`, `subu`, `ori`, `lw`, `sw` and `beq`. It finishes every instruction
in one long clock cycle. Each instruction passes through five stages:

1. instruction fetch
2. decode and register read
3. execute (ALU)
4. memory access
5. register write

None of these stages has a register of its own. Within a cycle they form one
block of combinational logic, which starts at the program counter (PC) and
ends at the inputs of the three state elements: the register file, the data
memory and the PC. All three are updated together at the next rising clock
edge. So the CPI is exactly 1. In return, the clock period must be long enough
for the slowest instruction, a load, to get through all five stages.

The design has two parts:

- The **datapath**: the storage elements and the arithmetic units, wired so
  that they can make every register transfer the subset needs.
- The **control unit**: it decodes the current instruction and sets the
  control points of the datapath, so that the right transfers happen in this
  cycle.

## Instruction subset

All instructions are 32 bits long. Two formats are used:

```
R-type  | op 31:26 | rs 25:21 | rt 20:16 | rd 15:11 | shamt 10:6 | funct 5:0 |
I-type  | op 31:26 | rs 25:21 | rt 20:16 |            imm16 15:0              |
```

| instruction        | op   | funct | register transfer (PC <- PC + 4 unless noted) |
|--------------------|------|-------|------------------------------------------------|
| `addu rd,rs,rt`    | 0x00 | 0x21  | R[rd] <- R[rs] + R[rt]                         |
| `subu rd,rs,rt`    | 0x00 | 0x23  | R[rd] <- R[rs] - R[rt]                         |
| `ori rt,rs,imm16`  | 0x0d |       | R[rt] <- R[rs] \| zero_ext(imm16)              |
| `lw rt,imm16(rs)`  | 0x23 |       | R[rt] <- MEM[R[rs] + sign_ext(imm16)]          |
| `sw rt,imm16(rs)`  | 0x2b |       | MEM[R[rs] + sign_ext(imm16)] <- R[rt]          |
| `beq rs,rt,imm16`  | 0x04 |       | if R[rs] == R[rt]: PC <- PC + 4 + (sign_ext(imm16) << 2) |

The opcode and funct numbers are the standard MIPS encodings. They are
defined once, in `rtl/mips_pkg.sv`. Any other instruction word is a
no-operation: it writes nothing and advances the PC by 4. An all-zero word is
one such no-operation.

## Datapath

```
            +------------------ next address logic ------------------+
            |  PC+4 adder ---+--------------------------> mux 0      |
            |                +--> branch adder <- PC Ext  mux 1 -----+--> PC (bits 31:2, bits 1:0 = 00)
            |                        (sign_ext(imm16) || 00)   ^ nPC_sel   |
            +--------------------------------------------------|---------+
                                                               |     instruction memory <- PC
 instruction: rs -> Ra, rt -> Rb, (RegDst ? rd : rt) -> Rw      |
                                                               |
   register file --busA--------------------------> ALU A       |
                 --busB--+-----------------------> ALUSrc 0    |
                         |  extender(imm16, ExtOp) ALUSrc 1 --> ALU B
                         |                                     ALU --Equal--> control
                         +--> data memory Data In              ALU result --> data memory address
                                                               ALU result --> MemtoReg 0
                                            data memory Data Out --> MemtoReg 1 --> busW --> register file
```

The blocks:

- **Register file** (`regfile`): 32 registers of 32 bits. It has two read
  ports and one write port. `ra` selects the register on `bus_a` and `rb` the
  one on `bus_b`. Reads are combinational, so a new address shows on its bus
  after the access time, with no clock. A write of `bus_w` into register `rw`
  happens at the rising edge when `write_en` (RegWr) is 1. Register 0 always
  reads as zero.
- **ALU** (`alu`): add, subtract and OR, which is what MIPS-lite needs. It
  also does AND and signed set-less-than, the other operations of the full
  MIPS ALU. Add and subtract share one adder: subtract is `a + ~b + 1`.
  `equal` is 1 when the result is zero. The ALU has no separate comparator:
  `beq` subtracts and looks at `equal`.
- **Extender** (`extender`): widens `imm16` to 32 bits. It sign-extends when
  ExtOp = 1 (`lw`, `sw`) and zero-extends when ExtOp = 0 (`ori`).
- **Data memory** (`data_memory`): an idealized memory. It has one data-in
  bus and one data-out bus. The address selects the word on `data_out`
  combinationally, and a write happens at the rising edge when `write_en`
  (MemWr) is 1. The clock matters only for writes.
- **Instruction fetch unit** (`ifetch_unit`): the PC, the next address logic
  (`next_addr_logic`) and a read-only instruction memory (`inst_memory`).
  - The PC register keeps only bits 31:2. Bits 1:0 are wired to `00`.
  - The next address logic has one adder for PC + 4. A second adder adds the
    branch offset, which is `sign_ext(imm16)` followed by two zero bits.
  - A multiplexer, steered by nPC_sel, picks between the two.
- **Building blocks**: `adder` (with carry in and carry out), `mux2` and
  `wen_register` (an N-bit register with a write enable). The datapath uses
  `mux2` three times, for RegDst, ALUSrc and MemtoReg. At each of these
  multiplexers, select 0 picks the first input named below:
  - RegDst: rt or rd.
  - ALUSrc: busB or the extended immediate.
  - MemtoReg: the ALU result or the memory data.

## Control

`control_unit` is a combinational decoder. It reads `op`, `funct` and the
ALU's `equal` flag and drives the control points listed below. Their values
follow from the register transfer of each instruction:

| instr | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|--------|-------|-------|--------|--------|-------|----------|---------|
| addu  | rd     | 1     | -     | busB   | ADD    | 0     | ALU      | +4      |
| subu  | rd     | 1     | -     | busB   | SUB    | 0     | ALU      | +4      |
| ori   | rt     | 1     | zero  | imm    | OR     | 0     | ALU      | +4      |
| lw    | rt     | 1     | sign  | imm    | ADD    | 0     | memory   | +4      |
| sw    | -      | 0     | sign  | imm    | ADD    | 1     | -        | +4      |
| beq   | -      | 0     | -     | busB   | SUB    | 0     | -        | branch if equal |

A "-" means the value does not matter, and the decoder drives it to 0.

The branch is the one place where control depends on data. The decoder first
produces the control bundle (`ctrl_t`), which includes a `branch` bit. That
bundle sets up the ALU to subtract. The ALU's `equal` flag then comes back to
the decoder, which sets `npc_sel = branch & equal`. `npc_sel` is a separate
output, kept out of the bundle, so that the path from the bundle through the
ALU and back is not mistaken for a combinational loop. A taken branch costs
no extra cycle, because the next PC is already settled by the clock edge.

## Timing within a cycle

A load shows the longest path through one cycle:

1. The PC changes after the clock edge (clock-to-Q delay).
2. The instruction memory's access time passes, and the fields rs, rt, rd,
   op and funct become valid.
3. The decoder's delay passes (ALUctr, ALUSrc, ...). In parallel, the
   register file's access time passes (busA, busB).
4. The extender and the ALUSrc multiplexer settle, then the ALU's delay
   passes.
5. The data memory's access time passes, then the MemtoReg multiplexer
   settles and busW is valid.
6. busW must arrive before the register file's setup time at the next edge.

At that edge the register write, the memory write and the PC update all
happen together. A value written to a register in one cycle can be read in
the next cycle. Because reads are combinational and writes happen on the
edge, an instruction that reads and writes the same register (for example
`addu $1,$1,$1`) reads the old value.

## Module hierarchy and interfaces

```
mips_lite_cpu
  ifetch_unit
    wen_register (PC, 30 bits)
    next_addr_logic
      adder (PC + 4), adder (branch target), mux2
    inst_memory
  control_unit
  mux2 (RegDst, 5 bits)
  regfile
  extender
  mux2 (ALUSrc)
  alu
    adder
  data_memory
  mux2 (MemtoReg)
```

`mips_pkg` holds the widths, the opcode and funct values, the `aluctr_e` and
`npc_sel_e` enumerations, the `ctrl_t` control bundle, and the `rtype_t` and
`itype_t` instruction field structs.

The top-level module, `mips_lite_cpu`, has these parameters:

- `IMEM_DEPTH`: instruction memory depth in words. Default 1024.
- `DMEM_DEPTH`: data memory depth in words. Default 1024.
- `INIT_FILE`: a `$readmemh` file for the instruction memory. Default empty.
- `RESET_PC`: the PC value after reset. Default 0.

Its ports:

- `clk`: the clock.
- `rst`: a synchronous, active-high reset. It loads `RESET_PC` into the PC
  and clears all registers. The data memory is not cleared.
- Observation outputs, which let the surroundings watch the machine:
  - `pc` and `instr`: the instruction that is executing.
  - `reg_wr`, `reg_wr_addr` and `reg_wr_data`: the register write that
    happens at the end of this cycle.
  - `mem_wr`, `mem_addr` and `mem_wr_data`: the memory write that happens at
    the end of this cycle.

Memories use word addresses: the index is `addr[log2(DEPTH)+1:2]`. The two
lowest address bits are ignored, and higher address bits wrap around.

If `INIT_FILE` is empty, the instruction memory holds only zeros. A synthesis
tool will then reduce the processor to almost nothing, because it executes
only no-operations. To get a real netlist, give a program file.

## What is given and what is chosen

These parts follow the usual textbook single-cycle MIPS-lite organization:

- the subset and its register transfers
- the instruction formats
- the set of datapath components and the connections between them
- the names of the control points
- the `00` low bits of the PC
- the register file's interface (32 x 32 bits, RA/RB/RW, busA/busB/busW)
- the behaviour of the idealized memory and of the write-enabled register
- the one-cycle-per-instruction timing, with every state element on the same
  clock edge

These are this design's own choices:

- **Encodings.** The opcode and funct numbers are the standard MIPS values.
  The ALUctr encoding and the layout of the control bundle are arbitrary.
- **Polarities.** ExtOp = 1 means sign extension. At each 2-input
  multiplexer, select 0 picks the input listed first in the table above.
- **Control table.** The values in the control table were derived from the
  register transfers. Undecoded instructions are no-operations.
- **Branch condition.** `nPC_sel = branch & equal`.
- **Register 0** reads as zero, as MIPS `$zero` does.
- **Reset.** The reset is synchronous and active high. It sets PC = 0 and
  clears all registers.
- **Memory sizes.** Each memory is 1024 words (4 KiB). Addresses wrap. The
  instruction memory is loaded by `$readmemh`.
- **ALU extras.** AND and set-less-than are included, and set-less-than is
  signed. No overflow flag is produced, because `addu` and `subu` ignore
  overflow.
- **Observation ports** on the top-level module.

Not built:

- **Jumps.** The J-type format is listed for completeness, but `j` is not
  part of MIPS-lite.
- **A multi-cycle version.** That alternative runs one stage per shorter
  cycle.
- **Input/output devices.** A complete computer has them, but this processor
  has no instructions to reach them.

## Simulating

Every testbench checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog, which counts a
failure and stops the run if it hangs. Build and run one testbench with
Verilator 5 from the project root:

```
verilator --binary --timing --top-module tb_mips_lite_cpu -Irtl -Itb -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_mips_lite_cpu.sv -o sim && ./obj_dir/sim
```

For another testbench, replace `tb_mips_lite_cpu` with its name. Run
`tb_inst_memory` from the project root, because it reads
`tb/imem_test.hex` by a relative path.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_mips_lite_cpu`   | The whole processor at default sizes. An instruction-level reference model in the testbench runs the same program, and after every cycle the PC and all 32 registers are compared with it. Before each edge, the register write (RegWr, Rw and busW) and any store must already match the model's. The final data memory is compared too. There is one hand-written loop program, whose cycle count must equal its instruction count (70) and whose final values are also checked against constants. There are then 40 random programs of 300 instructions. It counts each mechanism and fails if any never happens: each instruction, a taken and an untaken branch, a backward branch, a no-operation, a dropped write to $0, a negative memory offset, and `ori` with imm16 bit 15 set. |
| `tb_control_unit`    | Every control point for each instruction, with `equal` both 0 and 1. That every other opcode and funct is a no-operation. |
| `tb_ifetch_unit`     | The fetched word matches the PC. The PC after each edge for random nPC_sel and offsets. Reset address. Word alignment. |
| `tb_next_addr_logic` | PC + 4 and the branch target, including the largest offsets and wrap-around. |
| `tb_regfile`         | Random reads and writes against a reference array. The write is visible only after the edge. Register 0 stays zero. Reset. |
| `tb_data_memory`     | Combinational read. A write happens only at the edge and only when enabled. The low address bits are ignored. |
| `tb_inst_memory`     | Loading from a file (word i = `(i * 0x10000001) ^ (i * 0x01010101)`). Unloaded words read as zero. Wrap-around. |
| `tb_alu`             | Every operation on corner and random operands. The `equal` flag. |
| `tb_extender`, `tb_adder`, `tb_mux2`, `tb_wen_register` | Each block against a reference expression. |

The testbenches load programs and preset memories through hierarchical
references:

- `dut.u_ifetch.u_imem.mem`
- `dut.u_dmem.mem`
- `dut.u_regfile.regs`

If you rename those instances, update the testbenches to match.

Verilator's lint with `-Wall` reports only unused signals or bits. These are
the carry-outs of the PC adders, the instruction bits that a given field
view does not use, and the memory address bits outside the word index.
