# A single-cycle RV32I processor

This is a RISC-V processor with 32-bit registers that completes one whole instruction on every rising clock edge. Nothing is pipelined and nothing is overlapped. In one clock period the program counter reads the instruction memory. The instruction is decoded, two registers are read, the ALU computes, and the data memory is read. At the edge the PC, the register file and the data memory all take their new values together. The clock period must therefore cover the longest path: load word, through instruction memory, register file, ALU, data memory and the write-back mux back to the register file.

The design is the textbook "first design" of a RISC-V core, built up one instruction class at a time:

1. `add`/`sub` need a register file, an ALU and a PC that steps by 4.
2. `addi` and the other register-immediate instructions add an immediate generator and a mux (BSel) in front of the ALU's second operand.
3. `lw` adds the data memory, addressed by the ALU, and a write-back mux (WBSel) that picks between the ALU result and the loaded value.
4. `sw` routes the second register operand to the data memory's write data and adds the S-format immediate.

The RTL carries the same construction through to the whole of each class.

## What it executes

| class | instructions | opcode |
|---|---|---|
| register-register | add, sub, sll, slt, sltu, xor, srl, sra, or, and | 0110011 |
| register-immediate | addi, slti, sltiu, xori, ori, andi, slli, srli, srai | 0010011 |
| loads | lb, lh, lw, lbu, lhu | 0000011 |
| stores | sb, sh, sw | 0100011 |

Not built: branches, `jal`, `jalr`, `lui`, `auipc`, `fence`, `ecall`/`ebreak` and CSR instructions. Those need a next-PC mux, a branch comparator and the B, U and J immediate formats, and that hardware is not part of this datapath. Any such word, and any encoding of the four classes that RV32I leaves undefined (for example funct7 = 0100000 on `sll`), raises the `illegal` output. It then executes as a no-op: no register is written, memory is not written, and the PC moves on by 4. A real core would trap here. This one only flags the instruction.

## The datapath

```
PC ──► IMEM ──► inst
         inst[19:15] ─► Reg[] AddrA ─► Reg[rs1] ───────────────────► ALU a
         inst[24:20] ─► Reg[] AddrB ─► Reg[rs2] ─► BSel 0 ─┐
         inst[31:7]  ─► Imm.Gen (ImmSel) ─► imm ─► BSel 1 ─┴──────► ALU b
         inst[11:7]  ─► Reg[] AddrD
ALU (ALUSel) ─► alu ─► DMEM address, and WBSel 1
Reg[rs2] ─► store_align ─► DMEM write data + byte mask   (MemRW = Write)
DMEM word ─► load_ext ─► mem ─► WBSel 0
WBSel mux ─► wb ─► Reg[] DataD   (written at the edge when RegWEn = 1)
PC ─► +4 ─► PC   (loaded at the edge)
```

Mux inputs are numbered as in the control word:

- BSel: 0 is `Reg[rs2]`, 1 is the immediate.
- WBSel: 0 is the loaded value, 1 is the ALU result.

The register fields sit at fixed positions in every format (rd = inst[11:7], rs1 = inst[19:15], rs2 = inst[24:20]). The register file is therefore wired straight to the instruction, with no muxes.

### Control word

The controller (`riscv_control`) is pure combinational decoding of the instruction. It produces a `ctrl_t` struct, defined in `riscv_pkg`:

| instruction | RegWEn | ImmSel | BSel | ALUSel | MemRW | WBSel |
|---|---|---|---|---|---|---|
| R-type | 1 | – | 0 (rs2) | from funct3, with inst[30] choosing sub/sra | Read | 1 (alu) |
| I-type arithmetic | 1 | I | 1 (imm) | from funct3, with inst[30] choosing srai | Read | 1 (alu) |
| loads | 1 | I | 1 (imm) | add | Read | 0 (mem) |
| stores | 0 | S | 1 (imm) | add | Write | don't care |
| illegal | 0 | – | – | – | Read | – |

Two details are easy to miss:

- **inst[30] is the add/sub bit**, and the same bit separates `srl` from `sra`.
- **`addi` ignores inst[30]**, because for `addi` that bit is part of the immediate. For `srai`, inst[30] sits in the upper immediate bits but acts as the funct7 selector.

The control word also carries funct3 (`mem_f3`), which tells the load and store byte-lane logic the access width.

### The immediate generator

The I and S formats both keep the immediate's sign in inst[31] and bits 10..5 in inst[30:25]. They differ only in where the low five bits sit:

- I-format: inst[24:20]
- S-format: inst[11:7]

So the generator is 21 copies of inst[31], six wires, and one 5-bit two-way mux driven by ImmSel:

```
imm = { {21{inst[31]}}, inst[30:25], ImmSel==S ? inst[11:7] : inst[24:20] }
```

Examples:

- `addi x15, x1, -50` has inst[31:20] = 111111001110, giving imm = 0xFFFFFFCE.
- `sw x14, 8(x2)` has offset[11:5] = 0 and offset[4:0] = 01000, giving imm = 8.

### Memories and byte lanes

Both memories are arrays of 32-bit words indexed by byte address divided by 4. Upper address bits beyond the memory size are ignored, so addresses wrap. Both have the same timing:

- **Reads are combinational**: the address in, the word out, with no clock.
- **Writes happen at the rising edge.**

This read-without-clock timing is what lets a whole instruction fit in one cycle.

Data memory is byte-addressed, but it stores words. Two small blocks sit between it and the rest of the datapath:

- **`store_align`** copies the low byte of `Reg[rs2]` onto all four lanes for `sb`, or the low halfword onto both halves for `sh`. It then sets a write mask that enables only the addressed lane(s).
- **`load_ext`** takes the addressed byte (addr[1:0]) or halfword (addr[1]) out of the word. It sign-extends that value for `lb`/`lh` and zero-extends it for `lbu`/`lhu`. For `lw` the word passes unchanged.

Byte order is little-endian. Misaligned halfword and word accesses are not trapped. A halfword access uses addr[1] only, and a word access ignores addr[1:0].

## Timing, reset and program loading

- **Clock:** all state updates on the rising edge. A value written to a register is visible to the next instruction. A register read in the same cycle as its write returns the old value.
- **Reset:** `rst` is synchronous and active high. It sets the PC to `RESET_PC`, which defaults to 0. The registers and data memory are not cleared. While `rst` is high the data-memory write enable is forced off, so an instruction fetched from an unloaded memory cannot write anything.
- **Program loading:** the instruction memory is read-only to the processor. `riscv_top` gives it a load port (`prog_we`, `prog_addr`, `prog_data`), which writes one word per clock. Hold `rst`, load the program, then release `rst`. The instruction at `RESET_PC` runs in the first cycle after release.
- **Throughput:** one instruction per cycle, always. `N` instructions take `N` clock edges. There are no stalls, because there is nothing to stall against.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| riscv_top | `XLEN` | 32 | data path width (RV32) |
| riscv_top | `IMEM_WORDS` | 1024 | instruction memory size (4 KiB) |
| riscv_top | `DMEM_WORDS` | 1024 | data memory size (4 KiB) |
| riscv_top | `RESET_PC` | 0 | first instruction address |

The register file has 32 registers of 32 bits, as the ISA requires. The two memory sizes are this design's choice. In a larger system these memories would be replaced by instruction and data caches.

## What is original and what is chosen here

Taken from the standard single-cycle organisation:

- the split into datapath, controller and separate instruction and data memories;
- combinational reads and clock-edge writes;
- the PC + 4 loop;
- x0 hard-wired to zero;
- the BSel and WBSel muxes and their input numbering;
- the I/S immediate generator structure;
- the control values for add/sub, addi, lw and sw;
- the need for byte/halfword extraction with sign or zero extension on narrow loads.

Chosen here:

- reset style and PC reset value;
- memory sizes and the instruction-memory load port;
- the ALU's internals: one shared adder/subtractor and one case statement;
- the numeric ALUSel encoding;
- byte-lane write masks, which carry `sb` and `sh` (the base construction only builds `sw`);
- little-endian lanes with no misalignment trap;
- treating everything outside the four classes as a flagged no-op.

## Files

| file | what it is |
|---|---|
| `rtl/riscv_pkg.sv` | opcodes, funct3 values, `alu_op_e`, `imm_sel_e`, `mem_rw_e`, `ctrl_t` |
| `rtl/riscv_top.sv` | processor plus instruction and data memory |
| `rtl/riscv_datapath.sv` | PC, register file, immediate generator, ALU, muxes, byte-lane logic |
| `rtl/riscv_control.sv` | instruction decoder |
| `rtl/pc_reg.sv` | PC register and +4 |
| `rtl/regfile.sv` | 32 x 32 register file, 2 read ports and 1 write port |
| `rtl/imm_gen.sv` | I/S immediate generator |
| `rtl/alu.sv` | ALU |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories |
| `rtl/load_ext.sv`, `rtl/store_align.sv` | byte/halfword handling for loads and stores |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/rv_ref_pkg.sv` | instruction encoders and a reference instruction-set model used by the processor testbenches |

## Verification

Every testbench checks the block's outputs against values computed independently. Each one ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

- **Leaf blocks:** the ALU, load extraction, store steering and immediate generator testbenches compare against arithmetic reference functions. The immediate generator is swept over all 4096 offsets in both formats. The register file and memories are compared against shadow arrays. The decoder is checked against a per-instruction table of expected control values and against a list of instructions it must reject.
- **`riscv_datapath_tb`:** the testbench itself plays controller and data memory. It runs about 3000 random instructions and compares the PC, ALU result and store lanes every cycle with the reference model. It then reads all 31 registers back.
- **`riscv_top_tb`:** runs the full processor at its default sizes. It fills all 1024 instruction words with a program and runs it against the reference model. The program starts with register initialisation and the worked examples `add x1,x2,x3`, `addi x15,x1,-50`, `sw x14,8(x2)` and `lw x14,8(x2)`, followed by random instructions, including some outside the subset. The checks are:
  - the PC, instruction, `illegal` flag and ALU result, every cycle;
  - the final register file and the whole data memory;
  - that 1024 instructions took 1024 cycles;
  - that every instruction kind occurred at least once: add, sub, other R-type, immediate arithmetic, immediate shifts, each load and store width, a write to x0, and an illegal instruction.

  This testbench reaches inside the design hierarchically to preload the data memory and to read the final state.

- **`riscv_add_timing_tb`:** replays the classic two-instruction timing picture on the full processor, with `RESET_PC` = 984. At PC 1000 the processor runs `add x1,x2,x3` and at PC 1004 it runs `add x6,x7,x9`. The testbench checks PC, PC+4, the fetched instruction, the ALU value and the destination register early and late in each clock period. This shows that PC and `Reg[rd]` change only at the rising edge, while everything else settles within the period.

To simulate with Verilator 5, for example the whole processor:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Mdir obj -y rtl -y tb +libext+.sv \
    rtl/riscv_pkg.sv tb/rv_ref_pkg.sv tb/riscv_top_tb.sv --top-module riscv_top_tb -o sim
./obj/sim
```

For another block, put its testbench and `--top-module <name>_tb` in place of the top-level ones. `tb/rv_ref_pkg.sv` is only needed by `riscv_datapath_tb` and `riscv_top_tb`. Each simulation finishes in well under a second.

## Known limits

- Control flow is not implemented. Without branches and jumps, programs run straight through memory and wrap around at its end.
- Illegal instructions are not trapped, only flagged.
- Misaligned accesses are silently aligned down.
- The memories are plain arrays with combinational read. They map onto registers or distributed RAM, not onto synchronous-read SRAM macros. Using such macros would need either a second cycle per instruction or a different clocking scheme.
