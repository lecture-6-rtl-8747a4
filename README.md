# Single-cycle RISC-V datapaths

This is a single-cycle RISC-V processor. Every instruction is fetched, decoded, executed and
committed in one clock period. The PC, the register file and the data memory are the only
state, and they all update on the same rising edge. Between two edges the datapath is
combinational logic: instruction memory, register read, immediate generation, comparison, ALU,
data-memory read and write-back selection. A small set of mux selects and enables decides what
that logic does for each instruction.

The RTL holds two variants of this idea:

* **`rv32i_cpu`** is the full RV32I datapath. It has nine control fields (PCSel, ImmSel, RegWEn,
  BrUn, Asel, Bsel, ALUSel, MemRW, WBSel). It runs all RV32I arithmetic, loads and stores of every
  width, the six conditional branches, `jal`, `jalr`, `lui` and `auipc`.
* **`ph_cpu`** is a smaller 64-bit datapath. It is steered by six 1-bit controls (RegWrite,
  ALUSrc, PCSrc, MemRead, MemWrite, MemtoReg), a 2-bit ALUOp and a 4-bit ALU operation. It runs
  R-format `add/sub/and/or/slt`, `ld`, `sd` and `beq`.

`datapath_top` instantiates the two side by side. They share only `clk` and `rst`. Each has its
own ports, prefixed `rv_` and `ph_`.

## The RV32I datapath

Signal flow within one clock period (names in brackets are the control fields):

```
PC ──► IMEM ──► inst
PC ──► +4 ──► pc+4
inst[19:15], inst[24:20] ──► Reg[] ──► R[rs1], R[rs2]
inst[31:7] ──[ImmSel]──► Imm. Gen ──► imm
R[rs1], R[rs2] ──[BrUn]──► Branch Comp. ──► BrEq, BrLT ──► control
[Asel] R[rs1] | PC   ─┐
[Bsel] R[rs2] | imm  ─┴─[ALUSel]──► ALU ──► alu
alu ──► DMEM addr,  R[rs2] ──► DMEM dataW [MemRW],  DMEM dataR ──► load_extend ──► mem
[WBSel] mem | alu | pc+4 ──► Reg[] dataW, written to inst[11:7] at the edge [RegWEn]
[PCSel] pc+4 | alu ──► PC at the edge
```

Each block is its own module:

| module        | role |
|---------------|------|
| `pc_unit`     | 32-bit PC register, the +4 adder, and the PCSel mux (0 = pc+4, 1 = ALU output) |
| `imem`        | instruction memory; combinational read by `pc[11:2]`; a load port fills it |
| `regfile`     | 32 x 32 registers; reads on `inst[19:15]` and `inst[24:20]`; writes `inst[11:7]` on the rising edge when RegWEn = 1; x0 is always zero |
| `imm_gen`     | sign-extended immediate from `inst[31:7]` in the format ImmSel names (I, S, B, J, U) |
| `branch_comp` | BrEq = (A == B) and BrLT = (A < B) on R[rs1] and R[rs2]; signed unless BrUn = 1 |
| `alu`         | add, sub, and, or, xor, sll, srl, sra, slt, sltu, and "B" (pass operand B, for `lui`) |
| `dmem`        | data memory; combinational read; write on the rising edge with byte-lane enables |
| `load_extend` | picks the byte or halfword out of the loaded word and sign- or zero-extends it |
| `store_align` | places the byte or halfword of R[rs2] on the addressed lanes and sets the byte enables |
| `control`     | decodes `inst` and the branch flags into the control word `rv_pkg::ctrl_t` |

The mux input numbers are fixed. They are what `rv_pkg` documents and what the control settings
below assume:

* Asel: 0 = R[rs1], 1 = PC
* Bsel: 0 = R[rs2], 1 = imm
* WBSel: 0 = mem, 1 = alu, 2 = pc+4
* PCSel: 0 = pc+4, 1 = alu

### How each instruction class uses the datapath

The table below is the core of the design. `control.sv` implements exactly this table.

| class        | PCSel  | ImmSel | RegWEn | Asel | Bsel | ALUSel         | MemRW | WBSel |
|--------------|--------|--------|--------|------|------|----------------|-------|-------|
| R-format     | 0      | –      | 1      | 0    | 0    | funct3/funct7  | read  | alu   |
| I-format ALU | 0      | I      | 1      | 0    | 1    | funct3 (+inst[30] for srai) | read | alu |
| load         | 0      | I      | 1      | 0    | 1    | add            | read  | mem   |
| store        | 0      | S      | 0      | 0    | 1    | add            | write | –     |
| branch       | taken  | B      | 0      | 1    | 1    | add            | read  | –     |
| jal          | 1      | J      | 1      | 1    | 1    | add            | read  | pc+4  |
| jalr         | 1      | I      | 1      | 0    | 1    | add            | read  | pc+4  |
| lui          | 0      | U      | 1      | 0    | 1    | B              | read  | alu   |
| auipc        | 0      | U      | 1      | 1    | 1    | add            | read  | alu   |

All branch, jump and jal targets are computed by the main ALU, not by a separate adder:

* A branch computes PC + imm.
* `jal` computes PC + imm.
* `jalr` computes R[rs1] + imm.
* In parallel, `branch_comp` looks at R[rs1] and R[rs2].

PCSel for a branch is computed from funct3 and the two flags. BrUn = funct3[1], so it is set for
`bltu` and `bgeu`.

| branch      | taken when |
|-------------|------------|
| beq         | BrEq       |
| bne         | !BrEq      |
| blt, bltu   | BrLT       |
| bge, bgeu   | !BrLT      |

`jal` and `jalr` write pc+4, which comes from the PC adder, through the third WBSel input.

### Immediates

`imm_gen` puts the fields back together as follows. `inst[31]` is always the sign bit.

| format | immediate |
|--------|-----------|
| I      | `inst[31:20]` |
| S      | `inst[31:25] , inst[11:7]` |
| B      | `inst[31] , inst[7] , inst[30:25] , inst[11:8] , 0` (13-bit byte offset) |
| J      | `inst[31] , inst[19:12] , inst[20] , inst[30:21] , 0` (21-bit byte offset) |
| U      | `inst[31:12] , 000000000000` |

B differs from S in only two places:

* imm[11] comes from `inst[7]` instead of `inst[31]`.
* imm[0] is a constant 0 instead of `inst[7]`.

The module has an `XLEN` parameter, so the 64-bit datapath reuses it.

### Narrow loads and stores

The data memory is word-organised. For a load, the whole word is read, and `load_extend` selects
a byte or halfword from it:

* the byte is selected by `alu[1:0]`;
* the halfword is selected by `alu[1]`.

It then extends the value:

* `lb` and `lh` sign-extend;
* `lbu` and `lhu` zero-extend;
* `lw` passes the word through.

For a store, `store_align` does the reverse. It replicates the byte or halfword onto every lane
and enables only the addressed lanes. Only aligned accesses are handled, and a misaligned one is
not detected.

## The six-signal 64-bit datapath

`ph_main_control` decodes the opcode:

| instruction | ALUSrc | MemtoReg | RegWrite | MemRead | MemWrite | Branch | ALUOp |
|-------------|--------|----------|----------|---------|----------|--------|-------|
| R-format    | 0      | 0        | 1        | 0       | 0        | 0      | 10    |
| ld          | 1      | 1        | 1        | 1       | 0        | 0      | 00    |
| sd          | 1      | X (0)    | 0        | 0       | 1        | 0      | 00    |
| beq         | 0      | X (0)    | 0        | 0       | 0        | 1      | 01    |

`ph_alu_control` turns ALUOp into a 4-bit ALU operation:

* ALUOp 00 gives add.
* ALUOp 01 gives subtract.
* ALUOp 10 decodes the R-format funct fields: add 0010, sub 0110, and 0000, or 0001, slt 0111.

`ph_alu` is organised around those four bits:

* Bit 3 inverts A.
* Bit 2 inverts B and sets the adder's carry-in, which turns add into subtract.
* Bits 1:0 select and, or, sum or set-on-less-than.

This is how nor (1100) falls out as ~A & ~B. Set-on-less-than uses the sign of A − B, corrected
for overflow.

The next PC and the write-back work like this:

* PCSrc = Branch AND Zero. When it is set, the PC takes PC + imm; otherwise it takes PC + 4.
* The second ALU operand is R[rs2] or the sign-extended 12-bit immediate, depending on ALUSrc.
  The immediate comes from the I, S or B field, chosen by opcode.
* MemtoReg selects whether the ALU result or the memory data is written back.
* MemRead gates the memory data.

There is no immediate-arithmetic instruction in this datapath. Programs therefore take their
constants from data memory with `ld`.

## Interfaces and timing

Both processors have the same shape of interface:

* `clk`: all state changes on its rising edge.
* `rst`: synchronous and active high. It resets only the PC, to `RESET_PC` (default 0). Registers
  and memories are not reset; software (or the load ports) must initialise what it reads. While
  `rst` is high, no register or memory write from the datapath takes effect.
* `imem_load_en/addr/data`: writes one instruction word per clock, by word index.
* `dmem_load_en/addr/data`: writes one data word per clock, by word index. It is honoured only
  while `rst` is high, because it borrows the datapath's memory port.
* Retire trace: `pc`, `inst`, the register write about to be committed (`wb_en`, `wb_rd`,
  `wb_data`), the memory write (`st_en`, `st_addr`, `st_data`, and `st_be` for RV32I) and the
  PC-select decision (`br_taken` / `pc_src`). These are combinational during the cycle and
  commit at the next rising edge.

Throughput is one instruction per clock, with no stalls. The clock period has to cover the
longest path: IMEM read, register read, ALU, DMEM read, write-back mux and register setup.

## Parameters and sizes

| module | parameter | default | note |
|--------|-----------|---------|------|
| `rv32i_cpu` | `IMEM_DEPTH`, `DMEM_DEPTH` | 1024 words each (4 KiB) | addresses wrap modulo the size |
| `rv32i_cpu` | `RESET_PC` | 0 | |
| `ph_cpu` | `XLEN` | 64 | |
| `ph_cpu` | `IMEM_DEPTH`, `DMEM_DEPTH` | 1024 words each | 4 KiB of instructions, 8 KiB of data |
| `ph_cpu` | `RESET_PC` | 0 | |
| `datapath_top` | `RV_*_DEPTH`, `PH_*_DEPTH` | 1024 | passed down to the two processors |

All of these sizes are this implementation's choices. The 32-bit width of the RV32I datapath and
the 64-bit `ld`/`sd` of the six-signal one are given.

## What is given and what was chosen

These points follow the reference design:

* the block structure;
* the mux orderings;
* the per-instruction control settings for loads, stores, branches, `jal`, `jalr`, `lui` and
  `auipc`;
* the B/S immediate muxing;
* the branch comparator's interface;
* the narrow-load approach;
* the six-signal control table;
* the 4-bit ALU operation codes and the invert/select organisation of that ALU.

These are choices made here:

* Memory sizes, the load ports, the trace outputs and the PC-only reset.
* The ALUSel and ImmSel encodings, and the full set of RV32I ALU operations. The reference names
  only Add and B.
* The funct3/funct7 decoding, and BrUn = funct3[1].
* `sb`/`sh` support with byte enables. The reference shows only `sw`.
* The J-format bit order, which is taken from the RV32I base ISA.
* `jalr` writes R[rs1] + imm to the PC without clearing bit 0. The RV32I specification clears
  it, so software must keep `jalr` targets even.
* No traps. `fence`, `ecall`, `ebreak` and unknown opcodes act as no-ops.
* In the six-signal datapath:
  * the wiring (PCSrc = Branch AND Zero, a separate branch-target adder);
  * the R-format funct mapping;
  * `slt` through funct3 = 010.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

Most of the RV32I testing comes from two testbench packages:

* `rv_ref_pkg` is an instruction-level model written straight from the ISA.
* `rv_prog_pkg` builds the test program. It has a directed part (all instruction classes, every
  branch taken and not taken, a loop, jumps, all load/store widths), 300 random arithmetic
  instructions, and a halt loop.

`tb_rv32i_cpu` and `tb_datapath_top` compare the processor with the model on every cycle:

* PC;
* register write;
* memory write and byte lanes;
* PCSel.

They also check that each instruction took exactly one clock. `tb_ph_cpu` runs a loop that sums
10..1 and then uses and, or, slt, sd and ld. It checks the results and the cycle count, which is
53.

`tb_datapath_top` runs both processors at their default sizes. It counts each mechanism and
fails if any of them never happened. The mechanisms are:

* branch taken and not taken;
* jal and jalr;
* each WBSel source;
* Asel = PC;
* each Bsel source;
* ALUSel = B;
* narrow loads and stores;
* and, for the six-signal datapath: R-format, ld, sd, and PCSrc taken and not taken.

To simulate with Verilator, list the packages first:

```
verilator --binary --timing -Irtl -Itb rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/rv_ref_pkg.sv \
    tb/rv_prog_pkg.sv tb/ph_prog_pkg.sv -y rtl -y tb tb/tb_datapath_top.sv --top-module tb_datapath_top
./obj_dir/Vtb_datapath_top
```

Other testbenches work the same way. Replace the last file and `--top-module` with the
testbench you want, for example `tb/tb_imm_gen.sv` with `--top-module tb_imm_gen`.

To run your own RV32I program, drive `imem_load_*` with the instruction words while `rst` is
high, optionally preload data through `dmem_load_*`, then release `rst`. The encoder functions
in `tb/rv_asm_pkg.sv` (`ADDI`, `LOAD`, `STORE`, `BR`, `JAL`, `JALR`, `LUI`, `AUIPC`, `enc_r`,
...) are handy for writing programs.
