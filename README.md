# A single-cycle RV32I datapath

This is a processor that runs one RISC-V instruction per clock cycle. Every
state element (the program counter, the 32 registers and the data memory) is
read combinationally and written at the rising clock edge. In between, one
wide block of combinational logic computes the instruction's effects, so each
clock period carries one instruction from fetch to write-back. There are no
pipeline registers, no stalls and no forwarding. The price is a clock period
as long as the slowest instruction, a load: instruction memory, register read,
ALU, data memory, extension, register write.

The datapath carries four groups of the RV32I base instruction set:

| group | instructions |
|---|---|
| register-register | ADD SUB SLL SLT SLTU XOR SRL SRA OR AND |
| register-immediate | ADDI SLTI SLTIU XORI ORI ANDI SLLI SRLI SRAI |
| loads | LB LH LW LBU LHU |
| stores | SB SH SW |

Branches, jumps, LUI/AUIPC, FENCE, ECALL/EBREAK and the CSR instructions have
no path through this datapath. There is no next-PC multiplexer, no branch
comparator and no B/U/J immediate formats. Such an instruction is executed
as a no-op: nothing is written, the PC moves on by four, and the
`unsupported` output is high for that cycle. So a program for this machine is
straight-line code.

## The datapath, left to right

```
 pc ──► IMEM ──► inst ─┬─ [19:15] AddrA ─► Reg[] DataA ───────────────► ALU a
  ▲                    ├─ [24:20] AddrB ─►       DataB ─┬─► BSel 0 ──► ALU b
  │                    ├─ [31:7] ─► Imm.Gen ─── imm ────┼─► BSel 1
  │                    ├─ [11:7] AddrD ─►  DataD ◄─ wb  │
  └── +4               └─► controller                   └─► store_align ─► DMEM DataW
                                ALU y ─► DMEM Addr ; DMEM DataR ─► load_ext ─► WBSel 0
                                ALU y ──────────────────────────────────────► WBSel 1 ─► wb
```

The controller (`controller.sv`) turns each instruction into one control word
(`rv32_pkg::ctrl_t`). Its signals have the customary names:

| class | ImmSel | RegWEn | BSel | ALUSel | MemRW | WBSel |
|---|---|---|---|---|---|---|
| R-type | – | 1 | 0 (rs2) | from funct3, inst[30] | Read | 1 (ALU) |
| I-type arithmetic | I | 1 | 1 (imm) | from funct3, inst[30] for SRAI | Read | 1 (ALU) |
| load | I | 1 | 1 | Add | Read | 0 (memory) |
| store | S | 0 | 1 | Add | Write | – |
| anything else | – | 0 | – | – | Read | – |

`inst[30]` chooses SUB over ADD and SRA/SRAI over SRL/SRLI. ADDI has no
subtract form, so for OP-IMM with funct3=000 the bit is ignored.

### Immediates

Only the I and S formats exist here, and they differ only in where the low
five bits of the immediate come from: `inst[24:20]` for I-type and
`inst[11:7]` for S-type. `imm_gen` is therefore one 5-bit 2:1 multiplexer. The
other bits are fixed wires: `imm[10:5] = inst[30:25]`, and
`imm[31:11] = inst[31]` (sign extension).

### Narrow loads and stores

Memory is a 32-bit word array addressed by bytes, in little-endian order. The
ALU result is the byte address. On a load, `load_ext` picks the addressed byte
(`addr[1:0]`) or halfword (`addr[1]`) out of the word that was read. It then
sign-extends (LB, LH) or zero-extends (LBU, LHU) it. On a store, `store_align`
copies the byte or halfword of `rs2` onto every lane and raises only the
byte enables of the addressed lanes. A misaligned halfword or word access is
not trapped. It reaches the aligned halfword or word that holds the address
(the low address bits are dropped). A funct3 value that names no load passes
the whole word through. One that names no store writes nothing.

### Timing

Within a cycle: the PC addresses IMEM; the instruction selects registers and
control; the ALU settles; DMEM is read at the ALU result; the write-back
value settles. At the rising edge the PC takes PC+4, the register file
writes `rd` if RegWEn is set, and DMEM writes the enabled lanes if MemRW is
Write. An instruction that reads a register the previous one wrote sees the
new value, because that write finished at the edge between them. Register
x0 reads as zero and ignores writes.

## Modules

| file | what it is |
|---|---|
| `rv32_pkg.sv` | opcodes, funct3 codes, ALUSel/ImmSel/MemRW/WBSel encodings, `ctrl_t` |
| `rv32_top.sv` | the machine: `rv32_core` + `imem` + `dmem` |
| `rv32_core.sv` | the processor: `controller` + `datapath` |
| `datapath.sv` | `pc_reg`, `regfile`, `imm_gen`, BSel mux, `alu`, `store_align`, `load_ext`, WBSel mux |
| `controller.sv` | instruction → control word |
| `pc_reg.sv` | PC register and its +4 adder |
| `regfile.sv` | 32×32 registers, 2 asynchronous read ports, 1 synchronous write port |
| `imm_gen.sv` | I/S immediate |
| `alu.sv` | the ten integer functions |
| `load_ext.sv`, `store_align.sv` | byte/halfword handling for loads and stores |
| `imem.sv`, `dmem.sv` | asynchronous-read word memories |

### Top-level interface (`rv32_top`)

| parameter | default | meaning |
|---|---|---|
| `IMEM_DEPTH` | 1024 | instruction memory, 32-bit words |
| `DMEM_DEPTH` | 1024 | data memory, 32-bit words |
| `RESET_PC` | 0 | PC after reset |

- `clk`, `rst`: reset is synchronous and active high. It sets the PC to
  `RESET_PC` and clears all registers. The memories are not cleared.
- `imem_load_we`, `imem_load_addr` (word index), `imem_load_data`: write the
  program, one word per cycle, normally while `rst` is held. The core itself
  never writes instruction memory.
- `pc`, `inst`, `unsupported`: the instruction executing in this cycle.
- `dmem_addr`, `dmem_wdata`, `dmem_be`, `dmem_we`, `dmem_rdata`: the
  data-memory bus between core and memory. It is brought out so that results
  can be watched.

Both memories index with `addr[AW+1:2]`, so addresses beyond their size wrap
around.

## Choices this design makes

The overall structure follows the classic single-cycle datapath. That covers
the register-file port names, the BSel, WBSel and ALUSel polarities
(Add=0, Sub=1), the I/S immediate layout, and asynchronous reads with
synchronous writes. The following are this design's own choices:

- The ALUSel codes other than Add/Sub, and the ImmSel and MemRW codes.
- Reset to PC 0 with a cleared register file.
- Memory sizes of 1024 words each, and wrap-around addressing.
- A load port on the otherwise read-only instruction memory.
- SB and SH through byte enables. The classic datapath shows SW only.
- Little-endian lanes, and misaligned accesses that hit the aligned unit
  containing them.
- Instructions outside the four groups run as no-ops. The controller does not
  check funct7 beyond bit 30.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_alu`, `tb_imm_gen`, `tb_load_ext`, `tb_store_align`, `tb_controller`
  compare against models written in a different way: bit loops for shifts,
  sign logic for compares, per-bit immediate layouts, byte-merge models.
- `tb_regfile`, `tb_dmem`, `tb_imem`, `tb_pc_reg` check same-cycle reads, edge-timed
  writes, x0, byte enables, and the PC rate of +4 per cycle.
- `tb_datapath` feeds instructions with hand-set control words. `tb_rv32_core`
  runs random programs against models of the memories. Both compare against
  an instruction-level reference model (`rv32_ref_pkg.sv`) every cycle.
- `tb_rv32_top` runs at the default sizes. It fills all 1024 instruction
  words with a random mix of every supported instruction plus unsupported
  opcodes, and runs 2048 cycles (the PC wraps once). Every cycle it compares
  PC, instruction, all registers and the memory bus with the reference
  model. At the end it compares all of data memory. It counts each
  operation, writes to x0, negative immediates, both BSel and WBSel settings,
  and unsupported opcodes, and fails if any of them never happened.
- `tb_rv32_examples` runs the textbook examples with their exact encodings:
  `add x1,x2,x3` at PC 1000 (x1 changes only at the closing edge),
  `add x6,x7,x9` at 1004, `addi x15,x1,-50`, `sw x14,8(x2)` and `lw x14,8(x2)`.

To simulate with Verilator (the packages first, then the testbench):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rv32_pkg.sv tb/rv32_ref_pkg.sv tb/tb_rv32_top.sv --top-module tb_rv32_top
./obj_dir/Vtb_rv32_top
```

Verilator's `-Wall` lint reports only unused-bit warnings. These are the
instruction fields a block does not need and the constants of the shared
package.

## Extending it

Control flow would need a next-PC multiplexer (PC+4, PC+imm, rs1+imm), a
branch comparator, the B, J and U immediate layouts in `imm_gen`, and a
third WBSel input for PC+4. LUI and AUIPC need an ALU A-input multiplexer
(register or PC). The `unsupported` decode in `controller.sv` is where those
opcodes would be claimed.
