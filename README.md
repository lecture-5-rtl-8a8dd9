# A single-cycle RV32I datapath for arithmetic and logic instructions

This is a RISC-V processor datapath that executes one instruction per clock
cycle. Everything an instruction needs happens in the combinational logic
between two rising clock edges: fetch, decode, register read, ALU, and
computing the next PC. At the edge, every state element takes its new value at
once. The PC becomes PC + 4 and the destination register takes the ALU result.

The datapath covers the RV32I register-register instructions and `addi`:

| instruction | funct7  | funct3 | opcode  | operation                    |
|-------------|---------|--------|---------|------------------------------|
| add         | 0000000 | 000    | 0110011 | rd = rs1 + rs2               |
| sub         | 0100000 | 000    | 0110011 | rd = rs1 - rs2               |
| sll         | 0000000 | 001    | 0110011 | rd = rs1 << rs2[4:0]         |
| slt         | 0000000 | 010    | 0110011 | rd = (rs1 < rs2) signed      |
| sltu        | 0000000 | 011    | 0110011 | rd = (rs1 < rs2) unsigned    |
| xor         | 0000000 | 100    | 0110011 | rd = rs1 ^ rs2               |
| srl         | 0000000 | 101    | 0110011 | rd = rs1 >> rs2[4:0]         |
| sra         | 0100000 | 101    | 0110011 | rd = rs1 >>> rs2[4:0]        |
| or          | 0000000 | 110    | 0110011 | rd = rs1 \| rs2              |
| and         | 0000000 | 111    | 0110011 | rd = rs1 & rs2               |
| addi        | imm[11:0] | 000  | 0010011 | rd = rs1 + sext(imm)         |

Loads, stores, branches, jumps and the other I-type instructions (`slti`,
`xori` and so on) are not part of this datapath.

## How one cycle flows

```
 pc_reg --pc--> imem --inst--+--> control --> ALUSel, BSel, RegWEn, MemRW
   ^                         |
   |                         +--> regfile (rs1, rs2) --data1-------------> alu.a
   |                         |                   \--data2--> +------+
   |                         +--> imm_gen ----------imm-----> | BSel |--> alu.b
   |                                                          +------+
   +-- pc + 4                alu.result --> regfile dataW (Reg[rd], RegWEn)
                             alu.result --> dmem addr, data2 --> dmem dataW
```

1. **Fetch.** `imem` is read-only, so it behaves as combinational logic:
   `inst = IMEM[pc]` follows the PC with no clock.
2. **Decode and register read.** `control` decodes opcode, funct3 and funct7.
   At the same time the register file reads `Reg[rs1]` and `Reg[rs2]` from the
   fixed fields `inst[19:15]` and `inst[24:20]`, and `imm_gen` forms the
   immediate. Each unit works whether or not the instruction needs it.
3. **Execute.** The BSel mux picks the second ALU operand: `Reg[rs2]` for the
   R-type instructions (BSel = 0), or the immediate for `addi` (BSel = 1). The
   ALU applies the function that ALUSel names.
4. **Memory.** DMEM sits on the ALU result as its address and `Reg[rs2]` as
   its write data. MemRW is 0 for every instruction executed here, so DMEM is
   never written. Its read data leaves the top as `dmem_rdata` and feeds
   nothing inside.
5. **Write-back.** The ALU result goes straight to the register file's write
   port, with RegWEn = 1, and `rd = inst[11:7]`.

At the rising edge the PC loads PC + 4 and the register file stores the
result. Both happen at the same edge, so a read of `rd` in the same cycle still
sees the old value. The next instruction sees the new one.

The control lines are the main idea: every data line always carries a value,
and the control logic decides which values count. ALUSel chooses the ALU
function and BSel chooses register or immediate. RegWEn and MemRW decide
whether state changes.

## Decoding details

- `inst[30]` is the only funct7 bit that changes the operation. It turns add
  into sub and srl into sra.
- The decoder still checks the whole funct7 field. Only `0000000` is accepted,
  or `0100000` for sub and sra.
- A word that is not one of the eleven instructions above is a no-op. Nothing
  is written, the PC still advances by 4, and the `illegal` output is 1 for
  that cycle. This is how the design handles such words; it is not a RISC-V
  exception mechanism.
- The ALUSel encoding is this design's own (`riscv_pkg::alu_sel_e`): add = 0,
  sub = 1, sll = 2, slt = 3, sltu = 4, xor = 5, srl = 6, sra = 7, or = 8,
  and = 9.

## The blocks

| module              | what it is                                                            |
|---------------------|-----------------------------------------------------------------------|
| `riscv_pkg`         | widths, opcodes, funct codes, the ALUSel enum and the `ctrl_t` bundle of control lines |
| `pc_reg`            | 32-bit PC register with write enable; it holds its value when the enable is 0 |
| `regfile`           | 32 x 32 bits, two combinational reads, one write at the clock edge when RegWEn = 1; x0 reads as 0 |
| `imem`              | read-only instruction memory, combinational, word-addressed through a byte address |
| `dmem`              | data memory, combinational read, write at the clock edge when MemRW = 1 |
| `imm_gen`           | I-type immediate: `imm[11:0] = inst[31:20]`, `imm[31:12] = inst[31]` |
| `alu`               | the ten RV32I register-register operations                            |
| `control`           | instruction decoder that drives the control lines                     |
| `rv32_single_cycle` | the top: all of the above, plus the BSel mux and the PC + 4 adder     |

### Top-level interface

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1  | every state element updates on its rising edge |
| `rst_n`      | in  | 1  | active-low asynchronous reset: PC = `RESET_PC`, all registers 0 |
| `pc`         | out | 32 | address of the instruction executing this cycle |
| `inst`       | out | 32 | the instruction word executing this cycle |
| `rf_wen`     | out | 1  | this cycle's instruction writes a register at the next edge |
| `rf_waddr`   | out | 5  | its destination register |
| `rf_wdata`   | out | 32 | the value written (the ALU result) |
| `illegal`    | out | 1  | the word is not one this datapath executes (no-op) |
| `dmem_rdata` | out | 32 | DMEM read data at the ALU-result address |

Parameters: `IMEM_DEPTH` and `DMEM_DEPTH` (words, default 1024 each),
`IMEM_INIT_FILE` (an optional `$readmemh` file holding the program) and
`RESET_PC` (default 0).

## Choices this design makes

Reset, memory sizes and program loading are not fixed by the architecture.
They were chosen here as follows:

- **Reset.** An active-low asynchronous reset sets the PC to `RESET_PC` and
  clears all 32 registers, so every run starts from a known state. Memories
  are not reset.
- **x0.** Register x0 always reads as zero and ignores writes, as RV32I
  requires.
- **Memory size.** The address space is 32 bits. IMEM and DMEM each hold
  1024 words (4 KiB) by default. The word index is `addr[11:2]`. Higher
  address bits are ignored, so the memory repeats through the address space,
  and a program that runs off the end wraps to word 0. The byte offset
  `addr[1:0]` is ignored: every access is a whole 32-bit word.
- **Program loading.** IMEM has no write port. Its contents come from
  `IMEM_INIT_FILE`, or the surrounding system (a testbench) writes the `mem`
  array directly.
- **PC enable.** The PC register has a write enable. The control logic holds
  it at 1 because every cycle completes an instruction.
- **DMEM read during a write.** `dataR` always shows the addressed word, and
  during a write cycle it shows the old word until the edge.

Two assertions in the top record rules of the datapath. Only an executed
instruction may write a register, and no instruction executed here writes
DMEM.

## Limits

- Only the eleven instructions in the table execute. With no branches or
  jumps, a program runs straight through IMEM and wraps.
- DMEM is in place but unused: none of the supported instructions reads or
  writes it. A synthesis tool removes it, and removes IMEM too unless an init
  file gives it contents. `dmem_rdata` and, without an init file, `inst` are
  then constant.
- There is no write-back mux and no PC mux. Those are needed only once loads,
  jumps and branches are added.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the block
against a reference computed separately in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_alu`: all ten functions on corner operands and 5000 random ones. The
  reference uses 64-bit arithmetic and bit-by-bit shifts.
- `tb_control`: every table row with random register fields, `addi`, and
  words that must be no-ops (wrong funct7, other OP-IMM funct3, other opcodes).
- `tb_regfile`, `tb_pc_reg`, `tb_dmem`, `tb_imem`, `tb_imm_gen`: random
  traffic against array or integer models, including the timing. Reads are
  combinational, and writes appear only after the edge and only when enabled.
- `tb_rv32_single_cycle`: the whole datapath at its default parameters. It
  fills all 1024 IMEM words with a random program, mostly R-type and `addi`
  with a few non-executed words, and runs it twice through (2048 cycles). An
  instruction-set model in the testbench runs alongside. Every cycle the test
  checks the PC, the fetched word, the register write and the `illegal` flag.
  It checks one instruction per cycle (the PC grows by 4 at each edge) and the
  final register file. It also counts each function, BSel = 0 and 1, writes to
  x0, non-executed words and PC wraps, and fails if any count is zero.

Each testbench was also run against a copy of its module with one deliberate
bug, and each one caught it.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/riscv_pkg.sv tb/tb_rv32_single_cycle.sv --top-module tb_rv32_single_cycle
./obj_dir/Vtb_rv32_single_cycle
```

Replace the testbench name to run any other test. The package file must come
first on the command line.
