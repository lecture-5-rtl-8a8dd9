// rv32_single_cycle: a single-cycle RV32I datapath for the arithmetic/logical
// instructions (the ten R-type operations and addi).
//
// Every instruction runs in one clock cycle. Between two rising edges the
// combinational logic fetches inst = IMEM[PC], decodes it (control), reads
// Reg[rs1] and Reg[rs2] (regfile), builds the I-type immediate (imm_gen),
// picks ALU input B with BSel (register or immediate), computes the ALU result
// and PC + 4. On the rising edge all state elements update at once: the PC
// takes PC + 4 and, when RegWEn = 1, Reg[rd] takes the ALU result.
//
// DMEM is wired as the datapath places it (address = ALU result,
// dataW = Reg[rs2], MemRW from the control logic), but none of the
// instructions executed here reads or writes it: its read port is brought out
// as dmem_rdata only. Loads, stores and branches are not part of this
// datapath.
//
// Ports: clk, rst_n (active-low asynchronous reset, PC = RESET_PC, registers
// cleared) and observation outputs: the current pc and inst, the register
// write of this cycle (rf_wen, rf_waddr, rf_wdata, taking effect at the next
// edge), illegal (the instruction is not one this datapath executes and is
// treated as a no-op) and dmem_rdata.
module rv32_single_cycle
  import riscv_pkg::*;
#(
  parameter int unsigned     IMEM_DEPTH     = 1024,
  parameter int unsigned     DMEM_DEPTH     = 1024,
  parameter string           IMEM_INIT_FILE = "",
  parameter logic [XLEN-1:0] RESET_PC       = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [XLEN-1:0]   pc,
  output logic [31:0]       inst,
  output logic              rf_wen,
  output logic [REG_AW-1:0] rf_waddr,
  output logic [XLEN-1:0]   rf_wdata,
  output logic              illegal,
  output logic [XLEN-1:0]   dmem_rdata
);

  ctrl_t            ctrl;
  logic [XLEN-1:0]  pc_next;
  logic [XLEN-1:0]  rs1_data, rs2_data;
  logic [XLEN-1:0]  imm;
  logic [XLEN-1:0]  alu_b;
  logic [XLEN-1:0]  alu_result;

  // Stage 1: instruction fetch
  pc_reg #(.WIDTH(XLEN), .RESET_VALUE(RESET_PC)) u_pc (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (ctrl.pc_wen),
    .d     (pc_next),
    .q     (pc)
  );

  assign pc_next = pc + XLEN'(4);

  imem #(.XLEN(XLEN), .DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_INIT_FILE)) u_imem (
    .addr (pc),
    .inst (inst)
  );

  // Stage 2: decode and register read
  control u_ctrl (
    .inst (inst),
    .ctrl (ctrl)
  );

  regfile #(.XLEN(XLEN), .NUM_REGS(NUM_REGS)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .rs1     (inst[19:15]),
    .rs2     (inst[24:20]),
    .rsW     (inst[11:7]),
    .reg_wen (ctrl.reg_wen),
    .dataW   (alu_result),
    .data1   (rs1_data),
    .data2   (rs2_data)
  );

  imm_gen #(.XLEN(XLEN)) u_imm (
    .inst (inst),
    .imm  (imm)
  );

  // Stage 3: execute; BSel picks the second ALU operand
  assign alu_b = ctrl.b_sel ? imm : rs2_data;

  alu #(.XLEN(XLEN)) u_alu (
    .a       (rs1_data),
    .b       (alu_b),
    .alu_sel (ctrl.alu_sel),
    .result  (alu_result)
  );

  // Stage 4: memory (unused by the instructions executed here)
  dmem #(.XLEN(XLEN), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk    (clk),
    .addr   (alu_result),
    .dataW  (rs2_data),
    .mem_rw (ctrl.mem_rw),
    .dataR  (dmem_rdata)
  );

  // Stage 5: write-back of the ALU result (observation copy)
  assign rf_wen   = ctrl.reg_wen;
  assign rf_waddr = inst[11:7];
  assign rf_wdata = alu_result;
  assign illegal  = ~ctrl.legal;

  // Rules of this datapath: only executed instructions write a register, and
  // none of the instructions executed here writes DMEM.
  a_wen_only_legal: assert property (@(posedge clk)
                                     ctrl.reg_wen |-> ctrl.legal);
  a_no_store:       assert property (@(posedge clk) !ctrl.mem_rw);

endmodule
