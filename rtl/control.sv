// control: the control logic of the single-cycle datapath.
//
// Decodes the instruction's opcode, funct3 and funct7 fields into the control
// lines that select what the datapath does this cycle:
//   R-type (opcode 0110011): ALUSel from funct3, with inst[30] choosing sub
//     over add and sra over srl; BSel = 0 (Reg[rs2]); RegWEn = 1.
//   addi (opcode 0010011, funct3 000): ALUSel = add; BSel = 1 (immediate);
//     RegWEn = 1.
// MemRW is 0 for all of these (no instruction here stores), and the PC is
// written every cycle (PC = PC + 4).
//
// Choices of this design: funct7 must be exactly 0000000, or 0100000 for
// sub/sra; any other instruction word is flagged not legal and executes as a
// no-op (nothing written, PC still advances). Other I-type arithmetic
// instructions are not decoded. Purely combinational.
module control
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  always_comb begin
    ctrl.alu_sel = ALU_ADD;
    ctrl.b_sel   = 1'b0;
    ctrl.reg_wen = 1'b0;
    ctrl.mem_rw  = 1'b0;
    ctrl.pc_wen  = 1'b1;
    ctrl.legal   = 1'b0;

    if (opcode == OPC_OP) begin
      // funct7 is 0000000, or 0100000 for sub and sra only
      if (funct7 == F7_BASE ||
          (funct7 == F7_ALT && (funct3 == F3_ADD_SUB || funct3 == F3_SRL_SRA))) begin
        ctrl.legal   = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b0;
        unique case (funct3)
          F3_ADD_SUB: ctrl.alu_sel = inst[30] ? ALU_SUB : ALU_ADD;
          F3_SLL:     ctrl.alu_sel = ALU_SLL;
          F3_SLT:     ctrl.alu_sel = ALU_SLT;
          F3_SLTU:    ctrl.alu_sel = ALU_SLTU;
          F3_XOR:     ctrl.alu_sel = ALU_XOR;
          F3_SRL_SRA: ctrl.alu_sel = inst[30] ? ALU_SRA : ALU_SRL;
          F3_OR:      ctrl.alu_sel = ALU_OR;
          F3_AND:     ctrl.alu_sel = ALU_AND;
          default:    ctrl.alu_sel = ALU_ADD;
        endcase
      end
    end else if (opcode == OPC_OP_IMM && funct3 == F3_ADD_SUB) begin
      ctrl.legal   = 1'b1;
      ctrl.reg_wen = 1'b1;
      ctrl.b_sel   = 1'b1;
      ctrl.alu_sel = ALU_ADD;
    end
  end

endmodule
