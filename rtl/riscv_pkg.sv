// riscv_pkg: shared types and constants of the single-cycle RV32I datapath.
//
// Holds the data width, the register-file geometry, the two major opcodes the
// datapath executes (R-type OP and I-type OP-IMM), the funct3 codes of the
// R-type table, the ALUSel encoding and the bundle of control lines that the
// control logic hands to the datapath. The opcode and funct3 values are the
// RV32I ones; the numeric encoding of ALUSel is this design's own choice, since
// only the set of ALU functions is fixed.
package riscv_pkg;

  localparam int unsigned XLEN      = 32;  // data and address width
  localparam int unsigned NUM_REGS  = 32;  // RegFile registers
  localparam int unsigned REG_AW    = 5;   // register-number width

  // Major opcodes, inst[6:0]
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // R-type arithmetic/logical
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // I-type arithmetic (addi)

  // funct3, inst[14:12]
  localparam logic [2:0] F3_ADD_SUB = 3'b000;
  localparam logic [2:0] F3_SLL     = 3'b001;
  localparam logic [2:0] F3_SLT     = 3'b010;
  localparam logic [2:0] F3_SLTU    = 3'b011;
  localparam logic [2:0] F3_XOR     = 3'b100;
  localparam logic [2:0] F3_SRL_SRA = 3'b101;
  localparam logic [2:0] F3_OR      = 3'b110;
  localparam logic [2:0] F3_AND     = 3'b111;

  // funct7, inst[31:25]
  localparam logic [6:0] F7_BASE    = 7'b0000000;
  localparam logic [6:0] F7_ALT     = 7'b0100000;  // sub, sra: inst[30] = 1

  // ALU function select
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_sel_e;

  // Control lines driven by the control logic
  typedef struct packed {
    alu_sel_e alu_sel;  // ALUSel
    logic     b_sel;    // BSel: 0 = Reg[rs2], 1 = immediate
    logic     reg_wen;  // RegWEn
    logic     mem_rw;   // MemRW: 1 = write DMEM
    logic     pc_wen;   // PC write enable
    logic     legal;    // instruction is one this datapath executes
  } ctrl_t;

endpackage
