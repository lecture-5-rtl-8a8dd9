// alu: the 32-bit arithmetic/logic unit of the datapath.
//
// Computes result = a OP b for the ten RV32I register-register operations,
// selected by alu_sel (ALUSel): add, sub, sll, slt, sltu, xor, srl, sra, or,
// and. Shifts use the low five bits of b as the shift amount; slt and sltu
// return 1 or 0 from a signed or unsigned comparison. The set of operations is
// the one the R-type instructions need; the encoding of ALUSel (riscv_pkg) and
// the single shared adder/subtractor and barrel-shifter style description are
// this design's choices.
//
// Purely combinational: result follows a, b and alu_sel.
module alu #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  riscv_pkg::alu_sel_e alu_sel,
  output logic [XLEN-1:0] result
);

  localparam int unsigned SHW = $clog2(XLEN);

  logic [SHW-1:0] shamt;
  logic [XLEN-1:0] sum, diff;

  assign shamt = b[SHW-1:0];
  assign sum   = a + b;
  assign diff  = a - b;

  always_comb begin
    unique case (alu_sel)
      riscv_pkg::ALU_ADD:  result = sum;
      riscv_pkg::ALU_SUB:  result = diff;
      riscv_pkg::ALU_SLL:  result = a << shamt;
      riscv_pkg::ALU_SLT:  result = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      riscv_pkg::ALU_SLTU: result = {{(XLEN-1){1'b0}}, a < b};
      riscv_pkg::ALU_XOR:  result = a ^ b;
      riscv_pkg::ALU_SRL:  result = a >> shamt;
      riscv_pkg::ALU_SRA:  result = XLEN'($signed(a) >>> shamt);
      riscv_pkg::ALU_OR:   result = a | b;
      riscv_pkg::ALU_AND:  result = a & b;
      default:  result = '0;
    endcase
  end

endmodule
