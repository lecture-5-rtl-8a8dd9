// imm_gen: the immediate generation block for I-format instructions.
//
// Builds the 32-bit immediate of addi from the instruction word: the upper 12
// instruction bits inst[31:20] become imm[11:0], and the sign bit inst[31] is
// copied into imm[31:12]. Only the I format is generated, as only addi uses an
// immediate in this datapath; no immediate-select input is needed.
//
// Purely combinational: imm follows inst.
module imm_gen #(
  parameter int unsigned XLEN = 32
) (
  input  logic [31:0]     inst,
  output logic [XLEN-1:0] imm
);

  assign imm = {{(XLEN-12){inst[31]}}, inst[31:20]};

endmodule
