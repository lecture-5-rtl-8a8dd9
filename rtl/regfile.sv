// regfile: the RISC-V register file, NUM_REGS registers of XLEN bits.
//
// Two read ports behave as combinational logic: data1 = R[rs1] and
// data2 = R[rs2] follow the select inputs with no clock involved. The single
// write port stores dataW into R[rsW] on the rising clock edge when
// reg_wen (RegWEn) is 1; the clock matters only for writes. These are the
// register file's defined ports and timing.
//
// Choices of this design: register x0 always reads as zero and ignores writes,
// as the RV32I architecture requires; a read of the register being written in
// the same cycle returns the old value (the new value appears after the edge);
// an active-low asynchronous reset clears every register so that simulation
// and hardware start from a known state.
module regfile #(
  parameter int unsigned XLEN     = 32,
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned AW       = $clog2(NUM_REGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   rs1,
  input  logic [AW-1:0]   rs2,
  input  logic [AW-1:0]   rsW,
  input  logic            reg_wen,
  input  logic [XLEN-1:0] dataW,
  output logic [XLEN-1:0] data1,
  output logic [XLEN-1:0] data2
);

  logic [XLEN-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_REGS); i++) regs[i] <= '0;
    end else if (reg_wen && rsW != '0) begin
      regs[rsW] <= dataW;
    end
  end

  always_comb begin
    data1 = (rs1 == '0) ? '0 : regs[rs1];
    data2 = (rs2 == '0) ? '0 : regs[rs2];
  end

endmodule
