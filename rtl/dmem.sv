// dmem: data memory for loads and stores of 32-bit words.
//
// DEPTH words of XLEN bits behind a 32-bit byte address. Reads are
// combinational: with mem_rw (MemRW) = 0, dataR = M[addr] once addr is valid.
// A write happens on the rising clock edge when mem_rw = 1: M[addr] = dataW.
// The clock matters only for writes. dataR always shows the addressed word,
// also during a write cycle (the old word until the edge).
//
// Word addresses are addr[.. :2]; the byte offset and address bits above the
// memory size are ignored (whole-word access only). The size, 1024 words by
// default, is this design's choice; the address space is 32 bits.
module dmem #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic            clk,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] dataW,
  input  logic            mem_rw,
  output logic [XLEN-1:0] dataR
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mem_rw) mem[addr[IW+1:2]] <= dataW;
  end

  assign dataR = mem[addr[IW+1:2]];

endmodule
