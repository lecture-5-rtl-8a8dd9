// imem: read-only instruction memory.
//
// A word-organised ROM of DEPTH 32-bit words seen through a 32-bit byte
// address. Because it is read-only it behaves as a combinational block:
// inst = M[addr] follows addr with no clock. Word addresses are addr[.. :2];
// the two byte-offset bits are ignored (instructions are word aligned) and
// address bits above the memory size are ignored, so the memory repeats
// through the address space.
//
// The size is this design's choice: the address space is 32 bits but the
// number of words actually present is not fixed, so DEPTH defaults to 1024
// words (4 KiB). Contents come from INIT_FILE ($readmemh format) when it is
// given; otherwise the array is loaded by whoever builds the system (a
// testbench writes the mem array directly).
module imem #(
  parameter int unsigned XLEN      = 32,
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [XLEN-1:0] addr,
  output logic [XLEN-1:0] inst
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [XLEN-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign inst = mem[addr[IW+1:2]];

endmodule
