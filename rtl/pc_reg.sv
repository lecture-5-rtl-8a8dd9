// pc_reg: the program counter, a WIDTH-bit register with a write enable.
//
// On a rising clock edge with we = 1 the register loads d; at every other time
// q holds its value. The 32-bit width, the write enable and this behaviour are
// the program counter as the datapath defines it. The active-low asynchronous
// reset to RESET_VALUE (0 by default) is this design's choice, so that
// execution starts at a known address.
//
// Ports: clk, rst_n, we (write enable), d (next PC), q (current PC).
// Timing: q changes only after a rising edge of clk (or on reset).
module pc_reg #(
  parameter int unsigned        WIDTH       = 32,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
