// tb_imem: self-checking testbench of the instruction memory.
//
// Loads a small DEPTH-word memory with a pattern, word i = i * 0x9E3779B9 xor
// 0x5A5A5A5A, written straight into the memory array, then reads it back
// through the byte-address port: every word-aligned address, addresses with a
// nonzero byte offset (which select the same word) and addresses above the
// memory size (which wrap). Reads are checked one time step after the address
// changes, with no clock, since the memory is combinational.
module tb_imem;
  localparam int unsigned DEPTH = 64;
  logic [31:0] addr, inst;
  int checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH)) dut (.addr, .inst);

  function automatic logic [31:0] pattern(int unsigned i);
    return (i * 32'h9E37_79B9) ^ 32'h5A5A_5A5A;
  endfunction

  task automatic rd(logic [31:0] a, string what);
    logic [31:0] exp;
    addr = a;
    #1;
    exp = pattern((a >> 2) % DEPTH);
    checks++;
    if (inst !== exp) begin
      failures++;
      $display("FAIL %s addr=%08h inst=%08h exp %08h", what, a, inst, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) dut.mem[i] = pattern(i);
    for (int i = 0; i < int'(DEPTH); i++) rd(32'(i * 4), "aligned");
    for (int i = 0; i < 200; i++) rd($urandom() % (DEPTH * 4), "offset");
    for (int i = 0; i < 200; i++) rd($urandom(), "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
