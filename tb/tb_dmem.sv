// tb_dmem: self-checking testbench of the data memory.
//
// Writes every word of a small memory through the port, then runs random
// reads and writes against an array model. Checks that a write takes effect
// only at the rising edge and only when mem_rw = 1, that dataR is
// combinational, and that the byte offset is ignored.
module tb_dmem;
  localparam int unsigned DEPTH = 64;
  logic        clk = 1'b0;
  logic [31:0] addr, dataW, dataR;
  logic        mem_rw;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH)) dut (.clk, .addr, .dataW, .mem_rw, .dataR);

  always #5 clk = ~clk;

  task automatic chk(string what);
    logic [31:0] exp;
    exp = model[(addr >> 2) % DEPTH];
    checks++;
    if (dataR !== exp) begin
      failures++;
      $display("FAIL %s addr=%08h dataR=%08h exp %08h", what, addr, dataR, exp);
    end
  endtask

  initial begin
    mem_rw = 1'b0; addr = '0; dataW = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      addr = 32'(i * 4); dataW = $urandom(); mem_rw = 1'b1;
      @(posedge clk);
      model[i] = dataW;
      #1; chk("fill");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = $urandom() % (DEPTH * 4);
      dataW = $urandom();
      mem_rw = ($urandom_range(0, 2) == 0);
      #1; chk("before edge");
      @(posedge clk);
      if (mem_rw) model[(addr >> 2) % DEPTH] = dataW;
      #1; chk("after edge");
      mem_rw = 1'b0;
      addr = $urandom() % (DEPTH * 4);
      #1; chk("read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
