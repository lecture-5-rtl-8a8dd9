// tb_regfile: self-checking testbench of the register file.
//
// Drives random writes and random reads on both ports against an array model
// kept in the testbench. Checks that reads are combinational (valid before any
// clock edge after the select changes), that a write appears only after the
// rising edge and only when reg_wen = 1, that x0 stays zero, and that reset
// clears every register. Prints one TB_RESULT line and finishes.
module tb_regfile;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [4:0]  rs1, rs2, rsW;
  logic        reg_wen;
  logic [31:0] dataW, data1, data2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int x0_writes = 0;

  regfile dut (.clk, .rst_n, .rs1, .rs2, .rsW, .reg_wen, .dataW, .data1, .data2);

  always #5 clk = ~clk;

  task automatic read_check(logic [4:0] a1, logic [4:0] a2, string what);
    rs1 = a1; rs2 = a2;
    #1;
    checks += 2;
    if (data1 !== model[a1]) begin
      failures++; $display("FAIL %s data1 x%0d=%08h exp %08h", what, a1, data1, model[a1]);
    end
    if (data2 !== model[a2]) begin
      failures++; $display("FAIL %s data2 x%0d=%08h exp %08h", what, a2, data2, model[a2]);
    end
  endtask

  initial begin
    rst_n = 1'b0; reg_wen = 1'b0; rsW = '0; dataW = '0; rs1 = '0; rs2 = '0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    #12;
    rst_n = 1'b1;
    for (int i = 0; i < 32; i += 2) read_check(5'(i), 5'(i + 1), "after reset");
    // fill every register
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      rsW = 5'(i); dataW = $urandom(); reg_wen = 1'b1;
      // not yet written before the edge
      read_check(5'(i), 5'(i), "before edge");
      @(posedge clk);
      if (i != 0) model[i] = dataW;
      #1;
      read_check(5'(i), 5'($urandom_range(0, 31)), "after edge");
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rsW = 5'($urandom_range(0, 31));
      dataW = $urandom();
      reg_wen = ($urandom_range(0, 3) != 0);
      if (reg_wen && rsW == 0) x0_writes++;
      read_check(5'($urandom_range(0, 31)), 5'($urandom_range(0, 31)), "random before");
      @(posedge clk);
      if (reg_wen && rsW != 0) model[rsW] = dataW;
      #1;
      read_check(rsW, 5'($urandom_range(0, 31)), "random after");
    end
    // reset clears all
    @(negedge clk);
    reg_wen = 1'b0;
    rst_n = 1'b0; #1;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i += 2) read_check(5'(i), 5'(i + 1), "second reset");
    rst_n = 1'b1;
    checks++;
    if (x0_writes == 0) begin
      failures++; $display("FAIL no write to x0 was attempted");
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
