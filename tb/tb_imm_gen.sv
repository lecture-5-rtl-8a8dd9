// tb_imm_gen: self-checking testbench of the I-type immediate generator.
//
// Applies directed immediates (0, 1, -1, 2047, -2048) and random instruction
// words, and checks imm against the value of the signed 12-bit field
// inst[31:20] computed as an integer in the testbench.
module tb_imm_gen;
  logic [31:0] inst, imm;
  int checks = 0, failures = 0;

  imm_gen dut (.inst, .imm);

  task automatic apply(logic [31:0] i);
    int v;
    inst = i;
    #1;
    v = int'(i >> 20);
    if (v >= 2048) v -= 4096;
    checks++;
    if (imm !== 32'(v)) begin
      failures++;
      $display("FAIL inst=%08h imm=%08h exp %08h", i, imm, 32'(v));
    end
  endtask

  initial begin
    apply(32'h0000_0013);
    apply(32'h0010_0093);
    apply(32'hFFF0_0093);
    apply(32'h7FF0_0093);
    apply(32'h8000_0093);
    for (int n = 0; n < 2000; n++) apply($urandom());
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
