// tb_rv32_single_cycle: end-to-end testbench of the single-cycle datapath,
// at the design's default parameters.
//
// Fills the whole instruction memory with a generated program: the ten R-type
// instructions and addi with random registers and immediates (a small register
// pool in part of the program so that results feed later instructions, x0 as
// destination now and then) plus a few words that are not instructions this
// datapath executes. The program is run twice through (the PC wraps around the
// memory) while an instruction-set model in the testbench executes the same
// words. Every cycle it checks the PC, the fetched word, the register write
// (enable, rd, value) and the illegal flag; at the end it checks the whole
// register file. It also checks the rate: one instruction per clock cycle, so
// the PC grows by 4 at each edge. It counts how often each mechanism
// happened (each ALU function, BSel = 1 and 0, a discarded write to x0, a
// non-executed word, the PC wrap) and counts a failure for any that never did.
module tb_rv32_single_cycle;
  import riscv_pkg::*;

  localparam int unsigned DEPTH  = 1024;       // default IMEM_DEPTH
  localparam int unsigned CYCLES = 2 * DEPTH;  // two passes through the program

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] pc, inst;
  logic        rf_wen;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;
  logic        illegal;
  logic [31:0] dmem_rdata;

  rv32_single_cycle dut (.clk, .rst_n, .pc, .inst, .rf_wen, .rf_waddr, .rf_wdata,
                         .illegal, .dmem_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] prog [DEPTH];
  logic [31:0] x [32];
  logic [31:0] m_pc;

  // mechanism counters
  int n_op [11];   // 0..9 R-type functions, 10 addi
  int n_bsel_imm, n_bsel_reg, n_x0_write, n_illegal, n_wrap;

  localparam logic [6:0] R_F7 [10] = '{7'h00, 7'h20, 7'h00, 7'h00, 7'h00,
                                       7'h00, 7'h00, 7'h20, 7'h00, 7'h00};
  localparam logic [2:0] R_F3 [10] = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd3,
                                       3'd4, 3'd5, 3'd5, 3'd6, 3'd7};
  // row order: add sub sll slt sltu xor srl sra or and

  function automatic logic [4:0] pick_reg(bit pool);
    return pool ? 5'($urandom_range(0, 5)) : 5'($urandom_range(0, 31));
  endfunction

  function automatic logic [31:0] gen_inst(int unsigned i);
    bit pool;
    int k;
    pool = (i % 256) < 128;
    k = $urandom_range(0, 99);
    if (k < 3) return {25'($urandom()), 7'b1100011};           // a branch: not executed
    if (k < 5) return {7'b0000001, 10'($urandom()), 3'd0, 5'($urandom()), 7'b0110011};
    if (k < 35)
      return {12'($urandom()), pick_reg(pool), 3'd0, pick_reg(pool), 7'b0010011};  // addi
    begin
      int r;
      r = $urandom_range(0, 9);
      return {R_F7[r], pick_reg(pool), pick_reg(pool), R_F3[r], pick_reg(pool), 7'b0110011};
    end
  endfunction

  // Reference model of one instruction. Returns 1 when it writes a register.
  function automatic bit iss(logic [31:0] w, output logic [4:0] rd, output logic [31:0] val,
                             output int op, output bit legal);
    logic [31:0] a, b;
    longint sa, sb;
    int sh;
    rd = w[11:7];
    a = x[w[19:15]];
    b = x[w[24:20]];
    val = '0; op = -1; legal = 1'b0;
    if (w[6:0] == 7'b0010011 && w[14:12] == 3'd0) begin
      longint imm;
      imm = longint'(w[31:20]);
      if (imm >= 2048) imm -= 4096;
      val = 32'(longint'(a) + imm);
      op = 10; legal = 1'b1;
    end else if (w[6:0] == 7'b0110011) begin
      for (int r = 0; r < 10; r++)
        if (w[31:25] == R_F7[r] && w[14:12] == R_F3[r]) op = r;
      legal = (op >= 0);
      sa = longint'($signed(a)); sb = longint'($signed(b));
      sh = int'(b[4:0]);
      case (op)
        0: val = 32'(sa + sb);
        1: val = 32'(sa - sb);
        2: val = 32'((64'(a) * (64'd1 << sh)));
        3: val = (sa < sb) ? 32'd1 : 32'd0;
        4: val = (longint'(a) < longint'(b)) ? 32'd1 : 32'd0;
        5: val = a ^ b;
        6: val = 32'(64'(a) / (64'd1 << sh));
        7: begin
             // floor division of the signed value by 2**sh
             longint q;
             q = sa / (longint'(1) << sh);
             if (sa < 0 && (sa % (longint'(1) << sh)) != 0) q -= 1;
             val = 32'(q);
           end
        8: val = a | b;
        9: val = a & b;
        default: val = '0;
      endcase
    end
    return legal;
  endfunction

  initial begin
    logic [4:0]  e_rd;
    logic [31:0] e_val;
    int          op;
    bit          legal, wr;

    for (int i = 0; i < 11; i++) n_op[i] = 0;
    n_bsel_imm = 0; n_bsel_reg = 0; n_x0_write = 0; n_illegal = 0; n_wrap = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      prog[i] = gen_inst(i);
      dut.u_imem.mem[i] = prog[i];
    end
    for (int i = 0; i < 32; i++) x[i] = '0;

    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_pc = '0;

    for (int c = 0; c < int'(CYCLES); c++) begin
      wr = iss(prog[(m_pc >> 2) % DEPTH], e_rd, e_val, op, legal);
      checks++;
      if (pc !== m_pc || inst !== prog[(m_pc >> 2) % DEPTH]) begin
        failures++;
        $display("FAIL cycle %0d pc=%08h inst=%08h exp pc=%08h inst=%08h",
                 c, pc, inst, m_pc, prog[(m_pc >> 2) % DEPTH]);
      end
      checks++;
      if (rf_wen !== wr || illegal !== !legal ||
          (wr && (rf_waddr !== e_rd || rf_wdata !== e_val))) begin
        failures++;
        $display("FAIL cycle %0d inst=%08h wen=%b rd=%0d val=%08h illegal=%b exp wen=%b rd=%0d val=%08h",
                 c, inst, rf_wen, rf_waddr, rf_wdata, illegal, wr, e_rd, e_val);
      end
      if (legal) begin
        n_op[op]++;
        if (op == 10) n_bsel_imm++; else n_bsel_reg++;
        if (e_rd == 0) n_x0_write++;
      end else begin
        n_illegal++;
      end
      if (wr && e_rd != 0) x[e_rd] = e_val;
      if ((m_pc >> 2) % DEPTH == DEPTH - 1) n_wrap++;
      m_pc = m_pc + 4;
      @(posedge clk);
      #1;
      // rate: one instruction per cycle
      checks++;
      if (pc !== m_pc) begin
        failures++;
        $display("FAIL cycle %0d: PC did not advance by 4 (pc=%08h exp %08h)", c, pc, m_pc);
      end
      @(negedge clk);
    end

    // final architectural state
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (r != 0 && dut.u_rf.regs[r] !== x[r]) begin
        failures++;
        $display("FAIL final x%0d=%08h exp %08h", r, dut.u_rf.regs[r], x[r]);
      end
    end

    $display("count add=%0d sub=%0d sll=%0d slt=%0d sltu=%0d xor=%0d srl=%0d sra=%0d or=%0d and=%0d addi=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8],
             n_op[9], n_op[10]);
    $display("count bsel_imm=%0d bsel_reg=%0d x0_write=%0d not_executed=%0d pc_wrap=%0d",
             n_bsel_imm, n_bsel_reg, n_x0_write, n_illegal, n_wrap);
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL instruction %0d never executed", i); end
    end
    checks += 5;
    if (n_bsel_imm == 0) begin failures++; $display("FAIL BSel=1 never used"); end
    if (n_bsel_reg == 0) begin failures++; $display("FAIL BSel=0 never used"); end
    if (n_x0_write == 0) begin failures++; $display("FAIL no write to x0"); end
    if (n_illegal == 0)  begin failures++; $display("FAIL no non-executed word"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL PC never wrapped"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
