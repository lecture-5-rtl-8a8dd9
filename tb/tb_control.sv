// tb_control: self-checking testbench of the control logic.
//
// Builds each of the ten R-type instructions and addi from its field values
// (funct7, funct3, opcode as in the RV32I encoding tables) with random
// register numbers and immediates, and checks ALUSel, BSel, RegWEn, MemRW,
// the PC write enable and the legal flag against a table in the testbench.
// Also checks that words with another opcode, an R-type funct7 other than
// 0000000/0100000, or addi's opcode with another funct3 write nothing.
module tb_control;
  import riscv_pkg::*;

  logic [31:0] inst;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control dut (.inst, .ctrl);

  // R-type table rows: funct7, funct3 and the ALU function they select
  localparam logic [6:0] R_F7 [10] = '{7'b0000000, 7'b0100000, 7'b0000000, 7'b0000000,
                                       7'b0000000, 7'b0000000, 7'b0000000, 7'b0100000,
                                       7'b0000000, 7'b0000000};
  localparam logic [2:0] R_F3 [10] = '{3'b000, 3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b100, 3'b101, 3'b101, 3'b110, 3'b111};
  localparam logic [3:0] R_SEL [10] = '{ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
                                        ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND};

  task automatic expect_ctrl(string what, logic legal, alu_sel_e sel, logic bsel, logic wen);
    #1;
    checks++;
    if (ctrl.legal !== legal || ctrl.reg_wen !== wen || ctrl.mem_rw !== 1'b0 ||
        ctrl.pc_wen !== 1'b1 || (legal && (ctrl.alu_sel !== sel || ctrl.b_sel !== bsel))) begin
      failures++;
      $display("FAIL %s inst=%08h legal=%b wen=%b sel=%0d bsel=%b memrw=%b pcwen=%b",
               what, inst, ctrl.legal, ctrl.reg_wen, ctrl.alu_sel, ctrl.b_sel,
               ctrl.mem_rw, ctrl.pc_wen);
    end
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int r = 0; r < 10; r++) begin
        inst = {R_F7[r], 5'($urandom()), 5'($urandom()), R_F3[r], 5'($urandom()), 7'b0110011};
        expect_ctrl("R-type", 1'b1, alu_sel_e'(R_SEL[r]), 1'b0, 1'b1);
      end
      inst = {12'($urandom()), 5'($urandom()), 3'b000, 5'($urandom()), 7'b0010011};
      expect_ctrl("addi", 1'b1, ALU_ADD, 1'b1, 1'b1);
    end
    // R-type with a funct7 that the table does not list
    for (int n = 0; n < 200; n++) begin
      logic [6:0] f7;
      logic [2:0] f3;
      f3 = 3'($urandom());
      f7 = 7'($urandom());
      if (f7 == 7'b0000000) f7 = 7'b0000001;
      if (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101)) f7 = 7'b0100001;
      inst = {f7, 5'($urandom()), 5'($urandom()), f3, 5'($urandom()), 7'b0110011};
      expect_ctrl("bad funct7", 1'b0, ALU_ADD, 1'b0, 1'b0);
    end
    // OP-IMM with funct3 other than addi
    for (int n = 0; n < 100; n++) begin
      inst = {12'($urandom()), 5'($urandom()), 3'($urandom_range(1, 7)), 5'($urandom()), 7'b0010011};
      expect_ctrl("other OP-IMM", 1'b0, ALU_ADD, 1'b0, 1'b0);
    end
    // other opcodes
    for (int n = 0; n < 300; n++) begin
      logic [6:0] op;
      op = 7'($urandom());
      if (op == 7'b0110011 || op == 7'b0010011) op = 7'b0000011;
      inst = {25'($urandom()), op};
      expect_ctrl("other opcode", 1'b0, ALU_ADD, 1'b0, 1'b0);
    end
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
