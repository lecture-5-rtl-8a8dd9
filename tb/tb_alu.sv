// tb_alu: self-checking testbench of the ALU.
//
// For every ALUSel value, applies directed corner operands (0, 1, -1, the most
// negative and most positive numbers, shift amounts 0 and 31, operands whose
// upper bits would change a shift) and random operands, and compares the
// result with a reference computed in the testbench from 64-bit arithmetic and
// explicit bit loops, independent of the ALU's own description.
module tb_alu;
  import riscv_pkg::*;

  logic [31:0] a, b, result;
  alu_sel_e    sel;
  int checks = 0, failures = 0;
  int per_op [10];

  alu dut (.a, .b, .alu_sel(sel), .result);

  function automatic logic [31:0] ref_model(alu_sel_e s, logic [31:0] x, logic [31:0] y);
    longint sx, sy;
    logic [63:0] wide;
    int sh;
    logic [31:0] r;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    sh = int'(y[4:0]);
    r = '0;
    case (s)
      ALU_ADD:  begin wide = 64'(sx + sy); r = wide[31:0]; end
      ALU_SUB:  begin wide = 64'(sx - sy); r = wide[31:0]; end
      ALU_SLL:  for (int i = 0; i < 32; i++) r[i] = (i - sh >= 0) ? x[i - sh] : 1'b0;
      ALU_SRL:  for (int i = 0; i < 32; i++) r[i] = (i + sh <= 31) ? x[i + sh] : 1'b0;
      ALU_SRA:  for (int i = 0; i < 32; i++) r[i] = (i + sh <= 31) ? x[i + sh] : x[31];
      ALU_SLT:  r = (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: r = ({32'd0, x} < {32'd0, y}) ? 32'd1 : 32'd0;
      ALU_XOR:  for (int i = 0; i < 32; i++) r[i] = (x[i] != y[i]);
      ALU_OR:   for (int i = 0; i < 32; i++) r[i] = x[i] | y[i];
      ALU_AND:  for (int i = 0; i < 32; i++) r[i] = x[i] & y[i];
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic apply(alu_sel_e s, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    sel = s; a = x; b = y;
    #1;
    exp = ref_model(s, x, y);
    checks++;
    per_op[int'(s)]++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %s a=%08h b=%08h result=%08h exp %08h", s.name(), x, y, result, exp);
    end
  endtask

  localparam logic [31:0] CORNERS [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                          32'h7FFF_FFFF, 32'h0000_001F, 32'hFFFF_FFE1,
                                          32'h0000_0020};

  initial begin
    for (int s = 0; s < 10; s++) per_op[s] = 0;
    for (int s = 0; s < 10; s++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          apply(alu_sel_e'(s), CORNERS[i], CORNERS[j]);
    for (int n = 0; n < 5000; n++)
      apply(alu_sel_e'($urandom_range(0, 9)), $urandom(), $urandom());
    for (int s = 0; s < 10; s++) begin
      checks++;
      if (per_op[s] == 0) begin
        failures++; $display("FAIL operation %0d never applied", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
