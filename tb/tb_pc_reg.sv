// tb_pc_reg: self-checking testbench of the program counter register.
//
// Checks the reset value, that a rising edge with we = 1 loads d, and that the
// value holds while we = 0 (also across many edges with a changing d).
// A reference copy of the register, kept in the testbench, gives the expected
// value. Prints one TB_RESULT line and finishes; a watchdog ends a hung run.
module tb_pc_reg;
  localparam int unsigned W = 32;
  localparam logic [W-1:0] RV = 32'h0000_1000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         we;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  pc_reg #(.WIDTH(W), .RESET_VALUE(RV)) dut (.clk, .rst_n, .we, .d, .q);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%08h expected %08h", what, q, model);
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; d = '0; model = RV;
    #12;
    check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      d  = $urandom();
      @(posedge clk);
      if (we) model = d;
      #1;
      check(we ? "load" : "hold");
    end
    // hold for several cycles with d changing
    we = 1'b0;
    repeat (10) begin
      @(negedge clk); d = $urandom();
      @(posedge clk); #1; check("hold-run");
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
