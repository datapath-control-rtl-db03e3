// Testbench for the instruction fetch unit: reset value, PC + 4 steps,
// unconditional (BrAddr26) and conditional (CondAddr19) branch targets
// with positive and negative offsets, and exception redirects. The next PC
// is predicted here every cycle; one PC update per clock is checked.
module tb_instruction_fetch;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [25:0] instr;
  logic brtaken, uncondbr, exc_take;
  logic [63:0] exc_vector, pc, exp_pc;
  int n_seq = 0, n_b = 0, n_cb = 0, n_exc = 0, n_neg = 0;

  instruction_fetch dut (.clk, .rst_n, .instr, .brtaken, .uncondbr, .exc_take, .exc_vector, .pc);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = 0; brtaken = 0; uncondbr = 0; exc_take = 0; exc_vector = 0;
    repeat (2) @(posedge clk);
    #1 check(pc, 64'd0, "reset PC");
    rst_n = 1;
    exp_pc = 0;
    for (int k = 0; k < 5000; k++) begin
      int sel;
      sel = $urandom_range(0, 9);
      instr = 26'($urandom);
      brtaken = (sel >= 4 && sel <= 8);
      uncondbr = $urandom_range(0, 1);
      exc_take = (sel == 9);
      exc_vector = 64'hC000_0000 + 64'(32 * $urandom_range(0, 2));
      if (exc_take) begin
        exp_pc = exc_vector; n_exc++;
      end else if (brtaken && uncondbr) begin
        exp_pc = exp_pc + 64'($signed(instr[25:0])) * 4; n_b++;
        if (instr[25]) n_neg++;
      end else if (brtaken) begin
        exp_pc = exp_pc + 64'($signed(instr[23:5])) * 4; n_cb++;
        if (instr[23]) n_neg++;
      end else begin
        exp_pc = exp_pc + 4; n_seq++;
      end
      @(posedge clk);
      #1 check(pc, exp_pc, "next PC");
    end
    checks++;
    if (n_seq == 0 || n_b == 0 || n_cb == 0 || n_exc == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage seq=%0d b=%0d cb=%0d exc=%0d neg=%0d", n_seq, n_b, n_cb, n_exc, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
