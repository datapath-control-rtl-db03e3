// Testbench for the math unit: reset, then random sequences of add, hold,
// multiply and init, with A predicted here and I checked to advance by
// one on every clock whatever the operation.
module tb_math_unit;
  import math_unit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  mu_op_e op;
  logic [15:0] b, din, a, exp_a;
  logic [7:0] i, exp_i;
  int n [4] = '{default: 0};

  math_unit dut (.clk, .rst_n, .op, .b, .din, .a, .i);

  always #5 clk = ~clk;

  task automatic check(logic [15:0] got, logic [15:0] exp, string what);
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
    op = MU_HOLD; b = 0; din = 0;
    repeat (2) @(posedge clk);
    #1;
    check(a, 0, "reset A");
    check(16'(i), 0, "reset I");
    rst_n = 1;
    exp_a = 0; exp_i = 0;
    for (int k = 0; k < 3000; k++) begin
      op = mu_op_e'($urandom_range(0, 3));
      b = 16'($urandom); din = 16'($urandom);
      if (op == MU_MULT && k % 2 == 0) b = 16'($urandom_range(0, 7));
      n[op]++;
      case (op)
        MU_ADD:  exp_a = exp_a + b;
        MU_MULT: exp_a = 16'(32'(exp_a) * 32'(b));
        MU_INIT: exp_a = din;
        default: ;
      endcase
      exp_i = exp_i + 1;
      @(posedge clk);
      #1;
      check(a, exp_a, "A");
      check(16'(i), 16'(exp_i), "I");
    end
    checks++;
    if (n[0] == 0 || n[1] == 0 || n[2] == 0 || n[3] == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
