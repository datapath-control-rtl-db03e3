// Testbench for the exception unit: random combinations of undefined
// instruction, ADD/SUB overflow and interrupt request. Checks the handler
// vector, the priority among simultaneous events, that an overflow of a
// non-arithmetic instruction is ignored, and that EPC and the cause are
// saved at the clock edge and held otherwise.
module tb_exception_unit;
  import legv8_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [63:0] pc, vector, epc, exp_epc, exp_vec;
  logic illegal, arith, overflow, irq, take, exp_take;
  cause_e cause, exp_cause, c_now;
  int n [4] = '{default: 0};

  exception_unit dut (.clk, .rst_n, .pc, .illegal, .arith, .overflow, .irq,
                      .take, .vector, .epc, .cause);

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
    pc = 0; illegal = 0; arith = 0; overflow = 0; irq = 0;
    repeat (2) @(posedge clk);
    #1;
    check(epc, 0, "reset epc");
    check(64'(cause), 64'(CAUSE_NONE), "reset cause");
    rst_n = 1;
    exp_epc = 0; exp_cause = CAUSE_NONE;
    for (int k = 0; k < 4000; k++) begin
      pc = {$urandom, $urandom};
      illegal  = ($urandom_range(0, 5) == 0);
      arith    = $urandom_range(0, 1);
      overflow = ($urandom_range(0, 3) == 0);
      irq      = ($urandom_range(0, 5) == 0);
      #1;
      if (illegal)               begin c_now = CAUSE_UNDEF; exp_vec = 64'hC000_0000; end
      else if (arith && overflow) begin c_now = CAUSE_OVF;  exp_vec = 64'hC000_0020; end
      else if (irq)              begin c_now = CAUSE_IO;    exp_vec = 64'hC000_0040; end
      else                       begin c_now = CAUSE_NONE;  exp_vec = 64'hx; end
      exp_take = (c_now != CAUSE_NONE);
      n[c_now]++;
      check(64'(take), 64'(exp_take), "take");
      if (exp_take) check(vector, exp_vec, "vector");
      @(posedge clk);
      if (exp_take) begin exp_epc = pc; exp_cause = c_now; end
      #1;
      check(epc, exp_epc, "epc");
      check(64'(cause), 64'(exp_cause), "cause");
    end
    checks++;
    if (n[1] == 0 || n[2] == 0 || n[3] == 0 || n[0] == 0) begin
      failures++;
      $display("FAIL coverage %p", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
