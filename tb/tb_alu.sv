// Testbench for the ALU: add, subtract and pass-B on random and corner
// operands. Expected results, the zero flag and the signed-overflow flag
// are computed here from 65-bit sign-extended arithmetic.
module tb_alu;
  import legv8_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] a, b, result;
  alu_op_e op;
  logic zero, overflow;

  alu dut (.a, .b, .op, .result, .zero, .overflow);

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h op=%0d got %h expected %h", what, a, b, op, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [64:0] wide;
  logic [63:0] exp_r;
  logic exp_v;
  logic [63:0] corner [6] = '{64'd0, 64'd1, 64'hFFFF_FFFF_FFFF_FFFF,
                              64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000, 64'd5};

  initial begin
    for (int k = 0; k < 3000; k++) begin
      if (k < 108) begin
        a = corner[k % 6]; b = corner[(k / 6) % 6]; op = alu_op_e'((k / 36) % 3);
      end else begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        if (k % 7 == 0) b = a;
        op = alu_op_e'($urandom_range(0, 2));
      end
      #1;
      case (op)
        ALU_ADD: begin wide = {a[63], a} + {b[63], b}; exp_r = wide[63:0]; exp_v = wide[64] != wide[63]; end
        ALU_SUB: begin wide = {a[63], a} - {b[63], b}; exp_r = wide[63:0]; exp_v = wide[64] != wide[63]; end
        default: begin exp_r = b; exp_v = 1'b0; end
      endcase
      check(result, exp_r, "result");
      check(64'(zero), 64'(exp_r == 64'd0), "zero");
      check(64'(overflow), 64'(exp_v), "overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
