// Testbench for sign_extend: three widths used by the processor (9, 19,
// 26 bits to 64), random and boundary inputs, compared with an arithmetic
// sign extension computed here.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [8:0]  in9;   logic [63:0] out9;
  logic [18:0] in19;  logic [63:0] out19;
  logic [25:0] in26;  logic [63:0] out26;

  sign_extend #(.IN_W(9),  .OUT_W(64)) u9  (.in(in9),  .out(out9));
  sign_extend #(.IN_W(19), .OUT_W(64)) u19 (.in(in19), .out(out19));
  sign_extend #(.IN_W(26), .OUT_W(64)) u26 (.in(in26), .out(out26));

  function automatic logic [63:0] sx(longint v, int w);
    longint m = longint'(1) << (w - 1);
    longint u = v & ((longint'(1) << w) - 1);
    return 64'((u ^ m) - m);
  endfunction

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: begin in9 = '0; in19 = '0; in26 = '0; end
        1: begin in9 = '1; in19 = '1; in26 = '1; end
        2: begin in9 = 9'h100; in19 = 19'h40000; in26 = 26'h2000000; end
        3: begin in9 = 9'h0FF; in19 = 19'h3FFFF; in26 = 26'h1FFFFFF; end
        default: begin in9 = 9'($urandom); in19 = 19'($urandom); in26 = 26'($urandom); end
      endcase
      #1;
      check(out9,  sx(longint'(in9), 9),   "se9");
      check(out19, sx(longint'(in19), 19), "se19");
      check(out26, sx(longint'(in26), 26), "se26");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
