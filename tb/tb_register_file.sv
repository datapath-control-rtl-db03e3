// Testbench for the register file: reset to zero, random writes and reads
// on both ports compared with a model array, register 31 always reading
// zero, and a write becoming visible only after the clock edge.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] aa, ab, aw;
  logic [63:0] dw, da, db;
  logic regwrite;
  logic [63:0] model [32];

  register_file dut (.clk, .rst_n, .aa, .ab, .aw, .dw, .regwrite, .da, .db);

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
    regwrite = 0; aa = 0; ab = 0; aw = 0; dw = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      aa = 5'(r); ab = 5'(31 - r); #1;
      check(da, 64'd0, "reset da");
      check(db, 64'd0, "reset db");
    end
    for (int k = 0; k < 3000; k++) begin
      aw = 5'($urandom); dw = {$urandom, $urandom};
      regwrite = ($urandom_range(0, 3) != 0);
      aa = (k % 5 == 0) ? aw : 5'($urandom);
      ab = 5'($urandom);
      #1;
      // before the edge the old value is read
      check(da, (aa == 31) ? 64'd0 : model[aa], "da");
      check(db, (ab == 31) ? 64'd0 : model[ab], "db");
      @(posedge clk);
      if (regwrite && aw != 31) model[aw] = dw;
      #1;
      aa = aw; #1;
      check(da, (aw == 31) ? 64'd0 : model[aw], "da after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
