// Testbench for the data memory: random writes from the processor port
// (byte addresses, doubleword granularity) and from the host port, with
// reads on both ports compared with a model, including a same-cycle write
// by both ports to one word (the processor's write wins).
module tb_data_memory;
  localparam int WORDS = 1024;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [63:0] addr, din, dout, h_wdata, h_rdata;
  logic memwrite, h_we;
  logic [9:0] h_addr;
  logic [63:0] model [WORDS];

  data_memory #(.WORDS(WORDS)) dut (.clk, .addr, .din, .memwrite, .dout,
                                    .h_we, .h_addr, .h_wdata, .h_rdata);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    memwrite = 0; h_we = 0; addr = 0; din = 0; h_addr = 0; h_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = 10'(i); h_wdata = {$urandom, $urandom}; model[i] = h_wdata;
    end
    @(negedge clk) h_we = 0;
    for (int k = 0; k < 5000; k++) begin
      int ia, ih;
      @(negedge clk);
      ia = $urandom_range(0, WORDS - 1);
      ih = (k % 4 == 0) ? ia : $urandom_range(0, WORDS - 1);
      addr = {$urandom, 19'($urandom), 10'(ia), 3'($urandom)};
      din = {$urandom, $urandom};
      memwrite = $urandom_range(0, 1);
      h_addr = 10'(ih); h_wdata = {$urandom, $urandom};
      h_we = $urandom_range(0, 1);
      #1;
      check(dout, model[ia], "dout");
      check(h_rdata, model[ih], "h_rdata");
      @(posedge clk);
      if (h_we) model[ih] = h_wdata;
      if (memwrite) model[ia] = din;
    end
    @(negedge clk);
    memwrite = 0; h_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      h_addr = 10'(i); #1;
      check(h_rdata, model[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
