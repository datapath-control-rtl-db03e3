// Testbench for the instruction memory: loads random words through the
// load port, then reads them back at byte addresses PC = 4 * index, also
// with high PC bits set (the memory repeats through the address space).
module tb_instruction_memory;
  localparam int WORDS = 1024;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [63:0] pc;
  logic [31:0] instr;
  logic prog_we;
  logic [9:0] prog_addr;
  logic [31:0] prog_wdata;
  logic [31:0] model [WORDS];

  instruction_memory #(.WORDS(WORDS)) dut (.clk, .pc, .instr, .prog_we, .prog_addr, .prog_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_wdata = 0; pc = 0;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_wdata = model[i];
    end
    @(negedge clk) prog_we = 0;
    for (int k = 0; k < 3000; k++) begin
      int idx;
      idx = $urandom_range(0, WORDS - 1);
      pc = (k % 3 == 0) ? {32'h0, 2'b11, 18'($urandom), 10'(idx), 2'b00} : 64'(idx * 4);
      #1;
      checks++;
      if (instr !== model[idx]) begin
        failures++;
        $display("FAIL pc=%h got %h expected %h", pc, instr, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
