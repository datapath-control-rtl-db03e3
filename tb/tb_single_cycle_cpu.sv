// Directed testbench for the single-cycle processor.
//
// Program 1 multiplies 5 by 7 by repeated addition: it loads its operands
// with LDUR, loops with ADD / SUB / CBZ / B and stores the product with
// STUR, then spins on "B 0". The testbench checks the product in data
// memory, the register write-back values, and that the loop ends after
// exactly 31 instructions in 31 clock cycles (one instruction per cycle).
//
// Program 2 checks the three exception causes: an ADD that overflows, an
// undefined instruction and an interrupt request each cancel the
// instruction, leave its destination untouched, set EPC and the cause,
// and send the PC to C0000020, C0000000 and C0000040.
module tb_single_cycle_cpu;
  import legv8_pkg::*;
  import legv8_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, irq = 0;
  logic prog_we = 0, dmem_h_we = 0;
  logic [9:0] prog_addr = 0, dmem_h_addr = 0;
  logic [31:0] prog_wdata = 0;
  logic [63:0] dmem_h_wdata = 0, dmem_h_rdata;
  logic [63:0] pc, rf_wdata, dm_addr, dm_wdata, epc;
  logic [31:0] instr;
  logic rf_we, dm_we, exc_take;
  logic [4:0] rf_waddr;
  cause_e cause;

  single_cycle_cpu dut (
    .clk, .rst_n, .irq, .prog_we, .prog_addr, .prog_wdata,
    .dmem_h_we, .dmem_h_addr, .dmem_h_wdata, .dmem_h_rdata,
    .pc, .instr, .rf_we, .rf_waddr, .rf_wdata, .dm_we, .dm_addr, .dm_wdata,
    .exc_take, .epc, .cause
  );

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(int a, logic [31:0] w);
    @(negedge clk);
    prog_we = 1; prog_addr = 10'(a); prog_wdata = w;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic poke(int a, logic [63:0] d);
    @(negedge clk);
    dmem_h_we = 1; dmem_h_addr = 10'(a); dmem_h_wdata = d;
    @(negedge clk);
    dmem_h_we = 0;
  endtask

  // Records the write-back values of X3 seen in program 1.
  int x3_writes = 0;
  logic [63:0] x3_last = 0;
  always @(posedge clk) if (rst_n && rf_we && rf_waddr == 5'd3) begin
    x3_writes++;
    x3_last = rf_wdata;
  end

  // Records the stores seen in program 1.
  int st_count = 0;
  logic [63:0] st_addr = 0, st_data = 0;
  always @(posedge clk) if (rst_n && dm_we) begin
    st_count++;
    st_addr = dm_addr;
    st_data = dm_wdata;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    // ---------------- program 1 ----------------
    for (int i = 0; i < 1024; i++) load(i, i_b(0));
    for (int i = 0; i < 8; i++) poke(i, 64'd0);
    poke(0, 64'd5); poke(1, 64'd7); poke(3, 64'd1);
    load(0, i_ldur(1, 31, 0));    // X1 = Mem[0]  = 5
    load(1, i_ldur(2, 31, 8));    // X2 = Mem[8]  = 7
    load(2, i_ldur(4, 31, 24));   // X4 = Mem[24] = 1
    load(3, i_add(3, 3, 1));      // loop: X3 = X3 + X1
    load(4, i_sub(2, 2, 4));      //       X2 = X2 - X4
    load(5, i_cbz(2, 2));         //       if X2 == 0 goto 7
    load(6, i_b(-3));             //       goto 3
    load(7, i_stur(3, 31, 16));   // Mem[16] = X3
    load(8, i_b(0));              // spin
    @(negedge clk) rst_n = 1;
    cycles = 0;
    while (pc != 64'd32 && cycles < 200) begin
      @(posedge clk); #1; cycles++;
    end
    check(64'(cycles), 64'd31, "cycles to reach the end (CPI 1)");
    check(64'(x3_writes), 64'd7, "number of ADD write-backs to X3");
    check(x3_last, 64'd35, "last X3 value");
    check(64'(st_count), 64'd1, "one store");
    check(st_addr, 64'd16, "store address");
    check(st_data, 64'd35, "store data");
    repeat (3) @(posedge clk);
    #1 check(pc, 64'd32, "spinning on B 0");
    @(negedge clk) dmem_h_addr = 10'd2; #1;
    check(dmem_h_rdata, 64'd35, "product stored");
    dmem_h_addr = 10'd0; #1;
    check(dmem_h_rdata, 64'd5, "operand untouched");

    // ---------------- program 2 ----------------
    rst_n = 0;
    poke(4, 64'h7FFF_FFFF_FFFF_FFFF);
    load(0, i_ldur(5, 31, 32));   // X5 = max positive
    load(1, i_add(6, 5, 5));      // overflows
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;           // LDUR done
    check(pc, 64'd4, "after LDUR");
    check(64'(exc_take), 64'd1, "overflow taken");
    check(64'(rf_we), 64'd0, "overflowing ADD does not write");
    @(posedge clk); #1;
    check(pc, 64'hC000_0020, "overflow vector");
    check(epc, 64'd4, "EPC overflow");
    check(64'(cause), 64'(CAUSE_OVF), "cause overflow");

    rst_n = 0;
    load(0, 32'hFFFF_FFFF);       // undefined
    @(negedge clk) rst_n = 1;
    #1 check(64'(exc_take), 64'd1, "undefined taken");
    check(64'(dm_we | rf_we), 64'd0, "undefined writes nothing");
    @(posedge clk); #1;
    check(pc, 64'hC000_0000, "undefined vector");
    check(epc, 64'd0, "EPC undefined");
    check(64'(cause), 64'(CAUSE_UNDEF), "cause undefined");

    rst_n = 0;
    load(0, i_add(7, 31, 31));
    load(1, i_stur(7, 31, 40));   // would store to Mem[40]
    poke(5, 64'hAAAA);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    check(pc, 64'd4, "before interrupt");
    irq = 1;
    #1 check(64'(dm_we), 64'd0, "interrupted STUR does not store");
    @(posedge clk); #1;
    irq = 0;
    check(pc, 64'hC000_0040, "I/O vector");
    check(epc, 64'd4, "EPC I/O");
    check(64'(cause), 64'(CAUSE_IO), "cause I/O");
    dmem_h_addr = 10'd5; #1;
    check(dmem_h_rdata, 64'hAAAA, "memory untouched by interrupted STUR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
