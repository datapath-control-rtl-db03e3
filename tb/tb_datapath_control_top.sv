// End-to-end testbench of the top level at its default sizes.
//
// Processor: a random program of all six instructions (plus a few
// undefined words) fills the whole instruction memory; the data memory is
// filled with a mix of small and random values. The processor then runs
// for RUN_CYCLES clock cycles with random interrupt requests, in lockstep
// with an instruction-set reference model (legv8_asm_pkg): every cycle the
// PC, the register write, the memory write and the exception decision must
// match the model's prediction for one instruction, which also checks
// CPI = 1. At the end the whole data memory, EPC and the cause register are
// compared. Each mechanism is counted and must occur at least once: every
// instruction kind, CBZ taken and not taken, forward and backward branches,
// each exception cause, a write to the zero register and a load of a
// value stored earlier in the run.
//
// Math unit: random add / hold / multiply / init sequences in parallel,
// checked against a model of A and I.
module tb_datapath_control_top;
  import legv8_pkg::*;
  import legv8_asm_pkg::*;
  import math_unit_pkg::*;

  localparam int IW = 1024, DW = 1024;
  localparam int EPISODES = 60;       // programs run, each from reset
  localparam int EP_CYCLES = 3000;    // clock cycles per program
  localparam int RUN_CYCLES = EPISODES * EP_CYCLES;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic        cpu_irq = 0, cpu_prog_we = 0, cpu_dmem_h_we = 0;
  logic [9:0]  cpu_prog_addr = 0, cpu_dmem_h_addr = 0;
  logic [31:0] cpu_prog_wdata = 0, cpu_instr;
  logic [63:0] cpu_dmem_h_wdata = 0, cpu_dmem_h_rdata, cpu_pc, cpu_rf_wdata;
  logic [63:0] cpu_dm_addr, cpu_dm_wdata, cpu_epc;
  logic        cpu_rf_we, cpu_dm_we, cpu_exc_take;
  logic [4:0]  cpu_rf_waddr;
  cause_e      cpu_cause;
  mu_op_e      mu_op = MU_HOLD;
  logic [15:0] mu_b = 0, mu_din = 0, mu_a;
  logic [7:0]  mu_i;

  datapath_control_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (pc model)", what, got, exp);
    end
  endtask

  initial begin
    repeat (RUN_CYCLES + EPISODES * (IW + 20) + DW + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [IW];
  legv8_model m;

  // A random register, biased to a few so that values get reused.
  function automatic int rreg();
    int r;
    r = $urandom_range(0, 9);
    return (r == 9) ? 31 : r;
  endfunction

  function automatic int soff(int lo, int hi);
    int v;
    do v = $urandom_range(0, hi - lo) + lo; while (v == 0);
    return v;
  endfunction

  function automatic logic [31:0] rand_instr();
    int t;
    t = $urandom_range(0, 99);
    if (t < 20) return i_add(rreg(), rreg(), rreg());
    if (t < 30) return i_sub(rreg(), rreg(), rreg());
    if (t < 35) begin int r; r = rreg(); return i_sub(rreg(), r, r); end   // makes a zero
    if (t < 55) return i_ldur(rreg(), (t % 2) ? 31 : rreg(), $urandom_range(0, 255) & ~7);
    if (t < 70) return i_stur(rreg(), (t % 2) ? 31 : rreg(), $urandom_range(0, 255) & ~7);
    if (t < 77) return i_b(soff(-3, 12));
    if (t < 98) return i_cbz(rreg(), soff(-3, 12));
    return 32'hD000_0000 | 32'($urandom_range(0, 32'h0FFF_FFFF));       // undefined
  endfunction

  int n_kind [7] = '{default: 0};
  int n_cbz_taken = 0, n_cbz_not = 0, n_fwd = 0, n_bwd = 0, n_zr = 0, n_ld_after_st = 0;
  int n_cause [4] = '{default: 0};
  int n_mu [4] = '{default: 0};
  bit stored [DW];

  initial begin
    effect_t e;
    logic [15:0] exp_a;
    logic [7:0]  exp_i;
    m = new(DW);
    foreach (stored[i]) stored[i] = 0;
    // data, loaded once; the model keeps its copy across programs
    for (int i = 0; i < DW; i++) begin
      logic [63:0] d;
      d = ($urandom_range(0, 1) == 0) ? {$urandom, $urandom} : 64'($urandom_range(0, 3));
      m.dmem[i] = d;
      @(negedge clk);
      cpu_dmem_h_we = 1; cpu_dmem_h_addr = 10'(i); cpu_dmem_h_wdata = d;
    end
    @(negedge clk) cpu_dmem_h_we = 0;
    exp_a = 0; exp_i = 0;

    for (int c = 0; c < RUN_CYCLES; c++) begin
      logic [31:0] ins;
      if (c % EP_CYCLES == 0) begin
        // new program, loaded while the processor is held in reset
        rst_n = 0;
        cpu_irq = 0;
        for (int i = 0; i < IW; i++) begin
          prog[i] = rand_instr();
          cpu_prog_we = 1; cpu_prog_addr = 10'(i); cpu_prog_wdata = prog[i];
          @(negedge clk);
        end
        cpu_prog_we = 0;
        @(negedge clk);
        foreach (m.x[r]) m.x[r] = '0;
        m.pc = '0;
        m.epc = '0;
        m.cause = 0;
        exp_a = 0; exp_i = 0;
        rst_n = 1;
      end
      // inputs for this cycle, applied after the falling edge
      cpu_irq = ($urandom_range(0, 199) == 0);
      mu_op = mu_op_e'($urandom_range(0, 3));
      mu_b = (mu_op == MU_MULT) ? 16'($urandom_range(0, 5)) : 16'($urandom);
      mu_din = 16'($urandom);
      #1;
      check(cpu_pc, m.pc, "PC");
      ins = prog[m.pc[11:2]];
      check(64'(cpu_instr), 64'(ins), "instruction");
      begin
        logic [63:0] ld_addr;
        ld_addr = m.rd_reg(ins[9:5]) + {{55{ins[20]}}, ins[20:12]};
        e = m.step(ins, cpu_irq);
        if (e.kind == 2 && !e.exc && stored[m.didx(ld_addr)]) n_ld_after_st++;
      end
      check(64'(cpu_exc_take), 64'(e.exc), "exception taken");
      check(64'(cpu_rf_we), 64'(e.rf_we), "RegWrite");
      if (e.rf_we) begin
        check(64'(cpu_rf_waddr), 64'(e.rf_waddr), "write register");
        check(cpu_rf_wdata, e.rf_wdata, "write data");
        if (e.rf_waddr == 5'd31) n_zr++;
      end
      check(64'(cpu_dm_we), 64'(e.dm_we), "MemWrite");
      if (e.dm_we) begin
        check(cpu_dm_addr, e.dm_addr, "store address");
        check(cpu_dm_wdata, e.dm_wdata, "store data");
        stored[m.didx(e.dm_addr)] = 1;
      end
      if (e.exc) n_cause[e.cause]++;
      else begin
        n_kind[e.kind]++;
        if (e.kind == 5) begin if (e.taken) n_cbz_taken++; else n_cbz_not++; end
        if (e.taken && ((e.kind == 4 && ins[25]) || (e.kind == 5 && ins[23]))) n_bwd++;
        if (e.taken && ((e.kind == 4 && !ins[25]) || (e.kind == 5 && !ins[23]))) n_fwd++;
      end
      n_mu[mu_op]++;
      case (mu_op)
        MU_ADD:  exp_a = exp_a + mu_b;
        MU_MULT: exp_a = 16'(32'(exp_a) * 32'(mu_b));
        MU_INIT: exp_a = mu_din;
        default: ;
      endcase
      exp_i = exp_i + 1;
      @(posedge clk);
      #1;
      check(64'(mu_a), 64'(exp_a), "math unit A");
      check(64'(mu_i), 64'(exp_i), "math unit I");
      @(negedge clk);
    end
    cpu_irq = 0;
    rst_n = 0;
    #1;
    check(cpu_epc, m.epc, "EPC");
    check(64'(cpu_cause), 64'(m.cause), "cause");
    for (int i = 0; i < DW; i++) begin
      cpu_dmem_h_addr = 10'(i); #1;
      check(cpu_dmem_h_rdata, m.dmem[i], "final data memory");
    end

    $display("executed: ADD %0d SUB %0d LDUR %0d STUR %0d B %0d CBZ %0d (taken %0d, not taken %0d)",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], n_cbz_taken, n_cbz_not);
    $display("branches forward %0d backward %0d; zero-register writes %0d; loads of stored data %0d",
             n_fwd, n_bwd, n_zr, n_ld_after_st);
    $display("exceptions: undefined %0d overflow %0d I/O %0d; math unit hold %0d add %0d mult %0d init %0d",
             n_cause[1], n_cause[2], n_cause[3], n_mu[0], n_mu[1], n_mu[2], n_mu[3]);
    for (int k = 0; k < 6; k++) begin checks++; if (n_kind[k] == 0) begin failures++; $display("FAIL kind %0d never ran", k); end end
    for (int k = 1; k < 4; k++) begin checks++; if (n_cause[k] == 0) begin failures++; $display("FAIL cause %0d never taken", k); end end
    for (int k = 0; k < 4; k++) begin checks++; if (n_mu[k] == 0) begin failures++; $display("FAIL math op %0d never ran", k); end end
    checks++; if (n_cbz_taken == 0 || n_cbz_not == 0) begin failures++; $display("FAIL CBZ coverage"); end
    checks++; if (n_fwd == 0 || n_bwd == 0) begin failures++; $display("FAIL branch direction coverage"); end
    checks++; if (n_zr == 0) begin failures++; $display("FAIL no zero-register write"); end
    checks++; if (n_ld_after_st == 0) begin failures++; $display("FAIL no load of stored data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
