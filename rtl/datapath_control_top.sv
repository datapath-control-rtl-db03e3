// Top level: the two designs side by side, each with its own ports.
//
//  * cpu_*: the single-cycle LEGv8-subset processor (ADD, SUB, LDUR, STUR,
//    B, CBZ) with its instruction-memory load port, data-memory host port,
//    per-instruction trace and exception state. One instruction retires
//    per clock cycle.
//  * mu_*: the math-unit register-transfer example (accumulator A with
//    add / hold / multiply / load, step counter I).
//
// Both share the clock and the synchronous active-low reset.
module datapath_control_top
  import legv8_pkg::*;
  import math_unit_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned MU_W       = 16,
  parameter int unsigned MU_IW      = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor
  input  logic                          cpu_irq,
  input  logic                          cpu_prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] cpu_prog_addr,
  input  logic [ILEN-1:0]               cpu_prog_wdata,
  input  logic                          cpu_dmem_h_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] cpu_dmem_h_addr,
  input  logic [XLEN-1:0]               cpu_dmem_h_wdata,
  output logic [XLEN-1:0]               cpu_dmem_h_rdata,
  output logic [XLEN-1:0]               cpu_pc,
  output logic [ILEN-1:0]               cpu_instr,
  output logic                          cpu_rf_we,
  output logic [4:0]                    cpu_rf_waddr,
  output logic [XLEN-1:0]               cpu_rf_wdata,
  output logic                          cpu_dm_we,
  output logic [XLEN-1:0]               cpu_dm_addr,
  output logic [XLEN-1:0]               cpu_dm_wdata,
  output logic                          cpu_exc_take,
  output logic [XLEN-1:0]               cpu_epc,
  output cause_e                        cpu_cause,
  // math unit
  input  mu_op_e                        mu_op,
  input  logic [MU_W-1:0]               mu_b,
  input  logic [MU_W-1:0]               mu_din,
  output logic [MU_W-1:0]               mu_a,
  output logic [MU_IW-1:0]              mu_i
);
  single_cycle_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_cpu (
    .clk, .rst_n, .irq(cpu_irq),
    .prog_we(cpu_prog_we), .prog_addr(cpu_prog_addr), .prog_wdata(cpu_prog_wdata),
    .dmem_h_we(cpu_dmem_h_we), .dmem_h_addr(cpu_dmem_h_addr),
    .dmem_h_wdata(cpu_dmem_h_wdata), .dmem_h_rdata(cpu_dmem_h_rdata),
    .pc(cpu_pc), .instr(cpu_instr),
    .rf_we(cpu_rf_we), .rf_waddr(cpu_rf_waddr), .rf_wdata(cpu_rf_wdata),
    .dm_we(cpu_dm_we), .dm_addr(cpu_dm_addr), .dm_wdata(cpu_dm_wdata),
    .exc_take(cpu_exc_take), .epc(cpu_epc), .cause(cpu_cause)
  );

  math_unit #(.W(MU_W), .IW(MU_IW)) u_mu (
    .clk, .rst_n, .op(mu_op), .b(mu_b), .din(mu_din), .a(mu_a), .i(mu_i)
  );
endmodule
