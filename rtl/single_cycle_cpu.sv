// Single-cycle processor for six LEGv8 instructions: ADD, SUB, LDUR, STUR,
// B and CBZ. Every instruction is fetched, decoded, executed and retired in
// one clock cycle (CPI = 1):
//
//   instruction fetch -> instruction memory -> register file (Aa = Rn,
//   Ab = Reg2Loc ? Rm : Rd, Aw = Rd) -> ALU (B input = ALUSrc ?
//   SignExtend(DAddr9) : Db) -> data memory (Addr = ALU result, Din = Db)
//   -> write-back Dw = MemToReg ? Dout : ALU result
//
// The control unit sets the muxes and enables from the opcode; CBZ passes
// Reg[Rd] through the ALU and branches on its zero flag. The exception unit
// cancels an undefined instruction, an overflowing ADD/SUB or (on irq) the
// current instruction, saves its PC in EPC and redirects fetch to the
// handler vector.
//
// Ports: prog_* load the instruction memory, dmem_h_* read and write the
// data memory from outside, both usable while the processor is held in
// reset. The trace outputs show, for the instruction of the current cycle,
// its PC and word, the register write (rf_we, rf_waddr, rf_wdata) and the
// memory write (dm_we, dm_addr, dm_wdata) that take effect at the next
// rising edge. Reset is synchronous and active low.
//
// The datapath and the control table follow the specification; the sizes,
// the memories' load ports, the zero register and the exception details
// are this design's choices (see each sub-module).
module single_cycle_cpu
  import legv8_pkg::*;
#(
  parameter int unsigned     IMEM_WORDS = 1024,
  parameter int unsigned     DMEM_WORDS = 1024,
  parameter logic [XLEN-1:0] RESET_PC   = '0,
  parameter bit              EXCEPTIONS = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          irq,
  // instruction memory load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [ILEN-1:0]               prog_wdata,
  // data memory host port
  input  logic                          dmem_h_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_h_addr,
  input  logic [XLEN-1:0]               dmem_h_wdata,
  output logic [XLEN-1:0]               dmem_h_rdata,
  // trace of the current instruction
  output logic [XLEN-1:0]               pc,
  output logic [ILEN-1:0]               instr,
  output logic                          rf_we,
  output logic [4:0]                    rf_waddr,
  output logic [XLEN-1:0]               rf_wdata,
  output logic                          dm_we,
  output logic [XLEN-1:0]               dm_addr,
  output logic [XLEN-1:0]               dm_wdata,
  // exception state
  output logic                          exc_take,
  output logic [XLEN-1:0]               epc,
  output cause_e                        cause
);
  // Instruction fields
  logic [4:0]      rd, rn, rm;
  logic [8:0]      daddr9;
  // Control
  ctrl_t           ctrl;
  logic            brtaken, illegal, arith;
  // Datapath
  logic [4:0]      ab;
  logic [XLEN-1:0] da, db, se_daddr9, alu_b, alu_result, mem_dout, dw;
  logic            zero, overflow;
  logic [XLEN-1:0] exc_vector;

  assign rd     = instr[4:0];
  assign rn     = instr[9:5];
  assign rm     = instr[20:16];
  assign daddr9 = instr[20:12];

  instruction_fetch #(.RESET_PC(RESET_PC)) u_ifetch (
    .clk, .rst_n, .instr(instr[25:0]),
    .brtaken (brtaken && !exc_take),
    .uncondbr(ctrl.uncondbr),
    .exc_take, .exc_vector,
    .pc
  );

  instruction_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc, .instr, .prog_we, .prog_addr, .prog_wdata
  );

  control u_control (
    .opcode(instr[31:21]), .zero, .ctrl, .brtaken, .illegal, .arith
  );

  // Reg2Loc mux
  assign ab = ctrl.reg2loc ? rm : rd;

  register_file u_rf (
    .clk, .rst_n, .aa(rn), .ab, .aw(rd), .dw,
    .regwrite(rf_we), .da, .db
  );

  sign_extend #(.IN_W(9), .OUT_W(XLEN)) u_se_daddr9 (.in(daddr9), .out(se_daddr9));

  // ALUSrc mux
  assign alu_b = ctrl.alusrc ? se_daddr9 : db;

  alu u_alu (
    .a(da), .b(alu_b), .op(ctrl.aluop),
    .result(alu_result), .zero, .overflow
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_result), .din(db), .memwrite(dm_we), .dout(mem_dout),
    .h_we(dmem_h_we), .h_addr(dmem_h_addr), .h_wdata(dmem_h_wdata),
    .h_rdata(dmem_h_rdata)
  );

  // MemToReg mux
  assign dw = ctrl.memtoreg ? mem_dout : alu_result;

  exception_unit #(.ENABLE(EXCEPTIONS)) u_exc (
    .clk, .rst_n, .pc, .illegal, .arith, .overflow, .irq,
    .take(exc_take), .vector(exc_vector), .epc, .cause
  );

  // A cancelled instruction changes neither registers nor memory. Nothing
  // is written while the processor is held in reset.
  assign rf_we    = ctrl.regwrite && !exc_take && rst_n;
  assign rf_waddr = rd;
  assign rf_wdata = dw;
  assign dm_we    = ctrl.memwrite && !exc_take && rst_n;
  assign dm_addr  = alu_result;
  assign dm_wdata = db;

  // A cancelled instruction must leave registers and memory untouched.
  a_exc_no_write: assert property (@(posedge clk) disable iff (!rst_n)
    exc_take |-> !(rf_we || dm_we));
endmodule
