// Instruction fetch unit: the program counter and its next-value logic.
//
//   not taken : PC = PC + 4
//   B         : PC = PC + (SignExtend(BrAddr26)   << 2)   (UncondBr = 1)
//   CBZ taken : PC = PC + (SignExtend(CondAddr19) << 2)   (UncondBr = 0)
//
// UncondBr selects which offset field of the instruction is sign-extended,
// BrTaken selects between PC + 4 and the branch target. An exception
// redirect (exc_take) overrides both and loads exc_vector. The PC is
// updated at every rising clock edge (one instruction per cycle) and is set
// to RESET_PC by the synchronous active-low reset; the reset value is this
// design's choice.
module instruction_fetch
  import legv8_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [25:0]     instr,      // offset fields of the instruction
  input  logic            brtaken,
  input  logic            uncondbr,
  input  logic            exc_take,
  input  logic [XLEN-1:0] exc_vector,
  output logic [XLEN-1:0] pc
);
  logic [XLEN-1:0] se_br26, se_cond19, offset, pc_plus4, br_target, pc_next;

  sign_extend #(.IN_W(26), .OUT_W(XLEN)) u_se_br26   (.in(instr[25:0]), .out(se_br26));
  sign_extend #(.IN_W(19), .OUT_W(XLEN)) u_se_cond19 (.in(instr[23:5]), .out(se_cond19));

  always_comb begin
    offset    = uncondbr ? se_br26 : se_cond19;
    pc_plus4  = pc + XLEN'(4);
    br_target = pc + (offset << 2);
    if (exc_take)     pc_next = exc_vector;
    else if (brtaken) pc_next = br_target;
    else              pc_next = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end
endmodule
