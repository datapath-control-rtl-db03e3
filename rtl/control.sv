// Main control unit of the single-cycle processor. It decodes the opcode
// bits Instruction[31:21] into the datapath control signals, following the
// per-instruction control table:
//
//            ADD  SUB  LDUR STUR  B    CBZ
//   Reg2Loc   1    1    x    0    x    0
//   ALUSrc    0    0    1    1    x    0
//   MemToReg  0    0    1    x    x    x
//   RegWrite  1    1    1    0    0    0
//   MemWrite  0    0    0    1    0    0
//   BrTaken   0    0    0    0    1   zero
//   UncondBr  x    x    x    x    1    0
//   ALUOp     +    -    +    +    x   pass B (B==0?)
//
// Every "x" (don't care) is driven as 0, and ALUOp as "+", in this design.
// BrTaken is a separate output because for CBZ it is the ALU zero flag.
// An opcode that matches none of the six instructions raises `illegal` and
// leaves all state-changing signals at 0; `arith` marks ADD and SUB, whose
// signed overflow is an exception. Purely combinational.
module control
  import legv8_pkg::*;
(
  input  logic [10:0] opcode,   // Instruction[31:21]
  input  logic        zero,     // ALU zero flag
  output ctrl_t       ctrl,
  output logic        brtaken,
  output logic        illegal,
  output logic        arith
);
  logic is_add, is_sub, is_ldur, is_stur, is_b, is_cbz;

  assign is_add  = (opcode == OP_ADD);
  assign is_sub  = (opcode == OP_SUB);
  assign is_ldur = (opcode == OP_LDUR);
  assign is_stur = (opcode == OP_STUR);
  assign is_b    = (opcode[10:5] == OP_B);
  assign is_cbz  = (opcode[10:3] == OP_CBZ);

  always_comb begin
    ctrl = '0;
    ctrl.aluop = ALU_ADD;
    if (is_add || is_sub) begin
      ctrl.reg2loc  = 1'b1;
      ctrl.regwrite = 1'b1;
      ctrl.aluop    = is_sub ? ALU_SUB : ALU_ADD;
    end else if (is_ldur) begin
      ctrl.alusrc   = 1'b1;
      ctrl.memtoreg = 1'b1;
      ctrl.regwrite = 1'b1;
    end else if (is_stur) begin
      ctrl.alusrc   = 1'b1;
      ctrl.memwrite = 1'b1;
    end else if (is_b) begin
      ctrl.uncondbr = 1'b1;
    end else if (is_cbz) begin
      ctrl.aluop    = ALU_PASSB;
    end
  end

  assign brtaken = is_b || (is_cbz && zero);
  assign illegal = !(is_add || is_sub || is_ldur || is_stur || is_b || is_cbz);
  assign arith   = is_add || is_sub;
endmodule
