// Shared types and constants of the single-cycle LEGv8-subset processor.
//
// The processor executes six instructions: ADD, SUB (R format), LDUR, STUR
// (D format), B (B format) and CBZ (CB format). The opcode values and the
// instruction field positions below are the ones of those formats:
//   R  : Opcode[31:21] Rm[20:16] SHAMT[15:10] Rn[9:5] Rd[4:0]
//   D  : Opcode[31:21] DAddr9[20:12] 00[11:10] Rn[9:5] Rd[4:0]
//   B  : Opcode[31:26] BrAddr26[25:0]
//   CB : Opcode[31:24] CondAddr19[23:5] Rd[4:0]
// The 64-bit data width, the ALU operation encoding, the exception cause
// encoding and the exception vectors' zero extension to 64 bits are choices
// of this implementation; the vector addresses themselves (C0000000,
// C0000020, C0000040) are the architectural ones the processor is built for.
package legv8_pkg;

  localparam int unsigned XLEN = 64;   // register and address width
  localparam int unsigned ILEN = 32;   // instruction width
  localparam int unsigned NREGS = 32;  // 5-bit register fields

  // Opcodes (only the bits each format uses).
  localparam logic [10:0] OP_ADD  = 11'b100_0101_1000;
  localparam logic [10:0] OP_SUB  = 11'b110_0101_1000;
  localparam logic [10:0] OP_LDUR = 11'b111_1100_0010;
  localparam logic [10:0] OP_STUR = 11'b111_1100_0000;
  localparam logic [5:0]  OP_B    = 6'b00_0101;
  localparam logic [7:0]  OP_CBZ  = 8'b1011_0100;

  // ALU operations of the control table: "+", "-" and "B==0?" (pass B so
  // that the zero flag tests it).
  typedef enum logic [1:0] {
    ALU_ADD   = 2'd0,
    ALU_SUB   = 2'd1,
    ALU_PASSB = 2'd2
  } alu_op_e;

  // Per-instruction control signals, except BrTaken, which depends on the
  // ALU zero flag and is therefore kept as a separate signal.
  typedef struct packed {
    logic    reg2loc;   // 1: second read register is Rm, 0: it is Rd
    logic    alusrc;    // 1: ALU B input is SignExtend(DAddr9)
    logic    memtoreg;  // 1: write-back data comes from data memory
    logic    regwrite;  // write Reg[Rd]
    logic    memwrite;  // write Mem[Addr]
    logic    uncondbr;  // 1: branch offset is BrAddr26, 0: CondAddr19
    alu_op_e aluop;
  } ctrl_t;

  // Exception causes as stored in the cause register.
  typedef enum logic [1:0] {
    CAUSE_NONE  = 2'd0,
    CAUSE_UNDEF = 2'd1,
    CAUSE_OVF   = 2'd2,
    CAUSE_IO    = 2'd3
  } cause_e;

  localparam logic [XLEN-1:0] VEC_UNDEF = 64'h0000_0000_C000_0000;
  localparam logic [XLEN-1:0] VEC_OVF   = 64'h0000_0000_C000_0020;
  localparam logic [XLEN-1:0] VEC_IO    = 64'h0000_0000_C000_0040;

endpackage
