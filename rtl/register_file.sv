// Register file with two read ports and one write port, named as in the
// datapath: read address Aa -> data Da (Rn), read address Ab -> data Db (Rm
// or Rd, selected outside by Reg2Loc), write address Aw with data Dw (Rd),
// enabled by RegWrite.
//
// Reads are combinational; the write happens at the rising clock edge, so
// an instruction reads the old value of a register it writes. Register 31
// is the zero register: it reads 0 and ignores writes. The zero register,
// the synchronous active-low reset of all registers to 0 and the size
// (32 x 64 bits, set by the 5-bit register fields) are this design's
// choices where the description is silent.
module register_file
  import legv8_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned NREG  = NREGS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] aa,
  input  logic [$clog2(NREG)-1:0] ab,
  input  logic [$clog2(NREG)-1:0] aw,
  input  logic [W-1:0]            dw,
  input  logic                    regwrite,
  output logic [W-1:0]            da,
  output logic [W-1:0]            db
);
  localparam int unsigned AW = $clog2(NREG);
  localparam logic [AW-1:0] ZREG = AW'(NREG - 1);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (regwrite && aw != ZREG) begin
      regs[aw] <= dw;
    end
  end

  assign da = (aa == ZREG) ? '0 : regs[aa];
  assign db = (ab == ZREG) ? '0 : regs[ab];
endmodule
