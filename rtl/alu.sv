// ALU of the single-cycle processor. It computes A + B (ADD, and the address
// of LDUR/STUR), A - B (SUB) or passes B through (CBZ, whose "B==0?" test is
// the zero flag). The zero flag and the signed-overflow flag are derived
// from the result. Purely combinational.
//
// The three operations and the zero flag follow the control table; the
// overflow flag feeds the exception unit. The operation encoding is in
// legv8_pkg.
module alu
  import legv8_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         overflow
);
  always_comb begin
    unique case (op)
      ALU_ADD: begin
        result   = a + b;
        overflow = (a[W-1] == b[W-1]) && (result[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        result   = a - b;
        overflow = (a[W-1] != b[W-1]) && (result[W-1] != a[W-1]);
      end
      default: begin
        result   = b;
        overflow = 1'b0;
      end
    endcase
  end

  assign zero = (result == '0);
endmodule
