// Math unit: the register-transfer example of an accumulator A and a step
// counter I. Each rising clock edge performs one of four operations on A
// and always increments I:
//
//   MU_ADD  : A = A + B;   I++
//   MU_HOLD : A = A;       I++
//   MU_MULT : A = A * B;   I++   (product truncated to W bits)
//   MU_INIT : A = Din;     I++
//
// The four transfers are the specification; the widths (W-bit A, B and
// Din, IW-bit wrapping counter), the operation encoding and the synchronous
// active-low reset of A and I to 0 are this design's choices.
module math_unit
  import math_unit_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned IW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mu_op_e        op,
  input  logic [W-1:0]  b,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  a,
  output logic [IW-1:0] i
);
  logic [W-1:0] a_next;

  always_comb begin
    unique case (op)
      MU_ADD:  a_next = a + b;
      MU_MULT: a_next = a * b;
      MU_INIT: a_next = din;
      default: a_next = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= '0;
      i <= '0;
    end else begin
      a <= a_next;
      i <= i + IW'(1);
    end
  end
endmodule
