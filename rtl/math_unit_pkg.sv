// Operation codes of the math-unit example (an accumulator register A and a
// step counter I). The four operations are the ones the unit is specified
// with; their two-bit encoding is this implementation's choice.
package math_unit_pkg;
  typedef enum logic [1:0] {
    MU_HOLD = 2'd0,  // A = A
    MU_ADD  = 2'd1,  // A = A + B
    MU_MULT = 2'd2,  // A = A * B
    MU_INIT = 2'd3   // A = Din
  } mu_op_e;
endpackage
