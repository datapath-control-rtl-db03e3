// Sign extender ("SE"): widens an IN_W-bit two's-complement field to OUT_W
// bits by copying its top bit. The processor uses three of them, for the
// load/store offset DAddr9 and for the branch offsets BrAddr26 and
// CondAddr19. Purely combinational; after synthesis it is only wiring (the
// sign bit fanned out), kept as a module because it is a named datapath block.
module sign_extend #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 64
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
