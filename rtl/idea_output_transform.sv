// idea_output_transform: the IDEA output transformation after round 8.
//
// It combines the four words with the last four sub-keys:
//   Y1 = X1 (*) K1,  Y2 = X3 (+) K2,  Y3 = X2 (+) K3,  Y4 = X4 (*) K4
// (multiplication modulo 2^16+1, addition modulo 2^16). The round modules
// emit their words already swapped for the next round; taking X3 and X2
// crossed here cancels that swap, because IDEA does not swap after its last
// round. Purely combinational; the gated output register of the pipeline
// samples it.
module idea_output_transform
  import idea_pkg::*;
(
  input  block_t    x,
  input  out_keys_t k,
  output block_t    y
);

  word_t y1, y4;

  idea_mul_mod u_mul1 (.a(x[0]), .b(k[0]), .p(y1));
  idea_mul_mod u_mul4 (.a(x[3]), .b(k[3]), .p(y4));

  assign y = '{y1, x[2] + k[1], x[1] + k[2], y4};

endmodule
