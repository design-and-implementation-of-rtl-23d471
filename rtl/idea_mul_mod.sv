// idea_mul_mod: multiplication modulo 2^16+1, the IDEA "multiply" operation.
//
// Operands and result are 16-bit words in which the value 0 stands for 2^16,
// so every word is a non-zero residue modulo the prime 65537. The 17x17-bit
// product p is reduced with the identity 2^16 = -1 (mod 65537):
// p = hi*2^16 + lo  =>  p mod 65537 = lo - hi, plus 65537 when lo < hi.
// A result of 2^16 truncates to 0, which is again the encoding of 2^16.
// The unit is purely combinational; the modulus and the zero encoding are
// those of IDEA, the low/high reduction is this design's choice.
module idea_mul_mod
  import idea_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t p
);

  logic [16:0] a_ext, b_ext;
  logic [32:0] prod;
  logic [16:0] lo, hi;
  logic [17:0] diff;

  always_comb begin
    a_ext = (a == '0) ? 17'h1_0000 : {1'b0, a};
    b_ext = (b == '0) ? 17'h1_0000 : {1'b0, b};
    prod  = 33'(a_ext) * 33'(b_ext);
    lo    = {1'b0, prod[15:0]};
    hi    = prod[32:16];
    if (lo >= hi) diff = 18'(lo) - 18'(hi);
    else          diff = 18'(lo) - 18'(hi) + 18'd65537;
    p     = diff[15:0];
  end

endmodule
