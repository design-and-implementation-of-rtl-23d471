// idea_round: one IDEA round, computed in two clock cycles.
//
// The round follows the fourteen steps of the IDEA round function:
//   1 s1 = X1 (*) K1      2 s2 = X2 (+) K2     3 s3 = X3 (+) K3    4 s4 = X4 (*) K4
//   5 s5 = s1 ^ s3        6 s6 = s2 ^ s4       7 s7 = s5 (*) K5    8 s8 = s6 (+) s7
//   9 s9 = s8 (*) K6     10 s10 = s7 (+) s9
//  11 s1 ^ s9            12 s3 ^ s9           13 s2 ^ s10         14 s4 ^ s10
// where (*) is multiplication modulo 2^16+1 and (+) addition modulo 2^16.
// The output y is steps 11..14 in that order, which already holds the swap
// of the second and third words that IDEA performs between rounds; the
// output transformation undoes it after the last round.
//
// Timing: steps 1-4 are registered (first cycle), steps 5-14 are
// combinational from that register (second cycle). The register runs every
// clock; x and k must be held stable for the two cycles, which the gated
// stage registers and sub-key registers around this module guarantee.
// Splitting the round after steps 1-4 is this design's choice; the two-cycle
// round latency is the one the controller allows for.
module idea_round
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      x,
  input  round_keys_t k,
  output block_t      y
);

  word_t m1, a2, a3, m4;          // steps 1-4, combinational
  word_t s1_q, s2_q, s3_q, s4_q;  // steps 1-4, registered
  word_t s5, s6, s7, s8, s9, s10;

  idea_mul_mod u_mul1 (.a(x[0]), .b(k[0]), .p(m1));
  idea_mul_mod u_mul4 (.a(x[3]), .b(k[3]), .p(m4));
  assign a2 = x[1] + k[1];
  assign a3 = x[2] + k[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0; s2_q <= '0; s3_q <= '0; s4_q <= '0;
    end else begin
      s1_q <= m1; s2_q <= a2; s3_q <= a3; s4_q <= m4;
    end
  end

  assign s5 = s1_q ^ s3_q;
  assign s6 = s2_q ^ s4_q;
  idea_mul_mod u_mul5 (.a(s5), .b(k[4]), .p(s7));
  assign s8 = s6 + s7;
  idea_mul_mod u_mul6 (.a(s8), .b(k[5]), .p(s9));
  assign s10 = s7 + s9;

  assign y = '{s1_q ^ s9, s3_q ^ s9, s2_q ^ s10, s4_q ^ s10};

endmodule
