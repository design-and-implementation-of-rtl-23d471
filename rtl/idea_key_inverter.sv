// idea_key_inverter: derives the 52 IDEA decryption sub-keys from the 52
// encryption sub-keys, so that the same round hardware decrypts.
//
// Decryption round r (1..8) uses, with e the encryption sub-keys s1..s52,
//   K1 = inv(e[6(9-r)+1])   K4 = inv(e[6(9-r)+4])
//   K2 = -e[6(9-r)+3], K3 = -e[6(9-r)+2]   (rounds 2..8, middle pair crossed)
//   K2 = -e[6(9-r)+2], K3 = -e[6(9-r)+3]   (round 1 and the output stage)
//   K5 = e[6(8-r)+5]        K6 = e[6(8-r)+6]
// and the output stage uses inv(e1), -e2, -e3, inv(e4); inv() is the inverse
// modulo 2^16+1 and -x the negation modulo 2^16. This is the standard IDEA
// decryption key table.
//
// How it works: on start the negated and copied entries are written in one
// clock; the eighteen inverses then go one after another through a single
// idea_mul_inv (16 clocks each, one clock of hand-over): done pulses
// 306 clocks after the edge that takes start. enc_keys must stay stable
// until done pulses. dec_keys is a
// register and keeps its value until the next start. Using one shared
// inverter, not eighteen, is this design's choice.
module idea_key_inverter
  import idea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  subkeys_t enc_keys,
  output logic     busy,
  output logic     done,
  output subkeys_t dec_keys
);

  localparam int unsigned NUM_INV = 2 * NUM_STAGES;

  logic       run_q;
  logic [4:0] idx_q;        // which of the 18 inverses is in flight
  logic       inv_start, inv_busy, inv_done;
  word_t      inv_x, inv_y;

  // source and destination sub-key index (0-based) of inverse number i
  function automatic int unsigned inv_src(logic [4:0] i);
    return KEYS_PER_ROUND * (NUM_STAGES - 1 - (int'(i) >> 1)) + (i[0] ? 3 : 0);
  endfunction
  function automatic int unsigned inv_dst(logic [4:0] i);
    return KEYS_PER_ROUND * (int'(i) >> 1) + (i[0] ? 3 : 0);
  endfunction

  assign inv_x     = enc_keys[inv_src(run_q ? idx_q + 5'd1 : 5'd0)];
  assign inv_start = (start && !run_q) || (run_q && inv_done && idx_q != 5'(NUM_INV - 1));

  idea_mul_inv u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .x(inv_x),
    .busy(inv_busy), .done(inv_done), .y(inv_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= 1'b0;
      idx_q    <= '0;
      dec_keys <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q <= 1'b1;
          idx_q <= '0;
          for (int r = 0; r < int'(NUM_STAGES); r++) begin
            automatic int unsigned s = KEYS_PER_ROUND * (NUM_STAGES - 1 - r);
            automatic int unsigned d = KEYS_PER_ROUND * r;
            if (r == 0 || r == int'(NUM_STAGES) - 1) begin
              dec_keys[d+1] <= -enc_keys[s+1];
              dec_keys[d+2] <= -enc_keys[s+2];
            end else begin
              dec_keys[d+1] <= -enc_keys[s+2];
              dec_keys[d+2] <= -enc_keys[s+1];
            end
            if (r < int'(NUM_ROUNDS)) begin
              dec_keys[d+4] <= enc_keys[s-KEYS_PER_ROUND+4];
              dec_keys[d+5] <= enc_keys[s-KEYS_PER_ROUND+5];
            end
          end
        end
      end else if (inv_done) begin
        dec_keys[inv_dst(idx_q)] <= inv_y;
        if (idx_q == 5'(NUM_INV - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  assign busy = run_q;

endmodule
