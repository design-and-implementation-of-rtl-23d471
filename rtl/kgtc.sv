// kgtc: key generator and time controller of the temporal IDEA engine.
//
// The 128-bit key is the first dimension of the secret; the moment at which
// each sub-key set is taken from it is the second. While a schedule runs the
// key register rotates left by one bit on every clock. Each of the
// NUM_STAGES stages (eight rounds and the output transformation) works as
// follows:
//   * at stage start the NT time bits at positions TIME_POS (first entry is
//     the most significant) are taken from the current key into time_q and
//     the counter restarts at 0;
//   * when the counter equals time_q the key has turned by time_q bits:
//     key_pick[stage] pulses and subkeys carries the top 96 bits of the key
//     (six 16-bit sub-keys; the output stage uses the top 64);
//   * COMPUTE_CYCLES later (counter = time_q + COMPUTE_CYCLES) the round has
//     finished and stage_open[stage] pulses to open that stage's register;
//     the counter is reset and the next stage begins.
// A stage therefore lasts time_q + COMPUTE_CYCLES + 1 clocks and turns the
// key by as many bits. The key only turns while a schedule runs, so the
// rotation left for the next block depends only on the key and the number
// of blocks processed, which lets a receiver replay it exactly.
//
// Interface: key_load (idle only) loads key_in; start (idle only) runs one
// schedule; busy is high while it runs; done pulses with the last
// stage_open. key_pick, subkeys and stage_open are combinational outputs
// valid in the cycle they pulse.
//
// Defined by the temporal IDEA scheme: the one-bit rotation per clock, the four time bits,
// the counter compared with them, the two extra counts for the round and
// the 96-bit sub-key pick. This design's choices: time bits latched at stage
// start, the stage length of time_q+3 clocks, the output-stage pick of 64
// bits, and the key standing still while idle.
module kgtc
  import idea_pkg::*;
#(
  parameter int unsigned NT             = 4,
  parameter int unsigned TIME_POS [NT]  = '{120, 73, 57, 35},
  parameter int unsigned COMPUTE_CYCLES = 2,
  parameter int unsigned STAGES         = NUM_STAGES,
  localparam int unsigned CW            = $clog2((1 << NT) + COMPUTE_CYCLES),
  localparam int unsigned SW            = $clog2(STAGES)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_load,
  input  key_t              key_in,
  input  logic              start,
  output logic              busy,
  output logic [STAGES-1:0] key_pick,
  output round_keys_t       subkeys,
  output logic [STAGES-1:0] stage_open,
  output logic              done,
  output logic [NT-1:0]     time_value,
  output logic [CW-1:0]     counter,
  output key_t              key
);

  key_t           key_q;
  logic [NT-1:0]  time_q;
  logic [CW-1:0]  cnt_q;
  logic [SW-1:0]  stage_q;
  logic           run_q;

  function automatic logic [NT-1:0] time_bits(key_t k);
    logic [NT-1:0] t;
    for (int i = 0; i < int'(NT); i++) t[NT-1-i] = k[TIME_POS[i]];
    return t;
  endfunction

  key_t key_rot;
  logic pick_now, open_now;

  assign key_rot  = {key_q[KEY_W-2:0], key_q[KEY_W-1]};
  assign pick_now = run_q && (cnt_q == CW'(time_q));
  assign open_now = run_q && (cnt_q == CW'(time_q) + CW'(COMPUTE_CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q   <= '0;
      time_q  <= '0;
      cnt_q   <= '0;
      stage_q <= '0;
      run_q   <= 1'b0;
    end else if (!run_q) begin
      if (key_load) key_q <= key_in;
      if (start) begin
        run_q   <= 1'b1;
        cnt_q   <= '0;
        stage_q <= '0;
        time_q  <= time_bits(key_q);
      end
    end else begin
      key_q <= key_rot;
      if (open_now) begin
        cnt_q  <= '0;
        time_q <= time_bits(key_rot);
        if (stage_q == SW'(STAGES - 1)) run_q <= 1'b0;
        else                            stage_q <= stage_q + 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  always_comb begin
    key_pick   = '0;
    stage_open = '0;
    if (pick_now) key_pick[stage_q]   = 1'b1;
    if (open_now) stage_open[stage_q] = 1'b1;
  end

  assign subkeys    = key_q[KEY_W-1 -: KEYS_PER_ROUND*WORD_W];
  assign done       = open_now && (stage_q == SW'(STAGES - 1));
  assign busy       = run_q;
  assign time_value = time_q;
  assign counter    = cnt_q;
  assign key        = key_q;

  // at most one stage is picked and one opened per clock
  a_pick_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(key_pick));
  a_open_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(stage_open));
  // a stage register opens exactly COMPUTE_CYCLES after its sub-keys were picked
  a_pick_then_open: assert property (@(posedge clk) disable iff (!rst_n)
                                     (|key_pick) |-> ##COMPUTE_CYCLES (stage_open == $past(key_pick, COMPUTE_CYCLES)));

endmodule
