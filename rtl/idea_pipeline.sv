// idea_pipeline: the unrolled IDEA datapath of the temporal engine.
//
// Eight idea_round instances and one idea_output_transform sit in a row.
// In front of round 1 is the input register; behind every stage is a gated
// stage register that only loads when the controller opens it
// (stage_open[s]). Each stage reads its sub-keys from its own slice of a
// 52-word sub-key bank (s1..s6 for round 1, ..., s49..s52 for the output
// stage). The bank is written either one stage at a time (key_load[s]
// stores set_keys, the six words the key generator picked; the output stage
// keeps the first four) or all at once (bank_load, used for decryption
// keys). Because stage s's sub-keys and its input only change when the
// controller says so, the time at which data may move on is set entirely by
// the controller.
//
// Timing: after stage s's sub-keys and input are in place the round needs
// two clocks (see idea_round); stage_open[s] must not come earlier. out_data
// is the output-stage register.
//
// The temporal IDEA scheme defines the eight unrolled rounds, the registers between them
// opened by the time controller and the output transformation. The shared
// bank with a bulk-load port is this design's choice, made so that the same
// datapath also runs with decryption keys.
module idea_pipeline
  import idea_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_load,
  input  block_t                in_data,
  input  logic [NUM_STAGES-1:0] key_load,
  input  round_keys_t           set_keys,
  input  logic                  bank_load,
  input  subkeys_t              bank_data,
  input  logic [NUM_STAGES-1:0] stage_open,
  output block_t                out_data,
  output subkeys_t              bank
);

  subkeys_t    bank_q;
  block_t      stage_q   [NUM_STAGES+1];  // [0] input register, [s] after stage s
  block_t      stage_res [NUM_STAGES];    // combinational result of stage s+1
  round_keys_t rkeys     [NUM_ROUNDS];
  out_keys_t   okeys;

  always_comb begin
    for (int r = 0; r < int'(NUM_ROUNDS); r++)
      for (int j = 0; j < int'(KEYS_PER_ROUND); j++)
        rkeys[r][j] = bank_q[KEYS_PER_ROUND*r + j];
    for (int j = 0; j < int'(KEYS_PER_OUTPUT); j++)
      okeys[j] = bank_q[KEYS_PER_ROUND*NUM_ROUNDS + j];
  end

  for (genvar r = 0; r < NUM_ROUNDS; r++) begin : g_round
    idea_round u_round (
      .clk(clk), .rst_n(rst_n), .x(stage_q[r]), .k(rkeys[r]), .y(stage_res[r])
    );
  end

  idea_output_transform u_out (
    .x(stage_q[NUM_ROUNDS]), .k(okeys), .y(stage_res[NUM_ROUNDS])
  );

  // sub-key bank
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_q <= '0;
    end else if (bank_load) begin
      bank_q <= bank_data;
    end else begin
      for (int s = 0; s < int'(NUM_ROUNDS); s++)
        if (key_load[s])
          for (int j = 0; j < int'(KEYS_PER_ROUND); j++)
            bank_q[KEYS_PER_ROUND*s + j] <= set_keys[j];
      if (key_load[NUM_ROUNDS])
        for (int j = 0; j < int'(KEYS_PER_OUTPUT); j++)
          bank_q[KEYS_PER_ROUND*NUM_ROUNDS + j] <= set_keys[j];
    end
  end

  // input register and gated stage registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= int'(NUM_STAGES); s++) stage_q[s] <= '0;
    end else begin
      if (in_load) stage_q[0] <= in_data;
      for (int s = 0; s < int'(NUM_STAGES); s++)
        if (stage_open[s]) stage_q[s+1] <= stage_res[s];
    end
  end

  assign out_data = stage_q[NUM_STAGES];
  assign bank     = bank_q;

endmodule
