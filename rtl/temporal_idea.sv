// temporal_idea: IDEA block cipher whose key has a second, temporal
// dimension.
//
// The engine combines the key generator and time controller (kgtc) with the
// unrolled eight-round IDEA datapath (idea_pipeline). The key turns by one
// bit per clock; for every stage the controller waits a number of clocks
// given by four bits of the turning key, then hands the stage the top 96 key
// bits as its six sub-keys and, two clocks later, opens the register behind
// it. Which sub-keys a block sees therefore depends on the key and on the
// exact time each set was picked; a key tried with the wrong timing gives a
// different cipher. The key register keeps turning from one block to the
// next, so successive blocks are encrypted with different sub-keys.
//
// Encryption (decrypt = 0): the block is loaded into the input register on
// start, and each stage's sub-keys and register are driven straight by the
// controller, so the block moves through the rounds in step with the key
// schedule. Latency from the edge that takes start to out_valid: the sum
// over the nine stages of (time value + 3) clocks, 27..162 clocks.
//
// Decryption (decrypt = 1): the receiver replays the same schedule from the
// same key, which takes the same time, but stores the picked sub-keys in the
// bank instead of moving data. idea_key_inverter then turns them into the
// decryption sub-keys (306 clocks), they are written into the bank in
// one clock, and the block runs through the nine stages two clocks each.
// A receiver that loads the same key and processes the same number of
// blocks as the sender recovers the plaintext.
//
// Interface: key_load (while ready) loads key_in. start (while ready) takes
// data_in and decrypt and begins one block; start while busy is ignored.
// out_valid pulses for one clock with data_out valid; data_out holds until
// the next block completes. time_value shows the time bits of the stage in
// progress. All registers reset asynchronously on rst_n low.
//
// Defined by the temporal IDEA scheme: the key generator/time controller, the time bits
// 120, 73, 57 and 35, the one-bit rotation per clock, the two extra counts
// per round, the gated registers between unrolled rounds and the decryption
// key table. This design's own choices: how decryption obtains the schedule
// (replay first, then invert), the bank, the start/out_valid handshake and
// the key continuing to turn from block to block.
module temporal_idea
  import idea_pkg::*;
#(
  parameter int unsigned NT            = 4,
  parameter int unsigned TIME_POS [NT] = '{120, 73, 57, 35}
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_W-1:0]    key_in,
  input  logic                start,
  input  logic                decrypt,
  input  logic [BLOCK_W-1:0]  data_in,
  output logic                ready,
  output logic                out_valid,
  output logic [BLOCK_W-1:0]  data_out,
  output logic [NT-1:0]       time_value
);

  localparam int unsigned ROUND_CYCLES = 2;   // latency of idea_round
  localparam int unsigned CW = $clog2((1 << NT) + ROUND_CYCLES);

  typedef enum logic [2:0] {
    S_IDLE, S_SCHED, S_INV_GO, S_INV, S_RUN
  } state_e;

  state_e                state_q;
  logic                  dec_q;
  logic [3:0]            run_stage_q;
  logic                  run_cnt_q;

  // key generator / time controller
  logic                  kg_start, kg_busy, kg_done;
  logic [NUM_STAGES-1:0] kg_pick, kg_open;
  round_keys_t           kg_keys;
  logic [CW-1:0]         kg_counter;
  key_t                  kg_key;

  // datapath
  logic                  in_load, bank_load;
  logic [NUM_STAGES-1:0] key_load_v, open_v;
  block_t                pipe_out;
  subkeys_t              bank;

  // key inversion
  logic                  inv_start, inv_busy, inv_done;
  subkeys_t              dec_keys;

  assign ready    = (state_q == S_IDLE);
  assign kg_start = ready && start;
  assign in_load  = ready && start;

  kgtc #(
    .NT(NT), .TIME_POS(TIME_POS), .COMPUTE_CYCLES(ROUND_CYCLES), .STAGES(NUM_STAGES)
  ) u_kgtc (
    .clk(clk), .rst_n(rst_n),
    .key_load(key_load && ready), .key_in(key_in),
    .start(kg_start), .busy(kg_busy),
    .key_pick(kg_pick), .subkeys(kg_keys), .stage_open(kg_open), .done(kg_done),
    .time_value(time_value), .counter(kg_counter), .key(kg_key)
  );

  idea_key_inverter u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .enc_keys(bank),
    .busy(inv_busy), .done(inv_done), .dec_keys(dec_keys)
  );

  always_comb begin
    key_load_v = '0;
    open_v     = '0;
    if (state_q == S_SCHED) begin
      key_load_v = kg_pick;
      if (!dec_q) open_v = kg_open;
    end
    if (state_q == S_RUN && run_cnt_q) open_v[run_stage_q] = 1'b1;
  end

  assign inv_start = (state_q == S_INV_GO);
  assign bank_load = (state_q == S_INV) && inv_done;

  idea_pipeline u_pipe (
    .clk(clk), .rst_n(rst_n),
    .in_load(in_load), .in_data(block_t'(data_in)),
    .key_load(key_load_v), .set_keys(kg_keys),
    .bank_load(bank_load), .bank_data(dec_keys),
    .stage_open(open_v), .out_data(pipe_out), .bank(bank)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      dec_q       <= 1'b0;
      run_stage_q <= '0;
      run_cnt_q   <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          dec_q   <= decrypt;
          state_q <= S_SCHED;
        end
        S_SCHED: if (kg_done) begin
          if (dec_q) state_q <= S_INV_GO;
          else begin
            state_q   <= S_IDLE;
            out_valid <= 1'b1;
          end
        end
        S_INV_GO: state_q <= S_INV;
        S_INV: if (inv_done) begin
          state_q     <= S_RUN;
          run_stage_q <= '0;
          run_cnt_q   <= 1'b0;
        end
        S_RUN: begin
          run_cnt_q <= !run_cnt_q;
          if (run_cnt_q) begin
            if (run_stage_q == 4'(NUM_STAGES - 1)) begin
              state_q   <= S_IDLE;
              out_valid <= 1'b1;
            end else begin
              run_stage_q <= run_stage_q + 1'b1;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the output-stage register of the datapath is the data output; it only
  // loads when the last stage opens, on the edge that raises out_valid
  assign data_out = BLOCK_W'(pipe_out);

  // the controller and the datapath agree on what is running
  a_kgtc_in_sched: assert property (@(posedge clk) disable iff (!rst_n)
                                    kg_busy |-> state_q == S_SCHED);
  a_inv_in_inv:    assert property (@(posedge clk) disable iff (!rst_n)
                                    inv_busy |-> state_q == S_INV);
  a_one_open:      assert property (@(posedge clk) disable iff (!rst_n) $onehot0(open_v));

endmodule
