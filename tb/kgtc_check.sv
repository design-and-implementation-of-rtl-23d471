// kgtc_check: self-checking harness around one kgtc instance with a given
// number of time bits and bit positions; tb_kgtc runs several side by side.
// It loads keys, runs two schedules per key and compares, against the
// reference temporal schedule, the clock of every pick and every stage
// opening, the picked key bits, the time values, the done pulse, the
// schedule length and the key left afterwards. It reports its counts on
// its output ports and raises finished when done.
module kgtc_check
  import idea_pkg::*;
  import idea_ref_pkg::*;
#(
  parameter int unsigned NT            = 4,
  parameter int unsigned TIME_POS [NT] = '{120, 73, 57, 35},
  parameter int          NKEYS         = 12
)(
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   seen_t0,
  output int   seen_tmax
);

  localparam int TMAX = (1 << NT) - 1;
  localparam int CW   = $clog2((1 << NT) + 2);

  logic              key_load = 0, start = 0;
  key_t              key_in = '0, key;
  logic              busy, done;
  logic [8:0]        key_pick, stage_open;
  round_keys_t       subkeys;
  logic [NT-1:0]     time_value;
  logic [CW-1:0]     counter;
  int                pos [$];

  kgtc #(.NT(NT), .TIME_POS(TIME_POS)) dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in), .start(start),
    .busy(busy), .key_pick(key_pick), .subkeys(subkeys), .stage_open(stage_open),
    .done(done), .time_value(time_value), .counter(counter), .key(key)
  );

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL [%m] %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one schedule from the key currently held
  task automatic run_block();
    subkeys_t s_exp, s_got;
    int       times [9];
    key_t     key_after;
    int       clocks, pick_at [9], open_at [9], pick_cnt = 0, open_cnt = 0, done_at = -1;
    int       t_start [9];
    ref_temporal(key, pos, s_exp, times, key_after, clocks);
    foreach (times[i]) begin
      if (times[i] == 0)  seen_t0++;
      if (times[i] == TMAX) seen_tmax++;
    end
    s_got = '0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < clocks + 3; c++) begin
      if (!busy) break;
      if (counter == 0) t_start[open_cnt] = time_value;
      if (|key_pick) begin
        for (int st = 0; st < 9; st++) if (key_pick[st]) begin
          pick_at[st] = c;
          for (int j = 0; j < 6; j++) if (st < 8 || j < 4) s_got[6*st + j] = subkeys[j];
          expect_eq("pick order", st, pick_cnt);
        end
        pick_cnt++;
      end
      if (|stage_open) begin
        for (int st = 0; st < 9; st++) if (stage_open[st]) begin
          open_at[st] = c;
          expect_eq("open order", st, open_cnt);
        end
        open_cnt++;
      end
      if (done) done_at = c;
      @(negedge clk);
    end
    expect_eq("picks", pick_cnt, 9);
    expect_eq("opens", open_cnt, 9);
    begin
      int t = 0;
      for (int st = 0; st < 9; st++) begin
        expect_eq("pick clock", pick_at[st], t + times[st]);
        expect_eq("open clock", open_at[st], t + times[st] + 2);
        expect_eq("time value", t_start[st], times[st]);
        t += times[st] + 3;
      end
    end
    expect_eq("done clock", done_at, clocks - 1);
    checks++;
    if (s_got !== s_exp) begin
      failures++;
      $display("FAIL picked sub-keys differ");
    end
    checks++;
    if (key !== key_after || busy) begin
      failures++;
      $display("FAIL key after schedule %h expected %h", key, key_after);
    end
  endtask

  initial begin
    key_t held;
    finished = 0; checks = 0; failures = 0; seen_t0 = 0; seen_tmax = 0;
    for (int i = 0; i < int'(NT); i++) pos.push_back(int'(TIME_POS[i]));
    @(posedge rst_n);
    // a key whose time bits are all zero, the all-ones key, then random keys
    for (int n = 0; n < NKEYS; n++) begin
      @(negedge clk);
      key_in = (n == 0) ? 128'h0123 : (n == 1) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      key_load = 1;
      @(negedge clk);
      key_load = 0;
      checks++;
      if (key !== key_in) begin
        failures++;
        $display("FAIL [%m] key load");
      end
      // two blocks in a row: the second starts from where the first left the key
      run_block();
      held = key;
      repeat (5) @(negedge clk);
      checks++;
      if (key !== held) begin
        failures++;
        $display("FAIL [%m] key moved while idle");
      end
      run_block();
    end
    finished = 1;
  end
endmodule
