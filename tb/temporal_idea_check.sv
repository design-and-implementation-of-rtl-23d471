// temporal_idea_check: self-checking harness around one temporal_idea
// instance with a given number of time bits and bit positions. For NKEYS
// random keys it encrypts NBLK random blocks in a row, checks each
// ciphertext and its latency against the reference temporal schedule, then
// reloads the key, decrypts the stream in order and checks that every
// plaintext comes back with the expected latency. Counts are reported on
// its output ports; finished rises at the end.
module temporal_idea_check
  import idea_pkg::*;
  import idea_ref_pkg::*;
#(
  parameter int unsigned NT            = 4,
  parameter int unsigned TIME_POS [NT] = '{120, 73, 57, 35},
  parameter int          NKEYS         = 2,
  parameter int          NBLK          = 4
)(
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   longest_wait
);

  logic         key_load = 0, start = 0, decrypt = 0;
  logic [127:0] key_in = '0;
  logic [63:0]  data_in = '0, data_out;
  logic         ready, out_valid;
  logic [NT-1:0] time_value;
  int           pos [$];

  temporal_idea #(.NT(NT), .TIME_POS(TIME_POS)) dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in), .start(start),
    .decrypt(decrypt), .data_in(data_in), .ready(ready), .out_valid(out_valid),
    .data_out(data_out), .time_value(time_value)
  );

  task automatic expect_eq(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL [%m] %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(key_t k);
    @(negedge clk);
    key_in = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
  endtask

  task automatic run_block(logic dec, logic [63:0] din, output logic [63:0] dout, output int latency);
    int c = 0;
    @(negedge clk);
    data_in = din; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0;
    while (!out_valid && c < 20000) begin
      @(negedge clk);
      c++;
    end
    latency = c;
    dout = data_out;
  endtask

  initial begin
    key_t        k, k_after, key0;
    logic [63:0] pt [NBLK], ct [NBLK], back;
    subkeys_t    sk;
    int          times [9], clocks [NBLK], lat;
    finished = 0; checks = 0; failures = 0; longest_wait = 0;
    for (int i = 0; i < int'(NT); i++) pos.push_back(int'(TIME_POS[i]));
    @(posedge rst_n);
    for (int kk = 0; kk < NKEYS; kk++) begin
      key0 = {$urandom, $urandom, $urandom, $urandom};
      load_key(key0);
      k = key0;
      for (int b = 0; b < NBLK; b++) begin
        pt[b] = {$urandom, $urandom};
        ref_temporal(k, pos, sk, times, k_after, clocks[b]);
        foreach (times[i]) if (times[i] > longest_wait) longest_wait = times[i];
        run_block(1'b0, pt[b], ct[b], lat);
        expect_eq("ciphertext", ct[b], ref_cipher(pt[b], sk));
        expect_eq("encryption latency", lat, clocks[b]);
        k = k_after;
      end
      load_key(key0);
      for (int b = 0; b < NBLK; b++) begin
        run_block(1'b1, ct[b], back, lat);
        expect_eq("recovered plaintext", back, pt[b]);
        expect_eq("decryption latency", lat, clocks[b] + 326);
      end
    end
    finished = 1;
  end
endmodule
