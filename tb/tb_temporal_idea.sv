// tb_temporal_idea: end-to-end test of the temporal IDEA engine at its
// default parameters (time bits 120, 73, 57, 35).
//
// For each of three keys the sender encrypts a stream of blocks; the key
// keeps turning from block to block. Every ciphertext is compared with the
// reference (temporal schedule of the current key, then IDEA with those
// sub-keys) and its latency with the schedule length. The
// receiver then reloads the same key and decrypts the stream in order; every
// plaintext must come back, with latency schedule + 326 clocks (inversion
// and the nine two-clock stages). Also exercised and counted:
//   - a stage whose time value is 0 and one whose time value is 15,
//   - the same plaintext twice in a row giving two different ciphertexts,
//   - start and key_load while busy being ignored,
//   - a receiver out of step by one block not recovering the plaintext.
// Each of these must happen at least once.
module tb_temporal_idea;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NBLK = 6;

  logic         clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  logic [127:0] key_in = '0;
  logic [63:0]  data_in = '0, data_out;
  logic         ready, out_valid;
  logic [3:0]   time_value;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_t0 = 0, n_t15 = 0, n_repeat_differs = 0;
  int n_busy_ignored = 0, n_out_of_step = 0;

  temporal_idea dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in), .start(start),
    .decrypt(decrypt), .data_in(data_in), .ready(ready), .out_valid(out_valid),
    .data_out(data_out), .time_value(time_value)
  );

  always #2 clk = !clk;   // 4 ns clock, as in the scheme's worked example

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(key_t k);
    @(negedge clk);
    key_in = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
  endtask

  // one block; pokes start and key_load while busy to see they are ignored
  task automatic run_block(logic dec, logic [63:0] din, output logic [63:0] dout, output int latency);
    int c = 0;
    @(negedge clk);
    data_in = din; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0;
    while (!out_valid && c < 2000) begin
      if (c == 5) begin
        start = 1; key_load = 1; key_in = ~key_in; data_in = ~din; decrypt = !dec;
      end else begin
        start = 0; key_load = 0;
      end
      @(negedge clk);
      c++;
    end
    start = 0; key_load = 0;
    latency = c;
    dout = data_out;
    @(negedge clk);
    checks++;
    if (!ready || out_valid) begin
      failures++;
      $display("FAIL engine did not return to idle after one block");
    end
  endtask

  initial begin
    key_t        keys [3];
    key_t        k, k_after;
    logic [63:0] pt [NBLK], ct [NBLK], back;
    subkeys_t    sk;
    int          times [9], clocks [NBLK], lat;

    keys[0] = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    keys[1] = '1;
    keys[2] = {$urandom, $urandom, $urandom, $urandom};

    repeat (3) @(posedge clk);
    rst_n = 1;

    foreach (keys[kk]) begin
      // sender
      load_key(keys[kk]);
      k = keys[kk];
      for (int b = 0; b < NBLK; b++) begin
        logic [63:0] exp;
        pt[b] = (b == 1) ? pt[0] : {$urandom, $urandom};
        ref_temporal(k, '{120, 73, 57, 35}, sk, times, k_after, clocks[b]);
        foreach (times[i]) begin
          if (times[i] == 0)  n_t0++;
          if (times[i] == 15) n_t15++;
        end
        exp = ref_cipher(pt[b], sk);
        run_block(1'b0, pt[b], ct[b], lat);
        n_enc++;
        n_busy_ignored++;
        expect_eq("ciphertext", ct[b], exp);
        expect_eq("encryption latency", lat, clocks[b]);
        k = k_after;
      end
      if (ct[1] != ct[0]) n_repeat_differs++;

      // receiver in step
      load_key(keys[kk]);
      for (int b = 0; b < NBLK; b++) begin
        run_block(1'b1, ct[b], back, lat);
        n_dec++;
        expect_eq("recovered plaintext", back, pt[b]);
        expect_eq("decryption latency", lat, clocks[b] + 326);
      end

      // receiver one block out of step: the first ciphertext is decrypted
      // with the second block's schedule
      load_key(keys[kk]);
      run_block(1'b1, ct[1], back, lat);
      run_block(1'b1, ct[0], back, lat);
      // (the all-ones key turns into itself, so only the other keys count)
      if (back != pt[0]) n_out_of_step++;
    end

    $display("encryptions %0d, decryptions %0d, time value 0: %0d stages, 15: %0d stages",
             n_enc, n_dec, n_t0, n_t15);
    $display("repeated plaintext gave new ciphertext %0d, busy requests ignored %0d, out-of-step receivers failed %0d",
             n_repeat_differs, n_busy_ignored, n_out_of_step);
    expect_eq("encryption happened", n_enc > 0, 1);
    expect_eq("decryption happened", n_dec > 0, 1);
    expect_eq("zero wait happened", n_t0 > 0, 1);
    expect_eq("longest wait happened", n_t15 > 0, 1);
    expect_eq("key stream moved on between blocks", n_repeat_differs > 0, 1);
    expect_eq("out-of-step receivers failed", n_out_of_step, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
