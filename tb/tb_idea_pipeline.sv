// tb_idea_pipeline: checks the unrolled datapath with its gated stage
// registers.
//  1. Bulk-loads the standard IDEA sub-keys of key 0001 0002 ... 0008 and
//     encrypts 0000 0001 0002 0003; the result must be the published IDEA
//     test vector 11FB ED2B 0198 6DE5.
//  2. Random keys and blocks: sub-keys written stage by stage through
//     key_load, stages opened one by one with random gaps of two or more
//     clocks; the output must match the reference cipher, and the output
//     register must not change until the last stage opens. After each
//     stage has opened its sub-keys are overwritten with junk, which must
//     not reach the result because the stage register stays closed.
//  3. Decryption: the bank is bulk-loaded with the reference decryption
//     sub-keys and the ciphertext must come back as the plaintext.
module tb_idea_pipeline;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_load = 0, bank_load = 0;
  block_t      in_data = '0, out_data;
  logic [8:0]  key_load = '0, stage_open = '0;
  round_keys_t set_keys = '0;
  subkeys_t    bank_data = '0, bank;
  int checks = 0, failures = 0;

  idea_pipeline dut (
    .clk(clk), .rst_n(rst_n), .in_load(in_load), .in_data(in_data),
    .key_load(key_load), .set_keys(set_keys), .bank_load(bank_load), .bank_data(bank_data),
    .stage_open(stage_open), .out_data(out_data), .bank(bank)
  );

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_block(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // bulk-load keys, then open the nine stages two clocks apart
  task automatic run_bulk(block_t pt, subkeys_t keys, output block_t ct);
    @(negedge clk);
    in_data = pt; in_load = 1; bank_data = keys; bank_load = 1;
    @(negedge clk);
    in_load = 0; bank_load = 0;
    for (int s = 0; s < 9; s++) begin
      @(negedge clk);
      stage_open[s] = 1;
      @(negedge clk);
      stage_open[s] = 0;
    end
    ct = out_data;
  endtask

  // keys written per stage, random gap between a stage's keys and its opening
  task automatic run_staged(block_t pt, subkeys_t keys_in, output block_t ct);
    subkeys_t keys = keys_in;
    block_t out_prev;
    @(negedge clk);
    in_data = pt; in_load = 1;
    @(negedge clk);
    in_load = 0;
    out_prev = out_data;
    for (int s = 0; s < 9; s++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int j = 0; j < 6; j++) set_keys[j] = (s < 8 || j < 4) ? keys[6*s + j] : word_t'($urandom);
      key_load[s] = 1;
      @(negedge clk);
      key_load[s] = 0;
      set_keys = {$urandom, $urandom, $urandom};
      repeat ($urandom_range(0, 4)) @(negedge clk);
      @(negedge clk);
      stage_open[s] = 1;
      if (s < 8) expect_block("output held while stages run", out_data, out_prev);
      @(negedge clk);
      stage_open[s] = 0;
      // overwrite the stage's sub-keys once it has opened: its register
      // must hold the result regardless
      for (int j = 0; j < 6; j++) begin
        set_keys[j] = word_t'($urandom);
        if (s < 8 || j < 4) keys[6*s + j] = set_keys[j];
      end
      key_load[s] = 1;
      @(negedge clk);
      key_load[s] = 0;
    end
    ct = out_data;
    checks++;
    if (bank !== keys) begin
      failures++;
      $display("FAIL bank contents after staged load");
    end
  endtask

  initial begin
    block_t   ct, pt2, pt;
    subkeys_t ek;
    repeat (2) @(posedge clk);
    rst_n = 1;

    ek = ref_std_subkeys(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    run_bulk(64'h0000_0001_0002_0003, ek, ct);
    expect_block("IDEA test vector", ct, 64'h11FB_ED2B_0198_6DE5);
    run_bulk(ct, ref_dec_subkeys(ek), pt2);
    expect_block("IDEA test vector decrypted", pt2, 64'h0000_0001_0002_0003);

    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < 52; i++) ek[i] = (n % 6 == 0 && i % 5 == 0) ? '0 : word_t'($urandom);
      pt = {$urandom, $urandom};
      run_staged(pt, ek, ct);
      expect_block("staged encryption", ct, ref_cipher(pt, ek));
      run_bulk(ct, ref_dec_subkeys(ek), pt2);
      expect_block("decryption", pt2, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
