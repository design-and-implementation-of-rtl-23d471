// tb_idea_key_inverter: feeds random encryption sub-key sets (some with zero
// words, which stand for 2^16) and the standard set of key 0001..0008 to the
// key inverter and compares the decryption set with the reference table
// (Euclid inverses, negations, reordering). Also checks the latency of one
// clock of set-up plus 18 inverses of 17 clocks each.
module tb_idea_key_inverter;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic     clk = 0, rst_n = 0, start = 0, busy, done;
  subkeys_t enc_keys = '0, dec_keys;
  int checks = 0, failures = 0;

  idea_key_inverter dut (
    .clk(clk), .rst_n(rst_n), .start(start), .enc_keys(enc_keys),
    .busy(busy), .done(done), .dec_keys(dec_keys)
  );

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(subkeys_t e);
    subkeys_t exp = ref_dec_subkeys(e);
    int cyc = 0;
    @(negedge clk);
    enc_keys = e; start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    for (int i = 0; i < 52; i++) begin
      checks++;
      if (dec_keys[i] !== exp[i]) begin
        failures++;
        if (failures < 20) $display("FAIL d%0d = %h expected %h", i + 1, dec_keys[i], exp[i]);
      end
    end
    checks++;
    if (cyc != 18 * 17) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    subkeys_t e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(ref_std_subkeys(128'h0001_0002_0003_0004_0005_0006_0007_0008));
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 52; i++) e[i] = (i % 7 == n % 7) ? '0 : word_t'($urandom);
      run(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
