// tb_idea_round: holds a random block and six random sub-keys at the round
// input, waits for the clock edge that loads its first half and compares
// the output with the reference round (steps 1-14, middle words swapped). It
// also checks that the output is not yet right before that edge for inputs
// where the two differ: the first half of the round is registered, so the result
// only follows its input after a clock edge.
module tb_idea_round;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  block_t      x, y;
  round_keys_t k;
  int checks = 0, failures = 0, early_differs = 0;

  idea_round dut (.clk(clk), .rst_n(rst_n), .x(x), .k(k), .y(y));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; k = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) x[i] = (n % 9 == 0) ? '0 : word_t'($urandom);
      for (int i = 0; i < 6; i++) k[i] = (n % 11 == 0) ? '0 : word_t'($urandom);
      // before the next edge the first half still holds the previous words
      #1;
      if (y != ref_round(x, k)) early_differs++;
      @(negedge clk);
      checks++;
      if (y !== ref_round(x, k)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h k=%h y=%h exp=%h", x, k, y, ref_round(x, k));
      end
    end
    checks++;
    if (early_differs < 900) begin
      failures++;
      $display("FAIL round result appeared without a clock edge (%0d of 1000 differ)", early_differs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
