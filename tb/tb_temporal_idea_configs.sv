// tb_temporal_idea_configs: the whole engine in the two other time-key
// configurations, side by side, each through temporal_idea_check:
//   - four time bits at key positions 126, 79, 39, 12,
//   - ten time bits, up to 1023 clocks of wait per stage.
// Encryption and decryption of block streams are checked against the
// reference. The ten-bit engine must have run a stage with a wait above 15
// clocks, which four time bits cannot produce.
module tb_temporal_idea_configs;

  localparam int unsigned POS_B [4]  = '{126, 79, 39, 12};
  localparam int unsigned POS_C [10] = '{126, 120, 79, 73, 57, 39, 35, 12, 100, 3};

  logic clk = 0, rst_n = 0;
  logic fin_b, fin_c;
  int   chk_b, chk_c, fail_b, fail_c, long_b, long_c;
  int   checks = 0, failures = 0;

  always #2 clk = !clk;

  temporal_idea_check #(.NT(4), .TIME_POS(POS_B), .NKEYS(3), .NBLK(4)) u_b (
    .clk(clk), .rst_n(rst_n), .finished(fin_b), .checks(chk_b), .failures(fail_b), .longest_wait(long_b));
  temporal_idea_check #(.NT(10), .TIME_POS(POS_C), .NKEYS(2), .NBLK(3)) u_c (
    .clk(clk), .rst_n(rst_n), .finished(fin_c), .checks(chk_c), .failures(fail_c), .longest_wait(long_c));

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_b + chk_c, failures + fail_b + fail_c + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin_b && fin_c);
    checks++;
    if (long_c <= 15) begin
      failures++;
      $display("FAIL ten time bits never waited more than 15 clocks");
    end
    $display("longest stage wait: four bits %0d clocks, ten bits %0d clocks", long_b, long_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_b + chk_c, failures + fail_b + fail_c);
    $finish;
  end
endmodule
