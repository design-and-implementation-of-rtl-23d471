// tb_kgtc: runs the key generator and time controller in three
// configurations side by side, each through the self-checking kgtc_check
// harness:
//   - four time bits at positions 120, 73, 57, 35 (the main configuration),
//   - four time bits at positions 126, 79, 39, 12 (the other worked example),
//   - ten time bits (1024 possible waits per stage).
// Every configuration must also have run a stage with the shortest wait
// (time value 0) and one with the longest (all time bits one).
module tb_kgtc;

  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b, fin_c;
  int   chk_a, chk_b, chk_c, fail_a, fail_b, fail_c;
  int   t0_a, t0_b, t0_c, tm_a, tm_b, tm_c;
  int   checks = 0, failures = 0;

  localparam int unsigned POS_A [4]  = '{120, 73, 57, 35};
  localparam int unsigned POS_B [4]  = '{126, 79, 39, 12};
  localparam int unsigned POS_C [10] = '{126, 120, 79, 73, 57, 39, 35, 12, 100, 3};

  always #5 clk = !clk;

  kgtc_check #(.NT(4), .TIME_POS(POS_A)) u_a (
    .clk(clk), .rst_n(rst_n), .finished(fin_a), .checks(chk_a), .failures(fail_a),
    .seen_t0(t0_a), .seen_tmax(tm_a));
  kgtc_check #(.NT(4), .TIME_POS(POS_B)) u_b (
    .clk(clk), .rst_n(rst_n), .finished(fin_b), .checks(chk_b), .failures(fail_b),
    .seen_t0(t0_b), .seen_tmax(tm_b));
  kgtc_check #(.NT(10), .TIME_POS(POS_C), .NKEYS(4)) u_c (
    .clk(clk), .rst_n(rst_n), .finished(fin_c), .checks(chk_c), .failures(fail_c),
    .seen_t0(t0_c), .seen_tmax(tm_c));

  task automatic count(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b + chk_c,
             failures + fail_a + fail_b + fail_c + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (fin_a && fin_b && fin_c);
    count("4 bits at 120,73,57,35: a zero wait ran", t0_a > 0);
    count("4 bits at 120,73,57,35: a wait of 15 ran", tm_a > 0);
    count("4 bits at 126,79,39,12: a zero wait ran", t0_b > 0);
    count("4 bits at 126,79,39,12: a wait of 15 ran", tm_b > 0);
    count("10 bits: a zero wait ran", t0_c > 0);
    count("10 bits: a wait of 1023 ran", tm_c > 0);
    $display("zero waits %0d/%0d/%0d, longest waits %0d/%0d/%0d", t0_a, t0_b, t0_c, tm_a, tm_b, tm_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b + chk_c,
             failures + fail_a + fail_b + fail_c);
    $finish;
  end
endmodule
