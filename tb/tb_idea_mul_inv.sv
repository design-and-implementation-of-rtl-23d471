// tb_idea_mul_inv: starts the sequential inverter on corner values and on
// random words, checks each result against the extended-Euclid reference,
// checks that x (*) y = 1, and checks the 16-clock latency.
module tb_idea_mul_inv;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  word_t x = '0, y;
  int checks = 0, failures = 0;

  idea_mul_inv dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .busy(busy), .done(done), .y(y));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(word_t v);
    int cyc = 0;
    @(negedge clk);
    x = v; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (y !== ref_inv(v)) begin
      failures++;
      $display("FAIL inv(%h) = %h, expected %h", v, y, ref_inv(v));
    end
    if (ref_mul(v, y) !== 16'd1) begin
      failures++;
      $display("FAIL %h (*) %h != 1", v, y);
    end
    if (cyc != 16) begin   // done rises 16 clocks after the start edge
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(16'h0000); run(16'h0001); run(16'hFFFF); run(16'h0002); run(16'h8000);
    for (int n = 0; n < 300; n++) run(word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
