// tb_idea_mul_mod: checks the modulo 2^16+1 multiplier against integer
// arithmetic ('%' on 64-bit values) for the corner words 0 (= 2^16), 1,
// 2^16-1 and 2^15 in every pairing, and for 5000 random pairs.
module tb_idea_mul_mod;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  word_t a, b, p;
  int checks = 0, failures = 0;

  idea_mul_mod dut (.a(a), .b(b), .p(p));

  task automatic check(word_t x, word_t y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== ref_mul(x, y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h (*) %h = %h, expected %h", x, y, p, ref_mul(x, y));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [4] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    for (int n = 0; n < 5000; n++) check(word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
