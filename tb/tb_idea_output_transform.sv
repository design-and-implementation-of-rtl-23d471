// tb_idea_output_transform: drives random blocks and sub-keys into the
// output transformation and compares with the reference (X1*K1, X3+K2,
// X2+K3, X4*K4), including zero words that stand for 2^16.
module tb_idea_output_transform;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  block_t    x, y;
  out_keys_t k;
  int checks = 0, failures = 0;

  idea_output_transform dut (.x(x), .k(k), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) begin
        x[i] = (n % 7 == 0) ? '0 : word_t'($urandom);
        k[i] = (n % 5 == 0) ? '0 : word_t'($urandom);
      end
      #1;
      checks++;
      if (y !== ref_output(x, k)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h k=%h y=%h exp=%h", x, k, y, ref_output(x, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
