// idea_mul_inv: multiplicative inverse modulo 2^16+1, computed sequentially.
//
// 65537 is prime, so by Fermat x^-1 = x^(65537-2) = x^65535 = x^(2^16-1),
// the product of x^(2^i) for i = 0..15. Two modulo multipliers run side by
// side: each clock acc <= acc (*) base and base <= base (*) base. After 16
// clocks acc holds the inverse. The IDEA zero encoding (0 stands for 2^16)
// needs no special case: 2^16 = -1 is its own inverse and maps to 0 again.
//
// Interface: start (while idle) samples x; done pulses for one clock when y
// is valid; y holds its value until the next start. Latency 16 clocks.
// The temporal IDEA scheme needs these inverses for its decryption keys;
// the method is this design's own.
module idea_mul_inv
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t x,
  output logic  busy,
  output logic  done,
  output word_t y
);

  word_t       acc_q, base_q, acc_n, base_n;
  logic [4:0]  step_q;
  logic        run_q;

  idea_mul_mod u_acc  (.a(acc_q),  .b(base_q), .p(acc_n));
  idea_mul_mod u_base (.a(base_q), .b(base_q), .p(base_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= 16'd1; base_q <= '0; step_q <= '0; run_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          acc_q  <= 16'd1;
          base_q <= x;
          step_q <= '0;
          run_q  <= 1'b1;
        end
      end else begin
        acc_q  <= acc_n;
        base_q <= base_n;
        step_q <= step_q + 1'b1;
        if (step_q == 5'd15) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  assign busy = run_q;
  assign y    = acc_q;

endmodule
