// forwarding_tb: random register indices and result buses; the expected
// operand is the newest matching bus value, else the register-file value,
// and never a forwarded value for r0.
module forwarding_tb;
  import ftv_pkg::*;
  localparam int NQ = 12, NSRC = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0;
  ridx_t [NQ-1:0] q_idx;
  word_t [NQ-1:0] q_rf, q_val;
  logic  [NQ-1:0] q_hit;
  wb_t   [NSRC-1:0] src;
  forwarding #(.NQ(NQ), .NSRC(NSRC)) dut (.q_idx(q_idx), .q_rf(q_rf), .src(src), .q_val(q_val), .q_hit(q_hit));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    repeat (300) begin
      for (int q = 0; q < NQ; q++) begin q_idx[q] = ridx_t'($urandom % 8); q_rf[q] = $urandom; end
      for (int s = 0; s < NSRC; s++) begin
        src[s].valid = 1'($urandom); src[s].rd = ridx_t'($urandom % 8); src[s].data = $urandom;
      end
      #1;
      for (int q = 0; q < NQ; q++) begin
        exp = q_rf[q];
        if (q_idx[q] != 0)
          for (int s = 0; s < NSRC; s++)
            if (src[s].valid && src[s].rd == q_idx[q]) exp = src[s].data;
        checks++;
        if (q_val[q] !== exp) begin failures++; $display("FAIL q%0d", q); end
        if (q_hit[q]) hits++;
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
