// regfile_tb: random traffic on 12 read and 6 write ports against a
// reference array; checks same-cycle write-to-read bypass, write priority
// between ports and r0 = 0, with no error flag raised. Then the protection
// code: one or two bits of a stored codeword are flipped through a
// hierarchical reference to the array, and every read port must return the
// corrected word with ecc_single, or raise ecc_double; a new write clears
// the error.
module regfile_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, bypasses = 0;
  ridx_t [11:0] raddr;
  word_t [11:0] rdata;
  logic  [5:0]  we;
  ridx_t [5:0]  waddr;
  word_t [5:0]  wdata;
  logic  [11:0] ecc_single, ecc_double;
  word_t model [32];
  regfile #(.NR(12), .NW(6)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    for (int r = 0; r < 32; r++) model[r] = '0;
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      for (int p = 0; p < 12; p++) raddr[p] = ridx_t'($urandom % 8);
      for (int w = 0; w < 6; w++) begin
        we[w] = 1'($urandom); waddr[w] = ridx_t'($urandom % 8); wdata[w] = $urandom;
      end
      #1;
      for (int p = 0; p < 12; p++) begin
        exp = model[raddr[p]];
        for (int w = 0; w < 6; w++)
          if (we[w] && waddr[w] == raddr[p]) begin exp = wdata[w]; bypasses++; end
        if (raddr[p] == 0) exp = '0;
        checks++;
        if (rdata[p] !== exp) begin failures++; $display("FAIL port %0d r%0d", p, raddr[p]); end
      end
      checks++;
      if (ecc_single != '0 || ecc_double != '0) begin failures++; $display("FAIL flag without error"); end
      @(posedge clk);
      for (int w = 0; w < 6; w++) if (we[w] && waddr[w] != 0) model[waddr[w]] = wdata[w];
    end
    checks++;
    if (bypasses == 0) failures++;

    // stored-bit errors
    @(negedge clk);
    we = '0;
    for (int r = 1; r < 8; r++) begin
      int b1, b2;
      b1 = $urandom % 39;
      b2 = (b1 + 1 + $urandom % 38) % 39;
      dut.regs[r][b1] = ~dut.regs[r][b1];
      for (int p = 0; p < 12; p++) raddr[p] = ridx_t'(r);
      #1;
      for (int p = 0; p < 12; p++) begin
        checks++;
        if (rdata[p] !== model[r] || !ecc_single[p] || ecc_double[p]) begin
          failures++; $display("FAIL single-bit error r%0d bit %0d port %0d", r, b1, p);
        end
      end
      dut.regs[r][b2] = ~dut.regs[r][b2];
      #1;
      for (int p = 0; p < 12; p++) begin
        checks++;
        if (!ecc_double[p] || ecc_single[p]) begin
          failures++; $display("FAIL double-bit error r%0d bits %0d %0d port %0d", r, b1, b2, p);
        end
      end
      // rewrite the register: the error is gone
      we[0] = 1'b1; waddr[0] = ridx_t'(r); wdata[0] = $urandom;
      @(posedge clk);
      model[r] = wdata[0];
      @(negedge clk);
      we = '0;
      #1;
      checks++;
      if (rdata[0] !== model[r] || ecc_single[0] || ecc_double[0]) begin
        failures++; $display("FAIL rewrite r%0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
