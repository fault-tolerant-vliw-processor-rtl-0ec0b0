// ls_unit_tb: loads, stores and non-memory instructions with random base
// registers and offsets; checks request, write enable, address, data and
// load destination.
module ls_unit_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid, req, we, ld_wen;
  uop_t uop;
  word_t base, sdata, wdata;
  logic [DADDR_W-1:0] addr;
  ridx_t ld_rd;
  ls_unit dut (.*);

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off, kind;
    word_t ea;
    repeat (300) begin
      off = int'($urandom % 2000) - 1000;
      kind = $urandom % 3;
      uop = decode(kind == 0 ? enc_i(OP_LW, 5, 3, off) : kind == 1 ? enc_i(OP_SW, 6, 3, off)
                             : enc_r(OP_ADD, 1, 2, 3));
      valid = 1'($urandom);
      base = $urandom % 4096; sdata = $urandom;
      #1;
      ea = base + word_t'(off);
      expect_("req", req == (valid && kind != 2));
      expect_("we", we == (valid && kind == 1));
      if (req) expect_("addr", addr == ea[DADDR_W-1:0]);
      if (we) expect_("wdata", wdata == sdata);
      expect_("ld", ld_wen == (valid && kind == 0));
      if (ld_wen) expect_("ld_rd", ld_rd == 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
