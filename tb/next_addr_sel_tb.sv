// next_addr_sel_tb: sequential, hold, branch and jump selection and their
// priority.
module next_addr_sel_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pc_t pc, ja, ba, np;
  logic hold, jump, branch;
  next_addr_sel dut (.pc(pc), .hold(hold), .jump(jump), .jump_addr(ja), .branch(branch),
                     .branch_addr(ba), .next_pc(np));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_t exp;
    repeat (300) begin
      pc = pc_t'($urandom); ja = pc_t'($urandom); ba = pc_t'($urandom);
      hold = 1'($urandom); jump = 1'($urandom); branch = 1'($urandom);
      #1;
      exp = jump ? ja : branch ? ba : hold ? pc : pc_t'(pc + 1);
      checks++;
      if (np !== exp) begin failures++; $display("FAIL pc=%0d np=%0d exp=%0d", pc, np, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
