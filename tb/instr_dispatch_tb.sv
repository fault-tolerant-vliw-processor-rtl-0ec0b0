// instr_dispatch_tb: fetch from a packet array through the dispatch stage.
// Checks sequential fetch, stall, jump and branch redirects with flush,
// fetch stop, and the slot rules (a load in an ALU slot, an ALU
// instruction in an L/S slot or a branch outside slot 0 become NOPs).
module instr_dispatch_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic stall, flush, fetch_en, jump, branch, id_valid;
  pc_t jump_addr, branch_addr, imem_addr, id_pc;
  packet_t imem_rdata;
  uop_t [N_SLOT-1:0] id_uop;
  instr_dispatch dut (.*);

  // program image: slot 1 of packet p holds ADDI r1, r0, p
  function automatic packet_t pk(pc_t p);
    packet_t x = '0;
    x[1] = enc_i(OP_ADDI, 1, 0, int'(p));
    if (p == 7) begin
      x[0] = enc_r(OP_LW, 2, 0, 0);        // load in ALU slot -> NOP
      x[3] = enc_r(OP_ADD, 3, 1, 1);       // ALU op in L/S slot -> NOP
      x[2] = enc_i(OP_BEQ, 1, 1, 3);       // branch outside slot 0 -> NOP
      x[4] = enc_i(OP_LW, 4, 1, 2);        // kept
    end
    return x;
  endfunction
  assign imem_rdata = pk(imem_addr);

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (pc %0d)", what, $time, id_pc); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; flush = 0; fetch_en = 1; jump = 0; branch = 0; jump_addr = 0; branch_addr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    for (int p = 0; p < 5; p++) begin
      expect_("seq valid", id_valid && id_pc == pc_t'(p) && id_uop[1].op == OP_ADDI && id_uop[1].imm == p);
      @(posedge clk); #1;
    end
    // stall two cycles: IF/ID holds packet 5
    @(negedge clk); stall = 1;
    @(posedge clk); #1; expect_("stall hold", id_pc == 5);
    @(posedge clk); #1; expect_("stall hold2", id_pc == 5);
    @(negedge clk); stall = 0;
    @(posedge clk); #1; expect_("resume", id_pc == 6);
    @(posedge clk); #1;
    expect_("slot rules", id_pc == 7 && id_uop[0].op == OP_NOP && id_uop[3].op == OP_NOP &&
                          id_uop[2].op == OP_NOP && id_uop[4].op == OP_LW);
    // jump to 20 with flush
    @(negedge clk); jump = 1; jump_addr = 20; flush = 1;
    @(posedge clk); #1; expect_("flush bubble", !id_valid);
    @(negedge clk); jump = 0; flush = 0;
    @(posedge clk); #1; expect_("jump target", id_valid && id_pc == 20);
    @(negedge clk); branch = 1; branch_addr = 40; flush = 1;
    @(posedge clk); #1; expect_("branch bubble", !id_valid);
    @(negedge clk); branch = 0; flush = 0;
    @(posedge clk); #1; expect_("branch target", id_valid && id_pc == 40);
    @(negedge clk); fetch_en = 0;
    @(posedge clk); #1; expect_("fetch stop", !id_valid && id_uop[1].op == OP_NOP);
    @(posedge clk); #1; expect_("fetch stopped", !id_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
