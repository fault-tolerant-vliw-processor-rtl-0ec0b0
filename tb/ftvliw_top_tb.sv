// ftvliw_top_tb: runs a program on the complete core three times.
//   run 1  fault free: 10! by a MUL loop with a BNE back edge, a store and
//          reload of the result, a three-element dot product (three loads
//          per packet, three MULs in one packet = extra slot), a jump over
//          dead code, HALT. Results are read from data memory and compared
//          with values computed here. Each m = 3 packet must cost exactly
//          one extra cycle.
//   run 2  the same program with transient stuck-at faults (5 cycles long)
//          on one randomly chosen ALU at a time: every result must still be
//          exact, and the run may be longer than run 1 by exactly the
//          number of recovery tries.
//   run 3  permanent faults on three ALUs: the core must enter fail-safe
//          and never reach HALT.
//   run 4  one stored bit of a long-lived register (r3) is flipped during
//          the run: the read must be corrected, every result exact.
//   run 5  two stored bits of r3 flipped: the read must be reported as
//          uncorrectable.
// Every mechanism (extra slot, forwarding, taken branch, jump, stall,
// TMR masking, detection, recovery, fail-safe, register-file correction,
// load, store, halt) is
// counted and must occur at least once.
module ftvliw_top_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic imem_we, host_we;
  pc_t imem_waddr;
  packet_t imem_wdata;
  logic [DADDR_W-1:0] host_addr;
  word_t host_wdata, host_rdata;
  word_t [N_MOD-1:0] fi_sa0, fi_sa1;
  logic halted, safe_failure, retire, stall;
  logic ev_extra_slot, ev_detect, ev_masked, ev_retry, ev_recovered, ev_fail, ev_forward, ev_branch;
  logic [31:0] extra_cycles, recovery_cycles;
  logic rf_ecc_corrected, rf_ecc_uncorrectable;

  ftvliw_top dut (.*);

  // ----------------------------------------------------------- program
  packet_t prog [$];
  int n_m3;   // packets with three ALU instructions executed per run

  function automatic packet_t pk(logic [31:0] s0 = 0, logic [31:0] s1 = 0, logic [31:0] s2 = 0,
                                 logic [31:0] s3 = 0, logic [31:0] s4 = 0, logic [31:0] s5 = 0);
    return {s5, s4, s3, s2, s1, s0};
  endfunction

  word_t A [3] = '{32'd7, 32'd11, 32'hFFFF_FFFD};   // 7, 11, -3
  word_t B [3] = '{32'd5, 32'd13, 32'd9};
  int loop_pc;

  task automatic build();
    prog.delete();
    // r1 = 10, r2 = 1, r3 = 0 (m = 3: extra slot)
    prog.push_back(pk(enc_i(OP_ADDI, 1, 0, 10), enc_i(OP_ADDI, 2, 0, 1), enc_i(OP_ADDI, 3, 0, 77)));
    loop_pc = prog.size();
    // loop: r2 = r2 * r1 ; r1 = r1 - 1 (both read the old r1)
    prog.push_back(pk(enc_r(OP_MUL, 2, 2, 1), enc_i(OP_ADDI, 1, 1, -1)));
    // if r1 != 0 goto loop
    prog.push_back(pk(enc_i(OP_BNE, 1, 0, loop_pc - (loop_pc + 2))));
    // mem[0] = r2
    prog.push_back(pk(0, 0, 0, enc_i(OP_SW, 2, 0, 0)));
    // r4 = mem[0]; then one packet of load delay
    prog.push_back(pk(0, 0, 0, 0, enc_i(OP_LW, 4, 0, 0)));
    prog.push_back(pk());
    // r5 = r4 + r4 ; mem[1] = r5 next packet
    prog.push_back(pk(enc_r(OP_ADD, 5, 4, 4)));
    prog.push_back(pk(0, 0, 0, 0, 0, enc_i(OP_SW, 5, 0, 1)));
    // dot product of A (100..102) and B (110..112)
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 10, 0, 100), enc_i(OP_LW, 11, 0, 101), enc_i(OP_LW, 12, 0, 102)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 13, 0, 110), enc_i(OP_LW, 14, 0, 111), enc_i(OP_LW, 15, 0, 112)));
    prog.push_back(pk());
    prog.push_back(pk(enc_r(OP_MUL, 16, 10, 13), enc_r(OP_MUL, 17, 11, 14), enc_r(OP_MUL, 18, 12, 15)));
    prog.push_back(pk(enc_r(OP_ADD, 19, 16, 17)));
    prog.push_back(pk(enc_r(OP_ADD, 19, 19, 18)));
    prog.push_back(pk(enc_i(OP_J, 0, 0, prog.size() + 2), 0, 0, enc_i(OP_SW, 19, 0, 2)));
    // skipped by the jump
    prog.push_back(pk(0, enc_i(OP_ADDI, 21, 0, 99), 0, 0, 0, enc_i(OP_SW, 21, 0, 3)));
    // r6 = LUI 0x1234 | 0x5678 ; r7 = r6 - 1 ; r8 = r6 xor r7
    prog.push_back(pk(enc_i(OP_LUI, 6, 0, 32'h1234)));
    prog.push_back(pk(enc_i(OP_ORI, 6, 6, 32'h5678)));
    prog.push_back(pk(enc_i(OP_ADDI, 7, 6, -1), enc_r(OP_SLT, 9, 0, 6)));
    prog.push_back(pk(enc_r(OP_XOR, 8, 6, 7), enc_r(OP_SRA, 22, 12, 9), 0, enc_i(OP_SW, 7, 0, 4), enc_i(OP_SW, 9, 0, 5)));
    // r3 was written in the first packet and is read from the register file here
    prog.push_back(pk(0, 0, 0, enc_i(OP_SW, 8, 0, 7), enc_i(OP_SW, 22, 0, 6), enc_i(OP_SW, 3, 0, 8)));
    prog.push_back(pk(enc_i(OP_HALT, 0, 0, 0)));
    n_m3 = 2;
  endtask

  // ------------------------------------------------------- fault process
  int fault_mode;     // 0 none, 1 transient single ALU, 2 permanent triple
  int fault_left;
  int n_faults;
  always @(negedge clk) begin
    if (fault_mode == 1 && rst_n) begin
      if (fault_left > 0) begin
        fault_left--;
        if (fault_left == 0) begin fi_sa0 <= '0; fi_sa1 <= '0; end
      end else if ($urandom % 4 == 0) begin
        int alu, bitn;
        alu = $urandom % N_MOD; bitn = $urandom % 32;
        if ($urandom % 2 == 0) fi_sa1[alu] <= 32'd1 << bitn;
        else                   fi_sa0[alu] <= 32'd1 << bitn;
        fault_left = 5;
        n_faults++;
      end
    end
  end

  // ------------------------------------------------------ event counters
  int c_extra, c_fwd, c_branch, c_stall, c_masked, c_detect, c_retry, c_recovered, c_fail;
  int c_ecc_c, c_ecc_u;
  always @(posedge clk) if (rst_n) begin
    c_ecc_c     += int'(rf_ecc_corrected);
    c_ecc_u     += int'(rf_ecc_uncorrectable);
    c_extra     += int'(ev_extra_slot);
    c_fwd       += int'(ev_forward);
    c_branch    += int'(ev_branch);
    c_stall     += int'(stall);
    c_masked    += int'(ev_masked);
    c_detect    += int'(ev_detect);
    c_retry     += int'(ev_retry);
    c_recovered += int'(ev_recovered);
    c_fail      += int'(ev_fail);
  end

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // read data memory through the host port
  task automatic rd_mem(input int a, output word_t v);
    host_addr = 10'(a);
    #1;
    v = host_rdata;
  endtask

  task automatic run(input int mode, input int limit, output int cycles, output int retries);
    int r0;
    fault_mode = 0; fi_sa0 = '0; fi_sa1 = '0; fault_left = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    imem_we = 1'b0; host_we = 1'b0;
    // load program and data while in reset
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = pc_t'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 1'b0;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); host_we = 1'b1; host_addr = 10'(i); host_wdata = 32'hDEAD_0000 + i;
    end
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); host_we = 1'b1; host_addr = 10'(100 + i); host_wdata = A[i];
      @(negedge clk); host_we = 1'b1; host_addr = 10'(110 + i); host_wdata = B[i];
    end
    @(negedge clk); host_we = 1'b0;
    r0 = c_retry;
    rst_n = 1'b1;
    fault_mode = mode;
    if (mode == 2) begin fi_sa1[0] = 32'h1; fi_sa1[1] = 32'h2; fi_sa1[2] = 32'h4; end
    cycles = 0;
    while (!halted && cycles < limit) begin
      @(posedge clk); cycles++;
      // modes 3 and 4: one or two stored bits of r3 flip
      if (mode >= 3 && cycles == 20) begin
        dut.u_rf.regs[3][5] = ~dut.u_rf.regs[3][5];
        if (mode == 4) dut.u_rf.regs[3][30] = ~dut.u_rf.regs[3][30];
      end
    end
    repeat (3) @(posedge clk);     // drain MEM and WB
    fault_mode = 0;
    @(negedge clk); fi_sa0 = '0; fi_sa1 = '0;
    retries = c_retry - r0;
  endtask

  task automatic check_results(string tag);
    word_t fact, dot, c6, c7;
    word_t got [9];
    fact = 32'd3628800;
    dot = A[0] * B[0] + A[1] * B[1] + A[2] * B[2];
    c6 = 32'h1234_5678;
    c7 = c6 - 1;
    for (int i = 0; i < 9; i++) rd_mem(i, got[i]);
    expect_({tag, " 10!"}, got[0] == fact);
    expect_({tag, " reload"}, got[1] == 2 * fact);
    expect_({tag, " dot"}, got[2] == dot);
    expect_({tag, " jump skipped"}, got[3] == 32'hDEAD_0003);
    expect_({tag, " addi"}, got[4] == c7);
    expect_({tag, " slt"}, got[5] == 32'd1);
    expect_({tag, " sra"}, got[6] == 32'hFFFF_FFFE);
    expect_({tag, " xor"}, got[7] == (c6 ^ c7));
    expect_({tag, " long-lived register"}, got[8] == 32'd77);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc1, cyc2, cyc3, rt1, rt2, rt3, x0;
    c_extra = 0; c_fwd = 0; c_branch = 0; c_stall = 0; c_masked = 0; c_detect = 0;
    c_retry = 0; c_recovered = 0; c_fail = 0; n_faults = 0; c_ecc_c = 0; c_ecc_u = 0;
    fault_mode = 0; fi_sa0 = '0; fi_sa1 = '0;
    imem_we = 0; imem_waddr = 0; imem_wdata = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    build();

    // run 1: fault free
    x0 = c_extra;
    run(0, 2000, cyc1, rt1);
    expect_("run1 halted", halted && !safe_failure);
    check_results("run1");
    expect_("run1 no retries", rt1 == 0 && recovery_cycles == 0);
    expect_("run1 one extra cycle per m=3 packet", extra_cycles == n_m3 && c_extra - x0 == n_m3);
    $display("run1: %0d cycles, extra %0d", cyc1, extra_cycles);

    // run 2: transient single-ALU faults
    for (int rep = 0; rep < 20; rep++) begin
      run(1, 5000, cyc2, rt2);
      expect_("run2 halted", halted && !safe_failure);
      check_results("run2");
      expect_("run2 cycles = run1 + recovery tries", cyc2 == cyc1 + rt2);
      expect_("run2 recovery counter", recovery_cycles == rt2);
    end
    $display("run2: faults %0d masked %0d detected %0d retries %0d recovered %0d",
             n_faults, c_masked, c_detect, c_retry, c_recovered);

    // run 3: permanent faults on ALU_1..ALU_3 -> fail-safe
    run(2, 300, cyc3, rt3);
    expect_("run3 fail-safe", safe_failure && !halted);
    expect_("run3 at least r_no tries", rt3 >= R_NO);

    // run 4: a single flipped bit in the register file is corrected
    expect_("no register-file error so far", c_ecc_c == 0 && c_ecc_u == 0);
    run(3, 2000, cyc2, rt2);
    expect_("run4 halted", halted && !safe_failure);
    check_results("run4");
    expect_("run4 corrected read", c_ecc_c > 0 && c_ecc_u == 0);
    // run 5: two flipped bits are reported
    run(4, 2000, cyc2, rt2);
    expect_("run5 uncorrectable read", c_ecc_u > 0);

    // every mechanism happened
    expect_("extra slot seen", c_extra > 0);
    expect_("forwarding seen", c_fwd > 0);
    expect_("branch/jump seen", c_branch > 0);
    expect_("stall seen", c_stall > 0);
    expect_("TMR masking seen", c_masked > 0);
    expect_("detection seen", c_detect > 0);
    expect_("recovery seen", c_recovered > 0);
    expect_("fail-safe seen", c_fail > 0);
    expect_("register-file correction seen", c_ecc_c > 0);
    $display("events: extra=%0d fwd=%0d branch=%0d stall=%0d masked=%0d detect=%0d retry=%0d recovered=%0d fail=%0d ecc-corrected=%0d ecc-uncorrectable=%0d",
             c_extra, c_fwd, c_branch, c_stall, c_masked, c_detect, c_retry, c_recovered, c_fail, c_ecc_c, c_ecc_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
