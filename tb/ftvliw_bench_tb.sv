// ftvliw_bench_tb: cost of the concurrent error checking on benchmark
// programs, run fault-free on the complete core at its default sizes.
//
// Three programs, each loaded and run on its own:
//   matmul5  C = A * B for 5x5 integer matrices
//   idct8    8x8 two-dimensional inverse DCT in 12-bit fixed point,
//            computed as Z = M * ((X * M^T) >> 12) >> 12 with two calls of
//            the same matrix-product code; M[x][k] = round(4096 * c(k)/2 *
//            cos((2x+1) k pi / 16)), c(0) = 1/sqrt(2), c(k>0) = 1
//   heapsort 32 signed words sorted in place (build heap, then 31 extract
//            steps, sift-down written with SLT and BEQ)
// Each result is compared with a model computed here with the same integer
// arithmetic; the IDCT is also compared with a floating-point IDCT (within
// 4). Each run reports its cycles and the extra cycles spent on three-ALU
// packets, and checks that the extra cycles equal the extra-slot events,
// that no recovery cycle occurs and that the checking cost is the only
// difference from one cycle per issued packet: cycles(core) = packets
// issued + extra cycles + branch/jump penalties (counted here).
module ftvliw_bench_tb;
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
  assign fi_sa0 = '0;
  assign fi_sa1 = '0;

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------ program builder
  packet_t prog [$];
  logic [31:0] aq [$], lq [$];   // pending ALU/control and L/S instructions

  // pack the pending instructions, three ALU and three L/S per packet
  task automatic flush_grp();
    while (aq.size() > 0 || lq.size() > 0) begin
      packet_t p = '0;
      for (int s = 0; s < N_ALU && aq.size() > 0; s++) p[s] = aq.pop_front();
      for (int s = 0; s < N_LS && lq.size() > 0; s++) p[N_ALU + s] = lq.pop_front();
      prog.push_back(p);
    end
  endtask

  function automatic packet_t pk(logic [31:0] s0 = 0, logic [31:0] s1 = 0, logic [31:0] s2 = 0,
                                 logic [31:0] s3 = 0, logic [31:0] s4 = 0, logic [31:0] s5 = 0);
    return {s5, s4, s3, s2, s1, s0};
  endfunction

  function automatic logic [31:0] br(opcode_e op, int ra, int rb, int target, int at);
    return enc_i(op, ra, rb, target - (at + 1));
  endfunction

  // place a branch in slot 0 of packet 'at' once its target is known
  task automatic patch(int at, opcode_e op, int ra, int rb, int target);
    prog[at][0] = br(op, ra, rb, target, at);
  endtask

  // C = (A * B) >>> sh for n x n matrices, row-major at word addresses
  task automatic gen_mm(int n, int a, int b, int c, int sh);
    int lo, li, nreg [$];
    prog.push_back(pk(enc_i(OP_ADDI, 1, 0, 0), enc_i(OP_ADDI, 3, 0, 0), enc_i(OP_ADDI, 5, 0, n)));
    prog.push_back(pk(enc_i(OP_ADDI, 4, 0, 0), enc_i(OP_ADDI, 6, 0, sh)));
    lo = prog.size();
    prog.push_back(pk(enc_i(OP_ADDI, 2, 0, 0)));
    li = prog.size();
    for (int k = 0; k < n; k++) lq.push_back(enc_i(OP_LW, 10 + k, 1, a + k));
    for (int k = 0; k < n; k++) lq.push_back(enc_i(OP_LW, 18 + k, 2, b + n * k));
    flush_grp();
    // independent work fills the load-delay packet
    prog.push_back(pk(enc_i(OP_ADDI, 2, 2, 1), enc_i(OP_ADDI, 3, 3, 1)));
    for (int k = 0; k < n; k++) aq.push_back(enc_r(OP_MUL, 10 + k, 10 + k, 18 + k));
    flush_grp();
    for (int k = 0; k < n; k++) nreg.push_back(10 + k);
    while (nreg.size() > 1) begin   // adder tree, one level per group
      int nxt [$];
      while (nreg.size() > 1) begin
        int x = nreg.pop_front(), y = nreg.pop_front();
        aq.push_back(enc_r(OP_ADD, x, x, y));
        nxt.push_back(x);
      end
      if (nreg.size() == 1) nxt.push_back(nreg.pop_front());
      nreg = nxt;
      flush_grp();
    end
    if (sh != 0) prog.push_back(pk(enc_r(OP_SRA, 10, 10, 6)));
    prog.push_back(pk(br(OP_BNE, 2, 5, li, prog.size()), 0, 0, enc_i(OP_SW, 10, 3, c - 1)));
    prog.push_back(pk(enc_i(OP_ADDI, 1, 1, n), enc_i(OP_ADDI, 4, 4, 1)));
    prog.push_back(pk(br(OP_BNE, 4, 5, lo, prog.size())));
  endtask

  // sift-down of the heap at word address h: root r23, heap size r22
  task automatic gen_sift(int h, output int exit_a, output int exit_b);
    int s, skip;
    s = prog.size();
    prog.push_back(pk(enc_r(OP_ADD, 24, 23, 23)));
    prog.push_back(pk(enc_i(OP_ADDI, 24, 24, 1)));                       // child
    prog.push_back(pk(enc_r(OP_SLT, 25, 24, 22)));                       // child < size
    exit_a = prog.size();
    prog.push_back(pk(0, enc_i(OP_ADDI, 28, 24, 1)));                    // BEQ r25, r0 -> exit
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 26, 24, h), enc_i(OP_LW, 27, 24, h + 1),
                      enc_i(OP_LW, 29, 23, h)));
    prog.push_back(pk(enc_r(OP_SLT, 30, 28, 22)));                       // child+1 < size
    prog.push_back(pk(enc_r(OP_SLT, 31, 26, 27)));                       // a[child] < a[child+1]
    prog.push_back(pk(enc_r(OP_AND, 31, 31, 30)));
    skip = prog.size();
    prog.push_back(pk());
    prog.push_back(pk(enc_i(OP_ADDI, 24, 24, 1), enc_r(OP_ADD, 26, 27, 0)));
    patch(skip, OP_BEQ, 31, 0, prog.size());
    prog.push_back(pk(enc_r(OP_SLT, 25, 29, 26)));                       // a[root] < a[child]
    exit_b = prog.size();
    prog.push_back(pk());                                                // BEQ r25, r0 -> exit
    prog.push_back(pk(enc_i(OP_J, 0, 0, s), enc_r(OP_ADD, 23, 24, 0), 0,
                      enc_i(OP_SW, 26, 23, h), enc_i(OP_SW, 29, 24, h)));
  endtask

  task automatic gen_heapsort(int h, int n);
    int build, bx, sort_l, sx, ea, eb;
    prog.push_back(pk(enc_i(OP_ADDI, 20, 0, n), enc_i(OP_ADDI, 21, 0, n / 2 - 1)));
    build = prog.size();
    prog.push_back(pk(enc_r(OP_ADD, 23, 21, 0), enc_r(OP_ADD, 22, 20, 0)));
    gen_sift(h, ea, eb);
    bx = prog.size();
    patch(ea, OP_BEQ, 25, 0, bx);
    patch(eb, OP_BEQ, 25, 0, bx);
    prog.push_back(pk(0, enc_i(OP_ADDI, 21, 21, -1)));                   // BEQ r21, r0 -> sort
    prog.push_back(pk(enc_i(OP_J, 0, 0, build)));
    sort_l = prog.size();
    patch(bx, OP_BEQ, 21, 0, sort_l);
    prog.push_back(pk(enc_i(OP_ADDI, 22, 20, -1)));                      // size = n-1
    sx = prog.size() + 1;
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 26, 0, h), enc_i(OP_LW, 29, 22, h)));
    prog.push_back(pk());
    prog.push_back(pk(enc_r(OP_ADD, 23, 0, 0), 0, 0, enc_i(OP_SW, 29, 0, h), enc_i(OP_SW, 26, 22, h)));
    gen_sift(h, ea, eb);
    patch(ea, OP_BEQ, 25, 0, prog.size());
    patch(eb, OP_BEQ, 25, 0, prog.size());
    prog.push_back(pk(enc_i(OP_ADDI, 22, 22, -1)));
    prog.push_back(pk(br(OP_BNE, 22, 0, sx - 1, prog.size())));
  endtask

  // -------------------------------------------------------------- running
  word_t mem [DMEM_WORDS];
  int n_issue, n_redirect, n_extra_ev, n_fwd;
  always @(posedge clk)
    if (rst_n && !halted) begin
      if (retire) n_issue++;
      if (retire && (dut.redirect_b || dut.redirect_j)) n_redirect++;
      if (ev_extra_slot) n_extra_ev++;
      if (ev_forward) n_fwd++;
    end

  task automatic rd_mem(input int a, output word_t v);
    host_addr = 10'(a);
    #1;
    v = host_rdata;
  endtask

  // load prog and the words mem[lo..hi], run to HALT
  task automatic run(string name, int lo, int hi);
    int cycles;
    prog.push_back(pk(enc_i(OP_HALT, 0, 0, 0)));
    expect_({name, " fits the instruction memory"}, prog.size() <= IMEM_WORDS);
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = pc_t'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 1'b0;
    for (int i = lo; i <= hi; i++) begin
      @(negedge clk); host_we = 1'b1; host_addr = 10'(i); host_wdata = mem[i];
    end
    @(negedge clk); host_we = 1'b0;
    n_issue = 0; n_redirect = 0; n_extra_ev = 0; n_fwd = 0;
    @(negedge clk); rst_n = 1'b1;
    cycles = 0;
    while (!halted && !safe_failure && cycles < 200000) begin
      @(posedge clk); cycles++;
    end
    repeat (3) @(posedge clk);
    expect_({name, " halted"}, halted && !safe_failure);
    expect_({name, " extra cycles = extra-slot events"}, int'(extra_cycles) == n_extra_ev);
    expect_({name, " no recovery"}, recovery_cycles == 0);
    // filling the pipeline and HALT take 3 cycles; each redirect discards 2 packets
    expect_({name, " cycle count"}, cycles == n_issue + int'(extra_cycles) + 2 * n_redirect + 3);
    $display("%-9s %4d packets  %6d cycles  %5d extra (%.1f%% over the unchecked core)  %5d forwards",
             name, prog.size(), cycles, extra_cycles,
             100.0 * real'(extra_cycles) / real'(cycles - int'(extra_cycles)), n_fwd);
  endtask

  // ----------------------------------------------------------- benchmarks
  localparam int MA = 'h000, MB = 'h020, MC = 'h040;
  localparam int XI = 'h080, TM = 'h0C0, TMT = 'h100, TW = 'h140, ZO = 'h180;
  localparam int HP = 'h200, HN = 32;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v, s;
    int m [8][8], x [8][8], w [8][8], z [8][8];
    int hv [HN];
    real pi, ck, zr;
    imem_we = 0; imem_waddr = 0; imem_wdata = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    foreach (mem[i]) mem[i] = '0;

    // 5x5 matrix multiplication
    for (int i = 0; i < 25; i++) begin mem[MA + i] = $urandom % 2000 - 1000; mem[MB + i] = $urandom % 2000 - 1000; end
    prog.delete();
    gen_mm(5, MA, MB, MC, 0);
    run("matmul5", 0, MC + 24);
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        s = '0;
        for (int k = 0; k < 5; k++) s += mem[MA + 5 * i + k] * mem[MB + 5 * k + j];
        rd_mem(MC + 5 * i + j, v);
        expect_("matmul5 result", v == s);
      end

    // 8x8 IDCT
    pi = 3.14159265358979;
    for (int xx = 0; xx < 8; xx++)
      for (int k = 0; k < 8; k++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        m[xx][k] = int'($floor(4096.0 * ck / 2.0 * $cos((2 * xx + 1) * k * pi / 16.0) + 0.5));
        mem[TM + 8 * xx + k] = m[xx][k];
        mem[TMT + 8 * k + xx] = m[xx][k];
      end
    foreach (x[i, j]) begin
      x[i][j] = (i + j < 6) ? int'($urandom % 512) - 256 : 0;   // low-frequency block
      mem[XI + 8 * i + j] = x[i][j];
    end
    prog.delete();
    gen_mm(8, XI, TMT, TW, 12);   // W = X * M^T
    gen_mm(8, TM, TW, ZO, 12);    // Z = M * W
    run("idct8", 0, ZO + 63);
    foreach (w[r, c]) begin
      s = '0;
      for (int k = 0; k < 8; k++) s += x[r][k] * m[c][k];
      w[r][c] = $signed(s) >>> 12;
    end
    foreach (z[r, c]) begin
      s = '0;
      for (int k = 0; k < 8; k++) s += m[r][k] * w[k][c];
      z[r][c] = $signed(s) >>> 12;
      rd_mem(ZO + 8 * r + c, v);
      expect_("idct8 result", v == word_t'(z[r][c]));
      zr = 0.0;
      for (int u = 0; u < 8; u++)
        for (int k = 0; k < 8; k++)
          zr += (m[r][u] / 4096.0) * (m[c][k] / 4096.0) * x[u][k];
      expect_("idct8 close to the exact IDCT", $signed(v) - zr < 4.0 && zr - $signed(v) < 4.0);
    end

    // heapsort
    for (int i = 0; i < HN; i++) begin
      mem[HP + i] = $urandom % 20000 - 10000;
      hv[i] = int'(mem[HP + i]);
    end
    prog.delete();
    gen_heapsort(HP, HN);
    run("heapsort", HP, HP + HN);
    for (int i = 1; i < HN; i++)           // insertion sort, signed
      for (int j = i; j > 0 && hv[j - 1] > hv[j]; j--) begin
        int t;
        t = hv[j]; hv[j] = hv[j - 1]; hv[j - 1] = t;
      end
    for (int i = 0; i < HN; i++) begin
      rd_mem(HP + i, v);
      expect_("heapsort result", v == word_t'(hv[i]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
