// ftvliw_workload_tb: the fault-injection workload on the complete core.
// Three benchmark programs, N! (N = 10), a 5x5 matrix multiplication and
// 2 * sum(A_i * B_i) for i = 1..5, are each copied four times and the twelve
// copies are placed in random order, ending in HALT. Each copy writes its
// results to its own output area, which is compared with values computed
// here.
//
// A fault-free run first checks every result and the cycle cost of the
// checking scheme (one extra cycle per three-ALU-instruction packet). Then
// fault-injection campaigns inject NF transient faults each (stuck-at-0 or
// stuck-at-1, chosen at random, on one random bit of one random ALU output,
// lasting 5 cycles, at uniformly random start cycles over the workload), so
// faults overlap more often as NF grows. NF = 100, 500, 1000, 1500 and 2000
// faults per 4384 cycles, scaled to this workload's length. A monitor plays the role of the
// error-analysis counter: for every packet it compares each used ALU's
// output with the correct value and the delivered results with the correct
// results, and counts errors occurred, detected, escaped, recovered,
// fail-safe and fail-unsafe; the coverage metrics are printed per campaign.
module ftvliw_workload_tb;
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

  // ------------------------------------------------------------ data layout
  localparam int MA = 'h100, MB = 'h120, V0 = 'h140, V1 = 'h148;
  localparam int FACT = 'h200, MC = 'h210, DOT = 'h280;
  word_t a_m [25], b_m [25], v0 [5], v1 [5];

  function automatic packet_t pk(logic [31:0] s0 = 0, logic [31:0] s1 = 0, logic [31:0] s2 = 0,
                                 logic [31:0] s3 = 0, logic [31:0] s4 = 0, logic [31:0] s5 = 0);
    return {s5, s4, s3, s2, s1, s0};
  endfunction

  packet_t prog [$];
  int n_m3_static;

  function automatic logic [31:0] bne(int ra, int rb, int target, int at);
    return enc_i(OP_BNE, ra, rb, target - (at + 1));
  endfunction

  task automatic gen_fact(int c);
    int l;
    prog.push_back(pk(enc_i(OP_ADDI, 1, 0, 10), enc_i(OP_ADDI, 2, 0, 1)));
    l = prog.size();
    prog.push_back(pk(enc_r(OP_MUL, 2, 2, 1), enc_i(OP_ADDI, 1, 1, -1)));
    prog.push_back(pk(bne(1, 0, l, prog.size())));
    prog.push_back(pk(0, 0, 0, enc_i(OP_SW, 2, 0, FACT + c)));
  endtask

  task automatic gen_matmul(int c);
    int lo, li;
    prog.push_back(pk(enc_i(OP_ADDI, 1, 0, 0), enc_i(OP_ADDI, 3, 0, 0), enc_i(OP_ADDI, 5, 0, 5)));
    prog.push_back(pk(enc_i(OP_ADDI, 4, 0, 0)));
    lo = prog.size();
    prog.push_back(pk(enc_i(OP_ADDI, 2, 0, 0)));
    li = prog.size();
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 10, 1, MA + 0), enc_i(OP_LW, 11, 1, MA + 1), enc_i(OP_LW, 12, 1, MA + 2)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 13, 1, MA + 3), enc_i(OP_LW, 14, 1, MA + 4), enc_i(OP_LW, 15, 2, MB + 0)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 16, 2, MB + 5), enc_i(OP_LW, 17, 2, MB + 10), enc_i(OP_LW, 18, 2, MB + 15)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 19, 2, MB + 20)));
    prog.push_back(pk(enc_r(OP_MUL, 20, 10, 15), enc_r(OP_MUL, 21, 11, 16), enc_r(OP_MUL, 22, 12, 17)));
    prog.push_back(pk(enc_r(OP_MUL, 23, 13, 18), enc_r(OP_MUL, 24, 14, 19), enc_r(OP_ADD, 25, 20, 21)));
    prog.push_back(pk(enc_r(OP_ADD, 26, 22, 23), enc_r(OP_ADD, 27, 24, 25), enc_i(OP_ADDI, 2, 2, 1)));
    prog.push_back(pk(enc_r(OP_ADD, 28, 26, 27), enc_i(OP_ADDI, 3, 3, 1)));
    prog.push_back(pk(bne(2, 5, li, prog.size()), 0, 0, enc_i(OP_SW, 28, 3, MC + 25 * c - 1)));
    prog.push_back(pk(enc_i(OP_ADDI, 1, 1, 5), enc_i(OP_ADDI, 4, 4, 1)));
    prog.push_back(pk(bne(4, 5, lo, prog.size())));
  endtask

  task automatic gen_dot(int c);
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 10, 0, V0 + 0), enc_i(OP_LW, 11, 0, V0 + 1), enc_i(OP_LW, 12, 0, V0 + 2)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 13, 0, V0 + 3), enc_i(OP_LW, 14, 0, V0 + 4), enc_i(OP_LW, 15, 0, V1 + 0)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 16, 0, V1 + 1), enc_i(OP_LW, 17, 0, V1 + 2), enc_i(OP_LW, 18, 0, V1 + 3)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_LW, 19, 0, V1 + 4)));
    prog.push_back(pk(enc_r(OP_MUL, 20, 10, 15), enc_r(OP_MUL, 21, 11, 16), enc_r(OP_MUL, 22, 12, 17)));
    prog.push_back(pk(enc_r(OP_MUL, 23, 13, 18), enc_r(OP_MUL, 24, 14, 19), enc_r(OP_ADD, 25, 20, 21)));
    prog.push_back(pk(enc_r(OP_ADD, 26, 22, 23), enc_r(OP_ADD, 27, 24, 25)));
    prog.push_back(pk(enc_r(OP_ADD, 28, 26, 27)));
    prog.push_back(pk(enc_r(OP_ADD, 29, 28, 28)));
    prog.push_back(pk(0, 0, 0, enc_i(OP_SW, 29, 0, DOT + c)));
  endtask

  task automatic build();
    int order [12];
    int cnt [3];
    for (int i = 0; i < 12; i++) order[i] = i % 3;
    order.shuffle();
    cnt = '{0, 0, 0};
    prog.delete();
    foreach (order[i]) begin
      case (order[i])
        0: gen_fact(cnt[0]);
        1: gen_matmul(cnt[1]);
        default: gen_dot(cnt[2]);
      endcase
      cnt[order[i]]++;
    end
    prog.push_back(pk(enc_i(OP_HALT, 0, 0, 0)));
  endtask

  // -------------------------------------------------------- fault campaign
  localparam int MAXF = 4096, FDUR = 5;
  int nf, f_start [MAXF], f_alu [MAXF], f_bit [MAXF], f_sa1 [MAXF];
  int cyc;
  always @(negedge clk) begin
    word_t [N_MOD-1:0] m0, m1;
    m0 = '0; m1 = '0;
    for (int i = 0; i < nf; i++)
      if (cyc >= f_start[i] && cyc < f_start[i] + FDUR) begin
        if (f_sa1[i] != 0) m1[f_alu[i]][f_bit[i]] = 1'b1;
        else               m0[f_alu[i]][f_bit[i]] = 1'b1;
      end
    fi_sa0 <= m0;
    fi_sa1 <= m1;
  end

  // ----------------------------------------------- error-analysis monitor
  function automatic word_t ref_alu(alu_req_t r);
    longint unsigned p;
    case (r.fn)
      FN_ADD:  return r.a + r.b;
      FN_SUB:  return r.a - r.b;
      FN_AND:  return r.a & r.b;
      FN_OR:   return r.a | r.b;
      FN_XOR:  return r.a ^ r.b;
      FN_NOR:  return ~(r.a | r.b);
      FN_SLL:  return r.a << r.b[4:0];
      FN_SRL:  return r.a >> r.b[4:0];
      FN_SRA:  return word_t'($signed(r.a) >>> r.b[4:0]);
      FN_SLT:  return ($signed(r.a) < $signed(r.b)) ? 1 : 0;
      FN_SLTU: return (r.a < r.b) ? 1 : 0;
      FN_MUL:  begin p = longint'(r.a) * longint'(r.b); return p[31:0]; end
      default: return r.b;
    endcase
  endfunction

  int n_e, n_det, n_esc, n_rec, n_fs, n_funs, n_m3, n_masked_pk;
  logic pk_err, pk_det;
  always @(posedge clk) begin
    if (!rst_n) begin
      pk_err <= 1'b0; pk_det <= 1'b0;
    end else if (dut.ex_valid) begin
      logic err_now, wrong;
      err_now = 1'b0;
      for (int k = 0; k < N_MOD; k++)
        if (dut.u_cluster.sch_en[k] && dut.u_cluster.alu_y[k] != ref_alu(dut.u_cluster.alu_in[k]))
          err_now = 1'b1;
      if (ev_fail) begin
        n_e++; n_det++; n_fs++;
      end else if (retire) begin
        wrong = 1'b0;
        for (int k = 0; k < N_ALU; k++)
          if (k < int'(dut.m) && dut.alu_result[k] != ref_alu(dut.ins[k])) wrong = 1'b1;
        if (dut.m == 2'd3) n_m3++;
        if (pk_err || err_now) begin
          n_e++;
          if (pk_det || ev_detect || ev_masked) begin
            n_det++;
            if (wrong) n_funs++; else n_rec++;
          end else if (wrong) begin
            n_esc++;
          end else begin
            n_e--;   // wrong module output that could not reach a result
          end
        end
        if (ev_masked && !(pk_det || ev_detect)) n_masked_pk++;
      end
      if (retire || ev_fail) begin
        pk_err <= 1'b0; pk_det <= 1'b0;
      end else begin
        pk_err <= pk_err | err_now;
        pk_det <= pk_det | ev_detect | ev_masked;
      end
    end
  end

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd_mem(input int a, output word_t v);
    host_addr = 10'(a);
    #1;
    v = host_rdata;
  endtask

  task automatic load_and_run(input int limit, output int cycles);
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    imem_we = 1'b0; host_we = 1'b0;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = pc_t'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 1'b0;
    for (int i = 0; i < 25; i++) begin
      @(negedge clk); host_we = 1'b1; host_addr = 10'(MA + i); host_wdata = a_m[i];
      @(negedge clk); host_addr = 10'(MB + i); host_wdata = b_m[i];
    end
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); host_we = 1'b1; host_addr = 10'(V0 + i); host_wdata = v0[i];
      @(negedge clk); host_addr = 10'(V1 + i); host_wdata = v1[i];
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); host_addr = 10'(FACT + i); host_wdata = 32'hDEAD;
      @(negedge clk); host_addr = 10'(DOT + i); host_wdata = 32'hDEAD;
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); host_addr = 10'(MC + i); host_wdata = 32'hDEAD;
    end
    @(negedge clk); host_we = 1'b0;
    n_e = 0; n_det = 0; n_esc = 0; n_rec = 0; n_fs = 0; n_funs = 0; n_m3 = 0; n_masked_pk = 0;
    cyc = 0;
    @(negedge clk); rst_n = 1'b1;
    cycles = 0;
    while (!halted && !safe_failure && cycles < limit) begin
      @(posedge clk); cycles++; cyc++;
    end
    repeat (3) @(posedge clk);
  endtask

  // returns the number of wrong results
  task automatic check_results(input bit count_checks, output int nwrong);
    word_t v, fact, dot, s;
    nwrong = 0;
    fact = 32'd3628800;
    dot = '0;
    for (int i = 0; i < 5; i++) dot += v0[i] * v1[i];
    dot = 2 * dot;
    for (int c = 0; c < 4; c++) begin
      rd_mem(FACT + c, v); nwrong += int'(v != fact);
      if (count_checks) expect_("N!", v == fact);
      rd_mem(DOT + c, v); nwrong += int'(v != dot);
      if (count_checks) expect_("2 sum A*B", v == dot);
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          s = '0;
          for (int k = 0; k < 5; k++) s += a_m[5 * i + k] * b_m[5 * k + j];
          rd_mem(MC + 25 * c + 5 * i + j, v); nwrong += int'(v != s);
          if (count_checks) expect_("matmul", v == s);
        end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base_cycles, cycles, nwrong;
    int campaigns [5] = '{100, 500, 1000, 1500, 2000};   // faults per 4384 cycles
    real ce_det, ce_rec, ce, pfs, pfuns, p_uns_det, p_uns_rec, pt_fs, pt_funs;
    imem_we = 0; imem_waddr = 0; imem_wdata = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    nf = 0; cyc = 0;
    for (int i = 0; i < 25; i++) begin a_m[i] = $urandom % 2000 - 1000; b_m[i] = $urandom % 2000 - 1000; end
    for (int i = 0; i < 5; i++) begin v0[i] = $urandom % 60000; v1[i] = $urandom % 60000; end
    build();
    $display("workload: %0d packets", prog.size());

    // fault free
    load_and_run(20000, base_cycles);
    expect_("fault-free halted", halted && !safe_failure);
    check_results(1'b1, nwrong);
    expect_("no errors without faults", n_e == 0);
    expect_("one extra cycle per m=3 packet", int'(extra_cycles) == n_m3 && n_m3 > 0);
    expect_("no recovery without faults", recovery_cycles == 0);
    $display("fault-free: %0d cycles, %0d three-ALU packets (%0d extra cycles)", base_cycles, n_m3, extra_cycles);

    // campaigns
    foreach (campaigns[ci]) begin
      nf = campaigns[ci] * base_cycles / 4384;   // same fault density
      for (int i = 0; i < nf; i++) begin
        f_start[i] = $urandom % base_cycles; f_alu[i] = $urandom % N_MOD;
        f_bit[i] = $urandom % 32; f_sa1[i] = $urandom % 2;
      end
      load_and_run(4 * base_cycles, cycles);
      check_results(1'b0, nwrong);
      expect_("campaign ended", halted || safe_failure);
      expect_("errors occurred", n_e > 0);
      expect_("N_e = N_det + N_esc", n_e == n_det + n_esc);
      expect_("N_det = N_rec + N_fs + N_funs", n_det == n_rec + n_fs + n_funs);
      // results can only be wrong if an error escaped or recovery failed
      if (n_esc == 0 && n_funs == 0 && !safe_failure) expect_("exact results", nwrong == 0);
      expect_("cycles = base + recovery", safe_failure || cycles == base_cycles + int'(recovery_cycles));
      ce_det = real'(n_det) / real'(n_e);
      ce_rec = (n_det > 0) ? real'(n_rec) / real'(n_det) : 1.0;
      ce     = ce_det * ce_rec;
      pt_fs     = (n_det > 0) ? real'(n_fs) / real'(n_det) : 0.0;
      pt_funs   = (n_det > 0) ? real'(n_funs) / real'(n_det) : 0.0;
      p_uns_det = real'(n_esc) / real'(n_e);
      p_uns_rec = ce_det * pt_funs;
      pfs       = ce_det * pt_fs;
      pfuns     = p_uns_det + p_uns_rec;
      expect_("Ce-det = 1 - Pf-uns-det", ce_det + p_uns_det > 0.9999 && ce_det + p_uns_det < 1.0001);
      $display("faults=%0d (scaled %0d) cycles=%0d Ne=%0d Ne-det=%0d Ne-esc-det=%0d Ne-rec=%0d Ne-nrec-f-s=%0d Ne-nrec-f-uns=%0d | Ce-det=%.4f Ce-rec=%.4f Ce=%.4f Pf-s=%.4f Pf-uns=%.4f | Pt-det-f-s=%.4f Pt-det-f-uns=%.4f Pf-uns-det=%.4f Pf-uns-rec=%.4f | wrong results=%0d",
               campaigns[ci], nf, cycles, n_e, n_det, n_esc, n_rec, n_fs, n_funs, ce_det, ce_rec, ce, pfs, pfuns,
               pt_fs, pt_funs, p_uns_det, p_uns_rec, nwrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
