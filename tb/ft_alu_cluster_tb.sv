// ft_alu_cluster_tb: the checked ALU data path end to end. Random packets of
// one to three instructions, with stuck-at faults injected on chosen ALU
// outputs for a chosen number of cycles. Checks the delivered results
// against a reference, the number of cycles per packet, masking by TMR,
// recovery through TMR(1,2,3) and TMR(2,3,4), the common-mode escape of a
// comparison, and the fail-safe state.
module ft_alu_cluster_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid;
  logic [1:0] m;
  alu_req_t [N_ALU-1:0] instr;
  word_t [N_MOD-1:0] sa0, sa1;
  word_t [N_ALU-1:0] result;
  logic done, busy, extra_slot, recovering, safe_failure;
  logic ev_detect, ev_masked, ev_retry, ev_recovered, ev_fail;
  int n_masked = 0, n_detect = 0, n_retry = 0, n_recovered = 0;

  ft_alu_cluster dut (.clk(clk), .rst_n(rst_n), .valid(valid), .m(m), .instr(instr),
    .fi_sa0(sa0), .fi_sa1(sa1), .result(result), .done(done), .busy(busy),
    .extra_slot(extra_slot), .recovering(recovering), .safe_failure(safe_failure),
    .ev_detect(ev_detect), .ev_masked(ev_masked), .ev_retry(ev_retry),
    .ev_recovered(ev_recovered), .ev_fail(ev_fail));

  always @(posedge clk) begin
    n_masked    <= n_masked + int'(ev_masked);
    n_detect    <= n_detect + int'(ev_detect);
    n_retry     <= n_retry + int'(ev_retry);
    n_recovered <= n_recovered + int'(ev_recovered);
  end

  function automatic word_t ref_alu(alu_req_t r);
    longint unsigned p;
    case (r.fn)
      FN_ADD: return r.a + r.b;
      FN_SUB: return r.a - r.b;
      FN_XOR: return r.a ^ r.b;
      FN_MUL: begin p = longint'(r.a) * longint'(r.b); return p[31:0]; end
      default: return r.b;
    endcase
  endfunction

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Present a packet, keep the fault masks for fault_cycles cycles, wait for
  // done (at most limit cycles); return cycles used and results.
  task automatic run(input int mm, input int fault_cycles, input int limit,
                     output int cycles, output word_t [N_ALU-1:0] res);
    cycles = 0;
    @(negedge clk);
    valid = 1'b1; m = 2'(mm);
    forever begin
      #1;
      cycles++;
      if (cycles > fault_cycles) begin sa0 = '0; sa1 = '0; #1; end
      if (done || cycles >= limit) break;
      @(negedge clk);
    end
    res = result;
    @(negedge clk);
    valid = 1'b0; sa0 = '0; sa1 = '0;
  endtask

  task automatic rand_instr();
    for (int i = 0; i < N_ALU; i++) begin
      case ($urandom % 5)
        0: instr[i].fn = FN_ADD;
        1: instr[i].fn = FN_SUB;
        2: instr[i].fn = FN_XOR;
        3: instr[i].fn = FN_MUL;
        default: instr[i].fn = FN_PASSB;
      endcase
      instr[i].a = $urandom; instr[i].b = $urandom;
    end
  endtask

  task automatic check_res(word_t [N_ALU-1:0] res, int mm, string what);
    for (int i = 0; i < mm; i++) expect_(what, res[i] == ref_alu(instr[i]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    word_t [N_ALU-1:0] res;
    valid = 0; m = 0; sa0 = '0; sa1 = '0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // fault free: cycles 1, 1, 2 for m = 1, 2, 3
    repeat (30) begin
      for (int mm = 1; mm <= 3; mm++) begin
        rand_instr();
        run(mm, 0, 20, cyc, res);
        check_res(res, mm, "fault-free result");
        expect_("fault-free cycles", cyc == ((mm == 3) ? 2 : 1));
      end
    end

    // known operands with low bits clear, so stuck-at-1 on bits 0/1 matter
    instr[0] = '{fn: FN_ADD, a: 32'h100, b: 32'h200};
    instr[1] = '{fn: FN_SUB, a: 32'h900, b: 32'h100};
    instr[2] = '{fn: FN_XOR, a: 32'hF00, b: 32'h0F0};

    // m = 1, single faulty ALU_2 (permanent during packet): masked by TMR
    sa1[1] = 32'h1;
    run(1, 99, 20, cyc, res);
    check_res(res, 1, "masked result");
    expect_("masked cycles", cyc == 1);

    // m = 2, faulty ALU_1: CP1 detects, TMR(1,2,3) retry outvotes ALU_1
    sa1[0] = 32'h1;
    run(2, 99, 20, cyc, res);
    check_res(res, 2, "cp1 recovered result");
    expect_("cp1 recovery cycles", cyc == 2);

    // m = 2, faulty ALU_4: CP2 detects, I2 retried on TMR(1,2,3)
    sa1[3] = 32'h2;
    run(2, 99, 20, cyc, res);
    check_res(res, 2, "cp2 recovered result");
    expect_("cp2 recovery cycles", cyc == 2);

    // m = 1, ALU_1 and ALU_2 faulty in different bits: no majority; retry
    // TMR(1,2,3) fails, TMR(2,3,4) fails (ALU_2), TMR(1,2,3) fails,
    // TMR(2,3,4) fails -> with both faults permanent this is fail-safe.
    // Here the fault on ALU_1 is transient (2 cycles): try 2 on (2,3,4)
    // still sees ALU_2 faulty but outvotes it.
    sa1[0] = 32'h1; sa1[1] = 32'h2;
    run(1, 2, 20, cyc, res);
    check_res(res, 1, "multi recovered result");
    expect_("multi recovery cycles", cyc == 3);

    // m = 3 with ALU_3 faulty only in the extra slot cycle: masked by TMR
    rand_instr();
    sa1[2] = 32'h4;
    begin
      // fault only appears from the second cycle on
      word_t keep;
      keep = sa1[2]; sa1[2] = '0;
      @(negedge clk); valid = 1'b1; m = 2'd3; #1;
      expect_("m3 first not done", !done);
      @(negedge clk); sa1[2] = keep; #1;
      expect_("m3 extra slot done", done && extra_slot);
      expect_("m3 extra result", result[2] == ref_alu(instr[2]));
      res = result;
      @(negedge clk); valid = 1'b0; sa1 = '0;
      check_res(res, 2, "m3 I1 I2 result");
    end

    // common-mode fault on ALU_1 and ALU_2: comparison cannot see it
    instr[0] = '{fn: FN_ADD, a: 32'h100, b: 32'h200};
    sa1[0] = 32'h1; sa1[1] = 32'h1;
    run(2, 99, 20, cyc, res);
    expect_("common-mode escapes", res[0] == 32'h301 && cyc == 1);

    // permanent distinct faults on ALU_1..ALU_3: all retries fail -> fail-safe
    sa1[0] = 32'h1; sa1[1] = 32'h2; sa1[2] = 32'h4;
    run(1, 99, 1 + R_NO + 3, cyc, res);
    expect_("fail-safe entered", safe_failure && !done);
    expect_("fail-safe after r_no tries", cyc == 1 + R_NO + 3);

    expect_("masking seen", n_masked > 0);
    expect_("detection seen", n_detect > 0);
    expect_("recovery seen", n_recovered > 0);
    $display("masked=%0d detected=%0d retries=%0d recovered=%0d", n_masked, n_detect, n_retry, n_recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
