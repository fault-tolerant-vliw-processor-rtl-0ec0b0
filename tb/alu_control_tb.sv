// alu_control_tb: drives ALU_Control with chosen comparator and voter
// outcomes and checks its schedule, result selection, done timing and the
// retry sequence TMR(1,2,3) -> TMR(2,3,4) -> TMR(1,2,3) ... up to fail-safe.
// Cycle counts per packet: m<=2 without error 1 cycle, m=3 2 cycles, each
// recovery try one more cycle.
module alu_control_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid, cp1_eq, cp2_eq, tmr_multi, tmr_single;
  logic [1:0] m;
  logic [N_MOD-1:0][1:0] sch_src;
  logic [N_MOD-1:0] sch_en;
  logic [1:0] tmr_base;
  res_src_e [N_ALU-1:0] sel;
  logic [N_ALU-1:0] wr;
  logic done, busy, extra_slot, recovering, safe_failure;
  logic ev_detect, ev_masked, ev_retry, ev_recovered, ev_fail;

  alu_control dut (.*);

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // apply inputs for one cycle, check after settling, then clock
  task automatic cyc(logic v, logic [1:0] mm, logic e1, logic e2, logic mu, logic si);
    @(negedge clk);
    valid = v; m = mm; cp1_eq = e1; cp2_eq = e2; tmr_multi = mu; tmr_single = si;
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; m = 0; cp1_eq = 1; cp2_eq = 1; tmr_multi = 0; tmr_single = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // bubble: done at once
    cyc(0, 0, 1, 1, 0, 0);
    expect_("bubble done", done && !busy);

    // m = 2, no error: one cycle, CMP(1,2) and CMP(3,4)
    cyc(1, 2, 1, 1, 0, 0);
    expect_("m2 done", done);
    expect_("m2 sched", sch_en == 4'b1111 && sch_src[0] == 0 && sch_src[1] == 0 &&
                        sch_src[2] == 1 && sch_src[3] == 1);
    expect_("m2 sel", sel[0] == SRC_CP1 && sel[1] == SRC_CP2 && wr == 3'b011);

    // m = 1, one ALU outvoted: masked, one cycle
    cyc(1, 1, 1, 1, 0, 1);
    expect_("m1 masked done", done && ev_masked && !ev_detect);
    expect_("m1 sched", sch_en == 4'b0111 && tmr_base == 0 && sel[0] == SRC_TMR && wr == 3'b001);

    // m = 3, no error: two cycles, second is the extra slot for I3
    cyc(1, 3, 1, 1, 0, 0);
    expect_("m3 c1 busy", busy && !done && wr == 3'b011);
    cyc(1, 3, 1, 1, 0, 0);
    expect_("m3 c2 extra", extra_slot && done && wr == 3'b100 && sch_en == 4'b0111 &&
                          sch_src[0] == 2 && sch_src[2] == 2);

    // m = 2, CP1 mismatch: recovery of I1 succeeds on first try (TMR(1,2,3))
    cyc(1, 2, 0, 1, 0, 0);
    expect_("cp1 detect", ev_detect && !done && wr == 3'b010);
    cyc(1, 2, 0, 1, 0, 0);
    expect_("rec I1", recovering && ev_retry && tmr_base == 0 && sch_src[0] == 0 &&
                      sch_en == 4'b0111 && done && wr == 3'b001 && ev_recovered);

    // m = 2, both mismatch: I1 then I2 recovered, 3 cycles
    cyc(1, 2, 0, 0, 0, 0);
    expect_("both detect", ev_detect && !done && wr == 3'b000);
    cyc(1, 2, 0, 0, 0, 0);
    expect_("rec I1 of 2", !done && wr == 3'b001 && sch_src[0] == 0);
    cyc(1, 2, 0, 0, 0, 0);
    expect_("rec I2 of 2", done && wr == 3'b010 && sch_src[0] == 1 && tmr_base == 0);

    // m = 1, no majority: retries on (1,2,3), (2,3,4), (1,2,3) then success
    cyc(1, 1, 1, 1, 1, 0);
    expect_("m1 multi detect", ev_detect && !done);
    cyc(1, 1, 1, 1, 1, 0);
    expect_("try1 base0", recovering && tmr_base == 0 && !done);
    cyc(1, 1, 1, 1, 1, 0);
    expect_("try2 base1", tmr_base == 1 && sch_en == 4'b1110 && !done);
    cyc(1, 1, 1, 1, 1, 0);
    expect_("try3 base0", tmr_base == 0 && !done);
    cyc(1, 1, 1, 1, 0, 0);
    expect_("try4 ok", tmr_base == 1 && done && ev_recovered && wr == 3'b001);

    // m = 3, I3 fails in the extra slot, recovered
    cyc(1, 3, 1, 1, 0, 0);
    cyc(1, 3, 1, 1, 1, 0);
    expect_("I3 detect", extra_slot && ev_detect && !done);
    cyc(1, 3, 1, 1, 0, 0);
    expect_("I3 rec", done && wr == 3'b100 && sch_src[0] == 2);

    // fail-safe: first failure plus R_NO failed tries
    cyc(1, 1, 1, 1, 1, 0);
    for (int t = 0; t < R_NO; t++) begin
      cyc(1, 1, 1, 1, 1, 0);
      expect_("retry not done", !done && ev_retry);
      if (t == R_NO - 1) expect_("ev_fail", ev_fail);
    end
    cyc(1, 1, 1, 1, 0, 0);
    expect_("fail-safe", safe_failure && !done && busy);
    cyc(1, 1, 1, 1, 0, 0);
    expect_("fail-safe stays", safe_failure && !done);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
