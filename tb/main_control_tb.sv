// main_control_tb: stall while the packet in EXE is not done or after
// fail-safe, flush on a completed redirect or HALT, fetch stop after HALT,
// and the extra-slot and recovery cycle counters.
module main_control_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ex_valid, ex_done, extra_slot_idle, recovery_idle, safe_failure, ex_redirect, ex_halt;
  logic stall, flush, fetch_en, halted;
  logic [31:0] extra_cycles, recovery_cycles;
  main_control dut (.*);

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic drive(logic v, logic d, logic x, logic r, logic sf, logic rd, logic h);
    @(negedge clk);
    ex_valid = v; ex_done = d; extra_slot_idle = x; recovery_idle = r;
    safe_failure = sf; ex_redirect = rd; ex_halt = h;
    #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive(0, 1, 0, 0, 0, 0, 0);
    rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    drive(1, 1, 0, 0, 0, 0, 0);
    expect_("run", !stall && !flush && fetch_en);
    drive(1, 0, 0, 0, 0, 0, 0);
    expect_("busy stalls", stall && !flush);
    drive(1, 1, 1, 0, 0, 0, 0);
    expect_("extra slot done", !stall);
    drive(1, 0, 0, 1, 0, 0, 0);
    drive(1, 0, 0, 1, 0, 0, 0);
    drive(1, 1, 0, 1, 0, 0, 0);
    expect_("recovery stall", !stall);
    drive(1, 0, 0, 0, 0, 1, 0);
    expect_("no flush while busy", stall && !flush);
    drive(1, 1, 0, 0, 0, 1, 0);
    expect_("flush on redirect", flush && !stall);
    drive(0, 1, 0, 0, 0, 0, 0);
    expect_("counters", extra_cycles == 1 && recovery_cycles == 3);
    drive(1, 1, 0, 0, 0, 0, 1);
    expect_("halt flush", flush && !fetch_en);
    drive(0, 1, 0, 0, 0, 0, 0);
    expect_("halted", halted && !fetch_en);
    drive(1, 0, 0, 0, 1, 0, 0);
    expect_("fail-safe stall", stall);
    drive(0, 1, 0, 0, 1, 0, 0);
    expect_("fail-safe stall idle", stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
