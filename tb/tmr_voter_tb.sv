// tmr_voter_tb: no error, each single outvoted input, two equal wrong
// inputs (voted wrong, undetectable by design) and three different inputs.
module tmr_voter_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, y;
  logic single_err, multi_err;
  logic [2:0] loc;
  tmr_voter #(.W(32)) dut (.a(a), .b(b), .c(c), .y(y), .single_err(single_err),
                           .multi_err(multi_err), .err_loc(loc));

  task automatic check(logic [31:0] ey, logic es, logic em, logic [2:0] el);
    #1; checks++;
    if ((!em && y !== ey) || single_err !== es || multi_err !== em || loc !== el) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h -> y=%h s=%b m=%b loc=%b", a, b, c, y, single_err, multi_err, loc);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, e1, e2;
    repeat (50) begin
      v = $urandom; e1 = v ^ (32'd1 << ($urandom % 32)); e2 = e1 ^ 32'h8000_0001;
      a = v;  b = v;  c = v;  check(v, 0, 0, 3'b000);
      a = e1; b = v;  c = v;  check(v, 1, 0, 3'b001);
      a = v;  b = e1; c = v;  check(v, 1, 0, 3'b010);
      a = v;  b = v;  c = e1; check(v, 1, 0, 3'b100);
      a = e1; b = e1; c = v;  check(e1, 1, 0, 3'b100);
      a = v;  b = e1; c = e2; check(v, 0, 1, 3'b111);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
