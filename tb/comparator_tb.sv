// comparator_tb: equal words, random unequal words and single-bit
// differences in every bit position.
module comparator_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic eq;
  comparator #(.W(32)) dut (.a(a), .b(b), .eq(eq));

  task automatic check(logic exp);
    #1; checks++;
    if (eq !== exp) begin failures++; $display("FAIL a=%h b=%h eq=%b", a, b, eq); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) begin a = $urandom; b = a; check(1'b1); end
    repeat (100) begin a = $urandom; b = $urandom; check(a == b); end
    for (int i = 0; i < 32; i++) begin a = $urandom; b = a ^ (32'd1 << i); check(1'b0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
