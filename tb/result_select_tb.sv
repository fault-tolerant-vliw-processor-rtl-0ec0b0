// result_select_tb: source selection, direct output while writing, and
// holding of a written result across later cycles.
module result_select_tb;
  import ftv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t alu1, alu3, tmr;
  res_src_e [N_ALU-1:0] sel;
  logic [N_ALU-1:0] wr;
  word_t [N_ALU-1:0] out;
  result_select dut (.clk(clk), .rst_n(rst_n), .alu1_y(alu1), .alu3_y(alu3), .tmr_y(tmr),
                     .sel(sel), .wr(wr), .out(out));

  task automatic check(int k, word_t exp);
    checks++;
    if (out[k] !== exp) begin failures++; $display("FAIL out%0d=%h exp=%h", k, out[k], exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t h [3];
    bit hv [3] = '{0, 0, 0};
    sel = {N_ALU{SRC_TMR}}; wr = '0; alu1 = 0; alu3 = 0; tmr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) begin
      @(negedge clk);
      alu1 = $urandom; alu3 = $urandom; tmr = $urandom;
      for (int k = 0; k < N_ALU; k++) begin
        sel[k] = res_src_e'($urandom % 3); wr[k] = 1'($urandom);
      end
      #1;
      for (int k = 0; k < N_ALU; k++) begin
        if (wr[k]) begin
          h[k] = (sel[k] == SRC_CP1) ? alu1 : (sel[k] == SRC_CP2) ? alu3 : tmr;
          hv[k] = 1'b1;
          check(k, h[k]);
        end
      end
      @(posedge clk); #1;
      wr = '0; alu1 = ~alu1; alu3 = ~alu3; tmr = ~tmr; #1;
      for (int k = 0; k < N_ALU; k++) if (hv[k]) check(k, h[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
