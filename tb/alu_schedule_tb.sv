// alu_schedule_tb: random routings of three instructions onto four ALUs,
// including disabled ALUs, checked against the expected crossbar output.
module alu_schedule_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  alu_req_t [N_ALU-1:0] instr;
  logic [N_MOD-1:0][1:0] src;
  logic [N_MOD-1:0] en;
  alu_req_t [N_MOD-1:0] alu_in;
  alu_schedule dut (.instr(instr), .sch_src(src), .sch_en(en), .alu_in(alu_in));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_req_t exp;
    repeat (300) begin
      for (int i = 0; i < N_ALU; i++) begin
        instr[i].fn = alu_fn_e'($urandom % 13); instr[i].a = $urandom; instr[i].b = $urandom;
      end
      for (int k = 0; k < N_MOD; k++) begin src[k] = 2'($urandom % 3); en[k] = 1'($urandom); end
      #1;
      for (int k = 0; k < N_MOD; k++) begin
        exp = en[k] ? instr[src[k]] : '{fn: FN_ADD, a: 0, b: 0};
        checks++;
        if (alu_in[k] !== exp) begin failures++; $display("FAIL alu %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
