// instr_partition_tb: every mix of ALU, control and empty instructions in the
// three ALU slots; checks packing order, operand/immediate selection, m,
// the extra-slot flag (m = 3 only, since 2m > 4) and the control slot.
module instr_partition_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  uop_t [N_ALU-1:0] slot;
  word_t [N_ALU-1:0] opa, opb;
  alu_req_t [N_ALU-1:0] ins;
  ridx_t [N_ALU-1:0] ins_rd;
  logic [N_ALU-1:0] ins_wen;
  logic [1:0] m;
  logic extra, ctrl_valid;
  uop_t ctrl;
  instr_partition dut (.slot(slot), .opa(opa), .opb(opb), .ins(ins), .ins_rd(ins_rd),
    .ins_wen(ins_wen), .m(m), .extra_slot(extra), .ctrl(ctrl), .ctrl_valid(ctrl_valid));

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [3];
    int n;
    repeat (400) begin
      for (int k = 0; k < 3; k++) begin
        case ($urandom % 4)
          0: w[k] = '0;                                            // NOP
          1: w[k] = enc_r(OP_ADD, 1 + k, 2, 3);
          2: w[k] = enc_i(OP_ADDI, 4 + k, 5, 100 + k);
          default: w[k] = (k == 0) ? enc_i(OP_BEQ, 1, 2, 5) : enc_r(OP_MUL, 7 + k, 1, 1);
        endcase
        slot[k] = decode(w[k]);
        opa[k] = $urandom; opb[k] = $urandom;
      end
      #1;
      n = 0;
      for (int k = 0; k < 3; k++) begin
        if (slot[k].cls == CL_ALU) begin
          expect_("fn", ins[n].fn == slot[k].fn);
          expect_("a", ins[n].a == opa[k]);
          expect_("b", ins[n].b == (slot[k].use_imm ? slot[k].imm : opb[k]));
          expect_("rd", ins_rd[n] == slot[k].rd && ins_wen[n] == slot[k].wen);
          n++;
        end
      end
      expect_("m", m == 2'(n));
      expect_("extra", extra == (n == 3));
      expect_("ctrl", ctrl_valid == (w[0][31:27] == OP_BEQ));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
