// instr_partition: Instruction Partition. From the three ALU slots of the
// packet in EXE (decoded, with forwarded operand values) it packs the ALU
// instructions in slot order into I1..I3, counts them (m, the document's
// Inst_count), builds each one's ALU request (function, operand A, operand
// B or the immediate) and write-back tag, and separates the control
// instruction (branch, jump or halt), honoured in slot 0 only. extra_slot
// tells that the packet needs more than one ALU cycle for checking, i.e.
// 2m > n + s. Combinational.
// The document gives the block's name, its Inst_count and Func_I* outputs and
// the 2m > n+s rule; the packing is this design's own.
module instr_partition
  import ftv_pkg::*;
(
  input  uop_t     [N_ALU-1:0] slot,
  input  word_t    [N_ALU-1:0] opa,
  input  word_t    [N_ALU-1:0] opb,
  output alu_req_t [N_ALU-1:0] ins,
  output ridx_t    [N_ALU-1:0] ins_rd,
  output logic     [N_ALU-1:0] ins_wen,
  output logic     [1:0]       m,
  output logic                 extra_slot,
  output uop_t                 ctrl,
  output logic                 ctrl_valid
);
  always_comb begin
    int unsigned n;
    n       = 0;
    ins     = '0;
    ins_rd  = '0;
    ins_wen = '0;
    for (int k = 0; k < N_ALU; k++) begin
      if (slot[k].cls == CL_ALU) begin
        ins[n].fn  = slot[k].fn;
        ins[n].a   = opa[k];
        ins[n].b   = slot[k].use_imm ? slot[k].imm : opb[k];
        ins_rd[n]  = slot[k].rd;
        ins_wen[n] = slot[k].wen;
        n++;
      end
    end
    m          = 2'(n);
    extra_slot = (2 * n > N_MOD);
    ctrl       = slot[0];
    ctrl_valid = (slot[0].cls == CL_CTRL);
  end
endmodule
