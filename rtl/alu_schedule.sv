// alu_schedule: the Schedule crossbar. For each of the N_MOD ALUs, ALU_Control
// names which of the packet's ALU instructions I1..I3 it executes
// (sch_src[k]) and whether it is used at all (sch_en[k]). An unused ALU gets
// a zero operation (ADD 0,0) so that it does not toggle. Combinational.
// The document names the block and its select input Sch_sel; the encoding of
// the select is this design's own.
module alu_schedule
  import ftv_pkg::*;
(
  input  alu_req_t [N_ALU-1:0] instr,
  input  logic     [N_MOD-1:0][1:0] sch_src,
  input  logic     [N_MOD-1:0] sch_en,
  output alu_req_t [N_MOD-1:0] alu_in
);
  always_comb begin
    for (int k = 0; k < N_MOD; k++) begin
      if (sch_en[k] && sch_src[k] < 2'(N_ALU))
        alu_in[k] = instr[sch_src[k]];
      else
        alu_in[k] = '{fn: FN_ADD, a: '0, b: '0};
    end
  end
endmodule
