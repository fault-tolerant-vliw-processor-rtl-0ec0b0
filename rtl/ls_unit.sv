// ls_unit: one of the three load/store units. In EXE it turns a decoded LW
// or SW with its forwarded operands into a data-memory request: word address
// = base register + sign-extended offset (low DADDR_W bits used), write data
// and the destination register of a load. Any other instruction yields no
// request. Combinational. As the document states, the error detection and
// recovery scheme does not cover the load/store units. The address
// arithmetic and request format are this design's own.
module ls_unit
  import ftv_pkg::*;
(
  input  logic   valid,
  input  uop_t   uop,
  input  word_t  base,
  input  word_t  sdata,
  output logic   req,
  output logic   we,
  output logic [DADDR_W-1:0] addr,
  output word_t  wdata,
  output logic   ld_wen,
  output ridx_t  ld_rd
);
  word_t ea;
  always_comb begin
    ea     = base + uop.imm;
    req    = valid && uop.cls == CL_MEM;
    we     = req && uop.op == OP_SW;
    addr   = ea[DADDR_W-1:0];
    wdata  = sdata;
    ld_wen = req && uop.op == OP_LW && uop.wen;
    ld_rd  = uop.rd;
  end
endmodule
