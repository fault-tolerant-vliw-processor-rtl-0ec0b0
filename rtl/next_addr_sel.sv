// next_addr_sel: the Next address selector of the fetch stage. It picks the
// next packet address from the next sequential address (pc + 1), the jump
// address and the branch address, or keeps the current address while the
// front end is held. A redirect from EXE (jump, or taken branch) takes
// priority. Combinational. The document shows the three inputs; the priority
// and the hold input are this design's own.
module next_addr_sel
  import ftv_pkg::*;
(
  input  pc_t  pc,
  input  logic hold,
  input  logic jump,
  input  pc_t  jump_addr,
  input  logic branch,
  input  pc_t  branch_addr,
  output pc_t  next_pc
);
  always_comb begin
    if (jump)        next_pc = jump_addr;
    else if (branch) next_pc = branch_addr;
    else if (hold)   next_pc = pc;
    else             next_pc = pc + 1'b1;
  end
endmodule
