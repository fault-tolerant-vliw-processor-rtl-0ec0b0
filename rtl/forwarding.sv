// forwarding: operand bypass for the EXE stage. Each of the NQ operand
// queries carries a register index and the value read from the register
// file in the DRF stage. If one of the NSRC result buses still in the
// pipeline (EX/MEM and MEM/WB, not yet written back) writes that register,
// its value replaces the stale one. src[] is ordered oldest first, so a
// later entry wins; register r0 is never forwarded. Combinational.
// The document names the Forwarding block only; the source set and the
// priority are this design's own.
module forwarding
  import ftv_pkg::*;
#(
  parameter int unsigned NQ   = 2 * N_SLOT,
  parameter int unsigned NSRC = 3 * N_ALU
) (
  input  ridx_t [NQ-1:0]   q_idx,
  input  word_t [NQ-1:0]   q_rf,
  input  wb_t   [NSRC-1:0] src,
  output word_t [NQ-1:0]   q_val,
  output logic  [NQ-1:0]   q_hit
);
  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      q_val[q] = q_rf[q];
      q_hit[q] = 1'b0;
      for (int s = 0; s < NSRC; s++) begin
        if (src[s].valid && src[s].rd == q_idx[q] && q_idx[q] != '0) begin
          q_val[q] = src[s].data;
          q_hit[q] = 1'b1;
        end
      end
    end
  end
endmodule
