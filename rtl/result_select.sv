// result_select: the Select block with its hold registers (the DFFs of the
// output paths). For each of the packet's three ALU instructions it takes
// the checked result from CP1's ALU (ALU_1), CP2's ALU (ALU_3) or the voter
// TMR_MV, as sel[k] says. When wr[k] is high the chosen value goes straight
// to out[k] and is also captured in hold register k; otherwise out[k] shows
// the held value. This keeps the results of an earlier sub-packet or an
// earlier retry until the whole packet is complete. A held value is only
// read after it has been written for the current packet.
// The document shows Select, two DFFs and output multiplexers for I1_out
// and I2_out; this design carries three outputs so that a split packet of
// three instructions leaves the stage together.
module result_select
  import ftv_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  word_t                  alu1_y,
  input  word_t                  alu3_y,
  input  word_t                  tmr_y,
  input  res_src_e [N_ALU-1:0]   sel,
  input  logic     [N_ALU-1:0]   wr,
  output word_t    [N_ALU-1:0]   out
);
  word_t [N_ALU-1:0] hold_q;
  word_t [N_ALU-1:0] pick;

  always_comb begin
    for (int k = 0; k < N_ALU; k++) begin
      unique case (sel[k])
        SRC_CP1: pick[k] = alu1_y;
        SRC_CP2: pick[k] = alu3_y;
        default: pick[k] = tmr_y;
      endcase
      out[k] = wr[k] ? pick[k] : hold_q[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hold_q <= '0;
    else
      for (int k = 0; k < N_ALU; k++)
        if (wr[k]) hold_q[k] <= pick[k];
  end
endmodule
