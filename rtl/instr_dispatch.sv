// instr_dispatch: Instruction Dispatch, the IF & ID stage. It keeps the
// program counter (a packet address), fetches one packet per cycle through
// the next-address selector and the instruction memory read port, and holds
// it in the IF/ID register. On the DRF side it decodes the six slots and
// dispatches them: slots 0..2 may carry ALU or control instructions, slots
// 3..5 load/store instructions; an instruction in a slot of the wrong kind
// is dispatched as a NOP.
// Timing: pc drives imem_addr; the packet read is registered at the edge.
// stall holds PC and IF/ID; flush (redirect or halt) loads a bubble; fetch_en
// low stops fetching (after HALT). From the document: the stage and the
// three address sources; the slot rules are this design's own.
module instr_dispatch
  import ftv_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      stall,
  input  logic      flush,
  input  logic      fetch_en,
  input  logic      jump,
  input  pc_t       jump_addr,
  input  logic      branch,
  input  pc_t       branch_addr,
  output pc_t       imem_addr,
  input  packet_t   imem_rdata,
  output logic      id_valid,
  output pc_t       id_pc,
  output uop_t [N_SLOT-1:0] id_uop
);
  pc_t     pc_q, pc_d;
  packet_t pkt_q;

  next_addr_sel u_nas (
    .pc          (pc_q),
    .hold        (stall || !fetch_en),
    .jump        (jump),
    .jump_addr   (jump_addr),
    .branch      (branch),
    .branch_addr (branch_addr),
    .next_pc     (pc_d)
  );

  assign imem_addr = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= '0;
      pkt_q    <= '0;
      id_valid <= 1'b0;
      id_pc    <= '0;
    end else begin
      pc_q <= pc_d;
      if (flush || (!stall && !fetch_en)) begin
        id_valid <= 1'b0;
        pkt_q    <= '0;
      end else if (!stall) begin
        id_valid <= 1'b1;
        pkt_q    <= imem_rdata;
        id_pc    <= pc_q;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SLOT; s++) begin
      id_uop[s] = decode(pkt_q[s]);
      if (!id_valid) id_uop[s] = decode('0);
      if (s < N_ALU && id_uop[s].cls == CL_MEM)  id_uop[s] = decode('0);
      if (s >= N_ALU && id_uop[s].cls != CL_MEM) id_uop[s] = decode('0);
      if (s != 0 && id_uop[s].cls == CL_CTRL)    id_uop[s] = decode('0);
    end
  end
endmodule
