// ftvliw_top: the fault-tolerant VLIW core. A 32-bit VLIW processor that
// issues one execution packet per cycle, with up to three ALU and three
// load/store instructions, through five stages:
//   IF&ID  instr_dispatch + instr_mem: fetch a packet, next-address select
//   DRF    decode and operand fetch from the 12-read/6-write register file
//          (each register stored with a SEC-DED code, corrected on read)
//   EXE    forwarding, instr_partition, the checked ALU cluster (four ALUs,
//          CP1, CP2, TMR_MV, Select, ALU_Control), branch resolution and
//          three L/S address units
//   MEM    1K x 32 data memory
//   WB     write-back of three ALU and three load results
// Every ALU result is checked in the cycle it is computed (comparison or
// TMR); a failed check is retried on TMR(1,2,3) / TMR(2,3,4) up to four
// times, during which Main_Control freezes the whole pipeline; after that
// the core enters fail-safe (safe_failure = 1) and stops.
//
// Interface: hold rst_n low while loading the program through imem_* and
// data through the host port; after reset the core starts at packet 0 and
// runs until HALT completes in EXE (halted = 1), after which the older
// packets drain in two cycles. fi_sa0/fi_sa1 inject stuck-at faults on the
// four ALU outputs (tie to zero in normal use). The ev_* strobes and the
// cycle counters expose the fault-tolerance activity for measurement.
// rf_ecc_corrected / rf_ecc_uncorrectable report register reads whose
// stored word had one (corrected) or two (not correctable) flipped bits; the
// core takes no other action on them.
//
// Following the document: stages, unit counts, n = 3, s = 1, r_no = 4,
// register file and data memory sizes, and an error-correcting code on the
// register file (the code itself is this design's own). This design's own: the instruction
// set encoding, branch handling (resolved in EXE, two-packet penalty, slot 0
// only), a one-packet load delay that software must respect (a load's
// result is forwarded only from MEM/WB), the full-pipeline freeze during
// checking cycles, and the load and fault-injection ports.
module ftvliw_top
  import ftv_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // program load
  input  logic                  imem_we,
  input  pc_t                   imem_waddr,
  input  packet_t               imem_wdata,
  // data memory host port
  input  logic                  host_we,
  input  logic [DADDR_W-1:0]    host_addr,
  input  word_t                 host_wdata,
  output word_t                 host_rdata,
  // fault injection on ALU_1..ALU_4 outputs
  input  word_t [N_MOD-1:0]     fi_sa0,
  input  word_t [N_MOD-1:0]     fi_sa1,
  // status
  output logic                  halted,
  output logic                  safe_failure,
  output logic                  retire,        // a packet left EXE
  output logic                  stall,
  output logic                  ev_extra_slot,
  output logic                  ev_detect,
  output logic                  ev_masked,
  output logic                  ev_retry,
  output logic                  ev_recovered,
  output logic                  ev_fail,
  output logic                  ev_forward,
  output logic                  ev_branch,
  output logic [31:0]           extra_cycles,
  output logic [31:0]           recovery_cycles,
  output logic                  rf_ecc_corrected,      // a register read was corrected
  output logic                  rf_ecc_uncorrectable   // a register read had two bad bits
);
  // ---------------------------------------------------------------- IF & ID
  logic    flush, fetch_en;
  logic    redirect_j, redirect_b;
  pc_t     jump_addr, branch_addr;
  pc_t     imem_addr;
  packet_t imem_rdata;
  logic    id_valid;
  pc_t     id_pc;
  uop_t [N_SLOT-1:0] id_uop;

  instr_mem u_imem (
    .clk (clk), .raddr (imem_addr), .rdata (imem_rdata),
    .we (imem_we), .waddr (imem_waddr), .wdata (imem_wdata)
  );

  instr_dispatch u_dispatch (
    .clk (clk), .rst_n (rst_n), .stall (stall), .flush (flush),
    .fetch_en (fetch_en),
    .jump (redirect_j), .jump_addr (jump_addr),
    .branch (redirect_b), .branch_addr (branch_addr),
    .imem_addr (imem_addr), .imem_rdata (imem_rdata),
    .id_valid (id_valid), .id_pc (id_pc), .id_uop (id_uop)
  );

  // -------------------------------------------------------------------- DRF
  ridx_t [2*N_SLOT-1:0] rf_raddr;
  word_t [2*N_SLOT-1:0] rf_rdata;
  logic  [N_SLOT-1:0]   rf_we;
  ridx_t [N_SLOT-1:0]   rf_waddr;
  word_t [N_SLOT-1:0]   rf_wdata;
  logic  [2*N_SLOT-1:0] rf_ecc_single, rf_ecc_double;

  always_comb
    for (int s = 0; s < N_SLOT; s++) begin
      rf_raddr[2*s]   = id_uop[s].rs1;
      rf_raddr[2*s+1] = id_uop[s].rs2;
    end

  regfile #(.NR(2*N_SLOT), .NW(N_SLOT)) u_rf (
    .clk (clk), .rst_n (rst_n),
    .raddr (rf_raddr), .rdata (rf_rdata),
    .ecc_single (rf_ecc_single), .ecc_double (rf_ecc_double),
    .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata)
  );

  assign rf_ecc_corrected     = id_valid & (|rf_ecc_single);
  assign rf_ecc_uncorrectable = id_valid & (|rf_ecc_double);

  // ID/EX register
  logic                 ex_valid;
  pc_t                  ex_pc;
  uop_t  [N_SLOT-1:0]   ex_uop;
  word_t [2*N_SLOT-1:0] ex_rv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_pc    <= '0;
      ex_uop   <= '0;
      ex_rv    <= '0;
    end else if (flush) begin
      ex_valid <= 1'b0;
      ex_uop   <= '0;
    end else if (!stall) begin
      ex_valid <= id_valid;
      ex_pc    <= id_pc;
      ex_uop   <= id_uop;
      ex_rv    <= rf_rdata;
    end
  end

  // -------------------------------------------------------------------- EXE
  localparam int unsigned NFWD = 3 * N_ALU;   // MEM/WB ALU+load, EX/MEM ALU
  wb_t   [N_ALU-1:0]    mem_alu_wb;           // EX/MEM register
  wb_t   [N_ALU-1:0]    wb_alu_wb, wb_ld_wb;  // MEM/WB register
  wb_t   [NFWD-1:0]     fwd_src;
  ridx_t [2*N_SLOT-1:0] fwd_idx;
  word_t [2*N_SLOT-1:0] fv;
  logic  [2*N_SLOT-1:0] fwd_hit;

  always_comb begin
    for (int k = 0; k < N_ALU; k++) begin
      fwd_src[k]           = wb_alu_wb[k];
      fwd_src[N_ALU + k]   = wb_ld_wb[k];
      fwd_src[2*N_ALU + k] = mem_alu_wb[k];
    end
    for (int s = 0; s < N_SLOT; s++) begin
      fwd_idx[2*s]   = ex_uop[s].rs1;
      fwd_idx[2*s+1] = ex_uop[s].rs2;
    end
  end

  forwarding #(.NQ(2*N_SLOT), .NSRC(NFWD)) u_fwd (
    .q_idx (fwd_idx), .q_rf (ex_rv), .src (fwd_src), .q_val (fv), .q_hit (fwd_hit)
  );

  uop_t     [N_ALU-1:0] alu_slot;
  word_t    [N_ALU-1:0] alu_opa, alu_opb;
  alu_req_t [N_ALU-1:0] ins;
  ridx_t    [N_ALU-1:0] ins_rd;
  logic     [N_ALU-1:0] ins_wen;
  logic     [1:0]       m;
  logic                 part_extra;
  uop_t                 ctrl;
  logic                 ctrl_valid;

  always_comb
    for (int k = 0; k < N_ALU; k++) begin
      alu_slot[k] = ex_uop[k];
      alu_opa[k]  = fv[2*k];
      alu_opb[k]  = fv[2*k+1];
    end

  instr_partition u_part (
    .slot (alu_slot), .opa (alu_opa), .opb (alu_opb),
    .ins (ins), .ins_rd (ins_rd), .ins_wen (ins_wen), .m (m),
    .extra_slot (part_extra), .ctrl (ctrl), .ctrl_valid (ctrl_valid)
  );

  word_t [N_ALU-1:0] alu_result;
  logic ex_done, ex_busy, extra_slot, recovering;

  ft_alu_cluster u_cluster (
    .clk (clk), .rst_n (rst_n),
    .valid (ex_valid), .m (m), .instr (ins),
    .fi_sa0 (fi_sa0), .fi_sa1 (fi_sa1),
    .result (alu_result), .done (ex_done), .busy (ex_busy),
    .extra_slot (extra_slot), .recovering (recovering),
    .safe_failure (safe_failure),
    .ev_detect (ev_detect), .ev_masked (ev_masked), .ev_retry (ev_retry),
    .ev_recovered (ev_recovered), .ev_fail (ev_fail)
  );

  // branch resolution (slot 0): BEQ/BNE compare reg[rd field] with reg[rs1]
  logic br_eq, ex_halt, ex_redirect;
  always_comb begin
    br_eq       = (fv[1] == fv[0]);
    redirect_j  = 1'b0;
    redirect_b  = 1'b0;
    ex_halt     = 1'b0;
    jump_addr   = ctrl.imm[PC_W-1:0];
    branch_addr = ex_pc + 1'b1 + ctrl.imm[PC_W-1:0];
    if (ex_valid && ex_done && ctrl_valid) begin
      unique case (ctrl.op)
        OP_J:    redirect_j = 1'b1;
        OP_BEQ:  redirect_b = br_eq;
        OP_BNE:  redirect_b = !br_eq;
        OP_HALT: ex_halt    = 1'b1;
        default: ;
      endcase
    end
  end
  assign ex_redirect = redirect_j | redirect_b;

  main_control u_main (
    .clk (clk), .rst_n (rst_n),
    .ex_valid (ex_valid), .ex_done (ex_done),
    .extra_slot_idle (extra_slot), .recovery_idle (recovering),
    .safe_failure (safe_failure),
    .ex_redirect (ex_redirect), .ex_halt (ex_halt),
    .stall (stall), .flush (flush), .fetch_en (fetch_en), .halted (halted),
    .extra_cycles (extra_cycles), .recovery_cycles (recovery_cycles)
  );

  // load/store units
  logic  [N_LS-1:0]              ls_req, ls_we, ls_ldwen;
  logic  [N_LS-1:0][DADDR_W-1:0] ls_addr;
  word_t [N_LS-1:0]              ls_wdata;
  ridx_t [N_LS-1:0]              ls_rd;

  for (genvar g = 0; g < N_LS; g++) begin : g_ls
    ls_unit u_ls (
      .valid (ex_valid), .uop (ex_uop[N_ALU + g]),
      .base (fv[2*(N_ALU + g)]), .sdata (fv[2*(N_ALU + g) + 1]),
      .req (ls_req[g]), .we (ls_we[g]), .addr (ls_addr[g]),
      .wdata (ls_wdata[g]), .ld_wen (ls_ldwen[g]), .ld_rd (ls_rd[g])
    );
  end

  // EX/MEM register
  logic  [N_LS-1:0]              mem_we, mem_ldwen;
  logic  [N_LS-1:0][DADDR_W-1:0] mem_addr;
  word_t [N_LS-1:0]              mem_wdata;
  ridx_t [N_LS-1:0]              mem_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_alu_wb <= '0;
      mem_we     <= '0;
      mem_ldwen  <= '0;
      mem_addr   <= '0;
      mem_wdata  <= '0;
      mem_rd     <= '0;
    end else if (!stall) begin
      for (int k = 0; k < N_ALU; k++) begin
        mem_alu_wb[k].valid <= ex_valid && ins_wen[k] && (k < int'(m));
        mem_alu_wb[k].rd    <= ins_rd[k];
        mem_alu_wb[k].data  <= alu_result[k];
      end
      mem_we    <= ls_we;
      mem_ldwen <= ls_ldwen;
      mem_addr  <= ls_addr;
      mem_wdata <= ls_wdata;
      mem_rd    <= ls_rd;
    end
  end

  // -------------------------------------------------------------------- MEM
  word_t [N_LS-1:0] mem_rdata;

  data_mem u_dmem (
    .clk (clk), .we (mem_we & {N_LS{!stall}}), .addr (mem_addr),
    .wdata (mem_wdata), .rdata (mem_rdata),
    .host_we (host_we), .host_addr (host_addr),
    .host_wdata (host_wdata), .host_rdata (host_rdata)
  );

  // MEM/WB register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_alu_wb <= '0;
      wb_ld_wb  <= '0;
    end else if (!stall) begin
      wb_alu_wb <= mem_alu_wb;
      for (int k = 0; k < N_LS; k++) begin
        wb_ld_wb[k].valid <= mem_ldwen[k];
        wb_ld_wb[k].rd    <= mem_rd[k];
        wb_ld_wb[k].data  <= mem_rdata[k];
      end
    end
  end

  // --------------------------------------------------------------------- WB
  always_comb
    for (int k = 0; k < N_ALU; k++) begin
      rf_we[k]            = wb_alu_wb[k].valid && !stall;
      rf_waddr[k]         = wb_alu_wb[k].rd;
      rf_wdata[k]         = wb_alu_wb[k].data;
      rf_we[N_ALU + k]    = wb_ld_wb[k].valid && !stall;
      rf_waddr[N_ALU + k] = wb_ld_wb[k].rd;
      rf_wdata[N_ALU + k] = wb_ld_wb[k].data;
    end

  // ------------------------------------------------------------- monitoring
  assign retire        = ex_valid && ex_done;
  assign ev_extra_slot = extra_slot;
  assign ev_forward    = retire && (|fwd_hit);
  assign ev_branch     = ex_redirect;
endmodule
