// ft_alu_cluster: the checked ALU data path of the EXE stage. It puts
// together the Schedule crossbar, the four identical ALUs (three plus one
// spare), the comparators CP1 (ALU_1 vs ALU_2) and CP2 (ALU_3 vs ALU_4), the
// multiplexer that feeds the voter TMR_MV from ALUs (1,2,3) or (2,3,4), the
// Select block with its hold registers, and ALU_Control.
//
// Up to three ALU instructions (I1..I3, packed in order, m of them valid)
// enter with their operands. Every result leaves checked: by comparison,
// by TMR, or after TMR retries. result[k] is valid in the cycle done is high;
// the packet inputs must stay stable until then. The structure follows the
// document's block diagram; fi_sa0/fi_sa1 are this design's fault-injection
// hooks on the ALU outputs (tie to zero in normal use).
module ft_alu_cluster
  import ftv_pkg::*;
#(
  parameter int unsigned RETRIES = R_NO
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic [1:0]              m,
  input  alu_req_t [N_ALU-1:0]    instr,
  input  word_t    [N_MOD-1:0]    fi_sa0,
  input  word_t    [N_MOD-1:0]    fi_sa1,
  output word_t    [N_ALU-1:0]    result,
  output logic                    done,
  output logic                    busy,
  output logic                    extra_slot,
  output logic                    recovering,
  output logic                    safe_failure,
  output logic                    ev_detect,
  output logic                    ev_masked,
  output logic                    ev_retry,
  output logic                    ev_recovered,
  output logic                    ev_fail
);
  logic [N_MOD-1:0][1:0] sch_src;
  logic [N_MOD-1:0]      sch_en;
  logic [1:0]            tmr_base;
  res_src_e [N_ALU-1:0]  sel;
  logic [N_ALU-1:0]      wr;
  alu_req_t [N_MOD-1:0]  alu_in;
  word_t    [N_MOD-1:0]  alu_y;
  word_t                 tmr_a, tmr_b, tmr_c, tmr_y;
  logic                  cp1_eq, cp2_eq, tmr_single, tmr_multi;
  logic [2:0]            tmr_loc;

  alu_schedule u_schedule (
    .instr   (instr),
    .sch_src (sch_src),
    .sch_en  (sch_en),
    .alu_in  (alu_in)
  );

  for (genvar g = 0; g < N_MOD; g++) begin : g_alu
    ft_alu u_alu (
      .fn     (alu_in[g].fn),
      .a      (alu_in[g].a),
      .b      (alu_in[g].b),
      .fi_sa0 (fi_sa0[g]),
      .fi_sa1 (fi_sa1[g]),
      .y      (alu_y[g])
    );
  end

  comparator #(.W(XLEN)) u_cp1 (.a(alu_y[0]), .b(alu_y[1]), .eq(cp1_eq));
  comparator #(.W(XLEN)) u_cp2 (.a(alu_y[2]), .b(alu_y[3]), .eq(cp2_eq));

  // voter input multiplexer (Sel): ALUs base+1 .. base+3
  always_comb begin
    tmr_a = alu_y[0];
    tmr_b = alu_y[1];
    tmr_c = alu_y[2];
    for (int i = 1; i <= int'(N_MOD) - 3; i++)
      if (int'(tmr_base) == i) begin
        tmr_a = alu_y[i];
        tmr_b = alu_y[i + 1];
        tmr_c = alu_y[i + 2];
      end
  end

  tmr_voter #(.W(XLEN)) u_tmr (
    .a (tmr_a), .b (tmr_b), .c (tmr_c),
    .y (tmr_y), .single_err (tmr_single), .multi_err (tmr_multi),
    .err_loc (tmr_loc)
  );

  result_select u_select (
    .clk    (clk),
    .rst_n  (rst_n),
    .alu1_y (alu_y[0]),
    .alu3_y (alu_y[2]),
    .tmr_y  (tmr_y),
    .sel    (sel),
    .wr     (wr),
    .out    (result)
  );

  alu_control #(.RETRIES(RETRIES)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .valid        (valid),
    .m            (m),
    .cp1_eq       (cp1_eq),
    .cp2_eq       (cp2_eq),
    .tmr_multi    (tmr_multi),
    .tmr_single   (tmr_single),
    .sch_src      (sch_src),
    .sch_en       (sch_en),
    .tmr_base     (tmr_base),
    .sel          (sel),
    .wr           (wr),
    .done         (done),
    .busy         (busy),
    .extra_slot   (extra_slot),
    .recovering   (recovering),
    .safe_failure (safe_failure),
    .ev_detect    (ev_detect),
    .ev_masked    (ev_masked),
    .ev_retry     (ev_retry),
    .ev_recovered (ev_recovered),
    .ev_fail      (ev_fail)
  );
endmodule
