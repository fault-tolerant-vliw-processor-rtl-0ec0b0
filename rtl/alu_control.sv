// alu_control: ALU_Control, the controller of the checked ALU data path
// (n = 3 ALUs plus s = 1 spare, four modules).
//
// It runs the concurrent error detection (CED) process and the real-time
// error-recovery process of the document for the packet held in EXE:
//   m = 0  nothing to check, done at once.
//   m = 1  I1 on TMR(1,2,3). A single outvoted ALU is masked; if the voter
//          finds no majority, I1 goes to recovery.
//   m = 2  I1 on CMP(1,2) (CP1), I2 on CMP(3,4) (CP2). Each mismatching
//          instruction goes to recovery.
//   m = 3  (2m > n+s) split into two sequential sub-packets: first I1, I2 as
//          for m = 2, then I3 on TMR(1,2,3) one cycle later (the extra slot).
// Recovery retries each failed instruction alone, in order I1, I2, I3, on
// TMR(i, i+1, i+2) with i starting at 1 and advancing after each failed try,
// wrapping to 1 past n+s-2 (the SS_TMR policy). A try succeeds when the
// voter finds a majority. After R_NO failed tries of one instruction the
// controller enters the fail-safe state, raises safe_failure and never
// completes the packet again (only reset leaves it).
//
// Interface: valid and m describe the packet in EXE and must stay stable
// until done. done is combinational and is high in the cycle in which all
// results of the packet are on the Select outputs; the pipeline advances on
// that clock edge. busy = valid & ~done is the stall request (Extra-slot
// idle / Recovery idle to Main_Control). The ev_* outputs are one-cycle
// event strobes for monitoring.
//
// From the document: the case split, the choice of CMP(1,2)/CMP(3,4) and
// TMR(1,2,3), the retry loop and r_no. This design's own: the cycle-level
// sequencing (one check or one retry per cycle, recovery after the normal
// checks of the whole packet) and the event outputs.
module alu_control
  import ftv_pkg::*;
#(
  parameter int unsigned RETRIES = R_NO
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       valid,
  input  logic [1:0]                 m,
  input  logic                       cp1_eq,
  input  logic                       cp2_eq,
  input  logic                       tmr_multi,
  input  logic                       tmr_single,
  output logic [N_MOD-1:0][1:0]      sch_src,
  output logic [N_MOD-1:0]           sch_en,
  output logic [1:0]                 tmr_base,   // 0: TMR(1,2,3), 1: TMR(2,3,4)
  output res_src_e [N_ALU-1:0]       sel,
  output logic [N_ALU-1:0]           wr,
  output logic                       done,
  output logic                       busy,
  output logic                       extra_slot,  // in the second sub-packet
  output logic                       recovering,
  output logic                       safe_failure,
  output logic                       ev_detect,    // a check failed, recovery needed
  output logic                       ev_masked,    // TMR outvoted one ALU
  output logic                       ev_retry,     // one recovery try made
  output logic                       ev_recovered, // a recovery try succeeded
  output logic                       ev_fail       // entering fail-safe
);
  localparam int unsigned BASE_MAX = N_MOD - 3;   // i - 1 ranges 0..n+s-3
  localparam int unsigned TRY_W    = $clog2(RETRIES + 1);

  typedef enum logic [1:0] {
    PH_FIRST   = 2'd0,
    PH_SECOND  = 2'd1,
    PH_RECOVER = 2'd2,
    PH_FAILED  = 2'd3
  } phase_e;

  phase_e           phase_q, phase_d;
  logic [N_ALU-1:0] pend_q, pend_d;
  logic [1:0]       base_q, base_d;
  logic [TRY_W-1:0] tries_q, tries_d;
  logic [1:0]       rk;          // instruction being recovered
  logic [N_ALU-1:0] pend_after;

  // lowest pending instruction
  always_comb begin
    rk = 2'd0;
    for (int k = N_ALU - 1; k >= 0; k--)
      if (pend_q[k]) rk = 2'(k);
  end

  task automatic route_tmr(input logic [1:0] base, input logic [1:0] ins);
    for (int j = 0; j < 3; j++) begin
      sch_en[int'(base) + j]  = 1'b1;
      sch_src[int'(base) + j] = ins;
    end
    tmr_base = base;
  endtask

  always_comb begin
    sch_src      = '0;
    sch_en       = '0;
    tmr_base     = '0;
    sel          = {N_ALU{SRC_TMR}};
    wr           = '0;
    done         = 1'b0;
    phase_d      = phase_q;
    pend_d       = pend_q;
    base_d       = base_q;
    tries_d      = tries_q;
    pend_after   = pend_q;
    ev_detect    = 1'b0;
    ev_masked    = 1'b0;
    ev_retry     = 1'b0;
    ev_recovered = 1'b0;
    ev_fail      = 1'b0;

    unique case (phase_q)
      PH_FIRST: begin
        if (!valid || m == 2'd0) begin
          done = 1'b1;
        end else if (m == 2'd1) begin
          route_tmr(2'd0, 2'd0);
          sel[0]    = SRC_TMR;
          wr[0]     = ~tmr_multi;
          ev_masked = tmr_single;
          if (tmr_multi) begin
            ev_detect = 1'b1;
            pend_d    = 3'b001;
            phase_d   = PH_RECOVER;
          end else begin
            done = 1'b1;
          end
        end else begin
          // CMP_ALU(1,2) for I1, CMP_ALU(3,4) for I2
          sch_en     = '1;
          sch_src[0] = 2'd0; sch_src[1] = 2'd0;
          sch_src[2] = 2'd1; sch_src[3] = 2'd1;
          sel[0] = SRC_CP1; wr[0] = cp1_eq;
          sel[1] = SRC_CP2; wr[1] = cp2_eq;
          pend_d    = {1'b0, ~cp2_eq, ~cp1_eq};
          ev_detect = ~cp1_eq | ~cp2_eq;
          if (m == 2'd3)       phase_d = PH_SECOND;
          else if (cp1_eq && cp2_eq) done = 1'b1;
          else                 phase_d = PH_RECOVER;
        end
      end

      PH_SECOND: begin
        // extra slot: I3 on TMR_ALU(1,2,3)
        route_tmr(2'd0, 2'd2);
        sel[2]    = SRC_TMR;
        wr[2]     = ~tmr_multi;
        ev_masked = tmr_single;
        pend_after = pend_q | {tmr_multi, 2'b00};
        pend_d     = pend_after;
        ev_detect  = tmr_multi;
        if (pend_after == '0) begin
          done    = 1'b1;
          phase_d = PH_FIRST;
        end else begin
          phase_d = PH_RECOVER;
        end
      end

      PH_RECOVER: begin
        route_tmr(base_q, rk);
        sel[rk]  = SRC_TMR;
        wr[rk]   = ~tmr_multi;
        ev_retry = 1'b1;
        if (!tmr_multi) begin
          ev_recovered = 1'b1;
          ev_masked    = tmr_single;
          pend_after   = pend_q;
          pend_after[rk] = 1'b0;
          pend_d       = pend_after;
          base_d       = '0;
          tries_d      = TRY_W'(RETRIES);
          if (pend_after == '0) begin
            done    = 1'b1;
            phase_d = PH_FIRST;
          end
        end else begin
          tries_d = tries_q - 1'b1;
          base_d  = (int'(base_q) >= int'(BASE_MAX)) ? 2'd0 : base_q + 2'd1;
          if (tries_q == TRY_W'(1)) begin
            ev_fail = 1'b1;
            phase_d = PH_FAILED;
          end
        end
      end

      default: ;  // PH_FAILED: fail-safe, never done
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_FIRST;
      pend_q  <= '0;
      base_q  <= '0;
      tries_q <= TRY_W'(RETRIES);
    end else begin
      phase_q <= phase_d;
      pend_q  <= pend_d;
      base_q  <= base_d;
      tries_q <= tries_d;
    end
  end

  assign busy         = valid & ~done;
  assign extra_slot   = (phase_q == PH_SECOND);
  assign recovering   = (phase_q == PH_RECOVER);
  assign safe_failure = (phase_q == PH_FAILED);

  // A packet must not change while the controller is working on it.
  property p_stable_m;
    @(posedge clk) disable iff (!rst_n) (valid && !done) |=> $stable(m);
  endproperty
  a_stable_m: assert property (p_stable_m);
endmodule
