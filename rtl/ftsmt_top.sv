// ftsmt_top: dispatch and checking core of a transient-fault-tolerant SMT
// processor.
//
// Two copies of one program run as two SMT threads: the leading thread (LT) and
// the trailing thread (TT).  Instructions are fetched once; each is numbered and
// copied into the IFQ (LT) and the trace queue (TT).  A dispatch thread
// scheduler picks, every cycle, which copy dispatches into the shared issue
// queue/ROB (ICOUNT counted on the issue queue, applied at dispatch).  TT is
// held back until it trails LT by SLACK_DIST instructions, and never dispatches
// a branch before LT has resolved it; LT's misprediction recovery also flushes
// the wrong-path part of the trace queue, so TT never executes wrong-path
// instructions.  LT loads leave their values in the load value queue (LVQ) for
// TT's loads; LT's retired results wait in the checking queue (chkQ) until TT's
// retiring twin is compared with them; a mismatch signals a fault.
//
// Deadlock prevention (DL_MODE): DL_STATIC reserves ROB_RSV/LQ_RSV/SQ_RSV
// entries of ROB, LQ and SQ for TT; DL_DYNAMIC counts LT entries in ROB, LQ and
// SQ and pauses LT dispatch while any count has reached its threshold.
//
// The conventional out-of-order back end (issue queue storage, register files,
// functional units, ROB storage, caches, branch predictor) is outside this
// module.  It receives the dispatched instructions on disp_* and reports back:
//   iq_issue_*   instructions that left the issue queue (issued or squashed),
//   rob_rel_*, lq_rel_*, sq_rel_*  entries released (retired or squashed),
//   br_*         an LT branch that completed, and whether it was mispredicted,
//   lvq_wr_*     an LT load's value, lvq_rd_* a TT load's lookup,
//   lt_ret_*/tt_ret_*  instructions retired by LT and by TT.
// LT may retire only while chkq_free allows, TT only while chkq_count allows,
// LT loads may write the LVQ only while lvq_full is low.
// Occupancy counts are kept here from the dispatch counts and those reports.
// Timing: dispatch decisions are combinational from registered queue and
// counter state; all state updates at the rising clock edge; active-low
// asynchronous reset.
// Structure, queue sizes, dispatch rate, slack distance and both deadlock
// prevention schemes follow the fault-tolerant SMT design; the reserve sizes,
// thresholds, fetch/retire widths and the drain input are this design's own.
module ftsmt_top
  import ftsmt_pkg::*;
#(
  parameter int unsigned FW         = FETCH_W,
  parameter int unsigned DW         = DISP_W,
  parameter int unsigned RW         = RET_W,
  parameter int unsigned IFQ_D      = IFQ_DEPTH,
  parameter int unsigned TQ_D       = TQ_DEPTH,
  parameter int unsigned IQ_N       = IQ_SIZE,
  parameter int unsigned ROB_N      = ROB_SIZE,
  parameter int unsigned LQ_N       = LQ_SIZE,
  parameter int unsigned SQ_N       = SQ_SIZE,
  parameter int unsigned LVQ_D      = LVQ_DEPTH,
  parameter int unsigned CHKQ_D     = CHKQ_DEPTH,
  parameter int unsigned SLACK_DIST = SLACK,
  parameter dl_mode_e    DL_MODE    = DL_DYNAMIC,
  parameter int unsigned ROB_RSV    = DW,
  parameter int unsigned LQ_RSV     = DW,
  parameter int unsigned SQ_RSV     = DW,
  parameter int unsigned ROB_THR    = ROB_N - DW,
  parameter int unsigned LQ_THR     = LQ_N - DW,
  parameter int unsigned SQ_THR     = SQ_N - DW,
  localparam int unsigned FCW    = $clog2(FW + 1),
  localparam int unsigned DCW    = $clog2(DW + 1),
  localparam int unsigned RCW    = $clog2(RW + 1),
  localparam int unsigned IFQ_CW = $clog2(IFQ_D + 1),
  localparam int unsigned TQ_CW  = $clog2(TQ_D + 1),
  localparam int unsigned IQ_CW  = $clog2(IQ_N + 1),
  localparam int unsigned ROB_CW = $clog2(ROB_N + 1),
  localparam int unsigned LQ_CW  = $clog2(LQ_N + 1),
  localparam int unsigned SQ_CW  = $clog2(SQ_N + 1),
  localparam int unsigned LVQ_CW = $clog2(LVQ_D + 1),
  localparam int unsigned CQ_CW  = $clog2(CHKQ_D + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch
  input  logic [FCW-1:0]    fetch_cnt,
  input  fetch_t            fetch_bundle [FW],
  output logic              fetch_ready,
  input  logic              drain,
  // LT branch completion
  input  logic              br_valid,
  input  seq_t              br_seq,
  input  logic              br_mispred,
  // dispatch to the back end
  output logic              disp_valid [DW],
  output qent_t             disp_ent [DW],
  output logic [DCW-1:0]    disp_lt_cnt,
  output logic [DCW-1:0]    disp_tt_cnt,
  // back-end occupancy reports
  input  logic [IQ_CW-1:0]  iq_issue_lt,
  input  logic [IQ_CW-1:0]  iq_issue_tt,
  input  logic [ROB_CW-1:0] rob_rel_lt,
  input  logic [ROB_CW-1:0] rob_rel_tt,
  input  logic [LQ_CW-1:0]  lq_rel_lt,
  input  logic [LQ_CW-1:0]  lq_rel_tt,
  input  logic [SQ_CW-1:0]  sq_rel_lt,
  input  logic [SQ_CW-1:0]  sq_rel_tt,
  // load value queue
  input  logic              lvq_wr_valid,
  input  seq_t              lvq_wr_seq,
  input  data_t             lvq_wr_data,
  output logic              lvq_full,
  input  logic              lvq_rd_valid,
  input  seq_t              lvq_rd_seq,
  output logic              lvq_rd_hit,
  output data_t             lvq_rd_data,
  // retirement and checking
  input  logic [RCW-1:0]    lt_ret_cnt,
  input  ret_t              lt_ret [RW],
  input  logic [RCW-1:0]    tt_ret_cnt,
  input  ret_t              tt_ret [RW],
  input  logic              chk_flush,
  output logic [CQ_CW-1:0]  chkq_free,
  output logic [CQ_CW-1:0]  chkq_count,
  output logic [RCW-1:0]    checked_cnt,
  output logic              fault_valid,
  output seq_t              fault_seq,
  // status
  output logic              precaution,
  output logic [2:0]        caution,
  output thread_e           sched_sel,
  output logic              slack_hold,
  output logic              slack_waived,
  output logic [TQ_CW-1:0]  distance,
  output logic [IQ_CW-1:0]  icount_lt,
  output logic [IQ_CW-1:0]  icount_tt,
  output logic [ROB_CW-1:0] rob_lt_cnt,
  output logic [ROB_CW-1:0] rob_tt_cnt,
  output logic [LQ_CW-1:0]  lq_lt_cnt,
  output logic [SQ_CW-1:0]  sq_lt_cnt,
  output logic [LVQ_CW-1:0] lvq_count
);

  localparam int unsigned ROB_R = (DL_MODE == DL_STATIC) ? ROB_RSV : 0;
  localparam int unsigned LQ_R  = (DL_MODE == DL_STATIC) ? LQ_RSV  : 0;
  localparam int unsigned SQ_R  = (DL_MODE == DL_STATIC) ? SQ_RSV  : 0;

  logic redirect;
  assign redirect = br_valid && br_mispred;

  // ---------------- fetch copy, IFQ, trace queue ----------------
  logic [FCW-1:0]    push_cnt;
  qent_t             lt_push [FW];
  qent_t             tt_push [FW];
  logic [IFQ_CW-1:0] ifq_count, ifq_free;
  logic [TQ_CW-1:0]  tq_count, tq_free;
  qent_t             ifq_head [DW];
  qent_t             tq_head [DW];
  logic [DCW-1:0]    tq_avail;
  logic              tq_res_hit;

  seq_copy #(.W(FW), .IFQ_CW(IFQ_CW), .TQ_CW(TQ_CW)) u_copy (
    .clk, .rst_n, .fetch_cnt, .fetch_bundle, .fetch_ready,
    .ifq_free, .tq_free, .redirect, .redirect_seq(br_seq),
    .push_cnt, .lt_ent(lt_push), .tt_ent(tt_push)
  );

  ifq #(.DEPTH(IFQ_D), .PUSH_W(FW), .POP_W(DW)) u_ifq (
    .clk, .rst_n, .flush(redirect), .push_cnt, .push_ent(lt_push),
    .pop_cnt(disp_lt_cnt), .head_ent(ifq_head), .count(ifq_count), .free(ifq_free)
  );

  trace_queue #(.DEPTH(TQ_D), .PUSH_W(FW), .POP_W(DW)) u_tq (
    .clk, .rst_n, .push_cnt, .push_ent(tt_push),
    .res_valid(br_valid), .res_seq(br_seq), .res_mispred(br_mispred),
    .pop_cnt(disp_tt_cnt), .head_ent(tq_head), .avail(tq_avail),
    .count(tq_count), .free(tq_free), .res_hit(tq_res_hit)
  );

  // ---------------- occupancy counters ----------------
  logic [ROB_CW-1:0] rob_free, rob_lt_room;
  logic [LQ_CW-1:0]  lq_tt_cnt, lq_free, lq_lt_room;
  logic [SQ_CW-1:0]  sq_tt_cnt, sq_free, sq_lt_room;
  logic [DCW-1:0]    lt_loads, lt_stores, tt_loads, tt_stores;
  logic [IQ_CW-1:0]  iq_free;

  thread_counter #(.SIZE(IQ_N), .INC_W(DW)) u_icount (
    .clk, .rst_n, .inc_lt(disp_lt_cnt), .inc_tt(disp_tt_cnt),
    .dec_lt(iq_issue_lt), .dec_tt(iq_issue_tt), .cnt_lt(icount_lt), .cnt_tt(icount_tt)
  );
  thread_counter #(.SIZE(ROB_N), .INC_W(DW)) u_rob_cnt (
    .clk, .rst_n, .inc_lt(disp_lt_cnt), .inc_tt(disp_tt_cnt),
    .dec_lt(rob_rel_lt), .dec_tt(rob_rel_tt), .cnt_lt(rob_lt_cnt), .cnt_tt(rob_tt_cnt)
  );
  thread_counter #(.SIZE(LQ_N), .INC_W(DW)) u_lq_cnt (
    .clk, .rst_n, .inc_lt(lt_loads), .inc_tt(tt_loads),
    .dec_lt(lq_rel_lt), .dec_tt(lq_rel_tt), .cnt_lt(lq_lt_cnt), .cnt_tt(lq_tt_cnt)
  );
  thread_counter #(.SIZE(SQ_N), .INC_W(DW)) u_sq_cnt (
    .clk, .rst_n, .inc_lt(lt_stores), .inc_tt(tt_stores),
    .dec_lt(sq_rel_lt), .dec_tt(sq_rel_tt), .cnt_lt(sq_lt_cnt), .cnt_tt(sq_tt_cnt)
  );

  assign iq_free = IQ_CW'(IQ_N) - icount_lt - icount_tt;

  // ---------------- deadlock prevention ----------------
  partition_limit #(.SIZE(ROB_N), .RSV(ROB_R)) u_rob_part (
    .cnt_lt(rob_lt_cnt), .cnt_tt(rob_tt_cnt), .free(rob_free), .lt_room(rob_lt_room)
  );
  partition_limit #(.SIZE(LQ_N), .RSV(LQ_R)) u_lq_part (
    .cnt_lt(lq_lt_cnt), .cnt_tt(lq_tt_cnt), .free(lq_free), .lt_room(lq_lt_room)
  );
  partition_limit #(.SIZE(SQ_N), .RSV(SQ_R)) u_sq_part (
    .cnt_lt(sq_lt_cnt), .cnt_tt(sq_tt_cnt), .free(sq_free), .lt_room(sq_lt_room)
  );

  logic mon_precaution, rob_caution, lq_caution, sq_caution;
  deadlock_monitor #(.ROB_CW(ROB_CW), .LQ_CW(LQ_CW), .SQ_CW(SQ_CW)) u_mon (
    .rob_lt_cnt, .lq_lt_cnt, .sq_lt_cnt,
    .rob_thresh(ROB_CW'(ROB_THR)), .lq_thresh(LQ_CW'(LQ_THR)), .sq_thresh(SQ_CW'(SQ_THR)),
    .rob_caution, .lq_caution, .sq_caution, .precaution(mon_precaution)
  );
  assign precaution = (DL_MODE == DL_DYNAMIC) && mon_precaution;
  assign caution    = {rob_caution, lq_caution, sq_caution};

  // ---------------- dispatch thread scheduling and dispatch ----------------
  thread_e first;
  logic    lt_ok, tt_ok, lt_blocked;

  // LT cannot dispatch its oldest instruction this cycle.
  assign lt_blocked = (ifq_count != '0)
                      && (precaution || (iq_free == '0) || (rob_lt_room == '0)
                          || (ifq_head[0].f.is_load  && (lq_lt_room == '0))
                          || (ifq_head[0].f.is_store && (sq_lt_room == '0)));
  assign slack_waived = lt_blocked && !drain && (32'(distance) < 32'(SLACK_DIST));

  thread_scheduler #(.SLACK_DIST(SLACK_DIST), .IQ_CW(IQ_CW), .IFQ_CW(IFQ_CW),
                     .TQ_CW(TQ_CW), .OCW(DCW)) u_ts (
    .icount_lt, .icount_tt, .ifq_count, .tq_count, .tq_avail, .precaution, .drain, .lt_blocked,
    .sel(sched_sel), .first, .lt_ok, .tt_ok, .slack_hold, .distance
  );

  // No dispatch in a cycle in which LT recovers from a misprediction: the IFQ
  // and the trace queue are being flushed.
  dispatch_unit #(.W(DW), .IFQ_CW(IFQ_CW), .IQ_CW(IQ_CW), .ROB_CW(ROB_CW),
                  .LQ_CW(LQ_CW), .SQ_CW(SQ_CW)) u_disp (
    .first, .lt_ok(lt_ok && !redirect), .tt_ok(tt_ok && !redirect),
    .ifq_ent(ifq_head), .ifq_count, .tq_ent(tq_head), .tq_avail,
    .iq_free, .rob_free, .rob_lt_room, .lq_free, .lq_lt_room, .sq_free, .sq_lt_room,
    .disp_valid, .disp_ent, .lt_cnt(disp_lt_cnt), .tt_cnt(disp_tt_cnt),
    .lt_loads, .lt_stores, .tt_loads, .tt_stores
  );

  // ---------------- LVQ and chkQ ----------------
  lvq #(.DEPTH(LVQ_D)) u_lvq (
    .clk, .rst_n, .wr_valid(lvq_wr_valid), .squash_valid(redirect), .squash_seq(br_seq), .wr_seq(lvq_wr_seq), .wr_data(lvq_wr_data),
    .rd_valid(lvq_rd_valid), .rd_seq(lvq_rd_seq), .rd_hit(lvq_rd_hit), .rd_data(lvq_rd_data),
    .full(lvq_full), .count(lvq_count)
  );

  chk_queue #(.DEPTH(CHKQ_D), .W(RW)) u_chk (
    .clk, .rst_n, .flush(chk_flush), .lt_cnt(lt_ret_cnt), .lt_ret, .tt_cnt(tt_ret_cnt),
    .tt_ret, .count(chkq_count), .free(chkq_free), .checked_cnt, .fault_valid, .fault_seq
  );

  initial assert (TQ_D > IFQ_D + SLACK_DIST)
    else $error("trace queue must exceed IFQ size plus slack distance");
  assert property (@(posedge clk) disable iff (!rst_n) br_valid |-> tq_res_hit)
    else $error("completed LT branch has no TT copy in the trace queue");

endmodule
