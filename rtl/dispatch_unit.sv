// dispatch_unit: instruction dispatch (IDis) for the two thread copies.
//
// Each cycle up to W (8) dispatch slots are filled.  The thread chosen first by
// the thread scheduler takes as many slots as it can, in program order from the
// head of its queue (IFQ for LT, trace queue for TT); the remaining slots go to
// the other thread if it is allowed to dispatch.  A thread stops at its first
// instruction that does not fit, in-order dispatch, so the next one never
// passes it.  An instruction fits when there is
//   * a free issue-queue entry (shared by both threads),
//   * a ROB entry the thread may take (LT is limited by its room under static
//     partitioning, TT by the free entries),
//   * for a load, a load-queue entry and for a store, a store-queue entry, with
//     the same per-thread rule.
// Both threads draw on the same free entries within one cycle; the unit counts
// what it has handed out so the two never oversubscribe a queue.
// Outputs: the filled slots in order (disp_valid/disp_ent, the entry's tid says
// the thread), the per-thread counts popped from the queues, and the per-thread
// numbers of loads and stores, which feed the occupancy counters.
// Combinational.  The slot filling follows the ICOUNT.2.8.dispatch policy; the
// resource checks are the usual dispatch stalls, written here in the simplest way.
module dispatch_unit
  import ftsmt_pkg::*;
#(
  parameter int unsigned W      = DISP_W,
  parameter int unsigned IFQ_CW = $clog2(IFQ_DEPTH + 1),
  parameter int unsigned IQ_CW  = $clog2(IQ_SIZE + 1),
  parameter int unsigned ROB_CW = $clog2(ROB_SIZE + 1),
  parameter int unsigned LQ_CW  = $clog2(LQ_SIZE + 1),
  parameter int unsigned SQ_CW  = $clog2(SQ_SIZE + 1),
  localparam int unsigned OCW   = $clog2(W + 1)
) (
  input  thread_e           first,
  input  logic              lt_ok,
  input  logic              tt_ok,
  input  qent_t             ifq_ent [W],
  input  logic [IFQ_CW-1:0] ifq_count,
  input  qent_t             tq_ent [W],
  input  logic [OCW-1:0]    tq_avail,
  input  logic [IQ_CW-1:0]  iq_free,
  input  logic [ROB_CW-1:0] rob_free,
  input  logic [ROB_CW-1:0] rob_lt_room,
  input  logic [LQ_CW-1:0]  lq_free,
  input  logic [LQ_CW-1:0]  lq_lt_room,
  input  logic [SQ_CW-1:0]  sq_free,
  input  logic [SQ_CW-1:0]  sq_lt_room,
  output logic              disp_valid [W],
  output qent_t             disp_ent [W],
  output logic [OCW-1:0]    lt_cnt,
  output logic [OCW-1:0]    tt_cnt,
  output logic [OCW-1:0]    lt_loads,
  output logic [OCW-1:0]    lt_stores,
  output logic [OCW-1:0]    tt_loads,
  output logic [OCW-1:0]    tt_stores
);

  always_comb begin
    int slot, iq_u, rob_u, lq_u, sq_u, lt_rob, lt_lq, lt_sq;
    int n [2];
    int ld [2];
    int st [2];
    slot = 0;
    iq_u = 0; rob_u = 0; lq_u = 0; sq_u = 0;
    lt_rob = 0; lt_lq = 0; lt_sq = 0;
    for (int t = 0; t < 2; t++) begin
      n[t] = 0; ld[t] = 0; st[t] = 0;
    end
    for (int i = 0; i < int'(W); i++) begin
      disp_valid[i] = 1'b0;
      disp_ent[i]   = '0;
    end

    for (int pass = 0; pass < 2; pass++) begin
      thread_e thr;
      logic    ok, stop;
      int      limit;
      thr   = (pass == 0) ? first : ((first == THR_LT) ? THR_TT : THR_LT);
      ok    = (thr == THR_LT) ? lt_ok : tt_ok;
      limit = (thr == THR_LT) ? int'(ifq_count) : int'(tq_avail);
      stop  = !ok;
      for (int i = 0; i < int'(W); i++) begin
        qent_t e;
        logic  fits;
        e = (thr == THR_LT) ? ifq_ent[i] : tq_ent[i];
        fits = (slot < int'(W)) && (i < limit)
               && (iq_u < int'(iq_free))
               && (rob_u < int'(rob_free))
               && ((thr == THR_TT) || (lt_rob < int'(rob_lt_room)))
               && (!e.f.is_load  || ((lq_u < int'(lq_free))
                                     && ((thr == THR_TT) || (lt_lq < int'(lq_lt_room)))))
               && (!e.f.is_store || ((sq_u < int'(sq_free))
                                     && ((thr == THR_TT) || (lt_sq < int'(sq_lt_room)))));
        if (!stop && fits) begin
          disp_valid[slot & (int'(W) - 1)] = 1'b1;
          disp_ent[slot & (int'(W) - 1)]   = e;
          slot   = slot + 1;
          iq_u   = iq_u + 1;
          rob_u  = rob_u + 1;
          n[thr] = n[thr] + 1;
          if (thr == THR_LT) lt_rob = lt_rob + 1;
          if (e.f.is_load) begin
            lq_u    = lq_u + 1;
            ld[thr] = ld[thr] + 1;
            if (thr == THR_LT) lt_lq = lt_lq + 1;
          end
          if (e.f.is_store) begin
            sq_u    = sq_u + 1;
            st[thr] = st[thr] + 1;
            if (thr == THR_LT) lt_sq = lt_sq + 1;
          end
        end else begin
          stop = 1'b1;
        end
      end
    end

    lt_cnt    = OCW'(n[0]);
    tt_cnt    = OCW'(n[1]);
    lt_loads  = OCW'(ld[0]);
    tt_loads  = OCW'(ld[1]);
    lt_stores = OCW'(st[0]);
    tt_stores = OCW'(st[1]);
  end

  initial assert ((1 << $clog2(W)) == W) else $error("dispatch width must be a power of two");

endmodule
