// deadlock_monitor: dynamic deadlock monitoring for the leading thread.
//
// The two thread copies cooperate (LT fills the checking queue and the load
// value queue that only TT can drain), so LT must never occupy all of the ROB,
// the load queue or the store queue.  This block compares the number of LT
// instructions in each of the three structures with a predefined occupancy
// threshold, one per structure, and ORs the three comparisons into the
// precaution signal.  While precaution is high the dispatch thread scheduler
// does not dispatch LT, so TT can keep being dispatched and release the
// entries LT waits for.
//
// Interface: the LT occupancy counts come from the per-thread occupancy
// counters; the thresholds are inputs so they can be set at run time.
// Timing: combinational from counts to precaution.
// A structure raises its comparison when its count has reached the threshold
// (count >= threshold), so a threshold set to the size minus the dispatch width
// leaves at least one entry to TT; that comparison rule is this design's
// reading of the scheme, the structure of counters, comparators and OR follows it.
module deadlock_monitor #(
  parameter int unsigned ROB_CW = 8,
  parameter int unsigned LQ_CW  = 7,
  parameter int unsigned SQ_CW  = 7
) (
  input  logic [ROB_CW-1:0] rob_lt_cnt,
  input  logic [LQ_CW-1:0]  lq_lt_cnt,
  input  logic [SQ_CW-1:0]  sq_lt_cnt,
  input  logic [ROB_CW-1:0] rob_thresh,
  input  logic [LQ_CW-1:0]  lq_thresh,
  input  logic [SQ_CW-1:0]  sq_thresh,
  output logic              rob_caution,
  output logic              lq_caution,
  output logic              sq_caution,
  output logic              precaution
);

  assign lq_caution  = lq_lt_cnt  >= lq_thresh;
  assign sq_caution  = sq_lt_cnt  >= sq_thresh;
  assign rob_caution = rob_lt_cnt >= rob_thresh;
  assign precaution  = lq_caution | sq_caution | rob_caution;

endmodule
