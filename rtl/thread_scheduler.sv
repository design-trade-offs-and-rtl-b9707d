// thread_scheduler: dispatch thread scheduling (TS).
//
// Decides, each cycle, which of the two thread copies dispatches first and
// whether each may dispatch at all:
//   * ICOUNT at the dispatch stage: the thread with fewer instructions waiting
//     in the issue queue gets the higher priority (a tie goes to LT, which keeps
//     LT ahead);
//   * LT may dispatch when the IFQ is not empty and the deadlock precaution
//     signal is low;
//   * TT may dispatch when the trace queue is not empty, its head is not an
//     unresolved branch (tq_avail > 0), and the slack dispatch rule holds: the
//     instruction distance between LT and TT has reached SLACK.  The distance is
//     the number of instructions LT has dispatched ahead of TT, which equals
//     traceQ occupancy minus IFQ occupancy since both queues receive every
//     fetched instruction.
// The selected thread dispatches first if it may; otherwise the other thread
// does (the "else" arm of the policy); leftover slots go to the alternate
// thread if it may dispatch.
// The slack rule is lifted in two cases, both this design's own additions:
// drain (LT has no more work, end of a program) and lt_blocked (LT cannot
// dispatch its head instruction this cycle: precaution raised, or no issue
// queue, ROB, LQ or SQ room for it).  Without the second, an LT stalled on a
// full LVQ or chkQ with a distance below SLACK_DIST would wait for TT while TT
// waits for the distance to grow, a circular wait.
// Combinational.  Outputs: first (thread served first), lt_ok, tt_ok, distance.
module thread_scheduler
  import ftsmt_pkg::*;
#(
  parameter int unsigned SLACK_DIST = SLACK,
  parameter int unsigned IQ_CW      = $clog2(IQ_SIZE + 1),
  parameter int unsigned IFQ_CW     = $clog2(IFQ_DEPTH + 1),
  parameter int unsigned TQ_CW      = $clog2(TQ_DEPTH + 1),
  parameter int unsigned OCW        = $clog2(DISP_W + 1)
) (
  input  logic [IQ_CW-1:0]  icount_lt,
  input  logic [IQ_CW-1:0]  icount_tt,
  input  logic [IFQ_CW-1:0] ifq_count,
  input  logic [TQ_CW-1:0]  tq_count,
  input  logic [OCW-1:0]    tq_avail,
  input  logic              precaution,
  input  logic              drain,
  input  logic              lt_blocked,
  output thread_e           sel,
  output thread_e           first,
  output logic              lt_ok,
  output logic              tt_ok,
  output logic              slack_hold,
  output logic [TQ_CW-1:0]  distance
);

  always_comb begin
    sel        = (icount_tt < icount_lt) ? THR_TT : THR_LT;
    distance   = (32'(tq_count) > 32'(ifq_count)) ? TQ_CW'(32'(tq_count) - 32'(ifq_count)) : '0;
    slack_hold = !drain && !lt_blocked && (32'(distance) < 32'(SLACK_DIST));
    lt_ok      = (ifq_count != '0) && !precaution;
    tt_ok      = !slack_hold && (tq_avail != '0);
    if (sel == THR_LT) first = lt_ok ? THR_LT : THR_TT;
    else               first = tt_ok ? THR_TT : THR_LT;
  end

endmodule
