// ftsmt_pkg: constants and types shared by the fault-tolerant SMT dispatch and
// checking logic.
//
// The sizes are the main configuration: a 2-thread SMT (leading thread LT and
// trailing thread TT, two copies of one program), dispatch of 8 instructions per
// cycle, a 32-entry IFQ, a 256-entry trace queue, a 64-entry issue queue, a
// 128-entry ROB, 64-entry load and store queues, a 64-entry load value queue and
// a 64-entry checking queue.  A slack (stagger distance) of 128 instructions is
// used with the 256-entry trace queue.  Sequence numbers are 10 bits wide,
// instruction words and results 32 bits.  Fetch and retire widths, the reserved
// entry counts for static partitioning and the occupancy thresholds for dynamic
// deadlock monitoring are this design's own choices.
package ftsmt_pkg;

  localparam int unsigned SEQ_W  = 10;   // sequential number width
  localparam int unsigned INSN_W = 32;   // instruction word width
  localparam int unsigned DATA_W = 32;   // execution result / load value width

  localparam int unsigned DISP_W  = 8;   // dispatch width
  localparam int unsigned FETCH_W = 8;   // fetch bundle width (own choice)
  localparam int unsigned RET_W   = 8;   // retire width per thread (own choice)

  localparam int unsigned IFQ_DEPTH  = 32;
  localparam int unsigned TQ_DEPTH   = 256;
  localparam int unsigned IQ_SIZE    = 64;
  localparam int unsigned ROB_SIZE   = 128;
  localparam int unsigned LQ_SIZE    = 64;
  localparam int unsigned SQ_SIZE    = 64;
  localparam int unsigned LVQ_DEPTH  = 64;
  localparam int unsigned CHKQ_DEPTH = 64;
  localparam int unsigned SLACK      = 128;

  typedef logic [SEQ_W-1:0]  seq_t;
  typedef logic [INSN_W-1:0] insn_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef enum logic {THR_LT = 1'b0, THR_TT = 1'b1} thread_e;

  // How deadlocks between the two copies are prevented.
  typedef enum logic {DL_STATIC = 1'b0, DL_DYNAMIC = 1'b1} dl_mode_e;

  // Fetched instruction with its predecode class bits.
  typedef struct packed {
    insn_t word;
    logic  is_branch;
    logic  is_load;
    logic  is_store;
  } fetch_t;

  // Instruction as held in the IFQ and the trace queue.
  typedef struct packed {
    seq_t    seq;
    thread_e tid;
    fetch_t  f;
    logic    resolved;   // branch resolve status (used in the trace queue)
  } qent_t;

  // Retired instruction with its result, as buffered in and compared against
  // the checking queue.
  typedef struct packed {
    seq_t  seq;
    insn_t word;
    data_t result;
  } ret_t;

  // Sequence-number comparison on a wrapping counter: a is older than b.
  function automatic logic seq_older(seq_t a, seq_t b);
    seq_t d;
    d = b - a;
    return (d != '0) && (d[SEQ_W-1] == 1'b0);
  endfunction

endpackage
