// seq_copy: instruction copy at fetch.
//
// Every fetched instruction is bound to a sequential number and then written
// twice in the same cycle: once into the IFQ tagged as the leading thread (LT)
// and once into the trace queue tagged as the trailing thread (TT).  The two
// copies therefore carry the same sequence number, which later pairs them up
// for branch resolution, load value forwarding and result checking.  The copy
// adds no pipeline stage: it is a counter and two tagging paths.
//
// Interface: a fetch bundle of fetch_cnt instructions (slots 0..fetch_cnt-1 are
// valid) is accepted when both queues have room for all of it (fetch_ready);
// push_cnt then tells both queues how many entries to take from lt_ent/tt_ent.
// A redirect (LT branch misprediction) drops the bundle of that cycle and
// restarts numbering right after the mispredicted branch, so the re-fetched
// correct path reuses the numbers of the squashed wrong path.
// Timing: purely combinational towards the queues; the sequence counter
// advances at the clock edge on which the bundle is accepted.
// Most output bits (instruction words and predecode bits of both copies) are
// the fetch bundle passed straight through: copying is the point of the
// block, and only the sequence number, thread ID and resolved bit are added.
// The all-or-nothing acceptance and the redirect behaviour are this design's
// own choices; tagging and copying follow the fault-tolerant SMT scheme.
module seq_copy
  import ftsmt_pkg::*;
#(
  parameter int unsigned W      = FETCH_W,
  parameter int unsigned IFQ_CW = $clog2(IFQ_DEPTH + 1),
  parameter int unsigned TQ_CW  = $clog2(TQ_DEPTH + 1),
  localparam int unsigned CW    = $clog2(W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     fetch_cnt,
  input  fetch_t            fetch_bundle [W],
  output logic              fetch_ready,
  input  logic [IFQ_CW-1:0] ifq_free,
  input  logic [TQ_CW-1:0]  tq_free,
  input  logic              redirect,
  input  seq_t              redirect_seq,
  output logic [CW-1:0]     push_cnt,
  output qent_t             lt_ent [W],
  output qent_t             tt_ent [W]
);

  seq_t next_seq;

  assign fetch_ready = !redirect
                       && (32'(ifq_free) >= 32'(fetch_cnt))
                       && (32'(tq_free)  >= 32'(fetch_cnt));
  assign push_cnt    = fetch_ready ? fetch_cnt : '0;

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      lt_ent[i].seq      = next_seq + seq_t'(i);
      lt_ent[i].tid      = THR_LT;
      lt_ent[i].f        = fetch_bundle[i];
      lt_ent[i].resolved = 1'b0;
      tt_ent[i]          = lt_ent[i];
      tt_ent[i].tid      = THR_TT;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        next_seq <= '0;
    else if (redirect) next_seq <= redirect_seq + seq_t'(1);
    else               next_seq <= next_seq + seq_t'(push_cnt);
  end

  initial assert (32'(W) <= 32'(IFQ_DEPTH)) else $error("fetch width exceeds IFQ depth");

endmodule
