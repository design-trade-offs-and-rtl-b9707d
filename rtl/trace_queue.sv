// trace_queue: trailing-thread instruction queue (traceQ).
//
// Holds the TT copy of every fetched instruction until it is dispatched; its
// size (256 entries in the main configuration) lets TT lag the leading thread
// by the stagger distance.  Each entry carries the instruction, its sequence
// number, the thread ID and a branch-resolved status bit, cleared on entry.
//
// Branch resolution: when an LT branch completes, its sequence number is
// searched in the queue (res_valid/res_seq).  The TT copy is marked resolved.
// If the LT branch was mispredicted (res_mispred), every entry behind the
// matching one is flushed in the same cycle; pushes in that cycle are dropped
// because they belong to the wrong path.  TT thus never recovers from a
// misprediction on its own.
//
// Dispatch side: head_ent shows the POP_W oldest entries and avail counts how
// many of them may go: the run stops before the first branch that is still
// unresolved (TT dispatch pauses there).  pop_cnt must not exceed avail.
// Timing: search, flush and status update take effect at the next clock edge;
// a branch resolved in cycle t is dispatchable in cycle t+1.
// DEPTH must be a power of two.  Entry contents, the search and flush follow the
// fault-tolerant SMT scheme; the is_branch predecode bit and storing the
// sequence number in the entry are this design's own choices.
module trace_queue
  import ftsmt_pkg::*;
#(
  parameter int unsigned DEPTH  = TQ_DEPTH,
  parameter int unsigned PUSH_W = FETCH_W,
  parameter int unsigned POP_W  = DISP_W,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned PCW   = $clog2(PUSH_W + 1),
  localparam int unsigned OCW   = $clog2(POP_W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [PCW-1:0] push_cnt,
  input  qent_t          push_ent [PUSH_W],
  input  logic           res_valid,
  input  seq_t           res_seq,
  input  logic           res_mispred,
  input  logic [OCW-1:0] pop_cnt,
  output qent_t          head_ent [POP_W],
  output logic [OCW-1:0] avail,
  output logic [CW-1:0]  count,
  output logic [CW-1:0]  free,
  output logic           res_hit
);

  qent_t         mem [DEPTH];
  logic [AW-1:0] head, tail;

  // Associative search for the resolving branch's TT copy.
  logic [AW-1:0] hit_idx;
  logic [CW-1:0] hit_off;
  always_comb begin
    res_hit = 1'b0;
    hit_idx = '0;
    hit_off = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      logic [AW-1:0] off;
      off = AW'(i) - head;
      if (res_valid && (CW'(off) < count) && mem[i].f.is_branch
          && (mem[i].seq == res_seq)) begin
        res_hit = 1'b1;
        hit_idx = AW'(i);
        hit_off = CW'(off);
      end
    end
  end

  logic do_flush;
  assign do_flush = res_hit && res_mispred;
  assign free     = CW'(DEPTH) - count;

  // Dispatchable run at the head.
  always_comb begin
    logic stop;
    stop  = 1'b0;
    avail = '0;
    for (int i = 0; i < int'(POP_W); i++) begin
      head_ent[i] = mem[AW'(head + AW'(i))];
      if (!stop && (i < int'(count))
          && !(head_ent[i].f.is_branch && !head_ent[i].resolved))
        avail = OCW'(i + 1);
      else
        stop = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!do_flush) begin
      for (int i = 0; i < int'(PUSH_W); i++)
        if (i < int'(push_cnt)) mem[AW'(tail + AW'(i))] <= push_ent[i];
    end
    if (res_hit) mem[hit_idx].resolved <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head <= head + AW'(pop_cnt);
      if (do_flush) begin
        tail  <= hit_idx + AW'(1);
        count <= hit_off + CW'(1) - CW'(pop_cnt);
      end else begin
        tail  <= tail + AW'(push_cnt);
        count <= count + CW'(push_cnt) - CW'(pop_cnt);
      end
    end
  end

  initial assert ((1 << AW) == DEPTH) else $error("traceQ depth must be a power of two");
  assert property (@(posedge clk) disable iff (!rst_n) pop_cnt <= avail)
    else $error("traceQ pop beyond dispatchable entries");
  assert property (@(posedge clk) disable iff (!rst_n)
                   do_flush || (32'(count) + 32'(push_cnt) - 32'(pop_cnt) <= 32'(DEPTH)))
    else $error("traceQ overflow");

endmodule
