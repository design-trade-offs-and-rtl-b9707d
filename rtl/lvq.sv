// lvq: load value queue.
//
// When a leading-thread load obtains its data from the cache or memory, the
// value is also buffered here together with the load's tag, its sequence
// number.  The trailing-thread copy of the load does not access the memory
// hierarchy: it looks up its own sequence number and takes the buffered value,
// which frees the entry.  Both copies thus see the same input data, and TT
// profits from LT's cache misses being already served.
//
// Interface: one LT write (wr_valid, wr_seq, wr_data) and one TT lookup
// (rd_valid, rd_seq -> rd_hit, rd_data) per cycle.  An LT load may only write
// while full is low: a full LVQ stalls LT loads, which is why the queue takes
// part in the deadlock analysis.  Lookup is combinational; the write and the
// release take effect at the next clock edge.  A write into a free slot uses the
// lowest free entry.  squash_valid/squash_seq (an LT branch misprediction)
// drops every entry whose tag is younger than squash_seq: those loads were on
// the wrong path and have no TT twin; a write in the same cycle is dropped too.
// The fully associative organisation and the single port per side are this
// design's own choices; the queue's function follows the scheme.
module lvq
  import ftsmt_pkg::*;
#(
  parameter int unsigned DEPTH = LVQ_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  seq_t          wr_seq,
  input  data_t         wr_data,
  input  logic          squash_valid,
  input  seq_t          squash_seq,
  input  logic          rd_valid,
  input  seq_t          rd_seq,
  output logic          rd_hit,
  output data_t         rd_data,
  output logic          full,
  output logic [CW-1:0] count
);

  logic  [DEPTH-1:0] vld;
  seq_t              tag  [DEPTH];
  data_t             data [DEPTH];

  logic [AW-1:0] rd_idx, wr_idx;
  logic          have_free;

  always_comb begin
    rd_hit  = 1'b0;
    rd_idx  = '0;
    rd_data = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      if (rd_valid && vld[i] && (tag[i] == rd_seq) && !rd_hit) begin
        rd_hit  = 1'b1;
        rd_idx  = AW'(i);
        rd_data = data[i];
      end
    have_free = 1'b0;
    wr_idx    = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--)
      if (!vld[i]) begin
        have_free = 1'b1;
        wr_idx    = AW'(i);
      end
  end

  assign full = !have_free;
  always_comb begin
    count = '0;
    for (int i = 0; i < int'(DEPTH); i++) count = count + CW'(vld[i]);
  end

  always_ff @(posedge clk) begin
    if (wr_valid && have_free) begin
      tag[wr_idx]  <= wr_seq;
      data[wr_idx] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else begin
      if (rd_hit) vld[rd_idx] <= 1'b0;
      if (squash_valid) begin
        for (int i = 0; i < int'(DEPTH); i++)
          if (seq_older(squash_seq, tag[i])) vld[i] <= 1'b0;
      end else if (wr_valid && have_free) begin
        vld[wr_idx] <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> !full)
    else $error("LVQ written while full");

endmodule
