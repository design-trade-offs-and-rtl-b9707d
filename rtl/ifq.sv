// ifq: leading-thread instruction fetch queue.
//
// An in-order circular buffer of DEPTH instruction entries (32 in the main
// configuration).  Up to PUSH_W entries are written per cycle at the tail and up
// to POP_W entries are removed per cycle at the head.  The first POP_W entries
// are always presented on head_ent so the dispatch stage can look ahead.
// flush empties the queue in one cycle; it is raised on an LT branch
// misprediction, when every instruction still in the IFQ lies on the wrong
// path.  Pushes in a flush cycle are dropped; the pop count must not exceed
// count.  DEPTH must be a power of two.  Occupancy is registered; head_ent and
// count are valid in the same cycle they are used.
// The queue's role follows the fault-tolerant SMT datapath; the multi-entry port
// widths and whole-queue flush are this design's own choices.
module ifq
  import ftsmt_pkg::*;
#(
  parameter int unsigned DEPTH  = IFQ_DEPTH,
  parameter int unsigned PUSH_W = FETCH_W,
  parameter int unsigned POP_W  = DISP_W,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned PCW   = $clog2(PUSH_W + 1),
  localparam int unsigned OCW   = $clog2(POP_W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic [PCW-1:0] push_cnt,
  input  qent_t          push_ent [PUSH_W],
  input  logic [OCW-1:0] pop_cnt,
  output qent_t          head_ent [POP_W],
  output logic [CW-1:0]  count,
  output logic [CW-1:0]  free
);

  qent_t         mem [DEPTH];
  logic [AW-1:0] head, tail;

  assign free = CW'(DEPTH) - count;

  always_comb begin
    for (int i = 0; i < int'(POP_W); i++) head_ent[i] = mem[AW'(head + AW'(i))];
  end

  always_ff @(posedge clk) begin
    if (!flush) begin
      for (int i = 0; i < int'(PUSH_W); i++)
        if (i < int'(push_cnt)) mem[AW'(tail + AW'(i))] <= push_ent[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head  <= head + AW'(pop_cnt);
      tail  <= tail + AW'(push_cnt);
      count <= count + CW'(push_cnt) - CW'(pop_cnt);
    end
  end

  initial assert ((1 << AW) == DEPTH) else $error("IFQ depth must be a power of two");
  assert property (@(posedge clk) disable iff (!rst_n)
                   flush || (32'(pop_cnt) <= 32'(count)))
    else $error("IFQ underflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   flush || (32'(count) + 32'(push_cnt) - 32'(pop_cnt) <= 32'(DEPTH)))
    else $error("IFQ overflow");

endmodule
