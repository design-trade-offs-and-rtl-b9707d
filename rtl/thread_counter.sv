// thread_counter: per-thread occupancy counter of one shared resource.
//
// Keeps, for the leading and the trailing thread separately, how many entries of
// a resource (issue queue, ROB, load queue or store queue) the thread holds.
// Each cycle a thread's count rises by the entries it was given at dispatch
// (inc_*) and falls by the entries it gave back (dec_*: issue, retirement or
// squash).  Used as the ICOUNT counters of the dispatch thread scheduling and as
// the LT counters of the dynamic deadlock monitor.  The counts are registered
// and include the updates up to the previous clock edge.
// The counter itself is this design's simplest realisation of the counting the
// scheme asks for.
module thread_counter #(
  parameter int unsigned SIZE  = 128,
  parameter int unsigned INC_W = 8,
  localparam int unsigned CW   = $clog2(SIZE + 1),
  localparam int unsigned IW   = $clog2(INC_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] inc_lt,
  input  logic [IW-1:0] inc_tt,
  input  logic [CW-1:0] dec_lt,
  input  logic [CW-1:0] dec_tt,
  output logic [CW-1:0] cnt_lt,
  output logic [CW-1:0] cnt_tt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_lt <= '0;
      cnt_tt <= '0;
    end else begin
      cnt_lt <= cnt_lt + CW'(inc_lt) - dec_lt;
      cnt_tt <= cnt_tt + CW'(inc_tt) - dec_tt;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (32'(dec_lt) <= 32'(cnt_lt) + 32'(inc_lt)) && (32'(dec_tt) <= 32'(cnt_tt) + 32'(inc_tt)))
    else $error("occupancy counter underflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   32'(cnt_lt) + 32'(inc_lt) - 32'(dec_lt) + 32'(cnt_tt) + 32'(inc_tt) - 32'(dec_tt) <= 32'(SIZE))
    else $error("occupancy counter beyond resource size");

endmodule
