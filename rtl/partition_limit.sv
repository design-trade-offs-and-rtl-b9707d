// partition_limit: static partitioning of one queue between the two threads.
//
// A minimum number of entries (RSV) of the ROB, the load queue or the store
// queue is kept for the trailing thread; the rest is shared.  The leading
// thread may hold at most SIZE-RSV entries, the trailing thread up to SIZE.
// Outputs:
//   free    - entries free in total (what TT may still allocate),
//   lt_room - entries LT may still allocate: the smaller of free and
//             SIZE-RSV-cnt_lt.
// With RSV = 0 the queue is fully shared.  Combinational.
// The partitioning rule follows the scheme; RSV has no value in the source
// scheme and is a parameter chosen by the integrator.
module partition_limit #(
  parameter int unsigned SIZE = 128,
  parameter int unsigned RSV  = 8,
  localparam int unsigned CW  = $clog2(SIZE + 1)
) (
  input  logic [CW-1:0] cnt_lt,
  input  logic [CW-1:0] cnt_tt,
  output logic [CW-1:0] free,
  output logic [CW-1:0] lt_room
);

  logic [CW:0] used, lt_cap;

  always_comb begin
    used    = (CW+1)'(cnt_lt) + (CW+1)'(cnt_tt);
    free    = (used >= (CW+1)'(SIZE)) ? '0 : CW'((CW+1)'(SIZE) - used);
    lt_cap  = ((CW+1)'(cnt_lt) >= (CW+1)'(SIZE - RSV)) ? '0
              : (CW+1)'(SIZE - RSV) - (CW+1)'(cnt_lt);
    lt_room = (lt_cap < (CW+1)'(free)) ? CW'(lt_cap) : free;
  end

  initial assert (RSV < SIZE) else $error("reserve must be smaller than the queue");

endmodule
