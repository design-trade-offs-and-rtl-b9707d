// chk_queue: checking queue (chkQ) and result comparator.
//
// Every instruction the leading thread retires is buffered here, in program
// order, with its sequence number, instruction word and execution result; LT
// may retire only as many instructions as there are free entries.  The
// trailing thread triggers the check: when TT retires an instruction, it is
// compared with the oldest entry (sequence number, instruction word and result
// must all agree).  A match frees the entry; the first mismatch raises
// fault_valid with the sequence number of the failing instruction and the entry
// is kept, so the processor can roll back to the last checked point.  Each
// entry also holds a status bit marking it occupied.
//
// Interface: up to W LT retirements (lt_cnt, lt_ret) and W TT retirements
// (tt_cnt, tt_ret) per cycle; lt_cnt must not exceed free and tt_cnt must not
// exceed count, since a TT instruction can only be checked once its LT twin has
// retired.  checked_cnt is the number of instructions found fault-free this
// cycle.  flush empties the queue on recovery.  Comparison is combinational;
// pops and pushes take effect at the next clock edge.  DEPTH must be a power of
// two.  The entry contents follow the scheme; the retire widths, the in-order
// comparison and the flush input are this design's own choices.
module chk_queue
  import ftsmt_pkg::*;
#(
  parameter int unsigned DEPTH = CHKQ_DEPTH,
  parameter int unsigned W     = RET_W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned OCW  = $clog2(W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic [OCW-1:0] lt_cnt,
  input  ret_t           lt_ret [W],
  input  logic [OCW-1:0] tt_cnt,
  input  ret_t           tt_ret [W],
  output logic [CW-1:0]  count,
  output logic [CW-1:0]  free,
  output logic [OCW-1:0] checked_cnt,
  output logic           fault_valid,
  output seq_t           fault_seq
);

  ret_t          mem [DEPTH];
  logic          status [DEPTH];
  logic [AW-1:0] head, tail;

  assign free = CW'(DEPTH) - count;

  always_comb begin
    logic stop;
    stop        = 1'b0;
    checked_cnt = '0;
    fault_valid = 1'b0;
    fault_seq   = '0;
    for (int i = 0; i < int'(W); i++) begin
      ret_t e;
      e = mem[AW'(head + AW'(i))];
      if (!stop && (i < int'(tt_cnt))) begin
        if (status[AW'(head + AW'(i))] && (e == tt_ret[i])) begin
          checked_cnt = OCW'(i + 1);
        end else begin
          stop        = 1'b1;
          fault_valid = 1'b1;
          fault_seq   = tt_ret[i].seq;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!flush) begin
      for (int i = 0; i < int'(W); i++)
        if (i < int'(lt_cnt)) mem[AW'(tail + AW'(i))] <= lt_ret[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) status[i] <= 1'b0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) status[i] <= 1'b0;
    end else begin
      for (int i = 0; i < int'(W); i++)
        if (i < int'(checked_cnt)) status[AW'(head + AW'(i))] <= 1'b0;
      for (int i = 0; i < int'(W); i++)
        if (i < int'(lt_cnt)) status[AW'(tail + AW'(i))] <= 1'b1;
      head  <= head + AW'(checked_cnt);
      tail  <= tail + AW'(lt_cnt);
      count <= count + CW'(lt_cnt) - CW'(checked_cnt);
    end
  end

  initial assert ((1 << AW) == DEPTH) else $error("chkQ depth must be a power of two");
  assert property (@(posedge clk) disable iff (!rst_n) flush || (32'(lt_cnt) <= 32'(free)))
    else $error("chkQ overflow: LT retired without a free entry");
  assert property (@(posedge clk) disable iff (!rst_n) flush || (32'(tt_cnt) <= 32'(count)))
    else $error("TT retired ahead of its LT counterpart");

endmodule
