// ftq: Fetch Target Queue.
//
// A FIFO of DEPTH fetch requests (4, as the architecture sizes it) written by
// the branch predictor and read by fetch, so that prediction runs ahead of
// the instruction cache. push is ignored when full, pop when empty; a push
// and a pop in the same cycle are both taken when the queue is neither. flush
// (mispredict) empties it. The head is visible combinationally on 'head';
// a pushed entry is visible the cycle after.
module ftq
  import dia_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       push,
  input  ftq_entry_t push_entry,
  output logic       full,
  input  logic       pop,
  output logic       empty,
  output ftq_entry_t head
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  ftq_entry_t      q_q [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [PW:0]     cnt_q;

  assign full  = (cnt_q == (PW+1)'(DEPTH));
  assign empty = (cnt_q == '0);
  assign head  = q_q[rd_q];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) q_q[wr_q] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else if (flush) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= inc(wr_q);
      if (do_pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (PW+1)'(DEPTH));

endmodule
