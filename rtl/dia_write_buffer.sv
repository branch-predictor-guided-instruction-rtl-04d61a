// dia_write_buffer: buffer between commit and the single L2 port.
//
// Every micro-op word of a new decoded fetch block enters this FIFO with its
// physical address. The L2 arbiter drains it only when neither the
// instruction nor the data cache uses the L2 port, so the decoded area never
// needs an L2 port of its own. When the buffer is full, commit waits.
// Entries are single 4-byte micro-op words and the depth (8) is this design's
// choice. push is ignored when full, pop when empty; a pushed word is visible
// at the head the cycle after.
module dia_write_buffer
  import dia_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  addr_t       push_addr,
  input  logic [31:0] push_data,
  output logic        full,
  input  logic        pop,
  output logic        empty,
  output addr_t       head_addr,
  output logic [31:0] head_data
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  addr_t         a_q [DEPTH];
  logic [31:0]   d_q [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [PW:0]   cnt_q;

  assign full      = (cnt_q == (PW+1)'(DEPTH));
  assign empty     = (cnt_q == '0);
  assign head_addr = a_q[rd_q];
  assign head_data = d_q[rd_q];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) begin
      a_q[wr_q] <= push_addr;
      d_q[wr_q] <= push_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= inc(wr_q);
      if (do_pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
