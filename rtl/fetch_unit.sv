// fetch_unit: turns FTQ requests into instruction cache accesses.
//
// For each FTQ request it picks the source of the block:
//   * FTB hit with decoded-valid: the decoded copy in DIA, from the decoded
//     address for the decoded length in bytes (fast path),
//   * FTB hit otherwise: the original x86 bytes, from the fetch address for
//     the fall-through distance (slow path),
//   * FTB miss: the original bytes up to the end of the current line.
// The byte range is cut at LINE_BYTES boundaries and one cache request is
// issued per line. The instruction cache itself is unchanged by the decoded
// area: decoded blocks are ordinary cacheable memory.
//
// Interface: ic_req_* is a valid/ready request; the cache answers each
// request, in order, with one ic_rsp_valid pulse carrying the aligned line.
// Up to OUTST requests may be in flight or waiting to be read; each becomes a
// fetch_beat_t (request info, decoded flag, byte range, last-of-block flag
// and the line) offered on out_valid/out_ready in request order.
// flush drops all queued work; answers to requests already sent are
// discarded when they arrive. In-order answers, the line size and the queue
// depth are this design's assumptions.
module fetch_unit
  import dia_pkg::*;
#(
  parameter int unsigned OUTST = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // FTQ head
  input  logic              ftq_empty,
  input  ftq_entry_t        ftq_head,
  output logic              ftq_pop,
  // instruction cache
  output logic              ic_req_valid,
  input  logic              ic_req_ready,
  output addr_t             ic_req_addr,
  input  logic              ic_rsp_valid,
  input  logic [LINE_W-1:0] ic_rsp_data,
  // to the decode stage
  output logic              out_valid,
  input  logic              out_ready,
  output fetch_beat_t       out_beat
);

  localparam int unsigned PW = (OUTST > 1) ? $clog2(OUTST) : 1;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);

  // current block
  logic       busy_q;
  ftq_entry_t cur_q;
  logic       dec_q;
  addr_t      addr_q;
  logic [8:0] rem_q;

  // request slots: meta written at issue, data at answer
  fetch_meta_t       meta_q [OUTST];
  logic [LINE_W-1:0] data_q [OUTST];
  logic [PW-1:0]     wr_q, rs_q, rd_q;
  logic [PW:0]       used_q;     // issued and not yet read
  logic [PW:0]       ready_q;    // answered and not yet read
  logic [7:0]        drop_q;     // answers still owed for flushed requests

  // start of a new block
  logic       start_dec;
  addr_t      start_addr;
  logic [8:0] start_len;
  always_comb begin
    start_dec  = ftq_head.ftb_hit && ftq_head.pred.dvalid;
    start_addr = start_dec ? ftq_head.pred.daddr : ftq_head.fetch_addr;
    if (start_dec)
      start_len = 9'(ftq_head.pred.dlen);
    else if (ftq_head.ftb_hit)
      start_len = 9'(ftq_head.pred.ft_bytes);
    else
      start_len = 9'(LINE_BYTES) - 9'(ftq_head.fetch_addr[OFF_W-1:0]);
  end

  assign ftq_pop = !flush && !busy_q && !ftq_empty;

  // current request
  logic [8:0] to_line_end, chunk;
  assign to_line_end  = 9'(LINE_BYTES) - 9'(addr_q[OFF_W-1:0]);
  assign chunk        = (rem_q < to_line_end) ? rem_q : to_line_end;
  assign ic_req_valid = busy_q && !flush && (used_q != (PW+1)'(OUTST));
  assign ic_req_addr  = addr_q;

  logic issue, take_rsp, keep_rsp, read;
  assign issue    = ic_req_valid && ic_req_ready;
  assign take_rsp = ic_rsp_valid;
  assign keep_rsp = take_rsp && (drop_q == '0) && !flush;
  assign read     = out_valid && out_ready;

  assign out_valid = (ready_q != '0) && !flush;
  assign out_beat  = '{meta: meta_q[rd_q], data: data_q[rd_q]};

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(OUTST - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (issue)
      meta_q[wr_q] <= '{req: cur_q, decoded: dec_q, addr: addr_q,
                        nbytes: 6'(chunk), last: (rem_q == chunk)};
    if (keep_rsp) data_q[rs_q] <= ic_rsp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      cur_q   <= '0;
      dec_q   <= 1'b0;
      addr_q  <= '0;
      rem_q   <= '0;
      wr_q    <= '0; rs_q <= '0; rd_q <= '0;
      used_q  <= '0; ready_q <= '0; drop_q <= '0;
    end else if (flush) begin
      busy_q  <= 1'b0;
      wr_q    <= '0; rs_q <= '0; rd_q <= '0;
      used_q  <= '0; ready_q <= '0;
      // answers owed: issued minus answered, less one answered now
      drop_q  <= drop_q + 8'(used_q - ready_q) - 8'(take_rsp);
    end else begin
      if (ftq_pop) begin
        busy_q <= (start_len != '0);
        cur_q  <= ftq_head;
        dec_q  <= start_dec;
        addr_q <= start_addr;
        rem_q  <= start_len;
      end else if (issue) begin
        addr_q <= addr_q + addr_t'(chunk);
        rem_q  <= rem_q - chunk;
        if (rem_q == chunk) busy_q <= 1'b0;
      end
      if (issue) wr_q <= inc(wr_q);
      if (keep_rsp) rs_q <= inc(rs_q);
      if (read) rd_q <= inc(rd_q);
      if (take_rsp && drop_q != '0) drop_q <= drop_q - 1'b1;
      used_q  <= used_q + (PW+1)'(issue) - (PW+1)'(read);
      ready_q <= ready_q + (PW+1)'(keep_rsp) - (PW+1)'(read);
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    ic_rsp_valid |-> (drop_q != '0) || (used_q != ready_q));

endmodule
