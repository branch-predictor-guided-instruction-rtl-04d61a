// ftb_dia_frontend: processor front end with decoded fetch blocks kept in
// memory and located through the branch predictor.
//
// Prediction side: branch_predictor (FTB + perceptron + indirect predictor +
// RAS + next address logic) pushes one fetch request per cycle into the ftq.
// Each request carries the FTB entry's decoded-valid bit, decoded address and
// decoded length. fetch_unit reads the decoded copy from the Decoded
// Instruction Area when it is valid, else the original x86 bytes, through the
// unchanged instruction cache. decode_bypass sends decoded beats around the
// CISC decoders (fast path) and the rest through them (slow path), keeping
// program order into rename.
//
// Commit side: dia_commit_ctrl updates the predictor with each committed
// fetch block. When the FTB's hysteresis counter of that block saturates,
// the block's micro-ops are placed at the DIA pointer (dia_pointer),
// translated by commit_tlb and queued in dia_write_buffer, which l2_arbiter
// drains into the single L2 port whenever the instruction and data caches
// leave it free. The FTB entry then records the decoded address and length.
// A DIA overflow, an instruction cache invalidation or new DIA registers
// flush DIA: the pointer returns to the base and all decoded-valid bits in
// the FTB are cleared. Requests already in the FTQ, fetch or decode may still
// point at decoded copies whose space is about to be reused, so a DIA flush
// also restarts the front end: FTQ, fetch and decode are flushed and
// prediction resumes after the last fetch block delivered to rename, with
// the histories that block's prediction produced. This restart, and holding
// the FTB update until the write buffer has drained (dia_commit_ctrl), are
// this design's additions; they keep stale decoded micro-ops out of rename.
//
// Outside this module, reached through ports: the instruction cache (ic_*),
// the CISC decoders (dec_*), rename (ren_*), the back end (rd_* redirect,
// cm_*/up_* commit), the page walker (tlb_*), the caches' L2 miss traffic
// (icm_*, dcm_*) and the L2 itself (l2_*).
module ftb_dia_frontend
  import dia_pkg::*;
#(
  parameter int unsigned FTB_ENTRIES    = 2048,
  parameter int unsigned FTB_WAYS       = 4,
  parameter int unsigned N_PERC         = 256,
  parameter int unsigned IND_ENTRIES    = 2048,
  parameter int unsigned RAS_DEPTH      = 32,
  parameter int unsigned FTQ_DEPTH      = 4,
  parameter int unsigned FETCH_OUTST    = 4,
  parameter int unsigned DEC_STAGES     = 3,
  parameter int unsigned CTLB_ENTRIES   = 8,
  parameter int unsigned WB_DEPTH       = 8,
  parameter addr_t       RESET_PC       = '0,
  parameter addr_t       DIA_BASE_RESET = addr_t'(32'h4000_0000),
  parameter addr_t       DIA_SIZE_RESET = addr_t'(65536)
) (
  input  logic              clk,
  input  logic              rst_n,
  // DIA special-purpose registers
  input  logic              cfg_we,
  input  addr_t             cfg_base,
  input  addr_t             cfg_size,
  input  logic              icache_inval,
  // instruction cache
  output logic              ic_req_valid,
  input  logic              ic_req_ready,
  output addr_t             ic_req_addr,
  input  logic              ic_rsp_valid,
  input  logic [LINE_W-1:0] ic_rsp_data,
  // CISC decoders
  output logic              dec_in_valid,
  input  logic              dec_in_ready,
  output fetch_beat_t       dec_in_beat,
  output logic              dec_flush,
  input  logic              dec_out_valid,
  input  fetch_beat_t       dec_out_beat,
  // rename
  output logic              ren_valid,
  output fetch_beat_t       ren_beat,
  // back end: mispredict redirect and commit
  input  logic              rd_valid,
  input  commit_blk_t       rd,
  input  logic              cm_valid,
  output logic              cm_ready,
  input  commit_blk_t       cm,
  input  logic              up_valid,
  output logic              up_ready,
  input  logic [31:0]       up_data,
  input  logic              up_last,
  // commit TLB refill
  output logic              tlb_miss,
  output logic [ADDR_W-PAGE_BITS-1:0] tlb_miss_vpn,
  input  logic              tlb_fill_valid,
  input  logic [ADDR_W-PAGE_BITS-1:0] tlb_fill_vpn,
  input  logic [ADDR_W-PAGE_BITS-1:0] tlb_fill_ppn,
  // L1 miss traffic and the L2 port
  input  logic              icm_req,
  input  addr_t             icm_addr,
  output logic              icm_gnt,
  input  logic              dcm_req,
  input  addr_t             dcm_addr,
  input  logic              dcm_we,
  input  logic [31:0]       dcm_wdata,
  output logic              dcm_gnt,
  output logic              l2_valid,
  input  logic              l2_ready,
  output addr_t             l2_addr,
  output logic              l2_we,
  output logic [31:0]       l2_wdata,
  output l2_src_e           l2_src,
  // status
  output addr_t             dia_ptr,
  output logic [15:0]       dia_flush_count,
  output logic [15:0]       dia_stored_count,
  output logic [31:0]       wb_stall_count
);

  // prediction -> FTQ
  logic       bp_push, ftq_full, ftq_empty, ftq_pop;
  ftq_entry_t bp_entry, ftq_head;

  // commit side
  logic              upd_valid, upd_store, dset_valid;
  commit_blk_t       upd;
  addr_t             dset_start, dset_daddr;
  logic [DLEN_W-1:0] dset_dlen;
  logic              alloc_req, dia_flush;
  logic [DLEN_W-1:0] alloc_bytes;
  addr_t             alloc_addr;
  addr_t             tlb_vaddr, tlb_paddr;
  logic              tlb_hit;
  logic              wb_push, wb_full, wb_empty, wb_gnt;
  addr_t             wb_addr, wb_head_addr;
  logic [31:0]       wb_data, wb_head_data;

  // fetch -> decode
  logic        fe_valid, fe_ready;
  fetch_beat_t fe_beat;

  logic abort;
  assign abort = icache_inval || cfg_we;

  // Front-end flush: a back-end redirect, or a restart after a DIA flush.
  // resume_q describes the last fetch block delivered to rename as if it had
  // been resolved exactly as predicted; redirecting with it repeats the
  // predictor state that followed that block.
  commit_blk_t resume_q, bp_rd;
  logic        fe_flush;
  assign fe_flush = rd_valid || dia_flush;
  assign bp_rd    = rd_valid ? rd : resume_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resume_q           <= '0;
      resume_q.btype     <= BT_JUMP;
      resume_q.next_addr <= RESET_PC;
    end else if (rd_valid) begin
      resume_q <= rd;
    end else if (ren_valid && ren_beat.meta.last) begin
      resume_q           <= '0;
      resume_q.req       <= ren_beat.meta.req;
      resume_q.ft_bytes  <= ren_beat.meta.req.pred.ft_bytes;
      resume_q.btype     <= ren_beat.meta.req.ftb_hit ? ren_beat.meta.req.pred.btype : BT_JUMP;
      resume_q.target    <= ren_beat.meta.req.next_addr;
      resume_q.taken     <= ren_beat.meta.req.taken;
      resume_q.next_addr <= ren_beat.meta.req.next_addr;
    end
  end

  branch_predictor #(
    .FTB_ENTRIES(FTB_ENTRIES), .FTB_WAYS(FTB_WAYS), .N_PERC(N_PERC),
    .IND_ENTRIES(IND_ENTRIES), .RAS_DEPTH(RAS_DEPTH), .RESET_PC(RESET_PC)
  ) u_bp (
    .clk, .rst_n,
    .ftq_push(bp_push), .ftq_entry(bp_entry), .ftq_full,
    .rd_valid(fe_flush), .rd(bp_rd),
    .upd_valid, .upd, .upd_store,
    .dset_valid, .dset_start, .dset_daddr, .dset_dlen,
    .flush_decoded(dia_flush)
  );

  ftq #(.DEPTH(FTQ_DEPTH)) u_ftq (
    .clk, .rst_n, .flush(fe_flush),
    .push(bp_push), .push_entry(bp_entry), .full(ftq_full),
    .pop(ftq_pop), .empty(ftq_empty), .head(ftq_head)
  );

  fetch_unit #(.OUTST(FETCH_OUTST)) u_fetch (
    .clk, .rst_n, .flush(fe_flush),
    .ftq_empty, .ftq_head, .ftq_pop,
    .ic_req_valid, .ic_req_ready, .ic_req_addr, .ic_rsp_valid, .ic_rsp_data,
    .out_valid(fe_valid), .out_ready(fe_ready), .out_beat(fe_beat)
  );

  decode_bypass #(.DEC_STAGES(DEC_STAGES)) u_dec (
    .clk, .rst_n, .flush(fe_flush),
    .in_valid(fe_valid), .in_ready(fe_ready), .in_beat(fe_beat),
    .dec_in_valid, .dec_in_ready, .dec_in_beat, .dec_flush,
    .dec_out_valid, .dec_out_beat,
    .out_valid(ren_valid), .out_beat(ren_beat)
  );

  dia_commit_ctrl u_cc (
    .clk, .rst_n,
    .cm_valid, .cm_ready, .cm, .up_valid, .up_ready, .up_data, .up_last,
    .upd_valid, .upd, .upd_store,
    .dset_valid, .dset_start, .dset_daddr, .dset_dlen,
    .alloc_req, .alloc_bytes, .alloc_addr, .abort,
    .tlb_vaddr, .tlb_hit, .tlb_paddr, .tlb_miss,
    .wb_push, .wb_addr, .wb_data, .wb_full, .wb_empty,
    .stored_count(dia_stored_count)
  );
  assign tlb_miss_vpn = tlb_vaddr[ADDR_W-1:PAGE_BITS];

  dia_pointer #(.DIA_BASE_RESET(DIA_BASE_RESET), .DIA_SIZE_RESET(DIA_SIZE_RESET)) u_ptr (
    .clk, .rst_n, .cfg_we, .cfg_base, .cfg_size,
    .alloc_req, .alloc_bytes, .alloc_addr,
    .inval_req(icache_inval), .flush(dia_flush), .ptr(dia_ptr),
    .flush_count(dia_flush_count)
  );

  commit_tlb #(.ENTRIES(CTLB_ENTRIES)) u_ctlb (
    .clk, .rst_n, .lk_vaddr(tlb_vaddr), .lk_hit(tlb_hit), .lk_paddr(tlb_paddr),
    .fill_valid(tlb_fill_valid), .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn),
    .inv_all(cfg_we)
  );

  dia_write_buffer #(.DEPTH(WB_DEPTH)) u_wb (
    .clk, .rst_n,
    .push(wb_push), .push_addr(wb_addr), .push_data(wb_data), .full(wb_full),
    .pop(wb_gnt), .empty(wb_empty), .head_addr(wb_head_addr), .head_data(wb_head_data)
  );

  l2_arbiter u_arb (
    .clk, .rst_n,
    .ic_req(icm_req), .ic_addr(icm_addr), .ic_gnt(icm_gnt),
    .dc_req(dcm_req), .dc_addr(dcm_addr), .dc_we(dcm_we), .dc_wdata(dcm_wdata), .dc_gnt(dcm_gnt),
    .wb_req(!wb_empty), .wb_addr(wb_head_addr), .wb_wdata(wb_head_data), .wb_gnt,
    .l2_valid, .l2_ready, .l2_addr, .l2_we, .l2_wdata, .l2_src,
    .wb_stall(wb_stall_count)
  );

endmodule
