// dia_commit_ctrl: commit-side control of the Decoded Instruction Area.
//
// When all instructions of a fetch block have committed, the back end offers
// the block (cm_valid/cm_ready, a commit_blk_t) followed by its micro-ops,
// one 4-byte word per beat (up_valid/up_ready/up_last). For every block this
// controller updates the branch predictor in the cycle the block is taken.
// The FTB answers with upd_store when the block's hysteresis counter has
// saturated and no decoded copy is recorded. Only then is the block stored:
//   ALLOC  ask dia_pointer for nuops*4 bytes (this may flush DIA),
//   STREAM translate each word's DIA address in the commit TLB and push the
//          word with its physical address into the write buffer; a TLB miss
//          raises tlb_miss with the page number and waits for the refill, a
//          full write buffer also waits,
//   DSET   once the write buffer is empty, so that every word of the block
//          has reached the L2, write the decoded address and length into the
//          FTB entry and set its decoded-valid bit.
// Blocks that are not stored have their micro-ops consumed and dropped.
// abort (instruction cache invalidation or new DIA registers while a block is
// being stored) cancels the DSET step, so a stale copy is never recorded.
// Micro-ops only reach this point when they commit, so wrong-path work is
// never stored. The word-per-beat stream, the wait for an empty write buffer
// and the state sequence are this design's; the store condition and the order of events follow the
// architecture. stored_count counts blocks recorded in the FTB.
module dia_commit_ctrl
  import dia_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // committed fetch blocks
  input  logic              cm_valid,
  output logic              cm_ready,
  input  commit_blk_t       cm,
  input  logic              up_valid,
  output logic              up_ready,
  input  logic [31:0]       up_data,
  input  logic              up_last,
  // branch predictor update and DIA fields
  output logic              upd_valid,
  output commit_blk_t       upd,
  input  logic              upd_store,
  output logic              dset_valid,
  output addr_t             dset_start,
  output addr_t             dset_daddr,
  output logic [DLEN_W-1:0] dset_dlen,
  // DIA pointer
  output logic              alloc_req,
  output logic [DLEN_W-1:0] alloc_bytes,
  input  addr_t             alloc_addr,
  input  logic              abort,
  // commit TLB
  output addr_t             tlb_vaddr,
  input  logic              tlb_hit,
  input  addr_t             tlb_paddr,
  output logic              tlb_miss,
  // write buffer
  output logic              wb_push,
  output addr_t             wb_addr,
  output logic [31:0]       wb_data,
  input  logic              wb_full,
  input  logic              wb_empty,
  output logic [15:0]       stored_count
);

  typedef enum logic [2:0] {S_IDLE, S_ALLOC, S_STREAM, S_DSET, S_DROP} state_e;

  state_e            st_q;
  addr_t             start_q, base_q;
  logic [DLEN_W-1:0] dlen_q;
  logic [5:0]        cnt_q;
  logic              abort_q;
  logic [15:0]       stored_q;

  logic [DLEN_W-1:0] cm_dlen;
  assign cm_dlen = DLEN_W'(cm.nuops) * DLEN_W'(UOP_BYTES);

  assign cm_ready  = (st_q == S_IDLE);
  assign upd_valid = cm_valid && cm_ready;
  assign upd       = cm;

  assign alloc_req   = (st_q == S_ALLOC);
  assign alloc_bytes = dlen_q;

  assign tlb_vaddr = base_q + addr_t'({cnt_q, 2'b00});
  assign tlb_miss  = (st_q == S_STREAM) && !tlb_hit;

  logic put;
  assign put      = (st_q == S_STREAM) && tlb_hit && up_valid && !wb_full;
  assign wb_push  = put;
  assign wb_addr  = tlb_paddr;
  assign wb_data  = up_data;
  assign up_ready = put || (st_q == S_DROP);

  assign dset_valid = (st_q == S_DSET) && wb_empty && !abort_q && !abort;
  assign dset_start = start_q;
  assign dset_daddr = base_q;
  assign dset_dlen  = dlen_q;
  assign stored_count = stored_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      start_q  <= '0;
      base_q   <= '0;
      dlen_q   <= '0;
      cnt_q    <= '0;
      abort_q  <= 1'b0;
      stored_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (cm_valid) begin
          start_q <= cm.req.fetch_addr;
          dlen_q  <= cm_dlen;
          abort_q <= 1'b0;
          st_q    <= (upd_store && cm.nuops != '0) ? S_ALLOC : S_DROP;
        end
        S_ALLOC: begin
          base_q  <= alloc_addr;
          cnt_q   <= '0;
          abort_q <= abort_q || abort;
          st_q    <= S_STREAM;
        end
        S_STREAM: begin
          abort_q <= abort_q || abort;
          if (put) begin
            cnt_q <= cnt_q + 1'b1;
            if (up_last) st_q <= S_DSET;
          end
        end
        S_DSET: begin
          abort_q <= abort_q || abort;
          if (dset_valid) stored_q <= stored_q + 1'b1;
          if (wb_empty || abort_q || abort) st_q <= S_IDLE;
        end
        S_DROP: if (up_valid && up_last) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
