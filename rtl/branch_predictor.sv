// branch_predictor: the FTB prediction engine with its DIA extension.
//
// Holds the fetch address register and the speculative global history, path
// history and RAS pointer. Every cycle in which the FTQ has room it looks the
// fetch address up in the FTB, the perceptron, the indirect predictor and the
// RAS in parallel, lets next_address_logic choose the next fetch address and
// pushes one request into the FTQ. The request carries the FTB's decoded
// fields, so fetch knows whether a decoded copy of the block exists in DIA.
// Prediction takes one cycle per fetch block; the 3-cycle table latency and
// the overriding predictor that hides it are not modelled.
//
// Redirect (rd_valid, from the back end on a mispredict): the fetch address
// becomes the actual next address and the histories and RAS pointer are
// rebuilt from the snapshot stored in the mispredicted request plus the
// actual outcome. No request is pushed in that cycle.
//
// Commit update (upd_valid): the FTB is updated with the committed block
// (which returns upd_store, see ftb), the perceptron is trained for
// conditional blocks and the indirect predictor for indirect ones, using the
// histories recorded at prediction time. dset_* and flush_decoded go to the
// FTB's DIA fields. Every committed block trains the FTB; the architecture
// updates the predictor at commit, and which blocks qualify is this design's
// choice.
module branch_predictor
  import dia_pkg::*;
#(
  parameter int unsigned FTB_ENTRIES = 2048,
  parameter int unsigned FTB_WAYS    = 4,
  parameter int unsigned N_PERC      = 256,
  parameter int unsigned IND_ENTRIES = 2048,
  parameter int unsigned RAS_DEPTH   = 32,
  parameter addr_t       RESET_PC    = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // to the FTQ
  output logic              ftq_push,
  output ftq_entry_t        ftq_entry,
  input  logic              ftq_full,
  // redirect
  input  logic              rd_valid,
  input  commit_blk_t       rd,
  // commit update
  input  logic              upd_valid,
  input  commit_blk_t       upd,
  output logic              upd_store,
  // DIA fields of the FTB
  input  logic              dset_valid,
  input  addr_t             dset_start,
  input  addr_t             dset_daddr,
  input  logic [DLEN_W-1:0] dset_dlen,
  input  logic              flush_decoded
);

  addr_t               pc_q;
  logic [HIST_LEN-1:0] hist_q;
  logic [PATH_W-1:0]   path_q;

  logic       ftb_hit;
  ftb_pred_t  ent;
  logic       cond_taken, ind_hit;
  addr_t      ind_target, ras_top, next_addr, ras_push_addr;
  logic       taken, ras_push_p, ras_pop_p;
  logic [RAS_PTR_W-1:0] ras_ptr;
  ftb_upd_t   fu;

  assign fu = '{start: upd.req.fetch_addr, fblen: upd.fblen, ft_bytes: upd.ft_bytes,
                btype: upd.btype, target: upd.target};

  ftb #(.ENTRIES(FTB_ENTRIES), .WAYS(FTB_WAYS)) u_ftb (
    .clk, .rst_n,
    .lk_addr(pc_q), .lk_hit(ftb_hit), .lk_ent(ent),
    .upd_valid, .upd(fu), .upd_store,
    .dset_valid, .dset_start, .dset_daddr, .dset_dlen,
    .flush_decoded
  );

  perceptron_predictor #(.N_PERC(N_PERC)) u_perc (
    .clk, .rst_n,
    .pc(pc_q), .hist(hist_q), .taken(cond_taken),
    .upd_valid(upd_valid && upd.btype == BT_COND),
    .upd_pc(upd.req.fetch_addr), .upd_hist(upd.req.snap.hist), .upd_taken(upd.taken)
  );

  indirect_predictor #(.ENTRIES(IND_ENTRIES)) u_ind (
    .clk, .rst_n,
    .pc(pc_q), .path(path_q), .hit(ind_hit), .target(ind_target),
    .upd_valid(upd_valid && (upd.btype == BT_IND || upd.btype == BT_INDCALL)),
    .upd_pc(upd.req.fetch_addr), .upd_path(upd.req.snap.path), .upd_target(upd.target)
  );

  next_address_logic u_nal (
    .fetch_addr(pc_q), .ftb_hit, .ent, .cond_taken, .ras_top,
    .ind_hit, .ind_target, .next_addr, .taken,
    .ras_push(ras_push_p), .ras_push_addr, .ras_pop(ras_pop_p)
  );

  // RAS: predicted push/pop, or repair on a redirect
  logic  go;
  logic  r_push, r_pop;
  addr_t r_push_addr;
  assign go = !rd_valid && !ftq_full;
  always_comb begin
    if (rd_valid) begin
      r_push      = (rd.btype == BT_CALL || rd.btype == BT_INDCALL);
      r_pop       = (rd.btype == BT_RET);
      r_push_addr = fall_through(rd.req.fetch_addr, rd.ft_bytes);
    end else begin
      r_push      = go && ras_push_p;
      r_pop       = go && ras_pop_p;
      r_push_addr = ras_push_addr;
    end
  end

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push(r_push), .push_addr(r_push_addr), .pop(r_pop),
    .top(ras_top), .ptr(ras_ptr),
    .restore(rd_valid), .restore_ptr(rd.req.snap.ras_ptr)
  );

  assign ftq_push  = go;
  assign ftq_entry = '{fetch_addr: pc_q, ftb_hit: ftb_hit, pred: ent, taken: taken,
                       next_addr: next_addr,
                       snap: '{hist: hist_q, path: path_q, ras_ptr: ras_ptr}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q   <= RESET_PC;
      hist_q <= '0;
      path_q <= '0;
    end else if (rd_valid) begin
      pc_q   <= rd.next_addr;
      hist_q <= next_hist(rd.req.snap.hist, rd.btype, rd.taken);
      path_q <= next_path(rd.req.snap.path, rd.taken, rd.next_addr);
    end else if (go) begin
      pc_q   <= next_addr;
      hist_q <= ftb_hit ? next_hist(hist_q, ent.btype, taken) : hist_q;
      path_q <= next_path(path_q, taken, next_addr);
    end
  end

endmodule
