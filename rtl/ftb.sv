// ftb: Fetch Target Buffer extended with the Decoded Instruction Area fields.
//
// Each entry describes one fetch block: tag (its start address), length in
// instructions, fall-through distance in bytes, type and target of the final
// branch, a hysteresis counter, and the DIA fields: decoded address, decoded
// length in bytes and a decoded-valid bit. The architecture fixes the entry
// fields, the 2048-entry 4-way organisation, the 4-bit hysteresis counter and
// its rules; the fall-through byte distance, the branch type encoding and the
// way choice on a miss are this design's.
//
// Lookup (combinational): lk_addr selects a set; a valid way whose tag
// matches gives lk_hit and lk_ent. The prediction is available in the same
// cycle.
//
// Update (upd_valid, one cycle, at commit): the selected way is the matching
// way, else the first invalid way, else the way with the lowest counter.
//  * same block stored there: counter +1 (saturating). If the counter is then
//    at its maximum and the decoded copy is not valid, upd_store asks the
//    commit side to put the decoded block into DIA.
//  * different block: counter -1; if it reaches zero the entry is replaced by
//    the new block with counter 1 and decoded-valid cleared, else the new
//    data is dropped. An empty way is filled with counter 1.
// upd_store is combinational on the update inputs.
//
// Decoded set (dset_valid): when the entry for dset_start is still present,
// its decoded address and length are written and decoded-valid is set.
// flush_decoded clears every decoded-valid bit in one cycle (DIA flush); it
// wins over a decoded set in the same cycle.
module ftb
  import dia_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned HYST_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction lookup
  input  addr_t             lk_addr,
  output logic              lk_hit,
  output ftb_pred_t         lk_ent,
  // commit update
  input  logic              upd_valid,
  input  ftb_upd_t          upd,
  output logic              upd_store,
  // decoded fetch block recorded
  input  logic              dset_valid,
  input  addr_t             dset_start,
  input  addr_t             dset_daddr,
  input  logic [DLEN_W-1:0] dset_dlen,
  // DIA flush
  input  logic              flush_decoded
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam logic [HYST_W-1:0] HMAX = '1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  // Prediction fields, written only by the commit update.
  typedef struct packed {
    tag_t               tag;
    logic [FBLEN_W-1:0] fblen;
    logic [FTB_W-1:0]   ft_bytes;
    br_type_e           btype;
    addr_t              target;
    logic [HYST_W-1:0]  hyst;
  } line_t;

  // Decoded-copy fields, written only by the decoded set.
  typedef struct packed {
    addr_t             daddr;
    logic [DLEN_W-1:0] dlen;
  } dline_t;

  line_t  line_q  [WAYS][SETS];
  dline_t dline_q [WAYS][SETS];
  logic   vld_q   [WAYS][SETS];
  logic   dvld_q  [WAYS][SETS];

  function automatic idx_t idx_of(addr_t a);
    return a[IDX_W-1:0];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1:IDX_W];
  endfunction

  // ---------------- lookup ----------------
  always_comb begin
    idx_t li;
    li     = idx_of(lk_addr);
    lk_hit = 1'b0;
    lk_ent = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_hit && vld_q[w][li] && line_q[w][li].tag == tag_of(lk_addr)) begin
        lk_hit          = 1'b1;
        lk_ent.fblen    = line_q[w][li].fblen;
        lk_ent.ft_bytes = line_q[w][li].ft_bytes;
        lk_ent.btype    = line_q[w][li].btype;
        lk_ent.target   = line_q[w][li].target;
        lk_ent.dvalid   = dvld_q[w][li];
        lk_ent.daddr    = dline_q[w][li].daddr;
        lk_ent.dlen     = dline_q[w][li].dlen;
      end
    end
  end

  // ---------------- update ----------------
  idx_t              ui;
  logic [WAY_W-1:0]  usel;
  logic              u_tag_hit, u_empty, u_same, u_write, u_clear_dv;
  line_t             u_old, u_new;

  always_comb begin
    logic found;
    logic [HYST_W-1:0] minh;
    ui        = idx_of(upd.start);
    minh      = HMAX;
    usel      = '0;
    u_tag_hit = 1'b0;
    u_empty   = 1'b0;
    found     = 1'b0;
    // matching way
    for (int w = 0; w < WAYS; w++)
      if (!found && vld_q[w][ui] && line_q[w][ui].tag == tag_of(upd.start)) begin
        found = 1'b1; u_tag_hit = 1'b1; usel = WAY_W'(w);
      end
    // else an empty way
    for (int w = 0; w < WAYS; w++)
      if (!found && !vld_q[w][ui]) begin
        found = 1'b1; u_empty = 1'b1; usel = WAY_W'(w);
      end
    // else the way with the weakest counter
    if (!found) begin
      minh = HMAX;
      for (int w = 0; w < WAYS; w++)
        if (!found || line_q[w][ui].hyst < minh) begin
          found = 1'b1; minh = line_q[w][ui].hyst; usel = WAY_W'(w);
        end
    end
    u_old  = line_q[usel][ui];
    u_same = u_tag_hit && u_old.fblen == upd.fblen && u_old.ft_bytes == upd.ft_bytes &&
             u_old.btype == upd.btype && u_old.target == upd.target;

    u_new          = u_old;
    u_write        = 1'b0;
    u_clear_dv     = 1'b0;
    upd_store      = 1'b0;
    if (u_empty) begin
      u_new      = '{tag: tag_of(upd.start), fblen: upd.fblen, ft_bytes: upd.ft_bytes,
                     btype: upd.btype, target: upd.target, hyst: HYST_W'(1)};
      u_write    = 1'b1;
      u_clear_dv = 1'b1;
    end else if (u_same) begin
      if (u_old.hyst != HMAX) u_new.hyst = u_old.hyst + 1'b1;
      u_write   = 1'b1;
      upd_store = upd_valid && (u_new.hyst == HMAX) && !dvld_q[usel][ui];
    end else begin
      if (u_old.hyst <= HYST_W'(1)) begin
        u_new      = '{tag: tag_of(upd.start), fblen: upd.fblen, ft_bytes: upd.ft_bytes,
                       btype: upd.btype, target: upd.target, hyst: HYST_W'(1)};
        u_clear_dv = 1'b1;
      end else begin
        u_new.hyst = u_old.hyst - 1'b1;
      end
      u_write = 1'b1;
    end
  end

  // decoded set: find the entry of dset_start
  idx_t             di;
  logic             d_hit;
  logic [WAY_W-1:0] dsel;
  always_comb begin
    di    = idx_of(dset_start);
    d_hit = 1'b0;
    dsel  = '0;
    for (int w = 0; w < WAYS; w++)
      if (!d_hit && vld_q[w][di] && line_q[w][di].tag == tag_of(dset_start)) begin
        d_hit = 1'b1; dsel = WAY_W'(w);
      end
  end

  // storage arrays (no reset; guarded by the valid bits)
  always_ff @(posedge clk) begin
    if (upd_valid && u_write) line_q[usel][ui] <= u_new;
    if (dset_valid && d_hit)  dline_q[dsel][di] <= '{daddr: dset_daddr, dlen: dset_dlen};
  end

  // valid and decoded-valid bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) begin
          vld_q[w][s]  <= 1'b0;
          dvld_q[w][s] <= 1'b0;
        end
    end else begin
      if (upd_valid && u_write) vld_q[usel][ui] <= 1'b1;
      if (flush_decoded) begin
        for (int w = 0; w < WAYS; w++)
          for (int s = 0; s < SETS; s++) dvld_q[w][s] <= 1'b0;
      end else begin
        if (upd_valid && u_clear_dv) dvld_q[usel][ui] <= 1'b0;
        if (dset_valid && d_hit)     dvld_q[dsel][di] <= 1'b1;
      end
    end
  end

endmodule
