// commit_tlb: small TLB in the commit stage.
//
// Decoded fetch blocks are written to DIA at commit, and DIA is ordinary
// paged virtual memory, so their addresses must be translated. Instead of
// routing commit-stage requests to the instruction TLB, a small fully
// associative TLB (8 entries, 8 KB pages, as the architecture sizes it) sits
// next to commit; DIA spans only a few pages, so it rarely misses.
//
// Lookup is combinational: lk_vaddr gives lk_hit and lk_paddr (physical page
// from the matching entry, page offset passed through). On a miss the user
// fetches the translation elsewhere (page walker or instruction TLB, outside
// this design) and writes it with fill_valid; the entry replaced is an empty
// one if any, else the round-robin victim. inv_all empties the TLB. The
// replacement policy and fill interface are this design's choices.
module commit_tlb
  import dia_pkg::*;
#(
  parameter int unsigned ENTRIES   = 8,
  parameter int unsigned PAGE_BITS_P = PAGE_BITS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t lk_vaddr,
  output logic  lk_hit,
  output addr_t lk_paddr,
  input  logic  fill_valid,
  input  logic [ADDR_W-PAGE_BITS_P-1:0] fill_vpn,
  input  logic [ADDR_W-PAGE_BITS_P-1:0] fill_ppn,
  input  logic  inv_all
);

  localparam int unsigned PN_W = ADDR_W - PAGE_BITS_P;
  localparam int unsigned EW   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef logic [PN_W-1:0] pn_t;

  pn_t  vpn_q [ENTRIES];
  pn_t  ppn_q [ENTRIES];
  logic vld_q [ENTRIES];
  logic [EW-1:0] rr_q;

  always_comb begin
    lk_hit   = 1'b0;
    lk_paddr = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (!lk_hit && vld_q[e] && vpn_q[e] == lk_vaddr[ADDR_W-1:PAGE_BITS_P]) begin
        lk_hit   = 1'b1;
        lk_paddr = {ppn_q[e], lk_vaddr[PAGE_BITS_P-1:0]};
      end
  end

  logic [EW-1:0] fsel;
  always_comb begin
    logic found;
    found = 1'b0;
    fsel  = rr_q;
    for (int e = 0; e < ENTRIES; e++)
      if (!found && vld_q[e] && vpn_q[e] == fill_vpn) begin
        found = 1'b1; fsel = EW'(e);
      end
    for (int e = 0; e < ENTRIES; e++)
      if (!found && !vld_q[e]) begin
        found = 1'b1; fsel = EW'(e);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        vld_q[e] <= 1'b0; vpn_q[e] <= '0; ppn_q[e] <= '0;
      end
    end else if (inv_all) begin
      for (int e = 0; e < ENTRIES; e++) vld_q[e] <= 1'b0;
    end else if (fill_valid) begin
      vld_q[fsel] <= 1'b1;
      vpn_q[fsel] <= fill_vpn;
      ppn_q[fsel] <= fill_ppn;
      rr_q        <= rr_q + 1'b1;
    end
  end

endmodule
