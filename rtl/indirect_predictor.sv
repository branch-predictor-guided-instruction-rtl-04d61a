// indirect_predictor: target predictor for the indirect branch that ends a
// fetch block.
//
// A set-associative table (2048 entries, 4 ways, as the architecture sizes
// it) indexed by the fetch block address XOR a path history of recent taken
// targets, so that one indirect branch can hold different targets for
// different paths. Each way holds a partial tag of the address and a full
// target. The hashing (a plain XOR, not the original depth-older-last-current
// scheme), the tag width and round-robin replacement are this design's.
//
// Lookup is combinational. Training at commit writes the actual target into
// the matching way, or into a free way, or into the round-robin victim.
module indirect_predictor
  import dia_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned TAG_W   = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             pc,
  input  logic [PATH_W-1:0] path,
  output logic              hit,
  output addr_t             target,
  input  logic              upd_valid,
  input  addr_t             upd_pc,
  input  logic [PATH_W-1:0] upd_path,
  input  addr_t             upd_target
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  tag_t  tag_q [WAYS][SETS];
  addr_t tgt_q [WAYS][SETS];
  logic  vld_q [WAYS][SETS];
  logic [WAY_W-1:0] rr_q;

  function automatic idx_t index(addr_t a, logic [PATH_W-1:0] p);
    return a[IDX_W-1:0] ^ IDX_W'(p);
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[IDX_W +: TAG_W];
  endfunction

  always_comb begin
    idx_t i;
    i      = index(pc, path);
    hit    = 1'b0;
    target = '0;
    for (int w = 0; w < WAYS; w++)
      if (!hit && vld_q[w][i] && tag_q[w][i] == tag_of(pc)) begin
        hit = 1'b1; target = tgt_q[w][i];
      end
  end

  idx_t ui;
  logic [WAY_W-1:0] usel;
  always_comb begin
    logic found;
    ui    = index(upd_pc, upd_path);
    found = 1'b0;
    usel  = rr_q;
    for (int w = 0; w < WAYS; w++)
      if (!found && vld_q[w][ui] && tag_q[w][ui] == tag_of(upd_pc)) begin
        found = 1'b1; usel = WAY_W'(w);
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && !vld_q[w][ui]) begin
        found = 1'b1; usel = WAY_W'(w);
      end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      tag_q[usel][ui] <= tag_of(upd_pc);
      tgt_q[usel][ui] <= upd_target;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) vld_q[w][s] <= 1'b0;
    end else if (upd_valid) begin
      vld_q[usel][ui] <= 1'b1;
      rr_q <= rr_q + 1'b1;
    end
  end

endmodule
