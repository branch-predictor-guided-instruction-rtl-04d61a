// l2_arbiter: arbiter of the single L2 access port.
//
// The L2 has one port, shared by the instruction cache, the data cache and
// the decoded-block write buffer. Instruction and data accesses always win
// over writes of decoded blocks, which use the port only when it is free.
// Between the two caches the instruction cache is served first; that order is
// this design's choice.
//
// Interface: each requester holds *_req until its *_gnt; l2_valid/l2_ready is
// the port, carrying address, write enable, a 32-bit write word and the
// source. Grants are combinational and coincide with l2_valid && l2_ready.
// wb_stall counts cycles in which the write buffer wanted the port but a
// cache had it.
module l2_arbiter
  import dia_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ic_req,
  input  addr_t       ic_addr,
  output logic        ic_gnt,
  input  logic        dc_req,
  input  addr_t       dc_addr,
  input  logic        dc_we,
  input  logic [31:0] dc_wdata,
  output logic        dc_gnt,
  input  logic        wb_req,
  input  addr_t       wb_addr,
  input  logic [31:0] wb_wdata,
  output logic        wb_gnt,
  output logic        l2_valid,
  input  logic        l2_ready,
  output addr_t       l2_addr,
  output logic        l2_we,
  output logic [31:0] l2_wdata,
  output l2_src_e     l2_src,
  output logic [31:0] wb_stall
);

  always_comb begin
    l2_valid = ic_req || dc_req || wb_req;
    l2_addr  = '0;
    l2_we    = 1'b0;
    l2_wdata = '0;
    l2_src   = L2_NONE;
    if (ic_req) begin
      l2_addr = ic_addr; l2_src = L2_ICACHE;
    end else if (dc_req) begin
      l2_addr = dc_addr; l2_we = dc_we; l2_wdata = dc_wdata; l2_src = L2_DCACHE;
    end else if (wb_req) begin
      l2_addr = wb_addr; l2_we = 1'b1; l2_wdata = wb_wdata; l2_src = L2_DIA_WB;
    end
    ic_gnt = l2_ready && l2_src == L2_ICACHE;
    dc_gnt = l2_ready && l2_src == L2_DCACHE;
    wb_gnt = l2_ready && l2_src == L2_DIA_WB;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_stall <= '0;
    else if (wb_req && (ic_req || dc_req)) wb_stall <= wb_stall + 1'b1;
  end

  a_wb_last: assert property (@(posedge clk) disable iff (!rst_n)
    wb_gnt |-> !ic_req && !dc_req);

endmodule
