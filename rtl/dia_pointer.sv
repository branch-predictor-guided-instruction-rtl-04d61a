// dia_pointer: management of the Decoded Instruction Area.
//
// The operating system allocates DIA as a range of the program's virtual
// memory and tells the processor where it is through two special-purpose
// registers, base and size (written with cfg_we). The DIA pointer marks the
// first free byte; decoded fetch blocks are placed one after another in the
// order they are stored, and the pointer only moves forward.
//
// Allocation (alloc_req, alloc_bytes): when the block fits below base+size it
// is placed at the pointer and the pointer advances past it. When it does not
// fit, DIA is flushed: the pointer returns to base, 'flush' pulses so that
// every decoded-valid bit in the FTB is cleared, and the block is placed at
// base. inval_req (instruction cache invalidation, e.g. self-modifying code)
// flushes DIA the same way without allocating. Memory contents are never
// touched by a flush. alloc_addr is combinational in the request cycle; the
// pointer and 'flush' update at the clock edge, so flush is a one-cycle pulse
// in the cycle after the cause. Flushing only when a block does not fit is
// this design's reading of "the pointer reaches the end". flush_count counts
// flushes for monitoring.
module dia_pointer
  import dia_pkg::*;
#(
  parameter addr_t DIA_BASE_RESET = addr_t'(32'h4000_0000),
  parameter addr_t DIA_SIZE_RESET = addr_t'(65536)
) (
  input  logic              clk,
  input  logic              rst_n,
  // special-purpose registers
  input  logic              cfg_we,
  input  addr_t             cfg_base,
  input  addr_t             cfg_size,
  // allocation
  input  logic              alloc_req,
  input  logic [DLEN_W-1:0] alloc_bytes,
  output addr_t             alloc_addr,
  // flush
  input  logic              inval_req,
  output logic              flush,
  output addr_t             ptr,
  output logic [15:0]       flush_count
);

  addr_t base_q, size_q, ptr_q;
  logic  flush_q;
  logic [15:0] fcnt_q;

  logic  fits;
  assign fits       = (ptr_q - base_q) + addr_t'(alloc_bytes) <= size_q;
  assign alloc_addr = fits ? ptr_q : base_q;
  assign flush      = flush_q;
  assign ptr        = ptr_q;
  assign flush_count = fcnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q  <= DIA_BASE_RESET;
      size_q  <= DIA_SIZE_RESET;
      ptr_q   <= DIA_BASE_RESET;
      flush_q <= 1'b0;
      fcnt_q  <= '0;
    end else if (cfg_we) begin
      // new area: everything stored so far is stale
      base_q  <= cfg_base;
      size_q  <= cfg_size;
      ptr_q   <= cfg_base;
      flush_q <= 1'b1;
      fcnt_q  <= fcnt_q + 1'b1;
    end else if (inval_req) begin
      ptr_q   <= base_q;
      flush_q <= 1'b1;
      fcnt_q  <= fcnt_q + 1'b1;
    end else if (alloc_req) begin
      ptr_q   <= alloc_addr + addr_t'(alloc_bytes);
      flush_q <= !fits;
      if (!fits) fcnt_q <= fcnt_q + 1'b1;
    end else begin
      flush_q <= 1'b0;
    end
  end

endmodule
