// ras: Return Address Stack for returns that end a fetch block.
//
// A circular stack of DEPTH return addresses (32, as the architecture sizes
// it). A call pushes its fall-through address, a return pops and its
// predicted target is the entry on top. The stack pointer is speculative: the
// branch predictor records it with every prediction, and on a mispredict
// 'restore' puts back the recorded pointer (entries overwritten on the wrong
// path are not repaired). Overflow wraps and overwrites the oldest entry.
// Recovery and overflow behaviour are this design's choices.
//
// Timing: 'top' is combinational; push, pop and restore act at the clock
// edge. A push and a pop in one cycle replace the top.
module ras
  import dia_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  addr_t                push_addr,
  input  logic                 pop,
  output addr_t                top,
  output logic [RAS_PTR_W-1:0] ptr,
  input  logic                 restore,
  input  logic [RAS_PTR_W-1:0] restore_ptr
);

  localparam int unsigned PW = $clog2(DEPTH);

  addr_t         stk_q [DEPTH];
  logic [PW-1:0] tos_q;   // index of the top entry

  assign top = stk_q[tos_q];
  assign ptr = RAS_PTR_W'(tos_q);

  // 'restore' first puts back the recorded pointer; a push or pop in the
  // same cycle then applies on top of it (repair of a mispredicted call or
  // return).
  logic [PW-1:0] base;
  assign base = restore ? PW'(restore_ptr) : tos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos_q <= '0;
      for (int i = 0; i < DEPTH; i++) stk_q[i] <= '0;
    end else if (push && pop) begin
      stk_q[base] <= push_addr;
      tos_q       <= base;
    end else if (push) begin
      stk_q[base + 1'b1] <= push_addr;
      tos_q <= base + 1'b1;
    end else if (pop) begin
      tos_q <= base - 1'b1;
    end else begin
      tos_q <= base;
    end
  end

endmodule
