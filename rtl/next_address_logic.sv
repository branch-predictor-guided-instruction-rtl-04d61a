// next_address_logic: picks the start address of the next fetch block.
//
// On an FTB hit the type of the branch that ends the block decides:
//   conditional   - perceptron taken ? FTB target : fall-through
//   jump          - FTB target
//   call          - FTB target, push the fall-through on the RAS
//   return        - RAS top, pop
//   indirect      - indirect predictor target on a hit, else FTB target
//   indirect call - as indirect, and push the fall-through
// The fall-through is the start plus the entry's fall-through byte distance.
// On an FTB miss fetch continues sequentially at the next MISS_STEP-byte
// boundary, treating the block as not taken. The selection rule follows the
// FTB architecture; the miss step is this design's choice.
// Purely combinational.
module next_address_logic
  import dia_pkg::*;
#(
  parameter int unsigned MISS_STEP = LINE_BYTES
) (
  input  addr_t     fetch_addr,
  input  logic      ftb_hit,
  input  ftb_pred_t ent,
  input  logic      cond_taken,
  input  addr_t     ras_top,
  input  logic      ind_hit,
  input  addr_t     ind_target,
  output addr_t     next_addr,
  output logic      taken,
  output logic      ras_push,
  output addr_t     ras_push_addr,
  output logic      ras_pop
);

  addr_t ft;
  assign ft            = fall_through(fetch_addr, ent.ft_bytes);
  assign ras_push_addr = ft;

  always_comb begin
    next_addr = ft;
    taken     = 1'b0;
    ras_push  = 1'b0;
    ras_pop   = 1'b0;
    if (!ftb_hit) begin
      next_addr = (fetch_addr & ~addr_t'(MISS_STEP - 1)) + addr_t'(MISS_STEP);
    end else begin
      unique case (ent.btype)
        BT_COND: begin
          taken     = cond_taken;
          next_addr = cond_taken ? ent.target : ft;
        end
        BT_JUMP: begin
          taken = 1'b1; next_addr = ent.target;
        end
        BT_CALL: begin
          taken = 1'b1; next_addr = ent.target; ras_push = 1'b1;
        end
        BT_RET: begin
          taken = 1'b1; next_addr = ras_top; ras_pop = 1'b1;
        end
        BT_IND: begin
          taken = 1'b1; next_addr = ind_hit ? ind_target : ent.target;
        end
        BT_INDCALL: begin
          taken = 1'b1; next_addr = ind_hit ? ind_target : ent.target; ras_push = 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
