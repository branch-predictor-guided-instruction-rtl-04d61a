// dia_pkg: types and constants shared by the FTB-DIA front end.
//
// The front end predicts fetch blocks with a Fetch Target Buffer (FTB) and,
// once a fetch block is hot, keeps a decoded copy of it in the Decoded
// Instruction Area (DIA), an ordinary region of the program's virtual memory.
// The FTB entry then also records where that decoded copy lives, so fetch can
// read micro-ops instead of x86 bytes and skip the CISC decoders.
//
// Field widths that the architecture leaves open (fetch block length,
// fall-through size, decoded length, history lengths) are this design's
// choices and are collected here. Micro-ops are 4 bytes, pages are 8 KB.
package dia_pkg;

  parameter int unsigned ADDR_W    = 32;  // virtual and physical address width
  parameter int unsigned FBLEN_W   = 5;   // fetch block length, in instructions
  parameter int unsigned FTB_W     = 8;   // fall-through distance, in bytes
  parameter int unsigned DLEN_W    = 8;   // decoded block length, in bytes
  parameter int unsigned UOP_BYTES = 4;   // every micro-op is 4 bytes
  parameter int unsigned HIST_LEN  = 16;  // perceptron global history
  parameter int unsigned PATH_W    = 16;  // indirect predictor path history
  parameter int unsigned RAS_PTR_W = 5;   // 32-entry return address stack
  parameter int unsigned PAGE_BITS = 13;  // 8 KB pages
  parameter int unsigned LINE_BYTES = 32; // instruction cache line
  parameter int unsigned LINE_W    = LINE_BYTES * 8;

  typedef logic [ADDR_W-1:0] addr_t;

  // Type of the branch that ends a fetch block.
  typedef enum logic [2:0] {
    BT_COND    = 3'd0,  // conditional: direction from the perceptron
    BT_JUMP    = 3'd1,  // direct unconditional jump
    BT_CALL    = 3'd2,  // direct call: pushes the return address
    BT_RET     = 3'd3,  // return: target from the RAS
    BT_IND     = 3'd4,  // indirect jump: target from the indirect predictor
    BT_INDCALL = 3'd5   // indirect call: indirect predictor and RAS push
  } br_type_e;

  // What the FTB returns for a fetch address.
  typedef struct packed {
    logic [FBLEN_W-1:0] fblen;    // instructions in the fetch block
    logic [FTB_W-1:0]   ft_bytes; // bytes from start to the fall-through
    br_type_e           btype;
    addr_t              target;   // taken target of the final branch
    logic               dvalid;   // decoded copy present in DIA
    addr_t              daddr;    // virtual address of the decoded copy
    logic [DLEN_W-1:0]  dlen;     // its length in bytes
  } ftb_pred_t;

  // A fetch block as seen at commit, used to train the FTB.
  typedef struct packed {
    addr_t              start;
    logic [FBLEN_W-1:0] fblen;
    logic [FTB_W-1:0]   ft_bytes;
    br_type_e           btype;
    addr_t              target;
  } ftb_upd_t;

  // Speculative predictor state captured with each prediction.
  typedef struct packed {
    logic [HIST_LEN-1:0]  hist;
    logic [PATH_W-1:0]    path;
    logic [RAS_PTR_W-1:0] ras_ptr;
  } pred_snap_t;

  // One Fetch Target Queue entry.
  typedef struct packed {
    addr_t      fetch_addr;
    logic       ftb_hit;
    ftb_pred_t  pred;
    logic       taken;      // predicted direction of the final branch
    addr_t      next_addr;  // predicted start of the next fetch block
    pred_snap_t snap;
  } ftq_entry_t;

  // Committed fetch block: the request it was fetched with and what really
  // happened. Also used for mispredict redirects.
  typedef struct packed {
    ftq_entry_t         req;
    logic [FBLEN_W-1:0] fblen;
    logic [FTB_W-1:0]   ft_bytes;
    br_type_e           btype;
    addr_t              target;    // target of the final branch
    logic               taken;     // actual direction
    addr_t              next_addr; // actual next fetch block start
    logic [5:0]         nuops;     // micro-ops in the block (1..63)
  } commit_blk_t;

  // One instruction cache line travelling from fetch through decode.
  typedef struct packed {
    ftq_entry_t        req;
    logic              decoded;   // read from DIA: bypass the CISC decoders
    addr_t             addr;      // first byte of this beat
    logic [5:0]        nbytes;    // valid bytes in this beat
    logic              last;      // last beat of the fetch block
  } fetch_meta_t;

  typedef struct packed {
    fetch_meta_t       meta;
    logic [LINE_W-1:0] data;
  } fetch_beat_t;

  // Source of an L2 access.
  typedef enum logic [1:0] {
    L2_NONE = 2'd0, L2_ICACHE = 2'd1, L2_DCACHE = 2'd2, L2_DIA_WB = 2'd3
  } l2_src_e;

  // Fall-through address of a fetch block.
  function automatic addr_t fall_through(addr_t start, logic [FTB_W-1:0] ft);
    return start + addr_t'(ft);
  endfunction

  // Global history after a fetch block (only conditionals shift it in).
  function automatic logic [HIST_LEN-1:0] next_hist(logic [HIST_LEN-1:0] h,
                                                    br_type_e bt, logic taken);
    return (bt == BT_COND) ? {h[HIST_LEN-2:0], taken} : h;
  endfunction

  // Path history after a fetch block: folds in the target of every taken block.
  function automatic logic [PATH_W-1:0] next_path(logic [PATH_W-1:0] p,
                                                  logic taken, addr_t nxt);
    return taken ? ({p[PATH_W-3:0], 2'b00} ^ nxt[PATH_W+1:2]) : p;
  endfunction

endpackage
