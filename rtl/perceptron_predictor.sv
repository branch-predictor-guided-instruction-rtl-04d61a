// perceptron_predictor: direction predictor for the conditional branch that
// ends a fetch block.
//
// A table of N_PERC perceptrons, each a bias weight plus one signed weight per
// bit of global history, is indexed by a hash of the fetch block address. The
// output y is the bias plus the weights added or subtracted according to the
// history bits; the branch is predicted taken when y >= 0. Training at commit
// recomputes y from the history the prediction used and, when the prediction
// was wrong or |y| <= THETA, moves each weight one step toward agreement with
// the outcome (saturating). The table size (256) is the architecture's; the
// history length, weight width and threshold (THETA = 1.93*H + 14, the usual
// perceptron rule) are this design's choices.
//
// Timing: prediction is combinational on pc/hist; training takes effect at
// the next clock edge. Weights reset to zero.
module perceptron_predictor
  import dia_pkg::*;
#(
  parameter int unsigned N_PERC   = 256,
  parameter int unsigned HIST     = HIST_LEN,
  parameter int unsigned WEIGHT_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  addr_t           pc,
  input  logic [HIST-1:0] hist,
  output logic            taken,
  input  logic            upd_valid,
  input  addr_t           upd_pc,
  input  logic [HIST-1:0] upd_hist,
  input  logic            upd_taken
);

  localparam int unsigned IDX_W = $clog2(N_PERC);
  localparam int unsigned Y_W   = WEIGHT_W + $clog2(HIST + 1) + 1;
  localparam int          THETA = (193 * HIST) / 100 + 14;
  localparam logic signed [WEIGHT_W-1:0] WMAX = {1'b0, {(WEIGHT_W-1){1'b1}}};
  localparam logic signed [WEIGHT_W-1:0] WMIN = {1'b1, {(WEIGHT_W-1){1'b0}}};

  typedef logic signed [WEIGHT_W-1:0] w_t;
  typedef logic signed [Y_W-1:0]      y_t;

  w_t w_q [N_PERC][HIST+1];  // [i][0] is the bias

  function automatic logic [IDX_W-1:0] index(addr_t a);
    return a[IDX_W-1:0] ^ a[2*IDX_W-1:IDX_W];
  endfunction

  function automatic y_t dot(logic [IDX_W-1:0] i, logic [HIST-1:0] h);
    y_t y;
    y = y_t'(w_q[i][0]);
    for (int k = 0; k < HIST; k++)
      if (h[k]) y = y + y_t'(w_q[i][k+1]);
      else      y = y - y_t'(w_q[i][k+1]);
    return y;
  endfunction

  y_t y_pred, y_upd;
  logic [IDX_W-1:0] ui;
  logic train;

  always_comb begin
    y_pred = dot(index(pc), hist);
    taken  = (y_pred >= 0);
    ui     = index(upd_pc);
    y_upd  = dot(ui, upd_hist);
    train  = ((y_upd >= 0) != upd_taken) ||
             ((y_upd >= 0) ? (y_upd <= y_t'(THETA)) : (-y_upd <= y_t'(THETA)));
  end

  function automatic w_t step(w_t w, logic up);
    if (up) return (w == WMAX) ? w : w + 1'b1;
    else    return (w == WMIN) ? w : w - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PERC; i++)
        for (int k = 0; k <= HIST; k++) w_q[i][k] <= '0;
    end else if (upd_valid && train) begin
      w_q[ui][0] <= step(w_q[ui][0], upd_taken);
      for (int k = 0; k < HIST; k++)
        w_q[ui][k+1] <= step(w_q[ui][k+1], upd_hist[k] == upd_taken);
    end
  end

endmodule
