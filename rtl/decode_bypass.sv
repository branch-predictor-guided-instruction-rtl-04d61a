// decode_bypass: fast path / slow path split in front of rename.
//
// Beats fetched from the decoded area already hold micro-ops and take the
// fast path: DEC_STAGES register stages that do no decoding but keep the same
// depth as the decoders, so signals can still be driven across the decode
// stages. Beats of original x86 bytes take the slow path through the CISC
// decoders, which sit outside this module (dec_* ports). Both paths need
// DEC_STAGES (3) cycles; the decoders may take longer when they stall.
//
// Ordering rule: a fast-path beat must never reach rename ahead of an older
// beat still in the slow path. A decoded beat is therefore accepted only when
// no slow-path beat is outstanding in the decoders. Since the decoders take at
// least DEC_STAGES cycles, a slow beat accepted behind a fast one always
// leaves after it, so the two paths never deliver in the same cycle (checked
// by an assertion). The fixed depth follows the architecture; the
// wait-for-drain rule and the decoder handshake are this design's.
//
// Interface: in_valid/in_ready from fetch; dec_in_valid/dec_in_ready and
// dec_out_valid to and from the decoders (the decoder returns the beat's
// fetch_meta_t with its micro-ops); out_valid to rename, which always accepts.
// flush clears the fast path and tells the decoders to drop their work.
module decode_bypass
  import dia_pkg::*;
#(
  parameter int unsigned DEC_STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // from fetch
  input  logic              in_valid,
  output logic              in_ready,
  input  fetch_beat_t       in_beat,
  // CISC decoders
  output logic              dec_in_valid,
  input  logic              dec_in_ready,
  output fetch_beat_t       dec_in_beat,
  output logic              dec_flush,
  input  logic              dec_out_valid,
  input  fetch_beat_t       dec_out_beat,
  // to rename
  output logic              out_valid,
  output fetch_beat_t       out_beat
);

  logic        fv_q [DEC_STAGES];
  fetch_beat_t fb_q [DEC_STAGES];
  logic [7:0]  slow_q;   // beats inside the decoders

  logic fast_in, slow_in, fast_ok;
  assign fast_ok      = (slow_q == '0);
  assign fast_in      = in_valid && in_beat.meta.decoded && fast_ok && !flush;
  assign dec_in_valid = in_valid && !in_beat.meta.decoded && !flush;
  assign dec_in_beat  = in_beat;
  assign slow_in      = dec_in_valid && dec_in_ready;
  assign in_ready     = !flush && (in_beat.meta.decoded ? fast_ok : dec_in_ready);
  assign dec_flush    = flush;

  logic fast_out;
  assign fast_out  = fv_q[DEC_STAGES-1];
  assign out_valid = !flush && (fast_out || dec_out_valid);
  assign out_beat  = fast_out ? fb_q[DEC_STAGES-1] : dec_out_beat;

  always_ff @(posedge clk) begin
    fb_q[0] <= in_beat;
    for (int s = 1; s < DEC_STAGES; s++) fb_q[s] <= fb_q[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DEC_STAGES; s++) fv_q[s] <= 1'b0;
      slow_q <= '0;
    end else if (flush) begin
      for (int s = 0; s < DEC_STAGES; s++) fv_q[s] <= 1'b0;
      slow_q <= '0;
    end else begin
      fv_q[0] <= fast_in;
      for (int s = 1; s < DEC_STAGES; s++) fv_q[s] <= fv_q[s-1];
      slow_q <= slow_q + 8'(slow_in) - 8'(dec_out_valid);
    end
  end

  a_paths_ordered: assert property (@(posedge clk) disable iff (!rst_n || flush)
    !(fast_out && dec_out_valid));
  a_decoder_owes: assert property (@(posedge clk) disable iff (!rst_n || flush)
    dec_out_valid |-> slow_q != '0);

endmodule
