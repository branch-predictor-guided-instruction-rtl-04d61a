// tb_decode_bypass: self-checking test of the fast/slow decode paths.
// A random mix of decoded (fast path) and original (slow path) beats is
// offered; a model CISC decoder accepts at random and returns each beat, in
// order, 3 to 6 cycles later with its data inverted (standing for decoding).
// Checked: every beat reaches rename exactly once and in program order, fast
// beats take exactly 3 cycles and keep their data, slow beats carry the
// decoder's output, and a fast beat behind slow work waits (counted). A
// flush must empty both paths.
module tb_decode_bypass;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 0, in_valid, in_ready, dec_in_valid, dec_in_ready, dec_flush, dec_out_valid, out_valid;
  fetch_beat_t in_beat, dec_in_beat, dec_out_beat, out_beat;

  decode_bypass #(.DEC_STAGES(3)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  fetch_beat_t dq[$]; int dt[$];        // decoder contents and due cycles
  int  seq_in = 0, seq_out = 0, cyc = 0, last_due = 0;
  int  acc_cyc[int];                    // accept cycle by sequence number
  int  n_fast = 0, n_slow = 0, n_wait = 0;
  bit  pending = 0, want_dec, stop = 0;

  task automatic step(input bit do_flush);
    @(negedge clk); cyc++;
    flush = do_flush;
    if (!pending && !stop) begin want_dec = ($urandom_range(0, 1) == 1); pending = ($urandom_range(0, 2) != 0); end
    in_valid = pending;
    in_beat  = '0;
    in_beat.meta.decoded = want_dec;
    in_beat.meta.addr    = addr_t'(seq_in);
    in_beat.data         = LINE_W'({8{32'(seq_in) * 32'h9E37_79B9}});
    dec_in_ready  = ($urandom_range(0, 3) != 0);
    dec_out_valid = !flush && dt.size() > 0 && dt[0] <= cyc;
    dec_out_beat  = dec_out_valid ? dq[0] : '0;
    #1;
    if (flush) begin
      dq.delete(); dt.delete(); pending = 0; last_due = cyc;
      seq_out = seq_in;
    end else begin
      if (dec_out_valid) begin void'(dq.pop_front()); void'(dt.pop_front()); end
      if (in_valid && want_dec && !in_ready) n_wait++;
      if (dec_in_valid && dec_in_ready) begin
        fetch_beat_t b; int due;
        b = dec_in_beat; b.data = ~b.data;
        due = cyc + $urandom_range(3, 6);
        if (due <= last_due) due = last_due + 1;
        last_due = due;
        dq.push_back(b); dt.push_back(due);
      end
      if (in_valid && in_ready) begin
        acc_cyc[seq_in] = cyc; seq_in++; pending = 0;
        if (want_dec) n_fast++; else n_slow++;
      end
      if (out_valid) begin
        int s; s = int'(out_beat.meta.addr);
        check(s == seq_out, $sformatf("order: got %0d expected %0d", s, seq_out));
        if (out_beat.meta.decoded) begin
          check(cyc - acc_cyc[s] == 3, "fast path takes 3 cycles");
          check(out_beat.data == LINE_W'({8{32'(s) * 32'h9E37_79B9}}), "fast data unchanged");
        end else begin
          check(out_beat.data == ~LINE_W'({8{32'(s) * 32'h9E37_79B9}}), "slow data decoded");
          check(cyc - acc_cyc[s] >= 3, "slow path at least 3 cycles");
        end
        seq_out++;
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0; dec_in_ready = 0; dec_out_valid = 0; dec_out_beat = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 1500; c++) step(c == 700);
    stop = 1;
    for (int c = 0; c < 30; c++) step(0);
    check(seq_out == seq_in, "all accepted beats delivered");
    check(n_fast > 50 && n_slow > 50 && n_wait > 0,
          $sformatf("fast %0d, slow %0d, fast waits %0d", n_fast, n_slow, n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
