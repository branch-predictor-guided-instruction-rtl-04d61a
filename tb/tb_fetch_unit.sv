// tb_fetch_unit: self-checking test of the fetch unit.
// A queue stands in for the FTQ and a model instruction cache accepts
// requests at random and answers each, in order, 3 cycles later with a line
// whose bytes encode the line address. Fetch requests of three kinds are
// sent: decoded copies in DIA (fetched from the decoded address for the
// decoded length), FTB hits without a copy (original bytes up to the
// fall-through) and FTB misses (to the end of the line). The expected beats
// (address, size, last flag, decoded flag, line data) are worked out here
// and compared in order. A flush in the middle must drop queued beats and
// the answers still owed by the cache.
module tb_fetch_unit;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 0, ftq_empty, ftq_pop, ic_req_valid, ic_req_ready, ic_rsp_valid;
  logic out_valid, out_ready;
  ftq_entry_t ftq_head; addr_t ic_req_addr; logic [LINE_W-1:0] ic_rsp_data;
  fetch_beat_t out_beat;

  fetch_unit #(.OUTST(4)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [LINE_W-1:0] line_of(addr_t a);
    logic [LINE_W-1:0] d;
    for (int i = 0; i < LINE_BYTES; i++) d[8*i +: 8] = 8'(a[12:5] + 8'(i));
    return d;
  endfunction

  typedef struct { addr_t a; int n; bit last; bit dec; } exp_t;
  ftq_entry_t q[$];
  exp_t       expq[$];
  addr_t      pend_a[$];
  int         pend_t[$];
  int         cyc = 0, beats = 0, dec_beats = 0;
  bit         flush_next = 0;

  task automatic add(input addr_t fa, input bit hit, input bit dv, input addr_t da, input int len);
    ftq_entry_t e; addr_t a; int rem, ch;
    e = '0; e.fetch_addr = fa; e.ftb_hit = hit; e.pred.dvalid = dv; e.pred.daddr = da;
    e.pred.dlen = DLEN_W'(len); e.pred.ft_bytes = FTB_W'(len);
    q.push_back(e);
    a   = (hit && dv) ? da : fa;
    rem = hit ? len : (LINE_BYTES - int'(fa[4:0]));
    while (rem > 0) begin
      ch = LINE_BYTES - int'(a[4:0]);
      if (rem < ch) ch = rem;
      expq.push_back('{a, ch, rem == ch, hit && dv});
      a += addr_t'(ch); rem -= ch;
    end
  endtask

  // one clock cycle of the environment, driven at the falling edge
  task automatic step();
    @(negedge clk); cyc++;
    flush        = flush_next;
    if (flush) begin q.delete(); expq.delete(); end
    ftq_empty    = (q.size() == 0);
    ftq_head     = ftq_empty ? '0 : q[0];
    ic_req_ready = ($urandom_range(0, 3) != 0);
    out_ready    = ($urandom_range(0, 3) != 0);
    ic_rsp_valid = (pend_t.size() > 0 && pend_t[0] <= cyc);
    ic_rsp_data  = ic_rsp_valid ? line_of(pend_a[0]) : '0;
    #1;
    if (ic_rsp_valid) begin void'(pend_a.pop_front()); void'(pend_t.pop_front()); end
    if (ic_req_valid && ic_req_ready) begin pend_a.push_back(ic_req_addr); pend_t.push_back(cyc + 3); end
    if (ftq_pop && !flush) void'(q.pop_front());
    if (out_valid && out_ready && !flush) begin
      beats++;
      if (expq.size() == 0) check(0, "unexpected beat");
      else begin
        exp_t x; x = expq.pop_front();
        if (x.dec) dec_beats++;
        check(out_beat.meta.addr == x.a && int'(out_beat.meta.nbytes) == x.n &&
              out_beat.meta.last == x.last && out_beat.meta.decoded == x.dec,
              $sformatf("beat %h/%0d expected %h/%0d", out_beat.meta.addr, out_beat.meta.nbytes, x.a, x.n));
        check(out_beat.data == line_of(out_beat.meta.addr & ~addr_t'(31)), "beat data is its line");
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
    ic_req_ready = 0; ic_rsp_valid = 0; ic_rsp_data = '0; out_ready = 0; ftq_empty = 1; ftq_head = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    add(32'h0000_1000, 1, 1, 32'h4000_0010, 40);   // decoded copy over two lines
    add(32'h0000_2005, 1, 0, '0, 20);              // original bytes, one line
    add(32'h0000_3010, 0, 0, '0, 0);               // FTB miss: to line end
    add(32'h0000_4018, 1, 0, '0, 80);              // original bytes over 4 lines
    add(32'h0000_5000, 1, 1, 32'h4000_0100, 32);   // decoded, exactly one line
    while (expq.size() > 0 && cyc < 2000) step();
    check(expq.size() == 0, "all beats delivered");
    // flush in the middle of a long block
    add(32'h0000_6000, 1, 0, '0, 200);
    repeat (6) step();
    flush_next = 1; step(); flush_next = 0; step();
    // answers for the flushed requests may still arrive: step() keeps answering
    add(32'h0000_7004, 1, 1, 32'h4000_0200, 12);
    add(32'h0000_8000, 1, 0, '0, 64);
    while (expq.size() > 0 && cyc < 4000) step();
    check(expq.size() == 0, "beats after flush delivered");
    repeat (20) step();
    check(beats > 10 && dec_beats >= 4, $sformatf("beats %0d, decoded beats %0d", beats, dec_beats));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
