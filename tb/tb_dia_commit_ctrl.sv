// tb_dia_commit_ctrl: self-checking test of the commit-side DIA controller.
// Committed fetch blocks with 1..12 micro-ops are offered; the test plays
// the FTB (upd_store asked for some blocks), the DIA pointer (bump
// allocation), the commit TLB (only some DIA pages mapped; a miss is refilled
// a few cycles after tlb_miss) and a write buffer that is full at random.
// Expected results are derived here: every block gives exactly one predictor
// update; a stored block's words appear in the write buffer in order at
// consecutive translated addresses, followed by one decoded-set with the
// allocated address and 4 bytes per micro-op, only while the write buffer
// is empty; other blocks push nothing; an
// abort while storing suppresses the decoded-set.
module tb_dia_commit_ctrl;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cm_valid, cm_ready, up_valid, up_ready, up_last, upd_valid, upd_store, dset_valid;
  logic alloc_req, abort, tlb_hit, tlb_miss, wb_push, wb_full, wb_empty;
  commit_blk_t cm, upd; logic [31:0] up_data, wb_data;
  addr_t dset_start, dset_daddr, alloc_addr, tlb_vaddr, tlb_paddr, wb_addr;
  logic [DLEN_W-1:0] dset_dlen, alloc_bytes; logic [15:0] stored_count;

  dia_commit_ctrl dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef struct { addr_t start; int n; bit store; } blk_t;
  blk_t  blks[$];
  int    cur_uop = 0, cyc = 0, n_upd = 0, n_push = 0, n_dset = 0, n_miss = 0, n_abort = 0;
  addr_t ptr = 32'h4000_1F80;          // near a page boundary so blocks cross it
  bit    mapped[int];
  int    refill_at = -1;
  bit    in_block = 0, hdr_done = 0, aborted = 0, cur_store = 0;
  addr_t cur_base; int cur_n; addr_t cur_start;
  int    want_abort_at = -1;

  function automatic logic [31:0] uop(addr_t s, int i);
    return s[31:0] ^ (32'(i) << 24);
  endfunction

  task automatic step();
    @(negedge clk); cyc++;
    // refill the commit TLB model
    if (refill_at == cyc) begin mapped[int'(tlb_vaddr[31:13])] = 1; refill_at = -1; end
    cm_valid = blks.size() > 0 && !hdr_done;
    cm = '0;
    if (blks.size() > 0) begin
      cm.req.fetch_addr = blks[0].start;
      cm.nuops = 6'(blks[0].n);
    end
    upd_store = (blks.size() > 0) && blks[0].store;
    up_valid  = hdr_done && ($urandom_range(0, 3) != 0);
    up_data   = (blks.size() > 0) ? uop(blks[0].start, cur_uop) : '0;
    up_last   = (blks.size() > 0) && cur_uop == blks[0].n - 1;
    alloc_addr = ptr;
    wb_full   = ($urandom_range(0, 3) == 0);
    wb_empty  = !wb_full && ($urandom_range(0, 2) == 0);
    abort     = (cyc == want_abort_at);
    #1;
    tlb_hit   = mapped.exists(int'(tlb_vaddr[31:13]));
    tlb_paddr = tlb_vaddr ^ 32'h8000_0000;
    #1;
    if (tlb_miss && refill_at < 0) begin n_miss++; refill_at = cyc + 4; end
    if (abort) begin aborted = 1; n_abort++; end
    if (upd_valid) begin
      n_upd++;
      check(upd.req.fetch_addr == blks[0].start, "update carries the block");
      hdr_done = 1; cur_store = blks[0].store; cur_start = blks[0].start; cur_n = blks[0].n;
    end
    if (alloc_req) begin
      check(cur_store && int'(alloc_bytes) == 4 * cur_n, "allocation size");
      cur_base = ptr; ptr += addr_t'(alloc_bytes);
    end
    if (wb_push) begin
      n_push++;
      check(cur_store, "push only for stored blocks");
      check(wb_addr == ((cur_base + addr_t'(4 * cur_uop)) ^ 32'h8000_0000) &&
            wb_data == uop(cur_start, cur_uop), $sformatf("pushed word %0d", cur_uop));
    end
    if (dset_valid) begin
      n_dset++;
      check(!aborted, "no decoded-set after abort");
      check(wb_empty, "decoded-set only with the write buffer empty");
      check(dset_start == cur_start && dset_daddr == cur_base && int'(dset_dlen) == 4 * cur_n,
            "decoded-set fields");
    end
    if (up_valid && up_ready) begin
      if (up_last) begin
        void'(blks.pop_front()); hdr_done = 0; cur_uop = 0;
      end else cur_uop++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stored = 0, pushes = 0;
    cm_valid = 0; cm = '0; up_valid = 0; up_data = '0; up_last = 0; upd_store = 0;
    alloc_addr = '0; abort = 0; tlb_hit = 0; tlb_paddr = '0; wb_full = 0; wb_empty = 1;
    mapped[int'(32'h4000_1F80 >> 13)] = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      blk_t x; x.start = 32'h0001_0000 + 32'(b * 64); x.n = $urandom_range(1, 12);
      x.store = (b % 3 != 1);
      if (x.store) begin stored++; pushes += x.n; end
      blks.push_back(x);
    end
    while (blks.size() > 0 && cyc < 5000) step();
    repeat (40) step();  // let the last decoded-set wait for an empty write buffer
    check(n_upd == 40, $sformatf("one update per block (%0d)", n_upd));
    check(n_push == pushes, $sformatf("words pushed %0d of %0d", n_push, pushes));
    check(n_dset == stored && stored_count == 16'(stored), $sformatf("decoded-sets %0d", n_dset));
    check(n_miss > 0, "commit TLB miss handled");
    // a stored block aborted midway
    aborted = 0;
    blks.push_back('{32'h0002_0000, 10, 1});
    want_abort_at = cyc + 4;
    while (blks.size() > 0 && cyc < 6000) step();
    repeat (40) step();  // let the last decoded-set wait for an empty write buffer
    check(n_abort == 1 && n_dset == stored, "abort suppressed the decoded-set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
