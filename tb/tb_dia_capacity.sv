// tb_dia_capacity: how much decoded code the default 64 KB decoded area
// holds, run on the whole front end at its default sizes.
//
// The program is a ring of N jump blocks. Block k starts at k*0x201, so each
// block has its own FTB set, and every block commits 63 micro-ops (252 bytes
// once decoded). Each block becomes hot after 15 commits and is then stored.
//   * N = 260: 65,520 bytes, just inside 64 KB. After the warm-up every block
//     is stored exactly once, DIA is never flushed, and in the final pass
//     every block is fetched decoded.
//   * N = 261: 65,772 bytes, just over 64 KB. The last allocation of the
//     first round no longer fits, so DIA is flushed, and it keeps flushing
//     because every block stays hot.
// The front end is reset between the two cases. The environment is the same
// as in the end-to-end test: an instruction cache that reads a memory model
// through a fixed translation, decoders, a back end that checks program order
// and commits every block, a page walker, and competing L2 traffic. Every
// micro-op fetched from the decoded area is compared with the committed one.
module tb_dia_capacity;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, icache_inval = 0;
  addr_t cfg_base = '0, cfg_size = '0;
  logic ic_req_valid, ic_req_ready = 0, ic_rsp_valid = 0;
  addr_t ic_req_addr;
  logic [LINE_W-1:0] ic_rsp_data = '0;
  logic dec_in_valid, dec_in_ready = 0, dec_flush, dec_out_valid = 0;
  fetch_beat_t dec_in_beat, dec_out_beat = '0, ren_beat;
  logic ren_valid;
  logic rd_valid = 0;
  commit_blk_t rd = '0, cm = '0;
  logic cm_valid = 0, cm_ready, up_valid = 0, up_ready, up_last = 0;
  logic [31:0] up_data = '0;
  logic tlb_miss, tlb_fill_valid = 0;
  logic [ADDR_W-PAGE_BITS-1:0] tlb_miss_vpn, tlb_fill_vpn = '0, tlb_fill_ppn = '0;
  logic icm_req = 0, icm_gnt, dcm_req = 0, dcm_we = 0, dcm_gnt, l2_valid, l2_ready = 0, l2_we;
  addr_t icm_addr = '0, dcm_addr = '0, l2_addr, dia_ptr;
  logic [31:0] dcm_wdata = '0, l2_wdata, wb_stall_count;
  l2_src_e l2_src;
  logic [15:0] dia_flush_count, dia_stored_count;

  ftb_dia_frontend dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- program ----------------
  int nblk = 260;
  function automatic addr_t start_of(int k);
    return addr_t'(k) * 32'h201;
  endfunction

  function automatic logic [31:0] uop_of(addr_t s, int i);
    return {s[23:0], 8'(i)} ^ 32'h5A00_0000;
  endfunction

  int    iter = 0, kblk = 0;
  addr_t arch_pc = '0;

  task automatic execute(input ftq_entry_t req, output commit_blk_t c);
    int nk;
    c = '0;
    c.req = req;
    nk = (kblk + 1 == nblk) ? 0 : kblk + 1;
    c.fblen = 4; c.ft_bytes = FTB_W'(32 - int'(arch_pc[4:0])); c.btype = BT_JUMP;
    c.nuops = 63; c.taken = 1; c.target = start_of(nk); c.next_addr = c.target;
    if (nk == 0) iter++;
    kblk = nk;
    arch_pc = c.next_addr;
  endtask

  // ---------------- environment state ----------------
  logic [31:0] mem [addr_t];
  function automatic logic [31:0] rd_mem(addr_t wa);
    return mem.exists(wa) ? mem[wa] : 32'h0;
  endfunction

  logic [LINE_W-1:0] icq[$]; int ict[$]; int ic_last = 0;
  fetch_beat_t dq[$]; int dt[$]; int dec_last = 0;
  commit_blk_t cq[$];
  bit    cm_streaming = 0; int up_i = 0;
  bit    tlb_pend = 0; int tlb_due = 0; logic [ADDR_W-PAGE_BITS-1:0] tlb_vpn = '0;
  bit    icm_done = 0, dcm_done = 0;
  bit    rd_next = 0; commit_blk_t rd_rec = '0;
  int    cyc = 0, blk_beats = 0; bit blk_dec = 0;

  int n_fast = 0, n_slow = 0, n_blocks = 0, n_dec_blocks = 0, n_restart = 0, n_wb_words = 0;
  int last_pass_dec = 0;

  task automatic block_done(input ftq_entry_t req);
    commit_blk_t c;
    n_blocks++;
    check(req.fetch_addr == arch_pc,
          $sformatf("block order: got %h expected %h", req.fetch_addr, arch_pc));
    if (req.fetch_addr != arch_pc) return;
    if (blk_dec) n_dec_blocks++;
    if (blk_dec && iter == 17) last_pass_dec++;
    execute(req, c);
    if (req.next_addr != c.next_addr) rd_next = 1;
    rd_rec = c;
    cq.push_back(c);
  endtask

  // one clock cycle of the environment, driven at the falling edge
  task automatic step();
    @(negedge clk); cyc++;
    // back end redirect, one cycle after the mispredicted block arrived
    rd_valid = rd_next; rd = rd_rec; rd_next = 0;
    // instruction cache: back-pressure while the back end is behind
    ic_req_ready = (cq.size() < 12) && ($urandom_range(0, 3) != 0);
    ic_rsp_valid = icq.size() > 0 && ict[0] <= cyc;
    ic_rsp_data  = ic_rsp_valid ? icq[0] : '0;
    // decoders
    dec_in_ready  = (dq.size() < 4) && ($urandom_range(0, 3) != 0);
    dec_out_valid = dq.size() > 0 && dt[0] <= cyc;
    dec_out_beat  = dec_out_valid ? dq[0] : '0;
    // commit
    if (!cm_streaming) begin
      cm_valid = cq.size() > 0; cm = cm_valid ? cq[0] : '0;
      up_valid = 0; up_last = 0; up_data = '0;
    end else begin
      cm_valid = 0;
      up_valid = ($urandom_range(0, 4) != 0);
      up_data  = uop_of(cq[0].req.fetch_addr, up_i);
      up_last  = (up_i == int'(cq[0].nuops) - 1);
    end
    // page walker
    tlb_fill_valid = tlb_pend && tlb_due == cyc;
    tlb_fill_vpn   = tlb_vpn;
    tlb_fill_ppn   = tlb_vpn ^ 19'h40000;
    // other L2 traffic
    if (icm_done) begin icm_req = 0; icm_done = 0; end
    else if (!icm_req && $urandom_range(0, 5) == 0) begin icm_req = 1; icm_addr = $urandom; end
    if (dcm_done) begin dcm_req = 0; dcm_done = 0; end
    else if (!dcm_req && $urandom_range(0, 5) == 0) begin
      dcm_req = 1; dcm_addr = $urandom & 32'h0FFF_FFFC; dcm_we = $urandom_range(0, 1) == 1;
      dcm_wdata = $urandom;
    end
    l2_ready = ($urandom_range(0, 4) != 0);
    #1;

    // ---- sample ----
    if (dut.dia_flush) n_restart++;

    // instruction cache
    if (ic_rsp_valid) begin void'(icq.pop_front()); void'(ict.pop_front()); end
    if (ic_req_valid && ic_req_ready) begin
      logic [LINE_W-1:0] line; addr_t pa; int due;
      pa = {ic_req_addr[31:5], 5'b0} ^ 32'h8000_0000;
      for (int w = 0; w < LINE_BYTES / 4; w++) line[32*w +: 32] = rd_mem((pa >> 2) + addr_t'(w));
      due = cyc + 3; if (due <= ic_last) due = ic_last + 1; ic_last = due;
      icq.push_back(line); ict.push_back(due);
    end
    // decoders
    if (dec_flush) begin
      dq.delete(); dt.delete(); dec_last = cyc;
    end else begin
      if (dec_out_valid) begin void'(dq.pop_front()); void'(dt.pop_front()); end
      if (dec_in_valid && dec_in_ready) begin
        int due; due = cyc + $urandom_range(3, 5);
        if (due <= dec_last) due = dec_last + 1; dec_last = due;
        dq.push_back(dec_in_beat); dt.push_back(due);
      end
    end
    // L2 port
    if (l2_valid && l2_ready) begin
      if (l2_src == L2_DIA_WB) begin
        check(l2_we, "decoded words are writes");
        mem[l2_addr >> 2] = l2_wdata; n_wb_words++;
      end
      if (l2_src == L2_ICACHE) check(icm_gnt && l2_addr == icm_addr, "instruction cache granted");
      if (l2_src == L2_DCACHE) check(dcm_gnt && l2_addr == dcm_addr, "data cache granted");
    end
    if (icm_gnt) icm_done = 1;
    if (dcm_gnt) dcm_done = 1;
    // page walker
    if (tlb_fill_valid) tlb_pend = 0;
    else if (tlb_miss && !tlb_pend) begin
      tlb_pend = 1; tlb_due = cyc + 4; tlb_vpn = tlb_miss_vpn;
    end
    // commit
    if (cm_valid && cm_ready) begin cm_streaming = 1; up_i = 0; end
    else if (up_valid && up_ready) begin
      if (up_last) begin cm_streaming = 0; void'(cq.pop_front()); end
      else up_i++;
    end
    // rename
    if (dut.fe_flush) begin blk_beats = 0; blk_dec = 0; end
    check(!(ren_valid && dut.fe_flush), "nothing reaches rename during a flush");
    if (ren_valid) begin
      fetch_meta_t m; m = ren_beat.meta;
      if (m.decoded) begin
        int off, idx0;
        n_fast++;
        off  = int'(m.addr[4:0]);
        idx0 = int'(m.addr - m.req.pred.daddr) / 4;
        for (int k = 0; k < int'(m.nbytes) / 4; k++)
          check(ren_beat.data[8*(off + 4*k) +: 32] == uop_of(m.req.fetch_addr, idx0 + k),
                $sformatf("decoded uop %0d of block %h", idx0 + k, m.req.fetch_addr));
      end else n_slow++;
      blk_beats++;
      blk_dec = m.decoded;
      if (m.last) begin
        block_done(m.req);
        blk_beats = 0;
      end
    end
  endtask

  // clears the environment and resets the front end
  task automatic restart(input int n);
    rst_n = 0; nblk = n; iter = 0; kblk = 0; arch_pc = '0;
    mem.delete(); icq.delete(); ict.delete(); dq.delete(); dt.delete(); cq.delete();
    ic_last = 0; dec_last = 0; cm_streaming = 0; up_i = 0; tlb_pend = 0;
    rd_next = 0; blk_beats = 0; blk_dec = 0; n_dec_blocks = 0; last_pass_dec = 0;
    cm_valid = 0; up_valid = 0; ic_rsp_valid = 0; dec_out_valid = 0; tlb_fill_valid = 0;
    rd_valid = 0; icm_req = 0; dcm_req = 0; icm_done = 0; dcm_done = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: iteration %0d cycle %0d", iter, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // footprint 260 x 252 = 65,520 bytes: fits
    restart(260);
    while (iter < 18) step();
    $display("N=260: cycles %0d stored %0d flushes %0d decoded blocks in last pass %0d ptr %h",
             cyc, dia_stored_count, dia_flush_count, last_pass_dec, dia_ptr);
    check(dia_flush_count == 0, "a 65,520-byte footprint never flushes");
    check(dia_stored_count == 16'(260), "every block stored exactly once");
    check(dia_ptr == 32'h4000_0000 + 32'd65520, "pointer at the end of the footprint");
    check(last_pass_dec == 260, "every block fetched decoded in the last pass");
    // footprint 261 x 252 = 65,772 bytes: overflows
    restart(261);
    while (iter < 18) step();
    $display("N=261: cycles %0d stored %0d flushes %0d decoded blocks %0d",
             cyc, dia_stored_count, dia_flush_count, n_dec_blocks);
    check(dia_flush_count > 0, "a 65,772-byte footprint overflows and flushes");
    check(dia_stored_count > 16'(261), "blocks are stored again after each flush");
    check(n_dec_blocks > 0, "decoded blocks are still fetched between flushes");
    check(n_fast > 0 && n_slow > 0, "both decode paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
