// tb_ftb_dia_frontend: end-to-end test of the whole front end at its default
// sizes (2048-entry FTB, 256 perceptrons, 2048-entry indirect predictor,
// 32-entry RAS, 4-entry FTQ, 64 KB decoded area).
//
// A small synthetic program runs in a loop:
//   A  0x1000  conditional loop branch, taken 7 times then falls through
//   B  0x1018  call to R
//   R  0x2040  return
//   C  0x1020  indirect jump, to X0 three times out of four, else to X1
//   X0 0x3040, X1 0x3140  jumps to a chain of five blocks
//   K0..K4 0x5100 + k*0x200  jumps; all five map to one FTB set of four ways,
//                            so they keep replacing each other; K4 jumps to A
// The environment models what lies outside the front end:
//   * memory with address translation paddr = vaddr ^ 0x8000_0000, read by an
//     instruction cache that answers each request, in order, 3 or more cycles
//     after accepting it, and written by the L2 port for decoded-block words,
//   * CISC decoders taking 3 to 5 cycles, in order,
//   * a back end that walks the program architecturally: every fetch block
//     reaching rename must start at the expected address, a wrong next address
//     causes a redirect in the following cycle, and every block is committed
//     with its micro-ops (word i of the block at S is uop_of(S, i)),
//   * a page walker answering commit TLB misses, and random instruction and
//     data cache miss traffic competing for the L2 port.
// Every micro-op read from the decoded area is compared with uop_of().
// Mid-run an instruction cache invalidation flushes the decoded area, and
// later the area is moved and shrunk to 64 bytes so that it overflows.
// Each mechanism is counted and a count of zero is a failure: FTB misses,
// redirects, blocks stored, fast and slow beats, fast beats held behind the
// decoders, multi-line decoded blocks, overflow and invalidation flushes,
// front-end restarts, TLB misses, write-buffer stalls, RAS and indirect
// predictions, perceptron taken and not-taken predictions, FTQ full and FTB
// replacements.
module tb_ftb_dia_frontend;
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
  localparam addr_t A = 32'h1000, B = 32'h1018, R = 32'h2040, C = 32'h1020;
  localparam addr_t X0 = 32'h3040, X1 = 32'h3140, K0 = 32'h5100;

  function automatic logic [31:0] uop_of(addr_t s, int i);
    return {s[23:0], 8'(i)} ^ 32'h5A00_0000;
  endfunction

  // architectural state of the program
  int    loop_i = 0, iter = 0;
  addr_t arch_pc = A;
  addr_t aras[$];

  // the committed form of the block at arch_pc, and the state after it
  task automatic execute(input ftq_entry_t req, output commit_blk_t c);
    c = '0;
    c.req = req;
    case (arch_pc)
      A: begin
        c.fblen = 6; c.ft_bytes = 24; c.btype = BT_COND; c.target = A; c.nuops = 7;
        c.taken = (loop_i < 7); c.next_addr = c.taken ? A : B;
        loop_i = c.taken ? loop_i + 1 : 0;
      end
      B: begin
        c.fblen = 2; c.ft_bytes = 8; c.btype = BT_CALL; c.target = R; c.nuops = 3;
        c.taken = 1; c.next_addr = R; aras.push_back(B + 8);
      end
      R: begin
        c.fblen = 3; c.ft_bytes = 12; c.btype = BT_RET; c.nuops = 4; c.taken = 1;
        c.target = aras.pop_back(); c.next_addr = c.target;
      end
      C: begin
        c.fblen = 7; c.ft_bytes = 30; c.btype = BT_IND; c.nuops = 12; c.taken = 1;
        c.target = (iter % 4 == 3) ? X1 : X0; c.next_addr = c.target;
      end
      X0, X1: begin
        c.fblen = 3; c.ft_bytes = 10; c.btype = BT_JUMP; c.nuops = 5; c.taken = 1;
        c.target = K0; c.next_addr = K0;
      end
      default: begin
        c.fblen = 4; c.ft_bytes = 16; c.btype = BT_JUMP; c.nuops = 9; c.taken = 1;
        c.target = (arch_pc == K0 + 4 * 32'h200) ? A : arch_pc + 32'h200;
        c.next_addr = c.target;
        if (c.target == A) iter++;
      end
    endcase
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
  int    inval_cyc = -1, cfg_cyc = -1;
  bit    inval_done = 0, cfg_done = 0;

  // mechanism counters
  int n_miss = 0, n_redirect = 0, n_fast = 0, n_slow = 0, n_fast_wait = 0;
  int n_multi = 0, n_overflow = 0, n_inval = 0, n_restart = 0, n_tlb = 0;
  int n_ras = 0, n_ind = 0, n_ind_ok = 0, n_cond_t = 0, n_cond_nt = 0, n_ftq_full = 0;
  int n_repl = 0, n_blocks = 0, n_fast_late = 0, n_wb_words = 0;

  task automatic block_done(input ftq_entry_t req);
    commit_blk_t c;
    n_blocks++;
    check(req.fetch_addr == arch_pc,
          $sformatf("block order: got %h expected %h", req.fetch_addr, arch_pc));
    if (req.fetch_addr != arch_pc) return;
    if (!req.ftb_hit) n_miss++;
    if (blk_dec && blk_beats > 1) n_multi++;
    if (blk_dec && cfg_done) n_fast_late++;
    execute(req, c);
    if (req.next_addr == c.next_addr && req.ftb_hit) begin
      if (c.btype == BT_RET) n_ras++;
      if (c.btype == BT_IND) n_ind_ok++;
      if (c.btype == BT_COND && c.taken) n_cond_t++;
      if (c.btype == BT_COND && !c.taken) n_cond_nt++;
    end
    if (req.next_addr != c.next_addr) begin
      rd_next = 1; rd_rec = c; n_redirect++;
    end
    cq.push_back(c);
  endtask

  // one clock cycle of the environment, driven at the falling edge
  task automatic step();
    @(negedge clk); cyc++;
    // back end redirect, one cycle after the mispredicted block arrived
    rd_valid = rd_next; rd = rd_rec; rd_next = 0;
    // DIA maintenance events
    icache_inval = (cyc == inval_cyc);
    cfg_we   = (cyc == cfg_cyc);
    cfg_base = 32'h4800_0000; cfg_size = 32'd64;
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
    if (dut.u_ptr.alloc_req && !dut.u_ptr.fits && !cfg_we && !icache_inval) n_overflow++;
    if (icache_inval) n_inval++;
    if (dut.ftq_full) n_ftq_full++;
    if (dut.fe_valid && dut.fe_beat.meta.decoded && !dut.fe_ready && !dut.fe_flush) n_fast_wait++;
    if (dut.u_bp.go && dut.u_bp.ftb_hit && dut.u_bp.ent.btype == BT_IND && dut.u_bp.ind_hit) n_ind++;
    if (dut.u_bp.upd_valid && !dut.u_bp.u_ftb.u_tag_hit && !dut.u_bp.u_ftb.u_empty &&
        dut.u_bp.u_ftb.u_old.hyst <= 1) n_repl++;

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
      tlb_pend = 1; tlb_due = cyc + 4; tlb_vpn = tlb_miss_vpn; n_tlb++;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: iteration %0d cycle %0d", iter, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // the front end leaves reset at address 0: the back end jumps to A
    rd_rec.btype = BT_JUMP; rd_rec.taken = 1; rd_rec.target = A; rd_rec.next_addr = A;
    rd_next = 1;
    while (iter < 110) begin
      step();
      if (iter == 50 && !inval_done) begin inval_done = 1; inval_cyc = cyc + 1; end
      if (iter == 70 && !cfg_done)   begin cfg_done = 1;   cfg_cyc = cyc + 1; end
    end
    $display("cycles %0d blocks %0d iterations %0d", cyc, n_blocks, iter);
    $display("ftb_miss %0d redirect %0d stored %0d fast %0d slow %0d fast_wait %0d multi %0d",
             n_miss, n_redirect, dia_stored_count, n_fast, n_slow, n_fast_wait, n_multi);
    $display("overflow %0d inval %0d restart %0d flush_count %0d tlb %0d wb_stall %0d wb_words %0d",
             n_overflow, n_inval, n_restart, dia_flush_count, n_tlb, wb_stall_count, n_wb_words);
    $display("ras %0d ind_pred %0d ind_ok %0d cond_t %0d cond_nt %0d ftq_full %0d repl %0d fast_late %0d",
             n_ras, n_ind, n_ind_ok, n_cond_t, n_cond_nt, n_ftq_full, n_repl, n_fast_late);
    check(n_miss > 0, "FTB misses");
    check(n_redirect > 0, "mispredict redirects");
    check(dia_stored_count > 0, "blocks stored in DIA");
    check(n_fast > 0, "fast-path beats");
    check(n_slow > 0, "slow-path beats");
    check(n_fast_wait > 0, "fast beats held behind slow ones");
    check(n_multi > 0, "decoded blocks spanning lines");
    check(n_overflow > 0, "DIA overflow flushes");
    check(n_inval > 0, "instruction cache invalidation flushes");
    check(n_restart > 0, "front-end restarts after DIA flushes");
    check(int'(dia_flush_count) == n_restart, "flush counter matches flushes");
    check(n_tlb > 0, "commit TLB misses");
    check(wb_stall_count > 0, "write buffer waiting for the L2 port");
    check(n_ras > 0, "returns predicted by the RAS");
    check(n_ind > 0 && n_ind_ok > 0, "indirect predictor predictions");
    check(n_cond_t > 0 && n_cond_nt > 0, "perceptron taken and not-taken predictions");
    check(n_ftq_full > 0, "FTQ full");
    check(n_repl > 0, "FTB replacements");
    check(n_fast_late > 0, "decoded blocks read from the moved area");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
