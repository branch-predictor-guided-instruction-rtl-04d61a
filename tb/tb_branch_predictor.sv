// tb_branch_predictor: self-checking test of the prediction engine.
// With the FTQ never full it must push one request per cycle. Checked: an
// empty FTB gives sequential line-by-line requests; after commit updates a
// loop block is predicted taken onto itself; a call/return pair is followed
// through the RAS; the 15th commit of a block raises upd_store; a decoded-set
// makes the block's requests carry the decoded address and length, and a
// DIA flush removes them; a full FTQ stops pushes; a redirect restarts
// prediction at the given address, and a redirect for a resolved
// conditional rebuilds the global history from the snapshot plus the outcome.
module tb_branch_predictor;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ftq_push, ftq_full = 0, rd_valid = 0, upd_valid = 0, upd_store, dset_valid = 0, flush_decoded = 0;
  ftq_entry_t ftq_entry; commit_blk_t rd, upd;
  addr_t dset_start, dset_daddr; logic [DLEN_W-1:0] dset_dlen;

  branch_predictor #(.FTB_ENTRIES(64), .N_PERC(16), .IND_ENTRIES(16), .RAS_DEPTH(8),
                     .RESET_PC(32'h0000_0100)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic commit_blk_t blk(addr_t s, int ft, br_type_e bt, addr_t tgt, bit tk);
    commit_blk_t c; c = '0;
    c.req.fetch_addr = s; c.fblen = 5'd4; c.ft_bytes = FTB_W'(ft); c.btype = bt; c.target = tgt;
    c.taken = tk; c.next_addr = tk ? tgt : s + addr_t'(ft); c.nuops = 6'd5;
    return c;
  endfunction

  task automatic commit(input commit_blk_t c, output bit st);
    @(negedge clk); upd = c; upd_valid = 1; #1 st = upd_store;
    @(negedge clk); upd_valid = 0;
  endtask
  task automatic redirect(input addr_t a);
    @(negedge clk); rd = '0; rd.next_addr = a; rd.btype = BT_JUMP; rd.taken = 1; rd_valid = 1;
    #1 check(!ftq_push, "no push during redirect");
    @(negedge clk); rd_valid = 0;
  endtask
  task automatic expect_next(input addr_t fa, input addr_t na, input bit hit, input string msg);
    #1 check(ftq_push && ftq_entry.fetch_addr == fa && ftq_entry.next_addr == na &&
             ftq_entry.ftb_hit == hit, $sformatf("%s: %h -> %h", msg, ftq_entry.fetch_addr, ftq_entry.next_addr));
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit st; int first = 0;
    rd = '0; upd = '0; dset_start = '0; dset_daddr = '0; dset_dlen = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    expect_next(32'h100, 32'h120, 0, "miss 1");
    expect_next(32'h120, 32'h140, 0, "miss 2");
    // loop block at 0x100 (taken to itself), call at 0x200, return at 0x300
    for (int n = 1; n <= 16; n++) begin
      commit(blk(32'h100, 20, BT_COND, 32'h100, 1), st);
      if (st && first == 0) first = n;
    end
    check(first == 15, $sformatf("upd_store first on commit %0d", first));
    commit(blk(32'h200, 10, BT_CALL, 32'h300, 1), st);
    commit(blk(32'h300, 6, BT_RET, 32'h20A, 1), st);
    commit(blk(32'h20A, 30, BT_JUMP, 32'h100, 1), st);
    redirect(32'h100);
    expect_next(32'h100, 32'h100, 1, "loop predicted taken");
    expect_next(32'h100, 32'h100, 1, "loop again");
    redirect(32'h200);
    expect_next(32'h200, 32'h300, 1, "call");
    expect_next(32'h300, 32'h20A, 1, "return via RAS");
    expect_next(32'h20A, 32'h100, 1, "jump");
    // decoded copy recorded for the loop block
    @(negedge clk); dset_valid = 1; dset_start = 32'h100; dset_daddr = 32'h4000_0000; dset_dlen = 8'd20;
    @(negedge clk); dset_valid = 0;
    redirect(32'h100);
    #1 check(ftq_entry.pred.dvalid && ftq_entry.pred.daddr == 32'h4000_0000 && ftq_entry.pred.dlen == 20,
             "request carries decoded copy");
    @(negedge clk); flush_decoded = 1; @(negedge clk); flush_decoded = 0;
    #1 check(ftq_push && !ftq_entry.pred.dvalid, "flush removes decoded copy");
    @(negedge clk); ftq_full = 1; #1 check(!ftq_push, "full FTQ stops pushes");
    @(negedge clk); ftq_full = 0;
    // a resolved conditional redirect rebuilds the history from the snapshot
    @(negedge clk); rd = blk(32'h100, 20, BT_COND, 32'h100, 0); rd.req.snap.hist = 16'hA5A5;
    rd_valid = 1;
    @(negedge clk); rd_valid = 0;
    #1 check(ftq_push && ftq_entry.fetch_addr == 32'h114 && ftq_entry.snap.hist == 16'h4B4A,
             $sformatf("history after redirect %h", ftq_entry.snap.hist));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
