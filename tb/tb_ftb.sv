// tb_ftb: self-checking test of the FTB with its DIA fields.
// A 16-entry, 4-way FTB (4 sets) is trained with directed sequences and
// every lookup and upd_store answer is compared with values worked out by
// hand from the hysteresis rules: a new block enters with counter 1, each
// repeat adds one, the 15th execution saturates the 4-bit counter and asks for
// a DIA store, a conflicting block decrements the weakest way and replaces it
// only when its counter reaches zero, and a DIA flush clears decoded-valid.
module tb_ftb;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t lk_addr; logic lk_hit; ftb_pred_t lk_ent;
  logic upd_valid = 0; ftb_upd_t upd; logic upd_store;
  logic dset_valid = 0; addr_t dset_start, dset_daddr; logic [DLEN_W-1:0] dset_dlen;
  logic flush_decoded = 0;

  ftb #(.ENTRIES(16), .WAYS(4)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ftb_upd_t blk(addr_t a, addr_t tgt);
    return '{start: a, fblen: 5'd6, ft_bytes: 8'd20, btype: BT_COND, target: tgt};
  endfunction

  // one commit update; returns upd_store seen in that cycle
  task automatic update(input ftb_upd_t u, output bit st);
    @(negedge clk); upd = u; upd_valid = 1;
    #1 st = upd_store;
    @(negedge clk); upd_valid = 0;
  endtask

  task automatic lookup(input addr_t a, output bit hit, output ftb_pred_t e);
    @(negedge clk); lk_addr = a; #1 hit = lk_hit; e = lk_ent;
  endtask

  // addresses in the same set (index bits [1:0] equal)
  localparam addr_t A = 32'h0000_1004, B = 32'h0000_2004, C = 32'h0000_3004,
                    D = 32'h0000_4004, E = 32'h0000_5004;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit st, hit; ftb_pred_t e; int first_store;
    upd = '0; lk_addr = '0; dset_start = '0; dset_daddr = '0; dset_dlen = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    lookup(A, hit, e); check(!hit, "empty FTB misses");

    // 15 executions of A: store requested on the 15th only
    first_store = 0;
    for (int n = 1; n <= 15; n++) begin
      update(blk(A, 32'h100), st);
      if (st && first_store == 0) first_store = n;
      check(st == (n == 15), $sformatf("upd_store on execution %0d", n));
    end
    check(first_store == 15, "decoded block stored after 15 executions");
    lookup(A, hit, e);
    check(hit && e.fblen == 6 && e.ft_bytes == 20 && e.target == 32'h100 && e.btype == BT_COND,
          "A fields");
    check(!e.dvalid, "A decoded not yet valid");
    // saturated but no decoded copy recorded: asks again
    update(blk(A, 32'h100), st); check(st, "saturated without copy asks again");

    // record decoded copy
    @(negedge clk); dset_valid = 1; dset_start = A; dset_daddr = 32'h4000_0040; dset_dlen = 8'd24;
    @(negedge clk); dset_valid = 0;
    lookup(A, hit, e);
    check(hit && e.dvalid && e.daddr == 32'h4000_0040 && e.dlen == 24, "decoded fields set");
    update(blk(A, 32'h100), st); check(!st, "no store once copy valid");

    // DIA flush clears decoded valid, next update asks again
    @(negedge clk); flush_decoded = 1; @(negedge clk); flush_decoded = 0;
    lookup(A, hit, e); check(hit && !e.dvalid, "flush clears decoded valid, keeps entry");
    update(blk(A, 32'h100), st); check(st, "store asked again after flush");
    @(negedge clk); dset_valid = 1; dset_start = A; dset_daddr = 32'h4000_0000; dset_dlen = 8'd24;
    @(negedge clk); dset_valid = 0;

    // fill the set: B, C, D with counter 3
    for (int n = 0; n < 3; n++) begin
      update(blk(B, 32'h200), st); update(blk(C, 32'h300), st); update(blk(D, 32'h400), st);
    end
    lookup(B, hit, e); check(hit, "B present");
    // E conflicts: weakest way (B, counter 3) decremented, E dropped twice
    update(blk(E, 32'h500), st); lookup(E, hit, e); check(!hit, "E dropped (B 3->2)");
    update(blk(E, 32'h500), st); lookup(E, hit, e); check(!hit, "E dropped (B 2->1)");
    lookup(B, hit, e); check(hit, "B survives");
    update(blk(E, 32'h500), st); lookup(E, hit, e); check(hit && e.target == 32'h500 && !e.dvalid,
      "E replaces B when counter reaches zero");
    lookup(B, hit, e); check(!hit, "B replaced");
    lookup(A, hit, e); check(hit && e.dvalid, "A untouched");
    // E entered with counter 1: one conflict removes it
    update(blk(B, 32'h200), st); lookup(B, hit, e); check(hit, "B back in place of E (counter 1)");
    lookup(E, hit, e); check(!hit, "E gone");
    // same start, different content: A counter 15->14, data dropped, copy kept
    update(blk(A, 32'h180), st); lookup(A, hit, e);
    check(hit && e.target == 32'h100 && e.dvalid && !st, "different block at A dropped");
    // decoded set for an absent block is ignored
    @(negedge clk); dset_valid = 1; dset_start = E; @(negedge clk); dset_valid = 0;
    lookup(E, hit, e); check(!hit, "dset of absent block ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
