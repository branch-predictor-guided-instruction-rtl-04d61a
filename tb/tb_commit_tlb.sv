// tb_commit_tlb: self-checking test of the 8-entry commit TLB: misses when
// empty, translates after a refill keeping the 8 KB page offset, holds 8
// pages, replaces round-robin on the ninth and empties on inv_all.
module tb_commit_tlb;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t lk_vaddr, lk_paddr; logic lk_hit, fill_valid = 0, inv_all = 0;
  logic [ADDR_W-PAGE_BITS-1:0] fill_vpn, fill_ppn;

  commit_tlb dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic fill(input int v, input int p);
    @(negedge clk); fill_valid = 1; fill_vpn = 19'(v); fill_ppn = 19'(p);
    @(negedge clk); fill_valid = 0;
  endtask
  task automatic look(input addr_t va, output bit h, output addr_t pa);
    @(negedge clk); lk_vaddr = va; #1 h = lk_hit; pa = lk_paddr;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h; addr_t pa;
    lk_vaddr = '0; fill_vpn = '0; fill_ppn = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    look(32'h4000_0123, h, pa); check(!h, "empty misses");
    fill(32'h4000_0000 >> 13, 19'h155);
    look(32'h4000_0123, h, pa); check(h && pa == {19'h155, 13'h0123}, "translated with offset");
    look(32'h4000_1FFC, h, pa); check(h && pa == {19'h155, 13'h1FFC}, "same 8KB page");
    look(32'h4000_2000, h, pa); check(!h, "next page misses");
    for (int i = 1; i < 8; i++) fill(int'(32'h4000_0000 >> 13) + i, 19'h200 + i);
    for (int i = 0; i < 8; i++) begin
      look(32'h4000_0010 + (i << 13), h, pa);
      check(h && pa[31:13] == ((i == 0) ? 19'h155 : 19'(19'h200 + i)), $sformatf("page %0d held", i));
    end
    // ninth page: round-robin victim is entry 0 (8 fills so far)
    fill(int'(32'h5000_0000 >> 13), 19'h7);
    look(32'h5000_0004, h, pa); check(h && pa == {19'h7, 13'h4}, "ninth page held");
    look(32'h4000_0004, h, pa); check(!h, "first page replaced");
    @(negedge clk); inv_all = 1; @(negedge clk); inv_all = 0;
    look(32'h5000_0004, h, pa); check(!h, "inv_all empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
