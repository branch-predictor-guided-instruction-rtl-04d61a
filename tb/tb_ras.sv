// tb_ras: self-checking test of the return address stack against a queue
// model: pushes, pops, a push and pop in one cycle, pointer restore alone and
// combined with a push, and wrap-around after more pushes than entries.
module tb_ras;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, restore = 0; addr_t push_addr, top;
  logic [RAS_PTR_W-1:0] ptr, restore_ptr;

  ras #(.DEPTH(8)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic op(input bit pu, input bit po, input addr_t a);
    @(negedge clk); push = pu; pop = po; push_addr = a;
    @(negedge clk); push = 0; pop = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RAS_PTR_W-1:0] saved;
    push_addr = '0; restore_ptr = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    op(1, 0, 32'h111); op(1, 0, 32'h222); op(1, 0, 32'h333);
    #1 check(top == 32'h333, "top after 3 pushes");
    saved = ptr;
    op(0, 1, '0); #1 check(top == 32'h222, "pop");
    op(0, 1, '0); #1 check(top == 32'h111, "pop again");
    // restore the pointer saved before the pops
    @(negedge clk); restore = 1; restore_ptr = saved; @(negedge clk); restore = 0;
    #1 check(top == 32'h333, "restore");
    op(1, 1, 32'h444); #1 check(top == 32'h444 && ptr == saved, "push+pop replaces top");
    // restore to one below and push in the same cycle
    @(negedge clk); restore = 1; restore_ptr = saved - 1; push = 1; push_addr = 32'h555;
    @(negedge clk); restore = 0; push = 0;
    #1 check(top == 32'h555 && ptr == saved, "restore with push");
    op(0, 1, '0); #1 check(top == 32'h222, "entry below intact");
    // overflow: 8 more pushes wrap over the oldest
    for (int i = 0; i < 9; i++) op(1, 0, 32'h1000 + i);
    for (int i = 8; i >= 1; i--) begin
      #1 check(top == 32'h1000 + i, $sformatf("wrapped stack entry %0d", i));
      op(0, 1, '0);
    end
    #1 check(top == 32'h1008, "oldest overwritten by wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
