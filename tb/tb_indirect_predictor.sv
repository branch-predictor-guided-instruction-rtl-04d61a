// tb_indirect_predictor: self-checking test of the indirect target predictor.
// A 16-entry, 4-way table (4 sets) must miss when empty, return the trained
// target for the same address and path, keep different targets for the same
// branch reached along different paths, overwrite a target on retraining and
// evict the round-robin victim when a fifth branch maps to a full set.
module tb_indirect_predictor;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t pc, target, upd_pc, upd_target; logic [PATH_W-1:0] path, upd_path;
  logic hit, upd_valid = 0;

  indirect_predictor #(.ENTRIES(16), .WAYS(4), .TAG_W(12)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic upd(input addr_t a, input logic [PATH_W-1:0] p, input addr_t t);
    @(negedge clk); upd_pc = a; upd_path = p; upd_target = t; upd_valid = 1;
    @(negedge clk); upd_valid = 0;
  endtask
  task automatic look(input addr_t a, input logic [PATH_W-1:0] p, output bit h, output addr_t t);
    @(negedge clk); pc = a; path = p; #1 h = hit; t = target;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h; addr_t t;
    pc = '0; path = '0; upd_pc = '0; upd_path = '0; upd_target = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    look(32'h100, 16'h0, h, t); check(!h, "empty misses");
    upd(32'h100, 16'h0, 32'hAAAA_0000);
    look(32'h100, 16'h0, h, t); check(h && t == 32'hAAAA_0000, "trained target");
    look(32'h100, 16'h1, h, t); check(!h, "other path misses");
    upd(32'h100, 16'h1, 32'hBBBB_0000);
    look(32'h100, 16'h1, h, t); check(h && t == 32'hBBBB_0000, "second path target");
    look(32'h100, 16'h0, h, t); check(h && t == 32'hAAAA_0000, "first path kept");
    upd(32'h100, 16'h0, 32'hCCCC_0000);
    look(32'h100, 16'h0, h, t); check(h && t == 32'hCCCC_0000, "retrained target");
    // four more branches in set 0 (index = pc[1:0] ^ path)
    for (int i = 1; i <= 4; i++) upd(32'h100 + (i << 2), 16'h0, 32'h1000 * i);
    // the round-robin pointer advanced once per update (6 before the fifth
    // branch), so the fifth branch replaced way 2, which held branch 0x108
    for (int i = 0; i <= 4; i++) begin
      look(32'h100 + (i << 2), 16'h0, h, t);
      if (i == 2) check(!h, "round-robin victim evicted");
      else check(h && t == ((i == 0) ? 32'hCCCC_0000 : 32'h1000 * i),
                 $sformatf("branch %0d held", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
