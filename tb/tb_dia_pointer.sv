// tb_dia_pointer: self-checking test of DIA space management: blocks are
// placed one after another from the base, a block that does not fit flushes
// DIA and goes to the base (flush pulse one cycle later, counted), an
// exact fit does not flush, an instruction cache invalidation flushes
// without allocating and new base/size registers restart the area.
module tb_dia_pointer;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, alloc_req = 0, inval_req = 0, flush;
  addr_t cfg_base, cfg_size, alloc_addr, ptr;
  logic [DLEN_W-1:0] alloc_bytes;
  logic [15:0] flush_count;

  dia_pointer #(.DIA_BASE_RESET(32'h1000), .DIA_SIZE_RESET(32'd256)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic alloc(input int n, input addr_t exp, input bit exp_flush, input string msg);
    @(negedge clk); alloc_req = 1; alloc_bytes = DLEN_W'(n);
    #1 check(alloc_addr == exp, {msg, " address"});
    @(negedge clk); alloc_req = 0;
    check(flush == exp_flush, {msg, " flush pulse"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_base = '0; cfg_size = '0; alloc_bytes = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); check(ptr == 32'h1000 && !flush, "pointer at base after reset");
    alloc(100, 32'h1000, 0, "first block");
    alloc(100, 32'h1064, 0, "second block");
    check(ptr == 32'h10C8, "pointer past second block");
    alloc(100, 32'h1000, 1, "overflow block flushes and goes to base");
    check(flush_count == 1 && ptr == 32'h1064, "flush counted, pointer advanced");
    @(negedge clk); check(!flush, "flush is a single pulse");
    alloc(156, 32'h1064, 0, "exact fit");
    check(ptr == 32'h1100, "pointer at end");
    alloc(4, 32'h1000, 1, "full area flushes");
    @(negedge clk); inval_req = 1; @(negedge clk); inval_req = 0;
    check(flush && ptr == 32'h1000 && flush_count == 3, "invalidation flushes");
    @(negedge clk); cfg_we = 1; cfg_base = 32'h8000; cfg_size = 32'd64; @(negedge clk); cfg_we = 0;
    check(ptr == 32'h8000 && flush, "new DIA registers");
    alloc(60, 32'h8000, 0, "small area first block");
    alloc(8, 32'h8000, 1, "small area overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
