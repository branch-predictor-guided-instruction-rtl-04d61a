// tb_ftq: self-checking test of the fetch target queue against a queue
// model under random push/pop traffic, plus full/empty flags and flush.
module tb_ftq;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 0, push = 0, pop = 0, full, empty;
  ftq_entry_t push_entry, head;
  ftq #(.DEPTH(4)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t model[$]; int n = 0;
    push_entry = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); check(empty && !full, "empty after reset");
    for (int i = 0; i < 4; i++) begin
      push = 1; push_entry.fetch_addr = 32'h100 + i; @(negedge clk);
    end
    push = 0; check(full, "full after 4 pushes");
    push = 1; push_entry.fetch_addr = 32'hdead; @(negedge clk); push = 0;
    check(head.fetch_addr == 32'h100, "push when full ignored, head oldest");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    check(empty, "flush empties");
    for (int c = 0; c < 400; c++) begin
      push = $urandom_range(0, 1); pop = $urandom_range(0, 1);
      push_entry.fetch_addr = 32'h2000 + n;
      if (pop && model.size() > 0) begin
        check(head.fetch_addr == model[0], "head matches model");
      end
      begin
        int sz;
        sz = model.size();
        @(posedge clk);
        if (pop && sz > 0) void'(model.pop_front());
        if (push && sz < 4) begin model.push_back(32'h2000 + n); n++; end
      end
      @(negedge clk);
      check(empty == (model.size() == 0) && full == (model.size() == 4), "flags match model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
