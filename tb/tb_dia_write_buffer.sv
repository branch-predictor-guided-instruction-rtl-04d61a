// tb_dia_write_buffer: self-checking test of the decoded-block write buffer
// against a queue model under random push/pop traffic: order of address and
// data words, full and empty flags, pushes ignored when full.
module tb_dia_write_buffer;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, full, empty; addr_t push_addr, head_addr;
  logic [31:0] push_data, head_data;

  dia_write_buffer #(.DEPTH(8)) dut (.*);

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
    int q[$]; int n = 0; int sz; int filled = 0;
    push_addr = '0; push_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 600; c++) begin
      // push-heavy first half to reach full, pop-heavy second half
      push = (c < 300) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = (c < 300) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      push_addr = 32'h4000_0000 + 4 * n; push_data = 32'hD000_0000 + n;
      sz = q.size();
      if (pop && sz > 0)
        check(head_addr == 32'h4000_0000 + 4 * q[0] && head_data == 32'hD000_0000 + q[0],
              "head matches model");
      @(posedge clk);
      if (pop && sz > 0) void'(q.pop_front());
      if (push && sz < 8) begin q.push_back(n); n++; end
      @(negedge clk);
      if (full) filled++;
      check(empty == (q.size() == 0) && full == (q.size() == 8), "flags match model");
    end
    check(filled > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
