// tb_perceptron_predictor: self-checking test of the perceptron predictor.
// A 16-perceptron, 8-bit-history predictor is trained on branches whose
// outcome is a fixed function of history (copy of bit 3, inverse of bit 0,
// always taken) and must then predict every one of a set of fresh random
// histories correctly; training on one branch must not disturb another that
// uses a different perceptron.
module tb_perceptron_predictor;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t pc, upd_pc; logic [7:0] hist, upd_hist; logic taken, upd_valid = 0, upd_taken;

  perceptron_predictor #(.N_PERC(16), .HIST(8)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit outcome(int f, logic [7:0] h);
    case (f) 0: return h[3]; 1: return !h[0]; default: return 1'b1; endcase
  endfunction

  task automatic train(input addr_t a, input int f, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      upd_pc = a; upd_hist = 8'($urandom); upd_taken = outcome(f, upd_hist); upd_valid = 1;
    end
    @(negedge clk); upd_valid = 0;
  endtask

  task automatic test(input addr_t a, input int f, input string name);
    int ok = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); pc = a; hist = 8'($urandom); #1;
      if (taken == outcome(f, hist)) ok++;
    end
    check(ok == 32, $sformatf("%s: %0d/32 correct", name, ok));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = '0; hist = '0; upd_pc = '0; upd_hist = '0; upd_taken = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); pc = 32'h10; hist = 8'h5a; #1 check(taken, "zero weights predict taken");
    train(32'h0000_0010, 0, 200); test(32'h0000_0010, 0, "copy of bit 3");
    train(32'h0000_0021, 1, 200); test(32'h0000_0021, 1, "inverse of bit 0");
    test(32'h0000_0010, 0, "first branch undisturbed");
    train(32'h0000_0032, 2, 300);  test(32'h0000_0032, 2, "always taken");
    // retrain the first branch to the opposite rule
    train(32'h0000_0010, 1, 300); test(32'h0000_0010, 1, "retrained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
