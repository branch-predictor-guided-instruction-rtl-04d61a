// tb_l2_arbiter: self-checking test of the single-port L2 arbiter. For all
// request combinations, with the port ready or not, the grant, the address,
// write enable, data and source must follow: instruction cache first, data
// cache second, the decoded-block write buffer only when both are idle. The
// write-buffer stall counter is checked too.
module tb_l2_arbiter;
  import dia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ic_req, dc_req, wb_req, dc_we, l2_ready, ic_gnt, dc_gnt, wb_gnt, l2_valid, l2_we;
  addr_t ic_addr, dc_addr, wb_addr, l2_addr;
  logic [31:0] dc_wdata, wb_wdata, l2_wdata, wb_stall;
  l2_src_e l2_src;

  l2_arbiter dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stalls = 0;
    ic_req = 0; dc_req = 0; wb_req = 0; l2_ready = 0; dc_we = 1;
    ic_addr = 32'h1111; dc_addr = 32'h2222; wb_addr = 32'h3333; dc_wdata = 32'hDDDD; wb_wdata = 32'hBBBB;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 2; rep++)
      for (int m = 0; m < 16; m++) begin
        @(negedge clk);
        {l2_ready, ic_req, dc_req, wb_req} = 4'(m);
        #1;
        check(l2_valid == (ic_req || dc_req || wb_req), "valid");
        if (ic_req)
          check(l2_src == L2_ICACHE && l2_addr == 32'h1111 && !l2_we && ic_gnt == l2_ready &&
                !dc_gnt && !wb_gnt, "icache first");
        else if (dc_req)
          check(l2_src == L2_DCACHE && l2_addr == 32'h2222 && l2_we && l2_wdata == 32'hDDDD &&
                dc_gnt == l2_ready && !wb_gnt, "dcache second");
        else if (wb_req)
          check(l2_src == L2_DIA_WB && l2_addr == 32'h3333 && l2_we && l2_wdata == 32'hBBBB &&
                wb_gnt == l2_ready, "write buffer when port free");
        else
          check(!ic_gnt && !dc_gnt && !wb_gnt, "no grant");
        if (wb_req && (ic_req || dc_req)) stalls++;
      end
    @(negedge clk);
    check(wb_stall == 32'(stalls), $sformatf("stall count %0d", wb_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
