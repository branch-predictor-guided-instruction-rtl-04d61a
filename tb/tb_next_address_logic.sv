// tb_next_address_logic: self-checking test of next fetch address selection
// for an FTB miss and for each final branch type, with the expected address,
// direction and RAS action computed here from the selection rules.
module tb_next_address_logic;
  import dia_pkg::*;
  int checks = 0, failures = 0;
  addr_t fetch_addr, ras_top, ind_target, next_addr, ras_push_addr;
  logic ftb_hit, cond_taken, ind_hit, taken, ras_push, ras_pop;
  ftb_pred_t ent;

  next_address_logic dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic tcase(input bit hit, input br_type_e bt, input bit ct, input bit ih,
                       input addr_t exp, input bit et, input bit epu, input bit epo, input string n);
    ftb_hit = hit; ent.btype = bt; cond_taken = ct; ind_hit = ih;
    #1;
    check(next_addr == exp && taken == et && ras_push == epu && ras_pop == epo, n);
    if (epu) check(ras_push_addr == 32'h1000_0050 + 32'd23, {n, " push address"});
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_addr = 32'h1000_0050; ras_top = 32'h7777_0000; ind_target = 32'h6666_0000;
    ent = '0; ent.ft_bytes = 8'd23; ent.target = 32'h2000_0000;
    tcase(0, BT_COND, 1, 1, 32'h1000_0060, 0, 0, 0, "miss -> next line");
    tcase(1, BT_COND, 1, 0, 32'h2000_0000, 1, 0, 0, "cond taken");
    tcase(1, BT_COND, 0, 0, 32'h1000_0067, 0, 0, 0, "cond not taken");
    tcase(1, BT_JUMP, 0, 0, 32'h2000_0000, 1, 0, 0, "jump");
    tcase(1, BT_CALL, 0, 0, 32'h2000_0000, 1, 1, 0, "call");
    tcase(1, BT_RET,  0, 0, 32'h7777_0000, 1, 0, 1, "return");
    tcase(1, BT_IND,  0, 1, 32'h6666_0000, 1, 0, 0, "indirect hit");
    tcase(1, BT_IND,  0, 0, 32'h2000_0000, 1, 0, 0, "indirect miss uses FTB target");
    tcase(1, BT_INDCALL, 0, 1, 32'h6666_0000, 1, 1, 0, "indirect call");
    fetch_addr = 32'h1000_007F;
    tcase(0, BT_COND, 0, 0, 32'h1000_0080, 0, 0, 0, "miss at line end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
