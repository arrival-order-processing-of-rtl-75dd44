// tb_eventflag_svc: directed test of the eventflag service: OR and AND
// waits that block and match, polling, parameter errors, set_flg release
// requests with each flag's order, the clear attribute ending a release after
// one match, and clr_flg. Expected patterns are computed in the test.
module tb_eventflag_svc;
  import rtos_pkg::*;

  logic clk = 0, rst_n = 0;
  svc_req_t req;
  svc_rsp_t rsp;
  int checks = 0, failures = 0;

  eventflag_svc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic call(input int t, input fn_e fn, input int inst,
                      input logic [31:0] a0, input logic [31:0] a1, input bit relm);
    req = '0;
    req.valid = 1; req.tsk = TASK_W'(t); req.call.fn = fn;
    req.call.inst = INST_W'(inst); req.call.arg0 = a0; req.call.arg1 = a1;
    req.release_mode = relm;
    #1;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic expect_done(input logic [31:0] rc, input logic [31:0] r1, input string what);
    chk(rsp.valid && !rsp.blocked && rsp.ret0 == rc && rsp.ret1 == r1, what);
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // Flag 0: no clear attribute, priority order.
    call(0, FN_WAI_FLG, 0, 32'h3, TWF_ANDW, 0);
    chk(rsp.blocked && rsp.slot == SLOT_FLG, "AND wait blocks"); tick();
    call(1, FN_WAI_FLG, 0, 32'h4, TWF_ORW, 0);
    chk(rsp.blocked && rsp.slot == SLOT_FLG, "OR wait blocks"); tick();
    call(2, FN_SET_FLG, 0, 32'h1, 0, 0); expect_done(E_OK, 0, "set bit 0");
    chk(rsp.rel && rsp.rel_slot == SLOT_FLG && rsp.rel_order == 1'b0, "flag 0 release, priority"); tick();
    call(0, FN_WAI_FLG, 0, 32'h3, TWF_ANDW, 1);
    chk(rsp.blocked, "AND wait still unmatched"); tick();
    call(1, FN_WAI_FLG, 0, 32'h4, TWF_ORW, 1);
    chk(rsp.blocked, "OR wait still unmatched"); tick();
    call(2, FN_SET_FLG, 0, 32'h6, 0, 0); expect_done(E_OK, 0, "set bits 1,2"); tick();
    call(0, FN_WAI_FLG, 0, 32'h3, TWF_ANDW, 1); expect_done(E_OK, 32'h7, "AND wait matches");
    chk(!rsp.rel_end, "no clear attribute: release continues"); tick();
    call(1, FN_WAI_FLG, 0, 32'h4, TWF_ORW, 1); expect_done(E_OK, 32'h7, "OR wait matches, flag kept"); tick();
    call(1, FN_CLR_FLG, 0, 32'hFFFF_FFFE, 0, 0); expect_done(E_OK, 0, "clr bit 0"); tick();
    call(1, FN_POL_FLG, 0, 32'h1, TWF_ORW, 0); expect_done(E_TMOUT, 0, "poll after clear"); tick();
    call(1, FN_POL_FLG, 0, 32'h2, TWF_ORW, 0); expect_done(E_OK, 32'h6, "poll bit 1"); tick();
    call(1, FN_WAI_FLG, 0, 0, TWF_ORW, 0); expect_done(E_PAR, 0, "zero pattern"); tick();
    call(1, FN_WAI_FLG, 0, 1, 32'h7, 0); expect_done(E_PAR, 0, "bad mode"); tick();
    // Flag 1: clear attribute, arrival order.
    call(3, FN_WAI_FLG, 1, 32'h10, TWF_ORW, 0); chk(rsp.blocked && rsp.slot == SLOT_FLG + 1, "flag1 wait"); tick();
    call(2, FN_SET_FLG, 1, 32'h30, 0, 0);
    chk(rsp.rel && rsp.rel_slot == SLOT_FLG + 1 && rsp.rel_order == 1'b1, "flag 1 release, arrival"); tick();
    call(3, FN_WAI_FLG, 1, 32'h10, TWF_ORW, 1); expect_done(E_OK, 32'h30, "match with clear attribute");
    chk(rsp.rel_end, "clear attribute ends release"); tick();
    call(3, FN_POL_FLG, 1, 32'h20, TWF_ORW, 0); expect_done(E_TMOUT, 0, "flag cleared"); tick();
    call(3, FN_SET_FLG, 4, 1, 0, 0); expect_done(E_ID, 0, "bad id"); tick();
    call(3, FN_LOC_MTX, 0, 1, 0, 0); chk(!rsp.valid, "mutex call ignored"); tick();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
