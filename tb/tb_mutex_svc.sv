// tb_mutex_svc: directed test of the mutex service: lock, re-lock by owner,
// contention (blocked into the right slot), polling lock, unlock by a
// non-owner, unlock by the owner (release request with the instance's order),
// the released loc_mtx that ends the release, bad id, and calls of other
// service modules that the mutex must ignore.
module tb_mutex_svc;
  import rtos_pkg::*;

  logic clk = 0, rst_n = 0;
  svc_req_t req;
  svc_rsp_t rsp;
  int checks = 0, failures = 0;

  mutex_svc dut (.*);

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

  task automatic call(input int t, input fn_e fn, input int inst, input bit relm);
    req = '0;
    req.valid = 1; req.tsk = TASK_W'(t); req.call.fn = fn;
    req.call.inst = INST_W'(inst); req.release_mode = relm;
    #1;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic expect_done(input logic [31:0] rc, input string what);
    chk(rsp.valid && !rsp.blocked && rsp.ret0 == rc, what);
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    call(0, FN_LOC_MTX, 0, 0); expect_done(E_OK, "T0 locks M0"); tick();
    call(0, FN_LOC_MTX, 0, 0); expect_done(E_OBJ, "T0 relocks M0"); tick();
    call(1, FN_LOC_MTX, 0, 0);
    chk(rsp.valid && rsp.blocked && rsp.slot == SLOT_MTX, "T1 blocks on M0"); tick();
    call(2, FN_PLOC_MTX, 0, 0); expect_done(E_TMOUT, "T2 polls M0"); tick();
    call(2, FN_UNL_MTX, 0, 0); expect_done(E_OBJ, "T2 unlocks M0 it does not own"); tick();
    call(2, FN_LOC_MTX, 1, 0); expect_done(E_OK, "T2 locks M1"); tick();
    call(0, FN_UNL_MTX, 0, 0); expect_done(E_OK, "T0 unlocks M0");
    chk(rsp.rel && rsp.rel_slot == SLOT_MTX && rsp.rel_order == 1'b0, "M0 release in priority order");
    tick();
    call(1, FN_LOC_MTX, 0, 1); expect_done(E_OK, "released T1 gets M0");
    chk(rsp.rel_end, "release ends after one hand-over"); tick();
    call(3, FN_LOC_MTX, 1, 0);
    chk(rsp.blocked && rsp.slot == SLOT_MTX + 1, "T3 blocks on M1"); tick();
    call(2, FN_UNL_MTX, 1, 0); expect_done(E_OK, "T2 unlocks M1");
    chk(rsp.rel && rsp.rel_slot == SLOT_MTX + 1 && rsp.rel_order == 1'b1, "M1 release in arrival order");
    tick();
    call(3, FN_LOC_MTX, 1, 1); expect_done(E_OK, "released T3 gets M1"); tick();
    call(1, FN_UNL_MTX, 0, 0); expect_done(E_OK, "T1 unlocks M0"); tick();
    call(1, FN_UNL_MTX, 0, 0); expect_done(E_OBJ, "unlock of a free mutex"); tick();
    call(1, FN_LOC_MTX, 5, 0); expect_done(E_ID, "bad mutex id"); tick();
    call(1, FN_SET_FLG, 0, 0); chk(!rsp.valid, "eventflag call ignored"); tick();
    req = '0; #1;
    chk(!rsp.valid, "no strobe, no answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
