// tb_control_task_svc: directed test of the task control service with a
// small model of the task state (dormant, suspended, priority) that the
// test updates from the module's commands, as the manager would. Checks the
// return codes of every call, the commands issued, the activation and wakeup
// counts, the sleep-slot release that wup_tsk starts, and rel_wai.
module tb_control_task_svc;
  import rtos_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  svc_req_t req;
  svc_rsp_t rsp;
  logic [N-1:0] dormant, suspended, waiting, task_end, actcnt;
  logic [PRI_W-1:0] pri [N];
  logic cmd_act, cmd_ter, cmd_rlwai, cmd_pri, cmd_sus, cmd_rsm, cmd_lock, cmd_unlock;
  logic [TASK_W-1:0] cmd_tsk;
  logic [PRI_W-1:0] cmd_pri_val;
  int checks = 0, failures = 0;

  control_task_svc #(.NTASK(N)) dut (.*);

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

  // Issue one call, check the return code, apply commands to the model.
  task automatic call(input int t, input fn_e fn, input logic [31:0] a0,
                      input logic [31:0] a1, input logic [31:0] rc, input string what);
    logic a, te, p, su, rs;
    logic [TASK_W-1:0] ct;
    logic [PRI_W-1:0] pv;
    req = '0; req.valid = 1; req.tsk = TASK_W'(t);
    req.call.fn = fn; req.call.arg0 = a0; req.call.arg1 = a1;
    #1;
    chk(rsp.valid && !rsp.blocked && rsp.ret0 == rc,
        $sformatf("%s: rc %0d expected %0d", what, $signed(rsp.ret0), $signed(rc)));
    // The manager applies the commands on the clock edge.
    a = cmd_act; te = cmd_ter; p = cmd_pri; su = cmd_sus; rs = cmd_rsm;
    ct = cmd_tsk; pv = cmd_pri_val;
    task_end = te ? (N'(1) << ct) : '0;
    @(posedge clk); #1;
    if (a)  dormant[ct] = 0;
    if (te) dormant[ct] = 1;
    if (p)  pri[ct] = pv;
    if (su) suspended[ct] = 1;
    if (rs) suspended[ct] = 0;
    req = '0; task_end = '0;
  endtask

  initial begin
    req = '0; dormant = 4'b1000; suspended = '0; waiting = '0; task_end = '0;
    pri = '{1, 2, 2, 3};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    call(0, FN_GET_PRI, 1, 0, E_OK, "get_pri T1");
    call(0, FN_ACT_TSK, 3, 0, E_OK, "activate dormant T3");
    chk(!dormant[3], "T3 activated");
    call(0, FN_ACT_TSK, 3, 0, E_OK, "queue activation");
    chk(actcnt == 4'b1000, "activation queued");
    call(0, FN_ACT_TSK, 3, 0, E_QOVR, "second queued activation");
    call(0, FN_CAN_ACT, 3, 0, 32'd1, "can_act returns 1");
    chk(actcnt == 4'b0000, "activation cancelled");
    call(0, FN_ACT_TSK, 9, 0, E_ID, "bad task id");
    call(1, FN_TER_TSK, 1, 0, E_ILUSE, "terminate self");
    call(1, FN_TER_TSK, 3, 0, E_OK, "terminate T3");
    chk(dormant[3], "T3 dormant");
    call(1, FN_TER_TSK, 3, 0, E_OBJ, "terminate dormant T3");
    call(1, FN_CHG_PRI, 3, 1, E_OBJ, "chg_pri of dormant task");
    call(1, FN_CHG_PRI, 2, 0, E_OK, "chg_pri T2 to 0");
    chk(pri[2] == 0, "T2 priority 0");
    call(1, FN_CHG_PRI, 2, 16, E_PAR, "priority out of range");
    // sleep / wakeup
    req = '0; req.valid = 1; req.tsk = 2; req.call.fn = FN_SLP_TSK; #1;
    chk(rsp.valid && rsp.blocked && rsp.slot == SLOT_SLP, "T2 sleeps");
    @(posedge clk); #1; req = '0;
    call(0, FN_WUP_TSK, 2, 0, E_OK, "wake T2");
    call(0, FN_WUP_TSK, 2, 0, E_QOVR, "wakeup already queued");
    req = '0; req.valid = 1; req.tsk = 2; req.call.fn = FN_WUP_TSK; req.call.arg0 = 1; #1;
    chk(rsp.rel && rsp.rel_slot == SLOT_SLP, "wup_tsk releases the sleep slot");
    @(posedge clk); #1; req = '0;
    req = '0; req.valid = 1; req.tsk = 0; req.call.fn = FN_SLP_TSK; req.release_mode = 1; #1;
    chk(rsp.valid && rsp.blocked, "T0 re-sleeps: no wakeup queued for it");
    @(posedge clk); #1; req = '0;
    call(2, FN_SLP_TSK, 0, 0, E_OK, "T2 consumes its wakeup");
    call(0, FN_CAN_WUP, 1, 0, 32'd1, "can_wup T1");
    call(0, FN_CAN_WUP, 1, 0, 32'd0, "can_wup T1 again");
    // suspend / resume
    call(0, FN_SUS_TSK, 1, 0, E_OK, "suspend T1");
    chk(suspended[1], "T1 suspended");
    call(0, FN_SUS_TSK, 1, 0, E_QOVR, "suspend T1 again");
    call(0, FN_RSM_TSK, 1, 0, E_OK, "resume T1");
    call(0, FN_RSM_TSK, 1, 0, E_OBJ, "resume running T1");
    // CPU lock
    req = '0; req.valid = 1; req.tsk = 1; req.call.fn = FN_LOC_CPU; #1;
    chk(cmd_lock && cmd_tsk == 1 && rsp.ret0 == E_OK, "loc_cpu");
    req.call.fn = FN_UNL_CPU; #1;
    chk(cmd_unlock && rsp.ret0 == E_OK, "unl_cpu");
    @(posedge clk); #1; req = '0;
    call(0, FN_REL_WAI, 1, 0, E_OBJ, "rel_wai of a task that does not wait");
    waiting[2] = 1;
    req = '0; req.valid = 1; req.tsk = 0; req.call.fn = FN_REL_WAI; req.call.arg0 = 2; #1;
    chk(rsp.valid && rsp.ret0 == E_OK && cmd_rlwai && cmd_tsk == 2, "rel_wai of waiting T2");
    @(posedge clk); #1; req = '0; waiting[2] = 0;
    req = '0; req.valid = 1; req.call.fn = FN_LOC_MTX; #1;
    chk(!rsp.valid, "mutex call ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
