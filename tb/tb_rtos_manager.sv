// tb_rtos_manager: end-to-end test of the manager with its default
// configuration (4 tasks, priorities T0=1, T1=T2=2, T3=3; mutex 0 and
// eventflag 0 release in priority order, mutex 1 and eventflag 1 in arrival
// order, eventflag 1 with the clear attribute; 2 dataqueues of 10 words).
//
// Each task is modelled by a procedure that issues a call only while run[t]
// is high and then waits for ret_valid[t]. Completions are logged in order,
// and every scenario checks who completed, in which order and with what
// result, all worked out by hand from the service rules:
//   A  mutex 0: waiters released in priority order (T0 before T2 even
//      though T2 asked first);
//   B  mutex 1: waiters released in arrival order (T2 before T0);
//   C  normal arbitration: equal priorities served in arrival order, two
//      requests in one cycle, a request arriving as another completes;
//   D  eventflag 0 without clear: one release serves two waiters and
//      re-blocks a third whose condition does not hold;
//   E  eventflag 1 with clear: one release serves only the first arrival;
//   F  dataqueue: receiver waits for data, sender waits on a full queue;
//   G  shared variable, task control (sleep/wakeup, priorities,
//      suspend/resume, CPU lock, activation and termination, rel_wai and
//      termination of waiting tasks);
//   H  latency of a call that completes at once (4 cycles).
// Mechanisms counted: blocked call, release mode entered, release in
// priority order, release in arrival order, re-block during a release,
// simultaneous requests, request and completion in the same cycle, CPU lock.
module tb_rtos_manager;
  import rtos_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] call_valid, task_exit, ret_valid, run, activate, waiting;
  call_t call [N];
  logic [31:0] ret0 [N], ret1 [N];
  logic release_active, release_order;
  logic signed [AO_W-1:0] arrival_max;

  rtos_manager dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int log_q[$];
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_block = 0, n_release = 0, n_rel_pri = 0, n_rel_arr = 0, n_reblock = 0;
  int n_multi_req = 0, n_req_cmpl = 0, n_lock = 0;

  // Counted from the ports only: a task that starts waiting, a release
  // (and its order), a release that ends with a released task still
  // waiting, calls accepted together, a call accepted in the cycle another
  // completes, cycles with only one task allowed to run.
  logic [N-1:0] wait_d = '0, acc_d = '0;
  logic rel_d = 0;
  always @(posedge clk) if (rst_n) begin
    logic [N-1:0] acc;
    acc = call_valid & run;
    if ((waiting & ~wait_d) != 0) n_block++;
    if (release_active && !rel_d) begin
      n_release++;
      if (release_order == ORD_ARR) n_rel_arr++; else n_rel_pri++;
    end
    if (!release_active && rel_d && (waiting & wait_d) != 0) n_reblock++;
    if ($countones(acc) > 1) n_multi_req++;
    if (acc_d != 0 && ret_valid != 0) n_req_cmpl++;
    if ($countones(run) == 1) n_lock++;
    wait_d <= waiting;
    rel_d  <= release_active;
    acc_d  <= acc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One service call by task t; returns the two result words.
  task automatic svc(input int t, input fn_e fn, input int inst,
                     input logic [31:0] a0, input logic [31:0] a1,
                     output logic [31:0] r0, output logic [31:0] r1);
    while (!run[t]) @(posedge clk);
    #1;
    call[t] = '{fn: fn, inst: INST_W'(inst), arg0: a0, arg1: a1};
    call_valid[t] = 1'b1;
    @(posedge clk); #1;
    call_valid[t] = 1'b0;
    while (!ret_valid[t]) begin @(posedge clk); #1; end
    r0 = ret0[t]; r1 = ret1[t];
    log_q.push_back(t);
  endtask

  task automatic svc_ok(input int t, input fn_e fn, input int inst,
                        input logic [31:0] a0, input logic [31:0] a1, input string what);
    logic [31:0] r0, r1;
    svc(t, fn, inst, a0, a1, r0, r1);
    chk(r0 == E_OK, $sformatf("%s: T%0d got %0d", what, t, $signed(r0)));
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic expect_log(input int exp [$], input string what);
    chk(log_q == exp, $sformatf("%s: completion order %p expected %p", what, log_q, exp));
    log_q.delete();
  endtask

  initial begin
    logic [31:0] r0, r1;
    call_valid = '0; task_exit = '0;
    for (int t = 0; t < N; t++) call[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk(run == 4'b1111, "all tasks start");

    // ---------------- H: latency of an immediate call
    begin
      longint c0;
      #1;
      call[0] = '{fn: FN_GET_PRI, inst: 0, arg0: 0, arg1: 0};
      call_valid[0] = 1;
      @(posedge clk); c0 = cycle; #1; call_valid[0] = 0;
      while (!ret_valid[0]) begin @(posedge clk); #1; end
      chk(cycle - c0 == 4, $sformatf("immediate call latency %0d cycles, expected 4", cycle - c0));
      chk(ret0[0] == E_OK && ret1[0] == 1, "get_pri of T0 is 1");
      log_q.delete();
    end

    // ---------------- A: mutex 0, priority order release
    svc_ok(3, FN_LOC_MTX, 0, 0, 0, "T3 locks M0");
    fork
      svc_ok(2, FN_LOC_MTX, 0, 0, 0, "T2 gets M0");
      begin idle(6); svc_ok(0, FN_LOC_MTX, 0, 0, 0, "T0 gets M0"); end
      begin idle(14); chk(waiting == 4'b0101, "T0 and T2 wait on M0");
            svc_ok(3, FN_UNL_MTX, 0, 0, 0, "T3 unlocks M0");
            idle(10); svc_ok(0, FN_UNL_MTX, 0, 0, 0, "T0 unlocks M0"); end
    join
    expect_log('{3, 3, 0, 0, 2}, "mutex 0 priority order");
    svc_ok(2, FN_UNL_MTX, 0, 0, 0, "T2 unlocks M0");
    log_q.delete();

    // ---------------- B: mutex 1, arrival order release
    svc_ok(3, FN_LOC_MTX, 1, 0, 0, "T3 locks M1");
    fork
      svc_ok(2, FN_LOC_MTX, 1, 0, 0, "T2 gets M1");
      begin idle(6); svc_ok(0, FN_LOC_MTX, 1, 0, 0, "T0 gets M1"); end
      begin idle(14); svc_ok(3, FN_UNL_MTX, 1, 0, 0, "T3 unlocks M1");
            idle(10); svc_ok(2, FN_UNL_MTX, 1, 0, 0, "T2 unlocks M1"); end
    join
    expect_log('{3, 3, 2, 2, 0}, "mutex 1 arrival order");
    svc_ok(0, FN_UNL_MTX, 1, 0, 0, "T0 unlocks M1");
    log_q.delete();

    // ---------------- C: equal priority in arrival order (T2 before T1)
    fork
      svc_ok(3, FN_WR_VAR, 0, 5, 32'h55, "T3 writes var 5");
      begin idle(1); svc_ok(2, FN_WR_VAR, 0, 6, 32'h66, "T2 writes var 6"); end
      begin idle(2); svc_ok(1, FN_WR_VAR, 0, 7, 32'h77, "T1 writes var 7"); end
    join
    expect_log('{3, 2, 1}, "same priority, arrival order");
    // Two requests in one cycle, and a request arriving with a completion.
    fork
      svc_ok(0, FN_WR_VAR, 0, 1, 32'h11, "T0 writes var 1");
      svc_ok(1, FN_WR_VAR, 0, 2, 32'h22, "T1 writes var 2");
      begin idle(3); svc_ok(2, FN_WR_VAR, 0, 3, 32'h33, "T2 writes var 3"); end
    join
    expect_log('{0, 1, 2}, "simultaneous requests");
    svc(0, FN_RD_VAR, 0, 6, 0, r0, r1);
    chk(r0 == E_OK && r1 == 32'h66, "shared variable read back");
    svc(0, FN_RD_VAR, 0, 40, 0, r0, r1);
    chk(r0 == E_PAR, "shared variable address check");
    log_q.delete();

    // ---------------- D: eventflag 0, no clear attribute, priority order
    fork
      begin svc(3, FN_WAI_FLG, 0, 32'h4, TWF_ANDW, r0, r1);
            chk(r0 == E_OK && r1 == 32'h7, "T3 released by second set"); end
      begin idle(1); svc(2, FN_WAI_FLG, 0, 32'h2, TWF_ORW, r0, r1);
            chk(r0 == E_OK && r1 == 32'h3, "T2 sees pattern 3"); end
      begin idle(2); svc(1, FN_WAI_FLG, 0, 32'h1, TWF_ORW, r0, r1);
            chk(r0 == E_OK && r1 == 32'h3, "T1 sees pattern 3"); end
      begin idle(20); svc_ok(0, FN_SET_FLG, 0, 32'h3, 0, "T0 sets 3");
            idle(20); svc_ok(0, FN_SET_FLG, 0, 32'h4, 0, "T0 sets 4"); end
    join
    // T1 and T2 share priority 2, so the priority-order release takes the
    // earlier arrival (T2) first.
    expect_log('{0, 2, 1, 0, 3}, "eventflag 0 releases T2 then T1, T3 later");
    svc_ok(0, FN_CLR_FLG, 0, 0, 0, "clear flag 0");
    log_q.delete();

    // ---------------- E: eventflag 1, clear attribute, arrival order
    fork
      begin svc(1, FN_WAI_FLG, 1, 32'h1, TWF_ORW, r0, r1); chk(r0 == E_OK, "T1 flag 1"); end
      begin idle(6); svc(0, FN_WAI_FLG, 1, 32'h1, TWF_ORW, r0, r1); chk(r0 == E_OK, "T0 flag 1"); end
      begin idle(16); svc_ok(3, FN_SET_FLG, 1, 32'h1, 0, "T3 sets flag 1");
            idle(12); chk(waiting == 4'b0001, "T0 still waits after clear");
            svc_ok(3, FN_SET_FLG, 1, 32'h1, 0, "T3 sets flag 1 again"); end
    join
    expect_log('{3, 1, 3, 0}, "eventflag 1 clear attribute, arrival order");
    svc(2, FN_POL_FLG, 1, 32'h1, TWF_ORW, r0, r1);
    chk(r0 == E_TMOUT, "flag 1 cleared by the release");
    log_q.delete();

    // ---------------- F: dataqueue 0
    fork
      begin svc(1, FN_RCV_DTQ, 0, 0, 0, r0, r1); chk(r0 == E_OK && r1 == 100, "T1 receives 100"); end
      begin idle(10); svc_ok(3, FN_SND_DTQ, 0, 100, 0, "T3 sends 100"); end
    join
    expect_log('{3, 1}, "receiver waits for data");
    for (int k = 0; k < 10; k++) svc_ok(3, FN_SND_DTQ, 0, 200 + k, 0, "fill queue");
    svc(3, FN_PSND_DTQ, 0, 999, 0, r0, r1);
    chk(r0 == E_TMOUT, "queue full");
    log_q.delete();
    fork
      svc_ok(3, FN_SND_DTQ, 0, 210, 0, "T3 sends into full queue");
      begin idle(10); chk(waiting == 4'b1000, "T3 waits on full queue");
            for (int k = 0; k < 11; k++) begin
              svc(1, FN_RCV_DTQ, 0, 0, 0, r0, r1);
              chk(r0 == E_OK && r1 == 200 + k, $sformatf("receive %0d", 200 + k));
            end
      end
    join
    chk(log_q[0] == 1 && log_q[1] == 3, "sender released by first receive");
    log_q.delete();

    // ---------------- G: task control
    fork
      svc_ok(2, FN_SLP_TSK, 0, 0, 0, "T2 woken");
      begin idle(8); svc_ok(0, FN_WUP_TSK, 0, 2, 0, "wake T2"); end
    join
    expect_log('{0, 2}, "sleep and wakeup");
    svc_ok(0, FN_WUP_TSK, 0, 1, 0, "queue a wakeup for T1");
    svc_ok(1, FN_SLP_TSK, 0, 0, 0, "T1 sleeps on a queued wakeup");
    svc_ok(0, FN_CHG_PRI, 0, 3, 0, "raise T3 to priority 0");
    svc(1, FN_GET_PRI, 0, 3, 0, r0, r1);
    chk(r0 == E_OK && r1 == 0, "T3 priority now 0");
    svc_ok(0, FN_SUS_TSK, 0, 2, 0, "suspend T2");
    idle(2); chk(!run[2], "T2 stopped while suspended");
    svc_ok(0, FN_RSM_TSK, 0, 2, 0, "resume T2");
    idle(2); chk(run[2], "T2 runs again");
    svc_ok(1, FN_LOC_CPU, 0, 0, 0, "T1 locks the CPU");
    idle(2); chk(run == 4'b0010, "only T1 runs under the CPU lock");
    svc_ok(1, FN_UNL_CPU, 0, 0, 0, "T1 unlocks the CPU");
    idle(2); chk(run == 4'b1111, "all run after unlock");
    svc_ok(1, FN_LOC_CPU, 0, 0, 0, "T1 locks the CPU again");
    idle(2); chk(run == 4'b0010, "only T1 runs");
    #1 task_exit[1] = 1; @(posedge clk); #1 task_exit[1] = 0;
    idle(2); chk(run == 4'b1101, "lock dropped when T1 ends");
    svc_ok(0, FN_ACT_TSK, 0, 1, 0, "activate T1 again");
    idle(2); chk(run == 4'b1111, "T1 runs again");
    svc_ok(0, FN_TER_TSK, 0, 3, 0, "terminate T3");
    idle(2); chk(!run[3], "T3 dormant");
    svc(1, FN_GET_PRI, 0, 3, 0, r0, r1);
    chk(r0 == E_OBJ, "get_pri of dormant task");
    svc_ok(0, FN_ACT_TSK, 0, 3, 0, "activate T3");
    idle(2); chk(run[3], "T3 runs after activation");
    svc_ok(0, FN_ACT_TSK, 0, 3, 0, "queue an activation of T3");
    #1 task_exit[3] = 1; @(posedge clk); #1 task_exit[3] = 0;
    idle(2); chk(run[3], "T3 restarted from queued activation");
    svc(3, FN_GET_PRI, 0, 3, 0, r0, r1);
    chk(r0 == E_OK && r1 == 3, "priority back to initial on restart");
    #1 task_exit[3] = 1; @(posedge clk); #1 task_exit[3] = 0;
    idle(2); chk(!run[3], "T3 dormant after exit");
    // Forced release and termination of waiting tasks.
    svc(0, FN_REL_WAI, 0, 1, 0, r0, r1);
    chk(r0 == E_OBJ, "rel_wai of a task that does not wait");
    log_q.delete();
    fork
      begin svc(1, FN_RCV_DTQ, 1, 0, 0, r0, r1); chk(r0 == E_RLWAI, "T1's wait ended by rel_wai"); end
      begin svc(2, FN_SLP_TSK, 0, 0, 0, r0, r1); chk(r0 == E_RLWAI, "T2's sleep ended by rel_wai"); end
      begin idle(10); chk(waiting == 4'b0110, "T1 and T2 wait");
            svc_ok(0, FN_REL_WAI, 0, 1, 0, "release T1");
            svc_ok(0, FN_REL_WAI, 0, 2, 0, "release T2"); end
    join
    idle(2);
    chk(waiting == 0 && arrival_max == -1, "no waits or outstanding calls left");
    svc_ok(0, FN_ACT_TSK, 0, 3, 0, "activate T3 again");
    fork
      begin
        while (!run[3]) @(posedge clk);
        #1 call[3] = '{fn: FN_RCV_DTQ, inst: 1, arg0: 0, arg1: 0};
        call_valid[3] = 1; @(posedge clk); #1 call_valid[3] = 0;
      end
      begin idle(10); chk(waiting == 4'b1000, "T3 waits on dataqueue 1");
            svc_ok(0, FN_TER_TSK, 0, 3, 0, "terminate waiting T3"); end
    join
    idle(2);
    chk(!run[3] && waiting == 0 && arrival_max == -1, "terminated T3 left no wait behind");
    svc_ok(0, FN_SND_DTQ, 1, 77, 0, "send to dataqueue 1");
    svc(1, FN_RCV_DTQ, 1, 0, 0, r0, r1);
    chk(r0 == E_OK && r1 == 77, "data not taken by the terminated task");
    svc(0, fn_e'(8'h7F), 0, 0, 0, r0, r1);
    chk(r0 == E_NOSPT, "unknown function code");

    idle(5);
    chk(arrival_max == -1, "no outstanding calls left");
    $display("blocked=%0d releases=%0d rel_pri_sel=%0d rel_arr_sel=%0d reblock=%0d multi_req=%0d req_and_cmpl=%0d lock_cycles=%0d",
             n_block, n_release, n_rel_pri, n_rel_arr, n_reblock, n_multi_req, n_req_cmpl, n_lock);
    chk(n_block > 0,     "mechanism: blocked call");
    chk(n_release > 0,   "mechanism: wait release mode");
    chk(n_rel_pri > 0,   "mechanism: release in priority order");
    chk(n_rel_arr > 0,   "mechanism: release in arrival order");
    chk(n_reblock > 0,   "mechanism: re-block during release");
    chk(n_multi_req > 0, "mechanism: simultaneous requests");
    chk(n_req_cmpl > 0,  "mechanism: request and completion in one cycle");
    chk(n_lock > 0,      "mechanism: CPU lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
