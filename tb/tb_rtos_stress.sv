// tb_rtos_stress: random traffic through the whole manager at its default
// configuration. T3 is a producer and T0..T2 are consumers.
//
//   * T3 sends K numbered words into dataqueue 0. It sends them quickly at
//     first, so the queue fills and T3 waits on the send side. Later it
//     pauses at random, so consumers wait on the receive side. It ends with
//     one stop word per consumer.
//   * Each consumer receives (blocking, or now and then polling) until it gets
//     a stop word. After a word it may, at random, lock a random mutex,
//     read-modify-write the shared variable word of that mutex and unlock.
//
// Checks:
//   * The words come out once each and in the order they were sent.
//   * A mutex never has two holders.
//   * Each shared word ends equal to the number of increments made to it.
//   * Every call returns E_OK, or E_TMOUT for a poll.
//   * In every cycle the arrival recorder's MO equals the number of
//     outstanding calls minus one, and a waiting task always has an
//     outstanding call.
//   * At the end nothing waits and MO is -1.
// Blocked calls, wait releases and simultaneous requests are counted, and a
// mechanism that never happened is a failure.
module tb_rtos_stress;
  import rtos_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned K = 200;
  localparam logic [31:0] STOP = 32'hFFFF_FFFF;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] call_valid, task_exit, ret_valid, run, activate, waiting;
  call_t call [N];
  logic [31:0] ret0 [N], ret1 [N];
  logic release_active, release_order;
  logic signed [AO_W-1:0] arrival_max;

  rtos_manager dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_block = 0, n_release = 0, n_multi_req = 0;
  logic [N-1:0] wait_d = '0;
  logic rel_d = 0;
  logic [N-1:0] out_m = '0;   // tasks with an outstanding call (model)

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // A call is outstanding from the edge that accepts it until ret_valid.
  always @(posedge clk) if (rst_n) begin
    if ($countones(call_valid & run) > 1) n_multi_req++;
    if ((waiting & ~wait_d) != 0) n_block++;
    if (release_active && !rel_d) n_release++;
    wait_d = waiting;
    rel_d  = release_active;
    for (int t = 0; t < N; t++) if (call_valid[t] && run[t]) out_m[t] = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    for (int t = 0; t < N; t++) if (ret_valid[t]) out_m[t] = 1'b0;
    checks++;
    if (32'(signed'(arrival_max)) != $countones(out_m) - 1) begin
      failures++;
      $display("FAIL MO %0d with %0d calls outstanding", arrival_max, $countones(out_m));
    end
    checks++;
    if ((waiting & ~out_m) != 0) begin failures++; $display("FAIL waiting task without a call"); end
  end

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
  endtask

  task automatic svc_ok(input int t, input fn_e fn, input int inst,
                        input logic [31:0] a0, input logic [31:0] a1,
                        output logic [31:0] r1, input string what);
    logic [31:0] r0;
    svc(t, fn, inst, a0, a1, r0, r1);
    chk(r0 == E_OK, $sformatf("%s: T%0d got %0d", what, t, $signed(r0)));
  endtask

  logic [31:0] recv_q[$];
  int  owner [2] = '{-1, -1};
  int  incs [2] = '{0, 0};
  bit  init_done = 0;

  task automatic producer();
    logic [31:0] r1;
    for (int i = 0; i < K; i++) begin
      if (i >= 60) repeat ($urandom_range(0, 30)) @(posedge clk);
      svc_ok(3, FN_SND_DTQ, 0, 32'(i), 0, r1, "send");
    end
    for (int c = 0; c < 3; c++) svc_ok(3, FN_SND_DTQ, 0, STOP, 0, r1, "send stop");
  endtask

  task automatic consumer(input int t);
    logic [31:0] r0, r1, v;
    int m;
    while (!init_done) @(posedge clk);
    forever begin
      if ($urandom_range(0, 4) == 0) begin
        svc(t, FN_PRCV_DTQ, 0, 0, 0, r0, r1);
        chk(r0 == E_OK || r0 == E_TMOUT, $sformatf("prcv_dtq T%0d: %0d", t, $signed(r0)));
        if (r0 != E_OK) continue;
      end else begin
        svc_ok(t, FN_RCV_DTQ, 0, 0, 0, r1, "rcv_dtq");
      end
      if (r1 == STOP) break;
      recv_q.push_back(r1);
      if ($urandom_range(0, 1) == 0) begin
        m = $urandom_range(0, 1);
        svc_ok(t, FN_LOC_MTX, m, 0, 0, r1, "loc_mtx");
        chk(owner[m] == -1, $sformatf("mutex %0d held by T%0d and T%0d", m, owner[m], t));
        owner[m] = t;
        svc_ok(t, FN_RD_VAR, 0, 32'(m), 0, v, "rd_var");
        repeat ($urandom_range(0, 3)) @(posedge clk);
        svc_ok(t, FN_WR_VAR, 0, 32'(m), v + 1, r1, "wr_var");
        incs[m]++;
        chk(owner[m] == t, "mutex owner unchanged");
        owner[m] = -1;
        svc_ok(t, FN_UNL_MTX, m, 0, 0, r1, "unl_mtx");
      end
    end
  endtask

  initial begin
    logic [31:0] r1;
    call_valid = '0; task_exit = '0;
    for (int t = 0; t < N; t++) call[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    svc_ok(0, FN_WR_VAR, 0, 0, 0, r1, "clear word 0");
    svc_ok(0, FN_WR_VAR, 0, 1, 0, r1, "clear word 1");
    init_done = 1;
    fork
      producer();
      consumer(0);
      consumer(1);
      consumer(2);
    join
    repeat (4) @(posedge clk);
    chk(recv_q.size() == K, $sformatf("received %0d words of %0d", recv_q.size(), K));
    for (int i = 0; i < recv_q.size(); i++)
      if (recv_q[i] != 32'(i)) begin
        chk(0, $sformatf("word %0d is %0d", i, recv_q[i]));
        break;
      end
    for (int m = 0; m < 2; m++) begin
      svc_ok(0, FN_RD_VAR, 0, 32'(m), 0, r1, "read counter");
      chk(r1 == 32'(incs[m]), $sformatf("word %0d is %0d after %0d increments", m, r1, incs[m]));
    end
    repeat (4) @(posedge clk);
    chk(waiting == 0 && arrival_max == -1 && !release_active, "idle at the end");
    $display("blocked=%0d releases=%0d multi_req=%0d increments=%0d/%0d",
             n_block, n_release, n_multi_req, incs[0], incs[1]);
    chk(n_block > 0,     "mechanism: blocked call");
    chk(n_release > 0,   "mechanism: wait release");
    chk(n_multi_req > 0, "mechanism: simultaneous requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
