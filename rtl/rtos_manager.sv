// rtos_manager: the manager of a fully hardware RTOS-based system. Every
// task is its own hardware block running in parallel; this module gives them
// the RTOS: it runs and stops tasks and executes their service calls, one at
// a time, with waiting tasks released in priority order or in arrival order
// as each service instance chooses.
//
// Structure (after the architecture it implements):
//   TF/TA       one call register pair per task; a task writes a call and is
//               stopped until the result is written back to TA.
//   ARRIVAL     arrival_order: the order in which outstanding calls came in.
//   order sw.   order_switch: arbitration key {pri, ao} or {ao, pri}.
//   RA          request_arbiter: normal mode / wait release mode, XT/XF/XA.
//   WAIT        wait_ctrl: S_WAIT, R_WAIT, ORDER; w_t and release to the RA.
//   services    control_task_svc, shared_var_svc, mutex_svc, eventflag_svc,
//               dataqueue_svc, all listening to XT/XF/XA; the one that owns
//               the function code answers.
//   STATUS      dormant and suspended bits, current priorities, CPU lock.
// In normal mode the key order is always priority (ties by arrival); during a
// release it is the order the releasing service gave.
//
// Task interface, per task t: call_valid[t] with call[t] is accepted when the
// task has no outstanding call and is not dormant (one-cycle strobe). The
// result comes back as ret_valid[t] with ret0[t] (return code) and ret1[t]
// (data). run[t] is high while the task may execute: not dormant, not
// suspended, no outstanding call, and no other task holds the CPU lock.
// task_exit[t] ends the task (it becomes dormant, or restarts at once if an
// activation is queued); activate[t] pulses when a task is started.
// A call that completes at once, with nothing else outstanding, is accepted
// on the edge that samples call_valid and returns ret_valid (with the result
// already in TA and run high again) 4 cycles later: select, execute, return,
// write-back. A call that has to wait is selected and executed, then stays
// outstanding until a release lets its service complete it, or until another
// task's rel_wai ends it (ret_valid with E_RLWAI one cycle after that call
// executes) or its ter_tsk withdraws it.
//
// The way calls are encoded, the timing, the STATUS encoding and the CPU
// lock behaviour (only the locking task runs and is served; the lock is
// dropped when that task ends) are choices of this design.
module rtos_manager
  import rtos_pkg::*;
#(
  parameter int unsigned             NTASK      = 4,
  parameter logic [NTASK*PRI_W-1:0]  INIT_PRI   = {4'd3, 4'd2, 4'd2, 4'd1},  // task 3 .. task 0
  parameter logic [NTASK-1:0]        AUTOSTART  = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTASK-1:0]  call_valid,
  input  call_t             call [NTASK],
  input  logic [NTASK-1:0]  task_exit,
  output logic [NTASK-1:0]  ret_valid,
  output logic [31:0]       ret0 [NTASK],
  output logic [31:0]       ret1 [NTASK],
  output logic [NTASK-1:0]  run,
  output logic [NTASK-1:0]  activate,
  // observation
  output logic [NTASK-1:0]  waiting,
  output logic              release_active,
  output logic              release_order,  // ORDER of the WAIT module
  output logic signed [AO_W-1:0] arrival_max   // MO of the recorder
);

  // ---------------------------------------------------------------- TF / TA
  call_t             tfta_q [NTASK];
  logic [NTASK-1:0]  pending_q;
  logic [NTASK-1:0]  accept;

  // ---------------------------------------------------------------- STATUS
  logic [NTASK-1:0]  dormant_q, suspended_q;
  logic [PRI_W-1:0]  pri_q [NTASK];
  logic              locked_q;
  logic [TASK_W-1:0] locker_q;

  // ---------------------------------------------------------------- wires
  logic signed [AO_W-1:0] ao [NTASK];
  logic signed [AO_W-1:0] mo;
  logic [KEY_W-1:0]  key [NTASK];
  logic [NTASK-1:0]  w, r_wait, allow;
  logic              rel_mode, rel_order_bit;
  svc_req_t          req;
  svc_rsp_t          rsp, rsp_task, rsp_var, rsp_mtx, rsp_flg, rsp_dtq;
  logic              ra_ret_valid;
  logic [TASK_W-1:0] ra_ret_tsk;
  logic [31:0]       ra_ret0, ra_ret1;

  logic              cmd_act, cmd_ter, cmd_rlwai, cmd_pri, cmd_sus, cmd_rsm, cmd_lock, cmd_unlock;
  logic [TASK_W-1:0] cmd_tsk;
  logic [PRI_W-1:0]  cmd_pri_val;
  logic [NTASK-1:0]  actcnt, task_end, ter_vec, act_vec;

  assign accept = call_valid & ~pending_q & ~dormant_q;

  // A call withdrawn by another task's rel_wai or ter_tsk. It is applied in
  // the strobe cycle; the arbiter's own completion comes one cycle later, so
  // the recorder sees at most one completion per cycle.
  logic              cancel, cancel_ret;
  logic              cmpl_valid;
  logic [TASK_W-1:0] cmpl_tsk;
  assign cancel_ret = cmd_rlwai;
  assign cancel     = cmd_rlwai || (cmd_ter && pending_q[cmd_tsk]);
  assign cmpl_valid = ra_ret_valid || cancel;
  assign cmpl_tsk   = cancel ? cmd_tsk : ra_ret_tsk;

  // ---------------------------------------------------------------- blocks
  arrival_order #(.NTASK(NTASK)) u_arrival (
    .clk, .rst_n,
    .req_new    (accept),
    .cmpl_valid,
    .cmpl_tsk,
    .ao, .mo
  );

  order_switch #(.NTASK(NTASK)) u_order (
    .order (rel_mode ? rel_order_bit : ORD_PRI),
    .pri   (pri_q),
    .ao,
    .key
  );

  always_comb begin
    for (int t = 0; t < NTASK; t++)
      allow[t] = !locked_q || (locker_q == TASK_W'(t));
  end

  request_arbiter #(.NTASK(NTASK)) u_ra (
    .clk, .rst_n,
    .pending      (pending_q),
    .tf_ta        (tfta_q),
    .allow,
    .w,
    .r_wait,
    .release_mode (rel_mode),
    .key,
    .req,
    .rsp,
    .ret_valid    (ra_ret_valid),
    .ret_tsk      (ra_ret_tsk),
    .ret0         (ra_ret0),
    .ret1         (ra_ret1)
  );

  wait_ctrl #(.NTASK(NTASK)) u_wait (
    .clk, .rst_n,
    .rsp,
    .rsp_tsk      (req.tsk),
    .cancel_valid (cancel),
    .cancel_tsk   (cmd_tsk),
    .w,
    .r_wait,
    .release_mode (rel_mode),
    .order        (rel_order_bit),
    .s_wait       ()
  );

  control_task_svc #(.NTASK(NTASK)) u_control_task (
    .clk, .rst_n, .req, .rsp (rsp_task),
    .dormant (dormant_q), .suspended (suspended_q), .waiting (w),
    .pri (pri_q), .task_end,
    .cmd_act, .cmd_ter, .cmd_rlwai, .cmd_pri, .cmd_sus, .cmd_rsm, .cmd_lock, .cmd_unlock,
    .cmd_tsk, .cmd_pri_val, .actcnt
  );

  shared_var_svc u_shared_variable (.clk, .rst_n, .req, .rsp (rsp_var));
  mutex_svc      u_mutex           (.clk, .rst_n, .req, .rsp (rsp_mtx));
  eventflag_svc  u_eventflag       (.clk, .rst_n, .req, .rsp (rsp_flg));
  dataqueue_svc  u_dataqueue       (.clk, .rst_n, .req, .rsp (rsp_dtq));

  // Only the module that owns the function code answers.
  assign rsp = rsp_task | rsp_var | rsp_mtx | rsp_flg | rsp_dtq;

  // ---------------------------------------------------------------- TF/TA regs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= '0;
      for (int t = 0; t < NTASK; t++) tfta_q[t] <= '0;
    end else begin
      for (int t = 0; t < NTASK; t++) begin
        if (accept[t]) begin
          tfta_q[t]    <= call[t];
          pending_q[t] <= 1'b1;
        end else if (ra_ret_valid && ra_ret_tsk == TASK_W'(t)) begin
          tfta_q[t].arg0 <= ra_ret0;
          tfta_q[t].arg1 <= ra_ret1;
          pending_q[t]   <= 1'b0;
        end else if (cancel && cmd_tsk == TASK_W'(t)) begin
          tfta_q[t].arg0 <= E_RLWAI;
          tfta_q[t].arg1 <= '0;
          pending_q[t]   <= 1'b0;
        end
      end
    end
  end

  // The return strobe comes with the result in TA, as the task resumes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ret_valid <= '0;
    end else begin
      for (int t = 0; t < NTASK; t++)
        ret_valid[t] <= (ra_ret_valid && (ra_ret_tsk == TASK_W'(t))) ||
                        (cancel_ret && (cmd_tsk == TASK_W'(t)));
    end
  end

  always_comb begin
    for (int t = 0; t < NTASK; t++) begin
      ret0[t] = tfta_q[t].arg0;
      ret1[t] = tfta_q[t].arg1;
    end
  end

  // ---------------------------------------------------------------- STATUS
  assign ter_vec  = cmd_ter ? (NTASK'(1) << cmd_tsk) : '0;
  assign act_vec  = cmd_act ? (NTASK'(1) << cmd_tsk) : '0;
  assign task_end = (task_exit & ~dormant_q & ~pending_q) | ter_vec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dormant_q   <= ~AUTOSTART;
      suspended_q <= '0;
      activate    <= AUTOSTART;
      locked_q    <= 1'b0;
      locker_q    <= '0;
      for (int t = 0; t < NTASK; t++) pri_q[t] <= INIT_PRI[t*PRI_W +: PRI_W];
    end else begin
      for (int t = 0; t < NTASK; t++) begin
        activate[t] <= 1'b0;
        if (task_end[t]) begin
          // restart at once when an activation is queued
          dormant_q[t]   <= !actcnt[t];
          activate[t]    <= actcnt[t];
          suspended_q[t] <= 1'b0;
          pri_q[t]       <= INIT_PRI[t*PRI_W +: PRI_W];
        end else if (act_vec[t]) begin
          dormant_q[t] <= 1'b0;
          activate[t]  <= 1'b1;
          pri_q[t]     <= INIT_PRI[t*PRI_W +: PRI_W];
        end
        if (cmd_pri && cmd_tsk == TASK_W'(t)) pri_q[t] <= cmd_pri_val;
        if (cmd_sus && cmd_tsk == TASK_W'(t)) suspended_q[t] <= 1'b1;
        if (cmd_rsm && cmd_tsk == TASK_W'(t)) suspended_q[t] <= 1'b0;
      end
      if (cmd_lock) begin
        locked_q <= 1'b1;
        locker_q <= cmd_tsk;
      end else if (cmd_unlock || task_end[locker_q]) begin
        // unl_cpu, or the locking task ends while it holds the lock
        locked_q <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int t = 0; t < NTASK; t++)
      run[t] = !dormant_q[t] && !suspended_q[t] && !pending_q[t] && allow[t];
  end

  assign waiting        = w;
  assign release_active = rel_mode;
  assign release_order  = rel_order_bit;

  assign arrival_max    = mo;

endmodule
