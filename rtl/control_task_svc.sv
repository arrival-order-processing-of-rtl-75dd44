// control_task_svc: task control service module (TOPPERS/ASP3 style
// act_tsk, can_act, ter_tsk, chg_pri, get_pri, slp_tsk, wup_tsk, can_wup,
// rel_wai, sus_tsk, rsm_tsk, loc_cpu, unl_cpu).
//
// It holds the per-task activation request count and wakeup request count
// (one queued request each) and drives commands to the manager's STATUS and
// priority registers: activate a dormant task, terminate a task, set a
// priority, set/clear the suspended bit, take/free the CPU lock. Task ids in
// arg0 are plain 0-based ids. slp_tsk consumes a queued wakeup or waits on the
// sleep slot; wup_tsk queues a wakeup and releases the sleep slot, and in
// that release each sleeping task's slp_tsk is re-sent and only the one with
// a queued wakeup completes. rel_wai forcibly ends the wait of a waiting
// task (cmd_rlwai: the manager completes that task's call with E_RLWAI);
// ter_tsk makes a task dormant and, if it has an outstanding call, has the
// manager withdraw it. Both act on a call other than XT's, in the strobe
// cycle, so they never collide with the arbiter's own completion, which comes
// a cycle later. When a task ends (ter_tsk or its own exit) with an
// activation queued, the manager restarts it at once. Mutexes held by a
// terminated task stay locked.
//
// The document names these services only; the behaviour, codes and limits
// are this design's reading of TOPPERS/ASP3, reduced as said above. Answer
// is combinational in the strobe cycle; counts update on the next edge.
module control_task_svc
  import rtos_pkg::*;
#(
  parameter int unsigned NTASK = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  svc_req_t          req,
  output svc_rsp_t          rsp,
  // task state seen by the services
  input  logic [NTASK-1:0]  dormant,
  input  logic [NTASK-1:0]  suspended,
  input  logic [NTASK-1:0]  waiting,
  input  logic [PRI_W-1:0]  pri [NTASK],
  input  logic [NTASK-1:0]  task_end,   // task leaves the running state (exit or ter_tsk)
  // commands to the manager
  output logic              cmd_act,
  output logic              cmd_ter,
  output logic              cmd_rlwai,
  output logic              cmd_pri,
  output logic              cmd_sus,
  output logic              cmd_rsm,
  output logic              cmd_lock,
  output logic              cmd_unlock,
  output logic [TASK_W-1:0] cmd_tsk,
  output logic [PRI_W-1:0]  cmd_pri_val,
  output logic [NTASK-1:0]  actcnt
);

  logic [NTASK-1:0] actcnt_q, wupcnt_q;
  logic [NTASK-1:0] act_set, act_clr, wup_set, wup_clr;

  logic             sel, id_ok;
  int unsigned      id;
  logic [NTASK-1:0] tgt;

  assign sel   = req.valid && (req.call.fn[7:4] == SVC_TASK);
  assign id    = (req.call.arg0 < 32'(NTASK)) ? int'(req.call.arg0) : 0;
  assign id_ok = req.call.arg0 < 32'(NTASK);
  assign tgt   = NTASK'(1) << id;

  always_comb begin
    int unsigned self;
    self        = int'(req.tsk);
    rsp         = RSP_NONE;
    cmd_act     = 1'b0;
    cmd_ter     = 1'b0;
    cmd_rlwai   = 1'b0;
    cmd_pri     = 1'b0;
    cmd_sus     = 1'b0;
    cmd_rsm     = 1'b0;
    cmd_lock    = 1'b0;
    cmd_unlock  = 1'b0;
    cmd_tsk     = TASK_W'(id);
    cmd_pri_val = PRI_W'(req.call.arg1);
    act_set     = '0;
    act_clr     = '0;
    wup_set     = '0;
    wup_clr     = '0;
    if (sel) begin
      unique case (req.call.fn)
        FN_SLP_TSK: begin
          cmd_tsk = req.tsk;
          if (wupcnt_q[self]) begin
            rsp     = rsp_done(E_OK, 0);
            wup_clr = NTASK'(1) << self;
          end else begin
            rsp = rsp_wait(SLOT_SLP);
          end
        end
        FN_LOC_CPU: begin
          cmd_tsk  = req.tsk;
          cmd_lock = 1'b1;
          rsp      = rsp_done(E_OK, 0);
        end
        FN_UNL_CPU: begin
          cmd_tsk    = req.tsk;
          cmd_unlock = 1'b1;
          rsp        = rsp_done(E_OK, 0);
        end
        default: begin
          if (!id_ok) begin
            rsp = rsp_done(E_ID, 0);
          end else begin
            unique case (req.call.fn)
              FN_ACT_TSK:
                if (dormant[id]) begin
                  rsp = rsp_done(E_OK, 0); cmd_act = 1'b1;
                end else if (!actcnt_q[id]) begin
                  rsp = rsp_done(E_OK, 0); act_set = tgt;
                end else rsp = rsp_done(E_QOVR, 0);
              FN_CAN_ACT: begin
                rsp = rsp_done(32'(actcnt_q[id]), 0); act_clr = tgt;
              end
              FN_TER_TSK:
                if (id == self)                  rsp = rsp_done(E_ILUSE, 0);
                else if (dormant[id])            rsp = rsp_done(E_OBJ, 0);
                else begin rsp = rsp_done(E_OK, 0); cmd_ter = 1'b1; end
              FN_REL_WAI:
                if (waiting[id]) begin rsp = rsp_done(E_OK, 0); cmd_rlwai = 1'b1; end
                else             rsp = rsp_done(E_OBJ, 0);
              FN_CHG_PRI:
                if (req.call.arg1 >= 32'(1 << PRI_W)) rsp = rsp_done(E_PAR, 0);
                else if (dormant[id])                 rsp = rsp_done(E_OBJ, 0);
                else begin rsp = rsp_done(E_OK, 0); cmd_pri = 1'b1; end
              FN_GET_PRI:
                if (dormant[id]) rsp = rsp_done(E_OBJ, 0);
                else             rsp = rsp_done(E_OK, 32'(pri[id]));
              FN_WUP_TSK:
                if (dormant[id])        rsp = rsp_done(E_OBJ, 0);
                else if (wupcnt_q[id])  rsp = rsp_done(E_QOVR, 0);
                else begin
                  rsp           = rsp_done(E_OK, 0);
                  wup_set       = tgt;
                  rsp.rel       = 1'b1;
                  rsp.rel_slot  = SLOT_W'(SLOT_SLP);
                  rsp.rel_order = ORD_ARR;
                end
              FN_CAN_WUP: begin
                rsp = rsp_done(32'(wupcnt_q[id]), 0); wup_clr = tgt;
              end
              FN_SUS_TSK:
                if (dormant[id])        rsp = rsp_done(E_OBJ, 0);
                else if (suspended[id]) rsp = rsp_done(E_QOVR, 0);
                else begin rsp = rsp_done(E_OK, 0); cmd_sus = 1'b1; end
              FN_RSM_TSK:
                if (!suspended[id]) rsp = rsp_done(E_OBJ, 0);
                else begin rsp = rsp_done(E_OK, 0); cmd_rsm = 1'b1; end
              default: rsp = rsp_done(E_NOSPT, 0);
            endcase
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      actcnt_q <= '0;
      wupcnt_q <= '0;
    end else begin
      actcnt_q <= (actcnt_q & ~act_clr & ~task_end) | act_set;
      wupcnt_q <= (wupcnt_q & ~wup_clr & ~task_end) | wup_set;
    end
  end

  assign actcnt = actcnt_q;

endmodule
