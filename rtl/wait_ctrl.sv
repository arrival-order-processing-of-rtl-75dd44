// wait_ctrl: the WAIT module. Records which task waits for which service
// instance and drives the wait release of the request arbiter.
//
// Registers (as in the original design):
//   S_WAIT[t][i]  task t waits for wait slot i (a service instance)
//   R_WAIT[t]     task t is being released and may be re-examined
//   ORDER         order of the current release: 0 priority, 1 arrival
// Outputs: w[t] = OR of S_WAIT[t][*] (the arbiter blocks such a task),
// release = OR of R_WAIT[*] (the arbiter is in wait release mode), order.
//
// Updates come from the response of the active service module, in the cycle
// the arbiter strobes the request of task xt:
//   * blocked:  S_WAIT[xt][slot] is set and R_WAIT[xt] cleared. In release
//               mode this leaves the request waiting again, as the original
//               design does; in normal mode it starts the wait.
//   * complete: S_WAIT[xt][*] and R_WAIT[xt] are cleared (a task has one
//               outstanding call, so it waits on at most one slot).
//   * rel_end:  all R_WAIT are cleared (a service that dequeues one request
//               ends the release this way).
//   * rel:      R_WAIT[t] |= S_WAIT[t][rel_slot] for every t, after the
//               updates above, and ORDER takes rel_order.
// cancel_valid/cancel_tsk clear the S_WAIT row and R_WAIT bit of another
// task whose call is withdrawn (rel_wai, ter_tsk); it is applied first.
// Clearing the whole S_WAIT row on completion, the cancel input and applying
// rel after rel_end in the same cycle are choices of this design. Registers update on the
// clock edge after the response.
module wait_ctrl
  import rtos_pkg::*;
#(
  parameter int unsigned NTASK = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  svc_rsp_t          rsp,
  input  logic [TASK_W-1:0] rsp_tsk,
  input  logic              cancel_valid,
  input  logic [TASK_W-1:0] cancel_tsk,
  output logic [NTASK-1:0]  w,
  output logic [NTASK-1:0]  r_wait,
  output logic              release_mode,
  output logic              order,
  output logic [NSLOT-1:0]  s_wait [NTASK]
);

  logic [NSLOT-1:0] s_q [NTASK];
  logic [NSLOT-1:0] s_d [NTASK];
  logic [NTASK-1:0] r_q, r_d;
  logic             ord_q, ord_d;

  always_comb begin
    s_d   = s_q;
    r_d   = r_q;
    ord_d = ord_q;
    if (cancel_valid) begin
      for (int t = 0; t < NTASK; t++) begin
        if (TASK_W'(t) == cancel_tsk) begin
          s_d[t] = '0;
          r_d[t] = 1'b0;
        end
      end
    end
    if (rsp.valid) begin
      for (int t = 0; t < NTASK; t++) begin
        if (TASK_W'(t) == rsp_tsk) begin
          if (rsp.blocked) s_d[t][rsp.slot] = 1'b1;
          else             s_d[t] = '0;
          r_d[t] = 1'b0;
        end
      end
      if (rsp.rel_end) r_d = '0;
      if (rsp.rel) begin
        for (int t = 0; t < NTASK; t++)
          if (s_d[t][rsp.rel_slot]) r_d[t] = 1'b1;
        ord_d = rsp.rel_order;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTASK; t++) s_q[t] <= '0;
      r_q   <= '0;
      ord_q <= ORD_PRI;
    end else begin
      s_q   <= s_d;
      r_q   <= r_d;
      ord_q <= ord_d;
    end
  end

  always_comb begin
    for (int t = 0; t < NTASK; t++) w[t] = |s_q[t];
  end
  assign r_wait       = r_q;
  assign release_mode = |r_q;
  assign order        = ord_q;
  assign s_wait       = s_q;

  // R_WAIT only marks tasks that wait.
  property p_rwait_subset;
    @(posedge clk) disable iff (!rst_n) (r_q & ~w) == '0;
  endproperty
  a_rwait_subset: assert property (p_rwait_subset);

endmodule
