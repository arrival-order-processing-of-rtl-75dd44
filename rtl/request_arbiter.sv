// request_arbiter: the request arbiter (RA). Picks one outstanding service
// call at a time, hands it to the service modules through the XT/XF/XA
// registers and returns the result to the calling task.
//
// Two modes, chosen by the WAIT module's release output:
//   normal mode   candidates are tasks with an outstanding call whose w_t is
//                 0 (a waiting task's call stays blocked);
//   release mode  candidates are only tasks with R_WAIT[t] = 1, so no new
//                 call can slip in before the wait release has finished.
// Among the candidates the smallest key from order_switch wins (priority then
// arrival, or arrival then priority); equal keys go to the lower task id.
// The two modes and the key comparison follow the original design.
//
// Timing, a choice of this design: one call takes three cycles.
//   SELECT  winner latched into XT, its TF/TA into XF/XA, mode recorded;
//   EXEC    req.valid = 1; the service module answers in this cycle; a
//           result is written into XA, a blocked call goes back to SELECT;
//   RETURN  ret_valid = 1 with XT and XA: the manager copies XA to TA[XT]
//           and clears the call.
// A call no service module claims returns E_NOSPT. allow[t] masks tasks
// (used for the CPU lock).
module request_arbiter
  import rtos_pkg::*;
#(
  parameter int unsigned NTASK = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTASK-1:0]  pending,
  input  call_t             tf_ta [NTASK],
  input  logic [NTASK-1:0]  allow,
  input  logic [NTASK-1:0]  w,
  input  logic [NTASK-1:0]  r_wait,
  input  logic              release_mode,
  input  logic [KEY_W-1:0]  key [NTASK],
  output svc_req_t          req,
  input  svc_rsp_t          rsp,
  output logic              ret_valid,
  output logic [TASK_W-1:0] ret_tsk,
  output logic [31:0]       ret0,
  output logic [31:0]       ret1
);

  typedef enum logic [1:0] {S_SELECT, S_EXEC, S_RETURN} state_e;
  state_e state_q;

  logic [TASK_W-1:0] xt_q;
  call_t             xf_xa_q;   // XF and XA
  logic              rel_q;

  logic [NTASK-1:0]  cand;
  logic              found;
  logic [TASK_W-1:0] win;

  always_comb begin
    logic [KEY_W-1:0] best;
    cand  = release_mode ? (pending & r_wait & allow) : (pending & ~w & allow);
    found = 1'b0;
    win   = '0;
    best  = '1;
    for (int t = 0; t < NTASK; t++) begin
      if (cand[t] && (!found || key[t] < best)) begin
        found = 1'b1;
        win   = TASK_W'(t);
        best  = key[t];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_SELECT;
      xt_q    <= '0;
      xf_xa_q <= '0;
      rel_q   <= 1'b0;
    end else begin
      case (state_q)
        S_SELECT: if (found) begin
          xt_q    <= win;
          xf_xa_q <= tf_ta[win];
          rel_q   <= release_mode;
          state_q <= S_EXEC;
        end
        S_EXEC: begin
          if (rsp.valid && rsp.blocked) begin
            state_q <= S_SELECT;
          end else begin
            xf_xa_q.arg0 <= rsp.valid ? rsp.ret0 : E_NOSPT;
            xf_xa_q.arg1 <= rsp.valid ? rsp.ret1 : 32'd0;
            state_q      <= S_RETURN;
          end
        end
        default: state_q <= S_SELECT;
      endcase
    end
  end

  always_comb begin
    req              = '0;
    req.valid        = (state_q == S_EXEC);
    req.tsk          = xt_q;
    req.call         = xf_xa_q;
    req.release_mode = rel_q;
  end

  assign ret_valid = (state_q == S_RETURN);
  assign ret_tsk   = xt_q;
  assign ret0      = xf_xa_q.arg0;
  assign ret1      = xf_xa_q.arg1;

  // The strobed call belongs to a task whose call is outstanding.
  a_xt_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_EXEC) |-> pending[xt_q]);

endmodule
