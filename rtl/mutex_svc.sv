// mutex_svc: the mutex service module (TOPPERS/ASP3 style loc_mtx, ploc_mtx,
// unl_mtx) for N_MTX mutexes.
//
// Each mutex has a lock bit and an owner task. loc_mtx on a free mutex locks
// it for the caller; on a mutex the caller holds it returns E_OBJ; otherwise
// the call is blocked and waits on the mutex's wait slot. unl_mtx by the
// owner frees the mutex and asks the WAIT module to release that slot in the
// mutex's own order (MTX_ORDER bit: 0 priority, 1 arrival). During the
// release the arbiter re-sends the waiting loc_mtx calls one by one; the
// first that gets the mutex ends the release (a mutex hands over to one
// task). ploc_mtx is loc_mtx that returns E_TMOUT instead of waiting.
//
// The waiting and release protocol follows the original design; the set of
// calls, return codes and the per-instance order defaults are this design's
// choices after TOPPERS/ASP3. Priority ceiling and inheritance are not
// modelled. The answer is combinational in the strobe cycle; state updates on
// the following clock edge.
module mutex_svc
  import rtos_pkg::*;
#(
  parameter int unsigned     N_MTX     = 2,
  parameter logic [N_MTX-1:0] MTX_ORDER = 2'b10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  output svc_rsp_t rsp
);

  logic [N_MTX-1:0]  locked_q;
  logic [TASK_W-1:0] owner_q [N_MTX];

  logic              sel, id_ok;
  int unsigned       id;

  assign sel   = req.valid && (req.call.fn[7:4] == SVC_MTX);
  assign id    = int'(req.call.inst);
  assign id_ok = id < N_MTX;

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      if (!id_ok) begin
        rsp = rsp_done(E_ID, 0);
      end else begin
        unique case (req.call.fn)
          FN_LOC_MTX, FN_PLOC_MTX: begin
            if (!locked_q[id]) begin
              rsp = rsp_done(E_OK, 0);
              rsp.rel_end = req.release_mode;
            end else if (owner_q[id] == req.tsk) begin
              rsp = rsp_done(E_OBJ, 0);
            end else if (req.call.fn == FN_LOC_MTX) begin
              rsp = rsp_wait(SLOT_MTX + id);
            end else begin
              rsp = rsp_done(E_TMOUT, 0);
            end
          end
          FN_UNL_MTX: begin
            if (locked_q[id] && owner_q[id] == req.tsk) begin
              rsp           = rsp_done(E_OK, 0);
              rsp.rel       = 1'b1;
              rsp.rel_slot  = SLOT_W'(SLOT_MTX + id);
              rsp.rel_order = MTX_ORDER[id];
            end else begin
              rsp = rsp_done(E_OBJ, 0);
            end
          end
          default: rsp = rsp_done(E_NOSPT, 0);
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= '0;
      for (int i = 0; i < N_MTX; i++) owner_q[i] <= '0;
    end else if (sel && id_ok && !rsp.blocked && rsp.ret0 == E_OK) begin
      if (req.call.fn == FN_UNL_MTX) begin
        locked_q[id] <= 1'b0;
      end else begin
        locked_q[id] <= 1'b1;
        owner_q[id]  <= req.tsk;
      end
    end
  end

endmodule
