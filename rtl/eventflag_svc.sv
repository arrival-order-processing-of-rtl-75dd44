// eventflag_svc: the eventflag service module (set_flg, clr_flg, wai_flg,
// pol_flg in the style of TOPPERS/ASP3) for N_FLG flags of FLG_W bits.
//
// wai_flg(id, waiptn, mode) completes when the flag matches (TWF_ORW: any
// bit of waiptn set; TWF_ANDW: all bits set) and returns the flag pattern in
// ret1; otherwise the call is blocked on the flag's wait slot. set_flg ORs a
// pattern in and asks the WAIT module to release the slot in the flag's order
// (FLG_ORDER: 0 priority, 1 arrival). The arbiter then re-sends every waiting
// wai_flg call in that order:
//   * FLG_CLR bit 0: each waiting call is tested; matching ones complete,
//     the others block again, and the release ends when all were tested;
//   * FLG_CLR bit 1 (clear attribute): the first match clears the flag and
//     ends the release, so only one waiting call is served.
// This release behaviour follows the original design; call set, error codes,
// the order/clear defaults and FLG_INIT are this design's choices.
// Answer is combinational in the strobe cycle; the flag updates on the next
// clock edge.
module eventflag_svc
  import rtos_pkg::*;
#(
  parameter int unsigned      N_FLG     = 2,
  parameter int unsigned      FLG_W     = 32,
  parameter logic [N_FLG-1:0] FLG_ORDER = 2'b10,
  parameter logic [N_FLG-1:0] FLG_CLR   = 2'b10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  output svc_rsp_t rsp
);

  logic [FLG_W-1:0] flg_q [N_FLG];
  logic [FLG_W-1:0] flg_d [N_FLG];

  logic             sel, id_ok, match, mode_ok;
  int unsigned      id;
  logic [FLG_W-1:0] cur, ptn;

  assign sel   = req.valid && (req.call.fn[7:4] == SVC_FLG);
  assign id    = int'(req.call.inst);
  assign id_ok = id < N_FLG;

  always_comb begin
    cur     = id_ok ? flg_q[id] : '0;
    ptn     = FLG_W'(req.call.arg0);
    mode_ok = (req.call.arg1 == TWF_ORW) || (req.call.arg1 == TWF_ANDW);
    match   = (req.call.arg1 == TWF_ANDW) ? ((cur & ptn) == ptn) : ((cur & ptn) != '0);
  end

  always_comb begin
    rsp   = RSP_NONE;
    flg_d = flg_q;
    if (sel) begin
      if (!id_ok) begin
        rsp = rsp_done(E_ID, 0);
      end else begin
        unique case (req.call.fn)
          FN_SET_FLG: begin
            flg_d[id]     = cur | ptn;
            rsp           = rsp_done(E_OK, 0);
            rsp.rel       = 1'b1;
            rsp.rel_slot  = SLOT_W'(SLOT_FLG + id);
            rsp.rel_order = FLG_ORDER[id];
          end
          FN_CLR_FLG: begin
            flg_d[id] = cur & ptn;
            rsp       = rsp_done(E_OK, 0);
          end
          FN_WAI_FLG, FN_POL_FLG: begin
            if (ptn == '0 || !mode_ok) begin
              rsp = rsp_done(E_PAR, 0);
            end else if (match) begin
              rsp = rsp_done(E_OK, 32'(cur));
              if (FLG_CLR[id]) begin
                flg_d[id]   = '0;
                rsp.rel_end = req.release_mode;
              end
            end else if (req.call.fn == FN_WAI_FLG) begin
              rsp = rsp_wait(SLOT_FLG + id);
            end else begin
              rsp = rsp_done(E_TMOUT, 0);
            end
          end
          default: rsp = rsp_done(E_NOSPT, 0);
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_FLG; i++) flg_q[i] <= '0;
    end else begin
      flg_q <= flg_d;
    end
  end

endmodule
