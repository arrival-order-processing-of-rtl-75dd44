// dataqueue_svc: the dataqueue service module (snd_dtq, psnd_dtq, rcv_dtq,
// prcv_dtq in the style of TOPPERS/ASP3) for N_DTQ queues of DEPTH words.
//
// Each queue is a circular buffer: DEPTH words of storage (a memory without
// reset) plus a head index and a count, the only flip-flops. snd_dtq on a
// full queue and rcv_dtq on an empty one are blocked on the queue's send or
// receive wait slot. A successful send asks the WAIT module to release the
// receive slot (arrival order, as receive waits are first come first
// served); a successful receive releases the send slot in the queue's
// SND_ORDER (0 priority, 1 arrival). During a release the arbiter re-sends
// the waiting calls; the first that succeeds ends the release, since one word
// of data or space serves one waiting task. A released call that succeeds may
// start the release of the opposite slot in the same answer; the WAIT module
// applies the end before the new start.
// The release protocol follows the original design; calls, codes, order
// defaults and the buffer organisation are this design's choices. Answer is
// combinational in the strobe cycle; state updates on the next clock edge.
module dataqueue_svc
  import rtos_pkg::*;
#(
  parameter int unsigned      N_DTQ     = 2,
  parameter int unsigned      DEPTH     = 10,
  parameter int unsigned      DW        = 32,
  parameter logic [N_DTQ-1:0] SND_ORDER = 2'b10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  output svc_rsp_t rsp
);

  localparam int unsigned PW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [N_DTQ][DEPTH];
  logic [PW-1:0] head_q [N_DTQ];
  logic [PW-1:0] cnt_q  [N_DTQ];

  logic          sel, id_ok, do_push, do_pop;
  int unsigned   id;
  logic [PW-1:0] head, cnt, tail, head_nx;

  assign sel   = req.valid && (req.call.fn[7:4] == SVC_DTQ);
  assign id    = int'(req.call.inst);
  assign id_ok = id < N_DTQ;

  always_comb begin
    logic [PW:0] sum;
    head    = id_ok ? head_q[id] : '0;
    cnt     = id_ok ? cnt_q[id]  : '0;
    sum     = {1'b0, head} + {1'b0, cnt};
    tail    = (sum >= (PW+1)'(DEPTH)) ? PW'(sum - (PW+1)'(DEPTH)) : PW'(sum);
    head_nx = (head == PW'(DEPTH - 1)) ? '0 : head + 1'b1;
  end

  always_comb begin
    rsp     = RSP_NONE;
    do_push = 1'b0;
    do_pop  = 1'b0;
    if (sel) begin
      if (!id_ok) begin
        rsp = rsp_done(E_ID, 0);
      end else begin
        unique case (req.call.fn)
          FN_SND_DTQ, FN_PSND_DTQ: begin
            if (cnt < PW'(DEPTH)) begin
              do_push       = 1'b1;
              rsp           = rsp_done(E_OK, 0);
              rsp.rel_end   = req.release_mode;
              rsp.rel       = 1'b1;
              rsp.rel_slot  = SLOT_W'(SLOT_RDQ + id);
              rsp.rel_order = ORD_ARR;
            end else if (req.call.fn == FN_SND_DTQ) begin
              rsp = rsp_wait(SLOT_SDQ + id);
            end else begin
              rsp = rsp_done(E_TMOUT, 0);
            end
          end
          FN_RCV_DTQ, FN_PRCV_DTQ: begin
            if (cnt != '0) begin
              do_pop        = 1'b1;
              rsp           = rsp_done(E_OK, 32'(mem[id][head]));
              rsp.rel_end   = req.release_mode;
              rsp.rel       = 1'b1;
              rsp.rel_slot  = SLOT_W'(SLOT_SDQ + id);
              rsp.rel_order = SND_ORDER[id];
            end else if (req.call.fn == FN_RCV_DTQ) begin
              rsp = rsp_wait(SLOT_RDQ + id);
            end else begin
              rsp = rsp_done(E_TMOUT, 0);
            end
          end
          default: rsp = rsp_done(E_NOSPT, 0);
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[id][tail] <= DW'(req.call.arg0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DTQ; i++) begin
        head_q[i] <= '0;
        cnt_q[i]  <= '0;
      end
    end else if (do_push) begin
      cnt_q[id] <= cnt + 1'b1;
    end else if (do_pop) begin
      cnt_q[id]  <= cnt - 1'b1;
      head_q[id] <= head_nx;
    end
  end

endmodule
