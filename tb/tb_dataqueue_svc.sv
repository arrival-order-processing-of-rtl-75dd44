// tb_dataqueue_svc: random sends and receives (waiting and polling, in
// normal and release mode) on both queues against a FIFO model of 10 words
// each. Checks returned data, blocking on full/empty with the right slot,
// E_TMOUT for the polling forms, and the release requests (receive slot in
// arrival order after a send, send slot in the queue's order after a
// receive, end of release when a released call succeeds).
module tb_dataqueue_svc;
  import rtos_pkg::*;
  localparam int unsigned DEPTH = 10;
  localparam logic [1:0] SND_ORDER = 2'b10;

  logic clk = 0, rst_n = 0;
  svc_req_t req;
  svc_rsp_t rsp;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [31:0] q [2][$];

  dataqueue_svc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 4000; n++) begin
      int id, op;
      bit relm, poll;
      logic [31:0] d;
      id   = $urandom_range(0, 1);
      op   = $urandom_range(0, 1) ;
      // bias towards full and empty
      if (n % 400 < 200) op = ($urandom_range(0, 3) != 0) ? 0 : 1;
      else               op = ($urandom_range(0, 3) != 0) ? 1 : 0;
      relm = 1'($urandom);
      poll = 1'($urandom);
      d    = $urandom;
      req = '0;
      req.valid = 1; req.tsk = TASK_W'($urandom_range(0, 3));
      req.call.inst = INST_W'(id); req.call.arg0 = d; req.release_mode = relm;
      req.call.fn = (op == 0) ? (poll ? FN_PSND_DTQ : FN_SND_DTQ)
                              : (poll ? FN_PRCV_DTQ : FN_RCV_DTQ);
      #1;
      if (op == 0) begin
        if (q[id].size() < DEPTH) begin
          chk(rsp.valid && !rsp.blocked && rsp.ret0 == E_OK, "send ok");
          chk(rsp.rel && rsp.rel_slot == SLOT_RDQ + id && rsp.rel_order == ORD_ARR, "send releases receivers");
          chk(rsp.rel_end == relm, "send ends release");
          q[id].push_back(d);
        end else if (poll) begin
          chk(rsp.valid && !rsp.blocked && rsp.ret0 == E_TMOUT, "psnd on full");
          n_full++;
        end else begin
          chk(rsp.valid && rsp.blocked && rsp.slot == SLOT_SDQ + id, "snd blocks on full");
          n_full++;
        end
      end else begin
        if (q[id].size() > 0) begin
          logic [31:0] e;
          e = q[id].pop_front();
          chk(rsp.valid && !rsp.blocked && rsp.ret0 == E_OK && rsp.ret1 == e,
              $sformatf("receive data %h expected %h", rsp.ret1, e));
          chk(rsp.rel && rsp.rel_slot == SLOT_SDQ + id && rsp.rel_order == SND_ORDER[id], "receive releases senders");
        end else if (poll) begin
          chk(rsp.valid && !rsp.blocked && rsp.ret0 == E_TMOUT, "prcv on empty");
          n_empty++;
        end else begin
          chk(rsp.valid && rsp.blocked && rsp.slot == SLOT_RDQ + id, "rcv blocks on empty");
          n_empty++;
        end
      end
      @(posedge clk); #1;
    end
    req = '0;
    req.valid = 1; req.call.fn = FN_SND_DTQ; req.call.inst = 7; #1;
    chk(rsp.valid && rsp.ret0 == E_ID, "bad id");
    req.call.fn = FN_RD_VAR; #1;
    chk(!rsp.valid, "shared variable call ignored");
    chk(n_full > 0 && n_empty > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
