// tb_request_arbiter: random trials. Each trial presents random outstanding
// calls, wait flags, release flags, CPU-lock mask and keys, works out the
// winner independently (normal mode: not waiting; release mode: R_WAIT set;
// smallest key, then lowest id), and checks that the call is strobed to the
// services exactly one cycle later with XT/XF/XA of the winner. The test then
// answers complete, blocked or not at all, and checks the return one cycle
// later (result, or E_NOSPT) or that a blocked call returns nothing.
module tb_request_arbiter;
  import rtos_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] pending, allow, w, r_wait;
  logic release_mode;
  call_t tf_ta [N];
  logic [KEY_W-1:0] key [N];
  svc_req_t req;
  svc_rsp_t rsp;
  logic ret_valid;
  logic [TASK_W-1:0] ret_tsk;
  logic [31:0] ret0, ret1;

  int checks = 0, failures = 0;
  int n_norm = 0, n_rel = 0, n_block = 0, n_none = 0;

  request_arbiter #(.NTASK(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    pending = '0; allow = '1; w = '0; r_wait = '0; release_mode = 0; rsp = '0;
    for (int t = 0; t < N; t++) begin tf_ta[t] = '0; key[t] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      int exp_t, kind;
      logic [N-1:0] cand;
      logic [KEY_W-1:0] best;
      pending = N'($urandom);
      w       = N'($urandom) & pending;
      r_wait  = ($urandom_range(0, 1) != 0) ? (w & N'($urandom)) : '0;
      release_mode = |r_wait;
      allow   = ($urandom_range(0, 4) == 0) ? N'($urandom) : '1;
      for (int t = 0; t < N; t++) begin
        key[t] = KEY_W'($urandom_range(0, 7));
        tf_ta[t].fn   = FN_WR_VAR;
        tf_ta[t].inst = INST_W'(t);
        tf_ta[t].arg0 = $urandom;
        tf_ta[t].arg1 = $urandom;
      end
      cand = release_mode ? (pending & r_wait & allow) : (pending & ~w & allow);
      exp_t = -1; best = '1;
      for (int t = 0; t < N; t++)
        if (cand[t] && (exp_t < 0 || key[t] < best)) begin exp_t = t; best = key[t]; end
      @(posedge clk); #1;
      if (exp_t < 0) begin
        chk(!req.valid && !ret_valid, "idle without candidates");
        continue;
      end
      if (release_mode) n_rel++; else n_norm++;
      chk(req.valid, "strobe one cycle after selection");
      chk(req.tsk == TASK_W'(exp_t), $sformatf("XT=%0d expected %0d", req.tsk, exp_t));
      chk(req.call == tf_ta[exp_t], "XF/XA copy of TF/TA");
      chk(req.release_mode == release_mode, "mode flag");
      kind = $urandom_range(0, 2);
      rsp = '0;
      if (kind == 0) begin
        rsp = rsp_done(tf_ta[exp_t].arg0 + 1, ~tf_ta[exp_t].arg1);
      end else if (kind == 1) begin
        rsp = rsp_wait(1);
        n_block++;
      end else n_none++;
      @(posedge clk); #1;
      rsp = '0;
      if (kind == 1) begin
        chk(!ret_valid && !req.valid, "blocked call returns nothing");
      end else begin
        chk(ret_valid && ret_tsk == TASK_W'(exp_t), "return strobe");
        if (kind == 0)
          chk(ret0 == tf_ta[exp_t].arg0 + 1 && ret1 == ~tf_ta[exp_t].arg1, "result to TA");
        else
          chk(ret0 == E_NOSPT, "unclaimed call returns E_NOSPT");
        pending = '0;
        @(posedge clk); #1;
        chk(!ret_valid && !req.valid, "back to select");
      end
    end
    chk(n_norm > 0 && n_rel > 0 && n_block > 0 && n_none > 0, "all cases seen");
    $display("normal=%0d release=%0d blocked=%0d unclaimed=%0d", n_norm, n_rel, n_block, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
