// tb_wait_ctrl: drives random service responses (block, complete, release,
// end of release) into the WAIT module and compares S_WAIT, R_WAIT, w,
// release and order with a flag-array model after every cycle. Starts with
// the directed sequence of a release: two tasks block on one slot, the slot
// is released, one is served and the release ends; then a waiting call is
// withdrawn. Random traffic includes withdrawals.
module tb_wait_ctrl;
  import rtos_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  svc_rsp_t rsp;
  logic [TASK_W-1:0] rsp_tsk;
  logic cancel_valid;
  logic [TASK_W-1:0] cancel_tsk;
  logic [N-1:0] w, r_wait;
  logic release_mode, order;
  logic [NSLOT-1:0] s_wait [N];

  bit m_s [N][NSLOT];
  bit m_r [N];
  bit m_o;
  int checks = 0, failures = 0;

  wait_ctrl #(.NTASK(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input svc_rsp_t r, input int t, input bit cv = 0, input int ct = 0);
    rsp = r; rsp_tsk = TASK_W'(t);
    cancel_valid = cv; cancel_tsk = TASK_W'(ct);
    @(posedge clk); #1;
    rsp = '0; cancel_valid = 0;
    if (cv) begin
      for (int i = 0; i < NSLOT; i++) m_s[ct][i] = 0;
      m_r[ct] = 0;
    end
    if (r.valid) begin
      if (r.blocked) m_s[t][r.slot] = 1;
      else for (int i = 0; i < NSLOT; i++) m_s[t][i] = 0;
      m_r[t] = 0;
      if (r.rel_end) for (int k = 0; k < N; k++) m_r[k] = 0;
      if (r.rel) begin
        for (int k = 0; k < N; k++) if (m_s[k][r.rel_slot]) m_r[k] = 1;
        m_o = r.rel_order;
      end
    end
    compare();
  endtask

  task automatic compare();
    bit any;
    any = 0;
    for (int t = 0; t < N; t++) begin
      bit wt;
      wt = 0;
      for (int i = 0; i < NSLOT; i++) begin
        wt |= m_s[t][i];
        checks++;
        if (s_wait[t][i] != m_s[t][i]) begin failures++; $display("S_WAIT[%0d][%0d]", t, i); end
      end
      checks += 2;
      if (w[t] != wt) begin failures++; $display("w[%0d]", t); end
      if (r_wait[t] != m_r[t]) begin failures++; $display("R_WAIT[%0d]", t); end
      any |= m_r[t];
    end
    checks += 2;
    if (release_mode != any) begin failures++; $display("release"); end
    if (any && order != m_o) begin failures++; $display("order"); end
  endtask

  initial begin
    svc_rsp_t r;
    rsp = '0; rsp_tsk = '0; cancel_valid = 0; cancel_tsk = '0;
    m_o = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    // Directed: T0 and T1 block on slot 2, slot 2 released in arrival order.
    apply(rsp_wait(2), 0);
    apply(rsp_wait(2), 1);
    r = rsp_done(E_OK, 0); r.rel = 1; r.rel_slot = 2; r.rel_order = ORD_ARR;
    apply(r, 2);
    checks++;
    if (!(release_mode && order == ORD_ARR && r_wait == 4'b0011)) begin
      failures++; $display("release did not start");
    end
    r = rsp_done(E_OK, 0); r.rel_end = 1;
    apply(r, 1);
    checks++;
    if (release_mode || w != 4'b0001) begin failures++; $display("release did not end"); end
    // A withdrawn call leaves the wait.
    apply(rsp_wait(3), 2);
    apply('0, 0, 1, 2);
    checks++;
    if (w != 4'b0001) begin failures++; $display("cancel did not clear the wait"); end
    // Random.
    for (int n = 0; n < 5000; n++) begin
      r = '0;
      r.valid     = ($urandom_range(0, 3) != 0);
      r.blocked   = 1'($urandom);
      r.slot      = SLOT_W'($urandom_range(0, NSLOT - 1));
      r.rel       = ($urandom_range(0, 3) == 0);
      r.rel_slot  = SLOT_W'($urandom_range(0, NSLOT - 1));
      r.rel_order = 1'($urandom);
      r.rel_end   = ($urandom_range(0, 5) == 0);
      apply(r, $urandom_range(0, N - 1), ($urandom_range(0, 7) == 0), $urandom_range(0, N - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
