// tb_arrival_order: self-checking test of the arrival order recorder.
// Replays the four-step example of the design (T0, T2, T3 waiting; T4
// requests; T2 completes; T1 and T5 request together; T2 requests while T4
// completes) with six tasks, then runs random requests and completions
// against a queue model: a task's expected order is its position in a list
// kept in arrival order, with same-cycle requests appended in id order.
module tb_arrival_order;
  import rtos_pkg::*;
  localparam int unsigned N = 6;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_new;
  logic cmpl_valid;
  logic [TASK_W-1:0] cmpl_tsk;
  logic signed [AO_W-1:0] ao [N];
  logic signed [AO_W-1:0] mo;

  int checks = 0, failures = 0;
  int q[$];

  arrival_order #(.NTASK(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [N-1:0] r, input logic cv, input int ct);
    req_new = r; cmpl_valid = cv; cmpl_tsk = TASK_W'(ct);
    @(posedge clk); #1;
    req_new = '0; cmpl_valid = 0;
    // model
    if (cv) begin
      foreach (q[i]) if (q[i] == ct) begin q.delete(i); break; end
    end
    for (int t = 0; t < N; t++) if (r[t]) q.push_back(t);
  endtask

  task automatic check_model();
    for (int t = 0; t < N; t++) begin
      int exp_o;
      exp_o = -1;
      foreach (q[i]) if (q[i] == t) exp_o = i;
      checks++;
      if (ao[t] != exp_o) begin
        failures++;
        $display("ORDER[T%0d]=%0d expected %0d", t, ao[t], exp_o);
      end
    end
    checks++;
    if (mo != q.size() - 1) begin
      failures++;
      $display("MO=%0d expected %0d", mo, q.size() - 1);
    end
  endtask

  task automatic expect_orders(input int e [N], input int emo);
    for (int t = 0; t < N; t++) begin
      checks++;
      if (ao[t] != e[t]) begin failures++; $display("example: ORDER[T%0d]=%0d exp %0d", t, ao[t], e[t]); end
    end
    checks++;
    if (mo != emo) begin failures++; $display("example: MO=%0d exp %0d", mo, emo); end
  endtask

  initial begin
    req_new = '0; cmpl_valid = 0; cmpl_tsk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_model();
    // Build the starting point: T0, T2, T3 in this order.
    step(6'b000001, 0, 0);
    step(6'b000100, 0, 0);
    step(6'b001000, 0, 0);
    expect_orders('{0, -1, 1, 2, -1, -1}, 2);
    step(6'b010000, 0, 0);                 // (a) T4 requests
    expect_orders('{0, -1, 1, 2, 3, -1}, 3);
    step(6'b000000, 1, 2);                 // (b) T2 completes
    expect_orders('{0, -1, -1, 1, 2, -1}, 2);
    step(6'b100010, 0, 0);                 // (c) T1 and T5 at once
    expect_orders('{0, 3, -1, 1, 2, 4}, 4);
    step(6'b000100, 1, 4);                 // (d) T2 requests, T4 completes
    expect_orders('{0, 2, 4, 1, -1, 3}, 4);
    check_model();
    // Random traffic.
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] idle, r;
      logic cv;
      int ct;
      idle = '1;
      foreach (q[i]) idle[q[i]] = 1'b0;
      r  = N'($urandom) & idle & N'($urandom);
      cv = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      ct = cv ? q[$urandom_range(0, q.size() - 1)] : 0;
      step(r, cv, ct);
      check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
