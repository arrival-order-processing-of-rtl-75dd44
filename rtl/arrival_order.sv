// arrival_order: the ARRIVAL module, which records the order in which tasks
// issued the service requests that are still outstanding.
//
// Instead of timestamps it keeps a small integer per task: when k tasks are
// waiting for completion of a service, their ORDER values are 0 .. k-1 in the
// order the requests arrived, and a task with nothing outstanding holds -1.
// MO holds the largest ORDER in use (-1 when nothing is outstanding).
//   * New request by task t:   MO is incremented and ORDER[t] gets the new MO.
//   * Several new requests in one cycle: they are numbered in task-id order;
//     each gets MO + 1 + (number of requesting tasks with a smaller id),
//     which is the parallel counter of the original design.
//   * Completion for task t': every ORDER above ORDER[t'] is decremented,
//     MO is decremented and ORDER[t'] returns to -1.
//   * Request and completion in the same cycle: both apply; the new orders
//     are computed after the decrement, so MO is unchanged for one request and
//     one completion.
// All of the above follows the original design. This design's own choices:
// a completion for a task whose ORDER is -1 is ignored, and if the completing
// task also issues a new request in the same cycle the completion is applied
// first.
//
// Interface: req_new[t] is a one-cycle strobe per accepted request;
// cmpl_valid/cmpl_tsk name the task whose request completed. ORDER and MO are
// registers; they show the update on the cycle after the strobes.
module arrival_order
  import rtos_pkg::*;
#(
  parameter int unsigned NTASK = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NTASK-1:0]            req_new,
  input  logic                        cmpl_valid,
  input  logic [TASK_W-1:0]           cmpl_tsk,
  output logic signed [AO_W-1:0]      ao [NTASK],
  output logic signed [AO_W-1:0]      mo
);

  logic signed [AO_W-1:0] order_q [NTASK];
  logic signed [AO_W-1:0] order_d [NTASK];
  logic signed [AO_W-1:0] mo_q, mo_d;

  logic                   dec;
  logic signed [AO_W-1:0] cmpl_order;
  logic [AO_W-1:0]        prefix [NTASK];
  logic [AO_W-1:0]        nreq;

  // Parallel counter: number of requesting tasks with a smaller id.
  always_comb begin
    logic [AO_W-1:0] acc;
    acc = '0;
    for (int t = 0; t < NTASK; t++) begin
      prefix[t] = acc;
      acc = acc + AO_W'(req_new[t]);
    end
    nreq = acc;
  end

  always_comb begin
    cmpl_order = -1;
    for (int t = 0; t < NTASK; t++)
      if (TASK_W'(t) == cmpl_tsk) cmpl_order = order_q[t];
    dec        = cmpl_valid && (cmpl_order >= 0);
  end

  always_comb begin
    logic signed [AO_W-1:0] base;
    base = mo_q + 1 - (dec ? 1 : 0);
    for (int t = 0; t < NTASK; t++) begin
      if (req_new[t]) begin
        order_d[t] = base + $signed(prefix[t]);
      end else if (dec && (TASK_W'(t) == cmpl_tsk)) begin
        order_d[t] = -1;
      end else if (dec && (order_q[t] > cmpl_order)) begin
        order_d[t] = order_q[t] - 1;
      end else begin
        order_d[t] = order_q[t];
      end
    end
    mo_d = mo_q + $signed(nreq) - (dec ? 1 : 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTASK; t++) order_q[t] <= -1;
      mo_q <= -1;
    end else begin
      order_q <= order_d;
      mo_q    <= mo_d;
    end
  end

  assign ao = order_q;
  assign mo = mo_q;

endmodule
