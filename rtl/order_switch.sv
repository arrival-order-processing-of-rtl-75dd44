// order_switch: builds the value the request arbiter compares for each task.
//
// Each task gets a two-field key {MSB, LSB}; a smaller key wins. With the
// order input at priority order (0) the key is {pri_t, ao_t}, so the task
// priority decides and tasks of equal priority are taken in arrival order.
// With the order input at arrival order (1) the fields swap to {ao_t, pri_t}.
// This swap is the circuit of the original design. Both fields are AO_W bits
// wide (the priority is zero-extended); ao_t = -1 (nothing outstanding) reads
// as the largest unsigned value, so such a task sorts last. Purely
// combinational.
module order_switch
  import rtos_pkg::*;
#(
  parameter int unsigned NTASK = 4
) (
  input  logic                   order,
  input  logic [PRI_W-1:0]       pri [NTASK],
  input  logic signed [AO_W-1:0] ao  [NTASK],
  output logic [KEY_W-1:0]       key [NTASK]
);

  always_comb begin
    for (int t = 0; t < NTASK; t++) begin
      logic [AO_W-1:0] p, a;
      p = AO_W'(pri[t]);
      a = ao[t];
      key[t] = (order == ORD_ARR) ? {a, p} : {p, a};
    end
  end

endmodule
