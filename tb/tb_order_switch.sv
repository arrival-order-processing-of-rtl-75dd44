// tb_order_switch: random priorities and arrival orders; checks that the key
// ordering picks the same winner as a reference that compares priority first
// (then arrival) in priority mode and arrival first (then priority) in
// arrival mode.
module tb_order_switch;
  import rtos_pkg::*;
  localparam int unsigned N = 4;

  logic order;
  logic [PRI_W-1:0] pri [N];
  logic signed [AO_W-1:0] ao [N];
  logic [KEY_W-1:0] key [N];
  int checks = 0, failures = 0;

  order_switch #(.NTASK(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int perm [N];
      int best_ref, best_dut;
      for (int t = 0; t < N; t++) perm[t] = t;
      perm.shuffle();
      order = 1'($urandom);
      for (int t = 0; t < N; t++) begin
        pri[t] = PRI_W'($urandom_range(0, 3));
        ao[t]  = AO_W'(perm[t]);
      end
      #1;
      // reference
      best_ref = 0;
      for (int t = 1; t < N; t++) begin
        bit better;
        if (order == ORD_PRI)
          better = (pri[t] < pri[best_ref]) || (pri[t] == pri[best_ref] && ao[t] < ao[best_ref]);
        else
          better = (ao[t] < ao[best_ref]) || (ao[t] == ao[best_ref] && pri[t] < pri[best_ref]);
        if (better) best_ref = t;
      end
      best_dut = 0;
      for (int t = 1; t < N; t++) if (key[t] < key[best_dut]) best_dut = t;
      checks++;
      if (best_dut != best_ref) begin
        failures++;
        $display("order=%0d winner %0d expected %0d", order, best_dut, best_ref);
      end
      // field placement
      checks++;
      if (key[0] != ((order == ORD_ARR) ? {ao[0], AO_W'(pri[0])} : {AO_W'(pri[0]), ao[0]}))
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
