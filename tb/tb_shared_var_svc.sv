// tb_shared_var_svc: writes every word with random data, then random reads
// and writes against an array model; checks out-of-range addresses and that
// calls for other service modules are ignored.
module tb_shared_var_svc;
  import rtos_pkg::*;

  logic clk = 0, rst_n = 0;
  svc_req_t req;
  svc_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] m [32];

  shared_var_svc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic call(input fn_e fn, input logic [31:0] a0, input logic [31:0] a1);
    req = '0; req.valid = 1; req.call.fn = fn; req.call.arg0 = a0; req.call.arg1 = a1;
    #1;
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 32; a++) begin
      m[a] = $urandom;
      call(FN_WR_VAR, a, m[a]);
      chk(rsp.valid && rsp.ret0 == E_OK && !rsp.blocked, "write ok");
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, 31);
      if ($urandom_range(0, 1) == 0) begin
        m[a] = $urandom;
        call(FN_WR_VAR, a, m[a]);
        chk(rsp.valid && rsp.ret0 == E_OK, "write ok");
      end else begin
        call(FN_RD_VAR, a, 0);
        chk(rsp.valid && rsp.ret0 == E_OK && rsp.ret1 == m[a], $sformatf("read word %0d", a));
      end
      @(posedge clk); #1;
    end
    call(FN_RD_VAR, 32, 0);
    chk(rsp.valid && rsp.ret0 == E_PAR, "address out of range");
    call(FN_WAI_FLG, 0, 0);
    chk(!rsp.valid, "eventflag call ignored");
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
