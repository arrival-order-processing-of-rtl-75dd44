// shared_var_svc: the shared variable service module, N_WORDS words of
// WORD_W bits that tasks read and write through service calls.
//
// rd_var(addr) returns the word in ret1; wr_var(addr, data) stores data.
// Both complete at once and never wait, so this module takes no part in
// arrival order processing. An address out of range returns E_PAR. The
// storage is a memory without reset (read before any write returns whatever
// the memory holds). The word count and width follow the original design;
// the call names and argument layout are this design's choices. Answer is
// combinational in the strobe cycle; a write lands on the next clock edge.
module shared_var_svc
  import rtos_pkg::*;
#(
  parameter int unsigned N_WORDS = 32,
  parameter int unsigned WORD_W  = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  output svc_rsp_t rsp
);

  localparam int unsigned AW = $clog2(N_WORDS);

  logic [WORD_W-1:0] mem [N_WORDS];
  logic              sel, addr_ok;
  logic [AW-1:0]     addr;

  assign sel     = req.valid && (req.call.fn[7:4] == SVC_VAR);
  assign addr_ok = req.call.arg0 < 32'(N_WORDS);
  assign addr    = AW'(req.call.arg0);

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      if (!addr_ok)                      rsp = rsp_done(E_PAR, 0);
      else if (req.call.fn == FN_RD_VAR) rsp = rsp_done(E_OK, 32'(mem[addr]));
      else if (req.call.fn == FN_WR_VAR) rsp = rsp_done(E_OK, 0);
      else                               rsp = rsp_done(E_NOSPT, 0);
    end
  end

  always_ff @(posedge clk) begin
    if (sel && addr_ok && req.call.fn == FN_WR_VAR) mem[addr] <= WORD_W'(req.call.arg1);
  end

  // Reset is not used: the storage has no reset, as in a memory.
  logic unused_rst;
  assign unused_rst = rst_n;

endmodule
