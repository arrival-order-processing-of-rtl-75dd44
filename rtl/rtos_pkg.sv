// rtos_pkg: types and constants shared by the hardware RTOS manager.
//
// The manager serves service calls issued by up to 16 hardware tasks. A call
// is a function code (XF), an object number and two 32-bit arguments (XA).
// Service modules answer with a response record that says whether the call
// completed or has to wait, carries the return values and may ask the WAIT
// module to start a wait release for one wait slot.
//
// The split of the call into function/instance/arguments, the function code
// values, the error codes (those of TOPPERS/ASP3) and the wait-slot numbering
// are choices of this design. The structure (TF/TA -> XT/XF/XA, S_WAIT slots,
// release with an order bit) follows the architecture it implements.
package rtos_pkg;

  localparam int unsigned TASK_W = 4;   // task id width: up to 16 tasks
  localparam int unsigned MAX_TASKS = 1 << TASK_W;
  localparam int unsigned PRI_W  = 4;   // priority 0 (highest) .. 15 (lowest)
  localparam int unsigned AO_W   = TASK_W + 1;  // signed arrival order, -1 = not waiting
  localparam int unsigned KEY_W  = 2 * AO_W;    // {MSB, LSB} arbitration key
  localparam int unsigned INST_W = 8;

  // Wait slots: one S_WAIT column per waitable service instance.
  localparam int unsigned SLOT_W   = 4;
  localparam int unsigned NSLOT    = 9;
  localparam int unsigned SLOT_MTX = 0;   // mutex 0, 1
  localparam int unsigned SLOT_FLG = 2;   // eventflag 0, 1
  localparam int unsigned SLOT_SDQ = 4;   // dataqueue 0, 1 send wait
  localparam int unsigned SLOT_RDQ = 6;   // dataqueue 0, 1 receive wait
  localparam int unsigned SLOT_SLP = 8;   // slp_tsk wait

  // Release order bit (the WAIT module's ORDER register).
  localparam logic ORD_PRI = 1'b0;
  localparam logic ORD_ARR = 1'b1;

  // Return codes (TOPPERS/ASP3 values).
  localparam logic [31:0] E_OK    = 32'sd0;
  localparam logic [31:0] E_NOSPT = -32'sd9;
  localparam logic [31:0] E_PAR   = -32'sd17;
  localparam logic [31:0] E_ID    = -32'sd18;
  localparam logic [31:0] E_ILUSE = -32'sd28;
  localparam logic [31:0] E_OBJ   = -32'sd41;
  localparam logic [31:0] E_QOVR  = -32'sd43;
  localparam logic [31:0] E_RLWAI = -32'sd49;
  localparam logic [31:0] E_TMOUT = -32'sd50;

  typedef enum logic [7:0] {
    FN_NOP      = 8'h00,
    // control_task
    FN_ACT_TSK  = 8'h10,
    FN_CAN_ACT  = 8'h11,
    FN_TER_TSK  = 8'h12,
    FN_CHG_PRI  = 8'h13,
    FN_GET_PRI  = 8'h14,
    FN_WUP_TSK  = 8'h15,
    FN_CAN_WUP  = 8'h16,
    FN_REL_WAI  = 8'h17,
    FN_SUS_TSK  = 8'h18,
    FN_RSM_TSK  = 8'h19,
    FN_LOC_CPU  = 8'h1A,
    FN_UNL_CPU  = 8'h1B,
    FN_SLP_TSK  = 8'h1C,
    // shared_variable
    FN_RD_VAR   = 8'h20,
    FN_WR_VAR   = 8'h21,
    // mutex
    FN_LOC_MTX  = 8'h30,
    FN_PLOC_MTX = 8'h31,
    FN_UNL_MTX  = 8'h32,
    // eventflag
    FN_SET_FLG  = 8'h40,
    FN_CLR_FLG  = 8'h41,
    FN_WAI_FLG  = 8'h42,
    FN_POL_FLG  = 8'h43,
    // dataqueue
    FN_SND_DTQ  = 8'h50,
    FN_PSND_DTQ = 8'h51,
    FN_RCV_DTQ  = 8'h52,
    FN_PRCV_DTQ = 8'h53
  } fn_e;

  // Service module select: upper nibble of the function code.
  localparam logic [3:0] SVC_TASK = 4'h1;
  localparam logic [3:0] SVC_VAR  = 4'h2;
  localparam logic [3:0] SVC_MTX  = 4'h3;
  localparam logic [3:0] SVC_FLG  = 4'h4;
  localparam logic [3:0] SVC_DTQ  = 4'h5;

  // Eventflag wait mode (arg1 of wai_flg/pol_flg).
  localparam logic [31:0] TWF_ORW  = 32'h1;
  localparam logic [31:0] TWF_ANDW = 32'h2;

  // A call as a task writes it into TF/TA.
  typedef struct packed {
    fn_e                fn;
    logic [INST_W-1:0]  inst;
    logic [31:0]        arg0;
    logic [31:0]        arg1;
  } call_t;

  // Request to a service module: XT, XF, XA plus the RA mode.
  typedef struct packed {
    logic               valid;     // one-cycle strobe
    logic [TASK_W-1:0]  tsk;       // XT
    call_t              call;      // XF / XA
    logic               release_mode;
  } svc_req_t;

  // Response of a service module, in the strobe cycle.
  typedef struct packed {
    logic               valid;     // this module served the request
    logic               blocked;   // cannot be processed: wait on 'slot'
    logic [SLOT_W-1:0]  slot;
    logic [31:0]        ret0;      // return code
    logic [31:0]        ret1;      // returned data
    logic               rel;       // start a wait release of 'rel_slot'
    logic [SLOT_W-1:0]  rel_slot;
    logic               rel_order; // ORD_PRI / ORD_ARR
    logic               rel_end;   // dequeue done: clear all R_WAIT
  } svc_rsp_t;

  localparam svc_rsp_t RSP_NONE = '0;

  // Helpers for service modules.
  function automatic svc_rsp_t rsp_done(input logic [31:0] r0, input logic [31:0] r1);
    svc_rsp_t r;
    r = '0;
    r.valid = 1'b1;
    r.ret0  = r0;
    r.ret1  = r1;
    return r;
  endfunction

  function automatic svc_rsp_t rsp_wait(input int unsigned slot);
    svc_rsp_t r;
    r = '0;
    r.valid   = 1'b1;
    r.blocked = 1'b1;
    r.slot    = SLOT_W'(slot);
    return r;
  endfunction

endpackage
