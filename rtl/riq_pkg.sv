// riq_pkg: shared types and constants of the reuse-capable issue queue.
//
// The issue queue buffers the instructions of small loops and, once a loop is
// buffered, supplies them itself so that fetch, branch prediction and decode
// can be gated. The sizes below follow the baseline machine the design is
// built for: a 64-entry unified issue queue, 4-wide decode/dispatch and issue,
// a 64-entry reorder buffer, an 8-entry non-bufferable loop table and three
// 5-bit logical register numbers per buffered instruction (15 bits).
// Address width, physical tag width, opcode width and the function-unit
// classes are this design's own choices.
package riq_pkg;

  parameter int unsigned ADDR_W  = 32;  // instruction address width (assumed)
  parameter int unsigned LREG_W  = 5;   // logical register number width
  parameter int unsigned PREG_W  = 7;   // physical register tag width (assumed)
  parameter int unsigned ROB_W   = 6;   // 64-entry reorder buffer
  parameter int unsigned OP_W    = 8;   // opaque decoded opcode (assumed)

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [ROB_W-1:0]  rob_idx_t;

  // R_iqstate encoding: 00 Normal, 01 Loop_Buffering, 11 Code_Reuse, 10 unused.
  typedef enum logic [1:0] {
    IQ_NORMAL     = 2'b00,
    IQ_LOOP_BUF   = 2'b01,
    IQ_CODE_REUSE = 2'b11
  } iq_state_e;

  // Function-unit class used by select (4 IALU, 1 IMULT, 4 FPALU, 1 FPMULT).
  typedef enum logic [1:0] {
    FU_IALU   = 2'd0,
    FU_IMULT  = 2'd1,
    FU_FPALU  = 2'd2,
    FU_FPMULT = 2'd3
  } fu_class_e;

  // Logical register list entry: destination and two sources.
  typedef struct packed {
    lreg_t dst;
    lreg_t src1;
    lreg_t src2;
  } lrl_entry_t;

  // Rename result: what is rewritten in an issue queue entry on (re)rename.
  typedef struct packed {
    preg_t    pdst;
    preg_t    psrc1;
    logic     rdy1;
    preg_t    psrc2;
    logic     rdy2;
    rob_idx_t rob;
  } ren_info_t;

  // Part of an entry that stays unchanged while the instruction is reused.
  typedef struct packed {
    logic [OP_W-1:0] op;
    fu_class_e       fu;
    logic            is_branch;
    logic            pred_taken;  // prediction reused statically in Code_Reuse
  } static_info_t;

  // One instruction arriving from the rename stage, with its decode-stage
  // information used by the loop detector and the state controller.
  typedef struct packed {
    logic         valid;
    addr_t        pc;
    logic         is_cond_br;   // conditional branch
    logic         is_jump;      // direct jump
    logic         is_call;      // procedure call
    logic         is_ret;       // procedure return
    addr_t        target;       // predicted / direct target address
    lrl_entry_t   lregs;
    ren_info_t    ren;
    static_info_t info;
  } disp_instr_t;

  // One issue queue entry.
  typedef struct packed {
    logic         valid;
    logic         cls;      // classification bit: belongs to a buffered loop
    logic         issued;   // issue state bit
    ren_info_t    ren;
    static_info_t info;
  } iq_entry_t;

  // One issued instruction.
  typedef struct packed {
    logic         valid;
    ren_info_t    ren;
    static_info_t info;
    logic         reusable; // issued from a buffered entry
  } issue_t;

  // Reuse request to the renaming logic.
  typedef struct packed {
    logic       valid;
    lrl_entry_t lregs;
  } reuse_req_t;

  // Event pulses of the controller (for statistics and power accounting).
  typedef struct packed {
    logic loop_detect;    // a capturable loop was detected in Normal
    logic nblt_hit;       // buffering suppressed by the NBLT
    logic buf_start;      // Normal -> Loop_Buffering
    logic buf_continue;   // another iteration will be buffered (unrolling)
    logic reuse_start;    // Loop_Buffering -> Code_Reuse
    logic revoke_exit;    // buffering revoked: execution left the loop
    logic revoke_inner;   // buffering revoked: inner loop detected
    logic revoke_full;    // buffering revoked: queue used up before loop end
    logic mp_revoke;      // misprediction while buffering or reusing
  } riq_events_t;

endpackage
