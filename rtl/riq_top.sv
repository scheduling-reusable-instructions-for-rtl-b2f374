// riq_top: reuse-capable issue queue of an out-of-order superscalar core.
//
// The issue queue detects small loops, keeps their instructions after they
// issue, and then replays them itself, so that instruction fetch, branch
// prediction and decoding can be switched off (frontend_gate) while the loop
// runs. This top wires the parts together:
//   riq_loop_detector - flags backward branches / jumps whose loop fits;
//   riq_nblt          - remembers loops that failed to buffer;
//   riq_ctrl          - Normal / Loop_Buffering / Code_Reuse state machine;
//   riq_issue_queue   - collapsing queue with classification and issue
//                       state bits;
//   riq_lrl           - logical register numbers of buffered instructions;
//   riq_reuse_sched   - reuse pointer feeding buffered instructions back to
//                       the renaming logic in program order.
// The fetch unit, decoder, branch predictor, renaming logic, reorder buffer
// and function units are outside: their signals are ports.
//
// Ports and timing:
//   disp / disp_cnt   - a group of up to DISP_W renamed instructions, in
//                       program order, with their decode information; the
//                       first disp_cnt of them are taken this cycle (none in
//                       Code_Reuse, none during a misprediction). Members not
//                       taken must be offered again, except after the switch
//                       to Code_Reuse, when the front end is gated and
//                       discards them.
//   reuse_req         - combinational: logical registers of the buffered
//                       instructions reused this cycle (Code_Reuse only).
//   reuse_ren         - same cycle: their renamed tags and ROB indices.
//   ren_avail         - how many instructions renaming can take this cycle.
//   issue             - combinational: up to ISSUE_W issued instructions.
//   wb_valid / wb_tag - result tags waking up dependent entries.
//   mispredict        - a branch at writeback was mispredicted; entries
//                       younger than mp_rob (ROB age from rob_head) are
//                       squashed and any buffering is revoked.
//   frontend_gate     - high while in Code_Reuse.
//   events            - one-cycle pulses of the controller's decisions.
module riq_top
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE    = 64,
  parameter int unsigned DISP_W     = 4,
  parameter int unsigned ISSUE_W    = 4,
  parameter int unsigned WB_W       = 4,
  parameter int unsigned NBLT_DEPTH = 8,
  localparam int unsigned SLOT_W    = $clog2(IQ_SIZE),
  localparam int unsigned CNT_W     = $clog2(IQ_SIZE + 1),
  localparam int unsigned D_W       = $clog2(DISP_W + 1),
  localparam int unsigned W_W       = $clog2(ISSUE_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  disp_instr_t      disp [DISP_W],
  output logic [D_W-1:0]   disp_cnt,
  output reuse_req_t       reuse_req [ISSUE_W],
  input  ren_info_t        reuse_ren [ISSUE_W],
  input  logic [W_W-1:0]   ren_avail,
  output issue_t           issue [ISSUE_W],
  input  logic [WB_W-1:0]  wb_valid,
  input  preg_t            wb_tag [WB_W],
  input  logic             mispredict,
  input  rob_idx_t         mp_rob,
  input  rob_idx_t         rob_head,
  output logic             frontend_gate,
  output iq_state_e        iq_state,
  output addr_t            loop_head,
  output addr_t            loop_tail,
  output logic [CNT_W-1:0] iq_count,
  output logic [CNT_W-1:0] iq_nbuf,
  output logic             reuse_wrap,
  output logic [SLOT_W-1:0] reuse_ptr,
  output logic [W_W-1:0]   reuse_cnt,
  output logic             iq_collapse,
  output riq_events_t      events
);

  logic [DISP_W-1:0] d_valid, d_cond, d_jump, d_call, d_ret, d_taken;
  addr_t             d_pc [DISP_W], d_target [DISP_W];
  ren_info_t         d_ren [DISP_W];
  static_info_t      d_info [DISP_W];
  lrl_entry_t        d_lregs [DISP_W];

  always_comb begin
    for (int i = 0; i < DISP_W; i++) begin
      d_valid[i]  = disp[i].valid;
      d_cond[i]   = disp[i].is_cond_br;
      d_jump[i]   = disp[i].is_jump;
      d_call[i]   = disp[i].is_call;
      d_ret[i]    = disp[i].is_ret;
      d_taken[i]  = disp[i].info.pred_taken;
      d_pc[i]     = disp[i].pc;
      d_target[i] = disp[i].target;
      d_ren[i]    = disp[i].ren;
      d_info[i]   = disp[i].info;
      d_lregs[i]  = disp[i].lregs;
    end
  end

  logic [DISP_W-1:0] is_loop, nblt_hit, take, cls;
  logic [SLOT_W-1:0] buf_slot [DISP_W];
  logic [D_W-1:0]    avail;
  logic [CNT_W-1:0]  nbuf;
  logic              revoke, reuse_start, nblt_ins;
  addr_t             nblt_ins_addr;
  iq_state_e         state;

  riq_loop_detector #(.IQ_SIZE(IQ_SIZE), .WIDTH(DISP_W)) u_det (
    .valid(d_valid), .pc(d_pc), .is_cond_br(d_cond), .is_jump(d_jump),
    .pred_taken(d_taken), .target(d_target), .is_loop(is_loop));

  riq_nblt #(.DEPTH(NBLT_DEPTH), .LOOKUPS(DISP_W)) u_nblt (
    .clk, .rst_n, .lookup_addr(d_pc), .lookup_hit(nblt_hit),
    .insert(nblt_ins), .insert_addr(nblt_ins_addr));

  riq_ctrl #(.IQ_SIZE(IQ_SIZE), .DISP_W(DISP_W)) u_ctrl (
    .clk, .rst_n, .valid(d_valid), .pc(d_pc), .target(d_target),
    .is_call(d_call), .is_ret(d_ret), .is_loop, .nblt_hit,
    .disp_avail(avail), .nbuf, .mispredict,
    .disp_take(take), .disp_cnt, .disp_cls(cls), .buf_slot,
    .revoke, .reuse_start, .nblt_insert(nblt_ins),
    .nblt_insert_addr(nblt_ins_addr), .state, .loop_head, .loop_tail,
    .frontend_gate, .events);

  logic [IQ_SIZE-1:0] buf_issued;
  logic [ISSUE_W-1:0] ru_valid;
  logic [SLOT_W-1:0]  ru_slot [ISSUE_W];
  lrl_entry_t         ru_lregs [ISSUE_W];

  riq_reuse_sched #(.IQ_SIZE(IQ_SIZE), .ISSUE_W(ISSUE_W)) u_reuse (
    .clk, .rst_n, .start(reuse_start),
    .active(state == IQ_CODE_REUSE && !mispredict),
    .nbuf, .buf_issued, .ren_avail,
    .reuse_valid(ru_valid), .reuse_slot(ru_slot), .reuse_cnt,
    .ptr(reuse_ptr), .wrap(reuse_wrap));

  riq_lrl #(.IQ_SIZE(IQ_SIZE), .WR_W(DISP_W), .RD_W(ISSUE_W)) u_lrl (
    .clk, .we(take & cls), .waddr(buf_slot), .wdata(d_lregs),
    .raddr(ru_slot), .rdata(ru_lregs));

  riq_issue_queue #(.IQ_SIZE(IQ_SIZE), .DISP_W(DISP_W), .ISSUE_W(ISSUE_W),
                    .WB_W(WB_W)) u_iq (
    .clk, .rst_n, .disp_take(take), .disp_cls(cls), .disp_ren(d_ren),
    .disp_info(d_info), .disp_avail(avail), .wb_valid, .wb_tag, .issue,
    .ru_valid, .ru_slot, .ru_ren(reuse_ren), .nbuf, .buf_issued,
    .squash(mispredict), .squash_rob(mp_rob), .rob_head, .revoke,
    .count(iq_count), .collapse(iq_collapse));

  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      reuse_req[k].valid = ru_valid[k];
      reuse_req[k].lregs = ru_lregs[k];
    end
  end

  assign iq_state = state;
  assign iq_nbuf  = nbuf;

endmodule
