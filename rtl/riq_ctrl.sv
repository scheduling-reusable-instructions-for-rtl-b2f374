// riq_ctrl: issue queue state controller.
//
// Holds R_iqstate (Normal 00, Loop_Buffering 01, Code_Reuse 11), the loop
// bounds R_loophead / R_looptail, the size counter of the iteration being
// buffered and a procedure-call depth counter, and decides for every
// instruction dispatched into the issue queue whether it is buffered.
//
//  * Normal: a capturable loop end flagged by the loop detector that misses
//    in the non-bufferable loop table (NBLT) records its target and address
//    in R_loophead / R_looptail and moves to Loop_Buffering; the following
//    instructions (the next iteration) are buffered.
//  * Loop_Buffering: each instruction is buffered (classification bit set)
//    and counted. At the loop-ending instruction the count (the size of the
//    iteration just buffered, procedure bodies included) is compared with
//    the entries not yet holding buffered instructions: if another
//    iteration fits, buffering continues (the loop is unrolled in the
//    queue), otherwise the state becomes Code_Reuse and the instructions
//    after the loop end are not accepted. Buffering is revoked, and the loop
//    end registered in the NBLT, when execution leaves [R_loophead,
//    R_looptail] outside a called procedure, when an inner loop is
//    detected, or when every entry holds a buffered instruction before the
//    loop end is reached.
//  * Code_Reuse: the front end is gated (frontend_gate = 1) and no
//    instruction is accepted from it; the issue queue replays the buffered
//    loop. A branch misprediction returns to Normal.
//
// A misprediction in Loop_Buffering or Code_Reuse revokes buffering (the
// squash of younger instructions is done by the issue queue) without an
// NBLT entry. A revoke returns to Normal and raises `revoke` for one cycle.
//
// Timing: the per-instruction decisions for one dispatch group (up to
// DISP_W instructions, in program order) are combinational in the cycle the
// group is dispatched; state registers update at the clock edge. The
// outputs disp_take / disp_cls / buf_slot tell the issue queue which
// instructions it takes and which are buffered.
//
// Following the design: the three states and their encoding, the two
// dedicated address registers, multi-iteration buffering with the
// count-versus-free-entries decision, continued buffering across calls, the
// three revoke causes that feed the NBLT, and gating in Code_Reuse.
// This design's own choices: detection and buffering act on the same
// dispatch group, so the instructions after the loop end in that group are
// already buffered; "free entries" counts entries not holding buffered
// instructions; the call depth counter (calls +1, returns -1) decides
// whether an address outside the loop belongs to a called procedure;
// a misprediction does not fill the NBLT.
module riq_ctrl
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE = 64,
  parameter int unsigned DISP_W  = 4,
  localparam int unsigned SLOT_W = $clog2(IQ_SIZE),
  localparam int unsigned CNT_W  = $clog2(IQ_SIZE + 1),
  localparam int unsigned D_W    = $clog2(DISP_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch group (decode-stage information)
  input  logic [DISP_W-1:0] valid,
  input  addr_t             pc      [DISP_W],
  input  addr_t             target  [DISP_W],
  input  logic [DISP_W-1:0] is_call,
  input  logic [DISP_W-1:0] is_ret,
  input  logic [DISP_W-1:0] is_loop,    // from riq_loop_detector
  input  logic [DISP_W-1:0] nblt_hit,   // from riq_nblt
  input  logic [D_W-1:0]    disp_avail, // free issue queue entries, capped at DISP_W
  input  logic [CNT_W-1:0]  nbuf,       // buffered instructions in the queue
  input  logic              mispredict,
  // decisions
  output logic [DISP_W-1:0] disp_take,
  output logic [D_W-1:0]    disp_cnt,
  output logic [DISP_W-1:0] disp_cls,
  output logic [SLOT_W-1:0] buf_slot [DISP_W],
  output logic              revoke,
  output logic              reuse_start,
  output logic              nblt_insert,
  output addr_t             nblt_insert_addr,
  output iq_state_e         state,
  output addr_t             loop_head,
  output addr_t             loop_tail,
  output logic              frontend_gate,
  output riq_events_t       events
);

  localparam int unsigned DEP_W = 4;   // call nesting tracked (assumed)

  iq_state_e          state_q, state_d;
  addr_t              head_q, head_d, tail_q, tail_d;
  logic [CNT_W-1:0]   iter_q, iter_d;
  logic [DEP_W-1:0]   depth_q, depth_d;

  always_comb begin
    logic [CNT_W-1:0] nb;
    logic             stop, revoked, in_loop;

    state_d          = state_q;
    head_d           = head_q;
    tail_d           = tail_q;
    iter_d           = iter_q;
    depth_d          = depth_q;
    disp_take        = '0;
    disp_cls         = '0;
    disp_cnt         = '0;
    revoke           = 1'b0;
    reuse_start      = 1'b0;
    nblt_insert      = 1'b0;
    nblt_insert_addr = tail_q;
    events           = '0;
    nb               = nbuf;
    stop             = 1'b0;
    revoked          = 1'b0;
    in_loop          = 1'b0;
    for (int i = 0; i < DISP_W; i++) buf_slot[i] = '0;

    if (mispredict) begin
      if (state_q != IQ_NORMAL) begin
        revoke         = 1'b1;
        events.mp_revoke = 1'b1;
      end
      state_d = IQ_NORMAL;
      stop    = 1'b1;
    end else if (state_q == IQ_CODE_REUSE) begin
      stop = 1'b1;                       // front end gated
    end else if (state_q == IQ_LOOP_BUF && nbuf == CNT_W'(IQ_SIZE)) begin
      // queue used up before the loop end: e.g. a large called procedure
      revoke             = 1'b1;
      revoked            = 1'b1;
      events.revoke_full = 1'b1;
      nblt_insert        = 1'b1;
      state_d            = IQ_NORMAL;
    end

    for (int i = 0; i < DISP_W; i++) begin
      if (!stop && valid[i] && (D_W'(i) < disp_avail)) begin
        disp_take[i] = 1'b1;
        disp_cnt     = D_W'(i + 1);
        if (state_d == IQ_NORMAL) begin
          if (is_loop[i] && !revoked) begin
            events.loop_detect = 1'b1;
            if (nblt_hit[i]) begin
              events.nblt_hit = 1'b1;
            end else begin
              events.buf_start = 1'b1;
              state_d = IQ_LOOP_BUF;
              head_d  = target[i];
              tail_d  = pc[i];
              iter_d  = '0;
              depth_d = '0;
            end
          end
        end else begin                   // IQ_LOOP_BUF
          in_loop = ((pc[i] >= head_d) && (pc[i] <= tail_d)) || (depth_d != '0);
          if (!in_loop) begin
            revoke             = 1'b1;
            revoked            = 1'b1;
            events.revoke_exit = 1'b1;
            nblt_insert        = 1'b1;
            nblt_insert_addr   = tail_d;
            state_d            = IQ_NORMAL;
          end else if (is_loop[i] && pc[i] != tail_d) begin
            revoke              = 1'b1;
            revoked             = 1'b1;
            events.revoke_inner = 1'b1;
            nblt_insert         = 1'b1;
            nblt_insert_addr    = tail_d;
            state_d             = IQ_NORMAL;
          end else begin
            disp_cls[i] = 1'b1;
            buf_slot[i] = SLOT_W'(nb);
            nb          = nb + 1'b1;
            iter_d      = iter_d + 1'b1;
            if (is_call[i])                         depth_d = depth_d + 1'b1;
            else if (is_ret[i] && depth_d != '0)    depth_d = depth_d - 1'b1;
            if (pc[i] == tail_d && is_loop[i] && depth_d == '0) begin
              // end of a buffered iteration: will another one fit?
              if (iter_d <= CNT_W'(IQ_SIZE) - nb) begin
                events.buf_continue = 1'b1;
                iter_d = '0;
              end else begin
                events.reuse_start = 1'b1;
                reuse_start        = 1'b1;
                state_d            = IQ_CODE_REUSE;
                stop               = 1'b1;   // rest of the group is not taken
              end
            end
          end
        end
      end else begin
        stop = 1'b1;                     // keep program order: no holes
      end
    end

    if (revoke) disp_cls = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IQ_NORMAL;
      head_q  <= '0;
      tail_q  <= '0;
      iter_q  <= '0;
      depth_q <= '0;
    end else begin
      state_q <= state_d;
      head_q  <= head_d;
      tail_q  <= tail_d;
      iter_q  <= iter_d;
      depth_q <= depth_d;
    end
  end

  assign state         = state_q;
  assign loop_head     = head_q;
  assign loop_tail     = tail_q;
  assign frontend_gate = (state_q == IQ_CODE_REUSE);

endmodule
