// riq_issue_queue: unified collapsing issue queue with instruction reuse.
//
// Entries are kept in program order, oldest at index 0; dispatched
// instructions are appended behind the youngest valid entry and every hole
// left by a removed instruction is closed at the next clock edge (a
// collapsing queue). Each entry carries, besides its renamed operands, two
// extra bits:
//   cls    - classification bit: the instruction belongs to a buffered loop;
//   issued - issue state bit: a buffered instruction has been issued.
// An issued instruction whose classification bit is clear leaves the queue;
// a buffered one stays, with its issue state bit set, so that it can be
// reused. Because buffering only ever appends and buffered entries are never
// removed while the loop stays buffered, the buffered instructions form one
// contiguous block at the young end of the queue. Buffer slot s therefore
// lives at entry (count - nbuf + s), which is how reuse updates and the
// issue state bits seen by the reuse pointer are addressed.
//
// Per cycle:
//   wakeup  - WB_W result tags set the ready bits of matching sources;
//   select  - up to ISSUE_W ready, not yet issued entries, oldest first,
//             within the function-unit mix (N_IALU, N_IMULT, N_FPALU,
//             N_FPMULT per cycle); outputs are combinational;
//   reuse   - a renamed reused instruction rewrites only its register tags
//             and ROB index and clears its issue state bit;
//   squash  - on a misprediction, entries younger (by ROB age) than the
//             branch are removed;
//   revoke  - buffered instructions that have issued are removed and all
//             classification bits are cleared;
//   dispatch- the first disp_cnt group members are appended with their
//             classification bit from the controller.
// disp_avail reports free entries (capped at DISP_W) for the next group.
//
// Following the design: the unified collapsing queue, the classification
// and issue state bits, retention of issued buffered entries, partial
// (register and ROB pointer) update on reuse and the revoke rule. This
// design's own choices: oldest-first select, a wakeup-to-select latency of
// one cycle, age by ROB index relative to the ROB head, and the per-cycle
// function-unit limits taken from the baseline unit counts.
// The two clocked assertions at the end sample rst_n to stay quiet during
// reset; lint therefore sees rst_n used both asynchronously and
// synchronously, which concerns only these checks.
module riq_issue_queue
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE  = 64,
  parameter int unsigned DISP_W   = 4,
  parameter int unsigned ISSUE_W  = 4,
  parameter int unsigned WB_W     = 4,
  parameter int unsigned N_IALU   = 4,
  parameter int unsigned N_IMULT  = 1,
  parameter int unsigned N_FPALU  = 4,
  parameter int unsigned N_FPMULT = 1,
  localparam int unsigned SLOT_W  = $clog2(IQ_SIZE),
  localparam int unsigned CNT_W   = $clog2(IQ_SIZE + 1),
  localparam int unsigned D_W     = $clog2(DISP_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic [DISP_W-1:0]  disp_take,   // contiguous from member 0
  input  logic [DISP_W-1:0]  disp_cls,
  input  ren_info_t          disp_ren  [DISP_W],
  input  static_info_t       disp_info [DISP_W],
  output logic [D_W-1:0]     disp_avail,
  // wakeup
  input  logic [WB_W-1:0]    wb_valid,
  input  preg_t              wb_tag [WB_W],
  // issue
  output issue_t             issue [ISSUE_W],
  // reuse
  input  logic [ISSUE_W-1:0] ru_valid,
  input  logic [SLOT_W-1:0]  ru_slot [ISSUE_W],
  input  ren_info_t          ru_ren  [ISSUE_W],
  output logic [CNT_W-1:0]   nbuf,
  output logic [IQ_SIZE-1:0] buf_issued,  // issue state bit by buffer slot
  // recovery
  input  logic               squash,
  input  rob_idx_t           squash_rob,  // the mispredicted branch
  input  rob_idx_t           rob_head,    // oldest instruction in the ROB
  input  logic               revoke,
  // status
  output logic [CNT_W-1:0]   count,
  output logic               collapse     // a hole was closed this cycle
);

  iq_entry_t        q   [IQ_SIZE];
  logic [CNT_W-1:0] count_q, nbuf_q;

  iq_entry_t        mid [IQ_SIZE];
  iq_entry_t        nxt [IQ_SIZE];
  logic [IQ_SIZE-1:0] sel;
  logic [CNT_W-1:0] count_d, nbuf_d;
  logic [CNT_W-1:0] base;

  function automatic logic woken(preg_t tag, logic [WB_W-1:0] v, preg_t t [WB_W]);
    logic hit;
    hit = 1'b0;
    for (int w = 0; w < WB_W; w++) if (v[w] && t[w] == tag) hit = 1'b1;
    return hit;
  endfunction

  assign base = count_q - nbuf_q;

  // select: oldest first within the function-unit mix
  always_comb begin
    int   n_tot, n_ia, n_im, n_fa, n_fm;
    logic ok;
    n_tot = 0; n_ia = 0; n_im = 0; n_fa = 0; n_fm = 0;
    sel   = '0;
    for (int k = 0; k < ISSUE_W; k++) issue[k] = '0;
    for (int i = 0; i < IQ_SIZE; i++) begin
      unique case (q[i].info.fu)
        FU_IALU:  ok = n_ia < int'(N_IALU);
        FU_IMULT: ok = n_im < int'(N_IMULT);
        FU_FPALU: ok = n_fa < int'(N_FPALU);
        default:  ok = n_fm < int'(N_FPMULT);
      endcase
      ok = ok && q[i].valid && !q[i].issued && q[i].ren.rdy1 && q[i].ren.rdy2 &&
           (n_tot < int'(ISSUE_W));
      sel[i] = ok;
      for (int k = 0; k < ISSUE_W; k++) begin
        if (ok && n_tot == k) begin
          issue[k].valid    = 1'b1;
          issue[k].ren      = q[i].ren;
          issue[k].info     = q[i].info;
          issue[k].reusable = q[i].cls;
        end
      end
      n_tot = n_tot + int'(ok);
      n_ia  = n_ia + int'(ok && q[i].info.fu == FU_IALU);
      n_im  = n_im + int'(ok && q[i].info.fu == FU_IMULT);
      n_fa  = n_fa + int'(ok && q[i].info.fu == FU_FPALU);
      n_fm  = n_fm + int'(ok && q[i].info.fu == FU_FPMULT);
    end
  end

  // reuse view: issue state bits by buffer slot
  always_comb begin
    for (int s = 0; s < IQ_SIZE; s++) begin
      logic [CNT_W:0] e;
      e = (CNT_W+1)'(base) + (CNT_W+1)'(s);
      buf_issued[s] = (CNT_W'(s) < nbuf_q) && (e < (CNT_W+1)'(IQ_SIZE)) &&
                      q[SLOT_W'(e)].issued;
    end
  end

  // next state
  always_comb begin
    logic [ROB_W-1:0]  br_age;
    logic [SLOT_W-1:0] e;
    int                pos;
    br_age   = squash_rob - rob_head;
    e        = '0;
    pos      = 0;
    collapse = 1'b0;
    // wakeup, issue, reuse update, squash, revoke on the current entries
    for (int i = 0; i < IQ_SIZE; i++) begin
      mid[i] = q[i];
      if (woken(q[i].ren.psrc1, wb_valid, wb_tag)) mid[i].ren.rdy1 = 1'b1;
      if (woken(q[i].ren.psrc2, wb_valid, wb_tag)) mid[i].ren.rdy2 = 1'b1;
      if (sel[i]) begin
        if (q[i].cls) mid[i].issued = 1'b1;
        else          mid[i].valid  = 1'b0;
      end
    end
    for (int k = 0; k < ISSUE_W; k++) begin
      if (ru_valid[k]) begin
        e = SLOT_W'(base + CNT_W'(ru_slot[k]));
        mid[e].ren    = ru_ren[k];
        mid[e].issued = 1'b0;
        if (woken(ru_ren[k].psrc1, wb_valid, wb_tag)) mid[e].ren.rdy1 = 1'b1;
        if (woken(ru_ren[k].psrc2, wb_valid, wb_tag)) mid[e].ren.rdy2 = 1'b1;
      end
    end
    for (int i = 0; i < IQ_SIZE; i++) begin
      if (squash && mid[i].valid && ((mid[i].ren.rob - rob_head) > br_age))
        mid[i].valid = 1'b0;
      if (revoke) begin
        if (mid[i].cls && mid[i].issued) mid[i].valid = 1'b0;
        mid[i].cls = 1'b0;
      end
    end
    // collapse
    for (int i = 0; i < IQ_SIZE; i++) nxt[i] = '0;
    pos = 0;
    for (int i = 0; i < IQ_SIZE; i++) begin
      if (mid[i].valid) begin
        nxt[pos] = mid[i];
        pos++;
      end else if (q[i].valid) begin
        collapse = 1'b1;
      end
    end
    // append the dispatched instructions
    nbuf_d = revoke ? '0 : nbuf_q;
    for (int k = 0; k < DISP_W; k++) begin
      if (disp_take[k] && pos < int'(IQ_SIZE)) begin
        nxt[pos].valid    = 1'b1;
        nxt[pos].cls      = disp_cls[k];
        nxt[pos].issued   = 1'b0;
        nxt[pos].ren      = disp_ren[k];
        nxt[pos].info     = disp_info[k];
        if (woken(disp_ren[k].psrc1, wb_valid, wb_tag)) nxt[pos].ren.rdy1 = 1'b1;
        if (woken(disp_ren[k].psrc2, wb_valid, wb_tag)) nxt[pos].ren.rdy2 = 1'b1;
        if (disp_cls[k]) nbuf_d = nbuf_d + 1'b1;
        pos++;
      end
    end
    count_d = CNT_W'(pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IQ_SIZE; i++) q[i] <= '0;
      count_q <= '0;
      nbuf_q  <= '0;
    end else begin
      for (int i = 0; i < IQ_SIZE; i++) q[i] <= nxt[i];
      count_q <= count_d;
      nbuf_q  <= nbuf_d;
    end
  end

  always_comb begin
    logic [CNT_W-1:0] free;
    free       = CNT_W'(IQ_SIZE) - count_q;
    disp_avail = (free > CNT_W'(DISP_W)) ? D_W'(DISP_W) : D_W'(free);
  end

  assign nbuf  = nbuf_q;
  assign count = count_q;

  // a dispatch group must start at member 0 and have no holes
  a_disp_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (disp_take & (disp_take + 1'b1)) == '0)
    else $error("dispatch group not contiguous: %b", disp_take);
  a_disp_fits: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(disp_take) <= int'(disp_avail))
    else $error("dispatch beyond free entries");

endmodule
