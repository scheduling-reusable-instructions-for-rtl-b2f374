// riq_reuse_sched: reuse pointer of the issue queue.
//
// In Code_Reuse the issue queue supplies instructions itself. The reuse
// pointer names the next buffered instruction (by buffer slot, 0 being the
// first buffered instruction) to send back to the renaming logic. Each
// cycle the issue state bits of the ISSUE_W slots starting at the pointer
// are examined; the leading m of them that are set (these instructions have
// issued, so their entries may be taken over by the next dynamic instance)
// are reused: their slots are output, the renaming logic renames them from
// the logical register list, and the pointer advances by m. When the last
// buffered instruction has been reused the pointer returns to slot 0, so the
// buffered iterations are replayed in program order.
//
// Interface: `start` (one cycle, on entering Code_Reuse) resets the pointer
// to slot 0; `active` enables reuse; `ren_avail` caps m at what the renaming
// logic (and reorder buffer) can take this cycle. The outputs are
// combinational in the current pointer; the pointer moves at the clock edge.
// A window never wraps past the last buffered slot within one cycle; this,
// and the `ren_avail` cap, are this design's choices.
module riq_reuse_sched
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE = 64,
  parameter int unsigned ISSUE_W = 4,
  localparam int unsigned SLOT_W = $clog2(IQ_SIZE),
  localparam int unsigned CNT_W  = $clog2(IQ_SIZE + 1),
  localparam int unsigned W_W    = $clog2(ISSUE_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               active,
  input  logic [CNT_W-1:0]   nbuf,                 // number of buffered instructions
  input  logic [IQ_SIZE-1:0] buf_issued,           // issue state bit per slot
  input  logic [W_W-1:0]     ren_avail,
  output logic [ISSUE_W-1:0] reuse_valid,
  output logic [SLOT_W-1:0]  reuse_slot [ISSUE_W],
  output logic [W_W-1:0]     reuse_cnt,
  output logic [SLOT_W-1:0]  ptr,
  output logic               wrap                  // pointer returns to slot 0
);

  logic [SLOT_W-1:0] ptr_q;
  logic [CNT_W-1:0]  ptr_next;

  always_comb begin
    logic run;
    run       = active;
    reuse_cnt = '0;
    for (int k = 0; k < ISSUE_W; k++) begin
      logic [CNT_W-1:0] s;
      s              = CNT_W'(ptr_q) + CNT_W'(k);
      reuse_slot[k]  = SLOT_W'(s);
      run            = run && (s < nbuf) && buf_issued[SLOT_W'(s)] &&
                       (W_W'(k) < ren_avail);
      reuse_valid[k] = run;
      if (run) reuse_cnt = W_W'(k + 1);
    end
    ptr_next = CNT_W'(ptr_q) + CNT_W'(reuse_cnt);
    wrap     = active && (reuse_cnt != '0) && (ptr_next >= nbuf);
    ptr      = ptr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            ptr_q <= '0;
    else if (start)        ptr_q <= '0;
    else if (wrap)         ptr_q <= '0;
    else if (active)       ptr_q <= SLOT_W'(ptr_next);
  end

endmodule
