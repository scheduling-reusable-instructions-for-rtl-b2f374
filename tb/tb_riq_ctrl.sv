// tb_riq_ctrl: self-checking test of the issue queue state controller.
//
// Builds dynamic instruction traces of small programs (a simple loop, a
// loop left early, a nest with an inner loop, a loop calling a small and a
// large procedure) and feeds them in dispatch groups of up to DISP_W as the
// controller accepts them. The loop-detector and NBLT inputs, and the count
// of buffered instructions, are modelled here. Checks: the state sequence,
// R_loophead / R_looptail, the number of instructions buffered when Code_Reuse
// is entered (floor(IQ_SIZE / iteration size) iterations), that nothing is
// taken after the loop end that triggers Code_Reuse, front-end gating, each
// revoke cause with its NBLT registration, NBLT-suppressed buffering and the
// return to Normal on a misprediction. A sweep over every loop size from 1
// to IQ_SIZE + 1, with randomly reduced dispatch capacity, checks the
// buffered count against floor(IQ_SIZE / size) * size, the loop bounds,
// per-cycle consistency of disp_cnt / disp_take / frontend_gate, and that a
// loop one instruction too large is never buffered.
module tb_riq_ctrl;
  import riq_pkg::*;
  localparam int unsigned IQ = 64, DW = 4, SW = $clog2(IQ), CW = $clog2(IQ+1), D_W = $clog2(DW+1);

  typedef struct { addr_t pc; logic cond, jump, call, ret, taken; addr_t target; } tr_t;
  tr_t trace [$];

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] valid, is_call, is_ret, is_loop, nblt_hit;
  addr_t pc [DW], target [DW];
  logic [D_W-1:0] disp_avail;
  logic [CW-1:0] nbuf;
  logic mispredict = 0;
  logic [DW-1:0] disp_take, disp_cls;
  logic [D_W-1:0] disp_cnt;
  logic [SW-1:0] buf_slot [DW];
  logic revoke, reuse_start, nblt_insert, frontend_gate;
  addr_t nblt_insert_addr, loop_head, loop_tail;
  iq_state_e state;
  riq_events_t events;

  riq_ctrl #(.IQ_SIZE(IQ), .DISP_W(DW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, idx = 0, nb = 0;
  bit throttle = 0;   // offer a random, smaller dispatch capacity
  addr_t nblt_model [$];
  int n_detect, n_start, n_cont, n_reuse, n_exit, n_inner, n_full, n_hit, n_mp, nbuf_at_reuse;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // trace builders
  task automatic lin(addr_t a, int n);
    for (int i = 0; i < n; i++) trace.push_back('{a + 4*i, 0, 0, 0, 0, 0, '0});
  endtask
  // loop body of len instrs at head, iterated iters times; optional call at
  // position cpos to a procedure of plen instructions at proc (last is ret)
  task automatic loop(addr_t head, int len, int iters, int cpos = -1, addr_t proc = '0, int plen = 0);
    for (int it = 0; it < iters; it++)
      for (int i = 0; i < len; i++) begin
        addr_t a = head + 4*i;
        if (i == len - 1)
          trace.push_back('{a, 1, 0, 0, 0, (it != iters - 1), head});
        else if (i == cpos) begin
          trace.push_back('{a, 0, 1, 1, 0, 1, proc});
          for (int p = 0; p < plen; p++)
            trace.push_back('{proc + 4*p, 0, 0, 0, (p == plen - 1), 0, '0});
        end else
          trace.push_back('{a, 0, 0, 0, 0, 0, '0});
      end
  endtask

  function automatic logic in_nblt(addr_t a);
    foreach (nblt_model[i]) if (nblt_model[i] == a) return 1'b1;
    return 1'b0;
  endfunction

  // present the next group, clock it, account for what was taken
  task automatic step();
    @(negedge clk);
    for (int i = 0; i < DW; i++) begin
      if (idx + i < trace.size()) begin
        tr_t t = trace[idx + i];
        longint span = (longint'(t.pc) - longint'(t.target)) / 4;
        valid[i]    = 1'b1;
        pc[i]       = t.pc;
        target[i]   = t.target;
        is_call[i]  = t.call;
        is_ret[i]   = t.ret;
        is_loop[i]  = (t.jump || (t.cond && t.taken)) && t.target <= t.pc && span < longint'(IQ);
        nblt_hit[i] = in_nblt(t.pc);
      end else begin
        valid[i] = 0; pc[i] = '0; target[i] = '0; is_call[i] = 0; is_ret[i] = 0;
        is_loop[i] = 0; nblt_hit[i] = 0;
      end
    end
    disp_avail = D_W'((IQ - nb) < DW ? (IQ - nb) : DW);
    if (throttle) disp_avail = D_W'($urandom_range(0, int'(disp_avail)));
    nbuf = CW'(nb);
    #1;
    chk(frontend_gate == (state == IQ_CODE_REUSE), "gate follows Code_Reuse");
    chk(int'(disp_cnt) == $countones(disp_take), "disp_cnt matches disp_take");
    for (int i = 0; i < DW; i++)
      if (disp_take[i]) chk(int'(i) < int'(disp_avail) && valid[i], "take within capacity");
    if (events.loop_detect)  n_detect++;
    if (events.buf_start)    n_start++;
    if (events.buf_continue) n_cont++;
    if (events.nblt_hit)     n_hit++;
    if (events.revoke_exit)  n_exit++;
    if (events.revoke_inner) n_inner++;
    if (events.revoke_full)  n_full++;
    if (events.mp_revoke)    n_mp++;
    for (int i = 0; i < DW; i++)
      if (disp_take[i] && disp_cls[i]) begin
        chk(buf_slot[i] == SW'(nb), "buffer slot numbering");
        nb++;
      end
    if (events.reuse_start) begin
      n_reuse++;
      nbuf_at_reuse = nb;
      // nothing after the loop end is taken
      for (int i = 0; i < DW; i++)
        if (disp_take[i]) chk(!(i < DW-1 && disp_take[i+1] && trace[idx+i].pc == loop_tail), "no take past loop end");
    end
    if (nblt_insert) begin
      chk(nblt_insert_addr == loop_tail, "NBLT gets the loop-ending address");
      if (!in_nblt(nblt_insert_addr)) nblt_model.push_back(nblt_insert_addr);
    end
    if (revoke) nb = 0;
    @(posedge clk);
    idx += int'(disp_cnt);
  endtask

  task automatic clear_counts();
    n_detect = 0; n_start = 0; n_cont = 0; n_reuse = 0; n_exit = 0; n_inner = 0;
    n_full = 0; n_hit = 0; n_mp = 0; nbuf_at_reuse = -1;
  endtask

  task automatic run_to_end(int max_cycles);
    for (int c = 0; c < max_cycles && idx < trace.size() && state != IQ_CODE_REUSE; c++) step();
  endtask

  task automatic mispredict_now();
    @(negedge clk);
    mispredict = 1;
    #1 chk(revoke == (state != IQ_NORMAL), "revoke on misprediction");
    @(posedge clk);
    #1 mispredict = 0;
    nb = 0;
    chk(state == IQ_NORMAL && !frontend_gate, "back to Normal after misprediction");
  endtask

  task automatic new_trace();
    trace.delete(); idx = 0; clear_counts();
  endtask

  initial begin
    valid = '0; is_loop = '0; nblt_hit = '0; is_call = '0; is_ret = '0;
    for (int i = 0; i < DW; i++) begin pc[i] = '0; target[i] = '0; end
    disp_avail = '0; nbuf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // A: 5-instruction loop: 12 iterations (60) buffered, then Code_Reuse
    new_trace(); lin(32'h0f00, 6); loop(32'h1000, 5, 40); lin(32'h1014, 8);
    run_to_end(200);
    chk(state == IQ_CODE_REUSE && frontend_gate, "A: Code_Reuse and gated");
    chk(n_start == 1 && n_reuse == 1, "A: one buffering, one switch");
    chk(nbuf_at_reuse == 60, $sformatf("A: buffered %0d exp 60", nbuf_at_reuse));
    chk(n_cont == 11, $sformatf("A: continue decisions %0d exp 11", n_cont));
    chk(loop_head == 32'h1000 && loop_tail == 32'h1010, "A: R_loophead/R_looptail");
    repeat (3) begin step(); chk(disp_cnt == 0, "A: nothing taken in Code_Reuse"); end
    mispredict_now();

    // B: loop with a call to a 6-instruction procedure: 14 per iteration, 4 buffered
    new_trace(); loop(32'h2000, 8, 40, 2, 32'h8000, 6);
    run_to_end(400);
    chk(n_reuse == 1 && nbuf_at_reuse == 56, $sformatf("B: call inside loop buffered %0d exp 56", nbuf_at_reuse));
    chk(n_exit == 0 && n_full == 0, "B: no revoke");
    mispredict_now();

    // C: loop left after 3 iterations: revoke, NBLT entry, then NBLT hit
    new_trace(); loop(32'h3000, 6, 3); lin(32'h3018, 4); loop(32'h3000, 6, 3); lin(32'h3018, 4);
    run_to_end(200);
    chk(n_start == 1 && n_exit == 1 && n_reuse == 0, "C: revoked on loop exit");
    chk(in_nblt(32'h3014), "C: loop registered in NBLT");
    chk(n_hit >= 1 && state == IQ_NORMAL, "C: NBLT suppresses buffering");

    // D: outer loop with an inner loop
    new_trace();
    for (int o = 0; o < 3; o++) begin
      lin(32'h4000, 3); loop(32'h400c, 2, 3); lin(32'h4014, 2);
      trace.push_back('{32'h401c, 1, 0, 0, 0, 1, 32'h4000});
    end
    run_to_end(200);
    chk(n_inner == 1, $sformatf("D: inner loop revoke %0d", n_inner));
    chk(in_nblt(32'h401c) && in_nblt(32'h4010), "D: both loops registered");

    // E: procedure too large for the queue: revoked when the queue is used up
    new_trace(); loop(32'h5000, 4, 6, 1, 32'h9000, 80); lin(32'h5010, 4);
    run_to_end(400);
    chk(n_full == 1 && n_reuse == 0, "E: revoked when queue used up");
    chk(in_nblt(32'h500c), "E: registered in NBLT");

    // F: misprediction while buffering
    new_trace(); loop(32'h6000, 20, 6);
    for (int c = 0; c < 12; c++) step();
    chk(state == IQ_LOOP_BUF, "F: buffering");
    mispredict_now();
    chk(!in_nblt(32'h604c), "F: misprediction does not fill NBLT");

    // G: every loop size from 1 to 64, with throttled dispatch. Buffering
    // stops after floor(64 / len) iterations. A 65-instruction loop is not
    // capturable and is never buffered.
    throttle = 1;
    for (int len = 1; len <= 65; len++) begin
      addr_t h;
      int    k;
      h = 32'h10_0000 + 32'h1000 * len;
      k = int'(IQ) / len;
      new_trace(); loop(h, len, k + 3); lin(h + 4 * len, 8);
      run_to_end(4000);
      if (len <= IQ) begin
        chk(n_reuse == 1 && state == IQ_CODE_REUSE, $sformatf("G%0d: Code_Reuse reached", len));
        chk(nbuf_at_reuse == k * len,
            $sformatf("G%0d: buffered %0d exp %0d", len, nbuf_at_reuse, k * len));
        // event pulses are per cycle: a group holding several loop ends of a
        // very short loop raises buf_continue once
        if (len >= int'(DW))
          chk(n_cont == k - 1, $sformatf("G%0d: continues %0d exp %0d", len, n_cont, k - 1));
        else
          chk(n_cont >= 1 && n_cont <= k - 1, $sformatf("G%0d: continues %0d", len, n_cont));
        chk(loop_head == h && loop_tail == h + 4 * (len - 1), $sformatf("G%0d: loop bounds", len));
        chk(n_exit + n_inner + n_full == 0, $sformatf("G%0d: no revoke", len));
        mispredict_now();
      end else begin
        chk(n_detect == 0 && n_start == 0 && state == IQ_NORMAL, "G65: not capturable");
      end
    end
    throttle = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
