// tb_riq_issue_queue: self-checking test of the collapsing issue queue.
//
// A reference model of the queue, kept as a SystemVerilog queue of entries
// in program order, is driven with the same random stimulus as the design:
// dispatch groups, wakeup tags, and phases that mimic the controller -
// Normal (unbuffered dispatch), Loop_Buffering (buffered dispatch) and
// Code_Reuse (no dispatch, reuse updates of issued buffered slots) - with
// revokes and misprediction squashes in between. Every cycle the issued
// instructions (oldest-first within the function-unit limits), the free
// count, the buffered count and the issue state bits by slot are compared;
// that buffered instructions stay after issue, that unbuffered ones leave
// and that the queue collapses are counted and must all occur.
module tb_riq_issue_queue;
  import riq_pkg::*;
  localparam int unsigned IQ = 16, DW = 4, IW = 4, WB = 4;
  localparam int unsigned SW = $clog2(IQ), CW = $clog2(IQ+1), D_W = $clog2(DW+1);

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] disp_take = '0, disp_cls = '0;
  ren_info_t disp_ren [DW];
  static_info_t disp_info [DW];
  logic [D_W-1:0] disp_avail;
  logic [WB-1:0] wb_valid = '0;
  preg_t wb_tag [WB];
  issue_t issue [IW];
  logic [IW-1:0] ru_valid = '0;
  logic [SW-1:0] ru_slot [IW];
  ren_info_t ru_ren [IW];
  logic [CW-1:0] nbuf, count;
  logic [IQ-1:0] buf_issued;
  logic squash = 0, revoke = 0, collapse;
  rob_idx_t squash_rob = '0, rob_head = '0;

  riq_issue_queue #(.IQ_SIZE(IQ), .DISP_W(DW), .ISSUE_W(IW), .WB_W(WB)) dut (.*);
  always #5 clk = ~clk;

  iq_entry_t m [$];
  int checks = 0, failures = 0;
  int n_stay = 0, n_leave = 0, n_collapse = 0, n_reuse = 0, n_squash = 0, n_revoke = 0;
  int phase = 0;   // 0 Normal, 1 Loop_Buffering, 2 Code_Reuse
  rob_idx_t rob_ctr = '0;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int nbuf_m();
    int n = 0;
    foreach (m[i]) if (m[i].cls) n++;
    return n;
  endfunction

  function automatic ren_info_t rand_ren();
    ren_info_t r;
    r.pdst = preg_t'($urandom); r.psrc1 = preg_t'($urandom_range(0, 15));
    r.psrc2 = preg_t'($urandom_range(0, 15));
    r.rdy1 = ($urandom_range(0, 2) != 0); r.rdy2 = ($urandom_range(0, 2) != 0);
    r.rob = rob_ctr; rob_ctr++;
    return r;
  endfunction

  function automatic logic hit(preg_t t);
    for (int w = 0; w < WB; w++) if (wb_valid[w] && wb_tag[w] == t) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    for (int i = 0; i < DW; i++) begin disp_ren[i] = '0; disp_info[i] = '0; end
    for (int i = 0; i < WB; i++) wb_tag[i] = '0;
    for (int i = 0; i < IW; i++) begin ru_slot[i] = '0; ru_ren[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int ntake, base, nb, fu_cnt [4], nexp;
      int lim [4];
      issue_t exp [IW];
      logic [IQ-1:0] sel_m;
      lim = '{4, 1, 4, 1};
      @(negedge clk);
      // phase changes (revoke back to Normal)
      revoke = 0; squash = 0;
      if (phase != 0 && $urandom_range(0, 40) == 0) begin revoke = 1; phase = 0; end
      else if (phase == 0 && $urandom_range(0, 15) == 0) phase = 1;
      else if (phase == 1 && $urandom_range(0, 10) == 0 && nbuf_m() > 0) phase = 2;
      if (!revoke && m.size() > 0 && $urandom_range(0, 60) == 0) begin
        squash = 1;
        squash_rob = m[$urandom_range(0, m.size() - 1)].ren.rob;
        if (phase != 0) begin revoke = 1; phase = 0; end
      end
      rob_head = m.size() > 0 ? m[0].ren.rob : rob_ctr;
      foreach (m[i]) if ((m[i].ren.rob - rob_ctr) < (rob_head - rob_ctr)) rob_head = m[i].ren.rob;
      // expected free count
      chk(int'(disp_avail) == ((IQ - m.size()) < DW ? (IQ - m.size()) : DW), "disp_avail");
      chk(int'(count) == m.size(), "count");
      chk(int'(nbuf) == nbuf_m(), "nbuf");
      nb = nbuf_m(); base = m.size() - nb;
      for (int s = 0; s < IQ; s++)
        chk(buf_issued[s] == (s < nb && m[base + s].issued), $sformatf("issue state bit by slot %0d nb=%0d dutnb=%0d cnt=%0d m=%0d got %b", s, nb, nbuf, count, m.size(), buf_issued[s]));
      // wakeup tags
      for (int w = 0; w < WB; w++) begin
        wb_valid[w] = $urandom_range(0, 1); wb_tag[w] = preg_t'($urandom_range(0, 15));
      end
      // dispatch
      ntake = (phase == 2 || squash) ? 0 : $urandom_range(0, int'(disp_avail));
      for (int i = 0; i < DW; i++) begin
        disp_take[i] = (i < ntake);
        disp_cls[i]  = (i < ntake) && phase == 1 && !revoke;
        disp_ren[i]  = (i < ntake) ? rand_ren() : '0;
        disp_info[i].op = OP_W'($urandom);
        disp_info[i].fu = fu_class_e'($urandom_range(0, 3));
        disp_info[i].is_branch = $urandom_range(0, 1);
        disp_info[i].pred_taken = $urandom_range(0, 1);
      end
      // reuse updates: issued buffered slots, distinct
      ru_valid = '0;
      if (phase == 2 && !squash && !revoke) begin
        int k; k = 0;
        for (int s = 0; s < nb && k < IW; s++)
          if (m[base + s].issued && $urandom_range(0, 1)) begin
            ru_valid[k] = 1; ru_slot[k] = SW'(s); ru_ren[k] = rand_ren(); k++;
          end
      end
      #1;
      // expected select
      fu_cnt = '{0, 0, 0, 0}; nexp = 0; sel_m = '0;
      for (int i = 0; i < IW; i++) exp[i] = '0;
      foreach (m[i])
        if (!m[i].issued && m[i].ren.rdy1 && m[i].ren.rdy2 && nexp < IW &&
            fu_cnt[m[i].info.fu] < lim[m[i].info.fu]) begin
          fu_cnt[m[i].info.fu]++;
          exp[nexp] = '{1'b1, m[i].ren, m[i].info, m[i].cls};
          sel_m[i] = 1; nexp++;
        end
      for (int i = 0; i < IW; i++) chk(issue[i] == exp[i], $sformatf("issue slot %0d", i));
      // advance the model
      begin
        iq_entry_t nm [$];
        nm.delete();
        foreach (m[i]) begin
          iq_entry_t e; e = m[i];
          if (hit(e.ren.psrc1)) e.ren.rdy1 = 1;
          if (hit(e.ren.psrc2)) e.ren.rdy2 = 1;
          if (sel_m[i]) begin
            if (e.cls) begin e.issued = 1; n_stay++; end
            else begin e.valid = 0; n_leave++; end
          end
          m[i] = e;
        end
        for (int k = 0; k < IW; k++) if (ru_valid[k]) begin
          iq_entry_t e; e = m[base + ru_slot[k]];
          e.ren = ru_ren[k]; e.issued = 0;
          if (hit(e.ren.psrc1)) e.ren.rdy1 = 1;
          if (hit(e.ren.psrc2)) e.ren.rdy2 = 1;
          m[base + ru_slot[k]] = e; n_reuse++;
        end
        foreach (m[i]) begin
          if (squash && ((m[i].ren.rob - rob_head) > (squash_rob - rob_head))) begin m[i].valid = 0; n_squash++; end
          if (revoke) begin
            if (m[i].cls && m[i].issued) m[i].valid = 0;
            m[i].cls = 0;
          end
        end
        if (revoke) n_revoke++;
        foreach (m[i]) if (m[i].valid) nm.push_back(m[i]);
        chk(collapse == (nm.size() != m.size()), "collapse flag");
        if (nm.size() != m.size()) n_collapse++;
        for (int i = 0; i < ntake; i++) begin
          iq_entry_t e;
          e.valid = 1; e.cls = disp_cls[i]; e.issued = 0; e.ren = disp_ren[i]; e.info = disp_info[i];
          if (hit(e.ren.psrc1)) e.ren.rdy1 = 1;
          if (hit(e.ren.psrc2)) e.ren.rdy2 = 1;
          nm.push_back(e);
        end
        m = nm;
      end
      @(posedge clk);
    end
    chk(n_stay > 0 && n_leave > 0 && n_collapse > 0 && n_reuse > 0 && n_squash > 0 && n_revoke > 0,
        $sformatf("mechanisms stay=%0d leave=%0d collapse=%0d reuse=%0d squash=%0d revoke=%0d",
                  n_stay, n_leave, n_collapse, n_reuse, n_squash, n_revoke));
    $display("stay=%0d leave=%0d collapse=%0d reuse=%0d squash=%0d revoke=%0d",
             n_stay, n_leave, n_collapse, n_reuse, n_squash, n_revoke);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
