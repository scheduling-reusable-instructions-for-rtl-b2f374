// tb_riq_core: behavioural core around riq_top at a chosen queue size.
//
// The same core model and program as tb_riq_top (front end with an ideal
// predictor, renaming with recovery, 64-entry reorder buffer, pipelined
// units, sequential reference check of every committed instruction), but
// with the issue queue size as a parameter. It raises `done` when the
// program has committed and reports its check counts and the number of
// cycles the front end was gated. Used by tb_riq_sizes.
module tb_riq_core
  import riq_pkg::*;
#(
  parameter int unsigned IQ = 64
) (
  output logic done,
  output int   checks_o,
  output int   failures_o,
  output int   cycles_o,
  output int   gated_o,
  output int   reuse_o
);
  localparam int unsigned DW = 4, IW = 4, WB = 4;
  localparam int unsigned ROB_N = 64, NPREG = 128;

  // ---------------- static program ----------------
  typedef enum int {K_ALU, K_CBR, K_CALL, K_RET, K_HALT} kind_e;
  typedef struct {
    kind_e     kind;
    addr_t     target;
    int        trip;      // backward branch: iterations of its loop
    addr_t     ref_tail;  // forward branch: taken when loop ref_tail ...
    int        take_at;   // ... is in iteration take_at
    lrl_entry_t lr;
    fu_class_e fu;
  } sinst_t;
  sinst_t prog [addr_t];

  function automatic sinst_t plain(addr_t pc);
    sinst_t s;
    int h;
    h = int'(pc * 32'h9e3779b1 >> 7);
    s.kind = K_ALU; s.target = '0; s.trip = 0; s.ref_tail = '0; s.take_at = -1;
    s.lr.dst  = lreg_t'(1 + (h % 31));
    s.lr.src1 = lreg_t'((h >> 5) % 32);
    s.lr.src2 = lreg_t'((h >> 10) % 32);
    case ((h >> 15) % 8)
      0: s.fu = FU_IMULT;
      1: s.fu = FU_FPALU;
      2: s.fu = FU_FPMULT;
      default: s.fu = FU_IALU;
    endcase
    return s;
  endfunction

  function automatic sinst_t fetch_s(addr_t pc);
    if (prog.exists(pc)) return prog[pc];
    return plain(pc);
  endfunction

  task automatic put_br(addr_t pc, addr_t tg, int trip, addr_t rt = '0, int at = -1);
    sinst_t s;
    s = plain(pc); s.kind = K_CBR; s.target = tg; s.trip = trip; s.ref_tail = rt; s.take_at = at;
    s.lr.dst = '0; s.fu = FU_IALU;
    prog[pc] = s;
  endtask
  task automatic put_k(addr_t pc, kind_e k, addr_t tg = '0);
    sinst_t s;
    s = plain(pc); s.kind = k; s.target = tg; s.lr.dst = '0; s.fu = FU_IALU;
    prog[pc] = s;
  endtask

  // ---------------- correct-path walker ----------------
  typedef struct {
    addr_t pc;
    int    cnt [512];
    addr_t ras [16];
    int    sp;
    logic  halted;
  } orc_t;
  typedef struct {
    addr_t pc;
    sinst_t s;
    logic  taken;
    addr_t next;
  } dyn_t;

  function automatic int cidx(addr_t pc); return int'(pc[10:2]); endfunction

  function automatic dyn_t step(ref orc_t o);
    dyn_t d;
    d.pc = o.pc; d.s = fetch_s(o.pc); d.taken = 0; d.next = o.pc + 4;
    case (d.s.kind)
      K_CBR: begin
        if (d.s.target <= o.pc) begin
          d.taken = (o.cnt[cidx(o.pc)] + 1 < d.s.trip);
          if (d.taken) o.cnt[cidx(o.pc)]++; else o.cnt[cidx(o.pc)] = 0;
        end else
          d.taken = (o.cnt[cidx(d.s.ref_tail)] == d.s.take_at);
        if (d.taken) d.next = d.s.target;
      end
      K_CALL: begin o.ras[o.sp] = o.pc + 4; o.sp++; d.taken = 1; d.next = d.s.target; end
      K_RET:  begin o.sp--; d.taken = 1; d.next = o.ras[o.sp]; end
      K_HALT: begin o.halted = 1; d.next = o.pc; end
      default: ;
    endcase
    o.pc = d.next;
    return d;
  endfunction

  function automatic longint unsigned f_val(longint unsigned a, longint unsigned b, addr_t pc);
    return (a * 3 + b + longint'(pc)) & 64'hffff_ffff;
  endfunction

  // ---------------- DUT ----------------
  logic clk = 0, rst_n = 0;
  disp_instr_t disp [DW];
  logic [2:0] disp_cnt;
  reuse_req_t reuse_req [IW];
  ren_info_t reuse_ren [IW];
  logic [2:0] ren_avail;
  issue_t issue [IW];
  logic [WB-1:0] wb_valid;
  preg_t wb_tag [WB];
  logic mispredict;
  rob_idx_t mp_rob, rob_head;
  logic frontend_gate;
  iq_state_e iq_state;
  addr_t loop_head, loop_tail;
  logic [$clog2(IQ+1)-1:0] iq_count, iq_nbuf;
  logic reuse_wrap;
  logic [$clog2(IQ)-1:0] reuse_ptr;
  logic [2:0] reuse_cnt;
  logic iq_collapse;
  riq_events_t events;

  riq_top #(.IQ_SIZE(IQ)) dut (.*);
  always #5 clk = ~clk;

  // ---------------- core model state ----------------
  typedef struct {
    logic  valid, done, wp, mispred;
    int    seq;
    addr_t pc;
    lreg_t ldst;
    preg_t pdst, old_pdst;
    longint unsigned value;
  } rob_t;
  rob_t rob [ROB_N];
  int rob_hd = 0, rob_tl = 0, rob_cnt = 0, seq_ctr = 0;
  preg_t map [32], amap [32];
  logic  preg_ready [NPREG];
  longint unsigned prf [NPREG];
  preg_t freel [$];
  typedef struct { int seq; int rob; int due; preg_t tag; logic has_dst; longint unsigned v; } wbq_t;
  wbq_t pend [$];

  orc_t orc, ref_o;
  logic wp_mode = 0, fe_wait = 0;
  addr_t hist_pc [$];
  logic  hist_tk [$];
  addr_t slot_pc [IQ];
  logic  slot_tk [IQ];
  longint unsigned aregs [32];

  int checks = 0, failures = 0, cyc = 0, committed = 0, expected_total = 0;
  int n_detect, n_hit, n_start, n_cont, n_reuse, n_exit, n_inner, n_full, n_mp;
  int n_wrap, n_collapse, n_gated, n_stall, n_reused, n_ren_cap, n_wp;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // rename one instruction (lregs from the caller); returns the IQ fields
  function automatic ren_info_t do_rename(lrl_entry_t lr, addr_t pc, logic wp, logic mp);
    ren_info_t r;
    r.psrc1 = map[lr.src1]; r.rdy1 = preg_ready[r.psrc1];
    r.psrc2 = map[lr.src2]; r.rdy2 = preg_ready[r.psrc2];
    r.rob   = rob_idx_t'(rob_tl);
    rob[rob_tl] = '{1'b1, 1'b0, wp, mp, seq_ctr, pc, lr.dst, '0, '0, 0};
    if (lr.dst != '0) begin
      r.pdst = freel.pop_front();
      rob[rob_tl].pdst = r.pdst;
      rob[rob_tl].old_pdst = map[lr.dst];
      map[lr.dst] = r.pdst;
      preg_ready[r.pdst] = 1'b0;
    end else r.pdst = '0;
    seq_ctr++;
    rob_tl = (rob_tl + 1) % ROB_N; rob_cnt++;
    return r;
  endfunction

  function automatic int rob_age(int idx); return (idx - rob_hd + ROB_N) % ROB_N; endfunction

  initial begin
    done = 0; checks_o = 0; failures_o = 0; cycles_o = 0; gated_o = 0; reuse_o = 0;
    // program
    put_br(32'h1018, 32'h1020, 0, 32'h1024, 100);   // forward, taken in iteration 100
    put_br(32'h1024, 32'h1010, 150);
    put_k (32'h1034, K_CALL, 32'h4000);
    put_br(32'h1040, 32'h1030, 100);
    put_k (32'h400c, K_RET);
    put_br(32'h1054, 32'h104c, 3);
    put_br(32'h105c, 32'h1044, 6);
    put_k (32'h1064, K_CALL, 32'h5000);
    put_br(32'h1068, 32'h1060, 4);
    put_k (32'h513c, K_RET);
    put_k (32'h1070, K_HALT);
    orc.pc = 32'h1000; orc.sp = 0; orc.halted = 0;
    for (int i = 0; i < 512; i++) orc.cnt[i] = 0;
    for (int i = 0; i < 16; i++) orc.ras[i] = '0;
    ref_o = orc;
    // reference: count of correct-path instructions
    begin
      orc_t t; dyn_t d;
      t = orc;
      while (!t.halted) begin d = step(t); expected_total++; end
    end
    for (int i = 0; i < 32; i++) begin map[i] = preg_t'(i); amap[i] = preg_t'(i); aregs[i] = 0; end
    for (int i = 0; i < NPREG; i++) begin preg_ready[i] = 1; prf[i] = 0; end
    for (int i = 32; i < NPREG; i++) freel.push_back(preg_t'(i));
    for (int i = 0; i < ROB_N; i++) rob[i] = '{0, 0, 0, 0, 0, '0, '0, '0, '0, 0};
    n_detect = 0; n_hit = 0; n_start = 0; n_cont = 0; n_reuse = 0; n_exit = 0; n_inner = 0;
    n_full = 0; n_mp = 0; n_wrap = 0; n_collapse = 0; n_gated = 0; n_stall = 0; n_reused = 0;
    n_ren_cap = 0; n_wp = 0;
    for (int i = 0; i < DW; i++) disp[i] = '0;
    for (int i = 0; i < IW; i++) reuse_ren[i] = '0;
    for (int i = 0; i < WB; i++) wb_tag[i] = '0;
    wb_valid = '0; mispredict = 0; mp_rob = '0; rob_head = '0; ren_avail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    while (!(orc.halted && rob_cnt == 0 && !fe_wait)) begin
      int nwb, mp_idx, offered, room, cap;
      dyn_t grp [DW];
      ren_info_t gren [DW];
      orc_t tmp;
      @(negedge clk);
      cyc++;
      // ---- commit ----
      for (int c = 0; c < 4 && rob_cnt > 0 && rob[rob_hd].valid && rob[rob_hd].done; c++) begin
        dyn_t d;
        chk(!rob[rob_hd].wp, "wrong-path instruction committed");
        d = step(ref_o);
        chk(rob[rob_hd].pc == d.pc, $sformatf("commit order: pc %h expected %h", rob[rob_hd].pc, d.pc));
        if (d.s.lr.dst != '0) begin
          longint unsigned e;
          e = f_val(aregs[d.s.lr.src1], aregs[d.s.lr.src2], d.pc);
          chk(rob[rob_hd].value == e, $sformatf("result of %h: %h expected %h", d.pc, rob[rob_hd].value, e));
          aregs[d.s.lr.dst] = e;
          amap[rob[rob_hd].ldst] = rob[rob_hd].pdst;
          freel.push_back(rob[rob_hd].old_pdst);
        end
        committed++;
        rob[rob_hd].valid = 0;
        rob_hd = (rob_hd + 1) % ROB_N; rob_cnt--;
      end
      // ---- writeback ----
      wb_valid = '0; mispredict = 0; nwb = 0; mp_idx = -1;
      for (int i = 0; i < pend.size() && nwb < WB; ) begin
        if (pend[i].due <= cyc) begin
          int r;
          r = pend[i].rob;
          if (pend[i].has_dst) begin
            prf[pend[i].tag] = pend[i].v; preg_ready[pend[i].tag] = 1;
            wb_valid[nwb] = 1; wb_tag[nwb] = pend[i].tag;
          end
          rob[r].done = 1; rob[r].value = pend[i].v;
          if (rob[r].mispred && !rob[r].wp && (mp_idx < 0 || rob_age(r) < rob_age(mp_idx))) mp_idx = r;
          nwb++;
          pend.delete(i);
        end else i++;
      end
      rob_head = rob_idx_t'(rob_hd);
      if (mp_idx >= 0) begin mispredict = 1; mp_rob = rob_idx_t'(mp_idx); end
      // ---- front end: offer a group along the correct path ----
      offered = 0;
      tmp = orc;
      room = ROB_N - rob_cnt;
      if (room > freel.size()) room = freel.size();
      if (!frontend_gate && !fe_wait && !mispredict && !orc.halted) begin
        for (int i = 0; i < DW && i < room && !tmp.halted; i++) begin
          grp[i] = step(tmp);
          offered++;
        end
      end
      for (int i = 0; i < DW; i++) begin
        disp[i] = '0;
        if (i < offered) begin
          disp[i].valid      = 1;
          disp[i].pc         = grp[i].pc;
          disp[i].is_cond_br = (grp[i].s.kind == K_CBR);
          disp[i].is_call    = (grp[i].s.kind == K_CALL);
          disp[i].is_ret     = (grp[i].s.kind == K_RET);
          disp[i].target     = grp[i].s.target;
          disp[i].lregs      = grp[i].s.lr;
          disp[i].info.op    = OP_W'(grp[i].pc >> 2);
          disp[i].info.fu    = grp[i].s.fu;
          disp[i].info.is_branch  = (grp[i].s.kind != K_ALU);
          disp[i].info.pred_taken = grp[i].taken;   // ideal predictor
          // provisional rename (registers not yet allocated)
          disp[i].ren.rob    = rob_idx_t'((rob_tl + i) % ROB_N);
          disp[i].ren.psrc1  = '0; disp[i].ren.psrc2 = '0;
          disp[i].ren.rdy1   = 0;  disp[i].ren.rdy2 = 0;
          disp[i].ren.pdst   = '0;
        end
      end
      cap = ROB_N - rob_cnt;
      if (cap > freel.size()) cap = freel.size();
      ren_avail = 3'((cap < IW) ? cap : IW);
      #1;
      // ---- rename what the queue takes, in order ----
      // (sources are renamed in program order, so each group member sees the
      //  destinations of the members before it)
      if (disp_cnt != 0) begin
        for (int i = 0; i < int'(disp_cnt); i++) begin
          dyn_t d;
          d = step(orc);
          gren[i] = do_rename(d.s.lr, d.pc, 1'b0, 1'b0);
          hist_pc.push_back(d.pc); hist_tk.push_back(d.taken);
          if (hist_pc.size() > IQ) begin void'(hist_pc.pop_front()); void'(hist_tk.pop_front()); end
        end
        // the queue captured the group at #0 with provisional tags: apply real ones
        for (int i = 0; i < DW; i++) if (i < int'(disp_cnt)) disp[i].ren = gren[i];
      end
      if (offered > 0 && int'(disp_cnt) < offered && !events.reuse_start) n_stall++;
      chk(!(frontend_gate && disp_cnt != 0), "dispatch while gated");
      if (frontend_gate) n_gated++;
      // ---- reuse: rename the instructions the queue replays ----
      if (reuse_req[0].valid) begin
        for (int k = 0; k < IW; k++) begin
          reuse_ren[k] = '0;
          if (reuse_req[k].valid) begin
            int s;
            addr_t p;
            logic mp;
            s = int'(reuse_ptr) + k;
            p = slot_pc[s];
            if (!wp_mode) begin
              dyn_t d;
              chk(p == orc.pc, $sformatf("reused pc %h on correct path %h", p, orc.pc));
              d = step(orc);
              chk(reuse_req[k].lregs == d.s.lr, "logical registers from the LRL");
              mp = (d.taken != slot_tk[s]);
              reuse_ren[k] = do_rename(reuse_req[k].lregs, p, 1'b0, mp);
              if (mp) wp_mode = 1;
            end else begin
              reuse_ren[k] = do_rename(reuse_req[k].lregs, p, 1'b1, 1'b0);
              n_wp++;
            end
            n_reused++;
          end
        end
      end
      if (iq_state == IQ_CODE_REUSE && !mispredict && int'(ren_avail) < IW &&
          int'(reuse_cnt) == int'(ren_avail) && reuse_req[0].valid) n_ren_cap++;
      // ---- events ----
      if (events.loop_detect)  n_detect++;
      if (events.nblt_hit)     n_hit++;
      if (events.buf_start)    n_start++;
      if (events.buf_continue) n_cont++;
      if (events.revoke_exit)  n_exit++;
      if (events.revoke_inner) n_inner++;
      if (events.revoke_full)  n_full++;
      if (events.mp_revoke)    n_mp++;
      if (reuse_wrap)          n_wrap++;
      if (iq_collapse)         n_collapse++;
      if (events.reuse_start) begin
        n_reuse++;
        // the buffered block is the last iq_nbuf instructions dispatched
        // (including this cycle's group, which ends at the loop end)
        for (int s = 0; s < IQ; s++) begin
          int h;
          h = hist_pc.size() - (int'(iq_nbuf) + int'(disp_cnt) - 0) + s;
          if (s < int'(iq_nbuf) + int'(disp_cnt) && h >= 0 && h < hist_pc.size()) begin
            slot_pc[s] = hist_pc[h]; slot_tk[s] = hist_tk[h];
          end
        end
      end
      // ---- execute what issues ----
      for (int k = 0; k < IW; k++) if (issue[k].valid) begin
        int r, lat;
        r = int'(issue[k].ren.rob);
        case (issue[k].info.fu)
          FU_IALU: lat = 1; FU_IMULT: lat = 3; FU_FPALU: lat = 2; default: lat = 4;
        endcase
        chk(preg_ready[issue[k].ren.psrc1] && preg_ready[issue[k].ren.psrc2], "issued with operands not ready");
        pend.push_back('{rob[r].seq, r, cyc + lat, issue[k].ren.pdst, rob[r].ldst != '0,
                         f_val(prf[issue[k].ren.psrc1], prf[issue[k].ren.psrc2], rob[r].pc)});
      end
      // ---- misprediction recovery ----
      if (mispredict) begin
        int keep;
        keep = rob_age(mp_idx) + 1;
        while (rob_cnt > keep) begin
          rob_tl = (rob_tl + ROB_N - 1) % ROB_N;
          if (rob[rob_tl].ldst != '0) begin freel.push_front(rob[rob_tl].pdst); preg_ready[rob[rob_tl].pdst] = 1; end
          for (int i = 0; i < pend.size(); ) if (pend[i].seq == rob[rob_tl].seq) pend.delete(i); else i++;
          rob[rob_tl].valid = 0;
          rob_cnt--;
        end
        map = amap;
        for (int i = 0; i < rob_cnt; i++) begin
          int r;
          r = (rob_hd + i) % ROB_N;
          if (rob[r].ldst != '0) map[rob[r].ldst] = rob[r].pdst;
        end
        wp_mode = 0; fe_wait = 0;
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < DW; i++) disp[i].valid = 0;
    end

    chk(committed == expected_total, $sformatf("committed %0d expected %0d", committed, expected_total));
    $display("IQ_SIZE=%0d cycles=%0d committed=%0d gated_cycles=%0d (%0d%%) reused=%0d wrong_path_reused=%0d",
             IQ, cyc, committed, n_gated, 100 * n_gated / cyc, n_reused, n_wp);
    $display("detect=%0d nblt_hit=%0d buf_start=%0d buf_continue=%0d reuse_start=%0d wrap=%0d",
             n_detect, n_hit, n_start, n_cont, n_reuse, n_wrap);
    $display("revoke_exit=%0d revoke_inner=%0d revoke_full=%0d mp_revoke=%0d collapse=%0d stall=%0d ren_cap=%0d",
             n_exit, n_inner, n_full, n_mp, n_collapse, n_stall, n_ren_cap);
    checks_o = checks; failures_o = failures; cycles_o = cyc; gated_o = n_gated; reuse_o = n_reuse;
    done = 1;
  end

endmodule
