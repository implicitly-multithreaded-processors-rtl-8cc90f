// tb_imt_top: end-to-end test of the IMT thread-control core at its default
// (full-size) parameters.
//
// The testbench plays the SMT datapath around imt_top: it fetches from the
// granted thread slots, renames through the rename ports, executes
// instructions when their source registers are ready, sends loads and stores
// through the LSQ ports, rolls back after intra-thread branch mispredictions,
// commits instructions in order per thread, reports stop outcomes, thread
// completion and segment overflows, and answers descriptor misses from a
// descriptor memory after 10 cycles.
//
// Program: five threads with compiler-style descriptors (use/create masks and
// targets): an initialisation thread, a loop-body thread run for several
// iterations per visit (loop threads, independent), a 40-instruction
// thread after the loop (larger than the default active-list prediction), a
// short thread that returns to the loop, and a final thread. The loop body
// forwards its induction variable early, carries values through memory, has
// a branch that mispredicts on some iterations, and releases a create-mask
// register it does not write.
//
// Checking: every value carries the identity of the instruction that made
// it; at thread commit each source operand and each loaded value is compared
// with a sequential reference run of the same path, and the committed thread
// sequence must equal the reference path. Active-list and LSQ segments of the
// threads sharing a context must not overlap. At the end, all speculative
// threads are squashed and the physical register file, the register
// reservation and the LSQ must be back to their idle state. Each IMT
// mechanism is counted and must occur at least once.
module tb_imt_top;
  import imt_pkg::*;

  localparam int SL   = THREAD_SLOTS;
  localparam int MAXI = 40;
  localparam int NR   = 6;                       // loop visits
  localparam int ITERS [NR] = '{12, 4, 20, 2, 9, 16};
  localparam logic [31:0] PCS [5] = '{32'h104, 32'h208, 32'h30C, 32'h410, 32'h514};
  localparam int NINS [5] = '{8, 12, 40, 6, 1};
  localparam int END_PG = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ports
  logic start_valid; logic [PC_W-1:0] start_pc;
  logic dm_req; logic [PC_W-1:0] dm_pc; logic dm_valid; thread_desc_t dm_desc;
  logic [FETCH_PORTS-1:0] fg_valid; logic [FETCH_PORTS-1:0][TID_W-1:0] fg_slot;
  logic [SL-1:0] fetch_more; logic [SL-1:0][7:0] icount;
  rn_req_t [7:0] rn_req; logic [7:0] rn_ok; rn_rsp_t [7:0] rn_rsp;
  logic [7:0] wb_valid; logic [7:0][PREG_W-1:0] wb_preg;
  rn_rec_t [7:0] cm_rec; rn_rec_t rb_rec;
  logic [3:0] lq_al_valid; logic [3:0][CTX_W-1:0] lq_al_ctx; logic [3:0][4:0] lq_al_idx;
  logic [3:0] lq_al_store; logic [3:0][TID_W-1:0] lq_al_tid;
  logic [7:0] lq_rq_valid; logic [7:0][4:0] lq_rq_idx; logic [7:0][31:0] lq_rq_addr, lq_rq_data;
  logic [7:0] lq_rq_grant;
  logic [1:0] lq_rsp_valid; logic [1:0][CTX_W-1:0] lq_rsp_ctx; logic [1:0][4:0] lq_rsp_idx;
  logic [1:0] lq_rsp_store, lq_rsp_hit, lq_rsp_xctx; logic [1:0][31:0] lq_rsp_data;
  logic lq_rb_valid; logic [CTX_W-1:0] lq_rb_ctx; logic [4:0] lq_rb_idx; logic [TID_W-1:0] lq_rb_tid;
  logic stop_valid; logic [TID_W-1:0] stop_slot; logic [TGT_W-1:0] stop_tgt;
  logic tdone_valid; logic [TID_W-1:0] tdone_slot; res_t tdone_used;
  logic ovf_valid; logic [TID_W-1:0] ovf_slot;
  logic [TID_W-1:0] head; logic [TID_W:0] count; tstate_t [SL-1:0] st;
  logic [SL-1:0][PC_W-1:0] slot_pc; logic [SL-1:0][CTX_W-1:0] slot_ctx;
  logic [SL-1:0][7:0] slot_al_base; logic [SL-1:0][5:0] slot_lsq_base;
  logic ev_indep_mode, ev_res_stall, ev_activate, ev_ctx_shared, ev_mispred, ev_commit;
  logic ev_squash, ev_viol, ev_spec_squash, ev_inst_free, ev_setup_busy, ev_drp_known;
  logic [3:0] ev_setup_ops; logic [RES_W-1:0] reserved_regs; logic [8:0] free_regs;

  imt_top dut (.*);

  // ---------------- program
  typedef struct packed {
    int kind;                 // ins_kind_t value
    int dst;
    bit s1v; int s1;
    bit s2v; int s2;
    int mem;                  // 0 none, 1 load, 2 store
    bit br;                   // intra-thread branch
    bit stp;                  // stop instruction (last)
  } sins_t;

  function automatic sins_t mk(int kind, int dst, int s1, int s2);
    sins_t i;
    i = '0;
    i.kind = kind; i.dst = dst;
    i.s1v = s1 >= 0; i.s1 = s1 < 0 ? 0 : s1;
    i.s2v = s2 >= 0; i.s2 = s2 < 0 ? 0 : s2;
    return i;
  endfunction

  function automatic sins_t mkm(int mem);
    sins_t i;
    i = '0; i.mem = mem;
    return i;
  endfunction

  localparam int NOD = 0, NRM = 1, FWD = 2, REL = 3;

  function automatic sins_t pins(int pg, int k);
    sins_t i;
    i = mk(NOD, 0, -1, -1);
    if (k == NINS[pg] - 1) begin i.stp = 1; return i; end
    case (pg)
      0: if (k < 5) i = mk(FWD, k + 1, -1, -1);
         else if (k == 5) i = mkm(2);
      1: case (k)
           0: i = mk(FWD, 1, 1, -1);
           1: i = mkm(1);
           2: i = mk(NRM, 2, 2, 5);
           3: i = mk(NRM, 3, 4, 1);
           4: i = mkm(1);
           5: i = mk(FWD, 2, 2, 3);
           6: i = mkm(2);
           7: i.br = 1;
           8: i = mk(FWD, 3, 3, 1);
           9: i = mk(REL, 4, -1, -1);
           10: i = mkm(2);
           default: ;
         endcase
      2: if (k % 8 == 3) i = mkm(1);
         else if (k == 21) i = mkm(2);
         else if (k == 36) i = mk(FWD, 6, 6, 2);
         else if (k < 36) i = mk(NRM, 6, 6, 2);
      3: case (k)
           0: i = mk(NRM, 5, 6, 1);
           1: i = mkm(1);
           2: i = mkm(2);
           3: i = mk(FWD, 5, 5, 6);
           default: ;
         endcase
      default: ;
    endcase
    return i;
  endfunction

  function automatic logic [31:0] maddr(int pg, int k, int q);
    case (pg)
      0: return 32'h3000;
      1: case (k)
           1: return 32'h1000 + 32'(4 * (q % 8));
           4: return 32'h3000;
           6: return (q % 3 == 0) ? 32'h3000 : 32'h3100 + 32'(4 * (q % 8));
           default: return 32'h1000 + 32'(4 * ((q + 1) % 8));
         endcase
      2: return (k == 21) ? 32'h3104 : 32'h1000 + 32'(4 * (k / 8));
      3: return (k == 1) ? 32'h3000 : 32'h1000;
      default: return 32'h0;
    endcase
  endfunction

  function automatic thread_desc_t desc_of(int pg);
    thread_desc_t d;
    d = '0;
    for (int t = 0; t < NUM_TARGETS; t++) d.targets[t] = PCS[END_PG];
    case (pg)
      0: begin d.create_mask = 32'b111110; d.targets[0] = PCS[1]; end
      1: begin d.use_mask = 32'b110110; d.create_mask = 32'b011110;
               d.targets[0] = PCS[1]; d.targets[1] = PCS[2]; end
      2: begin d.use_mask = 32'b1000100; d.create_mask = 32'b1000000; d.targets[0] = PCS[3]; end
      3: begin d.use_mask = 32'b1000010; d.create_mask = 32'b100000;
               d.targets[0] = PCS[1]; d.targets[1] = PCS[END_PG]; end
      default: ;
    endcase
    return d;
  endfunction

  function automatic int prog_of(logic [31:0] pc);
    for (int p = 0; p < 5; p++) if (PCS[p] == pc) return p;
    return END_PG;
  endfunction

  function automatic res_t used_of(int pg);
    res_t u;
    thread_desc_t d;
    sins_t i;
    d = desc_of(pg);
    u = '0;
    u.al = RES_W'(NINS[pg]);
    u.regs = RES_W'($countones(d.create_mask));
    for (int k = 0; k < NINS[pg]; k++) begin
      i = pins(pg, k);
      if (i.kind == NRM) u.regs = u.regs + 1'b1;
      if (i.mem != 0) u.lsq = u.lsq + 1'b1;
    end
    return u;
  endfunction

  function automatic int memk(int pg, int k);      // LSQ position within the thread
    int n;
    n = 0;
    for (int j = 0; j < k; j++) if (pins(pg, j).mem != 0) n++;
    return n;
  endfunction

  function automatic logic [31:0] vid(int q, int k);
    return 32'((q + 1) << 8 | k);
  endfunction

  // ---------------- reference path
  int gpc [$];
  int gtgt [$];

  // ---------------- testbench pipeline state
  int checks = 0, failures = 0, cyc = 0;
  int ncommitted = 0;
  bit r_valid [SL];
  int r_pg [SL], r_n [SL], fpos [SL], rpos [SL], cpos [SL];
  bit rb_active [SL]; int rb_b [SL], rb_ptr [SL];
  bit tdone_sent [SL], ovf_pend [SL];
  bit i_ren [SL][MAXI], i_exe [SL][MAXI], i_req [SL][MAXI];
  int i_t [SL][MAXI];
  rn_rsp_t i_rsp [SL][MAXI];
  logic [31:0] i_o1 [SL][MAXI], i_o2 [SL][MAXI], i_obs [SL][MAXI];
  int i_lidx [SL][MAXI];
  bit lo_v [8][32]; int lo_s [8][32], lo_k [8][32];
  logic [31:0] pval [NUM_PREGS];
  logic [31:0] mem [int];
  logic [31:0] gmem [int];
  logic [31:0] glast [NUM_AREGS];
  int sctx [int];
  bit bmis [int];
  bit dm_busy; logic [31:0] dm_lpc; int dm_t;

  // mechanism counters
  int c_act, c_stall, c_shared, c_newctx, c_indep, c_dep, c_overlap, c_mp, c_sq, c_viol;
  int c_spec, c_ifree, c_commit, c_miss, c_known, c_xfwd, c_ovf, c_rb;
  bit last_commit; logic [TID_W-1:0] last_head; bit dm_req_d;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic int age(int s);
    return (s - int'(head)) & (SL - 1);
  endfunction

  function automatic int qpos(int s);
    return ncommitted + age(s);
  endfunction

  // events, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    if (ev_activate) c_act++;
    if (ev_activate && ev_ctx_shared) c_shared++;
    if (ev_activate && !ev_ctx_shared) c_newctx++;
    if (ev_activate && ev_drp_known) c_known++;
    if (ev_res_stall) c_stall++;
    if (fg_valid != 0 && ev_indep_mode) c_indep++;
    if (fg_valid != 0 && !ev_indep_mode) c_dep++;
    if (ev_setup_ops != 0 && rn_ok != 0) c_overlap++;
    if (ev_mispred) c_mp++;
    if (ev_squash) c_sq++;
    if (ev_viol) c_viol++;
    if (ev_spec_squash) c_spec++;
    if (ev_inst_free) c_ifree++;
    if (ev_commit) c_commit++;
    if (dm_req && !dm_req_d) c_miss++;
    if (ovf_valid) c_ovf++;
    if (rb_rec.valid) c_rb++;
    dm_req_d    <= dm_req;
    last_commit = ev_commit;
    last_head   = head;
  end

  task automatic drop(int s);
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < 32; i++)
        if (lo_v[c][i] && lo_s[c][i] == s) lo_v[c][i] = 0;
    r_valid[s] = 0;
  endtask

  task automatic open_slot(int s);
    r_valid[s] = 1;
    r_pg[s] = prog_of(slot_pc[s]);
    r_n[s] = NINS[r_pg[s]];
    fpos[s] = 0; rpos[s] = 0; cpos[s] = 0;
    rb_active[s] = 0; tdone_sent[s] = 0; ovf_pend[s] = 0;
    for (int k = 0; k < MAXI; k++) begin
      i_ren[s][k] = 0; i_exe[s][k] = 0; i_req[s][k] = 0;
    end
  endtask

  // thread commit: compare with the sequential reference
  task automatic check_commit(int s);
    int q;
    sins_t i;
    logic [31:0] a;
    q = ncommitted;
    chk(r_valid[s] && tdone_sent[s], "committed thread completed");
    chk(q < gpc.size() - 1, "final thread never commits");
    if (q < gpc.size()) chk(32'(gpc[q]) == slot_pc[s], $sformatf("thread %0d on reference path", q));
    for (int k = 0; k < r_n[s]; k++) begin
      i = pins(r_pg[s], k);
      if (i.kind == REL) chk(i_o1[s][k] == glast[i.dst], $sformatf("release value q%0d", q));
      else begin
        if (i.s1v) chk(i_o1[s][k] == glast[i.s1], $sformatf("src1 q%0d k%0d", q, k));
        if (i.s2v) chk(i_o2[s][k] == glast[i.s2], $sformatf("src2 q%0d k%0d", q, k));
      end
      if (i.kind == NRM || i.kind == FWD) glast[i.dst] = vid(q, k);
      if (i.mem != 0) begin
        a = maddr(r_pg[s], k, q);
        if (i.mem == 1) chk(i_obs[s][k] == (gmem.exists(a) ? gmem[a] : 32'h0),
                            $sformatf("load value q%0d k%0d", q, k));
        else begin gmem[a] = vid(q, k); mem[a] = vid(q, k); end
      end
    end
    ncommitted++;
  endtask

  // ---------------- one cycle of the datapath model
  task automatic step();
    int s, nwb, ncm, nrn, nal, c, k, kk, ix, ovf_done, stop_done, tdone_done;
    sins_t i;
    logic [31:0] a;
    bit found, blocked;

    // defaults
    dm_valid = 0; stop_valid = 0; tdone_valid = 0; ovf_valid = 0;
    wb_valid = '0; cm_rec = '0; rb_rec = '0; lq_rb_valid = 0; lq_rb_ctx = '0; lq_rb_idx = '0; lq_rb_tid = '0;
    lq_al_valid = '0; lq_rq_valid = '0; rn_req = '0;

    // 1. thread commit, squashes and new active threads
    if (last_commit) begin check_commit(int'(last_head)); last_commit = 0; end
    for (s = 0; s < SL; s++) begin
      if (r_valid[s] && (st[s] == TS_FREE || prog_of(slot_pc[s]) != r_pg[s])) drop(s);
      if (!r_valid[s] && (st[s] == TS_ACTIVE)) open_slot(s);
    end
    // segments of threads sharing a context must not overlap
    for (int x = 0; x < int'(count); x++)
      for (int y = x + 1; y < int'(count); y++) begin
        int sx, sy;
        sx = (int'(head) + x) % SL; sy = (int'(head) + y) % SL;
        if (r_valid[sx] && r_valid[sy] && slot_ctx[sx] == slot_ctx[sy])
          chk(dut.u_seq.al_end[sx] <= slot_al_base[sy] && dut.u_seq.lsq_end[sx] <= slot_lsq_base[sy],
              "segments in a context in order and disjoint");
      end

    // 2. LSQ responses
    for (int p = 0; p < 2; p++) if (lq_rsp_valid[p]) begin
      c = int'(lq_rsp_ctx[p]); ix = int'(lq_rsp_idx[p]);
      if (lo_v[c][ix] && i_req[lo_s[c][ix]][lo_k[c][ix]]) begin
        s = lo_s[c][ix]; k = lo_k[c][ix];
        i_req[s][k] = 0; i_exe[s][k] = 1;
        if (!lq_rsp_store[p]) begin
          a = maddr(r_pg[s], k, qpos(s));
          i_obs[s][k] = lq_rsp_hit[p] ? lq_rsp_data[p] : (mem.exists(a) ? mem[a] : 32'h0);
          if (lq_rsp_hit[p] && sctx.exists(int'(lq_rsp_data[p])) && sctx[int'(lq_rsp_data[p])] != c) c_xfwd++;
        end
      end
    end

    // 3. execute
    nwb = 0; stop_done = 0;
    for (int x = 0; x < int'(count); x++) begin
      s = (int'(head) + x) % SL;
      if (!r_valid[s] || rb_active[s]) continue;
      for (k = cpos[s]; k < rpos[s]; k++) begin
        if (i_exe[s][k] || cyc < i_t[s][k]) continue;
        i = pins(r_pg[s], k);
        if (i.mem != 0) continue;
        if (i.stp) begin
          blocked = 0;
          for (kk = 0; kk < k; kk++) if (!i_exe[s][kk]) blocked = 1;
          if (blocked || stop_done) continue;
          stop_done = 1;
          stop_valid = 1; stop_slot = TID_W'(s);
          stop_tgt = (qpos(s) < gpc.size() && 32'(gpc[qpos(s)]) == slot_pc[s]) ? TGT_W'(gtgt[qpos(s)]) : '0;
          i_exe[s][k] = 1;
          continue;
        end
        if (i.br) begin
          i_exe[s][k] = 1;
          if (r_pg[s] == 1 && qpos(s) % 5 == 2 && !bmis.exists(qpos(s))) begin
            bmis[qpos(s)] = 1;
            rb_active[s] = 1; rb_b[s] = k; rb_ptr[s] = rpos[s] - 1;
            for (kk = k + 1; kk < MAXI; kk++) begin i_exe[s][kk] = 0; i_req[s][kk] = 0; end
            break;
          end
          continue;
        end
        if (i.kind == NOD) begin i_exe[s][k] = 1; continue; end
        if ((i.s1v || i.kind == REL) && !dut.u_ren.ready_q[i_rsp[s][k].p1]) continue;
        if (i.s2v && !dut.u_ren.ready_q[i_rsp[s][k].p2]) continue;
        if (nwb == 8) continue;
        i_o1[s][k] = pval[i_rsp[s][k].p1];
        i_o2[s][k] = pval[i_rsp[s][k].p2];
        pval[i_rsp[s][k].pdst] = (i.kind == REL) ? pval[i_rsp[s][k].p1] : vid(qpos(s), k);
        wb_valid[nwb] = 1; wb_preg[nwb] = i_rsp[s][k].pdst; nwb++;
        i_exe[s][k] = 1;
      end
    end

    // 4. instruction commit, thread completion
    ncm = 0; tdone_done = 0;
    for (int x = 0; x < int'(count); x++) begin
      s = (int'(head) + x) % SL;
      if (!r_valid[s] || rb_active[s]) continue;
      while (cpos[s] < rpos[s] && i_exe[s][cpos[s]] && ncm < 8) begin
        k = cpos[s];
        i = pins(r_pg[s], k);
        cm_rec[ncm].valid = 1; cm_rec[ncm].slot = TID_W'(s); cm_rec[ncm].kind = ins_kind_t'(i.kind);
        cm_rec[ncm].dst = AREG_W'(i.dst); cm_rec[ncm].pdst = i_rsp[s][k].pdst;
        cm_rec[ncm].prev = i_rsp[s][k].prev; cm_rec[ncm].prev_own = i_rsp[s][k].prev_own;
        cm_rec[ncm].prev_tag = i_rsp[s][k].prev_tag;
        ncm++; cpos[s]++;
      end
      if (cpos[s] == r_n[s] && !tdone_sent[s] && !tdone_done) begin
        tdone_done = 1; tdone_sent[s] = 1;
        tdone_valid = 1; tdone_slot = TID_W'(s); tdone_used = used_of(r_pg[s]);
      end
    end

    // 5. rollback, youngest first, one instruction per cycle
    found = 0;
    for (int x = 0; x < int'(count) && !found; x++) begin
      s = (int'(head) + x) % SL;
      if (!r_valid[s] || !rb_active[s]) continue;
      found = 1;
      if (rb_ptr[s] > rb_b[s]) begin
        k = rb_ptr[s];
        i = pins(r_pg[s], k);
        rb_rec.valid = 1; rb_rec.slot = TID_W'(s); rb_rec.kind = ins_kind_t'(i.kind);
        rb_rec.dst = AREG_W'(i.dst); rb_rec.pdst = i_rsp[s][k].pdst; rb_rec.prev = i_rsp[s][k].prev;
        rb_rec.prev_own = i_rsp[s][k].prev_own; rb_rec.prev_tag = i_rsp[s][k].prev_tag;
        if (i.mem != 0) begin
          lq_rb_valid = 1; lq_rb_ctx = slot_ctx[s]; lq_rb_idx = 5'(i_lidx[s][k]); lq_rb_tid = TID_W'(s);
          lo_v[slot_ctx[s]][i_lidx[s][k]] = 0;
        end
        i_ren[s][k] = 0; i_exe[s][k] = 0;
        rb_ptr[s]--;
      end
      if (rb_ptr[s] <= rb_b[s]) begin
        rb_active[s] = 0; rpos[s] = rb_b[s] + 1; fpos[s] = rb_b[s] + 1;
      end
    end

    // 6. LSQ requests, one per context, oldest ready access first
    for (c = 0; c < 8; c++) begin
      found = 0;
      for (int x = 0; x < int'(count) && !found; x++) begin
        s = (int'(head) + x) % SL;
        if (!r_valid[s] || rb_active[s] || int'(slot_ctx[s]) != c) continue;
        for (k = cpos[s]; k < rpos[s]; k++) begin
          i = pins(r_pg[s], k);
          if (i.mem == 0 || i_exe[s][k]) continue;
          if (!i_req[s][k] && cyc >= i_t[s][k]) begin
            found = 1;
            lq_rq_valid[c] = 1; lq_rq_idx[c] = 5'(i_lidx[s][k]);
            lq_rq_addr[c] = maddr(r_pg[s], k, qpos(s)); lq_rq_data[c] = vid(qpos(s), k);
          end
          break;                                   // accesses of a thread in order
        end
      end
    end

    // 7. rename
    nrn = 0; nal = 0; ovf_done = 0;
    for (int x = 0; x < int'(count); x++) begin
      s = (int'(head) + x) % SL;
      if (!r_valid[s] || rb_active[s]) continue;
      for (k = rpos[s] + 0; k < fpos[s] && nrn < 8; k++) begin
        i = pins(r_pg[s], k);
        if (i.mem != 0) begin
          ix = int'(slot_lsq_base[s]) + memk(r_pg[s], k);
          if (ix >= int'(dut.u_seq.lsq_end[s])) begin ovf_pend[s] = 1; break; end
          if (nal == 4) break;
          nal++;
        end
        rn_req[nrn].valid = 1; rn_req[nrn].slot = TID_W'(s); rn_req[nrn].kind = ins_kind_t'(i.kind);
        rn_req[nrn].s1v = i.s1v; rn_req[nrn].s1 = AREG_W'(i.s1);
        rn_req[nrn].s2v = i.s2v; rn_req[nrn].s2 = AREG_W'(i.s2); rn_req[nrn].dst = AREG_W'(i.dst);
        nrn++;
      end
    end

    // 8. fetch requests
    for (s = 0; s < SL; s++) begin
      bit seg_full;
      seg_full = r_valid[s] && int'(slot_al_base[s]) + fpos[s] >= int'(dut.u_seq.al_end[s]);
      if (seg_full && fpos[s] < r_n[s] && r_pg[s] != END_PG) ovf_pend[s] = 1;
      fetch_more[s] = r_valid[s] && !rb_active[s] && fpos[s] < r_n[s] && r_pg[s] != END_PG && !seg_full;
      icount[s] = r_valid[s] ? 8'(fpos[s] - cpos[s]) : '0;
    end
    for (int x = 0; x < int'(count) && !ovf_done; x++) begin
      s = (int'(head) + x) % SL;
      if (r_valid[s] && ovf_pend[s]) begin
        ovf_done = 1; ovf_pend[s] = 0; ovf_valid = 1; ovf_slot = TID_W'(s);
      end
    end

    // descriptor memory
    if (dm_req) begin
      if (!dm_busy || dm_pc != dm_lpc) begin dm_busy = 1; dm_lpc = dm_pc; dm_t = cyc + 10; end
      else if (cyc >= dm_t) begin dm_valid = 1; dm_desc = desc_of(prog_of(dm_pc)); dm_busy = 0; end
    end else dm_busy = 0;

    // combinational answers
    #1;
    for (int j = 0; j < nrn; j++) begin
      if (!rn_ok[j]) break;
      s = int'(rn_req[j].slot); k = rpos[s];
      i = pins(r_pg[s], k);
      i_ren[s][k] = 1; i_exe[s][k] = 0; i_req[s][k] = 0;
      i_rsp[s][k] = rn_rsp[j];
      i_t[s][k] = cyc + 1 + $urandom_range(0, 3);
      if (i.mem == 2 && $urandom_range(0, 3) == 0) i_t[s][k] += $urandom_range(0, 10);   // late store
      if (r_pg[s] == 0 && i.mem == 2) i_t[s][k] += 150;                                 // cache miss
      if (i.mem != 0) begin
        ix = int'(slot_lsq_base[s]) + memk(r_pg[s], k);
        i_lidx[s][k] = ix;
        for (int w = 0; w < 4; w++) if (!lq_al_valid[w]) begin
          lq_al_valid[w] = 1; lq_al_ctx[w] = slot_ctx[s]; lq_al_idx[w] = 5'(ix);
          lq_al_store[w] = (i.mem == 2); lq_al_tid[w] = TID_W'(s);
          break;
        end
        lo_v[slot_ctx[s]][ix] = 1; lo_s[slot_ctx[s]][ix] = s; lo_k[slot_ctx[s]][ix] = k;
      end
      rpos[s]++;
    end
    for (c = 0; c < 8; c++)
      if (lq_rq_valid[c] && lq_rq_grant[c] && lo_v[c][lq_rq_idx[c]]) begin
        s = lo_s[c][lq_rq_idx[c]]; k = lo_k[c][lq_rq_idx[c]];
        i_req[s][k] = 1;
        if (pins(r_pg[s], k).mem == 2) sctx[int'(lq_rq_data[c])] = c;
      end
    for (int p = 0; p < FETCH_PORTS; p++) if (fg_valid[p]) begin
      s = int'(fg_slot[p]);
      chk(r_valid[s] && st[s] == TS_ACTIVE && fetch_more[s], "fetch granted to an active thread with work");
      if (r_valid[s]) begin
        k = r_n[s] - fpos[s];
        if (k > 4) k = 4;
        if (k > int'(dut.u_seq.al_end[s]) - int'(slot_al_base[s]) - fpos[s])
          k = int'(dut.u_seq.al_end[s]) - int'(slot_al_base[s]) - fpos[s];
        if (k > 0) fpos[s] += k;
      end
    end
  endtask

  // ---------------- watchdog
  initial begin
    #2000000;
    $display("watchdog: committed %0d of %0d threads", ncommitted, gpc.size() - 1);
    $display("head=%0d count=%0d reserved=%0d free=%0d inv=%0d", head, count, reserved_regs, free_regs, dut.u_seq.inv_q);
    for (int s = 0; s < SL; s++)
      $display("slot%0d st=%0d pc=%h v=%0d f=%0d r=%0d c=%0d n=%0d rb=%0d ctx=%0d al=%0d..%0d lsq=%0d..%0d fm=%0d", s, st[s], slot_pc[s], r_valid[s], fpos[s], rpos[s], cpos[s], r_n[s], rb_active[s], slot_ctx[s], slot_al_base[s], dut.u_seq.al_end[s], slot_lsq_base[s], dut.u_seq.lsq_end[s], fetch_more[s]);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main
  initial begin
    bit fin;
    int fin_wait;
    // reference path
    gpc.push_back(PCS[0]); gtgt.push_back(0);
    for (int r = 0; r < NR; r++) begin
      for (int n = 0; n < ITERS[r]; n++) begin
        gpc.push_back(PCS[1]); gtgt.push_back(n < ITERS[r] - 1 ? 0 : 1);
      end
      gpc.push_back(PCS[2]); gtgt.push_back(0);
      gpc.push_back(PCS[3]); gtgt.push_back(r < NR - 1 ? 0 : 1);
    end
    gpc.push_back(PCS[END_PG]); gtgt.push_back(0);
    for (int p = 0; p < NUM_PREGS; p++) pval[p] = (p < NUM_AREGS) ? (32'hFF00_0000 | 32'(p)) : 32'hDEAD_DEAD;
    for (int r = 0; r < NUM_AREGS; r++) glast[r] = 32'hFF00_0000 | 32'(r);
    for (int s = 0; s < SL; s++) r_valid[s] = 0;
    for (int c = 0; c < 8; c++) for (int i = 0; i < 32; i++) lo_v[c][i] = 0;
    c_act = 0; c_stall = 0; c_shared = 0; c_newctx = 0; c_indep = 0; c_dep = 0; c_overlap = 0;
    c_mp = 0; c_sq = 0; c_viol = 0; c_spec = 0; c_ifree = 0; c_commit = 0; c_miss = 0;
    c_known = 0; c_xfwd = 0; c_ovf = 0; c_rb = 0;
    last_commit = 0; dm_req_d = 0; dm_busy = 0;
    start_valid = 0; start_pc = PCS[0]; dm_valid = 0; dm_desc = '0;
    fetch_more = '0; icount = '0; rn_req = '0; wb_valid = '0; wb_preg = '0; cm_rec = '0; rb_rec = '0;
    lq_al_valid = '0; lq_al_ctx = '0; lq_al_idx = '0; lq_al_store = '0; lq_al_tid = '0;
    lq_rq_valid = '0; lq_rq_idx = '0; lq_rq_addr = '0; lq_rq_data = '0;
    lq_rb_valid = 0; lq_rb_ctx = '0; lq_rb_idx = '0; lq_rb_tid = '0;
    stop_valid = 0; stop_slot = '0; stop_tgt = '0; tdone_valid = 0; tdone_slot = '0; tdone_used = '0;
    ovf_valid = 0; ovf_slot = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start_valid = 1;
    @(negedge clk); start_valid = 0;
    fin = 0; fin_wait = 0;
    while (1) begin
      @(negedge clk);
      cyc++;
      if (ncommitted == gpc.size() - 1 && count != 0 && slot_pc[head] == PCS[END_PG]) begin
        // the program is done: squash everything after the final thread
        if (last_commit) begin check_commit(int'(last_head)); last_commit = 0; end
        if (!fin) begin
          fin = 1;
          stop_valid = 0; tdone_valid = 0; rn_req = '0; wb_valid = '0; cm_rec = '0; rb_rec = '0;
          lq_al_valid = '0; lq_rq_valid = '0; lq_rb_valid = 0; dm_valid = 0; fetch_more = '0;
          ovf_valid = (count > 1); ovf_slot = head;
          continue;
        end
        ovf_valid = 0;
        chk(count == 1, "only the final thread is left");
        for (int p = 0; p < NUM_PREGS; p++) begin
          bit inm; inm = 0;
          for (int r = 0; r < NUM_AREGS; r++) if (dut.u_ren.master[r] == PREG_W'(p)) inm = 1;
          if (!dut.u_ren.free_q[p] && !inm) $display("LEAK p%0d owner=%0d own=%0d ready=%0d", p, dut.u_ren.owner[p], dut.u_ren.own_v[p], dut.u_ren.ready_q[p]);
        end
        chk(free_regs == 9'(NUM_PREGS - NUM_AREGS), $sformatf("all registers free again (%0d)", free_regs));
        chk(reserved_regs == ((st[head] == TS_ACTIVE) ? RES_W'(32) : '0),
            $sformatf("reservation back to the final thread's (%0d)", reserved_regs));
        begin
          int nv;
          nv = 0;
          for (int c = 0; c < 8; c++) for (int i = 0; i < 32; i++) if (dut.u_lsq.q[c][i].valid) nv++;
          chk(nv == 0, "LSQ empty");
        end
        break;
      end
      step();
    end
    chk(ncommitted == gpc.size() - 1, "all threads committed");
    $display("cycles=%0d threads=%0d activations=%0d (shared %0d, new context %0d, DRP-known %0d)",
             cyc, ncommitted, c_act, c_shared, c_newctx, c_known);
    $display("res_stall=%0d indep=%0d dep=%0d setup_overlap=%0d mispred=%0d squash=%0d viol=%0d",
             c_stall, c_indep, c_dep, c_overlap, c_mp, c_sq, c_viol);
    $display("spec_squash=%0d inst_free=%0d commit=%0d desc_miss=%0d xctx_fwd=%0d ovf=%0d rollback=%0d",
             c_spec, c_ifree, c_commit, c_miss, c_xfwd, c_ovf, c_rb);
    chk(c_act > 0, "activation");           chk(c_stall > 0, "DRP resource stall");
    chk(c_shared > 0, "context sharing");   chk(c_newctx > 0, "new context");
    chk(c_known > 0, "DRP prediction used"); chk(c_indep > 0, "independent (ICOUNT) fetch");
    chk(c_dep > 0, "dependent fetch");      chk(c_overlap > 0, "set-up overlapped with renaming");
    chk(c_mp > 0, "thread misprediction");  chk(c_sq > 0, "thread squash");
    chk(c_viol > 0, "memory violation");    chk(c_spec > 0, "speculative-release squash");
    chk(c_ifree > 0, "instruction-commit free"); chk(c_commit > 0, "thread commit");
    chk(c_miss > 0, "descriptor miss");     chk(c_xfwd > 0, "cross-context store forwarding");
    chk(c_ovf > 0, "segment overflow");     chk(c_rb > 0, "rollback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
