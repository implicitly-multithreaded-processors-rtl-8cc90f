// imt_rename: IMT register renaming with master, local and preassign tables.
//
// Threads are invoked in program order but their instructions are fetched
// out of order, so one rename table is not enough. Three kinds of table are
// kept:
//  * the master table, updated only at thread set-up and therefore in program
//    order; it always holds the register state expected at the start of the
//    next thread to be invoked;
//  * one local table per thread slot; a thread's instructions read their
//    sources from it and write their destinations to it;
//  * one preassign table per thread slot, holding the physical register
//    preallocated for every create-mask register of the thread.
//
// Thread set-up (setup_*): for every register in the thread's use and create
// masks the master map is copied into the local table, marked as coming from
// an earlier thread (tag). For every create-mask register a free physical
// register is preallocated, marked busy, written to the preassign table and
// to the master table; the master map it replaces is remembered (prior) so
// that thread commit can free it. Set-up uses the rename-table bandwidth
// (BW map updates per cycle) left over by the instructions renamed in the
// same cycle, so it overlaps with the execution of older threads.
//
// Renaming (rn_req/rn_rsp, RN_W per cycle, accepted in order): a normal
// instruction gets a fresh register; a forward instruction writes its
// result into the preassigned register; a release copies the local map's
// value (p1) into the preassigned register (pdst). Consumers in later threads
// wait on the preassigned register until it is written back (wb_*). A source
// read through a tagged map marks that physical register "consumed by a later
// thread".
//
// Two-phase commit: at instruction commit (cm_rec) the previous map of the
// destination is freed only if it was allocated inside the same thread; at
// thread commit (tc_*) the prior maps of the create-mask registers are freed
// and the thread's own registers become architectural (no longer owned).
//
// Rollback (rb_rec, youngest first, one per cycle): restores the local map.
// If a rolled-back forward or release had its preassigned register consumed
// by a later thread, spec_squash is raised so that all later threads are
// squashed (values are released speculatively).
//
// Thread squash (sq_*): the contiguous, circularly ordered slots
// sq_first..sq_first+sq_count-1 are removed, every register they own is
// freed and the master table is restored to the oldest one's prior maps.
//
// Own choices: the first RN_W+BW free registers are found every cycle in one
// scan; a set-up costs one table update per use/create register; physical
// registers 0..NUM_AREGS-1 hold the initial architectural state.
//
// Timing: rn_rsp and rn_ok are combinational from the request and registered
// state; all table updates take effect at the next clock edge.
module imt_rename
  import imt_pkg::*;
#(
  parameter int unsigned PREGS = imt_pkg::NUM_PREGS,
  parameter int unsigned RN_W  = 8,                 // instructions renamed per cycle
  parameter int unsigned BW    = imt_pkg::RT_BW,    // rename-table updates per cycle
  parameter int unsigned WB_W  = 8,                 // write-back ports
  parameter int unsigned CM_W  = 8                  // instruction commits per cycle
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // thread set-up
  input  logic                      setup_start,
  input  logic [TID_W-1:0]          setup_slot,
  input  logic [NUM_AREGS-1:0]      setup_use,
  input  logic [NUM_AREGS-1:0]      setup_create,
  output logic                      setup_busy,
  output logic                      setup_done,
  output logic [TID_W-1:0]          setup_done_slot,
  output logic [$clog2(BW+1)-1:0]   setup_ops,      // set-up updates done this cycle
  // renaming
  input  rn_req_t [RN_W-1:0]        rn_req,
  output logic    [RN_W-1:0]        rn_ok,
  output rn_rsp_t [RN_W-1:0]        rn_rsp,
  // write-back
  input  logic    [WB_W-1:0]        wb_valid,
  input  logic    [WB_W-1:0][PREG_W-1:0] wb_preg,
  // instruction commit and rollback
  input  rn_rec_t [CM_W-1:0]        cm_rec,
  input  rn_rec_t                   rb_rec,
  output logic                      spec_squash,
  // thread commit / squash
  input  logic                      tc_valid,
  input  logic [TID_W-1:0]          tc_slot,
  input  logic                      sq_valid,
  input  logic [TID_W-1:0]          sq_first,
  input  logic [TID_W:0]            sq_count,
  output logic [$clog2(PREGS+1)-1:0] free_count,
  output logic                      inst_frees      // an instruction commit freed a register
);
  localparam int unsigned K   = RN_W + BW;
  localparam int unsigned SL  = THREAD_SLOTS;
  localparam int unsigned FCW = $clog2(PREGS + 1);

  // ---------------- state
  logic [PREG_W-1:0] master [NUM_AREGS];
  logic [PREG_W-1:0] lmap   [SL][NUM_AREGS];
  logic              ltag   [SL][NUM_AREGS];
  logic              lown   [SL][NUM_AREGS];
  logic [PREG_W-1:0] preas  [SL][NUM_AREGS];
  logic [PREG_W-1:0] prior  [SL][NUM_AREGS];
  logic [NUM_AREGS-1:0] crmask [SL];
  logic [PREGS-1:0]  free_q, ready_q, cons_q;
  logic [PREGS-1:0]  own_v;              // owned by a thread not yet committed
  logic [TID_W-1:0]  owner  [PREGS];

  logic                 su_busy;
  logic [TID_W-1:0]     su_slot;
  logic [NUM_AREGS-1:0] su_pend, su_create;

  // ---------------- first K free registers
  logic [K-1:0][PREG_W-1:0] flist;
  logic [$clog2(K+1)-1:0]   fnum;
  always_comb begin
    flist = '0;
    fnum  = '0;
    for (int p = 0; p < PREGS; p++) begin
      if (free_q[p] && fnum < ($clog2(K+1))'(K)) begin
        flist[fnum[$clog2(K)-1:0]] = PREG_W'(p);
        fnum = fnum + 1'b1;
      end
    end
  end

  always_comb begin
    free_count = '0;
    for (int p = 0; p < PREGS; p++) free_count = free_count + FCW'(free_q[p]);
  end

  // ---------------- rename ports
  logic [$clog2(K+1)-1:0] used_n;      // free-list entries taken by rename
  logic [RN_W-1:0]        rn_alloc;    // port allocates a new register
  logic [$clog2(RN_W+1)-1:0] n_ren;
  logic [RN_W-1:0]        s1_tagged, s2_tagged;

  always_comb begin
    logic stop;
    stop     = 1'b0;
    used_n   = '0;
    n_ren    = '0;
    rn_ok    = '0;
    rn_alloc = '0;
    rn_rsp   = '0;
    s1_tagged = '0;
    s2_tagged = '0;
    for (int i = 0; i < RN_W; i++) begin
      logic [TID_W-1:0] s;
      logic [AREG_W-1:0] d;
      s = rn_req[i].slot;
      d = rn_req[i].dst;
      // table lookups
      rn_rsp[i].p1       = lmap[s][rn_req[i].s1];
      rn_rsp[i].p2       = lmap[s][rn_req[i].s2];
      s1_tagged[i]       = rn_req[i].s1v && ltag[s][rn_req[i].s1];
      s2_tagged[i]       = rn_req[i].s2v && ltag[s][rn_req[i].s2];
      rn_rsp[i].prev     = lmap[s][d];
      rn_rsp[i].prev_own = lown[s][d];
      rn_rsp[i].prev_tag = ltag[s][d];
      if (rn_req[i].kind == INS_RELEASE) begin
        rn_rsp[i].p1 = lmap[s][d];
        s1_tagged[i] = ltag[s][d];
      end
      // bypass from older ports of the same thread in this cycle
      for (int j = 0; j < i; j++) begin
        if (rn_req[j].valid && rn_ok[j] && rn_req[j].slot == s && rn_req[j].kind != INS_NODEST) begin
          if (rn_req[i].kind != INS_RELEASE && rn_req[j].dst == rn_req[i].s1) begin
            rn_rsp[i].p1 = rn_rsp[j].pdst; s1_tagged[i] = 1'b0;
          end
          if (rn_req[i].kind == INS_RELEASE && rn_req[j].dst == d) begin
            rn_rsp[i].p1 = rn_rsp[j].pdst; s1_tagged[i] = 1'b0;
          end
          if (rn_req[j].dst == rn_req[i].s2) begin
            rn_rsp[i].p2 = rn_rsp[j].pdst; s2_tagged[i] = 1'b0;
          end
          if (rn_req[j].dst == d) begin
            rn_rsp[i].prev     = rn_rsp[j].pdst;
            rn_rsp[i].prev_own = (rn_req[j].kind == INS_NORMAL);
            rn_rsp[i].prev_tag = 1'b0;
          end
        end
      end
      // destination
      case (rn_req[i].kind)
        INS_NORMAL:  rn_rsp[i].pdst = flist[used_n[$clog2(K)-1:0]];
        INS_FORWARD,
        INS_RELEASE: rn_rsp[i].pdst = preas[s][d];
        default:     rn_rsp[i].pdst = '0;
      endcase
      rn_rsp[i].r1 = ready_q[rn_rsp[i].p1];
      rn_rsp[i].r2 = ready_q[rn_rsp[i].p2];
      for (int j = 0; j < i; j++)
        if (rn_ok[j] && rn_req[j].kind != INS_NODEST) begin
          if (rn_rsp[j].pdst == rn_rsp[i].p1) rn_rsp[i].r1 = 1'b0;
          if (rn_rsp[j].pdst == rn_rsp[i].p2) rn_rsp[i].r2 = 1'b0;
        end
      if (!rn_req[i].s1v && rn_req[i].kind != INS_RELEASE) rn_rsp[i].r1 = 1'b1;
      if (!rn_req[i].s2v) rn_rsp[i].r2 = 1'b1;
      // in-order acceptance
      if (rn_req[i].valid && !stop) begin
        if (rn_req[i].kind == INS_NORMAL) begin
          if (used_n < fnum) begin
            rn_ok[i]    = 1'b1;
            rn_alloc[i] = 1'b1;
            used_n      = used_n + 1'b1;
          end else stop = 1'b1;
        end else rn_ok[i] = 1'b1;
      end else if (rn_req[i].valid) begin
        stop = 1'b1;
      end
      if (rn_ok[i]) n_ren = n_ren + 1'b1;
    end
  end

  // ---------------- set-up work for this cycle
  logic [NUM_AREGS-1:0]        su_take;
  logic [NUM_AREGS-1:0][PREG_W-1:0] su_alloc;
  always_comb begin
    logic [$clog2(K+1)-1:0] fi;
    int unsigned budget;
    budget   = BW - int'(n_ren);
    fi       = used_n;
    su_take  = '0;
    su_alloc = '0;
    setup_ops = '0;
    if (su_busy) begin
      for (int r = 0; r < NUM_AREGS; r++) begin
        if (su_pend[r] && budget > 0) begin
          if (!su_create[r]) begin
            su_take[r] = 1'b1;
            budget     = budget - 1;
          end else if (fi < fnum) begin
            su_take[r]  = 1'b1;
            su_alloc[r] = flist[fi[$clog2(K)-1:0]];
            fi          = fi + 1'b1;
            budget      = budget - 1;
          end else begin
            budget = 0;     // out of free registers: wait
          end
        end
      end
      setup_ops = ($clog2(BW+1))'(BW - int'(n_ren) - budget);
    end
  end

  assign setup_busy = su_busy;

  // ---------------- rollback / squash helpers
  logic [PREG_W-1:0] sq_master [NUM_AREGS];
  logic [NUM_AREGS-1:0] sq_touch;
  logic [SL-1:0] sq_in;
  always_comb begin
    logic [TID_W-1:0] s;
    s        = '0;
    sq_touch = '0;
    sq_in    = '0;
    for (int r = 0; r < NUM_AREGS; r++) sq_master[r] = master[r];
    for (int k = SL - 1; k >= 0; k--) begin
      if (sq_valid && (TID_W+1)'(k) < sq_count) begin
        s = sq_first + TID_W'(k);
        sq_in[s] = 1'b1;
        // a thread still being set up has changed only its finished registers
        for (int r = 0; r < NUM_AREGS; r++)
          if (crmask[s][r] && !(su_busy && s == su_slot && su_pend[r])) begin
            sq_master[r] = prior[s][r];
            sq_touch[r]  = 1'b1;
          end
      end
    end
  end

  assign spec_squash = rb_rec.valid && (rb_rec.kind == INS_FORWARD || rb_rec.kind == INS_RELEASE)
                       && cons_q[rb_rec.pdst];

  always_comb begin
    inst_frees = 1'b0;
    for (int c = 0; c < CM_W; c++)
      if (cm_rec[c].valid && cm_rec[c].kind != INS_NODEST && cm_rec[c].prev_own) inst_frees = 1'b1;
  end

  // set-up work and allocations of a thread squashed in the same cycle are dropped
  logic su_kill;
  assign su_kill = sq_valid && sq_in[su_slot];

  // ---------------- sequential update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_AREGS; r++) master[r] <= PREG_W'(r);
      for (int p = 0; p < PREGS; p++) begin
        free_q[p]  <= (p >= NUM_AREGS);
        ready_q[p] <= 1'b1;
        cons_q[p]  <= 1'b0;
        own_v[p]   <= 1'b0;
      end
      for (int t = 0; t < SL; t++) crmask[t] <= '0;
      su_busy         <= 1'b0;
      su_slot         <= '0;
      su_pend         <= '0;
      su_create       <= '0;
      setup_done      <= 1'b0;
      setup_done_slot <= '0;
    end else begin
      setup_done <= 1'b0;
      // write-back
      for (int w = 0; w < WB_W; w++) if (wb_valid[w]) ready_q[wb_preg[w]] <= 1'b1;
      // rename ports
      for (int i = 0; i < RN_W; i++) begin
        if (rn_ok[i]) begin
          if (s1_tagged[i]) cons_q[rn_rsp[i].p1] <= 1'b1;
          if (s2_tagged[i]) cons_q[rn_rsp[i].p2] <= 1'b1;
          if (rn_alloc[i] && !(sq_valid && sq_in[rn_req[i].slot])) begin
            own_v[rn_rsp[i].pdst]   <= 1'b1;
            free_q[rn_rsp[i].pdst]  <= 1'b0;
            ready_q[rn_rsp[i].pdst] <= 1'b0;
            cons_q[rn_rsp[i].pdst]  <= 1'b0;
            owner[rn_rsp[i].pdst]   <= rn_req[i].slot;
          end
        end
      end
      // set-up
      if (su_busy) begin
        for (int r = 0; r < NUM_AREGS; r++) begin
          if (su_take[r] && su_create[r] && !su_kill) begin
            own_v[su_alloc[r]]   <= 1'b1;
            master[r] <= su_alloc[r];
            free_q[su_alloc[r]]  <= 1'b0;
            ready_q[su_alloc[r]] <= 1'b0;
            cons_q[su_alloc[r]]  <= 1'b0;
            owner[su_alloc[r]]   <= su_slot;
          end
        end
        su_pend <= su_pend & ~su_take;
        if ((su_pend & ~su_take) == '0 && !su_kill) begin
          su_busy         <= 1'b0;
          setup_done      <= 1'b1;
          setup_done_slot <= su_slot;
        end
      end else if (setup_start) begin
        crmask[setup_slot] <= setup_create;
        su_busy   <= 1'b1;
        su_slot   <= setup_slot;
        su_pend   <= setup_use | setup_create;
        su_create <= setup_create;
      end
      // instruction commit: free previous map if allocated in the same thread
      for (int c = 0; c < CM_W; c++)
        if (cm_rec[c].valid && cm_rec[c].kind != INS_NODEST && cm_rec[c].prev_own)
          free_q[cm_rec[c].prev] <= 1'b1;
      // rollback of one instruction
      if (rb_rec.valid && rb_rec.kind != INS_NODEST) begin
        if (rb_rec.kind == INS_NORMAL) free_q[rb_rec.pdst] <= 1'b1;
        else                           ready_q[rb_rec.pdst] <= 1'b0;
      end
      // thread commit: free the maps the thread's preassignments replaced
      // and hand its own registers over to the architectural state
      if (tc_valid) begin
        for (int p = 0; p < PREGS; p++)
          if (own_v[p] && !free_q[p] && owner[p] == tc_slot) own_v[p] <= 1'b0;
        crmask[tc_slot] <= '0;
        for (int r = 0; r < NUM_AREGS; r++)
          if (crmask[tc_slot][r]) free_q[prior[tc_slot][r]] <= 1'b1;
      end
      // thread squash
      if (sq_valid) begin
        for (int p = 0; p < PREGS; p++)
          if (!free_q[p] && own_v[p] && sq_in[owner[p]]) begin
            free_q[p] <= 1'b1;
            own_v[p]  <= 1'b0;
          end
        for (int r = 0; r < NUM_AREGS; r++) if (sq_touch[r]) master[r] <= sq_master[r];
        for (int t = 0; t < SL; t++) if (sq_in[t]) crmask[t] <= '0;   // slot no longer set up
        if (su_busy && sq_in[su_slot]) su_busy <= 1'b0;
      end
    end
  end

  // tables written only after the slot has been set up: no reset needed
  always_ff @(posedge clk) begin
    if (su_busy) begin
      for (int r = 0; r < NUM_AREGS; r++) begin
        if (su_take[r]) begin
          lmap[su_slot][r] <= master[r];
          ltag[su_slot][r] <= 1'b1;
          lown[su_slot][r] <= 1'b0;
          if (su_create[r]) begin
            preas[su_slot][r] <= su_alloc[r];
            prior[su_slot][r] <= master[r];
          end
        end
      end
    end
    for (int i = 0; i < RN_W; i++) begin
      if (rn_ok[i] && rn_req[i].kind != INS_NODEST) begin
        lmap[rn_req[i].slot][rn_req[i].dst] <= rn_rsp[i].pdst;
        ltag[rn_req[i].slot][rn_req[i].dst] <= 1'b0;
        lown[rn_req[i].slot][rn_req[i].dst] <= (rn_req[i].kind == INS_NORMAL);
      end
    end
    if (rb_rec.valid && rb_rec.kind != INS_NODEST) begin
      lmap[rb_rec.slot][rb_rec.dst] <= rb_rec.prev;
      ltag[rb_rec.slot][rb_rec.dst] <= rb_rec.prev_tag;
      lown[rb_rec.slot][rb_rec.dst] <= rb_rec.prev_own;
    end
  end

  initial assert (PREGS <= (1 << PREG_W) && PREGS > NUM_AREGS + K)
    else $error("imt_rename: PREGS out of range");

endmodule
