// imt_thread_seq: thread sequencer of the IMT processor.
//
// Keeps the in-flight threads in a circular buffer of THREAD_SLOTS slots in
// program order; the oldest slot (head) is the non-speculative thread.
//
// Invocation, in program order, one thread at a time: a slot is opened at the
// tail with the predicted start PC, the thread's descriptor is looked up in the
// descriptor cache (fetched from memory on a miss), the next thread is
// predicted from the descriptor's targets with the inter-thread predictor,
// and the rename tables are set up for the new thread. Invocation runs ahead
// of fetch, so table set-up overlaps the execution of older threads.
//
// Activation: the fetch policy activates the oldest set-up thread when the
// DRP prediction fits; the sequencer records the thread's register reservation
// and its active-list/LSQ segments in a context.
//
// Completion and commit: when a thread's stop instruction resolves
// (stop_*), the actual target is compared with the predicted one; on a
// misprediction all later threads are squashed and invocation restarts at the
// actual target. When all of a thread's instructions have committed
// (tdone_*), the thread waits to commit in program order; thread commit
// trains the DRP with the measured usage, frees the thread's registers and
// LSQ entries and returns its reservation.
//
// Other squashes: a memory-dependence violation (viol_*) squashes the
// offending thread and all later ones and re-invokes the offending thread; a
// rollback of a value a later thread consumed (spec_sq_*) and a segment
// overflow (ovf_*) squash all threads after the given one; the overflowing
// thread then owns the rest of its context's active list and LSQ. Squashed slots
// leave the buffer at once; their reservations are returned in one sum.
//
// Own choices: one invocation is in progress at a time; one thread commits per
// cycle; of several squash requests in one cycle the one reaching furthest
// back wins, and on a tie the misprediction wins so that invocation restarts
// at the resolved target.
//
// Timing: all state changes at the clock edge; the age-ordered views
// (*_ord) and the tail/context information are combinational.
module imt_thread_seq
  import imt_pkg::*;
#(
  parameter int unsigned CTXS     = imt_pkg::NUM_CTX,
  parameter int unsigned AL_N     = imt_pkg::AL_ENTRIES,
  parameter int unsigned LSQ_N    = imt_pkg::LSQ_ENTRIES,
  parameter int unsigned HW       = 10,      // inter-thread predictor history bits
  parameter int unsigned ICNT_W   = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_valid,     // begin the program
  input  logic [PC_W-1:0]             start_pc,
  // descriptor cache
  output logic                        lk_valid,
  output logic [PC_W-1:0]             lk_pc,
  input  logic                        dc_valid,
  input  logic                        dc_hit,
  input  logic [PC_W-1:0]             dc_pc,
  input  thread_desc_t                dc_desc,
  output logic                        dm_req,          // descriptor miss: fetch from memory
  output logic [PC_W-1:0]             dm_pc,
  input  logic                        dm_valid,
  input  thread_desc_t                dm_desc,
  // inter-thread predictor
  output logic                        pr_valid,
  output logic [PC_W-1:0]             pr_pc,
  input  logic [TGT_W-1:0]            pr_tgt,
  input  logic [HW-1:0]               pr_hist,
  output logic                        tr_valid,
  output logic [PC_W-1:0]             tr_pc,
  output logic [HW-1:0]               tr_hist,
  output logic [TGT_W-1:0]            tr_tgt,
  output logic                        rs_valid,
  output logic [HW-1:0]               rs_hist,
  // rename set-up, thread commit and squash
  output logic                        su_start,
  output logic [TID_W-1:0]            su_slot,
  output logic [NUM_AREGS-1:0]        su_use,
  output logic [NUM_AREGS-1:0]        su_create,
  input  logic                        su_done,
  input  logic [TID_W-1:0]            su_done_slot,
  output logic                        tc_valid,
  output logic [TID_W-1:0]            tc_slot,
  output logic                        sq_valid,
  output logic [TID_W-1:0]            sq_first,
  output logic [TID_W:0]              sq_count,
  output logic [THREAD_SLOTS-1:0]     free_mask,       // slots whose LSQ entries go
  // fetch policy
  output logic [THREAD_SLOTS-1:0]     ready_ord,
  output logic [THREAD_SLOTS-1:0]     active_ord,
  output logic [THREAD_SLOTS-1:0]     fetchable_ord,
  output logic [THREAD_SLOTS-1:0][ICNT_W-1:0] icount_ord,
  input  logic                        cand_valid,
  input  logic [TID_W-1:0]            cand_idx,
  input  logic                        activate,
  output logic                        rel_valid,
  output logic [RES_W-1:0]            rel_regs,
  // DRP
  output logic [PC_W-1:0]             cand_pc,
  input  res_t                        cand_pred,
  output logic                        drp_upd,
  output logic [PC_W-1:0]             drp_pc,
  output res_t                        drp_used,
  // context mapper
  output logic [CTXS-1:0]             ctx_used,
  output logic                        tail_valid,
  output logic [$clog2(CTXS)-1:0]     tail_ctx,
  output logic [$clog2(AL_N):0]       tail_al_end,
  output logic [$clog2(LSQ_N):0]      tail_lsq_end,
  input  logic [$clog2(CTXS)-1:0]     pl_ctx,
  input  logic [$clog2(AL_N):0]       pl_al_base,
  input  logic [$clog2(AL_N):0]       pl_al_end,
  input  logic [$clog2(LSQ_N):0]      pl_lsq_base,
  input  logic [$clog2(LSQ_N):0]      pl_lsq_end,
  // ITDH window
  output logic [ITDH_PCS-1:0][PC_W-1:0] win_pc,
  output logic [ITDH_PCS-1:0]         win_valid,
  // pipeline side
  input  logic [THREAD_SLOTS-1:0]     fetch_more,      // thread still has instructions to fetch
  input  logic [THREAD_SLOTS-1:0][ICNT_W-1:0] icount,
  input  logic                        stop_valid,
  input  logic [TID_W-1:0]            stop_slot,
  input  logic [TGT_W-1:0]            stop_tgt,
  input  logic                        tdone_valid,
  input  logic [TID_W-1:0]            tdone_slot,
  input  res_t                        tdone_used,
  input  logic                        viol_valid,
  input  logic [TID_W-1:0]            viol_tid,
  input  logic                        spec_sq_valid,
  input  logic [TID_W-1:0]            spec_sq_slot,
  input  logic                        ovf_valid,
  input  logic [TID_W-1:0]            ovf_slot,
  // thread state, per slot
  output logic [TID_W-1:0]            head,
  output logic [TID_W:0]              count,
  output logic [$clog2(CTXS)-1:0]     head_ctx,
  output tstate_t [THREAD_SLOTS-1:0]  st,
  output logic [THREAD_SLOTS-1:0][PC_W-1:0] slot_pc,
  output logic [THREAD_SLOTS-1:0][$clog2(CTXS)-1:0] slot_ctx,
  output logic [THREAD_SLOTS-1:0][$clog2(AL_N):0]   slot_al_base,
  output logic [THREAD_SLOTS-1:0][$clog2(LSQ_N):0]  slot_lsq_base,
  output logic                        thread_mispred,  // event: thread misprediction
  output logic                        thread_commit    // event: a thread committed
);
  localparam int unsigned SL = THREAD_SLOTS;
  localparam int unsigned CW = $clog2(CTXS);

  typedef enum logic [2:0] {INV_STOP, INV_IDLE, INV_LOOKUP, INV_MISS, INV_SETUP} inv_t;

  inv_t                    inv_q;
  logic [PC_W-1:0]         next_pc;
  logic [TID_W-1:0]        tail;         // next free slot
  logic [TID_W-1:0]        inv_slot;

  thread_desc_t            desc   [SL];
  logic [TGT_W-1:0]        ptgt   [SL];
  logic [HW-1:0]           phist  [SL];
  logic [SL-1:0]           resolved;
  logic [RES_W-1:0]        rsv    [SL];
  res_t                    used   [SL];
  logic [CW-1:0]           pctx   [SL];
  logic [$clog2(AL_N):0]   al_end [SL];
  logic [$clog2(LSQ_N):0]  lsq_end[SL];

  function automatic logic [TID_W-1:0] age_of(logic [TID_W-1:0] s, logic [TID_W-1:0] h);
    return s - h;
  endfunction

  // ---- age-ordered views
  always_comb begin
    for (int i = 0; i < SL; i++) begin
      logic [TID_W-1:0] s;
      logic             live;
      s    = head + TID_W'(i);
      live = (TID_W+1)'(i) < count;
      ready_ord[i]     = live && st[s] == TS_READY;
      active_ord[i]    = live && (st[s] == TS_ACTIVE || st[s] == TS_DONE);
      fetchable_ord[i] = live && st[s] == TS_ACTIVE && fetch_more[s];
      icount_ord[i]    = icount[s];
    end
    for (int i = 0; i < ITDH_PCS; i++) begin
      logic [TID_W-1:0] s;
      s = head + TID_W'(i);
      win_pc[i]    = slot_pc[s];
      win_valid[i] = (TID_W+1)'(i) < count && st[s] != TS_WAITD;
    end
    cand_pc = slot_pc[head + cand_idx];
  end

  // ---- placement information for the context mapper
  always_comb begin
    ctx_used     = '0;
    tail_valid   = 1'b0;
    tail_ctx     = '0;
    tail_al_end  = '0;
    tail_lsq_end = '0;
    for (int i = 0; i < SL; i++) begin
      logic [TID_W-1:0] s;
      s = head + TID_W'(i);
      if ((TID_W+1)'(i) < count && (st[s] == TS_ACTIVE || st[s] == TS_DONE)) begin
        ctx_used[pctx[s]] = 1'b1;
        tail_valid   = 1'b1;
        tail_ctx     = pctx[s];
        tail_al_end  = al_end[s];
        tail_lsq_end = lsq_end[s];
      end
    end
    head_ctx = pctx[head];
  end

  // ---- squash selection: the request that reaches furthest back
  logic             sq_any, sq_mp;
  logic [TID_W-1:0] sq_from;           // first slot removed
  logic [PC_W-1:0]  sq_pc;             // where invocation restarts
  logic [HW-1:0]    sq_hist;
  logic             mp;
  always_comb begin
    logic [TID_W-1:0] best_age;
    mp       = stop_valid && stop_tgt != ptgt[stop_slot] && !resolved[stop_slot];
    sq_any   = 1'b0;
    sq_mp    = 1'b0;
    sq_from  = '0;
    best_age = '1;
    if (mp && (TID_W+1)'(age_of(stop_slot, head)) + 1'b1 < count) begin
      sq_any = 1'b1; sq_mp = 1'b1; sq_from = stop_slot + 1'b1; best_age = age_of(sq_from, head);
    end
    if (spec_sq_valid && (TID_W+1)'(age_of(spec_sq_slot, head)) + 1'b1 < count
        && age_of(spec_sq_slot + 1'b1, head) < best_age) begin
      sq_any = 1'b1; sq_mp = 1'b0; sq_from = spec_sq_slot + 1'b1; best_age = age_of(sq_from, head);
    end
    if (ovf_valid && (TID_W+1)'(age_of(ovf_slot, head)) + 1'b1 < count
        && age_of(ovf_slot + 1'b1, head) < best_age) begin
      sq_any = 1'b1; sq_mp = 1'b0; sq_from = ovf_slot + 1'b1; best_age = age_of(sq_from, head);
    end
    if (viol_valid && (TID_W+1)'(age_of(viol_tid, head)) < count
        && age_of(viol_tid, head) < best_age) begin
      sq_any = 1'b1; sq_mp = 1'b0; sq_from = viol_tid; best_age = age_of(sq_from, head);
    end
    sq_pc   = sq_mp ? desc[stop_slot].targets[stop_tgt] : slot_pc[sq_from];
    sq_hist = sq_mp ? HW'({phist[stop_slot], stop_tgt}) : phist[sq_from];
  end

  // slots removed by the squash and the reservation they return
  logic [SL-1:0]    sq_mask;
  logic [RES_W-1:0] sq_regs;
  always_comb begin
    sq_mask = '0;
    sq_regs = '0;
    for (int i = 0; i < SL; i++) begin
      logic [TID_W-1:0] s;
      s = sq_from + TID_W'(i);
      if (sq_any && (TID_W+1)'(age_of(s, head)) < count && age_of(s, head) >= age_of(sq_from, head)) begin
        sq_mask[s] = 1'b1;
        if (st[s] == TS_ACTIVE || st[s] == TS_DONE) sq_regs = sq_regs + rsv[s];
      end
    end
    // a thread activated in the squash cycle gives its new reservation back
    if (activate && sq_mask[head + cand_idx]) sq_regs = sq_regs + cand_pred.regs;
  end

  assign sq_valid = sq_any;
  assign sq_first = sq_from;
  assign sq_count = count - (TID_W+1)'(age_of(sq_from, head));
  assign thread_mispred = mp;

  // ---- thread commit
  logic do_commit;
  assign do_commit = count != 0 && st[head] == TS_DONE && !(sq_any && sq_from == head);
  assign tc_valid  = do_commit;
  assign tc_slot   = head;
  assign thread_commit = do_commit;
  assign drp_upd   = do_commit;
  assign drp_pc    = slot_pc[head];
  assign drp_used  = used[head];
  assign free_mask = sq_mask | (do_commit ? (SL'(1) << head) : '0);
  assign rel_valid = sq_any || do_commit;
  assign rel_regs  = sq_regs + (do_commit ? rsv[head] : '0);

  // training on resolution
  assign tr_valid = stop_valid && !resolved[stop_slot];
  assign tr_pc    = slot_pc[stop_slot];
  assign tr_hist  = phist[stop_slot];
  assign tr_tgt   = stop_tgt;
  // a misprediction with no later thread invoked yet only redirects invocation
  logic mp_only;
  assign mp_only  = mp && !sq_any;
  assign rs_valid = sq_any || mp_only;
  assign rs_hist  = sq_any ? sq_hist : HW'({phist[stop_slot], stop_tgt});
  always_comb for (int s = 0; s < SL; s++) slot_ctx[s] = pctx[s];

  // ---- invocation requests (combinational from state)
  logic full;
  assign full     = count == (TID_W+1)'(SL);
  assign lk_valid = inv_q == INV_IDLE && !full && !sq_any && !mp;
  assign lk_pc    = next_pc;
  assign dm_req   = inv_q == INV_MISS;
  assign dm_pc    = slot_pc[inv_slot];

  logic         got_desc;
  thread_desc_t new_desc;
  assign got_desc = !sq_any && ((inv_q == INV_LOOKUP && dc_valid && dc_hit && dc_pc == slot_pc[inv_slot])
                 || (inv_q == INV_MISS && dm_valid));
  assign new_desc = (inv_q == INV_MISS) ? dm_desc : dc_desc;
  assign pr_valid = got_desc;
  assign pr_pc    = slot_pc[inv_slot];
  assign su_start = got_desc;
  assign su_slot  = inv_slot;
  assign su_use   = new_desc.use_mask;
  assign su_create= new_desc.create_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inv_q    <= INV_STOP;
      next_pc  <= '0;
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      inv_slot <= '0;
      resolved <= '0;
      for (int s = 0; s < SL; s++) begin
        st[s]      <= TS_FREE;
        slot_pc[s] <= '0;
        pctx[s]    <= '0;
        rsv[s]     <= '0;
      end
    end else begin
      if (start_valid && inv_q == INV_STOP) begin
        inv_q   <= INV_IDLE;
        next_pc <= start_pc;
      end
      // ---- invocation
      case (inv_q)
        INV_IDLE: if (lk_valid) begin
          slot_pc[tail] <= next_pc;
          st[tail]      <= TS_WAITD;
          resolved[tail]<= 1'b0;
          inv_slot      <= tail;
          tail          <= tail + 1'b1;
          inv_q         <= INV_LOOKUP;
        end
        INV_LOOKUP: if (got_desc) begin
          inv_q <= INV_SETUP;
        end else if (dc_valid && dc_pc == slot_pc[inv_slot] && !dc_hit) begin
          inv_q <= INV_MISS;
        end
        INV_MISS: if (got_desc) inv_q <= INV_SETUP;
        INV_SETUP: if (su_done && su_done_slot == inv_slot) inv_q <= INV_IDLE;
        default: ;
      endcase
      if (got_desc) begin
        desc[inv_slot]  <= new_desc;
        ptgt[inv_slot]  <= pr_tgt;
        phist[inv_slot] <= pr_hist;
        st[inv_slot]    <= TS_SETUP;
        next_pc         <= new_desc.targets[pr_tgt];
      end
      if (su_done) st[su_done_slot] <= TS_READY;
      // ---- activation
      if (activate) begin
        st[head + cand_idx]     <= TS_ACTIVE;
        rsv[head + cand_idx]    <= cand_pred.regs;
        pctx[head + cand_idx]   <= pl_ctx;
        slot_al_base[head + cand_idx]  <= pl_al_base;
        slot_lsq_base[head + cand_idx] <= pl_lsq_base;
        al_end[head + cand_idx] <= pl_al_end;
        lsq_end[head + cand_idx]<= pl_lsq_end;
      end
      // ---- completion
      if (stop_valid) resolved[stop_slot] <= 1'b1;
      // a thread that outgrew its segment takes the rest of its context
      if (ovf_valid && (TID_W+1)'(age_of(ovf_slot, head)) < count) begin
        al_end[ovf_slot]  <= ($clog2(AL_N)+1)'(AL_N);
        lsq_end[ovf_slot] <= ($clog2(LSQ_N)+1)'(LSQ_N);
      end
      if (tdone_valid) begin
        st[tdone_slot]   <= TS_DONE;
        used[tdone_slot] <= tdone_used;
      end
      // ---- commit
      if (do_commit) begin
        st[head] <= TS_FREE;
        head     <= head + 1'b1;
      end
      if (mp_only) next_pc <= desc[stop_slot].targets[stop_tgt];
      // ---- squash (after the above so it wins)
      if (sq_any) begin
        for (int s = 0; s < SL; s++) if (sq_mask[s]) st[s] <= TS_FREE;
        tail    <= sq_from;
        next_pc <= sq_pc;
        if (inv_q != INV_STOP) inv_q <= INV_IDLE;
      end
      count <= count
               + (TID_W+1)'(inv_q == INV_IDLE && lk_valid)
               - (TID_W+1)'(do_commit)
               - (sq_any ? sq_count : '0);
    end
  end

  // an activated thread is always the oldest not yet activated one
  assert property (@(posedge clk) disable iff (!rst_n) activate |-> cand_valid);

endmodule
