// imt_top: thread-control core of an Implicitly-Multithreaded (IMT) processor.
//
// IMT runs the compiler-specified speculative threads of one sequential
// program on an SMT pipeline. This module holds everything IMT adds to the
// SMT core: the thread sequencer with its descriptor cache and next-thread
// predictor, the rename tables that carry register values between threads
// (master, local and preassign tables), the load/store queues that enforce
// memory order across contexts, and the optimizations of the optimized IMT:
// the resource- and dependence-based fetch policy (dynamic resource
// predictor plus inter-thread dependence heuristic), context multiplexing,
// thread set-up overlapped with execution, speculative release of register
// values and two-phase commit.
//
// The shared SMT datapath (fetch unit, decoders, issue queue, functional
// units, active lists and caches) is outside this module and talks to it
// through the ports below: it fetches from the thread slots granted on
// fg_*, renames through rn_*, writes results back on wb_*, executes
// loads and stores through the LSQ ports, reports stop-instruction outcomes,
// thread completion, segment overflows, rollbacks and instruction commits.
// Descriptor misses are served from memory through dm_*.
//
// Timing: see the individual blocks. Fetch grants and rename responses are
// combinational; the descriptor cache answers in two cycles; LSQ responses
// one cycle after the grant.
module imt_top
  import imt_pkg::*;
#(
  parameter int unsigned RN_W    = 8,
  parameter int unsigned WB_W    = 8,
  parameter int unsigned CM_W    = 8,
  parameter int unsigned ALLOC_W = 4,
  parameter int unsigned ICNT_W  = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start_valid,
  input  logic [PC_W-1:0]              start_pc,
  // descriptor memory
  output logic                         dm_req,
  output logic [PC_W-1:0]              dm_pc,
  input  logic                         dm_valid,
  input  thread_desc_t                 dm_desc,
  // fetch
  output logic [FETCH_PORTS-1:0]       fg_valid,
  output logic [FETCH_PORTS-1:0][TID_W-1:0] fg_slot,
  input  logic [THREAD_SLOTS-1:0]      fetch_more,
  input  logic [THREAD_SLOTS-1:0][ICNT_W-1:0] icount,
  // rename / write-back / commit / rollback
  input  rn_req_t [RN_W-1:0]           rn_req,
  output logic    [RN_W-1:0]           rn_ok,
  output rn_rsp_t [RN_W-1:0]           rn_rsp,
  input  logic    [WB_W-1:0]           wb_valid,
  input  logic    [WB_W-1:0][PREG_W-1:0] wb_preg,
  input  rn_rec_t [CM_W-1:0]           cm_rec,
  input  rn_rec_t                      rb_rec,
  // load/store queue
  input  logic [ALLOC_W-1:0]           lq_al_valid,
  input  logic [ALLOC_W-1:0][CTX_W-1:0] lq_al_ctx,
  input  logic [ALLOC_W-1:0][$clog2(LSQ_ENTRIES)-1:0] lq_al_idx,
  input  logic [ALLOC_W-1:0]           lq_al_store,
  input  logic [ALLOC_W-1:0][TID_W-1:0] lq_al_tid,
  input  logic [NUM_CTX-1:0]           lq_rq_valid,
  input  logic [NUM_CTX-1:0][$clog2(LSQ_ENTRIES)-1:0] lq_rq_idx,
  input  logic [NUM_CTX-1:0][ADDR_W-1:0] lq_rq_addr,
  input  logic [NUM_CTX-1:0][DATA_W-1:0] lq_rq_data,
  output logic [NUM_CTX-1:0]           lq_rq_grant,
  output logic [LSQ_PORTS-1:0]         lq_rsp_valid,
  output logic [LSQ_PORTS-1:0][CTX_W-1:0] lq_rsp_ctx,
  output logic [LSQ_PORTS-1:0][$clog2(LSQ_ENTRIES)-1:0] lq_rsp_idx,
  output logic [LSQ_PORTS-1:0]         lq_rsp_store,
  output logic [LSQ_PORTS-1:0]         lq_rsp_hit,
  output logic [LSQ_PORTS-1:0]         lq_rsp_xctx,
  output logic [LSQ_PORTS-1:0][DATA_W-1:0] lq_rsp_data,
  input  logic                         lq_rb_valid,
  input  logic [CTX_W-1:0]             lq_rb_ctx,
  input  logic [$clog2(LSQ_ENTRIES)-1:0] lq_rb_idx,
  input  logic [TID_W-1:0]             lq_rb_tid,
  // thread completion
  input  logic                         stop_valid,
  input  logic [TID_W-1:0]             stop_slot,
  input  logic [TGT_W-1:0]             stop_tgt,
  input  logic                         tdone_valid,
  input  logic [TID_W-1:0]             tdone_slot,
  input  res_t                         tdone_used,
  input  logic                         ovf_valid,
  input  logic [TID_W-1:0]             ovf_slot,
  // state and events
  output logic [TID_W-1:0]             head,
  output logic [TID_W:0]               count,
  output tstate_t [THREAD_SLOTS-1:0]   st,
  output logic [THREAD_SLOTS-1:0][PC_W-1:0] slot_pc,
  output logic [THREAD_SLOTS-1:0][CTX_W-1:0] slot_ctx,
  output logic [THREAD_SLOTS-1:0][$clog2(AL_ENTRIES):0] slot_al_base,
  output logic [THREAD_SLOTS-1:0][$clog2(LSQ_ENTRIES):0] slot_lsq_base,
  output logic                         ev_indep_mode,
  output logic                         ev_res_stall,
  output logic                         ev_activate,
  output logic                         ev_ctx_shared,
  output logic                         ev_mispred,
  output logic                         ev_commit,
  output logic                         ev_squash,
  output logic                         ev_viol,
  output logic                         ev_spec_squash,
  output logic                         ev_inst_free,
  output logic [$clog2(RT_BW+1)-1:0]   ev_setup_ops,
  output logic                         ev_setup_busy,
  output logic                         ev_drp_known,
  output logic [RES_W-1:0]             reserved_regs,
  output logic [$clog2(NUM_PREGS+1)-1:0] free_regs
);
  localparam int unsigned HW = 10;
  localparam int unsigned AW = $clog2(AL_ENTRIES) + 1;
  localparam int unsigned LW = $clog2(LSQ_ENTRIES) + 1;

  // descriptor cache
  logic lk_valid; logic [PC_W-1:0] lk_pc;
  logic dc_valid, dc_hit; logic [PC_W-1:0] dc_pc; thread_desc_t dc_desc;
  // predictor
  logic pr_valid, tr_valid, rs_valid;
  logic [PC_W-1:0] pr_pc, tr_pc;
  logic [TGT_W-1:0] pr_tgt, tr_tgt;
  logic [HW-1:0] pr_hist, tr_hist, rs_hist;
  // rename control
  logic su_start, su_busy, su_done; logic [TID_W-1:0] su_slot, su_done_slot;
  logic [NUM_AREGS-1:0] su_use, su_create;
  logic tc_valid, sq_valid; logic [TID_W-1:0] tc_slot, sq_first; logic [TID_W:0] sq_count;
  logic [THREAD_SLOTS-1:0] free_mask;
  logic rn_spec_sq, lq_spec_sq;
  // fetch policy
  logic [THREAD_SLOTS-1:0] ready_ord, active_ord, fetchable_ord;
  logic [THREAD_SLOTS-1:0][ICNT_W-1:0] icount_ord;
  logic cand_valid, activate, res_stall, rel_valid;
  logic [TID_W-1:0] cand_idx;
  logic [RES_W-1:0] rel_regs, regs_reserved;
  logic [FETCH_PORTS-1:0] g_valid;
  logic [FETCH_PORTS-1:0][TID_W-1:0] g_idx;
  logic indep_mode;
  // DRP
  logic [PC_W-1:0] cand_pc, drp_pc; res_t cand_pred, drp_used; logic drp_upd, drp_known;
  // context map
  logic [NUM_CTX-1:0] ctx_used; logic tail_valid, ctx_ok, ctx_shared;
  logic [CTX_W-1:0] tail_ctx, pl_ctx, head_ctx;
  logic [AW-1:0] tail_al_end, pl_al_base, pl_al_end;
  logic [LW-1:0] tail_lsq_end, pl_lsq_base, pl_lsq_end;
  // ITDH
  logic [ITDH_PCS-1:0][PC_W-1:0] win_pc; logic [ITDH_PCS-1:0] win_valid;
  // LSQ
  logic viol_valid; logic [TID_W-1:0] viol_tid;

  imt_thread_seq #(.HW(HW), .ICNT_W(ICNT_W)) u_seq (
    .clk, .rst_n, .start_valid, .start_pc,
    .lk_valid, .lk_pc, .dc_valid, .dc_hit, .dc_pc, .dc_desc,
    .dm_req, .dm_pc, .dm_valid, .dm_desc,
    .pr_valid, .pr_pc, .pr_tgt, .pr_hist, .tr_valid, .tr_pc, .tr_hist, .tr_tgt, .rs_valid, .rs_hist,
    .su_start, .su_slot, .su_use, .su_create, .su_done, .su_done_slot,
    .tc_valid, .tc_slot, .sq_valid, .sq_first, .sq_count, .free_mask,
    .ready_ord, .active_ord, .fetchable_ord, .icount_ord, .cand_valid, .cand_idx, .activate,
    .rel_valid, .rel_regs,
    .cand_pc, .cand_pred, .drp_upd, .drp_pc, .drp_used,
    .ctx_used, .tail_valid, .tail_ctx, .tail_al_end, .tail_lsq_end,
    .pl_ctx, .pl_al_base, .pl_al_end, .pl_lsq_base, .pl_lsq_end,
    .win_pc, .win_valid,
    .fetch_more, .icount, .stop_valid, .stop_slot, .stop_tgt, .tdone_valid, .tdone_slot, .tdone_used,
    .viol_valid, .viol_tid,
    .spec_sq_valid(rn_spec_sq || lq_spec_sq),
    .spec_sq_slot(rn_spec_sq ? rb_rec.slot : lq_rb_tid),
    .ovf_valid, .ovf_slot,
    .head, .count, .head_ctx, .st, .slot_pc, .slot_ctx, .slot_al_base, .slot_lsq_base,
    .thread_mispred(ev_mispred), .thread_commit(ev_commit)
  );

  imt_desc_cache u_dcache (
    .clk, .rst_n, .lk_valid, .lk_pc,
    .rsp_valid(dc_valid), .rsp_hit(dc_hit), .rsp_pc(dc_pc), .rsp_desc(dc_desc),
    .fill_valid(dm_valid), .fill_pc(dm_pc), .fill_desc(dm_desc)
  );

  imt_thread_pred #(.HIST_LEN(HW / TGT_W)) u_tpred (
    .clk, .rst_n, .pr_valid, .pr_pc, .pr_tgt, .pr_hist,
    .tr_valid, .tr_pc, .tr_hist, .tr_tgt, .rs_valid, .rs_hist
  );

  imt_drp u_drp (
    .clk, .rst_n, .q_pc(cand_pc), .q_pred(cand_pred), .q_known(drp_known),
    .upd_valid(drp_upd), .upd_pc(drp_pc), .upd_used(drp_used)
  );

  imt_itdh u_itdh (.clk, .rst_n, .win_pc, .win_valid, .indep_mode);

  imt_ctx_map u_ctx (
    .ctx_used, .tail_valid, .tail_ctx, .tail_al_end, .tail_lsq_end, .pred(cand_pred),
    .ok(ctx_ok), .shared(ctx_shared), .place_ctx(pl_ctx),
    .al_base(pl_al_base), .al_end(pl_al_end), .lsq_base(pl_lsq_base), .lsq_end(pl_lsq_end)
  );

  imt_fetch_policy #(.ICNT_W(ICNT_W)) u_fpol (
    .clk, .rst_n, .ready_ord, .active_ord, .fetchable_ord, .icount_ord, .indep_mode,
    .cand_pred, .ctx_ok, .rel_valid, .rel_regs,
    .cand_valid, .cand_idx, .activate, .res_stall,
    .grant_valid(g_valid), .grant_idx(g_idx), .regs_reserved
  );

  imt_rename #(.RN_W(RN_W), .WB_W(WB_W), .CM_W(CM_W)) u_ren (
    .clk, .rst_n,
    .setup_start(su_start), .setup_slot(su_slot), .setup_use(su_use), .setup_create(su_create),
    .setup_busy(su_busy), .setup_done(su_done), .setup_done_slot(su_done_slot), .setup_ops(ev_setup_ops),
    .rn_req, .rn_ok, .rn_rsp, .wb_valid, .wb_preg, .cm_rec, .rb_rec,
    .spec_squash(rn_spec_sq),
    .tc_valid, .tc_slot, .sq_valid, .sq_first, .sq_count,
    .free_count(free_regs), .inst_frees(ev_inst_free)
  );

  imt_lsq #(.ALLOC_W(ALLOC_W)) u_lsq (
    .clk, .rst_n, .head_ctx,
    .al_valid(lq_al_valid), .al_ctx(lq_al_ctx), .al_idx(lq_al_idx), .al_store(lq_al_store), .al_tid(lq_al_tid),
    .rq_valid(lq_rq_valid), .rq_idx(lq_rq_idx), .rq_addr(lq_rq_addr), .rq_data(lq_rq_data), .rq_grant(lq_rq_grant),
    .rsp_valid(lq_rsp_valid), .rsp_ctx(lq_rsp_ctx), .rsp_idx(lq_rsp_idx), .rsp_store(lq_rsp_store),
    .rsp_hit(lq_rsp_hit), .rsp_xctx(lq_rsp_xctx), .rsp_data(lq_rsp_data),
    .viol_valid, .viol_tid,
    .rb_valid(lq_rb_valid), .rb_ctx(lq_rb_ctx), .rb_idx(lq_rb_idx), .spec_squash(lq_spec_sq),
    .clr_mask(free_mask)
  );

  // fetch grants: age index -> slot
  always_comb
    for (int p = 0; p < FETCH_PORTS; p++) begin
      fg_valid[p] = g_valid[p];
      fg_slot[p]  = head + g_idx[p];
    end

  assign ev_indep_mode  = indep_mode;
  assign ev_setup_busy  = su_busy;
  assign ev_drp_known   = drp_known;
  assign reserved_regs  = regs_reserved;
  assign ev_res_stall   = res_stall;
  assign ev_activate    = activate;
  assign ev_ctx_shared  = activate && ctx_shared;
  assign ev_squash      = sq_valid;
  assign ev_viol        = viol_valid;
  assign ev_spec_squash = rn_spec_sq || lq_spec_sq;

endmodule
