// imt_lsq: per-context load/store queues with inter-context disambiguation.
//
// Each hardware context owns LSQ_N entries. Entries inside a context are in
// program order (threads get contiguous segments from the context mapper) and
// contexts are in program order around a ring starting at the head context
// (head_ctx), so every entry has an age key {context rank, index}.
//
//  * A load searches for the youngest older store to the same address, first
//    in its own context and then in earlier contexts; the head context's loads
//    therefore never look at another context. With a match the store's data is
//    forwarded; otherwise the load goes to the data cache (rsp_hit = 0). A
//    store forwarded to a load of another context is marked consumed.
//  * A store searches later entries, in its own and in later contexts, for
//    loads to the same address that have already executed: such a premature
//    load is a memory-dependence violation, and the thread holding the oldest
//    one (viol_tid) must be squashed with all later threads.
//  * The PORTS search ports are granted to the least speculative contexts
//    first (one request per context per cycle).
//  * Rollback of a store that a later thread consumed raises spec_squash.
//  * Entries are freed by thread (clr_mask) at thread commit or squash.
//
// Own choices: a violation is flagged for any younger executed load to the
// same word address, even if an intervening store supplied it; addresses are
// compared in full; a store and a younger load searching in the same cycle
// are also checked against each other.
//
// Timing: requests are granted and searched in one cycle; responses, the
// violation report and entry updates appear after the clock edge.
module imt_lsq
  import imt_pkg::*;
#(
  parameter int unsigned CTXS    = imt_pkg::NUM_CTX,
  parameter int unsigned LSQ_N   = imt_pkg::LSQ_ENTRIES,
  parameter int unsigned PORTS   = imt_pkg::LSQ_PORTS,
  parameter int unsigned ALLOC_W = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [$clog2(CTXS)-1:0]            head_ctx,
  // entry allocation at dispatch
  input  logic [ALLOC_W-1:0]                 al_valid,
  input  logic [ALLOC_W-1:0][$clog2(CTXS)-1:0] al_ctx,
  input  logic [ALLOC_W-1:0][$clog2(LSQ_N)-1:0] al_idx,
  input  logic [ALLOC_W-1:0]                 al_store,
  input  logic [ALLOC_W-1:0][TID_W-1:0]      al_tid,
  // execution requests, one per context
  input  logic [CTXS-1:0]                    rq_valid,
  input  logic [CTXS-1:0][$clog2(LSQ_N)-1:0] rq_idx,
  input  logic [CTXS-1:0][ADDR_W-1:0]        rq_addr,
  input  logic [CTXS-1:0][DATA_W-1:0]        rq_data,
  output logic [CTXS-1:0]                    rq_grant,
  // responses (registered)
  output logic [PORTS-1:0]                   rsp_valid,
  output logic [PORTS-1:0][$clog2(CTXS)-1:0] rsp_ctx,
  output logic [PORTS-1:0][$clog2(LSQ_N)-1:0] rsp_idx,
  output logic [PORTS-1:0]                   rsp_store,
  output logic [PORTS-1:0]                   rsp_hit,      // load data forwarded from a store
  output logic [PORTS-1:0]                   rsp_xctx,     // load searched other contexts
  output logic [PORTS-1:0][DATA_W-1:0]       rsp_data,
  output logic                               viol_valid,
  output logic [TID_W-1:0]                   viol_tid,
  // rollback of one entry, freeing by thread
  input  logic                               rb_valid,
  input  logic [$clog2(CTXS)-1:0]            rb_ctx,
  input  logic [$clog2(LSQ_N)-1:0]           rb_idx,
  output logic                               spec_squash,
  input  logic [THREAD_SLOTS-1:0]            clr_mask
);
  localparam int unsigned CW = $clog2(CTXS);
  localparam int unsigned IW = $clog2(LSQ_N);
  localparam int unsigned KW = CW + IW;

  typedef struct packed {
    logic              valid;
    logic              store;
    logic              done;      // executed: address (and store data) known
    logic              consumed;  // store value taken by a later context
    logic [TID_W-1:0]  tid;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } ent_t;

  ent_t q [CTXS][LSQ_N];

  function automatic logic [CW-1:0] rank_of(logic [CW-1:0] c, logic [CW-1:0] h);
    return c - h;
  endfunction

  // ---- grant the least speculative requesting contexts
  logic [PORTS-1:0]          g_valid;
  logic [PORTS-1:0][CW-1:0]  g_ctx;
  always_comb begin
    int unsigned n;
    n        = 0;
    g_valid  = '0;
    g_ctx    = '0;
    rq_grant = '0;
    for (int r = 0; r < CTXS; r++) begin
      logic [CW-1:0] c;
      c = head_ctx + CW'(r);
      if (rq_valid[c] && n < PORTS) begin
        g_valid[n]  = 1'b1;
        g_ctx[n]    = c;
        rq_grant[c] = 1'b1;
        n = n + 1;
      end
    end
  end

  // ---- searches
  logic [PORTS-1:0]             s_store, s_hit, s_xctx, s_viol;
  logic [PORTS-1:0][DATA_W-1:0] s_data;
  logic [PORTS-1:0][CW-1:0]     s_src_c;
  logic [PORTS-1:0][IW-1:0]     s_src_i;
  logic [PORTS-1:0][KW-1:0]     s_viol_key;
  logic [PORTS-1:0][TID_W-1:0]  s_viol_tid;

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      logic [CW-1:0]     c;
      logic [IW-1:0]     i;
      logic [KW-1:0]     key, best;
      logic [ADDR_W-1:0] a;
      c = g_ctx[p];
      i = rq_idx[c];
      a = rq_addr[c];
      key = {rank_of(c, head_ctx), i};
      s_store[p] = q[c][i].store;
      s_hit[p]   = 1'b0;
      s_xctx[p]  = (c != head_ctx);
      s_data[p]  = '0;
      s_src_c[p] = '0;
      s_src_i[p] = '0;
      s_viol[p]  = 1'b0;
      s_viol_key[p] = '1;
      s_viol_tid[p] = '0;
      best = '0;
      for (int cc = 0; cc < CTXS; cc++) begin
        for (int ii = 0; ii < LSQ_N; ii++) begin
          logic [KW-1:0] k;
          k = {rank_of(CW'(cc), head_ctx), IW'(ii)};
          if (q[cc][ii].valid && q[cc][ii].done && q[cc][ii].addr == a) begin
            // load: youngest older store
            if (!q[c][i].store && q[cc][ii].store && k < key && (!s_hit[p] || k > best)) begin
              s_hit[p]   = 1'b1;
              best       = k;
              s_data[p]  = q[cc][ii].data;
              s_src_c[p] = CW'(cc);
              s_src_i[p] = IW'(ii);
            end
            // store: oldest younger executed load
            if (q[c][i].store && !q[cc][ii].store && k > key && k < s_viol_key[p]) begin
              s_viol[p]     = 1'b1;
              s_viol_key[p] = k;
              s_viol_tid[p] = q[cc][ii].tid;
            end
          end
        end
      end
      // a younger load searching in the same cycle
      for (int o = 0; o < PORTS; o++) begin
        logic [KW-1:0] ko;
        ko = {rank_of(g_ctx[o], head_ctx), rq_idx[g_ctx[o]]};
        if (o != p && g_valid[o] && q[c][i].store && !q[g_ctx[o]][rq_idx[g_ctx[o]]].store
            && rq_addr[g_ctx[o]] == a && ko > key && ko < s_viol_key[p]) begin
          s_viol[p]     = 1'b1;
          s_viol_key[p] = ko;
          s_viol_tid[p] = q[g_ctx[o]][rq_idx[g_ctx[o]]].tid;
        end
      end
      if (!g_valid[p]) begin
        s_hit[p]  = 1'b0;
        s_viol[p] = 1'b0;
      end
    end
  end

  assign spec_squash = rb_valid && q[rb_ctx][rb_idx].valid && q[rb_ctx][rb_idx].store
                       && q[rb_ctx][rb_idx].consumed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int cc = 0; cc < CTXS; cc++)
        for (int ii = 0; ii < LSQ_N; ii++) q[cc][ii] <= '0;
      rsp_valid  <= '0;
      rsp_ctx    <= '0;
      rsp_idx    <= '0;
      rsp_store  <= '0;
      rsp_hit    <= '0;
      rsp_xctx   <= '0;
      rsp_data   <= '0;
      viol_valid <= 1'b0;
      viol_tid   <= '0;
    end else begin
      // free by thread
      for (int cc = 0; cc < CTXS; cc++)
        for (int ii = 0; ii < LSQ_N; ii++)
          if (clr_mask[q[cc][ii].tid]) q[cc][ii].valid <= 1'b0;
      // allocation
      for (int w = 0; w < ALLOC_W; w++)
        if (al_valid[w] && !clr_mask[al_tid[w]]) begin   // not for a thread leaving now
          q[al_ctx[w]][al_idx[w]].valid    <= 1'b1;
          q[al_ctx[w]][al_idx[w]].store    <= al_store[w];
          q[al_ctx[w]][al_idx[w]].done     <= 1'b0;
          q[al_ctx[w]][al_idx[w]].consumed <= 1'b0;
          q[al_ctx[w]][al_idx[w]].tid      <= al_tid[w];
        end
      // executed accesses
      viol_valid <= 1'b0;
      for (int p = PORTS - 1; p >= 0; p--) begin
        rsp_valid[p] <= g_valid[p];
        rsp_ctx[p]   <= g_ctx[p];
        rsp_idx[p]   <= rq_idx[g_ctx[p]];
        rsp_store[p] <= s_store[p];
        rsp_hit[p]   <= s_hit[p];
        rsp_xctx[p]  <= s_xctx[p] && !s_store[p];
        rsp_data[p]  <= s_hit[p] ? s_data[p] : '0;
        if (g_valid[p]) begin
          q[g_ctx[p]][rq_idx[g_ctx[p]]].done <= 1'b1;
          q[g_ctx[p]][rq_idx[g_ctx[p]]].addr <= rq_addr[g_ctx[p]];
          q[g_ctx[p]][rq_idx[g_ctx[p]]].data <= rq_data[g_ctx[p]];
          if (s_hit[p] && s_src_c[p] != g_ctx[p]) q[s_src_c[p]][s_src_i[p]].consumed <= 1'b1;
        end
        if (s_viol[p]) begin
          viol_valid <= 1'b1;
          viol_tid   <= s_viol_tid[p];
        end
      end
      if (rb_valid) q[rb_ctx][rb_idx].valid <= 1'b0;
    end
  end

endmodule
