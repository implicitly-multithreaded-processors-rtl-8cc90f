// imt_fetch_policy: resource- and dependence-based (R&D) thread fetch policy.
//
// Two decisions are made every cycle over the in-flight threads, which are
// presented in program order (index 0 = head, the non-speculative thread):
//
//  1. Activation (resource part). Invoked threads become fetchable only as a
//     contiguous group that starts at the oldest thread. The oldest thread that
//     is set up but not yet activated is the candidate; it is activated only if
//     the DRP-predicted register demand fits in the unreserved register budget
//     and the context mapper can place its predicted active-list and LSQ
//     segments (ctx_ok). The predicted registers are then reserved until the
//     thread commits or is squashed (rel_valid/rel_regs).
//  2. Fetch selection (dependence part). If the ITDH reports independent loop
//     iterations, up to PORTS activated threads with the smallest ICOUNT
//     (instructions in decode, rename and issue queue) are chosen, older first
//     on ties. Otherwise fetch is biased to the head: the oldest fetchable
//     activated threads are chosen in program order.
//
// Own choices: register demand is accounted as a budget of
// REG_BUDGET = physical minus architectural registers; in the dependent mode
// the second i-cache port goes to the next-oldest fetchable thread.
//
// Timing: selection and the activate pulse are combinational; the reservation
// counter updates at the clock edge.
module imt_fetch_policy
  import imt_pkg::*;
#(
  parameter int unsigned N          = imt_pkg::THREAD_SLOTS,
  parameter int unsigned PORTS      = imt_pkg::FETCH_PORTS,
  parameter int unsigned REG_BUDGET = imt_pkg::NUM_PREGS - imt_pkg::NUM_AREGS,
  parameter int unsigned ICNT_W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               ready_ord,      // set up, not yet activated
  input  logic [N-1:0]               active_ord,     // activated
  input  logic [N-1:0]               fetchable_ord,  // activated and has work to fetch
  input  logic [N-1:0][ICNT_W-1:0]   icount_ord,
  input  logic                       indep_mode,     // from ITDH
  input  res_t                       cand_pred,      // DRP prediction for the candidate
  input  logic                       ctx_ok,         // context mapper can place candidate
  input  logic                       rel_valid,      // reservation returned
  input  logic [RES_W-1:0]           rel_regs,
  output logic                       cand_valid,
  output logic [$clog2(N)-1:0]       cand_idx,
  output logic                       activate,
  output logic                       res_stall,      // candidate held back by resources
  output logic [PORTS-1:0]           grant_valid,
  output logic [PORTS-1:0][$clog2(N)-1:0] grant_idx,
  output logic [RES_W-1:0]           regs_reserved
);
  localparam int unsigned IW = $clog2(N);

  logic [RES_W-1:0] reserved_q;
  logic             regs_fit;

  // candidate: first not-active thread, if it is ready
  always_comb begin
    cand_valid = 1'b0;
    cand_idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!active_ord[i]) begin
        cand_valid = ready_ord[i];
        cand_idx   = IW'(i);
      end
    end
  end

  assign regs_fit      = ({1'b0, reserved_q} + {1'b0, cand_pred.regs}) <= (RES_W+1)'(REG_BUDGET);
  assign activate      = cand_valid && regs_fit && ctx_ok;
  assign res_stall     = cand_valid && !(regs_fit && ctx_ok);
  assign regs_reserved = reserved_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reserved_q <= '0;
    else reserved_q <= reserved_q + (activate ? cand_pred.regs : '0)
                                  - (rel_valid ? rel_regs : '0);
  end

  // fetch selection
  always_comb begin
    logic [N-1:0] taken;
    taken       = '0;
    grant_valid = '0;
    grant_idx   = '0;
    for (int p = 0; p < PORTS; p++) begin
      logic             found;
      logic [IW-1:0]    best;
      logic [ICNT_W-1:0] best_cnt;
      found    = 1'b0;
      best     = '0;
      best_cnt = '1;
      for (int i = 0; i < N; i++) begin
        if (fetchable_ord[i] && !taken[i]) begin
          if (!found || (indep_mode && icount_ord[i] < best_cnt)) begin
            found    = 1'b1;
            best     = IW'(i);
            best_cnt = icount_ord[i];
          end
        end
      end
      if (found) begin
        grant_valid[p] = 1'b1;
        grant_idx[p]   = best;
        taken[best]    = 1'b1;
      end
    end
  end

  // a released reservation can never exceed what is reserved
  assert property (@(posedge clk) disable iff (!rst_n)
                   rel_valid |-> rel_regs <= reserved_q + (activate ? cand_pred.regs : '0));

endmodule
