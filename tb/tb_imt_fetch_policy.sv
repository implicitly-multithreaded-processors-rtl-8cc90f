// tb_imt_fetch_policy: self-checking test of the R&D fetch policy.
// Random thread states, ICOUNTs, DRP predictions and context-mapper answers
// are applied every cycle; a reference model computes the activation
// candidate, the activation decision with the register budget (324 =
// 356 physical - 32 architectural registers), and the two fetch grants in
// the dependent (oldest first) and independent (smallest ICOUNT) modes.
module tb_imt_fetch_policy;
  import imt_pkg::*;
  localparam int N = THREAD_SLOTS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] ready_ord, active_ord, fetchable_ord;
  logic [N-1:0][7:0] icount_ord;
  logic indep_mode, ctx_ok, rel_valid, cand_valid, activate, res_stall;
  res_t cand_pred;
  logic [RES_W-1:0] rel_regs, regs_reserved;
  logic [$clog2(N)-1:0] cand_idx;
  logic [1:0] grant_valid;
  logic [1:0][$clog2(N)-1:0] grant_idx;
  int checks = 0, failures = 0;
  int reserved = 0;
  int n_act = 0, n_stall = 0, n_indep = 0;

  imt_fetch_policy dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ready_ord = '0; active_ord = '0; fetchable_ord = '0; icount_ord = '0;
    indep_mode = 0; ctx_ok = 0; rel_valid = 0; rel_regs = '0; cand_pred = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int k, e_cand; logic e_cv, e_act;
      int g0, g1;
      @(negedge clk);
      // contiguous active prefix of random length, then random ready bits
      k = $urandom_range(0, N);
      for (int i = 0; i < N; i++) begin
        active_ord[i]    = (i < k);
        ready_ord[i]     = (i >= k) && ($urandom_range(0, 3) != 0);
        fetchable_ord[i] = (i < k) && ($urandom_range(0, 3) != 0);
        icount_ord[i]    = 8'($urandom_range(0, 20));
      end
      indep_mode = $urandom_range(0, 1);
      ctx_ok     = $urandom_range(0, 4) != 0;
      cand_pred  = '{regs: 9'($urandom_range(0, 120)), lsq: 9'($urandom_range(0, 32)), al: 9'($urandom_range(0, 128))};
      rel_valid  = reserved > 0 && $urandom_range(0, 2) == 0;
      rel_regs   = rel_valid ? 9'($urandom_range(0, reserved)) : '0;
      #1;
      // reference
      e_cand = N; e_cv = 0;
      for (int i = 0; i < N; i++) if (!active_ord[i] && e_cand == N) e_cand = i;
      if (e_cand < N) e_cv = ready_ord[e_cand];
      e_act = e_cv && (reserved + int'(cand_pred.regs) <= 324) && ctx_ok;
      chk(cand_valid == e_cv, "cand_valid");
      if (e_cv) chk(int'(cand_idx) == e_cand, "cand_idx");
      chk(activate == e_act, "activate");
      chk(res_stall == (e_cv && !e_act), "res_stall");
      chk(int'(regs_reserved) == reserved, "reserved");
      g0 = -1; g1 = -1;
      for (int i = 0; i < N; i++)
        if (fetchable_ord[i]) begin
          if (g0 < 0 || (indep_mode && icount_ord[i] < icount_ord[g0])) g0 = i;
        end
      for (int i = 0; i < N; i++)
        if (fetchable_ord[i] && i != g0) begin
          if (g1 < 0 || (indep_mode && icount_ord[i] < icount_ord[g1])) g1 = i;
        end
      chk(grant_valid[0] == (g0 >= 0), "grant0 valid");
      chk(grant_valid[1] == (g1 >= 0), "grant1 valid");
      if (g0 >= 0) chk(int'(grant_idx[0]) == g0, "grant0 idx");
      if (g1 >= 0) chk(int'(grant_idx[1]) == g1, "grant1 idx");
      if (e_act) n_act++;
      if (e_cv && !e_act) n_stall++;
      if (indep_mode && g1 >= 0) n_indep++;
      reserved = reserved + (e_act ? int'(cand_pred.regs) : 0) - (rel_valid ? int'(rel_regs) : 0);
    end
    chk(n_act > 0 && n_stall > 0 && n_indep > 0, "all cases seen");
    $display("activations=%0d resource stalls=%0d icount grants=%0d", n_act, n_stall, n_indep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
