// imt_thread_pred: inter-thread (next-thread) predictor.
//
// Every thread has NUM_TARGETS (four) possible successors. When a thread's
// descriptor arrives, the predictor chooses which target the thread will
// leave through; the sequencer then takes that target's start PC from the
// descriptor and invokes the next thread. One prediction per cycle; the
// table is shared by all threads.
//
// Own choices (the structure is not specified beyond the above): a table of
// ENTRIES target numbers, each with a 2-bit hysteresis counter, indexed by the
// start PC XOR a global history of the last HIST_LEN predicted target numbers.
// The history is updated speculatively at prediction time; the sequencer saves
// it per thread (pr_hist) and restores it after a squash (rs_*). Training
// (tr_*) happens when the thread's stop instruction resolves: a correct
// target strengthens the counter, a wrong one weakens it and, once the
// counter is zero, replaces the target.
//
// Timing: the prediction is combinational; history and table update at the
// clock edge.
module imt_thread_pred
  import imt_pkg::*;
#(
  parameter int unsigned ENTRIES  = 1024,
  parameter int unsigned HIST_LEN = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pr_valid,   // prediction used: shift history
  input  logic [PC_W-1:0]          pr_pc,
  output logic [TGT_W-1:0]         pr_tgt,
  output logic [HIST_LEN*TGT_W-1:0] pr_hist,   // history the prediction used
  input  logic                     tr_valid,
  input  logic [PC_W-1:0]          tr_pc,
  input  logic [HIST_LEN*TGT_W-1:0] tr_hist,
  input  logic [TGT_W-1:0]         tr_tgt,
  input  logic                     rs_valid,   // restore history after a squash
  input  logic [HIST_LEN*TGT_W-1:0] rs_hist
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned HW = HIST_LEN * TGT_W;

  logic [TGT_W-1:0] tgt  [ENTRIES];
  logic [1:0]       conf [ENTRIES];
  logic [HW-1:0]    hist_q;

  function automatic logic [IW-1:0] index(logic [PC_W-1:0] pc, logic [HW-1:0] h);
    logic [IW-1:0] x;
    x = pc[IW+1:2];
    x = x ^ IW'(h);
    return x;
  endfunction

  logic [IW-1:0] p_idx, t_idx;
  assign p_idx   = index(pr_pc, hist_q);
  assign t_idx   = index(tr_pc, tr_hist);
  assign pr_tgt  = tgt[p_idx];
  assign pr_hist = hist_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        tgt[e]  <= '0;
        conf[e] <= '0;
      end
    end else begin
      if (rs_valid)      hist_q <= rs_hist;
      else if (pr_valid) hist_q <= HW'({hist_q, pr_tgt});
      if (tr_valid) begin
        if (tgt[t_idx] == tr_tgt) begin
          if (conf[t_idx] != 2'd3) conf[t_idx] <= conf[t_idx] + 2'd1;
        end else if (conf[t_idx] == 2'd0) begin
          tgt[t_idx] <= tr_tgt;
        end else begin
          conf[t_idx] <= conf[t_idx] - 2'd1;
        end
      end
    end
  end

endmodule
