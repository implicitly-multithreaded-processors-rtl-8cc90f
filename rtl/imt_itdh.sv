// imt_itdh: Inter-Thread Dependence Heuristic.
//
// Decides whether the invoked threads following the head (non-speculative)
// thread are likely to be independent loop iterations. It holds the start
// PCs of the oldest ITDH_PCS in-flight threads (head first) and predicts
// "independent" when the start PCs of the next LOOKAHEAD threads (two) all
// equal the head thread's start PC; otherwise the threads are treated as
// dependent. The fetch policy fetches by ICOUNT in the independent mode and
// sequentially from the head in the dependent mode.
//
// Own choices: the window is reloaded every cycle from the thread sequencer's
// oldest slots, so the mode follows the head one cycle later; with fewer than
// LOOKAHEAD+1 threads in flight the mode is "dependent". The fourth held PC
// is used only when LOOKAHEAD is raised to three.
//
// Interface / timing: win_pc/win_valid are sampled at the clock edge;
// indep_mode is a registered output.
module imt_itdh
  import imt_pkg::*;
#(
  parameter int unsigned PCS       = imt_pkg::ITDH_PCS,
  parameter int unsigned LOOKAHEAD = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PCS-1:0][PC_W-1:0] win_pc,     // start PCs, index 0 = head thread
  input  logic [PCS-1:0]           win_valid,
  output logic                     indep_mode
);
  logic [PCS-1:0][PC_W-1:0] pc_q;
  logic [PCS-1:0]           val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      val_q <= '0;
    end else begin
      pc_q  <= win_pc;
      val_q <= win_valid;
    end
  end

  always_comb begin
    indep_mode = val_q[0];
    for (int i = 1; i <= LOOKAHEAD; i++)
      if (!val_q[i] || pc_q[i] != pc_q[0]) indep_mode = 1'b0;
  end

  initial assert (LOOKAHEAD < PCS) else $error("imt_itdh: LOOKAHEAD must be below PCS");

endmodule
