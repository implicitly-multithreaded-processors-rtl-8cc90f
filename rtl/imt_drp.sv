// imt_drp: Dynamic Resource Predictor.
//
// Predicts how many physical registers, load/store queue entries and active
// list entries a thread will need before the thread is allowed to fetch.
// The table is indexed by the thread's start PC. Each entry keeps the usage
// of the thread's last HIST (four) dynamic instances; the prediction is the
// per-resource maximum of those instances, so the predictor learns the worst
// case of recent history. When a thread commits, its measured usage replaces
// the oldest of the four instances of its entry.
//
// Own choices: the table is direct-mapped and untagged, indexed by PC bits
// [IDX_W+1:2] (word-aligned PCs). An entry that has never been written
// predicts DEFAULT_PRED, and its first update fills all four instances with
// the measured usage.
//
// Interface / timing: the lookup (q_pc -> q_pred, q_known) is combinational
// from registered state; an update (upd_valid) is written at the clock edge,
// so a lookup in the same cycle still sees the old contents.
module imt_drp
  import imt_pkg::*;
#(
  parameter int unsigned ENTRIES      = imt_pkg::DRP_ENTRIES,
  parameter int unsigned HIST         = imt_pkg::DRP_HIST,
  parameter res_t        DEFAULT_PRED = '{regs: 9'd32, lsq: 9'd16, al: 9'd32}
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [PC_W-1:0] q_pc,
  output res_t            q_pred,
  output logic            q_known,
  // training at thread commit
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  res_t            upd_used
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned H_W   = (HIST > 1) ? $clog2(HIST) : 1;

  res_t             hist   [ENTRIES][HIST];
  logic [H_W-1:0]   oldest [ENTRIES];
  logic [ENTRIES-1:0] valid;

  logic [IDX_W-1:0] q_idx, u_idx;
  assign q_idx = q_pc[IDX_W+1:2];
  assign u_idx = upd_pc[IDX_W+1:2];

  // prediction: maximum over the remembered instances
  always_comb begin
    res_t m;
    m = '0;
    for (int h = 0; h < HIST; h++) m = res_max(m, hist[q_idx][h]);
    q_known = valid[q_idx];
    q_pred  = valid[q_idx] ? m : DEFAULT_PRED;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (upd_valid) begin
      valid[u_idx] <= 1'b1;
    end
  end

  // table contents need no reset: an entry is read only once it is valid
  always_ff @(posedge clk) begin
    if (upd_valid) begin
      if (!valid[u_idx]) begin
        for (int h = 0; h < HIST; h++) hist[u_idx][h] <= upd_used;
        oldest[u_idx] <= '0;
      end else begin
        hist[u_idx][oldest[u_idx]] <= upd_used;
        oldest[u_idx] <= (oldest[u_idx] == H_W'(HIST - 1)) ? '0 : oldest[u_idx] + 1'b1;
      end
    end
  end

endmodule
