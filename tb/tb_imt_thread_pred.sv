// tb_imt_thread_pred: self-checking test of the next-thread predictor.
// A reference model (target table with 2-bit hysteresis, indexed by start
// PC XOR target history) follows random predictions, trainings and history
// restores. A directed part checks that a thread which always leaves by the
// same target is learned after one training.
module tb_imt_thread_pred;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pr_valid, tr_valid, rs_valid;
  logic [PC_W-1:0] pr_pc, tr_pc;
  logic [TGT_W-1:0] pr_tgt, tr_tgt;
  logic [9:0] pr_hist, tr_hist, rs_hist;
  int checks = 0, failures = 0;

  imt_thread_pred dut (.*);

  logic [1:0] m_tgt [1024];
  logic [1:0] m_conf [1024];
  logic [9:0] m_hist;

  function automatic int idx(logic [31:0] pc, logic [9:0] h);
    return int'(pc[11:2] ^ h);
  endfunction

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
    for (int e = 0; e < 1024; e++) begin m_tgt[e] = 0; m_conf[e] = 0; end
    m_hist = 0;
    pr_valid = 0; tr_valid = 0; rs_valid = 0; pr_pc = 0; tr_pc = 0; tr_tgt = 0; tr_hist = 0; rs_hist = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: PC 0x2000 with history 0 always leaves by target 3
    @(negedge clk); pr_pc = 32'h2000; #1; chk(pr_tgt == 0, "untrained predicts 0");
    tr_valid = 1; tr_pc = 32'h2000; tr_hist = 0; tr_tgt = 3;
    m_tgt[idx(32'h2000, 0)] = 3;
    @(negedge clk); tr_valid = 0; #1;
    chk(pr_tgt == 3, "learned after one training");
    // random
    for (int n = 0; n < 4000; n++) begin
      int op;
      logic [1:0] shift_in;
      @(negedge clk);
      pr_valid = 0; tr_valid = 0; rs_valid = 0;
      pr_pc = {20'h0, 10'($urandom_range(0, 63)), 2'b00};
      #1;
      chk(pr_tgt == m_tgt[idx(pr_pc, m_hist)] && pr_hist == m_hist, $sformatf("prediction %0d/%0d hist %h/%h", pr_tgt, m_tgt[idx(pr_pc, m_hist)], pr_hist, m_hist));
      op = $urandom_range(0, 3);
      if (op == 0) pr_valid = 1;
      if (op != 3) begin
        tr_valid = 1; tr_pc = {20'h0, 10'($urandom_range(0, 63)), 2'b00};
        tr_hist = 10'($urandom_range(0, 3)); tr_tgt = 2'($urandom_range(0, 3));
      end
      if (op == 3) begin rs_valid = 1; rs_hist = 10'($urandom); end
      // model update at the edge (history uses the table before training)
      shift_in = m_tgt[idx(pr_pc, m_hist)];
      if (tr_valid) begin
        int e;
        e = idx(tr_pc, tr_hist);
        if (m_tgt[e] == tr_tgt) begin if (m_conf[e] != 3) m_conf[e]++; end
        else if (m_conf[e] == 0) m_tgt[e] = tr_tgt;
        else m_conf[e]--;
      end
      if (rs_valid) m_hist = rs_hist;
      else if (pr_valid) m_hist = {m_hist[7:0], shift_in};
    end
    @(negedge clk); pr_valid = 0; tr_valid = 0; rs_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
