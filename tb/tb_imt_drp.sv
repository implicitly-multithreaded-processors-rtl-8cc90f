// tb_imt_drp: self-checking test of the dynamic resource predictor.
// Trains entries with sequences of measured usage and checks that the
// prediction is the per-resource maximum of the last four instances, that an
// untrained entry predicts the default, and that training one PC leaves
// others alone. A reference model keeps the last four instances per index.
module tb_imt_drp;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PC_W-1:0] q_pc, upd_pc;
  res_t q_pred, upd_used;
  logic q_known, upd_valid;
  int checks = 0, failures = 0;

  imt_drp dut (.*);

  // reference: last four instances per index, valid flag
  res_t ref_h [64][4];
  int   ref_n [64];

  function automatic res_t ref_pred(int idx);
    res_t m = '0;
    if (ref_n[idx] == 0) return '{regs: 9'd32, lsq: 9'd16, al: 9'd32};
    for (int h = 0; h < 4; h++) m = res_max(m, ref_h[idx][h]);
    return m;
  endfunction

  task automatic train(input logic [PC_W-1:0] pc, input res_t u);
    int idx = int'(pc[7:2]);
    @(negedge clk);
    upd_valid = 1; upd_pc = pc; upd_used = u;
    @(negedge clk);
    upd_valid = 0;
    if (ref_n[idx] == 0) for (int h = 0; h < 4; h++) ref_h[idx][h] = u;
    else begin
      for (int h = 0; h < 3; h++) ref_h[idx][h] = ref_h[idx][h+1];
      ref_h[idx][3] = u;
    end
    ref_n[idx]++;
  endtask

  task automatic check(input logic [PC_W-1:0] pc, input string what);
    res_t e;
    q_pc = pc; #1;
    e = ref_pred(int'(pc[7:2]));
    checks++;
    if (q_pred !== e || q_known !== (ref_n[int'(pc[7:2])] != 0)) begin
      failures++;
      $display("FAIL %s pc=%h got %p exp %p", what, pc, q_pred, e);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) ref_n[i] = 0;
    upd_valid = 0; upd_pc = '0; upd_used = '0; q_pc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(32'h400, "untrained");
    // the active-list column of the printed example: 20 21 20 19 -> 21
    train(32'h400, '{regs: 9'd15, lsq: 9'd4, al: 9'd20}); check(32'h400, "first fill");
    train(32'h400, '{regs: 9'd16, lsq: 9'd3, al: 9'd21});
    train(32'h400, '{regs: 9'd14, lsq: 9'd5, al: 9'd20});
    train(32'h400, '{regs: 9'd15, lsq: 9'd4, al: 9'd19});
    check(32'h400, "four instances");
    checks++; if (q_pred.al != 9'd21) begin failures++; $display("FAIL example max"); end
    // the second example row: 10 9 10 10 -> 10, entry of another PC
    train(32'h404, '{regs: 9'd8, lsq: 9'd2, al: 9'd10});
    train(32'h404, '{regs: 9'd8, lsq: 9'd2, al: 9'd9});
    train(32'h404, '{regs: 9'd8, lsq: 9'd2, al: 9'd10});
    train(32'h404, '{regs: 9'd8, lsq: 9'd2, al: 9'd10});
    check(32'h404, "second row");
    check(32'h400, "first row kept");
    // ageing out: four low instances push the maximum out
    for (int k = 0; k < 4; k++) begin
      train(32'h400, '{regs: 9'd3, lsq: 9'd1, al: 9'd5});
      check(32'h400, "ageing");
    end
    // random training over a few indices
    for (int n = 0; n < 300; n++) begin
      logic [PC_W-1:0] pc;
      pc = {24'h1, 2'($urandom_range(0, 3)), 4'($urandom_range(0, 15)), 2'b00};
      train(pc, '{regs: 9'($urandom_range(0, 300)), lsq: 9'($urandom_range(0, 32)),
                  al: 9'($urandom_range(0, 128))});
      check(pc, "random");
      check({24'h1, 2'($urandom_range(0, 3)), 4'($urandom_range(0, 15)), 2'b00}, "random other");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
