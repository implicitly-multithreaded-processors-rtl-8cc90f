// tb_imt_itdh: self-checking test of the inter-thread dependence heuristic.
// Presents windows of thread start PCs (head first) and checks, one cycle
// later, that the independent mode is reported exactly when the next two
// threads start at the head thread's PC and all three are valid.
module tb_imt_itdh;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ITDH_PCS-1:0][PC_W-1:0] win_pc;
  logic [ITDH_PCS-1:0]           win_valid;
  logic                          indep_mode;
  int checks = 0, failures = 0;

  imt_itdh dut (.*);

  function automatic logic expect_mode(logic [ITDH_PCS-1:0][PC_W-1:0] p, logic [ITDH_PCS-1:0] v);
    return v[0] && v[1] && v[2] && p[1] == p[0] && p[2] == p[0];
  endfunction

  task automatic apply(input logic [ITDH_PCS-1:0][PC_W-1:0] p, input logic [ITDH_PCS-1:0] v,
                       input string what);
    logic e;
    @(negedge clk);
    win_pc = p; win_valid = v;
    e = expect_mode(p, v);
    @(negedge clk);
    checks++;
    if (indep_mode !== e) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, indep_mode, e);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win_pc = '0; win_valid = '0;
    repeat (2) @(negedge clk);
    checks++; if (indep_mode !== 1'b0) failures++;
    rst_n = 1;
    // loop: head and next two at the same PC
    apply({32'h900, 32'h100, 32'h100, 32'h100}, 4'b1111, "loop");
    // fourth thread differs: still a loop by the two-thread rule
    apply({32'h100, 32'h100, 32'h100, 32'h100}, 4'b0111, "three valid");
    // next thread differs
    apply({32'h100, 32'h100, 32'h200, 32'h100}, 4'b1111, "non-loop 1");
    apply({32'h100, 32'h200, 32'h100, 32'h100}, 4'b1111, "non-loop 2");
    // too few threads
    apply({32'h100, 32'h100, 32'h100, 32'h100}, 4'b0011, "two threads");
    for (int n = 0; n < 400; n++) begin
      logic [ITDH_PCS-1:0][PC_W-1:0] p;
      for (int i = 0; i < ITDH_PCS; i++) p[i] = 32'h1000 + 32'($urandom_range(0, 1)) * 4;
      apply(p, 4'($urandom_range(0, 15)) | 4'($urandom_range(0, 1) ? 4'b0111 : 4'b0000), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
