// tb_imt_desc_cache: self-checking test of the thread descriptor cache.
// Checks the 2-cycle hit latency, miss/fill, 2-way associativity with LRU
// replacement (three PCs mapping to one set), and random traffic against a
// reference model of 256 sets x 2 ways.
module tb_imt_desc_cache;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lk_valid, rsp_valid, rsp_hit, fill_valid;
  logic [PC_W-1:0] lk_pc, rsp_pc, fill_pc;
  thread_desc_t rsp_desc, fill_desc;
  int checks = 0, failures = 0;

  imt_desc_cache dut (.*);

  // reference
  logic [31:0] m_pc [256][2];
  logic        m_v  [256][2];
  int          m_lru[256];

  function automatic thread_desc_t mk(logic [31:0] pc);
    thread_desc_t d;
    d.use_mask = pc ^ 32'hA5A5_0000;
    d.create_mask = ~pc;
    for (int t = 0; t < 4; t++) d.targets[t] = pc + 32'(t * 64);
    return d;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // lookup; returns hit after checking the 2-cycle latency
  task automatic look(input logic [31:0] pc, output logic hit);
    int s; logic e_hit; int w;
    s = int'(pc[9:2]);
    e_hit = 0; w = 0;
    for (int k = 0; k < 2; k++) if (m_v[s][k] && m_pc[s][k] == pc) begin e_hit = 1; w = k; end
    @(negedge clk); lk_valid = 1; lk_pc = pc;
    @(negedge clk); lk_valid = 0;
    chk(!rsp_valid, "no response after one cycle");
    @(negedge clk);
    chk(rsp_valid && rsp_pc == pc && rsp_hit == e_hit, $sformatf("response for %h", pc));
    if (e_hit) begin
      chk(rsp_desc == mk(pc), "hit data");
      m_lru[s] = 1 - w;
    end
    hit = rsp_hit;
  endtask

  task automatic fill(input logic [31:0] pc);
    int s;
    s = int'(pc[9:2]);
    @(negedge clk); fill_valid = 1; fill_pc = pc; fill_desc = mk(pc);
    @(negedge clk); fill_valid = 0;
    m_pc[s][m_lru[s]] = pc; m_v[s][m_lru[s]] = 1; m_lru[s] = 1 - m_lru[s];
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h;
    for (int s = 0; s < 256; s++) begin m_v[s][0] = 0; m_v[s][1] = 0; m_lru[s] = 0; end
    lk_valid = 0; lk_pc = 0; fill_valid = 0; fill_pc = 0; fill_desc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(32'h0001_0040, h); chk(!h, "cold miss");
    fill(32'h0001_0040);
    look(32'h0001_0040, h); chk(h, "hit after fill");
    // same set, other tags
    fill(32'h0002_0040); look(32'h0002_0040, h); chk(h, "second way");
    look(32'h0001_0040, h); chk(h, "first way kept");
    fill(32'h0003_0040);          // evicts LRU = 0x20040
    look(32'h0002_0040, h); chk(!h, "LRU way evicted");
    look(32'h0001_0040, h); chk(h, "MRU way kept");
    look(32'h0003_0040, h); chk(h, "new line");
    // random traffic over a few sets
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] pc;
      pc = {14'h0, 8'($urandom_range(0, 3)), 2'b00, 6'($urandom_range(0, 3)), 2'b00};
      look(pc, h);
      if (!h && $urandom_range(0, 1)) fill(pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
