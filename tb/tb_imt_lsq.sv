// tb_imt_lsq: self-checking test of the multi-context load/store queue.
// Replays the printed four-thread example (one thread per context): a
// premature load in thread 2 caught by thread 0's store, a load of thread 1
// served by thread 0's store through the cross-context search, the head
// thread's loads staying inside the head context, priority of less
// speculative contexts for the two search ports, a same-cycle store/load
// pair, the speculative-release squash when a consumed store is rolled back,
// freeing by thread, and a context ring that wraps around.
module tb_imt_lsq;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] head_ctx;
  logic [3:0] al_valid, al_store;
  logic [3:0][2:0] al_ctx;
  logic [3:0][4:0] al_idx;
  logic [3:0][TID_W-1:0] al_tid;
  logic [7:0] rq_valid, rq_grant;
  logic [7:0][4:0] rq_idx;
  logic [7:0][31:0] rq_addr, rq_data;
  logic [1:0] rsp_valid, rsp_store, rsp_hit, rsp_xctx;
  logic [1:0][2:0] rsp_ctx;
  logic [1:0][4:0] rsp_idx;
  logic [1:0][31:0] rsp_data;
  logic viol_valid, rb_valid, spec_squash;
  logic [TID_W-1:0] viol_tid;
  logic [2:0] rb_ctx;
  logic [4:0] rb_idx;
  logic [THREAD_SLOTS-1:0] clr_mask;
  int checks = 0, failures = 0;

  imt_lsq dut (.*);

  localparam logic [31:0] A0 = 32'hF0, A1 = 32'h100, A2 = 32'h104, B1 = 32'h200, B2 = 32'h204,
                          C1 = 32'h300, C2 = 32'h304, Z = 32'h500;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic alloc(input int c, input int i, input logic st, input int tid);
    @(negedge clk);
    al_valid = '0; al_valid[0] = 1; al_ctx[0] = 3'(c); al_idx[0] = 5'(i); al_store[0] = st;
    al_tid[0] = TID_W'(tid);
    @(negedge clk);
    al_valid = '0;
  endtask

  // one access; result sampled after the edge
  task automatic acc(input int c, input int i, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    rq_valid = '0; rq_valid[c] = 1; rq_idx[c] = 5'(i); rq_addr[c] = a; rq_data[c] = d;
    @(negedge clk);
    rq_valid = '0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_ctx = 0; al_valid = '0; al_store = '0; al_ctx = '0; al_idx = '0; al_tid = '0;
    rq_valid = '0; rq_idx = '0; rq_addr = '0; rq_data = '0; rb_valid = 0; rb_ctx = '0; rb_idx = '0;
    clr_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // thread k in context k, entries as printed
    alloc(0, 0, 1, 0); alloc(0, 1, 1, 0); alloc(0, 2, 0, 0); alloc(0, 3, 0, 0);   // st A1, st B2, ld B1, ld A2
    alloc(1, 0, 1, 1); alloc(1, 1, 0, 1); alloc(1, 2, 0, 1);                      // st A0, ld C1, ld A1
    alloc(2, 0, 0, 2); alloc(2, 1, 1, 2); alloc(2, 2, 0, 2);                      // ld B2, st C2, ld B1
    alloc(3, 0, 0, 3); alloc(3, 1, 0, 3);                                         // ld A1, ld Z

    // thread 2's load B2 runs early: no store yet, goes to the cache
    acc(2, 0, B2, 0);
    chk(rsp_valid[0] && !rsp_hit[0] && rsp_xctx[0] && !rsp_store[0], "premature load misses");
    // thread 0 stores A1
    acc(0, 0, A1, 32'd111);
    chk(rsp_valid[0] && rsp_store[0] && !viol_valid, "store A1 no violation");
    // thread 1's load A1: own context has only store A0, thread 0 supplies A1
    acc(1, 2, A1, 0);
    chk(rsp_hit[0] && rsp_data[0] == 32'd111 && rsp_xctx[0], "load A1 forwarded across contexts");
    // thread 0's store B2 finds thread 2's premature load B2
    acc(0, 1, B2, 32'd222);
    chk(viol_valid && viol_tid == 2, "store B2 catches premature load in thread 2");
    // thread 3's load A1 also gets thread 0's value (thread 1 wrote A0 only)
    acc(1, 0, A0, 32'd333);
    chk(!viol_valid, "store A0 no violation");
    acc(3, 0, A1, 0);
    chk(rsp_hit[0] && rsp_data[0] == 32'd111, "load A1 in thread 3");
    // head thread's load stays in the head context
    acc(0, 3, A2, 0);
    chk(!rsp_hit[0] && !rsp_xctx[0], "head load does not search other contexts");
    acc(0, 2, B1, 0);
    chk(!rsp_hit[0] && !rsp_xctx[0], "head load B1 misses");
    // store C2 in thread 2 does not reach back to the older load C1 in thread 1
    acc(1, 1, C1, 0);
    acc(2, 1, C2, 32'd444);
    chk(!viol_valid, "no violation for older load");
    // port priority: contexts 3, 1 and 2 request together; 1 and 2 win
    @(negedge clk);
    rq_valid = 8'b0000_1110;
    rq_idx[1] = 5'd2; rq_addr[1] = A1; rq_idx[2] = 5'd2; rq_addr[2] = B1; rq_idx[3] = 5'd1; rq_addr[3] = Z;
    #1;
    chk(rq_grant == 8'b0000_0110, "two least speculative contexts granted");
    @(negedge clk);
    rq_valid = '0;
    chk(rsp_valid == 2'b11 && rsp_ctx[0] == 1 && rsp_ctx[1] == 2, "responses in priority order");
    chk(rsp_hit[0] && rsp_data[0] == 32'd111, "port 0 load");
    chk(!rsp_hit[1], "port 1 load B1 misses");
    // same-cycle store (thread 0) and younger load (thread 3) to Z
    alloc(0, 4, 1, 0);
    @(negedge clk);
    rq_valid = 8'b0000_1001;
    rq_idx[0] = 5'd4; rq_addr[0] = Z; rq_data[0] = 32'd555; rq_idx[3] = 5'd1; rq_addr[3] = Z;
    @(negedge clk);
    rq_valid = '0;
    chk(viol_valid && viol_tid == 3, "same-cycle store finds younger load");
    // rolling back thread 0's store A1, consumed by threads 1 and 3, squashes
    @(negedge clk); rb_valid = 1; rb_ctx = 0; rb_idx = 0; #1;
    chk(spec_squash, "consumed store rollback");
    @(negedge clk); rb_valid = 1; rb_ctx = 2; rb_idx = 1; #1;
    chk(!spec_squash, "unconsumed store rollback");
    @(negedge clk); rb_valid = 0;
    // free thread 0: thread 1's load A1 now misses
    @(negedge clk); clr_mask = 16'h0001; @(negedge clk); clr_mask = '0;
    acc(1, 2, A1, 0);
    chk(!rsp_hit[0], "freed entries no longer forward");
    // ring wrap: head context 7, thread in context 7 older than thread in context 0
    head_ctx = 3'd7;
    alloc(7, 0, 1, 5); alloc(0, 0, 0, 6);
    acc(7, 0, C1, 32'd777);
    acc(0, 0, C1, 0);
    chk(rsp_hit[0] && rsp_data[0] == 32'd777, "wrapped ring forward");
    acc(7, 0, C1, 32'd778);
    chk(viol_valid && viol_tid == 6, "wrapped ring violation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
