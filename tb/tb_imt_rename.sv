// tb_imt_rename: self-checking test of the IMT rename tables.
// Uses the printed set-up example (use mask R10 R11 R12 R18, create mask R3
// R12 R18) for thread A and a later thread B, and checks: preallocation of the
// create-mask registers, that B's consumer of R3 is linked to A's preassigned
// register and waits for it, that A's own sources are not clobbered by B,
// forward and release destinations, consumed marking and the speculative-
// release squash on rollback, two-phase commit freeing, thread commit freeing,
// thread squash with master-table restore, and the set-up bandwidth left over
// by renaming (8 table updates per cycle).
module tb_imt_rename;
  import imt_pkg::*;
  localparam int RN_W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic setup_start, setup_busy, setup_done;
  logic [TID_W-1:0] setup_slot, setup_done_slot;
  logic [NUM_AREGS-1:0] setup_use, setup_create;
  logic [3:0] setup_ops;
  rn_req_t [RN_W-1:0] rn_req;
  logic [RN_W-1:0] rn_ok;
  rn_rsp_t [RN_W-1:0] rn_rsp;
  logic [7:0] wb_valid;
  logic [7:0][PREG_W-1:0] wb_preg;
  rn_rec_t [7:0] cm_rec;
  rn_rec_t rb_rec;
  logic spec_squash, tc_valid, sq_valid, inst_frees;
  logic [TID_W-1:0] tc_slot, sq_first;
  logic [TID_W:0] sq_count;
  logic [8:0] free_count;
  int checks = 0, failures = 0;

  imt_rename dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] m(input int a, input int b = -1, input int c = -1, input int d = -1);
    logic [31:0] r = '0;
    r[a] = 1'b1;
    if (b >= 0) r[b] = 1'b1;
    if (c >= 0) r[c] = 1'b1;
    if (d >= 0) r[d] = 1'b1;
    return r;
  endfunction

  task automatic do_setup(input int slot, input logic [31:0] u, input logic [31:0] c, output int cycles);
    @(negedge clk);
    setup_start = 1; setup_slot = TID_W'(slot); setup_use = u; setup_create = c;
    @(negedge clk);
    setup_start = 0;
    cycles = 0;
    while (!setup_done) begin @(negedge clk); cycles++; end
    chk(setup_done_slot == TID_W'(slot), "setup slot");
  endtask

  // rename one instruction on port 0 in the current cycle, then advance
  task automatic ren(input int slot, input ins_kind_t k, input int s1, input int s2, input int d,
                     output rn_rsp_t r, output rn_rec_t rec);
    rn_req = '0;
    rn_req[0] = '{valid: 1'b1, slot: TID_W'(slot), kind: k, s1v: s1 >= 0, s1: AREG_W'(s1 < 0 ? 0 : s1),
                  s2v: s2 >= 0, s2: AREG_W'(s2 < 0 ? 0 : s2), dst: AREG_W'(d)};
    #1;
    chk(rn_ok[0], "rename accepted");
    r = rn_rsp[0];
    rec = '{valid: 1'b1, slot: TID_W'(slot), kind: k, dst: AREG_W'(d), pdst: r.pdst, prev: r.prev,
            prev_own: r.prev_own, prev_tag: r.prev_tag};
    @(negedge clk);
    rn_req = '0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rn_rsp_t a1, a2, a3, a4, b1, b2, b3, c1, x;
    rn_rec_t ra1, ra2, ra3, ra4, rb1, rb2, rb3, rc1, rx;
    int cyc, f0;
    setup_start = 0; setup_slot = '0; setup_use = '0; setup_create = '0;
    rn_req = '0; wb_valid = '0; wb_preg = '0; cm_rec = '0; rb_rec = '0;
    tc_valid = 0; tc_slot = '0; sq_valid = 0; sq_first = '0; sq_count = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(free_count == 9'd324, "reset free count");

    // ---- thread A (slot 0): printed example
    do_setup(0, m(10, 11, 12, 18), m(3, 12, 18), cyc);
    chk(cyc == 1, "five updates fit one cycle");
    chk(free_count == 9'd321, "three preallocated");
    // ---- thread B (slot 1): reads R3 and R12, creates R3 and R12
    do_setup(1, m(3, 12), m(3, 12), cyc);
    chk(free_count == 9'd319, "two more preallocated");

    // B is fetched first (out of order): consumer of R3 must wait on A's R3
    ren(1, INS_NORMAL, 3, 12, 7, b1, rb1);
    chk(b1.r1 == 1'b0 && b1.r2 == 1'b0, "B waits on A's preassigned registers");
    chk(b1.p1 >= 9'd32 && b1.p2 >= 9'd32, "B sources are preassigned registers");
    // A: R12 = R12 + R18 reads the initial maps, not B's or its own preassignment
    ren(0, INS_NORMAL, 12, 18, 12, a1, ra1);
    chk(a1.p1 == 9'd12 && a1.p2 == 9'd18 && a1.r1 && a1.r2, "A reads initial maps");
    chk(a1.prev == 9'd12 && !a1.prev_own && a1.prev_tag, "A prev from earlier thread");
    // A: R3 = R12 + 4 as a forward: reads A's new R12, writes the preassigned R3
    ren(0, INS_FORWARD, 12, -1, 3, a2, ra2);
    chk(a2.p1 == a1.pdst, "forward source bypassed through local table");
    chk(a2.pdst == b1.p1, "forward writes the register B waits on");
    // A: R12 = R12 + 1 (normal) then release R12
    ren(0, INS_NORMAL, 12, -1, 12, a3, ra3);
    chk(a3.prev == a1.pdst && a3.prev_own, "prev allocated in thread");
    ren(0, INS_RELEASE, -1, -1, 12, a4, ra4);
    chk(a4.p1 == a3.pdst && a4.pdst == b1.p2, "release copies into B's R12");
    // write back the forward's result: B's next read of R3 is ready
    @(negedge clk); wb_valid[0] = 1; wb_preg[0] = a2.pdst; @(negedge clk); wb_valid = '0;
    ren(1, INS_NORMAL, 3, -1, 8, b2, rb2);
    chk(b2.p1 == a2.pdst && b2.r1, "B's R3 ready after forward");

    // ---- two-phase commit
    f0 = int'(free_count);
    @(negedge clk); cm_rec[0] = ra1; #1; chk(!inst_frees, "no free for earlier-thread prev");
    @(negedge clk); cm_rec[0] = ra3; #1; chk(inst_frees, "free own prev");
    @(negedge clk); cm_rec = '0; #1;
    chk(int'(free_count) == f0 + 1, "instruction commit freed one");

    // ---- speculative release: rolling back A's forward (consumed by B) squashes
    @(negedge clk); rb_rec = ra4; #1; chk(spec_squash, "consumed R12 rollback squashes");
    @(negedge clk); rb_rec = ra3; #1; chk(!spec_squash, "normal rollback no squash");
    @(negedge clk); rb_rec = ra2; #1; chk(spec_squash, "consumed R3 rollback squashes");
    @(negedge clk); rb_rec = '0;
    // re-rename A's forward: the local map is back to A's R12 from ra1
    ren(0, INS_FORWARD, 12, -1, 3, a2, ra2);
    chk(a2.p1 == a1.pdst && a2.pdst == b1.p1, "rollback restored local map");

    // ---- a thread whose preassignment nobody read: rollback does not squash
    do_setup(2, m(5), m(5), cyc);
    ren(2, INS_FORWARD, 5, -1, 5, c1, rc1);
    @(negedge clk); rb_rec = rc1; #1; chk(!spec_squash, "unconsumed rollback no squash");
    @(negedge clk); rb_rec = '0;

    // ---- thread squash of slots 1..2 frees their registers, restores master
    f0 = int'(free_count);
    @(negedge clk); sq_valid = 1; sq_first = 1; sq_count = 2; @(negedge clk); sq_valid = 0;
    // B owned: R3, R12 preassigned, b1, b2 dests; C owned: R5 preassigned
    chk(int'(free_count) == f0 + 5, "squash freed B and C registers");
    do_setup(3, m(3, 12, 5), '0, cyc);
    ren(3, INS_NORMAL, 3, 12, 9, x, rx);
    chk(x.p1 == b1.p1 && x.p2 == b1.p2, "master restored to A's preassignments");
    ren(3, INS_NORMAL, 5, -1, 9, x, rx);
    chk(x.p1 == 9'd5, "R5 restored to initial map");

    // ---- thread commit of A frees the initial maps of R3, R12, R18
    f0 = int'(free_count);
    @(negedge clk); tc_valid = 1; tc_slot = 0; @(negedge clk); tc_valid = 0;
    chk(int'(free_count) == f0 + 3, "thread commit freed prior maps");

    // ---- set-up bandwidth: 20 registers while 8, then 6, then 0 instructions rename
    @(negedge clk);
    setup_start = 1; setup_slot = 4; setup_use = 32'h000F_FFFF; setup_create = 32'h0000_00F0;
    @(negedge clk);
    setup_start = 0;
    for (int i = 0; i < RN_W; i++)
      rn_req[i] = '{valid: 1'b1, slot: 4'd3, kind: INS_NODEST, s1v: 1'b0, s1: '0, s2v: 1'b0, s2: '0, dst: '0};
    #1; chk(setup_ops == 0, "no bandwidth left");
    @(negedge clk);
    rn_req[6].valid = 0; rn_req[7].valid = 0;
    #1; chk(setup_ops == 2, "two updates left");
    @(negedge clk);
    rn_req = '0;
    #1; chk(setup_ops == 8, "full bandwidth");
    // 20 - 0 - 2 - 8 = 10 left: 8 then 2
    @(negedge clk); #1; chk(setup_ops == 8, "full bandwidth again");
    @(negedge clk); #1; chk(setup_ops == 2, "last two");
    @(negedge clk); chk(setup_done, "set-up finished");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
