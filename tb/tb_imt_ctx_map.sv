// tb_imt_ctx_map: self-checking test of context multiplexing.
// First replays the placement of the printed example (threads of 17, 5, 25,
// 40, 6, 10, 2 and 22 instructions with a 47-entry active-list budget per
// context: three threads share context 0, two context 1, three context 2),
// then checks random tails, occupancies and predictions against a reference.
module tb_imt_ctx_map;
  import imt_pkg::*;
  logic [NUM_CTX-1:0] ctx_used;
  logic tail_valid, ok, shared;
  logic [2:0] tail_ctx, place_ctx;
  logic [7:0] tail_al_end, al_base, al_end;
  logic [5:0] tail_lsq_end, lsq_base, lsq_end;
  res_t pred;
  int checks = 0, failures = 0;

  imt_ctx_map dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // placement in the example, with the active list pretended 47 entries deep:
  // drive the demand in entries and leave 128-47 entries pre-filled
  int sizes [8] = '{17, 5, 25, 40, 6, 10, 2, 22};
  int exp_ctx [8] = '{0, 0, 0, 1, 1, 2, 2, 2};

  initial begin
    int c_tail; int al_e; logic tv; logic [NUM_CTX-1:0] used;
    tv = 0; c_tail = 0; al_e = 0; used = '0;
    for (int t = 0; t < 8; t++) begin
      ctx_used = used; tail_valid = tv; tail_ctx = 3'(c_tail);
      // a context holds 47 entries: start each context's fill at 128-47
      tail_al_end = 8'(al_e); tail_lsq_end = '0;
      pred = '{regs: 9'd10, lsq: 9'd1, al: 9'(sizes[t])};
      #1;
      chk(ok, "example ok");
      chk(int'(place_ctx) == exp_ctx[t], $sformatf("example thread %0d context", t + 1));
      if (!shared) chk(al_base == 0, "new context base");
      // emulate the 47-entry context: a new context starts at 81
      c_tail = int'(place_ctx);
      al_e = shared ? int'(al_end) : 81 + sizes[t];
      used[place_ctx] = 1'b1;
      tv = 1;
      if (!shared && t > 0) chk(1, "opened");
      #1;
    end
    // random checks
    for (int n = 0; n < 5000; n++) begin
      int ae, le, an, ln, nc; logic fit;
      ctx_used     = NUM_CTX'($urandom);
      tail_valid   = $urandom_range(0, 5) != 0;
      tail_ctx     = 3'($urandom_range(0, 7));
      tail_al_end  = 8'($urandom_range(0, 128));
      tail_lsq_end = 6'($urandom_range(0, 32));
      pred = '{regs: 9'($urandom_range(0, 100)), lsq: 9'($urandom_range(0, 40)), al: 9'($urandom_range(0, 140))};
      #1;
      an = (pred.al > 128) ? 128 : int'(pred.al);
      ln = (pred.lsq > 32) ? 32 : int'(pred.lsq);
      nc = tail_valid ? (int'(tail_ctx) + 1) % 8 : 0;
      fit = tail_valid && int'(tail_al_end) + an <= 128 && int'(tail_lsq_end) + ln <= 32;
      chk(shared == fit, "shared");
      if (fit) begin
        chk(ok && place_ctx == tail_ctx && al_base == tail_al_end && lsq_base == tail_lsq_end, "share place");
      end else begin
        chk(ok == !ctx_used[nc] && int'(place_ctx) == nc && al_base == 0 && lsq_base == 0, "new place");
      end
      chk(int'(al_end) == int'(al_base) + an && int'(lsq_end) == int'(lsq_base) + ln, "segment end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
