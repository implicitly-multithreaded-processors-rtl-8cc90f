// imt_ctx_map: context multiplexing (placement of threads in hardware contexts).
//
// Several contiguous threads may share one hardware context. Each context's
// active list and load/store queue are filled in program order: an activated
// thread is given a segment of each, sized by its DRP prediction, right after
// the segment of the previous (younger-most) thread. If the predicted segment
// no longer fits in the youngest thread's context, the thread opens the next
// context in ring order, provided that context is empty. Contexts therefore
// stay in global program order around the ring, and entries inside a context
// stay in program order, so the active list needs no search and the LSQ keeps
// its ordered search.
//
// The mapper keeps no state of its own: placement depends only on where the
// youngest placed thread's segments end (tail_*) and on which contexts still
// hold a live thread (ctx_used), both kept by the thread sequencer. After a
// squash the new tail is simply the youngest surviving thread.
//
// Own choices: with no thread placed the ring restarts at context 0; a
// predicted demand larger than a whole context is clipped to the context size.
//
// Timing: purely combinational.
module imt_ctx_map
  import imt_pkg::*;
#(
  parameter int unsigned CTXS   = imt_pkg::NUM_CTX,
  parameter int unsigned AL_N   = imt_pkg::AL_ENTRIES,
  parameter int unsigned LSQ_N  = imt_pkg::LSQ_ENTRIES
) (
  input  logic [CTXS-1:0]              ctx_used,
  input  logic                         tail_valid,
  input  logic [$clog2(CTXS)-1:0]      tail_ctx,
  input  logic [$clog2(AL_N):0]        tail_al_end,   // first free AL entry after tail
  input  logic [$clog2(LSQ_N):0]       tail_lsq_end,
  input  res_t                         pred,          // predicted demand of candidate
  output logic                         ok,
  output logic                         shared,        // placed in the tail's context
  output logic [$clog2(CTXS)-1:0]      place_ctx,
  output logic [$clog2(AL_N):0]        al_base,
  output logic [$clog2(AL_N):0]        al_end,
  output logic [$clog2(LSQ_N):0]       lsq_base,
  output logic [$clog2(LSQ_N):0]       lsq_end
);
  localparam int unsigned CW = $clog2(CTXS);
  localparam int unsigned AW = $clog2(AL_N) + 1;
  localparam int unsigned LW = $clog2(LSQ_N) + 1;

  logic [AW-1:0] al_need;
  logic [LW-1:0] lsq_need;
  logic [CW-1:0] next_ctx;
  logic          fits_tail;

  always_comb begin
    al_need  = (pred.al  > RES_W'(AL_N))  ? AW'(AL_N)  : AW'(pred.al);
    lsq_need = (pred.lsq > RES_W'(LSQ_N)) ? LW'(LSQ_N) : LW'(pred.lsq);
    next_ctx = tail_valid ? ((tail_ctx == CW'(CTXS - 1)) ? '0 : tail_ctx + 1'b1) : '0;
    fits_tail = tail_valid
             && ({1'b0, tail_al_end}  + {1'b0, al_need})  <= (AW+1)'(AL_N)
             && ({1'b0, tail_lsq_end} + {1'b0, lsq_need}) <= (LW+1)'(LSQ_N);

    if (fits_tail) begin
      ok        = 1'b1;
      shared    = 1'b1;
      place_ctx = tail_ctx;
      al_base   = tail_al_end;
      lsq_base  = tail_lsq_end;
    end else begin
      ok        = !ctx_used[next_ctx];
      shared    = 1'b0;
      place_ctx = next_ctx;
      al_base   = '0;
      lsq_base  = '0;
    end
    al_end  = al_base + al_need;
    lsq_end = lsq_base + lsq_need;
  end

endmodule
