// imt_pkg: constants and types shared by the Implicitly-Multithreaded (IMT)
// thread-control blocks.
//
// The sizes are those of the evaluated machine: an 8-wide SMT core with 8
// hardware contexts, a 128-entry active list and a 32-entry, 2-port
// load/store queue per context, 356 integer physical registers, a 64-entry
// dynamic resource predictor that remembers four instances per thread, a
// 4-PC inter-thread dependence heuristic and a 16 KB 2-way thread-descriptor
// cache. Threads have four possible successors. Architectural registers
// (32, as in MIPS), the PC width, the number of in-flight thread slots and
// the data widths are this design's own choices.
package imt_pkg;

  // ---- machine sizes -------------------------------------------------------
  localparam int unsigned NUM_CTX      = 8;    // hardware contexts
  localparam int unsigned AL_ENTRIES   = 128;  // active list entries per context
  localparam int unsigned LSQ_ENTRIES  = 32;   // LSQ entries per context
  localparam int unsigned LSQ_PORTS    = 2;    // LSQ search ports
  localparam int unsigned NUM_PREGS    = 356;  // physical registers (one file)
  localparam int unsigned NUM_AREGS    = 32;   // architectural registers
  localparam int unsigned DRP_ENTRIES  = 64;   // DRP table entries
  localparam int unsigned DRP_HIST     = 4;    // instances remembered per entry
  localparam int unsigned ITDH_PCS     = 4;    // program counters held by ITDH
  localparam int unsigned NUM_TARGETS  = 4;    // successors per thread
  localparam int unsigned RT_BW        = 8;    // rename-table updates per cycle
  localparam int unsigned FETCH_PORTS  = 2;    // i-cache ports
  localparam int unsigned THREAD_SLOTS = 16;   // threads in flight (own choice)
  localparam int unsigned PC_W         = 32;
  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned DATA_W       = 32;

  localparam int unsigned PREG_W = $clog2(NUM_PREGS);
  localparam int unsigned AREG_W = $clog2(NUM_AREGS);
  localparam int unsigned TID_W  = $clog2(THREAD_SLOTS);
  localparam int unsigned CTX_W  = $clog2(NUM_CTX);
  localparam int unsigned TGT_W  = $clog2(NUM_TARGETS);
  localparam int unsigned RES_W  = 9;          // width of one resource count

  // ---- thread descriptor (compiler summary of one thread) ------------------
  typedef struct packed {
    logic [NUM_AREGS-1:0]              use_mask;     // registers live into the thread
    logic [NUM_AREGS-1:0]              create_mask;  // registers written on some path
    logic [NUM_TARGETS-1:0][PC_W-1:0]  targets;      // start PCs of the successors
  } thread_desc_t;

  // ---- per-thread resource demand / usage ---------------------------------
  typedef struct packed {
    logic [RES_W-1:0] regs;   // physical registers
    logic [RES_W-1:0] lsq;    // load/store queue entries
    logic [RES_W-1:0] al;     // active list entries (instructions)
  } res_t;

  // ---- instruction classes seen by the rename tables ----------------------
  typedef enum logic [1:0] {
    INS_NODEST  = 2'd0,   // no register destination
    INS_NORMAL  = 2'd1,   // destination gets a fresh physical register
    INS_FORWARD = 2'd2,   // last write of a create-mask register: uses preassigned reg
    INS_RELEASE = 2'd3    // copies the local map's value into the preassigned reg
  } ins_kind_t;

  // ---- rename interface ---------------------------------------------------
  typedef struct packed {
    logic                valid;
    logic [TID_W-1:0]    slot;    // thread slot of the instruction
    ins_kind_t           kind;
    logic                s1v;     // source 1 present
    logic [AREG_W-1:0]   s1;
    logic                s2v;     // source 2 present
    logic [AREG_W-1:0]   s2;
    logic [AREG_W-1:0]   dst;
  } rn_req_t;

  typedef struct packed {
    logic [PREG_W-1:0]   p1;        // physical source 1 (release: value to copy)
    logic [PREG_W-1:0]   p2;
    logic                r1;        // source ready
    logic                r2;
    logic [PREG_W-1:0]   pdst;      // physical destination
    logic [PREG_W-1:0]   prev;      // previous map of dst in the local table
    logic                prev_own;  // prev was allocated inside this thread
    logic                prev_tag;  // prev came from an earlier thread
  } rn_rsp_t;

  // an instruction's rename record, returned at instruction commit or rollback
  typedef struct packed {
    logic                valid;
    logic [TID_W-1:0]    slot;
    ins_kind_t           kind;
    logic [AREG_W-1:0]   dst;
    logic [PREG_W-1:0]   pdst;
    logic [PREG_W-1:0]   prev;
    logic                prev_own;
    logic                prev_tag;
  } rn_rec_t;

  // ---- thread life cycle ---------------------------------------------------
  typedef enum logic [2:0] {
    TS_FREE    = 3'd0,  // slot empty
    TS_WAITD   = 3'd1,  // invoked, waiting for its descriptor
    TS_SETUP   = 3'd2,  // rename tables being set up
    TS_READY   = 3'd3,  // set up, waiting for DRP activation
    TS_ACTIVE  = 3'd4,  // activated: may fetch
    TS_DONE    = 3'd5   // stop instruction resolved and committed, waiting to commit
  } tstate_t;

  // maximum of two resource vectors, field by field
  function automatic res_t res_max(res_t a, res_t b);
    res_t r;
    r.regs = (a.regs > b.regs) ? a.regs : b.regs;
    r.lsq  = (a.lsq  > b.lsq ) ? a.lsq  : b.lsq;
    r.al   = (a.al   > b.al  ) ? a.al   : b.al;
    return r;
  endfunction

endpackage
