// imt_desc_cache: thread descriptor cache.
//
// Caches the compiler's thread descriptors (use mask, create mask and the
// start PCs of the thread's targets), looked up by thread start PC. The
// evaluated size is 16 KB, 2-way set associative, with a 2-cycle hit.
//
// Own choices: one descriptor per 32-byte line (a descriptor is 192 bits),
// giving 256 sets; tags are the PC bits above the set index (PCs are word
// aligned); replacement is LRU (one bit per set). A miss is reported with
// rsp_hit = 0; the requester fetches the descriptor from memory and writes it
// with fill_*, which installs it in the LRU way.
//
// Timing: a lookup presented in cycle t (lk_valid, lk_pc) returns rsp_* in
// cycle t+2: the set is read at the first edge and the tags compared and the
// result registered at the second. One lookup may start every cycle.
module imt_desc_cache
  import imt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lk_valid,
  input  logic [PC_W-1:0] lk_pc,
  output logic            rsp_valid,
  output logic            rsp_hit,
  output logic [PC_W-1:0] rsp_pc,
  output thread_desc_t    rsp_desc,
  input  logic            fill_valid,
  input  logic [PC_W-1:0] fill_pc,
  input  thread_desc_t    fill_desc
);
  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned SW    = $clog2(SETS);
  localparam int unsigned TAG_W = PC_W - SW - 2;
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;

  thread_desc_t       data_q [SETS][WAYS];
  logic [TAG_W-1:0]   tag_q  [SETS][WAYS];
  logic [WAYS-1:0]    val_q  [SETS];
  logic [WW-1:0]      lru_q  [SETS];   // way to replace next

  // stage 1 registers
  logic               s1_valid;
  logic [PC_W-1:0]    s1_pc;
  thread_desc_t       s1_data [WAYS];
  logic [TAG_W-1:0]   s1_tag  [WAYS];
  logic [WAYS-1:0]    s1_val;

  logic [SW-1:0] lk_set, fill_set, s1_set;
  assign lk_set   = lk_pc[SW+1:2];
  assign fill_set = fill_pc[SW+1:2];
  assign s1_set   = s1_pc[SW+1:2];

  always_ff @(posedge clk) begin
    for (int w = 0; w < WAYS; w++) begin
      s1_data[w] <= data_q[lk_set][w];
      s1_tag[w]  <= tag_q[lk_set][w];
    end
    if (fill_valid) begin
      data_q[fill_set][lru_q[fill_set]] <= fill_desc;
      tag_q[fill_set][lru_q[fill_set]]  <= fill_pc[PC_W-1:SW+2];
    end
  end

  logic          hit;
  logic [WW-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (s1_val[w] && s1_tag[w] == s1_pc[PC_W-1:SW+2]) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        val_q[s] <= '0;
        lru_q[s] <= '0;
      end
      s1_valid  <= 1'b0;
      s1_pc     <= '0;
      s1_val    <= '0;
      rsp_valid <= 1'b0;
      rsp_hit   <= 1'b0;
      rsp_pc    <= '0;
      rsp_desc  <= '0;
    end else begin
      s1_valid <= lk_valid;
      s1_pc    <= lk_pc;
      s1_val   <= val_q[lk_set];
      if (fill_valid && fill_set == lk_set) s1_val[lru_q[fill_set]] <= 1'b0;
      rsp_valid <= s1_valid;
      rsp_hit   <= s1_valid && hit;
      rsp_pc    <= s1_pc;
      rsp_desc  <= s1_data[hit_way];
      if (s1_valid && hit) lru_q[s1_set] <= WW'(hit_way + 1'b1);
      if (fill_valid) begin
        val_q[fill_set][lru_q[fill_set]] <= 1'b1;
        lru_q[fill_set] <= WW'(lru_q[fill_set] + 1'b1);
      end
    end
  end

endmodule
