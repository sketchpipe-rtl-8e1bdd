// sp_cache: the per-pipeline flow-key cache at the end of ingress.
//
// Each of CACHE_DEPTH entries holds a flow key, the number of packets of that
// key not yet seen by every array, and a bitmap of the arrays that still have
// to measure them. The stage handles one packet per cycle:
//
// Normal packet (key f, egress pipeline d):
//   M = arrays in this ingress | arrays in the egress of d (visited arrays).
//   i = hash(f). If entry i is empty or already holds f, it becomes
//   {f, cnt+1, ~M}; otherwise the old key is evicted and the entry becomes
//   {f, 1, ~M} (evict-on-collision). The evicted key is not thrown away:
//   the cache emits it, with its count and bitmap, as a one-shot state
//   packet on evo_valid/evo_pkt (home = this pipeline, oneshot = 1), which
//   carries it to the arrays it still owes and is then discarded. A packet
//   whose path already covers
//   every array is not cached (this design's choice: nothing is left to do).
// State packet whose home is this pipeline and whose bitmap is empty:
//   entry i = its index is read. If it holds a key, the key, count and bitmap
//   are copied into the packet and the entry is emptied; if it is empty, the
//   packet leaves unchanged and the router recirculates it.
// Other packets pass unchanged.
//
// Entries are stored as in the reference implementation: key and count in
// one 64-bit word, the bitmap in a second word (MAX_ARRAYS = 64 bits), plus
// a valid flag per entry that reset and epoch_clear clear in one cycle.
// Timing: one register stage. The ev_* outputs pulse with the access and
// feed the statistics; occupancy counts the valid entries.
module sp_cache
  import sp_pkg::*;
#(
  parameter int unsigned PIPE_ID     = 0,
  parameter int unsigned CACHE_DEPTH = 65536,
  parameter int unsigned N_ARRAYS    = 4,
  parameter place_pipe_t ARRAY_PIPE  = default_place_pipe(),
  parameter place_eg_t   ARRAY_EG    = default_place_eg()
) (
  input  logic clk,
  input  logic rst_n,
  input  logic epoch_clear,
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic out_valid,
  output pkt_t out_pkt,
  output logic ev_hit,        // normal packet aggregated into its own entry
  output logic ev_insert,     // normal packet filled an empty entry
  output logic ev_evict,      // normal packet replaced another key
  output logic ev_skip,       // normal packet visited every array, not cached
  output logic ev_load,       // state packet took an entry
  output logic ev_empty,      // state packet found its entry empty
  output logic evo_valid,     // one-shot state packet with the evicted key
  output pkt_t evo_pkt,
  output logic [IDX_W:0] occupancy
);
  localparam int unsigned IW = (CACHE_DEPTH > 1) ? $clog2(CACHE_DEPTH) : 1;
  localparam bitmap_t ING_MASK = arrays_at(ARRAY_PIPE, ARRAY_EG, N_ARRAYS, pipe_t'(PIPE_ID), 1'b0);
  localparam bitmap_t ALL_MASK = all_arrays(N_ARRAYS);

  typedef struct packed {
    key_t key;
    cnt_t cnt;
  } kc_t;

  kc_t                    kc_mem  [CACHE_DEPTH];
  bitmap_t                bmp_mem [CACHE_DEPTH];
  logic [CACHE_DEPTH-1:0] valid;

  logic [IW-1:0] h_idx, idx;
  logic          is_norm, is_poll, match, wr_en;
  bitmap_t       unvisited;
  kc_t           wr_kc;
  pkt_t          nxt_pkt, evo_nxt;

  sp_hash #(.OUT_W(IW)) u_hash (.key(in_pkt.key), .seed(CACHE_SEED), .idx(h_idx));

  always_comb begin
    is_norm   = in_valid && !in_pkt.is_state;
    is_poll   = in_valid && in_pkt.is_state && !in_pkt.oneshot
                && in_pkt.home == pipe_t'(PIPE_ID) && in_pkt.bitmap == '0;
    idx       = is_norm ? h_idx : in_pkt.idx[IW-1:0];
    match     = valid[idx] && kc_mem[idx].key == in_pkt.key;
    unvisited = ALL_MASK & ~(ING_MASK |
                arrays_at(ARRAY_PIPE, ARRAY_EG, N_ARRAYS, in_pkt.dst, 1'b1));

    ev_skip   = is_norm && unvisited == '0;
    wr_en     = is_norm && !ev_skip;
    ev_hit    = wr_en && match;
    ev_insert = wr_en && !valid[idx];
    ev_evict  = wr_en && valid[idx] && !match;
    ev_load   = is_poll && valid[idx];
    ev_empty  = is_poll && !valid[idx];

    wr_kc.key = in_pkt.key;
    wr_kc.cnt = ev_hit ? sat_add(kc_mem[idx].cnt, cnt_t'(1)) : cnt_t'(1);

    evo_nxt          = '0;
    evo_nxt.is_state = 1'b1;
    evo_nxt.oneshot  = 1'b1;
    evo_nxt.home     = pipe_t'(PIPE_ID);
    evo_nxt.dst      = pipe_t'(PIPE_ID);
    evo_nxt.idx      = IDX_W'(idx);
    evo_nxt.key      = kc_mem[idx].key;
    evo_nxt.cnt      = kc_mem[idx].cnt;
    evo_nxt.bitmap   = bmp_mem[idx];

    nxt_pkt = in_pkt;
    if (ev_load) begin
      nxt_pkt.key    = kc_mem[idx].key;
      nxt_pkt.cnt    = kc_mem[idx].cnt;
      nxt_pkt.bitmap = bmp_mem[idx];
    end
  end

  always_ff @(posedge clk)
    if (wr_en) begin
      kc_mem[idx]  <= wr_kc;
      bmp_mem[idx] <= unvisited;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid     <= '0;
      occupancy <= '0;
    end else if (epoch_clear) begin
      valid     <= '0;
      occupancy <= '0;
    end else begin
      if (wr_en)   valid[idx] <= 1'b1;
      if (ev_load) valid[idx] <= 1'b0;
      if (ev_insert)    occupancy <= occupancy + 1'b1;
      else if (ev_load) occupancy <= occupancy - 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
      evo_valid <= 1'b0;
      evo_pkt   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pkt   <= nxt_pkt;
      evo_valid <= ev_evict;
      evo_pkt   <= evo_nxt;
    end
endmodule
