// sp_pkg: types and constants shared by the SketchPipe data plane.
//
// A packet travelling through the model is one pkt_t word. Normal packets
// carry a flow key, a count of 1 and the egress pipeline chosen by routing.
// State packets carry the index of the cache entry they drain, the pipeline
// that owns that cache (home), and, once loaded, the key, the aggregated
// packet count and a bitmap of the sketch arrays that still have to see the
// key. Field widths follow the register layout of the reference
// implementation: a 32-bit key and a 32-bit count share one 64-bit cache word
// and the bitmap is a 64-bit word, so up to 64 sketch arrays are supported.
// The pipeline-id, index and sequence widths are this design's choice.
//
// The placement of the sketch arrays (which compound pipeline, ingress or
// egress) is a compile-time decision. It is passed to the modules as packed
// parameter vectors; the defaults reproduce the four-array count-min example
// (arrays #1..#4 = indices 0..3): array 0 in the ingress of pipeline 0,
// array 1 in its egress, array 2 in the ingress of pipeline 1 and array 3 in
// its egress.
package sp_pkg;

  localparam int unsigned KEY_W      = 32;  // cached flow key
  localparam int unsigned CNT_W      = 32;  // cached packet count / counter
  localparam int unsigned MAX_ARRAYS = 64;  // bitmap word width
  localparam int unsigned PIPE_W     = 8;   // compound pipeline id
  localparam int unsigned IDX_W      = 16;  // cache index (up to 2^16 entries)
  localparam int unsigned SEQ_W      = 16;  // tag carried by normal packets

  typedef logic [KEY_W-1:0]      key_t;
  typedef logic [CNT_W-1:0]      cnt_t;
  typedef logic [MAX_ARRAYS-1:0] bitmap_t;
  typedef logic [PIPE_W-1:0]     pipe_t;

  typedef struct packed {
    logic                 is_state;  // 1: synthetic state packet
    logic                 oneshot;   // state: carries an evicted key, discarded when drained
    pipe_t                home;      // state: owner of the drained cache; normal: arrival pipeline
    pipe_t                dst;       // egress pipeline the traffic manager delivers to
    logic [IDX_W-1:0]     idx;       // state: cache entry this packet drains
    logic [SEQ_W-1:0]     seq;       // normal: tag for tracing
    key_t                 key;       // flow key
    cnt_t                 cnt;       // packets represented (1 for normal packets)
    bitmap_t              bitmap;    // state: arrays still to visit
  } pkt_t;

  // Placement vectors: entry j describes array j.
  typedef logic [MAX_ARRAYS-1:0][PIPE_W-1:0]     place_pipe_t;
  typedef logic [MAX_ARRAYS-1:0]                 place_eg_t;
  // pred[j][k] = 1 when array k must be visited before array j (D(k, j) = 1).
  typedef logic [MAX_ARRAYS-1:0][MAX_ARRAYS-1:0] pred_t;

  // Event counters of one compound pipeline.
  typedef struct packed {
    logic [31:0] normal_in;      // normal packets accepted by the ingress
    logic [31:0] normal_out;     // normal packets leaving the egress
    logic [31:0] cache_hits;     // key aggregated into its own entry
    logic [31:0] cache_inserts;  // key written into an empty entry
    logic [31:0] cache_evicts;   // key replaced another key (collision)
    logic [31:0] cache_skips;    // packet saw every array, not cached
    logic [31:0] state_loads;    // state packet took a key from the cache
    logic [31:0] state_empty;    // state packet found its entry empty
    logic [31:0] state_updates;  // array updates made by state packets here
    logic [31:0] state_remote;   // state packets sent to another pipeline
    logic [31:0] state_home;     // drained state packets sent from here to their home
    logic [31:0] recirculated;   // state packets through the recirculation port
    logic [31:0] state_reports;  // keys reported to software during a flush
    logic [31:0] evict_fwd;      // evicted keys sent on in a one-shot state packet
    logic [31:0] evict_lost;     // evicted keys lost because the eviction queue was full
  } pipe_stats_t;

  function automatic place_pipe_t default_place_pipe();
    place_pipe_t r;
    r    = '0;
    r[2] = PIPE_W'(1);
    r[3] = PIPE_W'(1);
    return r;
  endfunction

  function automatic place_eg_t default_place_eg();
    place_eg_t r;
    r    = '0;
    r[1] = 1'b1;
    r[3] = 1'b1;
    return r;
  endfunction

  // Arrays (among the first n) placed in the ingress (eg=0) or egress (eg=1)
  // of pipeline p.
  function automatic bitmap_t arrays_at(place_pipe_t pp, place_eg_t pe,
                                        int unsigned n, pipe_t p, logic eg);
    bitmap_t r;
    r = '0;
    for (int unsigned j = 0; j < MAX_ARRAYS; j++)
      if (j < n && pp[j] == p && pe[j] == eg) r[j] = 1'b1;
    return r;
  endfunction

  function automatic bitmap_t all_arrays(int unsigned n);
    bitmap_t r;
    r = '0;
    for (int unsigned j = 0; j < MAX_ARRAYS; j++)
      if (j < n) r[j] = 1'b1;
    return r;
  endfunction

  function automatic cnt_t sat_add(cnt_t a, cnt_t b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  // Seed of the hash used by sketch array j, and by the cache.
  function automatic logic [31:0] array_seed(int unsigned j);
    return 32'h9e37_79b9 * (j + 1);
  endfunction
  localparam logic [31:0] CACHE_SEED = 32'h5bd1_e995;

endpackage
