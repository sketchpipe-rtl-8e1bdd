// sp_compound_pipe: one compound pipeline of a multi-pipeline switch.
//
// Ingress: each clock offers one packet slot. The slots cycle through
// N_PORTS normal-port slots and one slot for the internal recirculation
// port, so state packets use only recirculation bandwidth and the normal
// ports always keep N_PORTS of every N_PORTS+1 slots (rx_ready shows the
// normal slots). The recirculation slot alternates between the eviction
// queue (one-shot state packets carrying keys the cache evicted, EQ_DEPTH
// deep; an evicted key that finds it full is lost and counted) and the
// other sources, of which the state packet generator, while injecting, goes
// before the recirculation queue (a generator that yielded to recirculating
// packets would never finish when the loop is shorter than one slot period
// per packet). A source with nothing to send leaves its turn to the other.
// The packet then passes, one register stage each, the sketch arrays that
// the placement puts in this ingress (in array order), then the key cache
// (sp_cache) and the state router (sp_state_router), and is handed to the
// traffic manager: a normal packet towards the egress chosen by routing
// (rx_dst), a state packet towards the pipeline of its next array or, when
// drained or when its cache entry was empty, back to its home pipeline.
//
// Egress: normal slots pop the traffic manager's normal queue, the
// recirculation slot pops its state queue (only when the recirculation
// queue has room). The packet passes the arrays placed in this egress; a
// normal packet then leaves on tx_*, a state packet enters the
// recirculation queue and comes back into this ingress.
//
// Latency through the ingress: 2 + (arrays in this ingress) cycles from the
// rx handshake to tm_valid; through the egress: 1 + (arrays in this egress)
// cycles from the pop to tx_valid.
// Splitless placement: an array is instantiated only in the one pipeline
// named by ARRAY_PIPE/ARRAY_EG. The query port returns, for every array
// hosted here, the counter the key hashes to (q_mask marks them).
//
// End of an epoch: keys still on their way are handled in one of the two
// ways the design offers. By default they simply keep going and update the
// arrays after epoch_clear, i.e. they are measured in the next epoch. While
// flush is high, every state packet that reaches the state router still
// carrying a key (bitmap not empty) is instead reported to the monitoring
// software on rep_valid/rep_pkt (key, count and the arrays that did not see
// it) in the same cycle as tm_valid, and is sent home with an empty bitmap;
// entries polled during flush are reported at once. This keeps the current
// epoch exact at the cost of report bandwidth. At most one report per cycle.
module sp_compound_pipe
  import sp_pkg::*;
#(
  parameter int unsigned PIPE_ID     = 0,
  parameter int unsigned N_ARRAYS    = 4,
  parameter place_pipe_t ARRAY_PIPE  = default_place_pipe(),
  parameter place_eg_t   ARRAY_EG    = default_place_eg(),
  parameter pred_t       PRED        = '0,
  parameter int unsigned CACHE_DEPTH = 65536,
  parameter int unsigned N_COUNTERS  = 65536,
  parameter int unsigned N_PORTS     = 8,
  parameter int unsigned RQ_DEPTH    = 4,
  parameter int unsigned EQ_DEPTH    = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  epoch_clear,
  input  logic  gen_start,
  input  logic [15:0] gen_gap,
  output logic  gen_busy,
  input  logic  flush,
  // normal traffic in (aggregate of the normal ports) and out
  input  logic  rx_valid,
  output logic  rx_ready,
  input  key_t  rx_key,
  input  pipe_t rx_dst,
  input  logic [SEQ_W-1:0] rx_seq,
  output logic  tx_valid,
  output pkt_t  tx_pkt,
  // towards the traffic manager
  output logic  tm_valid,
  output pkt_t  tm_pkt,
  // keys reported instead of measured while flush is high
  output logic  rep_valid,
  output pkt_t  rep_pkt,
  // from the traffic manager
  input  pkt_t  n_head,
  input  logic  n_ne,
  output logic  n_pop,
  input  pkt_t  s_head,
  input  logic  s_ne,
  output logic  s_pop,
  // control-plane query
  input  key_t  q_key,
  output cnt_t  q_count [MAX_ARRAYS],
  output bitmap_t q_mask,
  output logic [IDX_W:0] cache_occupancy,
  output pipe_stats_t stats
);
  localparam int unsigned SW = $clog2(N_PORTS + 1);
  localparam logic [SW-1:0] RSLOT = SW'(N_PORTS);
  localparam bitmap_t ING_MASK = arrays_at(ARRAY_PIPE, ARRAY_EG, N_ARRAYS, pipe_t'(PIPE_ID), 1'b0);
  localparam bitmap_t EG_MASK  = arrays_at(ARRAY_PIPE, ARRAY_EG, N_ARRAYS, pipe_t'(PIPE_ID), 1'b1);

  logic [SW-1:0] slot;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             slot <= '0;
    else if (slot == RSLOT) slot <= '0;
    else                    slot <= slot + 1'b1;

  // ---------------- recirculation queue and generator ----------------
  pkt_t rq_head;
  logic rq_ne, rq_pop, rq_push;
  logic [$clog2(RQ_DEPTH+1)-1:0] rq_count;
  pkt_t rq_din [1];
  logic gen_valid, gen_ready;
  pkt_t gen_pkt;
  pkt_t eq_head;
  logic eq_ne, eq_pop, eq_turn, evo_valid, eq_drop;
  pkt_t evo_pkt;
  pkt_t eq_din [1];

  sp_pktgen #(.PIPE_ID(PIPE_ID), .CACHE_DEPTH(CACHE_DEPTH)) u_gen (
    .clk, .rst_n, .start(gen_start), .gap(gen_gap), .busy(gen_busy),
    .out_valid(gen_valid), .out_ready(gen_ready), .out_pkt(gen_pkt), .generated());

  // ---------------- ingress ----------------
  logic ing_v [N_ARRAYS+1];
  pkt_t ing_p [N_ARRAYS+1];
  logic s0_v;
  pkt_t s0_p, s0_n;

  always_comb begin
    rx_ready  = slot != RSLOT;
    eq_pop    = slot == RSLOT && eq_ne && (eq_turn || (!gen_valid && !rq_ne));
    gen_ready = slot == RSLOT && !eq_pop;
    rq_pop    = slot == RSLOT && rq_ne && !gen_valid && !eq_pop;
    eq_din[0] = evo_pkt;
    s0_n        = '0;
    s0_n.home   = pipe_t'(PIPE_ID);
    s0_n.dst    = rx_dst;
    s0_n.key    = rx_key;
    s0_n.cnt    = cnt_t'(1);
    s0_n.seq    = rx_seq;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s0_v <= 1'b0;
      s0_p <= '0;
    end else begin
      s0_v <= (rx_ready && rx_valid) || rq_pop || eq_pop || (gen_ready && gen_valid);
      s0_p <= (gen_ready && gen_valid) ? gen_pkt : (eq_pop ? eq_head : (rq_pop ? rq_head : s0_n));
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              eq_turn <= 1'b0;
    else if (slot == RSLOT)  eq_turn <= !eq_pop;

  sp_fifo #(.N_IN(1), .DEPTH(EQ_DEPTH)) u_eq (
    .clk, .rst_n, .push(evo_valid), .din(eq_din), .drop(eq_drop),
    .pop(eq_pop), .head(eq_head), .not_empty(eq_ne), .count());

  assign ing_v[0] = s0_v;
  assign ing_p[0] = s0_p;

  logic [MAX_ARRAYS-1:0] upd;
  logic eg_v [N_ARRAYS+1];
  pkt_t eg_p [N_ARRAYS+1];

  for (genvar j = 0; j < N_ARRAYS; j++) begin : g_arr
    if (ING_MASK[j]) begin : g_ing
      sp_sketch_array #(.ARRAY_ID(j), .N_COUNTERS(N_COUNTERS), .PRED(PRED[j])) u_arr (
        .clk, .rst_n, .epoch_clear,
        .in_valid(ing_v[j]), .in_pkt(ing_p[j]),
        .out_valid(ing_v[j+1]), .out_pkt(ing_p[j+1]),
        .upd_state(upd[j]), .q_key, .q_count(q_count[j]));
      assign eg_v[j+1] = eg_v[j];
      assign eg_p[j+1] = eg_p[j];
    end else if (EG_MASK[j]) begin : g_eg
      sp_sketch_array #(.ARRAY_ID(j), .N_COUNTERS(N_COUNTERS), .PRED(PRED[j])) u_arr (
        .clk, .rst_n, .epoch_clear,
        .in_valid(eg_v[j]), .in_pkt(eg_p[j]),
        .out_valid(eg_v[j+1]), .out_pkt(eg_p[j+1]),
        .upd_state(upd[j]), .q_key, .q_count(q_count[j]));
      assign ing_v[j+1] = ing_v[j];
      assign ing_p[j+1] = ing_p[j];
    end else begin : g_none
      assign ing_v[j+1] = ing_v[j];
      assign ing_p[j+1] = ing_p[j];
      assign eg_v[j+1]  = eg_v[j];
      assign eg_p[j+1]  = eg_p[j];
      assign upd[j]     = 1'b0;
      assign q_count[j] = '0;
    end
  end
  for (genvar j = N_ARRAYS; j < MAX_ARRAYS; j++) begin : g_unused
    assign upd[j]     = 1'b0;
    assign q_count[j] = '0;
  end
  assign q_mask = ING_MASK | EG_MASK;

  // cache at the end of ingress
  logic c_v;
  pkt_t c_p;
  logic ev_hit, ev_insert, ev_evict, ev_skip, ev_load, ev_empty;

  sp_cache #(.PIPE_ID(PIPE_ID), .CACHE_DEPTH(CACHE_DEPTH), .N_ARRAYS(N_ARRAYS),
             .ARRAY_PIPE(ARRAY_PIPE), .ARRAY_EG(ARRAY_EG)) u_cache (
    .clk, .rst_n, .epoch_clear,
    .in_valid(ing_v[N_ARRAYS]), .in_pkt(ing_p[N_ARRAYS]),
    .out_valid(c_v), .out_pkt(c_p),
    .ev_hit, .ev_insert, .ev_evict, .ev_skip, .ev_load, .ev_empty, .evo_valid, .evo_pkt,
    .occupancy(cache_occupancy));

  // state router
  logic  r_sel;
  pipe_t r_dest;
  sp_state_router #(.N_ARRAYS(N_ARRAYS), .ARRAY_PIPE(ARRAY_PIPE), .PRED(PRED)) u_router (
    .bitmap(c_p.bitmap), .home(c_p.home), .sel_valid(r_sel), .sel_array(), .dest(r_dest));

  always_comb begin
    // a one-shot packet whose key is fully measured (or reported) is discarded
    tm_valid  = c_v && !(c_p.is_state && c_p.oneshot && (!r_sel || flush));
    tm_pkt    = c_p;
    rep_valid = c_v && c_p.is_state && r_sel && flush;
    rep_pkt   = c_p;
    if (c_p.is_state) tm_pkt.dst = r_dest;
    if (rep_valid) begin
      tm_pkt.bitmap = '0;
      tm_pkt.dst    = c_p.home;
    end
  end

  // ---------------- egress ----------------
  logic [2:0] eg_inflight;   // state packets between s_pop and the recirculation queue
  logic       eg_done;
  logic e0_v;
  pkt_t e0_p;

  always_comb begin
    s_pop = slot == RSLOT && s_ne &&
            (int'(rq_count) + int'(eg_inflight) < RQ_DEPTH);
    n_pop = slot != RSLOT && n_ne;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      e0_v <= 1'b0;
      e0_p <= '0;
    end else begin
      e0_v <= s_pop || n_pop;
      e0_p <= s_pop ? s_head : n_head;
    end

  assign eg_v[0] = e0_v;
  assign eg_p[0] = e0_p;

  always_comb begin
    tx_valid  = eg_v[N_ARRAYS] && !eg_p[N_ARRAYS].is_state;
    tx_pkt    = eg_p[N_ARRAYS];
    eg_done   = eg_v[N_ARRAYS] &&  eg_p[N_ARRAYS].is_state;
    // a drained one-shot packet ends here instead of recirculating
    rq_push   = eg_done && !(eg_p[N_ARRAYS].oneshot && eg_p[N_ARRAYS].bitmap == '0);
    rq_din[0] = eg_p[N_ARRAYS];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) eg_inflight <= '0;
    else        eg_inflight <= eg_inflight + 3'(s_pop) - 3'(eg_done);

  sp_fifo #(.N_IN(1), .DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n, .push(rq_push), .din(rq_din), .drop(),
    .pop(rq_pop), .head(rq_head), .not_empty(rq_ne), .count(rq_count));

  // ---------------- statistics ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) stats <= '0;
    else begin
      if (rx_ready && rx_valid) stats.normal_in     <= stats.normal_in + 1;
      if (tx_valid)             stats.normal_out    <= stats.normal_out + 1;
      if (ev_hit)               stats.cache_hits    <= stats.cache_hits + 1;
      if (ev_insert)            stats.cache_inserts <= stats.cache_inserts + 1;
      if (ev_evict)             stats.cache_evicts  <= stats.cache_evicts + 1;
      if (ev_skip)              stats.cache_skips   <= stats.cache_skips + 1;
      if (ev_load)              stats.state_loads   <= stats.state_loads + 1;
      if (ev_empty)             stats.state_empty   <= stats.state_empty + 1;
      stats.state_updates <= stats.state_updates + 32'($countones(upd));
      if (c_v && c_p.is_state && r_sel && !flush && r_dest != pipe_t'(PIPE_ID))
        stats.state_remote <= stats.state_remote + 1;
      if (c_v && c_p.is_state && !c_p.oneshot && (!r_sel || flush) && c_p.home != pipe_t'(PIPE_ID))
        stats.state_home <= stats.state_home + 1;
      if (rep_valid)            stats.state_reports <= stats.state_reports + 1;
      if (evo_valid && !eq_drop) stats.evict_fwd   <= stats.evict_fwd + 1;
      if (eq_drop)              stats.evict_lost    <= stats.evict_lost + 1;
      if (rq_push)              stats.recirculated  <= stats.recirculated + 1;
    end
endmodule
