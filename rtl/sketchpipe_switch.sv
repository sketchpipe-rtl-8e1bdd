// sketchpipe_switch: a multi-pipeline switch measuring traffic with sketch
// arrays placed without splitting (SketchPipe).
//
// N_PIPES compound pipelines (sp_compound_pipe) are joined by one traffic
// manager (sp_traffic_manager). Each sketch array exists once, in the
// ingress or egress of the pipeline named by ARRAY_PIPE/ARRAY_EG. A normal
// packet is measured only by the arrays on its own path (arrival ingress,
// destination egress); its key is aggregated in the arrival pipeline's
// cache together with the list of arrays it missed. State packets, created
// once per cache entry by each pipeline's generator (gen_start), circulate
// on recirculation bandwidth only: they take a key from their cache, visit
// the missing arrays in the pipelines that host them, and return home for
// the next key.
//
// gen_gap sets the generators' injection rate (cycles between packets).
// Ports per pipeline p: rx_* normal traffic in (rx_ready is low in the
// recirculation slot), rx_dst[p] the egress pipeline chosen by routing,
// tx_* normal traffic out of egress p. The query port returns for q_key the
// counter of every array (q_counts), the count-min estimate and whether it
// reaches q_threshold. stats, cache_occupancy and the drop counters expose
// what happened inside. flush selects, at the end of an epoch, that keys
// still carried by state packets are reported on rep_valid/rep_pkt instead
// of measured in the next epoch (see sp_compound_pipe).
// Defaults: four compound pipelines, eight normal ports each plus one
// internal port, 2^16 cache entries per pipeline, 2^16 counters per array,
// four count-min arrays placed two per pipeline on pipelines 0 and 1.
// The state packet buffer: every pipeline owns one state packet per cache
// entry, so the switch holds N_PIPES * CACHE_DEPTH of them, and in a closed
// loop they can all pile up in front of one egress (the pipelines that host
// arrays receive more state traffic than their recirculation slot drains).
// Each egress's state queue is therefore N_PIPES * CACHE_DEPTH deep by
// default, which makes state packet loss impossible; a smaller SQ_DEPTH
// models a tighter buffer, with loss counted in state_drops.
module sketchpipe_switch
  import sp_pkg::*;
#(
  parameter int unsigned N_PIPES     = 4,
  parameter int unsigned N_ARRAYS    = 4,
  parameter place_pipe_t ARRAY_PIPE  = default_place_pipe(),
  parameter place_eg_t   ARRAY_EG    = default_place_eg(),
  parameter pred_t       PRED        = '0,
  parameter int unsigned CACHE_DEPTH = 65536,
  parameter int unsigned N_COUNTERS  = 65536,
  parameter int unsigned N_PORTS     = 8,
  parameter int unsigned NQ_DEPTH    = 64,
  parameter int unsigned SQ_DEPTH    = N_PIPES * CACHE_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               epoch_clear,
  input  logic [N_PIPES-1:0] gen_start,
  input  logic [15:0]        gen_gap,
  output logic [N_PIPES-1:0] gen_busy,
  input  logic               flush,
  input  logic [N_PIPES-1:0] rx_valid,
  output logic [N_PIPES-1:0] rx_ready,
  input  key_t               rx_key  [N_PIPES],
  input  pipe_t              rx_dst  [N_PIPES],
  input  logic [SEQ_W-1:0]   rx_seq  [N_PIPES],
  output logic [N_PIPES-1:0] tx_valid,
  output pkt_t               tx_pkt  [N_PIPES],
  output logic [N_PIPES-1:0] rep_valid,
  output pkt_t               rep_pkt [N_PIPES],
  input  key_t               q_key,
  input  cnt_t               q_threshold,
  output cnt_t               q_counts [MAX_ARRAYS],
  output cnt_t               q_estimate,
  output logic               q_heavy,
  output logic [IDX_W:0]     cache_occupancy [N_PIPES],
  output pipe_stats_t        stats [N_PIPES],
  output logic [31:0]        normal_drops,
  output logic [31:0]        state_drops
);
  logic [N_PIPES-1:0] tm_valid, n_pop, s_pop, n_ne, s_ne;
  pkt_t               tm_pkt [N_PIPES];
  pkt_t               n_head [N_PIPES];
  pkt_t               s_head [N_PIPES];
  cnt_t               pq_count [N_PIPES][MAX_ARRAYS];
  bitmap_t            pq_mask  [N_PIPES];

  for (genvar p = 0; p < N_PIPES; p++) begin : g_pipe
    sp_compound_pipe #(
      .PIPE_ID(p), .N_ARRAYS(N_ARRAYS), .ARRAY_PIPE(ARRAY_PIPE), .ARRAY_EG(ARRAY_EG),
      .PRED(PRED), .CACHE_DEPTH(CACHE_DEPTH), .N_COUNTERS(N_COUNTERS), .N_PORTS(N_PORTS)
    ) u_pipe (
      .clk, .rst_n, .epoch_clear,
      .gen_start(gen_start[p]), .gen_gap, .gen_busy(gen_busy[p]), .flush,
      .rx_valid(rx_valid[p]), .rx_ready(rx_ready[p]), .rx_key(rx_key[p]),
      .rx_dst(rx_dst[p]), .rx_seq(rx_seq[p]),
      .tx_valid(tx_valid[p]), .tx_pkt(tx_pkt[p]),
      .tm_valid(tm_valid[p]), .tm_pkt(tm_pkt[p]),
      .rep_valid(rep_valid[p]), .rep_pkt(rep_pkt[p]),
      .n_head(n_head[p]), .n_ne(n_ne[p]), .n_pop(n_pop[p]),
      .s_head(s_head[p]), .s_ne(s_ne[p]), .s_pop(s_pop[p]),
      .q_key, .q_count(pq_count[p]), .q_mask(pq_mask[p]),
      .cache_occupancy(cache_occupancy[p]), .stats(stats[p]));
  end

  sp_traffic_manager #(.N_PIPES(N_PIPES), .NQ_DEPTH(NQ_DEPTH), .SQ_DEPTH(SQ_DEPTH)) u_tm (
    .clk, .rst_n,
    .in_valid(tm_valid), .in_pkt(tm_pkt),
    .n_pop, .n_head, .n_ne, .s_pop, .s_head, .s_ne,
    .normal_drops, .state_drops);

  // Each array lives in exactly one pipeline: merge the per-pipeline reads.
  bitmap_t all_mask;
  always_comb begin
    all_mask = '0;
    for (int unsigned j = 0; j < MAX_ARRAYS; j++) begin
      q_counts[j] = '0;
      for (int unsigned p = 0; p < N_PIPES; p++)
        if (pq_mask[p][j]) q_counts[j] = pq_count[p][j];
    end
    for (int unsigned p = 0; p < N_PIPES; p++) all_mask = all_mask | pq_mask[p];
  end

  sp_cm_query u_query (.counts(q_counts), .mask(all_mask), .threshold(q_threshold),
                       .estimate(q_estimate), .heavy(q_heavy));

  // Splitless placement: every array must be hosted by a pipeline that exists.
  initial
    for (int unsigned j = 0; j < N_ARRAYS; j++)
      assert (int'(ARRAY_PIPE[j]) < N_PIPES)
        else $error("array %0d placed on pipeline %0d of %0d", j, ARRAY_PIPE[j], N_PIPES);
endmodule
