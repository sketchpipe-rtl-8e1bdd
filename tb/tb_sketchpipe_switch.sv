// tb_sketchpipe_switch: end-to-end test of the multi-pipeline switch at
// reduced sizes, with two switches side by side.
//
// Switch A (exact): four pipelines, the default four-array placement (arrays
// 0/1 in ingress/egress of pipeline 0, arrays 2/3 in pipeline 1), array 2
// ordered before array 3, 64 cache entries, 1024 counters, state queues
// deep enough for every state packet. Twelve flows whose cache entries and
// counters never collide each follow one path (a fixed arrival pipeline and
// a random but fixed egress, as flow-consistent routing does). After the state packets drain the caches, every
// array must hold the exact packet count of every flow, the count-min
// estimate must equal it, heavy flows must be flagged, every normal packet
// must leave at its egress, and an epoch clear must zero the sketch. A
// second burst is then cut off by a flush: for every flow and array, the
// counter plus the counts reported for that array must equal the burst.
// Switch B (stress): 4-entry caches, 2-deep normal and 1-deep state queues,
// two arrays (ingress of 0, egress of 1) and 64 random keys pushed towards
// one egress: collisions, skipped packets, normal and state packet drops
// happen, and a second generator start must let the caches drain again.
// Every mechanism is counted and a failure is recorded for one that never
// happened.
module tb_sketchpipe_switch;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NP = 4, NF = 12;

  function automatic pred_t mk_pred();
    pred_t r;
    r = '0;
    r[3][2] = 1'b1;
    return r;
  endfunction

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  // ---------------- switch A ----------------
  logic a_clear = 0;
  logic [NP-1:0] a_gen = '0, a_busy, a_rxv = '0, a_rdy, a_txv;
  key_t a_key [NP];
  pipe_t a_dst [NP];
  logic [SEQ_W-1:0] a_seq [NP];
  pkt_t a_tx [NP];
  key_t a_q = '0;
  cnt_t a_thr = 100, a_qc [MAX_ARRAYS], a_est;
  logic a_heavy;
  logic [IDX_W:0] a_occ [NP];
  pipe_stats_t a_st [NP];
  logic [31:0] a_nd, a_sd;
  logic a_flush = 0;
  logic [NP-1:0] a_rv;
  pkt_t a_rp [NP];

  sketchpipe_switch #(.N_PIPES(NP), .N_ARRAYS(4), .PRED(mk_pred()), .CACHE_DEPTH(64),
                      .N_COUNTERS(1024), .NQ_DEPTH(64), .SQ_DEPTH(4 * 64)) dut_a (
    .clk, .rst_n, .epoch_clear(a_clear), .gen_start(a_gen), .gen_gap(16'd0), .gen_busy(a_busy), .flush(a_flush),
    .rx_valid(a_rxv), .rx_ready(a_rdy), .rx_key(a_key), .rx_dst(a_dst), .rx_seq(a_seq),
    .tx_valid(a_txv), .tx_pkt(a_tx), .rep_valid(a_rv), .rep_pkt(a_rp), .q_key(a_q), .q_threshold(a_thr),
    .q_counts(a_qc), .q_estimate(a_est), .q_heavy(a_heavy),
    .cache_occupancy(a_occ), .stats(a_st), .normal_drops(a_nd), .state_drops(a_sd));

  // ---------------- switch B ----------------
  localparam place_pipe_t B_PP = place_pipe_t'({8'd1, 8'd0});
  localparam place_eg_t   B_PE = place_eg_t'(2'b10);
  logic [NP-1:0] b_gen = '0, b_busy, b_rxv = '0, b_rdy, b_txv;
  key_t b_key [NP];
  pipe_t b_dst [NP];
  logic [SEQ_W-1:0] b_seq [NP];
  pkt_t b_tx [NP];
  cnt_t b_qc [MAX_ARRAYS], b_est;
  logic b_heavy;
  logic [IDX_W:0] b_occ [NP];
  pipe_stats_t b_st [NP];
  logic [31:0] b_nd, b_sd;
  logic [NP-1:0] b_rv;
  pkt_t b_rp [NP];

  sketchpipe_switch #(.N_PIPES(NP), .N_ARRAYS(2), .ARRAY_PIPE(B_PP), .ARRAY_EG(B_PE),
                      .CACHE_DEPTH(4), .N_COUNTERS(64), .NQ_DEPTH(2), .SQ_DEPTH(1)) dut_b (
    .clk, .rst_n, .epoch_clear(1'b0), .gen_start(b_gen), .gen_gap(16'd3), .gen_busy(b_busy), .flush(1'b0),
    .rx_valid(b_rxv), .rx_ready(b_rdy), .rx_key(b_key), .rx_dst(b_dst), .rx_seq(b_seq),
    .tx_valid(b_txv), .tx_pkt(b_tx), .rep_valid(b_rv), .rep_pkt(b_rp), .q_key('0), .q_threshold('0),
    .q_counts(b_qc), .q_estimate(b_est), .q_heavy(b_heavy),
    .cache_occupancy(b_occ), .stats(b_st), .normal_drops(b_nd), .state_drops(b_sd));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  key_t flows [NF];
  pipe_t flow_dst [NF];
  int   truth [NF];
  int   a_sent = 0, a_out = 0, b_sent = 0, b_out = 0, rdy_cycles = 0, cycles = 0;

  int   rep_sum [NF][4];
  int   reports = 0, b_reports = 0;

  always @(posedge clk)
    if (rst_n) begin
      a_out <= a_out + $countones(a_txv);
      b_out <= b_out + $countones(b_txv);
      b_reports <= b_reports + $countones(b_rv);
      for (int p = 0; p < NP; p++)
        if (a_rv[p]) begin
          reports <= reports + 1;
          for (int i = 0; i < NF; i++)
            if (a_rp[p].key == flows[i])
              for (int j = 0; j < 4; j++)
                if (a_rp[p].bitmap[j]) rep_sum[i][j] += int'(a_rp[p].cnt);
        end
    end

  function automatic logic clash(key_t k, int n);
    for (int i = 0; i < n; i++) begin
      if (ref_idx(k, REF_CACHE_SEED, 6) == ref_idx(flows[i], REF_CACHE_SEED, 6)) return 1;
      for (int j = 0; j < 4; j++)
        if (ref_idx(k, ref_array_seed(j), 10) == ref_idx(flows[i], ref_array_seed(j), 10)) return 1;
    end
    return 0;
  endfunction

  function automatic int sum_stat(pipe_stats_t s [NP], int which);
    int t = 0;
    for (int p = 0; p < NP; p++)
      case (which)
        0: t += s[p].cache_hits;    1: t += s[p].cache_inserts; 2: t += s[p].cache_evicts;
        3: t += s[p].cache_skips;   4: t += s[p].state_loads;   5: t += s[p].state_empty;
        6: t += s[p].state_updates; 7: t += s[p].state_remote;  8: t += s[p].state_home;
        9: t += s[p].recirculated;  default: t += s[p].normal_in;
      endcase
    return t;
  endfunction

  initial begin
    int f;
    for (int i = 0; i < NF; i++) begin
      do flows[i] = $urandom; while (clash(flows[i], i));
      truth[i] = 0;
      flow_dst[i] = pipe_t'($urandom_range(NP - 1));
    end
    foreach (a_key[p]) begin a_key[p] = '0; a_dst[p] = '0; a_seq[p] = '0; end
    foreach (b_key[p]) begin b_key[p] = '0; b_dst[p] = '0; b_seq[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    a_gen = '1; b_gen = '1;
    @(negedge clk);
    a_gen = '0; b_gen = '0;
    // traffic phase
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int p = 0; p < NP; p++) begin
        // flow f enters pipeline f % NP; flows 0..3 are heavy
        f = p + NP * (($urandom_range(3) == 0) ? $urandom_range(NF / NP - 1) : 0);
        a_rxv[p] = $urandom_range(1);
        a_key[p] = flows[f];
        a_dst[p] = flow_dst[f];
        a_seq[p] = SEQ_W'(cyc);
        b_rxv[p] = 1'b1;
        b_key[p] = $urandom_range(63);
        b_dst[p] = (p == 0 && cyc % 2 == 0) ? pipe_t'(1) : pipe_t'(2);
      end
      #1;
      cycles++;
      if (a_rdy[0]) rdy_cycles++;
      for (int p = 0; p < NP; p++) begin
        if (a_rxv[p] && a_rdy[p]) begin
          a_sent++;
          for (int i = 0; i < NF; i++) if (flows[i] == a_key[p]) truth[i]++;
        end
        if (b_rxv[p] && b_rdy[p]) b_sent++;
      end
      @(negedge clk);
    end
    a_rxv = '0; b_rxv = '0;
    checks++;
    if (rdy_cycles * 9 > cycles * 8 + 9 || rdy_cycles * 9 < cycles * 8 - 9) begin
      failures++;
      $display("normal slots: %0d of %0d cycles", rdy_cycles, cycles);
    end
    // drain: switch B lost state packets, start its generators again
    repeat (2000) @(negedge clk);
    b_gen = '1;
    @(negedge clk);
    b_gen = '0;
    repeat (4000) @(negedge clk);

    // ---- switch A: exact sketch contents ----
    for (int p = 0; p < NP; p++) chk($sformatf("A cache %0d drained", p), a_occ[p], 0);
    chk("A normal packets out", a_out + a_nd, a_sent);
    chk("A state drops", a_sd, 0);
    for (int i = 0; i < NF; i++) begin
      a_q = flows[i];
      #1;
      for (int j = 0; j < 4; j++) chk($sformatf("A flow %0d array %0d", i, j), a_qc[j], truth[i]);
      chk($sformatf("A flow %0d estimate", i), a_est, truth[i]);
      chk($sformatf("A flow %0d heavy", i), a_heavy, truth[i] >= 100);
    end
    @(negedge clk); a_clear = 1;
    @(negedge clk); a_clear = 0;
    a_q = flows[0];
    #1;
    chk("A estimate after epoch clear", a_est, 0);

    // ---- switch A: a burst cut off by a flush ----
    for (int i = 0; i < NF; i++) begin
      truth[i] = 0;
      for (int j = 0; j < 4; j++) rep_sum[i][j] = 0;
    end
    for (int cyc = 0; cyc < 600; cyc++) begin
      for (int p = 0; p < NP; p++) begin
        f = p + NP * (($urandom_range(3) == 0) ? $urandom_range(NF / NP - 1) : 0);
        a_rxv[p] = $urandom_range(1);
        a_key[p] = flows[f];
        a_dst[p] = flow_dst[f];
      end
      #1;
      for (int p = 0; p < NP; p++)
        if (a_rxv[p] && a_rdy[p])
          for (int i = 0; i < NF; i++) if (flows[i] == a_key[p]) truth[i]++;
      @(negedge clk);
    end
    a_rxv = '0;
    a_flush = 1;
    repeat (3000) @(negedge clk);
    a_flush = 0;
    repeat (20) @(negedge clk);
    for (int p = 0; p < NP; p++) chk($sformatf("A cache %0d empty after flush", p), a_occ[p], 0);
    for (int i = 0; i < NF; i++) begin
      a_q = flows[i];
      #1;
      for (int j = 0; j < 4; j++)
        chk($sformatf("A flush flow %0d array %0d counter+reported", i, j),
            a_qc[j] + cnt_t'(rep_sum[i][j]), truth[i]);
    end
    chk("B reports without flush", b_reports, 0);

    // ---- switch B: overload, then recovery ----
    for (int p = 0; p < NP; p++) chk($sformatf("B cache %0d drained", p), b_occ[p], 0);
    chk("B normal packets out", b_out + b_nd, b_sent);

    // ---- mechanisms ----
    begin
      int n [16];
      string name [16];
      name = '{"cache hit", "cache insert", "cache eviction", "cache skip", "state load",
               "empty-entry poll", "array update by state packet", "state packet to another pipeline",
               "state packet back home", "recirculation", "normal drop", "state drop",
               "heavy key", "generator restart", "key reported at flush", "evicted key forwarded"};
      for (int k = 0; k < 10; k++) n[k] = sum_stat(a_st, k) + sum_stat(b_st, k);
      n[10] = b_nd; n[11] = b_sd;
      n[12] = 0;
      for (int i = 0; i < NF; i++) if (truth[i] >= 100) n[12]++;
      n[13] = (b_sd != 0) ? 1 : 0;
      n[14] = reports;
      n[15] = 0;
      for (int p = 0; p < NP; p++) n[15] += a_st[p].evict_fwd + b_st[p].evict_fwd;
      for (int k = 0; k < 16; k++) begin
        $display("mechanism %-34s %0d", name[k], n[k]);
        checks++;
        if (n[k] == 0) begin failures++; $display("mechanism never happened: %s", name[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
