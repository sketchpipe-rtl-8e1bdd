// tb_sketchpipe_hh: heavy-hitter detection on skewed traffic, a reduced
// version of the heavy-hitter experiment the design is evaluated with.
//
// Four pipelines with the default four-array placement, 1024 cache entries
// per pipeline and 4096 counters per array. 1024 flows, each with a fixed
// arrival pipeline (flow % 4) and a fixed random egress (flow-consistent
// routing), send about 36,000 packets drawn from a heavily skewed
// distribution (rank = 256 * u^4 within each pipeline's flows, so a handful
// of flows carry most packets, and some cache collisions and evictions
// happen). Each pipeline is loaded to a quarter of its normal ports, like
// two of eight ports driven in the evaluated testbed, which leaves the
// internal port enough room. The test then waits 200,000 cycles: every
// key that arrived outside pipeline 1 still has to visit array 2 in its
// ingress, through pipeline 1's single internal slot, so the last keys
// reach the arrays long after the caches are empty.
// After the caches drain, every flow is queried and the heavy keys (at
// least 0.5% of all packets) are compared with the ground truth.
//
// The reference is an ideal count-min sketch on a single pipeline with the
// same hash functions, computed here from the ground truth. The checks:
// the ideal never underestimates; the switch's estimate equals the ideal
// one when no evicted key was lost (evicted keys travel on in one-shot state
// packets) and never exceeds it otherwise; the switch's
// F1 score is at least 0.9 of the ideal's; every packet leaves or is counted
// as dropped; and the caches end up empty. The bound 0.9 is this test's
// choice for "near-ideal accuracy".
module tb_sketchpipe_hh;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NP = 4, NF = 1024, CD = 1024, NC = 4096, CYCLES = 40000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  logic [NP-1:0] gen_start = '0, gen_busy, rx_valid = '0, rx_ready, tx_valid, rep_valid;
  key_t rx_key [NP];
  pipe_t rx_dst [NP];
  logic [SEQ_W-1:0] rx_seq [NP];
  pkt_t tx_pkt [NP], rep_pkt [NP];
  key_t q_key = '0;
  cnt_t q_threshold = '0, q_counts [MAX_ARRAYS], q_estimate;
  logic q_heavy;
  logic [IDX_W:0] cache_occupancy [NP];
  pipe_stats_t stats [NP];
  logic [31:0] normal_drops, state_drops;

  sketchpipe_switch #(.N_PIPES(NP), .CACHE_DEPTH(CD), .N_COUNTERS(NC)) dut (
    .clk, .rst_n, .epoch_clear(1'b0), .gen_start, .gen_gap(16'd0), .gen_busy, .flush(1'b0),
    .rx_valid, .rx_ready, .rx_key, .rx_dst, .rx_seq, .tx_valid, .tx_pkt, .rep_valid, .rep_pkt,
    .q_key, .q_threshold, .q_counts, .q_estimate, .q_heavy,
    .cache_occupancy, .stats, .normal_drops, .state_drops);

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  key_t  flows [NF];
  pipe_t flow_dst [NF];
  int    truth [NF];
  int    ideal [4][NC];
  int    sent = 0, out = 0;

  always @(posedge clk) if (rst_n) out <= out + $countones(tx_valid);

  function automatic int pick_rank();
    real u;
    u = real'($urandom_range(999_999)) / 1.0e6;
    return int'($floor(real'(NF / NP) * u * u * u * u));
  endfunction

  initial begin
    int f, total, thr, tp_s, fp_s, fn_s, tp_i, fp_i, fn_i, est_i, over, evicts, fwd, lost, exact;
    real f1_s, f1_i;
    for (int i = 0; i < NF; i++) begin
      flows[i] = $urandom;
      flow_dst[i] = pipe_t'($urandom_range(NP - 1));
      truth[i] = 0;
    end
    foreach (rx_key[p]) begin rx_key[p] = '0; rx_dst[p] = '0; rx_seq[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    gen_start = '1;
    @(negedge clk);
    gen_start = '0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      for (int p = 0; p < NP; p++) begin
        f = pick_rank() * NP + p;
        rx_valid[p] = $urandom_range(3) == 0;
        rx_key[p] = flows[f];
        rx_dst[p] = flow_dst[f];
        rx_seq[p] = SEQ_W'(f);
      end
      #1;
      for (int p = 0; p < NP; p++)
        if (rx_valid[p] && rx_ready[p]) begin
          sent++;
          truth[int'(rx_seq[p])]++;
        end
      @(negedge clk);
    end
    rx_valid = '0;
    repeat (200000) @(negedge clk);

    for (int p = 0; p < NP; p++) chk($sformatf("cache %0d drained", p), cache_occupancy[p], 0);
    chk("normal packets out or dropped", out + normal_drops, sent);
    chk("state drops", state_drops, 0);

    // ideal single-pipeline count-min with the same hashes
    for (int j = 0; j < 4; j++) for (int c = 0; c < NC; c++) ideal[j][c] = 0;
    for (int i = 0; i < NF; i++)
      for (int j = 0; j < 4; j++) ideal[j][ref_idx(flows[i], ref_array_seed(j), 12)] += truth[i];

    evicts = 0; fwd = 0; lost = 0; exact = 0;
    for (int p = 0; p < NP; p++) begin
      evicts += stats[p].cache_evicts;
      fwd    += stats[p].evict_fwd;
      lost   += stats[p].evict_lost;
    end
    total = sent;
    thr = total / 200;
    q_threshold = cnt_t'(thr);
    tp_s = 0; fp_s = 0; fn_s = 0; tp_i = 0; fp_i = 0; fn_i = 0; over = 0;
    for (int i = 0; i < NF; i++) begin
      q_key = flows[i];
      #1;
      est_i = ideal[0][ref_idx(flows[i], ref_array_seed(0), 12)];
      for (int j = 1; j < 4; j++)
        if (ideal[j][ref_idx(flows[i], ref_array_seed(j), 12)] < est_i)
          est_i = ideal[j][ref_idx(flows[i], ref_array_seed(j), 12)];
      checks++;
      if (est_i < truth[i]) begin failures++; $display("ideal underestimates flow %0d", i); end
      // with no evicted key lost, every count reached every array: the
      // switch must match the ideal sketch exactly; otherwise it may only
      // fall short of it
      checks++;
      if (int'(q_estimate) > est_i || (lost == 0 && int'(q_estimate) != est_i)) begin
        failures++; over++;
        $display("flow %0d: switch estimate %0d, ideal %0d  pipe %0d dst %0d arrays %0d/%0d %0d/%0d %0d/%0d %0d/%0d", i, q_estimate, est_i, i % 4, flow_dst[i],
          q_counts[0], ideal[0][ref_idx(flows[i], ref_array_seed(0), 12)], q_counts[1], ideal[1][ref_idx(flows[i], ref_array_seed(1), 12)],
          q_counts[2], ideal[2][ref_idx(flows[i], ref_array_seed(2), 12)], q_counts[3], ideal[3][ref_idx(flows[i], ref_array_seed(3), 12)]);
      end
      if (q_heavy && truth[i] >= thr) tp_s++;
      if (q_heavy && truth[i] <  thr) fp_s++;
      if (!q_heavy && truth[i] >= thr) fn_s++;
      if (est_i >= thr && truth[i] >= thr) tp_i++;
      if (est_i >= thr && truth[i] <  thr) fp_i++;
      if (est_i <  thr && truth[i] >= thr) fn_i++;
    end
    f1_s = 2.0 * tp_s / (2.0 * tp_s + fp_s + fn_s);
    f1_i = 2.0 * tp_i / (2.0 * tp_i + fp_i + fn_i);
    $display("packets %0d (%0d dropped by the traffic manager), threshold %0d, true heavy keys %0d",
             total, normal_drops, thr, tp_i + fn_i);
    $display("cache evictions %0d (%0.2f%% of packets): %0d forwarded, %0d lost",
             evicts, 100.0 * evicts / total, fwd, lost);
    $display("F1 switch %0.3f (tp %0d fp %0d fn %0d), ideal one-pipeline %0.3f (tp %0d fp %0d fn %0d)",
             f1_s, tp_s, fp_s, fn_s, f1_i, tp_i, fp_i, fn_i);
    checks++;
    if (f1_s < 0.9 * f1_i) begin failures++; $display("F1 below 0.9 of ideal"); end
    checks++;
    if (evicts == 0) begin failures++; $display("no cache eviction happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
