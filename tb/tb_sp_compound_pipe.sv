// tb_sp_compound_pipe: one compound pipeline (id 0) with array 0 in its
// ingress and array 1 in its egress, a 16-entry cache and 256-counter
// arrays. The testbench plays the traffic manager: packets for pipeline 0
// come back into its egress queues, normal packets for other pipelines
// leave (so they miss array 1 and their keys are cached). Six flows whose
// cache entries and counters do not collide send 600 packets; after the
// state packets have drained the cache, both arrays must hold every flow's
// exact packet count. Also checked: 8 normal slots out of every 9, the
// ingress latency (3 clock edges from the rx handshake to the traffic
// manager), delivery of every packet for pipeline 0, and that state packets
// loaded keys, updated array 1, recirculated and polled empty entries.
module tb_sp_compound_pipe;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam place_pipe_t PP = '0;
  localparam place_eg_t   PE = place_eg_t'(2'b10);
  localparam int unsigned NF = 6;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, epoch_clear = 0, gen_start = 0, gen_busy, flush = 0, rep_valid;
  logic rx_valid = 0, rx_ready, tx_valid, tm_valid, n_pop, s_pop;
  logic [15:0] gen_gap = '0;
  key_t rx_key = '0, q_key = '0;
  pipe_t rx_dst = '0;
  logic [SEQ_W-1:0] rx_seq = '0;
  pkt_t tx_pkt, tm_pkt, n_head, s_head, rep_pkt;
  logic n_ne, s_ne;
  cnt_t q_count [MAX_ARRAYS];
  bitmap_t q_mask;
  logic [IDX_W:0] cache_occupancy;
  pipe_stats_t stats;

  sp_compound_pipe #(.PIPE_ID(0), .N_ARRAYS(2), .ARRAY_PIPE(PP), .ARRAY_EG(PE),
                     .CACHE_DEPTH(16), .N_COUNTERS(256)) dut (.*);
  always #5 clk = ~clk;

  pkt_t qn [$], qs [$];
  key_t flows [NF];
  int   truth [NF];
  int   cyc = 0, sent = 0, to_self = 0, got_tx = 0, left = 0, bad_state = 0;
  int   hs_cycle [int];
  int   lat_bad = 0, lat_n = 0;

  initial begin
    n_head = '0; s_head = '0; n_ne = 0; s_ne = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_valid && rx_ready) hs_cycle[int'(rx_seq)] = cyc;
    if (n_pop) void'(qn.pop_front());
    if (s_pop) void'(qs.pop_front());
    if (tm_valid) begin
      if (tm_pkt.is_state) begin
        if (tm_pkt.dst == 0) qs.push_back(tm_pkt); else bad_state++;
      end else begin
        if (hs_cycle.exists(int'(tm_pkt.seq))) begin
          lat_n++;
          if (cyc - hs_cycle[int'(tm_pkt.seq)] != 3) lat_bad++;
        end
        if (tm_pkt.dst == 0) qn.push_back(tm_pkt); else left++;
      end
    end
    if (tx_valid && rst_n) got_tx++;
    n_head <= qn.size() ? qn[0] : '0;
    s_head <= qs.size() ? qs[0] : '0;
    n_ne   <= qn.size() != 0;
    s_ne   <= qs.size() != 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic logic clash(key_t k, int n);
    for (int i = 0; i < n; i++) begin
      if (ref_idx(k, REF_CACHE_SEED, 4) == ref_idx(flows[i], REF_CACHE_SEED, 4)) return 1;
      for (int j = 0; j < 2; j++)
        if (ref_idx(k, ref_array_seed(j), 8) == ref_idx(flows[i], ref_array_seed(j), 8)) return 1;
    end
    return 0;
  endfunction

  initial begin
    int ready_cnt = 0, window = 0;
    for (int i = 0; i < NF; i++) begin
      do flows[i] = $urandom; while (clash(flows[i], i));
      truth[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); gen_start = 1;
    @(negedge clk); gen_start = 0;
    while (sent < 600) begin
      int f;
      f        = (sent % 3 == 0) ? $urandom_range(NF - 1) : 0;   // flow 0 is heavy
      rx_valid = $urandom_range(5) != 0;
      rx_key   = flows[f];
      rx_dst   = pipe_t'($urandom_range(3));
      rx_seq   = SEQ_W'(sent);
      @(posedge clk);
      window++;
      if (rx_ready) ready_cnt++;
      if (rx_valid && rx_ready) begin
        truth[f]++;
        sent++;
        if (rx_dst == 0) to_self++;
      end
      @(negedge clk);
    end
    rx_valid = 0;
    // 9-slot schedule: 8 normal slots, 1 recirculation slot
    checks++;
    if (ready_cnt * 9 > window * 8 + 9 || ready_cnt * 9 < window * 8 - 9) begin
      failures++;
      $display("ready in %0d of %0d cycles", ready_cnt, window);
    end
    repeat (3000) @(negedge clk);
    chk("cache drained", cache_occupancy, 0);
    chk("normal packets delivered", got_tx, to_self);
    chk("normal packets to other pipelines", left, sent - to_self);
    chk("state packets misrouted", bad_state, 0);
    chk("ingress latency violations", lat_bad, 0);
    chk("latency samples", lat_n, sent);
    chk("query mask", q_mask, 3);
    for (int i = 0; i < NF; i++) begin
      q_key = flows[i];
      #1;
      chk($sformatf("flow %0d array 0", i), q_count[0], truth[i]);
      chk($sformatf("flow %0d array 1", i), q_count[1], truth[i]);
    end
    checks++;
    if (stats.state_loads == 0 || stats.state_updates == 0 || stats.recirculated == 0 ||
        stats.state_empty == 0 || stats.cache_hits == 0 ||
        stats.state_home != 0 || stats.state_remote != 0) begin
      failures++;
      $display("coverage: loads %0d updates %0d recirc %0d empty %0d hits %0d home %0d",
               stats.state_loads, stats.state_updates, stats.recirculated,
               stats.state_empty, stats.cache_hits, stats.state_home);
    end
    chk("stats.normal_in", stats.normal_in, sent);
    chk("stats.normal_out", stats.normal_out, to_self);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
