// tb_sketchpipe_full: the switch at its default size (four pipelines, 2^16
// cache entries per pipeline, four arrays of 2^16 counters). Sixteen flows
// with fixed paths send traffic while the four generators inject their
// 65536 state packets each; the test then waits until every generator has
// finished and every cache is empty, and checks that every array holds the
// exact packet count of every flow and that all normal packets left.
module tb_sketchpipe_full;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NP = 4, NF = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, epoch_clear = 0, flush = 0;
  logic [15:0] gen_gap = '0;
  always #5 clk = ~clk;

  logic [NP-1:0] gen_start = '0, gen_busy, rx_valid = '0, rx_ready, tx_valid;
  key_t rx_key [NP];
  pipe_t rx_dst [NP];
  logic [SEQ_W-1:0] rx_seq [NP];
  pkt_t tx_pkt [NP], rep_pkt [NP];
  logic [NP-1:0] rep_valid;
  key_t q_key = '0;
  cnt_t q_threshold = 1000, q_counts [MAX_ARRAYS], q_estimate;
  logic q_heavy;
  logic [IDX_W:0] cache_occupancy [NP];
  pipe_stats_t stats [NP];
  logic [31:0] normal_drops, state_drops;

  sketchpipe_switch dut (.*);

  key_t  flows [NF];
  pipe_t flow_dst [NF];
  int    truth [NF];
  int    sent = 0, out = 0;

  int    reports = 0;
  always @(posedge clk) if (rst_n) out <= out + $countones(tx_valid);
  always @(posedge clk) if (rst_n) reports <= reports + $countones(rep_valid);

  initial begin
    repeat (4_000_000) @(posedge clk);
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
      if (ref_idx(k, REF_CACHE_SEED, 16) == ref_idx(flows[i], REF_CACHE_SEED, 16)) return 1;
      for (int j = 0; j < 4; j++)
        if (ref_idx(k, ref_array_seed(j), 16) == ref_idx(flows[i], ref_array_seed(j), 16)) return 1;
    end
    return 0;
  endfunction

  task automatic sketch_complete(output logic done);
    done = 1'b1;
    for (int i = 0; i < NF; i++) begin
      q_key = flows[i];
      #1;
      for (int j = 0; j < 4; j++) if (q_counts[j] != cnt_t'(truth[i])) done = 1'b0;
    end
  endtask

  initial begin
    int f, waited;
    for (int i = 0; i < NF; i++) begin
      do flows[i] = $urandom; while (clash(flows[i], i));
      flow_dst[i] = pipe_t'($urandom_range(NP - 1));
      truth[i] = 0;
    end
    foreach (rx_key[p]) begin rx_key[p] = '0; rx_dst[p] = '0; rx_seq[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); gen_start = '1;
    @(negedge clk); gen_start = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int p = 0; p < NP; p++) begin
        f = p + NP * (($urandom_range(3) == 0) ? $urandom_range(NF / NP - 1) : 0);
        rx_valid[p] = $urandom_range(1);
        rx_key[p]   = flows[f];
        rx_dst[p]   = flow_dst[f];
        rx_seq[p]   = SEQ_W'(cyc);
      end
      #1;
      for (int p = 0; p < NP; p++)
        if (rx_valid[p] && rx_ready[p]) begin
          sent++;
          for (int i = 0; i < NF; i++) if (flows[i] == rx_key[p]) truth[i]++;
        end
      @(negedge clk);
    end
    rx_valid = '0;
    // A state packet that has taken a key may queue behind the other 65535
    // state packets of its loop (one recirculation slot in nine), so poll
    // until every array has caught up, within a bound of five such laps.
    waited = 0;
    forever begin
      logic done;
      sketch_complete(done);
      if (done || waited >= 5 * 65536 * 9) break;
      repeat (5000) @(negedge clk);
      waited += 5000;
    end
    $display("sketch complete %0d cycles after the traffic", waited);
    for (int p = 0; p < NP; p++) chk($sformatf("cache %0d drained", p), cache_occupancy[p], 0);
    chk("generators finished", gen_busy, 0);
    chk("normal packets out", out, sent);
    chk("normal drops", normal_drops, 0);
    chk("state drops", state_drops, 0);
    chk("no reports without flush", reports, 0);
    for (int i = 0; i < NF; i++) begin
      q_key = flows[i];
      #1;
      for (int j = 0; j < 4; j++) chk($sformatf("flow %0d array %0d", i, j), q_counts[j], truth[i]);
      chk($sformatf("flow %0d estimate", i), q_estimate, truth[i]);
      chk($sformatf("flow %0d heavy", i), q_heavy, truth[i] >= 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
