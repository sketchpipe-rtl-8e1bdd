// tb_sp_cache: drives the key cache of pipeline 0 (16 entries, two arrays:
// array 0 in ingress 0, array 1 in egress 1) with random normal packets
// from 24 keys and random state packets, and compares the forwarded
// packets, every event pulse and the occupancy with a testbench model of
// the cache (aggregate on a match, evict on a collision, skip when the
// path covers every array, load-and-empty or empty poll for state
// packets). An eviction must also emit, one cycle later, a one-shot state
// packet carrying the evicted key, count and bitmap. Checks that every kind
// of event happened.
module tb_sp_cache;
  import sp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam place_pipe_t PP = place_pipe_t'({8'd1, 8'd0});
  localparam place_eg_t   PE = place_eg_t'(2'b10);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, epoch_clear = 0, in_valid = 0;
  pkt_t in_pkt = '0, out_pkt;
  logic out_valid, ev_hit, ev_insert, ev_evict, ev_skip, ev_load, ev_empty, evo_valid;
  pkt_t evo_pkt;
  logic [IDX_W:0] occupancy;

  sp_cache #(.PIPE_ID(0), .CACHE_DEPTH(DEPTH), .N_ARRAYS(2), .ARRAY_PIPE(PP), .ARRAY_EG(PE)) dut (.*);

  logic        m_v   [DEPTH];
  key_t        m_key [DEPTH];
  cnt_t        m_cnt [DEPTH];
  bitmap_t     m_bmp [DEPTH];
  int          m_occ = 0;
  key_t        keys [24];
  pkt_t        exp_pkt, exp_evo;
  logic        exp_valid, exp_evo_v = 0;
  int          n_ev [6];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [5:0] ev;
    foreach (keys[i]) keys[i] = $urandom;
    foreach (m_v[i]) m_v[i] = 0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        check("out_valid", out_valid, exp_valid);
        if (exp_valid) check("out_pkt", out_pkt, exp_pkt);
        check("occupancy", occupancy, m_occ);
        check("evo_valid", evo_valid, exp_evo_v);
        if (exp_evo_v) check("evo_pkt", evo_pkt, exp_evo);
      end
      epoch_clear = (cyc % 1500) == 1499;
      in_valid    = $urandom_range(4) != 0;
      in_pkt      = '0;
      if ($urandom_range(2) == 0) begin
        in_pkt.is_state = 1'b1;
        in_pkt.home     = pipe_t'($urandom_range(3) == 0 ? 1 : 0);
        in_pkt.dst      = in_pkt.home;
        in_pkt.idx      = IDX_W'($urandom_range(DEPTH - 1));
        in_pkt.bitmap   = ($urandom_range(4) == 0) ? bitmap_t'(2) : '0;
        in_pkt.key      = $urandom;
      end else begin
        in_pkt.key = keys[$urandom_range(23)];
        in_pkt.dst = pipe_t'($urandom_range(3));
        in_pkt.cnt = 1;
        in_pkt.seq = SEQ_W'(cyc);
      end
      exp_valid = in_valid;
      exp_pkt   = in_pkt;
      ev        = '0;
      exp_evo_v = 0;
      if (in_valid && !in_pkt.is_state) begin
        int unsigned i;
        i = ref_idx(in_pkt.key, REF_CACHE_SEED, 4);
        if (in_pkt.dst == 1) ev[3] = 1;                       // skip
        else begin
          if (m_v[i] && m_key[i] == in_pkt.key) begin ev[0] = 1; m_cnt[i]++; end
          else begin
            if (m_v[i]) begin
              ev[2] = 1;
              exp_evo_v = 1;
              exp_evo = '0;
              exp_evo.is_state = 1; exp_evo.oneshot = 1;
              exp_evo.idx = IDX_W'(i);
              exp_evo.key = m_key[i]; exp_evo.cnt = m_cnt[i]; exp_evo.bitmap = m_bmp[i];
            end else begin ev[1] = 1; m_occ++; end
            m_cnt[i] = 1;
          end
          m_v[i] = 1; m_key[i] = in_pkt.key; m_bmp[i] = bitmap_t'(2);
        end
      end else if (in_valid && in_pkt.home == 0 && in_pkt.bitmap == '0) begin
        int unsigned i;
        i = in_pkt.idx;
        if (m_v[i]) begin
          ev[4] = 1;
          exp_pkt.key = m_key[i]; exp_pkt.cnt = m_cnt[i]; exp_pkt.bitmap = m_bmp[i];
          m_v[i] = 0; m_occ--;
        end else ev[5] = 1;
      end
      #1;
      check("ev_hit",    ev_hit,    ev[0]);
      check("ev_insert", ev_insert, ev[1]);
      check("ev_evict",  ev_evict,  ev[2]);
      check("ev_skip",   ev_skip,   ev[3]);
      check("ev_load",   ev_load,   ev[4]);
      check("ev_empty",  ev_empty,  ev[5]);
      for (int e = 0; e < 6; e++) if (ev[e]) n_ev[e]++;
      if (epoch_clear) begin
        foreach (m_v[i]) m_v[i] = 0;
        m_occ = 0;
      end
    end
    for (int e = 0; e < 6; e++) begin
      checks++;
      if (n_ev[e] == 0) begin failures++; $display("event %0d never happened", e); end
    end
    $display("events hit=%0d insert=%0d evict=%0d skip=%0d load=%0d empty=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
