// tb_sp_traffic_manager: three ingresses push random normal and state
// packets to three egresses, which pop at random. Queue models in the
// testbench predict every popped packet (order within an egress: by cycle,
// then by ingress), and the drop counters when the 4-deep normal queues and
// the 3-deep state queues overflow.
module tb_sp_traffic_manager;
  import sp_pkg::*;
  localparam int unsigned N = 3, NQ = 4, SQ = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0, n_pop = '0, s_pop = '0, n_ne, s_ne;
  pkt_t in_pkt [N], n_head [N], s_head [N];
  logic [31:0] normal_drops, state_drops;
  pkt_t qn [N][$], qs [N][$];
  int exp_nd = 0, exp_sd = 0, popped = 0;

  sp_traffic_manager #(.N_PIPES(N), .NQ_DEPTH(NQ), .SQ_DEPTH(SQ)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    foreach (in_pkt[i]) in_pkt[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // egress side: compare heads, pop at random
      for (int q = 0; q < N; q++) begin
        chk("n_ne", n_ne[q], qn[q].size() != 0);
        chk("s_ne", s_ne[q], qs[q].size() != 0);
        if (qn[q].size() != 0) chk("n_head", n_head[q], qn[q][0]);
        if (qs[q].size() != 0) chk("s_head", s_head[q], qs[q][0]);
        n_pop[q] = qn[q].size() != 0 && $urandom_range((cyc / 1000) + 1) == 0;
        s_pop[q] = qs[q].size() != 0 && $urandom_range((cyc / 1000) + 1) == 0;
      end
      // ingress side
      for (int i = 0; i < N; i++) begin
        in_valid[i]        = $urandom_range(2) == 0;
        in_pkt[i]          = '0;
        in_pkt[i].is_state = $urandom_range(1);
        in_pkt[i].dst      = pipe_t'($urandom_range(N - 1));
        in_pkt[i].home     = pipe_t'(i);
        in_pkt[i].key      = $urandom;
        in_pkt[i].seq      = SEQ_W'(cyc);
      end
      // model: space is what is left before this cycle's pops
      for (int i = 0; i < N; i++)
        if (in_valid[i]) begin
          int q;
          q = in_pkt[i].dst;
          if (in_pkt[i].is_state) begin
            if (qs[q].size() < SQ) qs[q].push_back(in_pkt[i]); else exp_sd++;
          end else begin
            if (qn[q].size() < NQ) qn[q].push_back(in_pkt[i]); else exp_nd++;
          end
        end
      for (int q = 0; q < N; q++) begin
        if (n_pop[q]) begin void'(qn[q].pop_front()); popped++; end
        if (s_pop[q]) begin void'(qs[q].pop_front()); popped++; end
      end
      @(posedge clk); #1;
      chk("normal_drops", normal_drops, exp_nd);
      chk("state_drops", state_drops, exp_sd);
    end
    checks++;
    if (exp_nd == 0 || exp_sd == 0 || popped < 1000) begin
      failures++;
      $display("coverage: normal drops %0d state drops %0d popped %0d", exp_nd, exp_sd, popped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
