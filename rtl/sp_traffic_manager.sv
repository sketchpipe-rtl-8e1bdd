// sp_traffic_manager: the crossbar between all ingresses and all egresses.
//
// Every ingress hands the traffic manager at most one packet per cycle,
// addressed by pkt.dst to an egress pipeline. Each egress owns two queues:
//   * a normal queue of NQ_DEPTH packets for normal traffic;
//   * a state queue of SQ_DEPTH packets, the buffer space dedicated to state
//     packets (lambda = k * l, i.e. one slot per cache entry k of a
//     pipeline, for each of the N_PIPES pipelines), so state packets never
//     take normal buffer space.
// Packets arriving for a full queue are dropped and counted (normal_drops,
// state_drops). Packets from several ingresses for the same egress in one
// cycle are queued in ingress order.
//
// The egress side pops each queue with its own pop strobe; head/not_empty
// show the oldest packet. Latency: a packet pushed in cycle t is visible at
// the head in cycle t+1 at the earliest.
module sp_traffic_manager
  import sp_pkg::*;
#(
  parameter int unsigned N_PIPES  = 4,
  parameter int unsigned NQ_DEPTH = 64,
  parameter int unsigned SQ_DEPTH = N_PIPES * 65536
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [N_PIPES-1:0] in_valid,
  input  pkt_t               in_pkt   [N_PIPES],
  input  logic [N_PIPES-1:0] n_pop,
  output pkt_t               n_head   [N_PIPES],
  output logic [N_PIPES-1:0] n_ne,
  input  logic [N_PIPES-1:0] s_pop,
  output pkt_t               s_head   [N_PIPES],
  output logic [N_PIPES-1:0] s_ne,
  output logic [31:0]        normal_drops,
  output logic [31:0]        state_drops
);
  logic [N_PIPES-1:0] n_push [N_PIPES];
  logic [N_PIPES-1:0] s_push [N_PIPES];
  logic [N_PIPES-1:0] n_drop [N_PIPES];
  logic [N_PIPES-1:0] s_drop [N_PIPES];

  always_comb
    for (int unsigned q = 0; q < N_PIPES; q++)
      for (int unsigned i = 0; i < N_PIPES; i++) begin
        n_push[q][i] = in_valid[i] && in_pkt[i].dst == pipe_t'(q) && !in_pkt[i].is_state;
        s_push[q][i] = in_valid[i] && in_pkt[i].dst == pipe_t'(q) &&  in_pkt[i].is_state;
      end

  for (genvar q = 0; q < N_PIPES; q++) begin : g_eg
    sp_fifo #(.N_IN(N_PIPES), .DEPTH(NQ_DEPTH)) u_nq (
      .clk, .rst_n, .push(n_push[q]), .din(in_pkt), .drop(n_drop[q]),
      .pop(n_pop[q]), .head(n_head[q]), .not_empty(n_ne[q]), .count());
    sp_fifo #(.N_IN(N_PIPES), .DEPTH(SQ_DEPTH)) u_sq (
      .clk, .rst_n, .push(s_push[q]), .din(in_pkt), .drop(s_drop[q]),
      .pop(s_pop[q]), .head(s_head[q]), .not_empty(s_ne[q]), .count());
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      normal_drops <= '0;
      state_drops  <= '0;
    end else begin
      automatic logic [31:0] nd = normal_drops;
      automatic logic [31:0] sd = state_drops;
      for (int unsigned q = 0; q < N_PIPES; q++) begin
        nd = nd + 32'($countones(n_drop[q]));
        sd = sd + 32'($countones(s_drop[q]));
      end
      normal_drops <= nd;
      state_drops  <= sd;
    end
endmodule
