// sp_fifo: first-in first-out queue of packets with several push ports.
//
// Up to N_IN packets may be pushed in one cycle; they are written in port
// order (port 0 first) into consecutive slots. When the queue cannot take
// them all, the ones that do not fit are dropped and reported on drop (one
// bit per port). One packet may be popped per cycle: head/not_empty show the
// oldest packet, pop removes it. A pop frees its slot for pushes in the
// following cycle only. count is the current occupancy.
// Used as the traffic manager's per-egress queues, as the recirculation
// queue and as the queue of evicted keys.
module sp_fifo
  import sp_pkg::*;
#(
  parameter int unsigned N_IN  = 1,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  push,
  input  pkt_t             din [N_IN],
  output logic [N_IN-1:0]  drop,
  input  logic             pop,
  output pkt_t             head,
  output logic             not_empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [N_IN-1:0] acc;
  logic [CW-1:0] n_acc;
  logic [AW-1:0] slot [N_IN];
  logic          do_pop;

  function automatic logic [AW-1:0] wrap(logic [AW-1:0] p, int unsigned k);
    logic [AW:0] s;
    s = {1'b0, p} + (AW+1)'(k % DEPTH);
    if (s >= (AW+1)'(DEPTH)) s = s - (AW+1)'(DEPTH);
    return s[AW-1:0];
  endfunction

  always_comb begin
    do_pop    = pop && count != '0;
    not_empty = count != '0;
    head      = mem[rd_ptr];
    n_acc     = '0;
    acc       = '0;
    drop      = '0;
    for (int unsigned i = 0; i < N_IN; i++) begin
      slot[i] = wrap(wr_ptr, int'(n_acc));
      if (push[i]) begin
        if (int'(count) + int'(n_acc) < DEPTH) begin
          acc[i] = 1'b1;
          n_acc  = n_acc + 1'b1;
        end else begin
          drop[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int unsigned i = 0; i < N_IN; i++)
      if (acc[i]) mem[slot[i]] <= din[i];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wrap(wr_ptr, int'(n_acc));
      if (do_pop) rd_ptr <= wrap(rd_ptr, 1);
      count <= count + n_acc - CW'(do_pop);
    end
endmodule
