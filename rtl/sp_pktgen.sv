// sp_pktgen: the per-pipeline state packet generator.
//
// On a start pulse the generator creates CACHE_DEPTH state packets, one per
// cache entry (indices 0 .. CACHE_DEPTH-1), each with an empty bitmap and
// its home set to this pipeline, and offers them to the internal
// recirculation port one by one. The packets live on afterwards, so one
// start normally suffices; a later start injects a fresh set, which is how
// lost state packets are replaced. A start while busy is ignored.
//
// The injection rate is set by gap: after each packet taken the generator
// waits gap cycles before it offers the next one (0: as fast as the
// recirculation slot takes them). A low rate keeps the generator's share of
// the internal port small; the rate is a control setting, the way the
// generator's timer is configured from the switch software.
//
// Interface: valid/ready towards the recirculation port; a packet is taken
// in a cycle with out_valid && out_ready. busy is high until the last packet
// is taken; generated counts packets taken since reset.
module sp_pktgen
  import sp_pkg::*;
#(
  parameter int unsigned PIPE_ID     = 0,
  parameter int unsigned CACHE_DEPTH = 65536
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [15:0] gap,
  output logic busy,
  output logic out_valid,
  input  logic out_ready,
  output pkt_t out_pkt,
  output logic [31:0] generated
);
  logic [IDX_W:0] next_idx;
  logic [15:0]    wait_cnt;

  always_comb begin
    out_valid       = busy && wait_cnt == '0;
    out_pkt         = '0;
    out_pkt.is_state = 1'b1;
    out_pkt.home    = pipe_t'(PIPE_ID);
    out_pkt.dst     = pipe_t'(PIPE_ID);
    out_pkt.idx     = next_idx[IDX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy      <= 1'b0;
      next_idx  <= '0;
      generated <= '0;
      wait_cnt  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        next_idx <= '0;
        wait_cnt <= '0;
      end
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end else if (out_ready) begin
      generated <= generated + 1;
      wait_cnt  <= gap;
      if (next_idx == (IDX_W+1)'(CACHE_DEPTH - 1)) busy <= 1'b0;
      next_idx <= next_idx + 1'b1;
    end
endmodule
