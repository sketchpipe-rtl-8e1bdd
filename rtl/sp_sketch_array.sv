// sp_sketch_array: one count-min counter array as a pipeline stage.
//
// The array holds N_COUNTERS counters of CNT_W bits and sits in one
// match-action stage of one ingress or egress. A packet entering the stage
// is hashed (seed of array ARRAY_ID) to one counter, which is updated with a
// read-modify-write in the same cycle:
//   * a normal packet adds 1 (count-min update);
//   * a state packet adds its piggybacked count, but only when bit ARRAY_ID
//     of its bitmap is set and no array that must precede this one (PRED) is
//     still pending; the bit is then cleared in the forwarded packet.
// Other packets pass unchanged. Counters saturate instead of wrapping.
//
// epoch_clear zeroes every counter in one cycle: each counter has a "written"
// flag and reads as 0 while the flag is clear (this design's choice; the
// measurement epoch itself is handled by software).
// A second, combinational read port (q_key -> q_count) serves the control
// plane when it collects the sketch.
//
// Timing: one register stage, out_* is in_* delayed by one cycle. A counter
// written in cycle t is seen by a packet in cycle t+1.
module sp_sketch_array
  import sp_pkg::*;
#(
  parameter int unsigned ARRAY_ID   = 0,
  parameter int unsigned N_COUNTERS = 65536,
  parameter bitmap_t     PRED       = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic epoch_clear,
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic out_valid,
  output pkt_t out_pkt,
  output logic upd_state,   // a state packet updated this array this cycle
  input  key_t q_key,
  output cnt_t q_count
);
  localparam int unsigned IW = (N_COUNTERS > 1) ? $clog2(N_COUNTERS) : 1;

  cnt_t                  mem   [N_COUNTERS];
  logic [N_COUNTERS-1:0] wrote;

  logic [IW-1:0] idx, q_idx;
  logic          do_norm, do_state;
  cnt_t          cur, nxt;

  sp_hash #(.OUT_W(IW)) u_hash  (.key(in_pkt.key), .seed(array_seed(ARRAY_ID)), .idx(idx));
  sp_hash #(.OUT_W(IW)) u_qhash (.key(q_key),      .seed(array_seed(ARRAY_ID)), .idx(q_idx));

  always_comb begin
    do_norm   = in_valid && !in_pkt.is_state;
    do_state  = in_valid && in_pkt.is_state && in_pkt.bitmap[ARRAY_ID]
                && ((in_pkt.bitmap & PRED) == '0);
    cur       = wrote[idx] ? mem[idx] : '0;
    nxt       = sat_add(cur, do_norm ? cnt_t'(1) : in_pkt.cnt);
    upd_state = do_state;
    q_count   = wrote[q_idx] ? mem[q_idx] : '0;
  end

  always_ff @(posedge clk)
    if (do_norm || do_state) mem[idx] <= nxt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    wrote <= '0;
    else if (epoch_clear)          wrote <= '0;
    else if (do_norm || do_state)  wrote[idx] <= 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pkt   <= in_pkt;
      if (do_state) out_pkt.bitmap[ARRAY_ID] <= 1'b0;
    end
endmodule
