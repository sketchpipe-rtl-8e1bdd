// sp_state_router: chooses where a state packet goes next.
//
// A state packet's bitmap lists the arrays that still have to measure its
// key. An array j is eligible when its bit is set and none of the arrays that
// must precede it (pred[j], the visiting-order matrix D) is still set. The
// router picks the lowest-numbered eligible array and sends the packet to
// the compound pipeline hosting it (the traffic manager delivers it to that
// pipeline's egress; an ingress array is reached after the packet
// recirculates there). With an empty bitmap the key is fully measured and
// the packet returns to its home pipeline to drain the next cache entry.
// If set bits exist but none is eligible (a cyclic order), the lowest set
// bit is taken so that the packet cannot stall.
//
// Picking the lowest eligible index among several is this design's choice.
// Purely combinational.
module sp_state_router
  import sp_pkg::*;
#(
  parameter int unsigned N_ARRAYS   = 4,
  parameter place_pipe_t ARRAY_PIPE = default_place_pipe(),
  parameter pred_t       PRED       = '0
) (
  input  bitmap_t bitmap,
  input  pipe_t   home,
  output logic    sel_valid,   // a target array was chosen
  output logic [$clog2(MAX_ARRAYS)-1:0] sel_array,
  output pipe_t   dest
);
  bitmap_t eligible;
  logic    found_e, found_s;
  logic [$clog2(MAX_ARRAYS)-1:0] first_e, first_s;

  always_comb begin
    eligible = '0;
    for (int unsigned j = 0; j < N_ARRAYS; j++)
      eligible[j] = bitmap[j] && ((bitmap & PRED[j]) == '0);

    found_e = 1'b0; first_e = '0;
    found_s = 1'b0; first_s = '0;
    for (int j = N_ARRAYS - 1; j >= 0; j--) begin
      if (eligible[j]) begin found_e = 1'b1; first_e = j[$clog2(MAX_ARRAYS)-1:0]; end
      if (bitmap[j])   begin found_s = 1'b1; first_s = j[$clog2(MAX_ARRAYS)-1:0]; end
    end

    sel_valid = found_s;
    sel_array = found_e ? first_e : first_s;
    dest      = found_s ? ARRAY_PIPE[sel_array] : home;
  end
endmodule
