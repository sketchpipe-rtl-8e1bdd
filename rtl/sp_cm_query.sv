// sp_cm_query: count-min estimate and heavy-key decision for one key.
//
// The control plane reads, for a flow key, the counter it hashes to in every
// sketch array (counts, one per array; mask marks the arrays that exist).
// The count-min estimate of the flow size is the smallest of those
// counters; the key is heavy when the estimate reaches the user threshold.
// With an empty mask the estimate is 0. Purely combinational.
module sp_cm_query
  import sp_pkg::*;
(
  input  cnt_t    counts [MAX_ARRAYS],
  input  bitmap_t mask,
  input  cnt_t    threshold,
  output cnt_t    estimate,
  output logic    heavy
);
  always_comb begin
    automatic logic any = 1'b0;
    estimate = '0;
    for (int unsigned j = 0; j < MAX_ARRAYS; j++)
      if (mask[j] && (!any || counts[j] < estimate)) begin
        estimate = counts[j];
        any      = 1'b1;
      end
    heavy = any && estimate >= threshold;
  end
endmodule
