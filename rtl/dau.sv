// dau: distortion approximation unit (conservative approximation).
//
// Adds the eight column partial sums tapped part-way up the array (the
// distortion of the candidate over the block rows accumulated so far) and
// compares the total with the minimum distortion recorded so far by the
// best-match selection unit. Absolute differences are never negative, so the
// partial total is a lower bound of the candidate's full distortion: when it
// already exceeds the recorded minimum the candidate cannot win, and `dis`
// tells the array to skip the rest of its computation. No candidate that could
// win is ever skipped, so the motion vector equals that of the plain full
// search. `dis` is held low until a minimum has been recorded for the block.
// Combinational: partial sums in, disable out in the same clock.
module dau
  import fsbma_pkg::*;
#(
  parameter int unsigned N = BLK
) (
  input  psum_t part_sum [N],
  input  mad_t  min_mad,
  input  logic  min_valid,
  output logic  dis
);
  mad_t est;

  always_comb begin
    est = '0;
    for (int i = 0; i < N; i++) est = est + mad_t'(part_sum[i]);
    dis = min_valid && (est > min_mad);
  end
endmodule
