// lin_regress: evaluates one trained linear (ridge) regression.
//
// est = k + sum_i (w[i] * x[i]) with unsigned per-epoch counts x, signed Q8.8
// weights w and a signed constant k in CPI x 512 units. The weights come from
// offline training and are loaded as configuration; the original work gives
// only their relative composition, not their values. The arithmetic formats
// and the purely combinational form are this design's choices.
//
// Timing: combinational, no clock.
module lin_regress
  import chill_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  feat_t [N-1:0] x,
  input  coef_t [N-1:0] w,
  input  cpi_t          k,
  output cpi_t          est
);
  always_comb begin
    est = k;
    for (int i = 0; i < N; i++) est = est + qmul(w[i], CPIW'(x[i]));
  end
endmodule
