// Limiter, the computational kernel of the MAX-DMFB recursion:
//   out = lo  when lo > x
//         hi  when x > hi
//         x   otherwise
// For the forward recursion x = A(k), lo = y(k+1) - 1, hi = y(k+1) + 1. With
// the MAX approximation the recursion needs no arithmetic at all: the output
// is always a copy of one of the three inputs, so no rounding error builds
// up along the chain. Two magnitude comparators drive two 2-to-1 selects
// (compare-select-select); lo <= hi is guaranteed by the branch metric
// generator, so the two cut-off cases never compete. Follows the detector's
// limiter; purely combinational.
module pronto_limiter
  import pronto_pkg::*;
(
  input  pval_t x,
  input  pval_t lo,
  input  pval_t hi,
  output pval_t out
);
  logic below, above;
  always_comb begin
    below = (lo > x);
    above = (x > hi);
    out   = below ? lo : (above ? hi : x);
  end
endmodule
