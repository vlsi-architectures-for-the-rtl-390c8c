// Branch metric generator of the turbo decoder.
//
// The 4-state code has only four distinct branch metrics per trellis step:
// 0 (label 00), P = x + z (label 10), Y = y (label 01) and Q = P + y
// (label 11). The three 6-bit inputs are first widened to the 8-bit metric
// format, then two saturating adders form P and Q. For the upper code x is
// the systematic sample and z the a-priori information; for the lower code
// the control unit feeds the interleaved W as x and zero as z. The noise
// scaling 2/sigma^2 is left out here because the samples arrive already
// scaled. Structure follows the decoder's BMG. Purely combinational.
module torbo_bmg
  import torbo_pkg::*;
(
  input  sym_t    x,
  input  sym_t    z,
  input  sym_t    y,
  output metric_t p,
  output metric_t q,
  output metric_t y8
);
  metric_t x8, z8;

  always_comb begin
    x8 = sym_to_met(x);
    z8 = sym_to_met(z);
    y8 = sym_to_met(y);
  end

  sat_add #(.W(MET_W)) u_p (.a(x8), .b(z8), .cin(1'b0), .sum(p));
  sat_add #(.W(MET_W)) u_q (.a(p),  .b(y8), .cin(1'b0), .sum(q));
endmodule
