// Simplified MAX* operator: out = MAX(x, y) + f(x - y), where the
// correction f(d) = ln(1 + exp(-|d|)) is replaced by a two-valued rule:
// f = 0.375 when -2.0 <= d < 2.0, otherwise 0.
//
// How it works (8-bit metrics with 3 fraction bits): d = x - y is formed by
// a saturating subtractor; its sign bit d[7] selects the larger operand.
// The window test only looks at the upper four bits: for d >= 0 they are
// all zero exactly when d < 2.0, for d < 0 they are all ones exactly when
// d >= -2.0. The test result is added as the constant 3 (0.375) by a
// saturating adder. The rule, the four-bit test and the one-subtractor
// structure follow the decoder's simplified MAX* circuit; saturating the
// difference (so that a wrapped d can never select the wrong operand) is
// this design's choice. Purely combinational.
module maxstar
  import torbo_pkg::*;
(
  input  metric_t x,
  input  metric_t y,
  output metric_t out
);
  metric_t d, mx, corr;
  logic    in_window;

  sat_add #(.W(MET_W)) u_sub (.a(x), .b(~y), .cin(1'b1), .sum(d));

  always_comb begin
    mx        = d[MET_W-1] ? y : x;
    in_window = d[MET_W-1] ? (&d[MET_W-1:MET_W-4]) : ~(|d[MET_W-1:MET_W-4]);
    corr      = in_window ? MAXSTAR_CORR : '0;
  end

  sat_add #(.W(MET_W)) u_add (.a(mx), .b(corr), .cin(1'b0), .sum(out));
endmodule
