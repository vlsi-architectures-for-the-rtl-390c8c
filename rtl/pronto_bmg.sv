// Branch metric generator of the MAX-DMFB detector for the 1-D channel:
//   gm = y - 1,  gp = y + 1   (6-bit, saturating)
// The noise-variance factor 2/sigma^2 is dropped: every difference metric is
// a copy of some branch metric, so the soft outputs only come out scaled by
// sigma^2/2. Both are additions of a constant, made with the saturating
// adder; saturation keeps gm <= gp. Purely combinational.
module pronto_bmg
  import pronto_pkg::*;
(
  input  pval_t y,
  output pval_t gm,
  output pval_t gp
);
  sat_add #(.W(PW)) u_m (.a(y), .b(-P_ONE), .cin(1'b0), .sum(gm));
  sat_add #(.W(PW)) u_p (.a(y), .b(P_ONE),  .cin(1'b0), .sum(gp));
endmodule
