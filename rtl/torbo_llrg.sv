// Log-likelihood ratio generator (LLRG) of the turbo decoder.
//
// For trellis step k it adds the stored forward metrics A(k-1) to the eta
// sums (backward metric plus branch metric) of the same step:
//   lambda(s',s) = A(s') + eta(s',s)
// and forms
//   L = MAX*(MAX*(l01, l20), MAX*(l12, l33)) - MAX*(MAX*(l00, l21), MAX*(l13, l32))
// where the first group holds the branches with input bit 1 and the second
// those with input bit 0. All arithmetic is 8-bit saturating. The result is
// registered once (on en), which splits the long MAX* trees from the state
// metric loop; that pipeline register is this design's choice.
module torbo_llrg
  import torbo_pkg::*;
(
  input  logic    clk,
  input  logic    en,
  input  metric_t fsm [NSTATE],  // A(k-1)
  input  metric_t eta [8],       // order: 00, 01, 12, 13, 20, 21, 32, 33
  output metric_t llr
);
  // source state of each eta entry
  localparam int SRC [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  metric_t lam [8];
  metric_t n0, n1, d0, d1, num, den, l;

  for (genvar i = 0; i < 8; i++) begin : g_lam
    sat_add #(.W(MET_W)) u_l (.a(fsm[SRC[i]]), .b(eta[i]), .cin(1'b0), .sum(lam[i]));
  end

  // input-1 branches: (0,1)=1, (2,0)=4, (1,2)=2, (3,3)=7
  maxstar u_n0 (.x(lam[1]), .y(lam[4]), .out(n0));
  maxstar u_n1 (.x(lam[2]), .y(lam[7]), .out(n1));
  maxstar u_n  (.x(n0),     .y(n1),     .out(num));
  // input-0 branches: (0,0)=0, (2,1)=5, (1,3)=3, (3,2)=6
  maxstar u_d0 (.x(lam[0]), .y(lam[5]), .out(d0));
  maxstar u_d1 (.x(lam[3]), .y(lam[6]), .out(d1));
  maxstar u_d  (.x(d0),     .y(d1),     .out(den));

  sat_add #(.W(MET_W)) u_sub (.a(num), .b(~den), .cin(1'b1), .sum(l));

  always_ff @(posedge clk) begin
    if (en) llr <= l;
  end
endmodule
