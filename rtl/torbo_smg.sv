// State metric generator (SMG) of the 4-state turbo decoder: one fully
// parallel trellis step per enabled clock, forward or backward.
//
// Trellis (state = a[k-1] + 2*a[k-2] of the recursive 7/5 encoder), with
// branch metrics 0, P, Y, Q from the BMG:
//   forward   A'(0) = MAX*(A(0),     A(2) + Q)   A'(1) = MAX*(A(0) + Q, A(2))
//             A'(2) = MAX*(A(1) + P, A(3) + Y)   A'(3) = MAX*(A(1) + Y, A(3) + P)
//   backward  eta(0,0)=B(0)    eta(0,1)=B(1)+Q   eta(1,2)=B(2)+P  eta(1,3)=B(3)+Y
//             eta(2,0)=B(0)+Q  eta(2,1)=B(1)     eta(3,2)=B(2)+Y  eta(3,3)=B(3)+P
//             B'(0)=MAX*(eta00,eta01)  B'(1)=MAX*(eta12,eta13)
//             B'(2)=MAX*(eta20,eta21)  B'(3)=MAX*(eta32,eta33)
// The new metrics are normalised by subtracting the largest of the four
// (saturating), so state 0 of the best path stays at 0. init loads the
// known start/end state (0, -inf, -inf, -inf), with -inf the most negative
// metric. The eta sums of the current backward step go out to the LLR
// generator, so it does not repeat those additions.
//
// Timing: sm holds the metrics of the current step; eta is combinational
// from sm and the branch metrics; on a clock with en=1 sm advances one step
// (init has priority). The equations follow the log-domain recursions of the
// decoder; a single shared set of adders for both directions is this
// design's choice.
module torbo_smg
  import torbo_pkg::*;
(
  input  logic    clk,
  input  logic    init,
  input  logic    en,
  input  logic    bwd,          // 0: forward recursion, 1: backward recursion
  input  metric_t p,
  input  metric_t q,
  input  metric_t y,
  output metric_t sm  [NSTATE],
  output metric_t eta [8]       // order: 00, 01, 12, 13, 20, 21, 32, 33
);
  metric_t s0q, s1q, s1p, s1y, s2q, s2p, s2y, s3y, s3p;
  metric_t ma [4], mb [4], nxt [4], norm [4];
  metric_t mx01, mx23, mx;

  // forward: operands of the four MAX* units
  sat_add #(.W(MET_W)) u_a0 (.a(sm[2]), .b(q), .cin(1'b0), .sum(s2q));
  sat_add #(.W(MET_W)) u_a1 (.a(sm[0]), .b(q), .cin(1'b0), .sum(s0q));
  sat_add #(.W(MET_W)) u_a2 (.a(sm[1]), .b(p), .cin(1'b0), .sum(s1p));
  sat_add #(.W(MET_W)) u_a3 (.a(sm[3]), .b(y), .cin(1'b0), .sum(s3y));
  sat_add #(.W(MET_W)) u_a4 (.a(sm[1]), .b(y), .cin(1'b0), .sum(s1y));
  sat_add #(.W(MET_W)) u_a5 (.a(sm[3]), .b(p), .cin(1'b0), .sum(s3p));
  // backward: the eta sums
  sat_add #(.W(MET_W)) u_b0 (.a(sm[1]), .b(q), .cin(1'b0), .sum(s1q));
  sat_add #(.W(MET_W)) u_b1 (.a(sm[2]), .b(p), .cin(1'b0), .sum(s2p));
  sat_add #(.W(MET_W)) u_b2 (.a(sm[2]), .b(y), .cin(1'b0), .sum(s2y));

  always_comb begin
    eta[0] = sm[0];   // (0,0)
    eta[1] = s1q;     // (0,1)
    eta[2] = s2p;     // (1,2)
    eta[3] = s3y;     // (1,3)
    eta[4] = s0q;     // (2,0)
    eta[5] = sm[1];   // (2,1)
    eta[6] = s2y;     // (3,2)
    eta[7] = s3p;     // (3,3)
    if (!bwd) begin
      ma[0] = sm[0]; mb[0] = s2q;
      ma[1] = s0q;   mb[1] = sm[2];
      ma[2] = s1p;   mb[2] = s3y;
      ma[3] = s1y;   mb[3] = s3p;
    end else begin
      ma[0] = eta[0]; mb[0] = eta[1];
      ma[1] = eta[2]; mb[1] = eta[3];
      ma[2] = eta[4]; mb[2] = eta[5];
      ma[3] = eta[6]; mb[3] = eta[7];
    end
  end

  for (genvar i = 0; i < NSTATE; i++) begin : g_acs
    maxstar u_ms (.x(ma[i]), .y(mb[i]), .out(nxt[i]));
  end

  always_comb begin
    mx01 = (nxt[0] >= nxt[1]) ? nxt[0] : nxt[1];
    mx23 = (nxt[2] >= nxt[3]) ? nxt[2] : nxt[3];
    mx   = (mx01 >= mx23) ? mx01 : mx23;
  end

  for (genvar i = 0; i < NSTATE; i++) begin : g_norm
    sat_add #(.W(MET_W)) u_n (.a(nxt[i]), .b(~mx), .cin(1'b1), .sum(norm[i]));
  end

  always_ff @(posedge clk) begin
    if (init) begin
      sm[0] <= '0;
      for (int i = 1; i < NSTATE; i++) sm[i] <= MET_MIN;
    end else if (en) begin
      for (int i = 0; i < NSTATE; i++) sm[i] <= norm[i];
    end
  end
endmodule
