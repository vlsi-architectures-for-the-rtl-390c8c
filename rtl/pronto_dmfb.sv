// Sliding-window MAX-DMFB soft-output detector for the two-state 1-D
// channel (one interleave of a PR4 read channel), one symbol per clock.
//
// Algorithm (difference metrics, MAX approximation):
//   forward   A(k)  = lim(A(k-1),  y(k)-1,  y(k)+1),  A(1) = y(1)-1 after INIT
//   backward  B'(j) = lim(B'(j+1), y(j+1)-1, y(j+1)+1), B'(k+L) = 0
//   output    L(k)  = A(k) - B'(k)
// B' is the negated backward difference metric: negating the backward limiter
// turns its thresholds -(y+1), -(y-1) into y-1, y+1, so all L+1 limiters
// share the branch metrics of one BMG and a single two's complementor
// negates B' before the final adder. B'(k) is learnt over the L symbols
// y(k+1)..y(k+L), starting from equiprobable states.
//
// Architecture (pipelined, one backward limiter per window position): the
// BMG output pair (y-1, y+1) of each input symbol enters a 2L-stage shift
// register. Backward stage s (s = 1..L) is a limiter followed by a register;
// it takes its thresholds from shift register tap 2(s-1), so the wave front
// of one window moves through the chain one stage per clock while the
// symbols it needs arrive at the same pace. The forward limiter uses the
// last tap 2L-1; its INIT select (forcing the known start state, A = y-1)
// is driven by the reset input delayed by a matching 2L-stage shift register.
// Soft output latency: L(k) appears on llr 2L+2 clocks after y(k) was
// presented (20 clocks for L = 9). Registers: 2L x 12 shift register,
// L x 6 backward, 6 forward, 6 output, 2L INIT bits (300 for L = 9).
//
// What follows the detector description: window length, 6-bit format,
// limiter kernel, one BMG, one negation, INIT mux, final 6-bit adder, a
// reset delayed by a shift register. The tap positions, the negated
// backward metric and the exact latency are this design's choices.
// reset: assert for one clock together with y(1), the first symbol after a
// known state -1. No other flop needs a reset: the pipeline flushes itself.
module pronto_dmfb
  import pronto_pkg::*;
#(
  parameter int L = WINDOW
) (
  input  logic  clk,
  input  logic  reset,
  input  pval_t y,
  output pval_t llr
);
  localparam int D = 2 * L;

  pval_t gm_in, gp_in;
  pval_t gm_sr [D];
  pval_t gp_sr [D];
  pval_t b_q   [L];
  pval_t b_d   [L];
  pval_t a_q, a_lim, a_d, nb, sum;
  logic [D-1:0] init_sr;

  pronto_bmg u_bmg (.y(y), .gm(gm_in), .gp(gp_in));

  always_ff @(posedge clk) begin
    gm_sr[0] <= gm_in;
    gp_sr[0] <= gp_in;
    for (int i = 1; i < D; i++) begin
      gm_sr[i] <= gm_sr[i-1];
      gp_sr[i] <= gp_sr[i-1];
    end
    init_sr <= {init_sr[D-2:0], reset};
  end

  // backward chain
  for (genvar s = 0; s < L; s++) begin : g_bwd
    if (s == 0) begin : g_first
      pronto_limiter u_lim (.x('0), .lo(gm_sr[0]), .hi(gp_sr[0]), .out(b_d[0]));
    end else begin : g_next
      pronto_limiter u_lim (.x(b_q[s-1]), .lo(gm_sr[2*s]), .hi(gp_sr[2*s]), .out(b_d[s]));
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < L; s++) b_q[s] <= b_d[s];
  end

  // forward recursion with the initialisation select
  pronto_limiter u_fwd (.x(a_q), .lo(gm_sr[D-1]), .hi(gp_sr[D-1]), .out(a_lim));
  assign a_d = init_sr[D-1] ? gm_sr[D-1] : a_lim;

  // two's complementor and final adder
  sat_add #(.W(PW)) u_neg (.a('0),  .b(~b_q[L-1]), .cin(1'b1), .sum(nb));
  sat_add #(.W(PW)) u_out (.a(a_q), .b(nb),        .cin(1'b0), .sum(sum));

  always_ff @(posedge clk) begin
    a_q <= a_d;
    llr <= sum;
  end
endmodule
