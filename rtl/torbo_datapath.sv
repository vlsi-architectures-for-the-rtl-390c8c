// Datapath of the turbo decoder: branch metric generator, state metric
// generator and LLR generator, plus the extraction of the value passed to
// the other constituent decoder.
//
// One trellis step per cycle with en=1. In a forward pass the SMG advances
// the forward metrics and sm is written to memory by the control unit. In a
// backward pass the SMG advances the backward metrics while the LLRG
// combines its eta sums with the forward metrics fsm read back from memory.
// One cycle after the step, llr holds L(k) and
//     w = L(k) - sub   (6-bit, saturated),
// where sub is the decoder's a-priori input of that step (Z for the upper
// code, the interleaved W for the lower code): subtracting it leaves the
// systematic plus extrinsic part for the next decoder. hard is the bit
// decision (1 when L >= 0). sub is registered together with the LLR.
module torbo_datapath
  import torbo_pkg::*;
(
  input  logic    clk,
  input  logic    init,      // load the known start/end state
  input  logic    en,        // one trellis step
  input  logic    bwd,       // 0: forward pass, 1: backward pass
  input  sym_t    x,         // systematic part of the branch metric
  input  sym_t    z,         // a-priori part (0 for the lower code)
  input  sym_t    y,         // parity sample
  input  sym_t    sub,       // value removed from the LLR
  input  metric_t fsm [NSTATE],
  output metric_t sm  [NSTATE],
  output metric_t llr,
  output sym_t    w,
  output logic    hard
);
  metric_t p, q, y8, diff;
  metric_t eta [8];
  sym_t    sub_q;

  torbo_bmg  u_bmg  (.x(x), .z(z), .y(y), .p(p), .q(q), .y8(y8));
  torbo_smg  u_smg  (.clk(clk), .init(init), .en(en), .bwd(bwd),
                     .p(p), .q(q), .y(y8), .sm(sm), .eta(eta));
  torbo_llrg u_llrg (.clk(clk), .en(en && bwd), .fsm(fsm), .eta(eta), .llr(llr));

  always_ff @(posedge clk) begin
    if (en && bwd) sub_q <= sub;
  end

  sat_add #(.W(MET_W)) u_ext (.a(llr), .b(~sym_to_met(sub_q)), .cin(1'b1), .sum(diff));

  always_comb begin
    w    = met_to_sym(diff);
    hard = ~llr[MET_W-1];
  end
endmodule
