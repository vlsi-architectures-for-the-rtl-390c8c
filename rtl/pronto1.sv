// PRONTO-1 detector chip core: one MAX-DMFB soft-output detector for the
// 1-D channel with the single/double-speed input/output logic that lets a
// tester with half the core's pin rate exercise it at full core speed.
//
// Single speed (dbl = 0): one symbol per core clock enters on y1, one soft
// output per clock leaves on l1 (l2 is held at zero).
// Double speed (dbl = 1): the pins run at half the core rate. pin_ph is the
// pin-rate strobe made by dividing the core clock by two; the tester holds
// a pair of symbols on (y1, y2) for the two core clocks pin_ph = 0, 1, and
// the core takes y1 first, then y2. The two soft outputs of a pair are
// collected and presented together on (l1, l2), which change at the end of
// a pin_ph = 0 clock, l1 being the earlier one.
// reset (one core clock) clears the pin phase and restarts the detector;
// the first symbol is the one presented in the clock after reset, and in
// double-speed mode the first pair is the one presented then.
// Latency: in single-speed mode the soft output of the symbol on y1 in core
// clock c is on l1 in clock c+22 (input register, detector 20, output
// register); in double-speed mode the pair presented from clock c appears
// on (l1, l2) from clock c+23.
//
// The clock doubler that makes the core clock from the tester clock is
// outside this module. The use of y1/y2, l1/l2 and the dbl pin follows the
// chip description; the pin strobe, pair order, reset alignment and
// registered pins are this design's choices.
module pronto1
  import pronto_pkg::*;
(
  input  logic  clk,      // core clock
  input  logic  reset,
  input  logic  dbl,
  input  pval_t y1,
  input  pval_t y2,
  output pval_t l1,
  output pval_t l2,
  output logic  pin_ph
);
  pval_t y_core, llr, hold;
  logic  rst_q, rst_core;
  logic  out_ph;

  // input register: pick the symbol of this core clock
  always_ff @(posedge clk) begin
    y_core   <= (dbl && pin_ph) ? y2 : y1;
    rst_q    <= reset;
    rst_core <= rst_q;      // lines up with the first symbol in y_core
    pin_ph   <= reset ? 1'b0 : ~pin_ph;
  end

  pronto_dmfb u_det (.clk(clk), .reset(rst_core), .y(y_core), .llr(llr));

  // output: a symbol taken at pin_ph = 0 leaves the detector 21 clocks
  // later, in a pin_ph = 1 clock; out_ph is the phase of the detector output.
  assign out_ph = ~pin_ph;

  always_ff @(posedge clk) begin
    if (!dbl) begin
      l1 <= llr;
      l2 <= '0;
    end else if (!out_ph) begin
      hold <= llr;
    end else begin
      l1 <= hold;
      l2 <= llr;
    end
  end
endmodule
