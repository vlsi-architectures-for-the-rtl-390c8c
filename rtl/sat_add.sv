// Saturating two's complement adder: sum = a + b + cin, clipped to the most
// positive (0111..1) or most negative (1000..0) number when the exact result
// does not fit in W bits.
//
// Structure: a plain W-bit adder whose result is replaced by a constant when
// both operands have the same sign and the sum's sign differs from it; the
// constant's sign is that of operand a (its MSB followed by W-1 inverted
// copies). A subtraction a - b is made by feeding ~b and cin = 1, which the
// same overflow rule handles correctly. The structure follows the saturating
// adder of the decoder datapath; the parameterised width is this design's
// choice so that the 6-bit detector can reuse it. Purely combinational.
module sat_add #(
  parameter int W = 8
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                cin,
  output logic signed [W-1:0] sum
);
  logic signed [W-1:0] s;
  logic                out_of_range;

  always_comb begin
    s            = a + b + W'(cin);
    out_of_range = (a[W-1] == b[W-1]) && (s[W-1] != a[W-1]);
    sum          = out_of_range ? {a[W-1], {(W-1){~a[W-1]}}} : s;
  end
endmodule
