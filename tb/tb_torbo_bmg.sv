// Exhaustive test of the turbo decoder's branch metric generator: all
// 6-bit (x, z, y) triples; P = x + z and Q = P + y are compared with integer
// sums in the 8-bit format (inputs doubled to 3 fraction bits), saturated
// at each adder as in the hardware. Combinational; checked after 1 unit.
module tb_torbo_bmg;
  import torbo_pkg::*;
  int checks = 0, failures = 0;
  sym_t x, z, y;
  metric_t p, q, y8;

  torbo_bmg dut (.x(x), .z(z), .y(y), .p(p), .q(q), .y8(y8));

  function automatic int clip(int v);
    return (v < -128) ? -128 : (v > 127) ? 127 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ep, eq;
    for (int i = -32; i < 32; i++)
      for (int j = -32; j < 32; j++)
        for (int k = -32; k < 32; k++) begin
          x = 6'(i); z = 6'(j); y = 6'(k);
          #1;
          ep = clip(2 * i + 2 * j);
          eq = clip(ep + 2 * k);
          checks++;
          if (int'(p) != ep || int'(q) != eq || int'(y8) != 2 * k) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d z=%0d y=%0d: p=%0d q=%0d y8=%0d", i, j, k, p, q, y8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
