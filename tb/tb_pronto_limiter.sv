// Exhaustive test of the limiter: every 6-bit input against every ordered
// threshold pair (lo <= hi, the only case the branch metric generator
// produces), compared with clamp(x, lo, hi) computed with integers. The
// limiter is combinational, so each case is checked after a 1-unit delay;
// the test fails if any of the three cases (low, high, pass) never occurs.
module tb_pronto_limiter;
  import pronto_pkg::*;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_pass = 0;
  pval_t x, lo, hi, o;

  pronto_limiter dut (.x, .lo, .hi, .out(o));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int l = -32; l < 32; l++)
      for (int h = l; h < 32; h++)
        for (int v = -32; v < 32; v++) begin
          x = 6'(v); lo = 6'(l); hi = 6'(h);
          #1;
          if (v < l)      begin e = l; n_lo++;   end
          else if (v > h) begin e = h; n_hi++;   end
          else            begin e = v; n_pass++; end
          checks++;
          if (int'(o) != e) begin
            failures++;
            if (failures < 10) $display("FAIL lim(%0d,[%0d,%0d])=%0d", v, l, h, o);
          end
        end
    if (n_lo == 0 || n_hi == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
