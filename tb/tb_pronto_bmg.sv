// Exhaustive test of the detector's branch metric generator: for all 64
// samples y, gm and gp must equal y - 1.0 and y + 1.0 (16 units of 1/16)
// clipped to the 6-bit range. Combinational; checked after a 1-unit delay.
module tb_pronto_bmg;
  import pronto_pkg::*;
  int checks = 0, failures = 0;
  pval_t y, gm, gp;

  pronto_bmg dut (.y, .gm, .gp);

  function automatic int clip(int v);
    return (v < -32) ? -32 : (v > 31) ? 31 : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      y = 6'(v);
      #1;
      checks++;
      if (int'(gm) != clip(v - 16) || int'(gp) != clip(v + 16)) begin
        failures++;
        $display("FAIL y=%0d gm=%0d gp=%0d", v, gm, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
