// Exhaustive test of the saturating adder at 8 and 6 bits (the widths of
// the two designs), for addition and for subtraction made as a + ~b + 1:
// every operand pair is compared with the exact integer sum clipped to the
// W-bit range. Combinational; checked after a 1-unit delay.
module tb_sat_add;
  int checks = 0, failures = 0;
  logic signed [7:0] a8, b8, s8;
  logic              c8;
  logic signed [5:0] a6, b6, s6;
  logic              c6;

  sat_add #(.W(8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8));
  sat_add #(.W(6)) dut6 (.a(a6), .b(b6), .cin(c6), .sum(s6));

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); c8 = c[0];
          #1;
          checks++;
          if (int'(s8) != clip(i + j + c, -128, 127)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d -> %0d", i, j, c, s8);
          end
        end
    for (int i = -32; i < 32; i++)
      for (int j = -32; j < 32; j++) begin
        // subtraction as a + ~b + 1
        a6 = 6'(i); b6 = ~6'(j); c6 = 1'b1;
        #1;
        checks++;
        if (int'(s6) != clip(i - j, -32, 31)) begin
          failures++;
          if (failures < 10) $display("FAIL 6-bit %0d-%0d -> %0d", i, j, s6);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
