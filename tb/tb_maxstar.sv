// Exhaustive test of the simplified MAX*: every pair of 8-bit metrics
// against max(x, y) + 3 when -16 <= x - y < 16, saturated.
module tb_maxstar;
  import torbo_pkg::*;
  int checks = 0, failures = 0, corrected = 0;
  metric_t x, y, o;

  maxstar dut (.x(x), .y(y), .out(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, e;
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        m = (i > j) ? i : j;
        if (i - j >= -16 && i - j < 16) begin e = m + 3; corrected++; end
        else e = m;
        if (e > 127) e = 127;
        checks++;
        if (int'(o) != e) begin
          failures++;
          if (failures < 10) $display("FAIL max*(%0d,%0d) = %0d, want %0d", i, j, o, e);
        end
      end
    if (corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
