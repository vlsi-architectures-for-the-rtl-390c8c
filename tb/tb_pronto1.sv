// PRONTO-1 core test in both pin modes. A stream of noisy 1-D channel
// samples is run once at single speed (one symbol per clock on y1, output
// on l1 22 clocks later) and once at double speed (symbol pairs on y1/y2
// held for two clocks, output pairs on l1/l2 23 clocks after the pair is
// first presented, held for two clocks). Outputs are compared with the
// reference recursions.
module tb_pronto1;
  import pronto_pkg::*;
  import pronto_ref_pkg::*;
  localparam int NS = 1200;
  localparam int LAT1 = 22, LAT2 = 23;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;
  logic clk = 0, reset, dbl, pin_ph;
  pval_t y1, y2, l1, l2;
  int ys [], lref [], us [];
  bit rs [], val [];

  pronto1 dut (.clk, .reset, .dbl, .y1, .y2, .l1, .l2, .pin_ph);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int i, pval_t got);
    checks++;
    if (int'(got) != lref[i]) begin
      failures++;
      if (failures < 10) $display("FAIL %s k=%0d got %0d ref %0d", what, i, got, lref[i]);
    end
  endtask

  initial begin
    ys = new[NS]; rs = new[NS]; us = new[NS];
    for (int k = 0; k < NS; k++) begin
      us[k] = ($urandom_range(1) != 0) ? 1 : -1;
      ys[k] = channel(us[k], (k == 0) ? -1 : us[k - 1], 4.0);
      rs[k] = (k == 0);
    end
    run(NS, WINDOW, ys, rs, lref, val);

    for (int mode = 0; mode < 2; mode++) begin
      dbl = 1'(mode); y1 = '0; y2 = '0;
      @(negedge clk); reset = 1;
      @(negedge clk); reset = 0;
      for (int t = 0; t < NS + LAT2 + 4; t++) begin
        // drive symbols for this clock
        if (mode == 0) y1 = (t < NS) ? 6'(ys[t]) : '0;
        else if (t % 2 == 0) begin
          y1 = (t < NS) ? 6'(ys[t]) : '0;
          y2 = (t + 1 < NS) ? 6'(ys[t + 1]) : '0;
          checks++;
          if (pin_ph != 1'b0) failures++;
        end
        // outputs of this clock
        if (mode == 0) begin
          if (t >= LAT1 && val[t - LAT1]) begin
            chk("single", t - LAT1, l1);
            n_single++;
          end
        end else if (t >= LAT2) begin
          automatic int j = t - LAT2;
          automatic int p = j - (j % 2);
          if (val[p] && val[p + 1]) begin
            chk("double l1", p, l1);
            chk("double l2", p + 1, l2);
            n_double++;
          end
        end
        @(negedge clk);
      end
    end
    if (n_single == 0 || n_double == 0) failures++;
    $display("pronto1: %0d single-speed and %0d double-speed output checks", n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
