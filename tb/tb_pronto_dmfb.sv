// MAX-DMFB detector test: random samples with resets at random times and a
// noisy 1-D channel. Every soft output is compared, at its exact latency of
// 2L+2 clocks, with the reference recursions; on the channel data the sign
// of the soft output must also recover the transmitted bits.
module tb_pronto_dmfb;
  import pronto_pkg::*;
  import pronto_ref_pkg::*;
  localparam int L = WINDOW;
  localparam int NS = 3000;
  localparam int LAT = 2 * L + 2;
  int checks = 0, failures = 0, bit_err = 0, bit_chk = 0;
  logic clk = 0, reset;
  pval_t y, llr_o;
  int ys [], lref [], us [];
  bit rs [], val [];

  pronto_dmfb dut (.clk, .reset, .y, .llr(llr_o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ys = new[NS]; rs = new[NS]; us = new[NS];
    for (int k = 0; k < NS; k++) begin
      rs[k] = (k == 5) || (k > 100 && $urandom_range(400) == 0);
      if (k < NS / 2) ys[k] = int'($urandom_range(63)) - 32;
      else begin
        // 1-D channel; the bit before a reset is -1 (known start state)
        us[k] = ($urandom_range(1) != 0) ? 1 : -1;
        if (k == NS / 2) rs[k] = 1;
        ys[k] = channel(us[k], rs[k] ? -1 : us[k - 1], 2.0);
      end
    end
    run(NS, L, ys, rs, lref, val);
    reset = 0; y = '0;
    for (int t = 0; t < NS + LAT + 2; t++) begin
      @(negedge clk);
      if (t < NS) begin
        y = 6'(ys[t]);
        reset = rs[t];
      end else begin
        y = '0; reset = 0;
      end
      if (t >= LAT && val[t - LAT]) begin
        checks++;
        if (int'(llr_o) != lref[t - LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d llr=%0d ref %0d", t - LAT, llr_o, lref[t - LAT]);
        end
        if (t - LAT > NS / 2) begin
          bit_chk++;
          if ((llr_o > 0) != (us[t - LAT] > 0) && llr_o != 0) bit_err++;
        end
      end
    end
    checks++;
    if (bit_err * 20 > bit_chk) begin
      failures++;
      $display("FAIL %0d bit errors in %0d", bit_err, bit_chk);
    end
    if (n_init == 0 || n_lo == 0 || n_hi == 0 || n_pass == 0) failures++;
    $display("detector: %0d outputs, %0d of %0d channel bits wrong", checks, bit_err, bit_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
