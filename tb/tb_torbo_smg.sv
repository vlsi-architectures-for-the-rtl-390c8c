// Random test of the state metric generator: runs forward and backward
// recursions on random branch metrics and compares the state metrics and
// eta sums with the reference equations after every step.
module tb_torbo_smg;
  import torbo_pkg::*;
  import torbo_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, init, en, bwd;
  metric_t p, q, y;
  metric_t sm [NSTATE];
  metric_t eta [8];
  met4_t ref_m;
  eta8_t ref_e;

  torbo_smg dut (.clk, .init, .en, .bwd, .p, .q, .y, .sm, .eta);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; en = 0; bwd = 0; p = 0; q = 0; y = 0;
    for (int run = 0; run < 40; run++) begin
      bwd = run[0];
      @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      ref_m = init_met();
      for (int s = 0; s < 100; s++) begin
        int pi, yi, qi;
        // samples in the decoder's range, plus occasional extremes
        pi = int'($urandom_range(100)) - 50;
        yi = int'($urandom_range(100)) - 50;
        if ($urandom_range(20) == 0) pi = 127;
        qi = clip(pi + yi, -128, 127);
        p = 8'(pi); y = 8'(yi); q = 8'(qi);
        en = ($urandom_range(3) != 0);
        #1;
        ref_e = etas(ref_m, pi, qi, yi);
        if (bwd) begin
          for (int i = 0; i < 8; i++) begin
            checks++;
            if (int'(eta[i]) != ref_e[i]) begin
              failures++;
              if (failures < 10) $display("FAIL eta[%0d]=%0d want %0d", i, eta[i], ref_e[i]);
            end
          end
        end
        if (en) ref_m = bwd ? bwd_step(ref_m, pi, qi, yi) : fwd_step(ref_m, pi, qi, yi);
        @(negedge clk);
        en = 0;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(sm[i]) != ref_m[i]) begin
            failures++;
            if (failures < 10) $display("FAIL run %0d step %0d sm[%0d]=%0d want %0d", run, s, i, sm[i], ref_m[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
