// Random test of the LLR generator against the reference equations,
// including its one-cycle pipeline register.
module tb_torbo_llrg;
  import torbo_pkg::*;
  import torbo_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en;
  metric_t fsm [NSTATE];
  metric_t eta [8];
  metric_t llr_o;
  met4_t a;
  eta8_t e;

  torbo_llrg dut (.clk, .en, .fsm, .eta, .llr(llr_o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, prev;
    en = 0;
    prev = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        a[i] = int'($urandom_range(255)) - 128;
        if ($urandom_range(3) == 0) a[i] = int'($urandom_range(40)) - 40;
        fsm[i] = 8'(a[i]);
      end
      for (int i = 0; i < 8; i++) begin
        e[i] = int'($urandom_range(80)) - 60;
        eta[i] = 8'(e[i]);
      end
      en = (t % 7 != 3);
      want = en ? llr(a, e) : prev;
      @(negedge clk);
      en = 0;
      checks++;
      if (int'(llr_o) != want) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d llr=%0d want %0d", t, llr_o, want);
      end
      prev = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
