// Datapath test: a forward and a backward pass over random blocks, driven
// the way the control unit drives it (forward metrics captured before each
// step and fed back in the backward pass). LLR, W = L - sub and the hard
// decision are compared with the reference forward-backward pass.
module tb_torbo_datapath;
  import torbo_pkg::*;
  import torbo_ref_pkg::*;
  localparam int N = 40;
  int checks = 0, failures = 0;
  logic clk = 0, init, en, bwd, hard;
  sym_t x, z, y, sub, w;
  metric_t fsm [NSTATE];
  metric_t sm  [NSTATE];
  metric_t llr_o;
  int xs [], zs [], ys [], wref [], lref [];
  int ast [N + 3][4];

  torbo_datapath dut (.clk, .init, .en, .bwd, .x, .z, .y, .sub, .fsm, .sm,
                      .llr(llr_o), .w, .hard);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; en = 0; bwd = 0; x = 0; z = 0; y = 0; sub = 0;
    for (int i = 0; i < 4; i++) fsm[i] = '0;
    xs = new[N + 3]; zs = new[N + 3]; ys = new[N + 3];
    for (int blk = 0; blk < 20; blk++) begin
      for (int k = 1; k <= N + 2; k++) begin
        xs[k] = int'($urandom_range(63)) - 32;
        ys[k] = int'($urandom_range(63)) - 32;
        zs[k] = (k <= N) ? int'($urandom_range(63)) - 32 : 0;
      end
      fb_pass(N, xs, zs, ys, zs, wref, lref);
      // forward pass
      @(negedge clk); bwd = 0; init = 1;
      @(negedge clk); init = 0;
      for (int k = 1; k <= N + 2; k++) begin
        for (int i = 0; i < 4; i++) ast[k][i] = int'(sm[i]);
        x = 6'(xs[k]); z = 6'(zs[k]); y = 6'(ys[k]); en = 1;
        @(negedge clk);
      end
      en = 0;
      // backward pass
      bwd = 1; init = 1;
      @(negedge clk); init = 0;
      for (int k = N + 2; k >= 1; k--) begin
        x = 6'(xs[k]); z = 6'(zs[k]); y = 6'(ys[k]); sub = 6'(zs[k]); en = 1;
        for (int i = 0; i < 4; i++) fsm[i] = 8'(ast[k][i]);
        @(negedge clk);
        if (k <= N) begin
          checks++;
          if (int'(llr_o) != lref[k] || int'(w) != wref[k] || hard != (lref[k] >= 0)) begin
            failures++;
            if (failures < 10) $display("FAIL blk %0d k=%0d llr=%0d/%0d w=%0d/%0d",
                                        blk, k, llr_o, lref[k], w, wref[k]);
          end
        end
      end
      en = 0;
      bwd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
