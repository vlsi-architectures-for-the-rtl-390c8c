// End-to-end test of both decoders at full size, with every parameter at
// its default. The turbo decoder takes N = 1024 blocks over its host
// handshake (a noiseless rate-1/3 block, then noisy rate-1/3 and rate-1/2
// blocks at ten iterations, and one block decoded with one and with eight
// iterations, which must lose errors) with full-depth SRAM models; the error count,
// the final a-priori values and the 4N+18 cycles per iteration are checked
// against the reference decoder. At the same time the detector runs a noisy
// 1-D channel stream at single and at double pin speed, checked output by
// output against the reference recursions and for its bit decisions.
// Each mechanism is counted and the test fails if one is never exercised:
// handshakes and reports, several iterations, the interleaved out-of-order
// writes, puncturing, non-zero error counts, the MAX* correction term,
// saturation, the detector's INIT, each limiter case and both pin modes.
module tb_fb_vlsi_top;
  import torbo_pkg::*;
  import pronto_pkg::*;
  import torbo_ref_pkg::*;
  import pronto_ref_pkg::*;
  localparam int N = 1024;
  localparam int NS = 4000;
  int checks = 0, failures = 0;

  // turbo side
  logic t_clk = 0, t_reset;
  logic [15:0] t_n_in, t_error_count, t_sun_data_out;
  logic [4:0]  t_iter_in, t_iter_cnt;
  logic [31:0] t_sun_data_in;
  logic t_wanted_in, t_ready_in, t_ready_out, t_ack_out;
  sram_req_t t_ram_a_req, t_ram_b_req, t_ram_c_req;
  logic [63:0] t_ram_a_rdata, t_ram_b_rdata, t_ram_c_rdata;
  stage_e t_stage;
  // detector side
  logic p_clk = 0, p_reset, p_dbl, p_pin_ph;
  pval_t p_y1, p_y2, p_l1, p_l2;

  // mechanism counters
  int n_words = 0, n_reports = 0, max_iter = 0, n_ooo = 0, n_punct = 0;
  int n_err_blocks = 0, n_zero_blocks = 0, n_single = 0, n_double = 0;
  int bit_err = 0, bit_chk = 0;
  int err_one = 0, n_gain = 0;

  fb_vlsi_top dut (.*);
  tm2_sram_model u_ra (.clk(t_clk), .req(t_ram_a_req), .rdata(t_ram_a_rdata));
  tm2_sram_model u_rb (.clk(t_clk), .req(t_ram_b_req), .rdata(t_ram_b_rdata));
  tm2_sram_model u_rc (.clk(t_clk), .req(t_ram_c_req), .rdata(t_ram_c_rdata));

  always #5 t_clk = ~t_clk;
  always #4 p_clk = ~p_clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- turbo decoder ----------------
  stage_e prev_stage;
  int     stage_cycles;
  longint t_start;
  logic [16:0] last_wa;
  always @(posedge t_clk) begin
    if (t_reset) begin
      prev_stage   <= ST_IDLE;
      stage_cycles <= 0;
    end else begin
      if (t_stage != prev_stage) begin
        if (t_stage == ST_FWD0 && prev_stage == ST_LOAD_DATA) t_start <= $time;
        if (prev_stage inside {ST_FWD0, ST_FWD1, ST_BWD0, ST_BWD1}) begin
          checks++;
          if (stage_cycles != ((prev_stage inside {ST_FWD0, ST_FWD1}) ? N + 4 : N + 5)) begin
            failures++;
            $display("FAIL stage %s took %0d cycles", prev_stage.name(), stage_cycles);
          end
        end
        stage_cycles <= 1;
      end else stage_cycles <= stage_cycles + 1;
      prev_stage <= t_stage;
      if (int'(t_iter_cnt) > max_iter) max_iter <= int'(t_iter_cnt);
      // interleaved writes of the extrinsic values: out of address order
      if (t_stage == ST_BWD0 && t_ram_c_req.ce && t_ram_c_req.we) begin
        if (t_ram_c_req.addr != last_wa - 17'd1 && t_ram_c_req.addr != last_wa + 17'd1) n_ooo++;
        last_wa <= t_ram_c_req.addr;
      end
    end
  end

  task automatic send(logic [31:0] w);
    t_sun_data_in <= w;
    @(posedge t_clk);
    while (!t_wanted_in) @(posedge t_clk);
    t_ready_in <= 1;
    @(posedge t_clk);
    while (t_wanted_in) @(posedge t_clk);
    t_ready_in <= 0;
    n_words++;
  endtask

  task automatic receive(output logic [15:0] v);
    while (!t_ready_out) @(posedge t_clk);
    v = t_sun_data_out;
    t_ack_out <= 1;
    @(posedge t_clk);
    while (t_ready_out) @(posedge t_clk);
    t_ack_out <= 0;
    @(posedge t_clk);
    n_reports++;
  endtask

  task automatic run_block(torbo_block b, int iters, bit first);
    int zref [];
    int eref;
    longint t1;
    logic [15:0] got;
    t_iter_in <= 5'(iters);
    if (first) for (int k = 1; k <= N; k++) send(b.perm_word(k));
    for (int k = 1; k <= N + 2; k++) send(b.data_word(k));
    eref = b.ref_decode(iters, zref);
    while (!t_ready_out) @(posedge t_clk);
    t1 = $time;
    checks++;
    if ((t1 - t_start) / 10 != iters * (4 * N + 18) + 1) begin
      failures++;
      $display("FAIL decode took %0d cycles for %0d iterations", (t1 - t_start) / 10, iters);
    end
    receive(got);
    checks++;
    if (got != 16'(eref) || t_error_count != 16'(eref)) begin
      failures++;
      $display("FAIL error count %0d, reference %0d", got, eref);
    end
    if (got != 0) n_err_blocks++; else n_zero_blocks++;
    for (int k = 1; k <= N; k++) begin
      checks++;
      if (int'($signed(u_ra.mem[k][8*RA_Z +: 6])) != zref[k]) begin
        failures++;
        if (failures < 10) $display("FAIL Z[%0d]=%0d ref %0d", k,
                                    $signed(u_ra.mem[k][8*RA_Z +: 6]), zref[k]);
      end
    end
    $display("turbo block N=%0d: %0d iterations, %0d errors (reference %0d)", N, iters, got, eref);
  endtask

  task automatic turbo_flow();
    torbo_block b, c;
    t_reset = 1; t_ready_in = 0; t_ack_out = 0; t_sun_data_in = '0;
    t_n_in = 16'(N); t_iter_in = 5'd1;
    repeat (3) @(posedge t_clk);
    t_reset <= 0;
    b = new();
    b.make(N, 4.0, 0.0, 1'b0);
    run_block(b, 2, 1'b1);
    for (int r = 0; r < 2; r++) begin
      c = new();
      c.n = N;
      c.perm = b.perm; c.iperm = b.iperm;
      c.make_keep_perm(4.0, (r == 0) ? 7.0 : 5.0, r[0]);
      if (r[0]) n_punct++;
      run_block(c, 10, 1'b0);
    end
    // turbo gain: one block at about 1.5 dB Eb/N0 (rate 1/3), decoded with
    // one and with eight iterations; iterating must remove errors
    c = new();
    c.n = N;
    c.perm = b.perm; c.iperm = b.iperm;
    c.make_keep_perm(4.0, 4.0, 1'b0);
    run_block(c, 1, 1'b0);
    err_one = int'(t_error_count);
    run_block(c, 8, 1'b0);
    checks++;
    if (!(int'(t_error_count) < err_one && err_one > 0)) begin
      failures++;
      $display("FAIL no turbo gain: %0d errors after 1 iteration, %0d after 8", err_one, t_error_count);
    end else n_gain++;
  endtask

  // ---------------- detector ----------------
  int ys [], lref [], us [];
  bit rs [], val [];

  task automatic pchk(int i, pval_t got);
    checks++;
    if (int'(got) != lref[i]) begin
      failures++;
      if (failures < 10) $display("FAIL detector k=%0d got %0d ref %0d", i, got, lref[i]);
    end
    if (i > 0) begin
      bit_chk++;
      if ((got > 0) != (us[i] > 0) || got == 0) bit_err++;
    end
  endtask

  task automatic pronto_flow();
    ys = new[NS]; rs = new[NS]; us = new[NS];
    for (int k = 0; k < NS; k++) begin
      us[k] = ($urandom_range(1) != 0) ? 1 : -1;
      ys[k] = pronto_ref_pkg::channel(us[k], (k == 0) ? -1 : us[k - 1], 6.0);
      rs[k] = (k == 0);
    end
    run(NS, WINDOW, ys, rs, lref, val);
    p_reset = 0; p_y1 = '0; p_y2 = '0;
    for (int mode = 0; mode < 2; mode++) begin
      p_dbl = 1'(mode);
      @(negedge p_clk); p_reset = 1;
      @(negedge p_clk); p_reset = 0;
      for (int t = 0; t < NS + 30; t++) begin
        if (mode == 0) p_y1 = (t < NS) ? 6'(ys[t]) : '0;
        else if (t % 2 == 0) begin
          p_y1 = (t < NS) ? 6'(ys[t]) : '0;
          p_y2 = (t + 1 < NS) ? 6'(ys[t + 1]) : '0;
        end
        if (mode == 0) begin
          if (t >= 22 && val[t - 22]) begin pchk(t - 22, p_l1); n_single++; end
        end else if (t >= 23 && (t - 23) % 2 == 0) begin
          automatic int p = t - 23;
          if (val[p] && val[p + 1]) begin
            pchk(p, p_l1);
            pchk(p + 1, p_l2);
            n_double++;
          end
        end
        @(negedge p_clk);
      end
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-34s %0d", what, count);
  endtask

  initial begin
    fork
      turbo_flow();
      pronto_flow();
    join
    // 6% of the channel bits at this noise level is far above what the
    // detector makes; the decisions must be mostly right
    checks++;
    if (bit_err * 16 > bit_chk) begin
      failures++;
      $display("FAIL detector: %0d wrong decisions in %0d", bit_err, bit_chk);
    end
    $display("mechanisms:");
    need("host words received", n_words);
    need("error-count reports", n_reports);
    need("iterations beyond the first", max_iter > 1 ? max_iter : 0);
    need("interleaved out-of-order writes", n_ooo);
    need("punctured (rate 1/2) blocks", n_punct);
    need("blocks with errors", n_err_blocks);
    need("blocks without errors", n_zero_blocks);
    need("fewer errors with more iterations", n_gain);
    need("MAX* correction applied", int'(torbo_ref_pkg::n_corr));
    need("saturating adds clipped", int'(torbo_ref_pkg::n_sat));
    need("detector INIT", int'(n_init));
    need("limiter clamped low", int'(n_lo));
    need("limiter clamped high", int'(n_hi));
    need("limiter passed through", int'(n_pass));
    need("single-speed detector outputs", n_single);
    need("double-speed detector pairs", n_double);
    $display("detector decisions: %0d wrong of %0d", bit_err, bit_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
