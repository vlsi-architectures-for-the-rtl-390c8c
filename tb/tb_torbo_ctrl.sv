// Control unit test: the control unit with the datapath and three SRAM
// models decodes random blocks fed straight into its word interface. The
// error count and the final a-priori values Z in RAM_A are compared with
// the reference decoder; each stage must last N+4 (forward) or N+5
// (backward) cycles, 4N+18 per iteration; a noiseless block must decode
// without errors.
module tb_torbo_ctrl;
  import torbo_pkg::*;
  import torbo_ref_pkg::*;
  localparam int N = 60;
  int checks = 0, failures = 0;
  logic clk = 0, reset;
  logic [15:0] n_in;
  logic [4:0]  iter_in;
  logic rx_ready, rx_valid, tx_valid, tx_done;
  logic [31:0] rx_data;
  logic [15:0] tx_data, error_count;
  logic dp_init, dp_en, dp_bwd, dp_hard;
  sym_t dp_x, dp_z, dp_y, dp_sub, dp_w;
  metric_t dp_fsm [NSTATE];
  metric_t dp_sm  [NSTATE];
  metric_t dp_llr;
  sram_req_t ram_a_req, ram_b_req, ram_c_req;
  logic [63:0] ram_a_rdata, ram_b_rdata, ram_c_rdata;
  stage_e stage;
  logic [4:0] iter_cnt;

  torbo_ctrl dut (.*);
  torbo_datapath u_dp (.clk, .init(dp_init), .en(dp_en), .bwd(dp_bwd), .x(dp_x),
                       .z(dp_z), .y(dp_y), .sub(dp_sub), .fsm(dp_fsm), .sm(dp_sm),
                       .llr(dp_llr), .w(dp_w), .hard(dp_hard));
  tm2_sram_model #(.DEPTH_LOG2(8)) u_ra (.clk, .req(ram_a_req), .rdata(ram_a_rdata));
  tm2_sram_model #(.DEPTH_LOG2(8)) u_rb (.clk, .req(ram_b_req), .rdata(ram_b_rdata));
  tm2_sram_model #(.DEPTH_LOG2(8)) u_rc (.clk, .req(ram_c_req), .rdata(ram_c_rdata));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage length monitor
  stage_e prev_stage;
  int     stage_cycles;
  longint t_start;
  always @(posedge clk) begin
    if (reset) begin
      prev_stage   <= ST_IDLE;
      stage_cycles <= 0;
    end else begin
      if (stage != prev_stage) begin
        if (stage == ST_FWD0 && prev_stage == ST_LOAD_DATA) t_start <= $time;
        if (prev_stage inside {ST_FWD0, ST_FWD1, ST_BWD0, ST_BWD1}) begin
          checks++;
          if (stage_cycles != ((prev_stage inside {ST_FWD0, ST_FWD1}) ? N + 4 : N + 5)) begin
            failures++;
            $display("FAIL stage %s took %0d cycles", prev_stage.name(), stage_cycles);
          end
        end
        stage_cycles <= 1;
      end else stage_cycles <= stage_cycles + 1;
      prev_stage <= stage;
    end
  end

  task automatic send(logic [31:0] w);
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    rx_data  <= w;
    rx_valid <= 1;
    @(posedge clk);
    rx_valid <= 0;
    repeat ($urandom_range(2)) @(posedge clk);
  endtask

  task automatic run_block(torbo_block b, int iters, bit first);
    int zref [];
    int eref, t0, t1;
    iter_in <= 5'(iters);
    if (first) for (int k = 1; k <= N; k++) send(b.perm_word(k));
    for (int k = 1; k <= N + 2; k++) send(b.data_word(k));
    eref = b.ref_decode(iters, zref);
    while (!tx_valid) @(posedge clk);
    t0 = int'(t_start);
    t1 = int'($time);
    checks++;
    if ((t1 - t0) / 10 != iters * (4 * N + 18)) begin
      failures++;
      $display("FAIL decode took %0d cycles for %0d iterations", (t1 - t0) / 10, iters);
    end
    checks++;
    if (tx_data != 16'(eref) || error_count != 16'(eref)) begin
      failures++;
      $display("FAIL error count %0d, reference %0d", tx_data, eref);
    end
    for (int k = 1; k <= N; k++) begin
      checks++;
      if (int'($signed(u_ra.mem[k][8*RA_Z +: 6])) != zref[k]) begin
        failures++;
        if (failures < 10) $display("FAIL Z[%0d]=%0d ref %0d", k,
                                    $signed(u_ra.mem[k][8*RA_Z +: 6]), zref[k]);
      end
    end
    $display("block: %0d iterations, %0d errors (reference %0d)", iters, tx_data, eref);
    @(posedge clk);
    tx_done <= 1;
    @(posedge clk);
    tx_done <= 0;
  endtask

  initial begin
    torbo_block b;
    reset = 1; rx_valid = 0; rx_data = '0; tx_done = 0;
    n_in = 16'(N); iter_in = 5'd1;
    repeat (3) @(posedge clk);
    reset <= 0;
    b = new();
    b.make(N, 4.0, 0.0, 1'b0);          // noiseless: no errors expected
    run_block(b, 2, 1'b1);
    checks++;
    if (error_count != 0) begin failures++; $display("FAIL noiseless block has errors"); end
    // same permutation, new noisy blocks
    for (int r = 0; r < 4; r++) begin
      torbo_block c;
      c = new();
      c.n = N;
      c.perm = b.perm; c.iperm = b.iperm;
      c.make_keep_perm(4.0, 6.0, r[0]);
      run_block(c, 1 + r, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
