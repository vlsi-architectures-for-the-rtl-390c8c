// TORBO-TM2 chip test through its pins: a host model moves the interleaver
// and the data words over the four-phase input handshake and collects the
// error count over the output handshake; three SRAM models hold the banks.
// Checked: the error count against the reference decoder, the final
// a-priori values Z left in RAM_A, N+4 / N+5 cycles per forward / backward
// stage and 4N+18 cycles per iteration, and the iteration counter.
module tb_torbo_tm2;
  import torbo_pkg::*;
  import torbo_ref_pkg::*;
  localparam int N = 128;
  int checks = 0, failures = 0;
  logic clk = 0, reset;
  logic [15:0] n_in, error_count, sun_data_out;
  logic [4:0]  iter_in, iter_cnt;
  logic [31:0] sun_data_in;
  logic wanted_in, ready_in, ready_out, ack_out;
  sram_req_t ram_a_req, ram_b_req, ram_c_req;
  logic [63:0] ram_a_rdata, ram_b_rdata, ram_c_rdata;
  stage_e stage;
  int max_iter = 0;

  torbo_tm2 dut (.*);
  tm2_sram_model #(.DEPTH_LOG2(8)) u_ra (.clk, .req(ram_a_req), .rdata(ram_a_rdata));
  tm2_sram_model #(.DEPTH_LOG2(8)) u_rb (.clk, .req(ram_b_req), .rdata(ram_b_rdata));
  tm2_sram_model #(.DEPTH_LOG2(8)) u_rc (.clk, .req(ram_c_req), .rdata(ram_c_rdata));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      if (int'(iter_cnt) > max_iter) max_iter <= int'(iter_cnt);
    end
  end

  // host side of the input handshake
  task automatic send(logic [31:0] w);
    sun_data_in <= w;
    @(posedge clk);
    while (!wanted_in) @(posedge clk);
    repeat ($urandom_range(1)) @(posedge clk);
    ready_in <= 1;
    @(posedge clk);
    while (wanted_in) @(posedge clk);
    ready_in <= 0;
  endtask

  // host side of the output handshake
  task automatic receive(output logic [15:0] v);
    while (!ready_out) @(posedge clk);
    v = sun_data_out;
    repeat ($urandom_range(2)) @(posedge clk);
    ack_out <= 1;
    @(posedge clk);
    while (ready_out) @(posedge clk);
    ack_out <= 0;
    @(posedge clk);
  endtask

  task automatic run_block(torbo_block b, int iters, bit first);
    int zref [];
    int eref;
    longint t1;
    logic [15:0] got;
    iter_in <= 5'(iters);
    if (first) for (int k = 1; k <= N; k++) send(b.perm_word(k));
    for (int k = 1; k <= N + 2; k++) send(b.data_word(k));
    eref = b.ref_decode(iters, zref);
    while (!ready_out) @(posedge clk);
    t1 = $time;
    checks++;
    if ((t1 - t_start) / 10 != iters * (4 * N + 18) + 1) begin
      failures++;
      $display("FAIL decode took %0d cycles for %0d iterations", (t1 - t_start) / 10, iters);
    end
    receive(got);
    checks++;
    if (got != 16'(eref) || error_count != 16'(eref)) begin
      failures++;
      $display("FAIL error count %0d, reference %0d", got, eref);
    end
    for (int k = 1; k <= N; k++) begin
      checks++;
      if (int'($signed(u_ra.mem[k][8*RA_Z +: 6])) != zref[k]) begin
        failures++;
        if (failures < 10) $display("FAIL Z[%0d]=%0d ref %0d", k,
                                    $signed(u_ra.mem[k][8*RA_Z +: 6]), zref[k]);
      end
    end
    $display("block: %0d iterations, %0d errors (reference %0d)", iters, got, eref);
  endtask

  initial begin
    torbo_block b;
    reset = 1; ready_in = 0; ack_out = 0; sun_data_in = '0;
    n_in = 16'(N); iter_in = 5'd1;
    repeat (3) @(posedge clk);
    reset <= 0;
    b = new();
    b.make(N, 4.0, 0.0, 1'b0);
    run_block(b, 2, 1'b1);
    checks++;
    if (error_count != 0) begin failures++; $display("FAIL noiseless block has errors"); end
    for (int r = 0; r < 3; r++) begin
      torbo_block c;
      c = new();
      c.n = N;
      c.perm = b.perm; c.iperm = b.iperm;
      c.make_keep_perm(4.0, 6.0, r[0]);
      run_block(c, 2 + 2 * r, 1'b0);
    end
    checks++;
    if (max_iter < 5) begin failures++; $display("FAIL iteration counter reached %0d", max_iter); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
