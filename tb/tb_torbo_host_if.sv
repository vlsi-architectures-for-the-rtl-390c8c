// Host interface test: a host model moves words in with the four-phase
// handshake (with random delays and the control side not always ready),
// then takes an error count out; every word must arrive once, in order.
module tb_torbo_host_if;
  int checks = 0, failures = 0;
  logic clk = 0, reset;
  logic [31:0] sun_data_in, rx_data;
  logic wanted_in, ready_in, ready_out, ack_out;
  logic [15:0] sun_data_out, tx_data;
  logic rx_ready, rx_valid, tx_valid, tx_done;
  logic [31:0] sent [$];
  int received = 0;

  torbo_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control side: takes words, sometimes not ready
  always @(posedge clk) begin
    if (!reset) rx_ready <= ($urandom_range(3) != 0);
    if (rx_valid && !reset) begin
      checks++;
      if (sent.size() == 0 || rx_data != sent[0]) begin
        failures++;
        $display("FAIL word %0d: got %h", received, rx_data);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    logic [31:0] wd;
    reset = 1; ready_in = 0; ack_out = 0; sun_data_in = '0; tx_valid = 0;
    tx_data = '0; rx_ready = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int i = 0; i < 200; i++) begin
      wd = $urandom;
      @(posedge clk);
      while (!wanted_in) @(posedge clk);
      sun_data_in <= wd;
      sent.push_back(wd);
      ready_in <= 1;
      @(posedge clk);
      while (wanted_in) @(posedge clk);
      repeat ($urandom_range(3)) @(posedge clk);
      ready_in <= 0;
      sun_data_in <= $urandom;   // data may change once released
    end
    repeat (10) @(posedge clk);
    checks++;
    if (received != 200) begin failures++; $display("FAIL received %0d words", received); end
    // result back to the host
    for (int r = 0; r < 3; r++) begin
      int waited;
      tx_data  <= 16'(1000 + r);
      tx_valid <= 1;
      @(posedge clk);
      tx_valid <= 0;
      tx_data  <= 16'hdead;
      waited = 0;
      while (!ready_out && waited < 20) begin @(posedge clk); waited++; end
      checks++;
      if (!ready_out || sun_data_out != 16'(1000 + r)) begin
        failures++; $display("FAIL report %0d: ready=%0b data=%0d", r, ready_out, sun_data_out);
      end
      repeat ($urandom_range(4)) @(posedge clk);
      checks++;
      if (sun_data_out != 16'(1000 + r)) begin failures++; $display("FAIL count not held"); end
      ack_out <= 1;
      @(posedge clk);
      while (ready_out) @(posedge clk);
      ack_out <= 0;
      waited = 0;
      while (!tx_done && waited < 20) begin @(posedge clk); waited++; end
      checks++;
      if (!tx_done) begin failures++; $display("FAIL no tx_done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
