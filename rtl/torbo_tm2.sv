// TORBO-TM2 turbo decoder: decodes the rate 1/3 (or, with punctured parity
// samples received as zero, rate 1/2) parallel concatenation of two 4-state
// recursive systematic 7/5 codes with a user-supplied interleaver of length
// N = 1..65535 and 1..31 iterations, using one log-domain forward-backward
// datapath that is reused for both constituent codes in every iteration.
//
// Contents: host interface, control unit and datapath. The three 64-bit
// SRAM banks are outside this module; each bank port is a request struct
// (chip enable, write enable, address, byte enables, write data) and read
// data that is valid in the cycle after a read request. The host sends the
// permutation once after reset, then blocks of data; the decoder returns
// the number of bit errors of each block against the expected bits sent
// with it (error_count also stays visible after the block). The throughput
// is N decoded bits per 4N+18 clock cycles and iteration. stage and
// iter_cnt show the progress. Synchronous active-high reset.
// Some output bits are constant by design: write-data bytes that no stage
// writes (RAM_A bytes 5-7, RAM_C bytes 3-7, the unused high bits of the U
// bytes) are driven as zero. The datapath's raw LLR is left unconnected:
// only its sign (the hard decision) and W are used.
module torbo_tm2
  import torbo_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] n_in,         // interleaver length N
  input  logic [4:0]  iter_in,      // number of iterations
  output logic [15:0] error_count,
  // host link
  input  logic [31:0] sun_data_in,
  output logic        wanted_in,
  input  logic        ready_in,
  output logic [15:0] sun_data_out,
  output logic        ready_out,
  input  logic        ack_out,
  // SRAM banks
  output sram_req_t   ram_a_req,
  input  logic [63:0] ram_a_rdata,
  output sram_req_t   ram_b_req,
  input  logic [63:0] ram_b_rdata,
  output sram_req_t   ram_c_req,
  input  logic [63:0] ram_c_rdata,
  // status
  output stage_e      stage,
  output logic [4:0]  iter_cnt
);
  logic        rx_ready, rx_valid, tx_valid, tx_done;
  logic [31:0] rx_data;
  logic [15:0] tx_data;
  logic        dp_init, dp_en, dp_bwd, dp_hard;
  sym_t        dp_x, dp_z, dp_y, dp_sub, dp_w;
  metric_t     dp_fsm [NSTATE];
  metric_t     dp_sm  [NSTATE];
  metric_t     dp_llr;

  torbo_host_if u_host (
    .clk, .reset, .sun_data_in, .wanted_in, .ready_in, .sun_data_out,
    .ready_out, .ack_out, .rx_ready, .rx_valid, .rx_data, .tx_valid,
    .tx_data, .tx_done);

  torbo_ctrl u_ctrl (
    .clk, .reset, .n_in, .iter_in, .rx_ready, .rx_valid, .rx_data,
    .tx_valid, .tx_data, .tx_done, .dp_init, .dp_en, .dp_bwd, .dp_x, .dp_z,
    .dp_y, .dp_sub, .dp_fsm, .dp_sm, .dp_w, .dp_hard, .ram_a_req,
    .ram_a_rdata, .ram_b_req, .ram_b_rdata, .ram_c_req, .ram_c_rdata,
    .stage, .iter_cnt, .error_count);

  torbo_datapath u_dp (
    .clk, .init(dp_init), .en(dp_en), .bwd(dp_bwd), .x(dp_x), .z(dp_z),
    .y(dp_y), .sub(dp_sub), .fsm(dp_fsm), .sm(dp_sm), .llr(dp_llr),
    .w(dp_w), .hard(dp_hard));
endmodule
