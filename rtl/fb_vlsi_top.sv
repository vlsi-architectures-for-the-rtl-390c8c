// Two forward-backward soft-output decoders side by side, each with its own
// clock, reset and pins:
//   t_*  TORBO-TM2, a block turbo decoder for a 4-state parallel
//        concatenated code (log-domain forward-backward algorithm with a
//        simplified MAX*), driven by a host link and using three external
//        64-bit SRAM banks whose ports are brought out here.
//   p_*  PRONTO-1, a sliding-window MAX-DMFB soft-output detector for the
//        1-D partial response channel, with single/double speed pins.
// The two share nothing; see torbo_tm2 and pronto1 for interface timing.
module fb_vlsi_top
  import torbo_pkg::*;
  import pronto_pkg::*;
(
  // ---- turbo decoder ----
  input  logic        t_clk,
  input  logic        t_reset,
  input  logic [15:0] t_n_in,
  input  logic [4:0]  t_iter_in,
  output logic [15:0] t_error_count,
  input  logic [31:0] t_sun_data_in,
  output logic        t_wanted_in,
  input  logic        t_ready_in,
  output logic [15:0] t_sun_data_out,
  output logic        t_ready_out,
  input  logic        t_ack_out,
  output sram_req_t   t_ram_a_req,
  input  logic [63:0] t_ram_a_rdata,
  output sram_req_t   t_ram_b_req,
  input  logic [63:0] t_ram_b_rdata,
  output sram_req_t   t_ram_c_req,
  input  logic [63:0] t_ram_c_rdata,
  output stage_e      t_stage,
  output logic [4:0]  t_iter_cnt,
  // ---- partial response detector ----
  input  logic        p_clk,
  input  logic        p_reset,
  input  logic        p_dbl,
  input  pval_t       p_y1,
  input  pval_t       p_y2,
  output pval_t       p_l1,
  output pval_t       p_l2,
  output logic        p_pin_ph
);
  torbo_tm2 u_torbo (
    .clk(t_clk), .reset(t_reset), .n_in(t_n_in), .iter_in(t_iter_in),
    .error_count(t_error_count), .sun_data_in(t_sun_data_in),
    .wanted_in(t_wanted_in), .ready_in(t_ready_in),
    .sun_data_out(t_sun_data_out), .ready_out(t_ready_out),
    .ack_out(t_ack_out), .ram_a_req(t_ram_a_req), .ram_a_rdata(t_ram_a_rdata),
    .ram_b_req(t_ram_b_req), .ram_b_rdata(t_ram_b_rdata),
    .ram_c_req(t_ram_c_req), .ram_c_rdata(t_ram_c_rdata),
    .stage(t_stage), .iter_cnt(t_iter_cnt));

  pronto1 u_pronto (
    .clk(p_clk), .reset(p_reset), .dbl(p_dbl), .y1(p_y1), .y2(p_y2),
    .l1(p_l1), .l2(p_l2), .pin_ph(p_pin_ph));
endmodule
