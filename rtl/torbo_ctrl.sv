// Control unit of the turbo decoder: loads a block from the host interface
// into the SRAM banks, runs the four-stage memory schedule once per
// iteration, and counts decoding errors in the last iteration.
//
// Memory schedule (one forward-backward pass per half iteration, banks
// single-ported, each bank either read or written within a stage):
//   FWD0  read RAM_A (X1, Y1, Z) k = 1..N+2; write forward metrics to
//         RAM_B and copy Y2 to RAM_C.
//   BWD0  read RAM_A and RAM_B k = N+2..1; W = L - Z and the expected bit U
//         are written to RAM_C at address I^-1[k] (interleaving by writing).
//   FWD1  read RAM_C (W, or the tail X_2 at N+1, N+2, and Y2); write RAM_B.
//   BWD1  read RAM_C and RAM_B k = N+2..1; Z = L - W is written to RAM_A at
//         address I[k] (de-interleaving by writing); the hard decision is
//         compared with the interleaved U.
// Timing: a read is issued in one cycle and its data used in the next
// (synchronous SRAM); the LLR is registered once more before it is written.
// A forward stage therefore takes N+4 cycles and a backward stage N+5,
// 4N+18 cycles per iteration, as for the original decoder. The forward
// metrics written at address k are those of step k-1, so the backward pass
// finds A(k-1) next to I[k] and I^-1[k] in the same RAM_B word.
//
// Host words: N permutation words {I^-1[k], I[k]} (16 bits each), then
// N+2 data words {U[24], X_2[23:18], Y2[17:12], Y1[11:6], X1[5:0]}
// (X_2 only in the last two). Z starts at zero. n_in is sampled after
// reset, iter_in at the start of each block. After the last iteration the
// 16-bit saturating error count is offered to the host, then the next data
// block is awaited (the permutation is kept). Word formats, the iteration
// and error counting details and the reset are this design's choice.
// Write-data bytes outside the memory map above are driven as zero.
module torbo_ctrl
  import torbo_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] n_in,
  input  logic [4:0]  iter_in,
  // host interface
  output logic        rx_ready,
  input  logic        rx_valid,
  input  logic [31:0] rx_data,
  output logic        tx_valid,
  output logic [15:0] tx_data,
  input  logic        tx_done,
  // datapath
  output logic        dp_init,
  output logic        dp_en,
  output logic        dp_bwd,
  output sym_t        dp_x,
  output sym_t        dp_z,
  output sym_t        dp_y,
  output sym_t        dp_sub,
  output metric_t     dp_fsm [NSTATE],
  input  metric_t     dp_sm  [NSTATE],
  input  sym_t        dp_w,
  input  logic        dp_hard,
  // SRAM banks
  output sram_req_t   ram_a_req,
  input  logic [63:0] ram_a_rdata,
  output sram_req_t   ram_b_req,
  input  logic [63:0] ram_b_rdata,
  output sram_req_t   ram_c_req,
  input  logic [63:0] ram_c_rdata,
  // status
  output stage_e      stage,
  output logic [4:0]  iter_cnt,
  output logic [15:0] error_count
);
  logic [SRAM_AW-1:0] n, k, cyc, rd_addr, k1, k2;
  logic [4:0]         iters;
  logic               rd, v1, v2, u2, last_iter, fwd_st, bwd_st, upper, decoding;
  logic [15:0]        i2, ii2;
  logic [SRAM_AW-1:0] stage_len;

  always_comb begin
    fwd_st    = (stage == ST_FWD0) || (stage == ST_FWD1);
    bwd_st    = (stage == ST_BWD0) || (stage == ST_BWD1);
    decoding  = fwd_st || bwd_st;
    upper     = (stage == ST_FWD0) || (stage == ST_BWD0);
    stage_len = fwd_st ? n + SRAM_AW'(4) : n + SRAM_AW'(5);
    rd        = decoding && (cyc >= SRAM_AW'(1)) && (cyc <= n + SRAM_AW'(2));
    rd_addr   = fwd_st ? cyc : n + SRAM_AW'(3) - cyc;
    last_iter = (iter_cnt == iters);
    rx_ready  = (stage == ST_LOAD_PERM) || (stage == ST_LOAD_DATA);
    tx_data   = error_count;
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      stage       <= ST_IDLE;
      n           <= '0;
      iters       <= 5'd1;
      iter_cnt    <= 5'd1;
      k           <= SRAM_AW'(1);
      cyc         <= '0;
      error_count <= '0;
      tx_valid    <= 1'b0;
    end else begin
      tx_valid <= 1'b0;
      case (stage)
        ST_IDLE: begin
          n     <= SRAM_AW'(n_in);
          k     <= SRAM_AW'(1);
          stage <= ST_LOAD_PERM;
        end
        ST_LOAD_PERM: if (rx_valid) begin
          if (k == n) begin
            k     <= SRAM_AW'(1);
            stage <= ST_LOAD_DATA;
          end else k <= k + SRAM_AW'(1);
        end
        ST_LOAD_DATA: if (rx_valid) begin
          if (k == SRAM_AW'(1)) iters <= (iter_in == 5'd0) ? 5'd1 : iter_in;
          if (k == n + SRAM_AW'(2)) begin
            stage       <= ST_FWD0;
            cyc         <= '0;
            iter_cnt    <= 5'd1;
            error_count <= '0;
          end else k <= k + SRAM_AW'(1);
        end
        ST_FWD0, ST_BWD0, ST_FWD1, ST_BWD1: begin
          if (cyc == stage_len - SRAM_AW'(1)) begin
            cyc <= '0;
            case (stage)
              ST_FWD0: stage <= ST_BWD0;
              ST_BWD0: stage <= ST_FWD1;
              ST_FWD1: stage <= ST_BWD1;
              default: begin
                if (last_iter) begin
                  stage    <= ST_REPORT;
                  tx_valid <= 1'b1;
                end else begin
                  stage    <= ST_FWD0;
                  iter_cnt <= iter_cnt + 5'd1;
                end
              end
            endcase
          end else cyc <= cyc + SRAM_AW'(1);
          if (stage == ST_BWD1 && v2 && k2 <= n && last_iter && (dp_hard != u2)
              && error_count != 16'hffff)
            error_count <= error_count + 16'd1;
        end
        ST_REPORT: if (tx_done) begin
          k     <= SRAM_AW'(1);
          stage <= ST_LOAD_DATA;
        end
        default: stage <= ST_IDLE;
      endcase
    end
  end

  // ---------------- read pipeline ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= rd;
      v2 <= v1 && bwd_st;
    end
    k1  <= rd_addr;
    k2  <= k1;
    i2  <= ram_b_rdata[47:32];
    ii2 <= ram_b_rdata[63:48];
    u2  <= upper ? ram_a_rdata[8*RA_U] : ram_c_rdata[8*RC_U];
  end

  // ---------------- datapath operands ----------------
  always_comb begin
    dp_init = decoding && (cyc == '0);
    dp_en   = v1;
    dp_bwd  = bwd_st;
    if (upper) begin
      dp_x   = ram_a_rdata[8*RA_X1 +: SYM_W];
      dp_y   = ram_a_rdata[8*RA_Y1 +: SYM_W];
      dp_z   = ram_a_rdata[8*RA_Z  +: SYM_W];
      dp_sub = ram_a_rdata[8*RA_Z  +: SYM_W];
    end else begin
      dp_x   = ram_c_rdata[8*RC_W  +: SYM_W];
      dp_y   = ram_c_rdata[8*RC_Y2 +: SYM_W];
      dp_z   = '0;
      dp_sub = ram_c_rdata[8*RC_W  +: SYM_W];
    end
    for (int i = 0; i < NSTATE; i++) dp_fsm[i] = ram_b_rdata[8*i +: 8];
  end

  // ---------------- SRAM requests ----------------
  always_comb begin
    ram_a_req = '0;
    ram_b_req = '0;
    ram_c_req = '0;
    case (stage)
      ST_LOAD_PERM: begin
        ram_b_req.ce    = rx_valid;
        ram_b_req.we    = 1'b1;
        ram_b_req.addr  = k;
        ram_b_req.be    = 8'hf0;
        ram_b_req.wdata = {rx_data, 32'h0};
      end
      ST_LOAD_DATA: begin
        ram_a_req.ce    = rx_valid;
        ram_a_req.we    = 1'b1;
        ram_a_req.addr  = k;
        ram_a_req.be    = 8'h1f;
        ram_a_req.wdata[8*RA_X1 +: 8] = sym_to_byte(rx_data[5:0]);
        ram_a_req.wdata[8*RA_Y1 +: 8] = sym_to_byte(rx_data[11:6]);
        ram_a_req.wdata[8*RA_Y2 +: 8] = sym_to_byte(rx_data[17:12]);
        ram_a_req.wdata[8*RA_U  +: 8] = {7'b0, rx_data[24]};
        ram_c_req.ce    = rx_valid && (k > n);
        ram_c_req.we    = 1'b1;
        ram_c_req.addr  = k;
        ram_c_req.be    = 8'h01;
        ram_c_req.wdata[8*RC_W +: 8] = sym_to_byte(rx_data[23:18]);
      end
      ST_FWD0: begin
        ram_a_req.ce    = rd;
        ram_a_req.addr  = rd_addr;
        ram_b_req.ce    = v1;
        ram_b_req.we    = 1'b1;
        ram_b_req.addr  = k1;
        ram_b_req.be    = 8'h0f;
        for (int i = 0; i < NSTATE; i++) ram_b_req.wdata[8*i +: 8] = dp_sm[i];
        ram_c_req.ce    = v1;
        ram_c_req.we    = 1'b1;
        ram_c_req.addr  = k1;
        ram_c_req.be    = 8'h01 << RC_Y2;
        ram_c_req.wdata[8*RC_Y2 +: 8] = ram_a_rdata[8*RA_Y2 +: 8];
      end
      ST_FWD1: begin
        ram_c_req.ce    = rd;
        ram_c_req.addr  = rd_addr;
        ram_b_req.ce    = v1;
        ram_b_req.we    = 1'b1;
        ram_b_req.addr  = k1;
        ram_b_req.be    = 8'h0f;
        for (int i = 0; i < NSTATE; i++) ram_b_req.wdata[8*i +: 8] = dp_sm[i];
      end
      ST_BWD0: begin
        ram_a_req.ce    = rd;
        ram_a_req.addr  = rd_addr;
        ram_b_req.ce    = rd;
        ram_b_req.addr  = rd_addr;
        ram_c_req.ce    = v2 && (k2 <= n);
        ram_c_req.we    = 1'b1;
        ram_c_req.addr  = SRAM_AW'(ii2);
        ram_c_req.be    = (8'h01 << RC_W) | (8'h01 << RC_U);
        ram_c_req.wdata[8*RC_W +: 8] = sym_to_byte(dp_w);
        ram_c_req.wdata[8*RC_U +: 8] = {7'b0, u2};
      end
      ST_BWD1: begin
        ram_c_req.ce    = rd;
        ram_c_req.addr  = rd_addr;
        ram_b_req.ce    = rd;
        ram_b_req.addr  = rd_addr;
        ram_a_req.ce    = v2 && (k2 <= n);
        ram_a_req.we    = 1'b1;
        ram_a_req.addr  = SRAM_AW'(i2);
        ram_a_req.be    = 8'h01 << RA_Z;
        ram_a_req.wdata[8*RA_Z +: 8] = sym_to_byte(dp_w);
      end
      default: ;
    endcase
  end

  a_n_valid: assert property (@(posedge clk) disable iff (reset)
                              (stage != ST_IDLE) |-> (n != '0));
endmodule
