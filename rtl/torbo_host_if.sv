// Host interface of the turbo decoder: a four-phase handshake in each
// direction between the host link and the control unit.
//
// Host to decoder (32-bit words: interleaver permutation, then data):
//   wanted_in rises when the control unit can take a word (rx_ready) and then
//   stays high until a word is taken. The host puts a word on sun_data_in
//   and raises ready_in; the word is taken (rx_valid pulses for one cycle
//   with rx_data) and wanted_in drops; a new offer starts only after the
//   host has dropped ready_in. The control unit must accept a word in any
//   cycle once it has raised rx_ready.
// Decoder to host (16-bit error count):
//   when the control unit raises tx_valid, the count is latched onto
//   sun_data_out and ready_out rises; when the host answers with ack_out,
//   ready_out drops, and once ack_out is low again tx_done pulses.
// The signal set and widths follow the decoder's interface table; the
// four-phase protocol and the synchronous, active-high reset are this
// design's choice (the host side is assumed to be clocked by clk).
module torbo_host_if (
  input  logic        clk,
  input  logic        reset,
  // host side
  input  logic [31:0] sun_data_in,
  output logic        wanted_in,
  input  logic        ready_in,
  output logic [15:0] sun_data_out,
  output logic        ready_out,
  input  logic        ack_out,
  // control unit side
  input  logic        rx_ready,
  output logic        rx_valid,
  output logic [31:0] rx_data,
  input  logic        tx_valid,
  input  logic [15:0] tx_data,
  output logic        tx_done
);
  typedef enum logic [1:0] {RX_IDLE, RX_OFFER, RX_RELEASE} rx_e;
  typedef enum logic [1:0] {TX_IDLE, TX_SEND, TX_RELEASE} tx_e;
  rx_e rx_st;
  tx_e tx_st;

  assign wanted_in = (rx_st == RX_OFFER);

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_st    <= RX_IDLE;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_valid <= 1'b0;
      case (rx_st)
        RX_IDLE:    if (rx_ready) rx_st <= RX_OFFER;
        RX_OFFER:   if (ready_in) begin
                      rx_data  <= sun_data_in;
                      rx_valid <= 1'b1;
                      rx_st    <= RX_RELEASE;
                    end
        RX_RELEASE: if (!ready_in) rx_st <= RX_IDLE;
        default:    rx_st <= RX_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      tx_st        <= TX_IDLE;
      ready_out    <= 1'b0;
      sun_data_out <= '0;
      tx_done      <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      case (tx_st)
        TX_IDLE:    if (tx_valid) begin
                      sun_data_out <= tx_data;
                      ready_out    <= 1'b1;
                      tx_st        <= TX_SEND;
                    end
        TX_SEND:    if (ack_out) begin
                      ready_out <= 1'b0;
                      tx_st     <= TX_RELEASE;
                    end
        TX_RELEASE: if (!ack_out) begin
                      tx_done <= 1'b1;
                      tx_st   <= TX_IDLE;
                    end
        default:    tx_st <= TX_IDLE;
      endcase
    end
  end

  // a word is taken only while it was wanted; the count is held while offered
  a_rx_wanted: assert property (@(posedge clk) disable iff (reset)
                                rx_valid |-> $past(wanted_in && ready_in));
  a_tx_stable: assert property (@(posedge clk) disable iff (reset)
                                (ready_out && $past(ready_out)) |-> $stable(sun_data_out));
endmodule
