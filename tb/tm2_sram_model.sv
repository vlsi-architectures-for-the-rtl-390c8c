// Behavioural model of one 64-bit SRAM bank of the decoder board, for the
// testbenches: synchronous, one access per clock, byte-masked writes, read
// data registered (valid the clock after the request) and held until the
// next read.
module tm2_sram_model
  import torbo_pkg::*;
#(
  parameter int DEPTH_LOG2 = SRAM_AW
) (
  input  logic        clk,
  input  sram_req_t   req,
  output logic [63:0] rdata
);
  logic [63:0] mem [2**DEPTH_LOG2];

  always_ff @(posedge clk) begin
    if (req.ce) begin
      if (req.we) begin
        for (int i = 0; i < 8; i++)
          if (req.be[i]) mem[req.addr[DEPTH_LOG2-1:0]][8*i +: 8] <= req.wdata[8*i +: 8];
      end else begin
        rdata <= mem[req.addr[DEPTH_LOG2-1:0]];
      end
    end
  end
endmodule
