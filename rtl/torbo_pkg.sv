// Shared types and constants of the TORBO turbo decoder.
//
// Number formats (two's complement, saturating):
//   sym_t    6 bits = sign + 3 integer + 2 fraction bits. Used for everything
//            outside the forward-backward decoder: received samples, a-priori
//            (Z) and extrinsic (W) information, SRAM contents.
//   metric_t 8 bits = sign + 4 integer + 3 fraction bits. Used for branch
//            metrics, state metrics and log-likelihood ratios.
// The two formats and their split into integer/fraction bits follow the
// fixed-point study of the decoder; the conversions between them (a one-bit
// shift, truncation towards minus infinity on the way back) are this
// design's choice.
//
// SRAM layout: three 64-bit wide banks (RAM_A, RAM_B, RAM_C) with byte
// enables, addressed from 1 (address 0 is never used). The byte positions
// below are this design's choice; what each bank holds follows the memory
// schedule of the decoder.
package torbo_pkg;

  localparam int SYM_W    = 6;
  localparam int MET_W    = 8;
  localparam int SRAM_AW  = 17;   // enough for N+2 = 65537 words
  localparam int SRAM_DW  = 64;
  localparam int NSTATE   = 4;

  typedef logic signed [SYM_W-1:0] sym_t;
  typedef logic signed [MET_W-1:0] metric_t;

  localparam metric_t MET_MAX = 8'sh7f;
  localparam metric_t MET_MIN = 8'sh80;   // stands for minus infinity
  // MAX* correction 0.375 and its window |d| < 2.0, in metric LSBs (1/8)
  localparam metric_t MAXSTAR_CORR = 8'sd3;

  // Byte lanes of RAM_A (received data of the upper code and Z)
  localparam int RA_X1 = 0;   // systematic sample, N+2 words
  localparam int RA_Y1 = 1;   // upper parity sample, N+2 words
  localparam int RA_Y2 = 2;   // lower parity sample, N+2 words
  localparam int RA_Z  = 3;   // a-priori information, N words
  localparam int RA_U  = 4;   // expected bit (bit 0), N words
  // RAM_B: bytes 0..3 forward state metrics A(0..3) of the previous step,
  // bits 47:32 interleaver I[k], bits 63:48 inverse interleaver I^-1[k]
  // Byte lanes of RAM_C (data of the lower code)
  localparam int RC_W  = 0;   // interleaved W (words 1..N), tail X_2 (N+1, N+2)
  localparam int RC_Y2 = 1;   // lower parity sample copy
  localparam int RC_U  = 2;   // interleaved expected bit

  // One SRAM access per cycle: read when ce & !we, byte-masked write when ce & we.
  typedef struct packed {
    logic               ce;
    logic               we;
    logic [SRAM_AW-1:0] addr;
    logic [7:0]         be;
    logic [SRAM_DW-1:0] wdata;
  } sram_req_t;

  typedef enum logic [2:0] {
    ST_IDLE, ST_LOAD_PERM, ST_LOAD_DATA,
    ST_FWD0, ST_BWD0, ST_FWD1, ST_BWD1, ST_REPORT
  } stage_e;

  // 6-bit external value to the 8-bit internal format (one more fraction bit)
  function automatic metric_t sym_to_met(sym_t s);
    return metric_t'({{(MET_W-SYM_W-1){s[SYM_W-1]}}, s, 1'b0});
  endfunction

  // 8-bit internal value to the 6-bit external format: drop one fraction bit
  // (arithmetic shift) and saturate to the 6-bit range.
  function automatic sym_t met_to_sym(metric_t m);
    logic signed [MET_W-2:0] h;
    h = m[MET_W-1:1];
    if (h > 7'sd31)       return 6'sd31;
    else if (h < -7'sd32) return -6'sd32;
    else                  return h[SYM_W-1:0];
  endfunction

  function automatic logic [7:0] sym_to_byte(sym_t s);
    return {{2{s[SYM_W-1]}}, s};
  endfunction

endpackage
