// Shared types and constants of the PRONTO MAX-DMFB soft-output detector.
// Every value (received sample, branch metric, difference metric, soft
// output) is a 6-bit two's complement number with one sign bit, one integer
// bit and four fraction bits, so it spans [-2.0, 2.0) in steps of 1/16.
package pronto_pkg;
  localparam int PW      = 6;
  localparam int WINDOW  = 9;                // learning window L
  typedef logic signed [PW-1:0] pval_t;
  localparam pval_t P_ONE = 6'sd16;          // 1.0
endpackage
