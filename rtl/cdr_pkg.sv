// Shared types and constants of the spread-spectrum CDR.
//
// The core runs on recovered clock phase P0 (1.5 GHz, two 3 Gb/s bits per
// cycle). The phase selector divides one clock period into 32 steps: 8 PLL
// phases times 4 interpolation steps. The frequency compensation period Ts is
// 512 core cycles. The confidence counter size N is 2, 8 or 32, chosen by the
// lock detector.
package cdr_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Confidence counter size, stepped by the lock detector.
  typedef enum logic [1:0] {
    CC_N2  = 2'd0,
    CC_N8  = 2'd1,
    CC_N32 = 2'd2
  } cc_size_t;

  localparam int unsigned TS_CYCLES = 512;  // compensation period in core cycles

endpackage
