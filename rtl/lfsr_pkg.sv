// lfsr_pkg: types and constants shared by the secure latch-based LFSR.
//
// The register is a chain of unidirectional pulse latches, Q1 first and QN last, that
// shifts towards QN. A feedback gate at the end of the chain drives the first latch:
// either an XOR of tap stages (a linear feedback shift register) or an inverter on
// the last stage (a twisted-ring, or Johnson, sequence). Vectors of latch outputs are
// declared [N:1] so that bit i is stage Qi.
//
// The 16-bit width and the two feedback kinds follow the published design. The tap
// choice (the last two stages) and the reset patterns are read from its 4-bit worked
// examples and extended to N bits; that extension is this design's choice.
package lfsr_pkg;

  // Width of the main configuration.
  localparam int unsigned LFSR_WIDTH = 16;

  // Widest register the helper functions below can describe.
  localparam int unsigned LFSR_MAX_WIDTH = 64;

  typedef enum logic [0:0] {
    FB_XOR = 1'b0,  // first latch takes the XOR of the tap stages
    FB_NOT = 1'b1   // first latch takes the complement of the last stage
  } feedback_e;

  // Default taps: the last two stages, QN and QN-1 (the 4-bit example uses Q4 and Q3).
  function automatic logic [LFSR_MAX_WIDTH:1] default_taps(int unsigned width);
    logic [LFSR_MAX_WIDTH:1] t = '0;
    t[width]     = 1'b1;
    t[width - 1] = 1'b1;
    return t;
  endfunction

  // Default reset pattern.
  //   FB_XOR: only the last stage set (4-bit example: Q1..Q4 = 0,0,0,1). An XOR
  //           register must not start at all zeros, where it would stay.
  //   FB_NOT: the 4-bit example's Q1..Q4 = 1,1,0,1 repeated along the chain.
  function automatic logic [LFSR_MAX_WIDTH:1] default_reset(feedback_e mode, int unsigned width);
    logic [LFSR_MAX_WIDTH:1] r = '0;
    if (mode == FB_XOR) begin
      r[width] = 1'b1;
    end else begin
      for (int unsigned i = 1; i <= width; i++) r[i] = ((i - 1) % 4) != 2;
    end
    return r;
  endfunction

endpackage
