// lfsr_feedback: the feedback gate between the end of the latch chain and its first
// latch.
//
// FB_XOR: the output is the XOR (odd parity) of the stages selected by TAPS: 0 when
//         the tapped bits agree, 1 when they differ. By default the taps are the last
//         two stages, which is what the published 4-bit example uses (Q3 XOR Q4).
// FB_NOT: the output is the complement of the last stage QN.
// Both the value and its complement are produced, because the first latch takes a
// differential pair. Purely combinational, no clock. The two gate kinds follow the
// published design; the default taps of an N-bit register extend its 4-bit example and
// are this design's choice.
module lfsr_feedback
  import lfsr_pkg::*;
#(
  parameter int unsigned     WIDTH = LFSR_WIDTH,  // stages in the chain, at least 2
  parameter feedback_e       MODE  = FB_XOR,      // kind of feedback gate
  parameter logic [WIDTH:1]  TAPS  = WIDTH'(default_taps(WIDTH))  // stages fed to the XOR
) (
  input  logic [WIDTH:1] q,     // latch outputs, q[i] = Qi
  output logic           fb,    // feedback value for the first latch's D
  output logic           fb_b   // its complement, for the first latch's Db
);

  always_comb begin
    unique case (MODE)
      FB_XOR:  fb = ^(q & TAPS);
      FB_NOT:  fb = ~q[WIDTH];
      default: fb = 1'b0;
    endcase
  end

  assign fb_b = ~fb;

endmodule
