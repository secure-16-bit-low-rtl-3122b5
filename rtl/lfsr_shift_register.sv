// lfsr_shift_register: an N-bit unidirectional pulse-latch shift register with a
// feedback gate, the building block of the secure LFSR.
//
// Structure: N ud_latch stages in a chain. Stage Q1 takes the feedback gate's output
// (value and complement); every later stage Qi takes Q(i-1) and Qb(i-1) of the stage
// before it, so data moves from Q1 towards QN. Stages at odd positions (Q1, Q3, ...)
// are pulsed by clk_odd, stages at even positions (Q2, Q4, ...) by clk_even. One reset
// line reaches every stage and loads RESET_VALUE. The feedback gate is an XOR of the
// tap stages (MODE = FB_XOR) or an inverter on QN (MODE = FB_NOT).
//
// Timing: clk_odd and clk_even are one-cycle pulse enables sampled on the rising
// edge of clk. One shift step is one cycle with both high: every stage then takes its
// input's value from before the edge, so the whole register moves one place and Q1
// takes the feedback. With only one of the two high, only that half of the stages
// moves and the other half holds. With neither high, everything holds.
// Outputs: all Qi and Qbi in parallel, and QN as the serial output.
//
// The chain, the odd/even pulse wiring, the shared reset and the two gate kinds follow
// the published design. Treating one shift step as both pulses in the same cycle, the
// default taps and the reset patterns beyond its 4-bit examples are this design's
// choices.
module lfsr_shift_register
  import lfsr_pkg::*;
#(
  parameter int unsigned    WIDTH       = LFSR_WIDTH,  // stages, 2 .. LFSR_MAX_WIDTH
  parameter feedback_e      MODE        = FB_XOR,      // feedback gate kind
  parameter logic [WIDTH:1] TAPS        = WIDTH'(default_taps(WIDTH)),
  parameter logic [WIDTH:1] RESET_VALUE = WIDTH'(default_reset(MODE, WIDTH))
) (
  input  logic           clk,         // system clock
  input  logic           rst,         // asynchronous reset, active high, all stages
  input  logic           clk_odd,     // pulse for the odd stages Q1, Q3, ...
  input  logic           clk_even,    // pulse for the even stages Q2, Q4, ...
  output logic [WIDTH:1] q,           // parallel output, q[i] = Qi
  output logic [WIDTH:1] qb,          // parallel complement output, qb[i] = Qbi
  output logic           serial_out   // QN
);

  if (WIDTH < 2 || WIDTH > LFSR_MAX_WIDTH) begin : g_bad_width
    $error("lfsr_shift_register: WIDTH must lie in 2 .. LFSR_MAX_WIDTH");
  end

  logic fb, fb_b;

  lfsr_feedback #(
    .WIDTH (WIDTH),
    .MODE  (MODE),
    .TAPS  (TAPS)
  ) u_feedback (
    .q    (q),
    .fb   (fb),
    .fb_b (fb_b)
  );

  for (genvar i = 1; i <= WIDTH; i++) begin : g_stage
    logic d_in, db_in;
    if (i == 1) begin : g_first
      assign d_in  = fb;
      assign db_in = fb_b;
    end else begin : g_next
      assign d_in  = q[i-1];
      assign db_in = qb[i-1];
    end

    ud_latch #(
      .RESET_VALUE (RESET_VALUE[i])
    ) u_latch (
      .clk   (clk),
      .rst   (rst),
      .pulse ((i % 2 == 1) ? clk_odd : clk_even),
      .d     (d_in),
      .db    (db_in),
      .q     (q[i]),
      .qb    (qb[i])
    );
  end

  assign serial_out = q[WIDTH];

endmodule
