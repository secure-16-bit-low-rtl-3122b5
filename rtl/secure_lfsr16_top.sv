// secure_lfsr16_top: the two proposed 16-bit secure shift registers side by side.
//
// One register feeds its first latch through an XOR of its last two stages, the
// other through an inverter on its last stage. Both share the clock, the reset line
// and the two pulse clocks, so each shift step advances both and they can be compared
// bit for bit. The pulse clocks come from outside: clk_odd pulses the odd-position
// latches and clk_even the even-position latches of both registers, each as a
// one-cycle enable sampled on the rising edge of clk (see lfsr_shift_register). A
// cycle with both high is one full shift step. After reset the XOR register holds
// Q16 = 1 and the rest 0; the NOT register holds the pattern 1,1,0,1 repeated from Q1.
//
// The width, the two feedback kinds and the odd/even pulse wiring follow the published
// design; putting both variants in one top with shared control is this design's
// choice.
module secure_lfsr16_top
  import lfsr_pkg::*;
#(
  parameter int unsigned WIDTH = LFSR_WIDTH  // stages of each register
) (
  input  logic           clk,         // system clock
  input  logic           rst,         // asynchronous reset, active high
  input  logic           clk_odd,     // pulse clock of the odd stages
  input  logic           clk_even,    // pulse clock of the even stages
  output logic [WIDTH:1] xor_q,       // XOR-feedback register, Q1..QN
  output logic [WIDTH:1] xor_qb,      // XOR-feedback register, Qb1..QbN
  output logic           xor_serial,  // XOR-feedback register, QN
  output logic [WIDTH:1] not_q,       // NOT-feedback register, Q1..QN
  output logic [WIDTH:1] not_qb,      // NOT-feedback register, Qb1..QbN
  output logic           not_serial   // NOT-feedback register, QN
);

  lfsr_shift_register #(
    .WIDTH (WIDTH),
    .MODE  (FB_XOR)
  ) u_xor_lfsr (
    .clk        (clk),
    .rst        (rst),
    .clk_odd    (clk_odd),
    .clk_even   (clk_even),
    .q          (xor_q),
    .qb         (xor_qb),
    .serial_out (xor_serial)
  );

  lfsr_shift_register #(
    .WIDTH (WIDTH),
    .MODE  (FB_NOT)
  ) u_not_lfsr (
    .clk        (clk),
    .rst        (rst),
    .clk_odd    (clk_odd),
    .clk_even   (clk_even),
    .q          (not_q),
    .qb         (not_qb),
    .serial_out (not_serial)
  );

endmodule
