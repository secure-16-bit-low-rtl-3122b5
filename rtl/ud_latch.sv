// ud_latch: one unidirectional pulse-latch stage of the shift register.
//
// The transistor cell this stands for is a cross-coupled inverter pair (Q, Qb) with two
// pull-down paths, D pulling Qb low and Db pulling Q low, both footed by a transistor
// on the pulse clock, plus a reset device. While the pulse is high the cell takes the
// value of the differential pair D/Db; otherwise it holds. Reset clears it (or sets it,
// see RESET_VALUE).
//
// Model and timing: the pulse is narrower than a latch's own delay, so each latch
// of a chain sees its neighbour's value from before the pulse. In this synchronous
// model the pulse is a one-cycle enable sampled on the rising edge of clk: with
// `pulse` high at an edge, Q takes D after that edge. Reset is asynchronous and
// active high, as the cell's reset device acts without the clock. If D and Db are
// equal during a pulse, both pull-downs fight; the model holds its value and an
// assertion reports the misuse. The differential input pair and the Q/Qb outputs
// follow the published cell; the clocked-enable form and the reset polarity are this
// design's choices.
module ud_latch #(
  parameter bit RESET_VALUE = 1'b0  // value after reset
) (
  input  logic clk,    // system clock; the pulse is sampled on its rising edge
  input  logic rst,    // asynchronous reset, active high
  input  logic pulse,  // pulse clock of this stage (CLK-odd or CLK-even)
  input  logic d,      // data
  input  logic db,     // complement of data
  output logic q,      // stored value
  output logic qb      // complement of the stored value
);

  logic state;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= RESET_VALUE;
    end else if (pulse && (d != db)) begin
      // D high pulls Qb low (Q rises); Db high pulls Q low (Q falls).
      state <= d;
    end
  end

  assign q  = state;
  assign qb = ~state;

  // The two data inputs must be complementary whenever the stage is pulsed.
  // Checked at the end of each time step, once the inputs have settled.
  always_comb begin
    a_differential_input : assert final (rst || !pulse || (d != db))
      else $error("ud_latch: D and Db equal during a pulse");
  end

endmodule
