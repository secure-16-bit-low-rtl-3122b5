// secure_lfsr16_top_tb: end-to-end test of the two 16-bit registers at their default
// sizes (no parameter is overridden).
//
// A reference model keeps both 16-bit states as packed vectors, bit i = Qi. On a cycle
// whose odd pulse is high, the odd stages take the value to their left (Q1 takes the
// feedback: Q15 XOR Q16 for one register, NOT Q16 for the other); on a cycle whose
// even pulse is high, the even stages do the same; every stage uses values from before
// the edge. Q, Qb and the serial outputs are compared after every edge, one cycle per
// step. The test then:
//   - checks both reset patterns and an asynchronous reset in mid-run,
//   - runs full shift steps (both pulses), odd-only and even-only pulses and idle
//     cycles in random order,
//   - measures the cycle of the NOT register (32 steps, twice the width) and of the
//     XOR register, which must return to its reset state after the number of steps the
//     model predicts and never pass through all zeros.
// Each mechanism (reset, full step, odd-only, even-only, hold) is counted and a failure
// is recorded for one that never happened.
module secure_lfsr16_top_tb;

  localparam int N = 16;
  localparam logic [N:1] ODD_MASK  = 16'h5555;  // Q1, Q3, ..., Q15
  localparam logic [N:1] EVEN_MASK = 16'hAAAA;  // Q2, Q4, ..., Q16
  localparam logic [N:1] XOR_RESET = 16'h8000;  // Q16 set
  localparam logic [N:1] NOT_RESET = 16'hBBBB;  // Q1..Q4 = 1,1,0,1 repeated

  logic clk;
  logic rst, clk_odd, clk_even;
  logic [N:1] xor_q, xor_qb, not_q, not_qb;
  logic       xor_serial, not_serial;
  logic [N:1] mx, mn;
  int checks = 0, failures = 0;
  int n_reset = 0, n_full = 0, n_odd = 0, n_even = 0, n_hold = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;  // 100 MHz

  secure_lfsr16_top dut (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .xor_q(xor_q), .xor_qb(xor_qb), .xor_serial(xor_serial),
    .not_q(not_q), .not_qb(not_qb), .not_serial(not_serial));

  function automatic logic [N:1] model_next(logic [N:1] s, logic fb, logic odd, logic even);
    logic [N:1] shifted, en;
    shifted = {s[N-1:1], fb};
    en = (odd ? ODD_MASK : '0) | (even ? EVEN_MASK : '0);
    return (shifted & en) | (s & ~en);
  endfunction

  task automatic compare(string what);
    checks++;
    if (xor_q !== mx || xor_qb !== ~mx || xor_serial !== mx[N] ||
        not_q !== mn || not_qb !== ~mn || not_serial !== mn[N]) begin
      failures++;
      $display("FAIL %s: xor %h (exp %h) not %h (exp %h)", what, xor_q, mx, not_q, mn);
    end
  endtask

  task automatic cycle(logic odd, logic even);
    @(negedge clk);
    clk_odd = odd; clk_even = even;
    @(posedge clk);
    mx = model_next(mx, mx[N-1] ^ mx[N], odd, even);
    mn = model_next(mn, ~mn[N], odd, even);
    if (odd && even) n_full++;
    else if (odd) n_odd++;
    else if (even) n_even++;
    else n_hold++;
    #1 compare($sformatf("cycle odd=%b even=%b", odd, even));
    clk_odd = 1'b0; clk_even = 1'b0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    #2 rst = 1'b1;         // asynchronous: no clock edge needed
    #1 mx = XOR_RESET; mn = NOT_RESET; n_reset++;
    compare("reset");
    @(negedge clk) rst = 1'b0;
  endtask

  initial begin
    int steps, model_period;
    logic [N:1] s;
    bit saw_zero;

    rst = 1'b0; clk_odd = 1'b0; clk_even = 1'b0;
    do_reset();

    // Random mix of all pulse patterns, with a reset now and then.
    for (int k = 0; k < 4000; k++) begin
      automatic int r = int'($urandom % 10);
      if (r < 6)       cycle(1'b1, 1'b1);
      else if (r == 6) cycle(1'b1, 1'b0);
      else if (r == 7) cycle(1'b0, 1'b1);
      else if (r == 8) cycle(1'b0, 1'b0);
      else if (($urandom % 20) == 0) do_reset();
      else cycle(1'b1, 1'b1);
    end

    // Cycle of the NOT register: 2 * N full steps.
    do_reset();
    steps = 0;
    do begin cycle(1'b1, 1'b1); steps++; end while (not_q != NOT_RESET && steps < 1000);
    checks++;
    if (steps != 2 * N) begin
      failures++;
      $display("FAIL NOT register cycle %0d steps, expected %0d", steps, 2 * N);
    end

    // Cycle of the XOR register as the model predicts it (full steps from reset).
    s = XOR_RESET;
    model_period = 0;
    do begin s = {s[N-1:1], s[N-1] ^ s[N]}; model_period++; end
      while (s != XOR_RESET && model_period < 70000);
    do_reset();
    steps = 0;
    saw_zero = 1'b0;
    do begin
      cycle(1'b1, 1'b1);
      steps++;
      if (xor_q == '0) saw_zero = 1'b1;
    end while (xor_q != XOR_RESET && steps < 70000);
    checks++;
    if (steps != model_period || saw_zero) begin
      failures++;
      $display("FAIL XOR register cycle %0d steps, model %0d, zero state %b",
               steps, model_period, saw_zero);
    end
    $display("XOR register cycle: %0d steps; NOT register cycle: %0d steps", model_period, 2 * N);

    // Every mechanism must have happened.
    checks++;
    if (n_reset == 0 || n_full == 0 || n_odd == 0 || n_even == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL mechanism never exercised");
    end
    $display("resets=%0d full_steps=%0d odd_only=%0d even_only=%0d holds=%0d",
             n_reset, n_full, n_odd, n_even, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
