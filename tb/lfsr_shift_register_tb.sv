// lfsr_shift_register_tb: self-checking test of the latch-chain shift register.
//
// Part 1 replays the two 4-bit worked examples state by state (written Q1..Q4):
//   XOR feedback: reset 0001, then 1000, 0100, 0010, 1001
//   NOT feedback: reset 1101, then 0110, 1011, 0101, 0010
// each step being one cycle with both pulse clocks high, and checks that the new state
// shows right after the clock edge of that cycle (one cycle per step). It then checks
// the length of each cycle: 15 steps for the 4-bit XOR register (x^4 + x^3 + 1 is
// primitive) and 8 for the 4-bit NOT register (a twisted ring of 4 stages).
// Part 2 runs 16-bit XOR and NOT registers at their defaults under random pulse
// patterns (both, odd only, even only, none) and random resets, comparing Q, Qb and
// the serial output after every edge with a reference model: a stage whose pulse is
// high takes the value its predecessor (or the feedback gate) had before the edge.
// Part 3 gives a 16-bit XOR register four taps (Q16, Q15, Q13, Q4) and checks that it
// steps through all 65535 non-zero states before repeating.
module lfsr_shift_register_tb;
  import lfsr_pkg::*;

  logic clk;
  initial clk = 1'b0;
  logic rst;
  logic clk_odd, clk_even;
  logic [4:1]  x4_q, x4_qb, n4_q, n4_qb;
  logic [16:1] x16_q, x16_qb, n16_q, n16_qb;
  logic [16:1] m16_q, m16_qb;
  logic        x4_s, n4_s, x16_s, n16_s, m16_s;
  int          checks = 0;
  int          failures = 0;
  int          odd_only = 0, even_only = 0, both = 0;

  always #5 clk = ~clk;

  lfsr_shift_register #(.WIDTH(4), .MODE(FB_XOR)) dut_x4 (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .q(x4_q), .qb(x4_qb), .serial_out(x4_s));
  lfsr_shift_register #(.WIDTH(4), .MODE(FB_NOT)) dut_n4 (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .q(n4_q), .qb(n4_qb), .serial_out(n4_s));
  lfsr_shift_register #(.MODE(FB_XOR)) dut_x16 (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .q(x16_q), .qb(x16_qb), .serial_out(x16_s));
  // More XOR inputs: taps Q16, Q15, Q13, Q4 (x^16 + x^15 + x^13 + x^4 + 1, primitive).
  lfsr_shift_register #(.MODE(FB_XOR), .TAPS(16'b1101_0000_0000_1000)) dut_m16 (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .q(m16_q), .qb(m16_qb), .serial_out(m16_s));
  lfsr_shift_register #(.MODE(FB_NOT)) dut_n16 (
    .clk(clk), .rst(rst), .clk_odd(clk_odd), .clk_even(clk_even),
    .q(n16_q), .qb(n16_qb), .serial_out(n16_s));

  // Q1..Q4 written left to right, as in the worked examples.
  function automatic string q1_first(logic [4:1] v);
    return $sformatf("%b%b%b%b", v[1], v[2], v[3], v[4]);
  endfunction

  // Reference step of an n-stage register held in s[1..n].
  function automatic void ref_step(ref bit s[1:16], input int n, input bit is_xor,
                                   input bit odd, input bit even);
    bit fb;
    fb = is_xor ? (s[n-1] ^ s[n]) : !s[n];
    for (int i = n; i >= 2; i--) if ((i % 2 == 1) ? odd : even) s[i] = s[i-1];
    if (odd) s[1] = fb;
  endfunction

  function automatic bit state_ok(bit s[1:16], logic [16:1] q, logic [16:1] qb);
    for (int i = 1; i <= 16; i++) if (q[i] !== s[i] || qb[i] !== !s[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic expect_str(string what, string got, string exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got, exp);
    end
  endtask

  task automatic step(bit odd, bit even);
    @(negedge clk);
    clk_odd = odd; clk_even = even;
    @(posedge clk);
    #1;
    clk_odd = 1'b0; clk_even = 1'b0;
  endtask

  string xor_seq[5] = '{"0001", "1000", "0100", "0010", "1001"};
  string not_seq[5] = '{"1101", "0110", "1011", "0101", "0010"};

  initial begin
    bit sx[1:16], sn[1:16];
    string start_x, start_n;
    int period;

    // ---- Part 1: the 4-bit worked examples ----
    rst = 1'b1; clk_odd = 1'b0; clk_even = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_str("xor4 reset", q1_first(x4_q), xor_seq[0]);
    expect_str("not4 reset", q1_first(n4_q), not_seq[0]);
    for (int k = 1; k < 5; k++) begin
      step(1'b1, 1'b1);
      expect_str($sformatf("xor4 step %0d", k), q1_first(x4_q), xor_seq[k]);
      expect_str($sformatf("not4 step %0d", k), q1_first(n4_q), not_seq[k]);
      expect_str("xor4 qb", q1_first(~x4_qb), q1_first(x4_q));
      expect_str("not4 qb", q1_first(~n4_qb), q1_first(n4_q));
      expect_str("xor4 serial", $sformatf("%b", x4_s), $sformatf("%b", x4_q[4]));
      expect_str("not4 serial", $sformatf("%b", n4_s), $sformatf("%b", n4_q[4]));
    end
    // Cycle lengths.
    start_x = q1_first(x4_q);
    period = 0;
    do begin step(1'b1, 1'b1); period++; end while (q1_first(x4_q) != start_x && period < 100);
    expect_str("xor4 period", $sformatf("%0d", period), "15");
    start_n = q1_first(n4_q);
    period = 0;
    do begin step(1'b1, 1'b1); period++; end while (q1_first(n4_q) != start_n && period < 100);
    expect_str("not4 period", $sformatf("%0d", period), "8");

    // ---- Part 2: 16-bit registers against the reference model ----
    @(negedge clk) rst = 1'b1;
    #1;
    for (int i = 1; i <= 16; i++) begin
      sx[i] = (i == 16);
      sn[i] = ((i - 1) % 4) != 2;
    end
    @(negedge clk) rst = 1'b0;
    checks++;
    if (!state_ok(sx, x16_q, x16_qb) || !state_ok(sn, n16_q, n16_qb)) begin
      failures++;
      $display("FAIL 16-bit reset: xor %b not %b", x16_q, n16_q);
    end
    repeat (3000) begin
      bit odd, even;
      int r;
      r = int'($urandom % 8);
      odd  = (r < 4) || (r == 4);
      even = (r < 4) || (r == 5);
      if (odd && even) both++;
      else if (odd) odd_only++;
      else if (even) even_only++;
      if (($urandom % 200) == 0) begin
        @(negedge clk) rst = 1'b1;
        for (int i = 1; i <= 16; i++) begin
          sx[i] = (i == 16);
          sn[i] = ((i - 1) % 4) != 2;
        end
        @(negedge clk) rst = 1'b0;
      end
      step(odd, even);
      ref_step(sx, 16, 1'b1, odd, even);
      ref_step(sn, 16, 1'b0, odd, even);
      checks++;
      if (!state_ok(sx, x16_q, x16_qb) || !state_ok(sn, n16_q, n16_qb) ||
          x16_s !== sx[16] || n16_s !== sn[16]) begin
        failures++;
        $display("FAIL 16-bit step (odd=%b even=%b): xor %b not %b", odd, even, x16_q, n16_q);
      end
    end
    checks++;
    if (both == 0 || odd_only == 0 || even_only == 0) begin
      failures++;
      $display("FAIL pulse patterns not all exercised");
    end

    // ---- Part 3: four-tap XOR register runs through all 65535 non-zero states ----
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    begin
      logic [16:1] start, s;
      automatic int seen_zero = 0;
      start = m16_q;
      s = start;
      period = 0;
      do begin
        step(1'b1, 1'b1);
        period++;
        // Reference: shift towards Q16, Q1 takes Q16 ^ Q15 ^ Q13 ^ Q4 of the old state.
        s = {s[15:1], s[16] ^ s[15] ^ s[13] ^ s[4]};
        if (m16_q == '0) seen_zero++;
        if (period % 4096 == 0) begin
          checks++;
          if (m16_q !== s || m16_qb !== ~s || m16_s !== s[16]) begin
            failures++;
            $display("FAIL four-tap register at step %0d: %h expected %h", period, m16_q, s);
          end
        end
      end while (m16_q != start && period < 70000);
      expect_str("four-tap period", $sformatf("%0d zero=%0d", period, seen_zero), "65535 zero=0");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
