// lfsr_feedback_tb: self-checking test of the feedback gate.
//
// 4-bit XOR and NOT gates are checked exhaustively against the rules "Q3 XOR Q4" and
// "NOT Q4"; 16-bit gates with the default taps (Q15, Q16) and with a custom four-tap
// set are checked on random inputs, counting the ones among the tapped bits as the
// reference. The complement output is checked each time. No clock is needed; the
// watchdog is a time limit.
module lfsr_feedback_tb;
  import lfsr_pkg::*;

  localparam logic [16:1] TAPS4 = 16'b1101_0000_0000_1000;  // Q16, Q15, Q13, Q4

  logic [4:1]  q4;
  logic [16:1] q16;
  logic        x4, x4b, n4, n4b, x16, x16b, n16, n16b, c16, c16b;
  int          checks = 0;
  int          failures = 0;

  lfsr_feedback #(.WIDTH(4),  .MODE(FB_XOR))               g_x4  (.q(q4),  .fb(x4),  .fb_b(x4b));
  lfsr_feedback #(.WIDTH(4),  .MODE(FB_NOT))               g_n4  (.q(q4),  .fb(n4),  .fb_b(n4b));
  lfsr_feedback #(.WIDTH(16), .MODE(FB_XOR))               g_x16 (.q(q16), .fb(x16), .fb_b(x16b));
  lfsr_feedback #(.WIDTH(16), .MODE(FB_NOT))               g_n16 (.q(q16), .fb(n16), .fb_b(n16b));
  lfsr_feedback #(.WIDTH(16), .MODE(FB_XOR), .TAPS(TAPS4)) g_c16 (.q(q16), .fb(c16), .fb_b(c16b));

  task automatic expect_bit(string what, logic got, logic got_b, logic exp);
    checks++;
    if (got !== exp || got_b !== ~exp) begin
      failures++;
      $display("FAIL %s: got %b/%b expected %b", what, got, got_b, exp);
    end
  endtask

  initial begin
    int ones;
    for (int v = 0; v < 16; v++) begin
      q4 = 4'(v);
      #1;
      // q4[3] is Q3, q4[4] is Q4: equal bits give 0, different bits give 1.
      expect_bit("xor4", x4, x4b, (q4[3] == q4[4]) ? 1'b0 : 1'b1);
      expect_bit("not4", n4, n4b, q4[4] ? 1'b0 : 1'b1);
    end
    repeat (500) begin
      q16 = 16'($urandom);
      #1;
      expect_bit("xor16", x16, x16b, (q16[15] == q16[16]) ? 1'b0 : 1'b1);
      expect_bit("not16", n16, n16b, q16[16] ? 1'b0 : 1'b1);
      ones = 0;
      foreach (q16[i]) if (TAPS4[i] && q16[i]) ones++;
      expect_bit("xor16 custom taps", c16, c16b, 1'(ones % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
