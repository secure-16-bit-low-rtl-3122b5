// ud_latch_tb: self-checking test of one pulse-latch stage.
//
// Drives random differential data (Db always the complement of D) and random pulses,
// with occasional asynchronous resets, and after every clock edge compares Q and Qb
// with a reference: after reset Q is RESET_VALUE, after an edge with the pulse high Q
// is the D that was applied, and otherwise Q holds. Both reset values are tested, and
// a held value is checked to survive data changes while no pulse arrives. A watchdog
// ends the run if it stalls.
module ud_latch_tb;

  logic clk;
  initial clk = 1'b0;
  logic rst, pulse, d;
  logic q0, qb0, q1, qb1;
  logic exp0, exp1;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  ud_latch #(.RESET_VALUE(1'b0)) dut0 (
    .clk(clk), .rst(rst), .pulse(pulse), .d(d), .db(~d), .q(q0), .qb(qb0));
  ud_latch #(.RESET_VALUE(1'b1)) dut1 (
    .clk(clk), .rst(rst), .pulse(pulse), .d(d), .db(~d), .q(q1), .qb(qb1));

  task automatic check(string what);
    checks++;
    if (q0 !== exp0 || qb0 !== ~exp0 || q1 !== exp1 || qb1 !== ~exp1) begin
      failures++;
      $display("FAIL %s: q0=%b qb0=%b (exp %b) q1=%b qb1=%b (exp %b)",
               what, q0, qb0, exp0, q1, qb1, exp1);
    end
  endtask

  initial begin
    rst = 1'b1; pulse = 1'b0; d = 1'b1;
    exp0 = 1'b0; exp1 = 1'b1;
    #1 check("reset asserted");
    @(negedge clk) rst = 1'b0;
    repeat (3) begin
      @(negedge clk) d = ~d;
      @(posedge clk) #1 check("hold without pulse");
    end
    repeat (2000) begin
      @(negedge clk);
      d     = 1'($urandom);
      pulse = ($urandom % 3) != 0;
      if (($urandom % 50) == 0) begin
        // Asynchronous reset in the middle of a cycle.
        #1 rst = 1'b1;
        #1 exp0 = 1'b0; exp1 = 1'b1;
        check("async reset");
        rst = 1'b0;
      end
      @(posedge clk);
      if (pulse) begin exp0 = d; exp1 = d; end
      #1 check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
