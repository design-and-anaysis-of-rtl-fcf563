// tb_pulsed_latch: self-checking test of one pulsed latch.
//
// Drives the pulse, clear and differential data inputs directly and checks,
// against the expected latch behaviour worked out here: transparency while the
// pulse is high, hold while it is low, hold when D and Db are equal, the
// asynchronous clear, and that Qb is always the complement of Q. 200 random
// steps follow the directed ones, each compared with a reference value kept
// by the testbench.
module tb_pulsed_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic pulse, clr, d, d_b, q, q_b;
  int   checks = 0, failures = 0;
  logic expected;

  pulsed_latch dut (.pulse, .clr, .d, .d_b, .q, .q_b);

  task automatic check(input logic exp, input string what);
    #10;
    checks++;
    if (q !== exp || q_b !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b q_b=%b expected q=%b", what, q, q_b, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = 0; clr = 1; d = 1; d_b = 0;
    check(1'b0, "clear wins over data");
    clr = 0;
    check(1'b0, "closed latch holds after clear");
    pulse = 1;
    check(1'b1, "open latch takes D=1");
    d = 0; d_b = 1;
    check(1'b0, "open latch follows D=0");
    d = 1; d_b = 0;
    check(1'b1, "open latch follows D=1");
    pulse = 0;
    d = 0; d_b = 1;
    check(1'b1, "closed latch holds 1");
    pulse = 1;
    check(1'b0, "reopened latch takes 0");
    d = 1; d_b = 1;
    check(1'b0, "equal D/Db keeps value");
    d = 0; d_b = 0;
    check(1'b0, "equal D/Db keeps value (both low)");
    d = 1; d_b = 0;
    check(1'b1, "valid input again");
    clr = 1;
    check(1'b0, "asynchronous clear while open");
    clr = 0;
    check(1'b1, "open latch retakes D after clear");

    // Random stimulus against a reference.
    expected = q;
    repeat (200) begin
      pulse = 1'($urandom);
      clr   = ($urandom % 10) == 0;
      d     = 1'($urandom);
      d_b   = ($urandom % 8 == 0) ? d : ~d;
      if (clr)                        expected = 1'b0;
      else if (pulse && (d != d_b))   expected = d;
      check(expected, "random step");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
