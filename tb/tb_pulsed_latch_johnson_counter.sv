// tb_pulsed_latch_johnson_counter: self-checking test of the 4-bit
// pulsed-latch Johnson counter.
//
// After the clear the counter must step, one state per rising clock edge,
// through 0000, 1000, 1100, 1110, 1111, 0111, 0011, 0001 (first stage written
// first) and return to 0000 after 8 edges. The sequence is held as a table in
// the testbench; the test runs five full periods, clears in the middle of a
// period and checks the counter restarts from 0000.
module tb_pulsed_latch_johnson_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned BITS   = 4;
  localparam int unsigned PERIOD = 2000;

  // Expected states, written Q1 Q2 Q3 Q4 from left to right.
  localparam logic [3:0] SEQ [8] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110,
                                     4'b1111, 4'b0111, 4'b0011, 4'b0001};

  logic            clk, clr;
  logic [BITS-1:0] q;
  int              checks = 0, failures = 0;

  pulsed_latch_johnson_counter dut (.clk, .clr, .q);

  // q[0] is Q1; reverse it to compare with the table.
  function automatic logic [3:0] as_written(input logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  task automatic cycle();
    #(PERIOD / 4);
    clk = 1'b1;
    #(PERIOD / 2);
    clk = 1'b0;
    #(PERIOD / 4);
  endtask

  task automatic compare(input int step);
    checks++;
    if (as_written(q) !== SEQ[step % 8]) begin
      failures++;
      $display("FAIL step %0d: state %b expected %b", step, as_written(q), SEQ[step % 8]);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    clr = 1; #500; clr = 0;
    compare(0);
    for (int step = 1; step <= 5 * 8; step++) begin
      cycle();
      compare(step);
    end
    repeat (3) cycle();
    clr = 1; #100; clr = 0;
    compare(0);
    for (int step = 1; step <= 8; step++) begin
      cycle();
      compare(step);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
