// tb_pulsed_latch_shift_register: self-checking test of the pulsed-latch shift
// register at its default size (16 bits, four 4-bit sub registers).
//
// A 2 ns clock drives the register; the serial input changes on the falling
// edge, when the pulse train of the rising edge is over. After each rising
// edge's pulse train the parallel outputs are compared with a reference shift
// register kept in the testbench. Directed parts check the clear, the latency
// of a single one from the input to the serial output (it must appear after
// WIDTH rising edges, counting the edge that took it in), and that bits cross
// each sub register boundary through the temporary latches. A random stream
// of 200 bits follows.
module tb_pulsed_latch_shift_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH  = 16;
  localparam int unsigned PERIOD = 2000;

  logic             clk, clr, sin, sout;
  logic [WIDTH-1:0] q, ref_q;
  int               checks = 0, failures = 0;
  int               edges;

  pulsed_latch_shift_register dut (.clk, .clr, .sin, .q, .sout);

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle with serial input `bit_in`: rising edge, wait for the
  // pulse train, update the reference, then the falling edge.
  task automatic cycle(input logic bit_in);
    sin = bit_in;
    #(PERIOD / 4);
    clk = 1'b1;
    #(PERIOD / 2);
    ref_q = {ref_q[WIDTH-2:0], bit_in};
    edges++;
    clk = 1'b0;
    #(PERIOD / 4);
  endtask

  task automatic compare(input string what);
    checks++;
    if (q !== ref_q || sout !== ref_q[WIDTH-1]) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, ref_q);
    end
  endtask

  initial begin
    clk = 0; sin = 0; edges = 0;
    clr = 1; #500; clr = 0;
    ref_q = '0;
    compare("after clear");

    // Latency of one bit from sin to sout.
    cycle(1'b1);
    compare("single one in Q1");
    edges = 1;
    while (sout !== 1'b1 && edges < 2 * WIDTH) begin
      cycle(1'b0);
      compare("single one moving");
    end
    checks++;
    if (edges != WIDTH) begin
      failures++;
      $display("FAIL latency: one reached sout after %0d edges, expected %0d", edges, WIDTH);
    end
    cycle(1'b0);
    compare("single one left");

    // Random stream.
    repeat (200) begin
      cycle(1'($urandom));
      compare("random stream");
    end

    // Alternating pattern, the worst case for the latches' inputs.
    repeat (2 * WIDTH) begin
      cycle(~ref_q[0]);
      compare("alternating stream");
    end

    clr = 1; #100; clr = 0;
    ref_q = '0;
    compare("clear after data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
