// tb_clock_pulse_stage: self-checking timing test of one clock pulse circuit.
//
// Applies a clock with a 2 ns period and measures, with the simulation clock,
// when the stage's pulse rises and falls and when its delayed clock output
// changes. Expected: one pulse per rising input edge, starting at the edge and
// PULSE_WIDTH_PS wide, no pulse on falling edges, and clk_out equal to clk_in
// delayed by STAGE_DELAY_PS.
module tb_clock_pulse_stage;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 100;
  localparam int unsigned D = 150;
  localparam int unsigned PERIOD = 2000;
  localparam int unsigned CYCLES = 10;

  logic clk_in, pulse, clk_out;
  int   checks = 0, failures = 0;
  time  t_edge, t_rise, t_fall;
  int   n_pulses = 0;

  clock_pulse_stage #(.PULSE_WIDTH_PS(W), .STAGE_DELAY_PS(D)) dut (.clk_in, .pulse, .clk_out);

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse) begin
    t_rise = $time;
    n_pulses++;
    expect_eq(t_rise - t_edge, 0, "pulse starts at the rising clock edge");
  end
  always @(negedge pulse) if (n_pulses > 0) begin
    t_fall = $time;
    expect_eq(t_fall - t_rise, W, "pulse width");
  end
  always @(posedge clk_out) expect_eq($time - t_edge, D, "delayed clock rises after STAGE_DELAY_PS");
  always @(negedge clk_out) expect_eq($time - (t_edge + PERIOD / 2), D,
                                      "delayed clock falls after STAGE_DELAY_PS");

  initial begin
    clk_in = 0;
    #1000;
    repeat (CYCLES) begin
      clk_in = 1; t_edge = $time;
      #(PERIOD / 2);
      clk_in = 0;
      #(PERIOD / 4);
      expect_eq(pulse, 0, "no pulse after a falling edge");
      #(PERIOD / 4);
    end
    #1000;
    expect_eq(n_pulses, CYCLES, "one pulse per rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
