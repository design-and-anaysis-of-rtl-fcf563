// tb_delayed_pulse_clock_gen: self-checking timing test of the delayed pulsed
// clock generator with its default five pulses.
//
// Applies a 2 ns clock and, for every pulse output, measures its start
// relative to the rising clock edge (expected i*STAGE_DELAY_PS for pulse[i])
// and its width (expected PULSE_WIDTH_PS). It also checks on every change
// that at most one pulse is high (the pulses never overlap) and that each
// output produces exactly one pulse per clock cycle.
module tb_delayed_pulse_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 5;
  localparam int unsigned W = 100;
  localparam int unsigned D = 150;
  localparam int unsigned PERIOD = 2000;
  localparam int unsigned CYCLES = 12;

  logic         clk;
  logic [N-1:0] pulse;
  int           checks = 0, failures = 0;
  time          t_edge;
  time          t_rise [N];
  int           n_pulses [N];

  delayed_pulse_clock_gen #(.NUM_PULSES(N), .PULSE_WIDTH_PS(W), .STAGE_DELAY_PS(D))
    dut (.clk, .pulse);

  task automatic expect_eq(input longint got, input longint exp, input string what, input int idx);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (pulse %0d): got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge pulse[i]) begin
      t_rise[i] = $time;
      n_pulses[i]++;
      expect_eq($time - t_edge, i * D, "pulse start after clock edge", i);
    end
    always @(negedge pulse[i]) if (n_pulses[i] > 0) expect_eq($time - t_rise[i], W, "pulse width", i);
  end

  always @(pulse) begin
    checks++;
    if ($countones(pulse) > 1) begin
      failures++;
      $display("FAIL pulses overlap: %b at %0t", pulse, $time);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) n_pulses[i] = 0;
    clk = 0;
    t_edge = 0;
    #1000;
    repeat (CYCLES) begin
      clk = 1; t_edge = $time;
      #(PERIOD / 2);
      clk = 0;
      #(PERIOD / 2);
    end
    #1000;
    for (int i = 0; i < N; i++) expect_eq(n_pulses[i], CYCLES, "pulses per output", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
