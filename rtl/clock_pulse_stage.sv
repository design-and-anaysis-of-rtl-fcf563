// clock_pulse_stage: one clock pulse circuit of the delayed pulsed clock
// generator. BEHAVIOURAL MODEL: the circuit is built from inverter delay
// chains, so its function is a matter of analog delays, modelled here with
// transport delays. It simulates but does not synthesise.
//
// How it works: the stage takes a (delayed) copy of the source clock, `clk_in`.
// A short delay line and an inverter give a copy delayed by PULSE_WIDTH_PS and
// inverted; an AND gate combines it with `clk_in`, which yields a pulse of
// width PULSE_WIDTH_PS that starts at each rising edge of `clk_in`. Falling
// edges make no pulse. A second, longer delay line with a buffer passes the
// clock on to the next stage, STAGE_DELAY_PS later, so a cascade of stages
// produces a train of pulses, one per stage. Because each pulse is cut out by
// an AND of two delayed signals, it can be narrower than the rise and fall
// times summed along the delay chain.
//
// Interface and timing:
//   clk_in   source clock, or the `clk_out` of the previous stage
//   pulse    clk_in rising edge .. + PULSE_WIDTH_PS
//   clk_out  clk_in delayed by STAGE_DELAY_PS
// The stage structure (delay circuit, inverter, AND gate, buffer) follows the
// generator architecture; the delay values are this design's choice. The
// clock high phase must be longer than PULSE_WIDTH_PS.
module clock_pulse_stage #(
  parameter int unsigned PULSE_WIDTH_PS = pulsed_latch_pkg::PULSE_WIDTH_PS,
  parameter int unsigned STAGE_DELAY_PS = pulsed_latch_pkg::STAGE_DELAY_PS
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_short_dly;  // clk_in after the pulse-width delay circuit

  initial begin
    clk_short_dly = 1'b0;
    clk_out       = 1'b0;
  end

  // Delay circuits: transport delays, so every edge is passed on.
  always @(clk_in) clk_short_dly <= #(PULSE_WIDTH_PS) clk_in;
  always @(clk_in) clk_out       <= #(STAGE_DELAY_PS) clk_in;

  // Inverter and AND gate: the pulse.
  assign pulse = clk_in & ~clk_short_dly;

  initial begin
    assert (STAGE_DELAY_PS > PULSE_WIDTH_PS)
      else $error("clock_pulse_stage: pulses of successive stages would overlap");
  end
endmodule
