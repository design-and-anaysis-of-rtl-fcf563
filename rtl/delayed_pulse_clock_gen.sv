// delayed_pulse_clock_gen: the delayed pulsed clock generator. BEHAVIOURAL
// MODEL: it is a chain of analog delay circuits and simulates with transport
// delays; it does not synthesise.
//
// How it works: NUM_PULSES clock pulse circuits (clock_pulse_stage) are
// cascaded. The first takes the source clock, each later one the clock as
// delayed by the stage before it. Every rising source-clock edge therefore
// produces a train of NUM_PULSES pulses: pulse[i] is high from
// i*STAGE_DELAY_PS to i*STAGE_DELAY_PS + PULSE_WIDTH_PS after the edge. Since
// STAGE_DELAY_PS exceeds PULSE_WIDTH_PS, no two pulses overlap.
//
// Interface and timing:
//   clk      source clock; pulses follow its rising edges only
//   pulse    NUM_PULSES delayed pulsed clocks, pulse[0] first
// The clock must stay high until the last pulse has closed, (NUM_PULSES-1) *
// STAGE_DELAY_PS + PULSE_WIDTH_PS after the edge (700 ps by default); an
// assertion checks this. The cascade of pulse circuits, each with a delay
// circuit, inverter, AND gate and buffer, follows the generator architecture;
// the delay values are this design's choice.
module delayed_pulse_clock_gen #(
  parameter int unsigned NUM_PULSES     = pulsed_latch_pkg::SUB_WIDTH + 1,
  parameter int unsigned PULSE_WIDTH_PS = pulsed_latch_pkg::PULSE_WIDTH_PS,
  parameter int unsigned STAGE_DELAY_PS = pulsed_latch_pkg::STAGE_DELAY_PS
) (
  input  logic                  clk,
  output logic [NUM_PULSES-1:0] pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TRAIN_PS =
    pulsed_latch_pkg::pulse_train_ps(NUM_PULSES, STAGE_DELAY_PS, PULSE_WIDTH_PS);

  logic [NUM_PULSES:0] clk_dly;  // clk_dly[i] feeds stage i

  assign clk_dly[0] = clk;

  // clk_dly[NUM_PULSES], the clock passed on by the last stage, is left open
  // in silicon; here nothing reads it.
  for (genvar i = 0; i < NUM_PULSES; i++) begin : g_stage
    clock_pulse_stage #(
      .PULSE_WIDTH_PS(PULSE_WIDTH_PS),
      .STAGE_DELAY_PS(STAGE_DELAY_PS)
    ) u_stage (
      .clk_in (clk_dly[i]),
      .pulse  (pulse[i]),
      .clk_out(clk_dly[i+1])
    );
  end

  // The source clock must be high long enough for the whole pulse train:
  // after a rising edge, the last pulse must close before the clock falls.
  always begin
    @(posedge clk);
    @(negedge pulse[NUM_PULSES-1] or negedge clk);
    assert (clk)
      else $error("delayed_pulse_clock_gen: clock high phase shorter than the %0d ps pulse train",
                  TRAIN_PS);
  end
endmodule
