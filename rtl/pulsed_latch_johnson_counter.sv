// pulsed_latch_johnson_counter: a BITS-bit Johnson (twisted ring) counter
// built from pulsed latches.
//
// How it works: a Johnson counter is a shift register whose inverted last
// stage feeds its first stage; from the cleared state it walks a run of ones
// in and then a run of zeros, 2*BITS states in all (for 4 bits: 0000, 1000,
// 1100, 1110, 1111, 0111, 0011, 0001, then 0000 again, reading q[0] first).
// Here the shift register is one pulsed-latch sub shift register with its own
// delayed pulsed clock generator. The pulses fire in the order T, Q4 .. Q1:
// the temporary latch T first saves the last stage, the data latches shift,
// and Q1 finally takes the complement of T. Because T still holds the old last
// stage when Q1 is written, the ring needs no other delay element. The
// differential outputs make the inversion free: T's Qb/Q drive Q1's D/Db.
//
// Interface and timing:
//   clk      source clock; one count per rising edge, settled by the end of
//            the pulse train (700 ps by default)
//   clr      asynchronous clear to all zeros, the counter's start state
//   q        counter state; q[0] is the first stage
// The feedback of the inverted last stage and the use of pulsed latches follow
// the counter's description. Using the temporary latch and the delayed pulses
// of the shift register, rather than one pulse for all four latches, is this
// design's choice: with a single pulse the latches of the ring would race.
//
// The ring Q1 -> Q2 -> Q3 -> Q4 -> T -> Q1 is reported by the Verilator
// linter as circular combinational logic (UNOPTFLAT), since the linter treats
// latches as combinational. The loop is the counter itself; it is never transparent all the way round,
// because no two of the non-overlapping pulses are high at the same time.
module pulsed_latch_johnson_counter #(
  parameter int unsigned BITS           = 4,
  parameter int unsigned PULSE_WIDTH_PS = pulsed_latch_pkg::PULSE_WIDTH_PS,
  parameter int unsigned STAGE_DELAY_PS = pulsed_latch_pkg::STAGE_DELAY_PS
) (
  input  logic            clk,
  input  logic            clr,
  output logic [BITS-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [BITS:0]   pulse;    // pulse[0] first
  logic [BITS-1:0] pulse_q;
  logic            t, t_b;

  delayed_pulse_clock_gen #(
    .NUM_PULSES    (BITS + 1),
    .PULSE_WIDTH_PS(PULSE_WIDTH_PS),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_pulse_gen (
    .clk  (clk),
    .pulse(pulse)
  );

  for (genvar j = 0; j < BITS; j++) begin : g_pulse_map
    assign pulse_q[j] = pulse[BITS-j];
  end

  // Twisted feedback: the complement of the saved last stage enters Q1.
  sub_shift_register #(
    .SUB_WIDTH(BITS)
  ) u_ring (
    .clr    (clr),
    .pulse_t(pulse[0]),
    .pulse_q(pulse_q),
    .d      (t_b),
    .d_b    (t),
    .q      (q),
    .t      (t),
    .t_b    (t_b)
  );
endmodule
