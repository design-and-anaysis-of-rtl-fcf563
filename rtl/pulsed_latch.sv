// pulsed_latch: one static differential sense-amp shared pulsed latch
// (SSASPL), the storage cell of the shift register and of the counter.
//
// How it works: in silicon the cell is seven transistors. One NMOS, gated by
// the shared pulsed clock, is the tail of two NMOS data transistors driven by
// D and Db; these pull Qb or Q low while the pulse is high, and two
// cross-coupled inverters hold the value once the pulse has ended. At the
// logic level that is a level-sensitive latch, transparent while `pulse` is
// high. The differential inputs come straight from the Q/Qb outputs of the
// previous latch, so no input inverter is needed.
//
// Interface and timing:
//   pulse    pulsed clock; while high, q follows d
//   clr      asynchronous clear, active high, q = 0 (this design's addition,
//            so the Johnson counter can start from the cleared state)
//   d, d_b   differential data; when both are equal neither pull-down path
//            decides, and the latch keeps its value (this design's choice)
//   q, q_b   stored bit and its complement
// Inputs must be stable for the whole pulse; the shift register guarantees
// this by firing the latches in reverse order with non-overlapping pulses.
// The latch is intentional: it is the whole point of the design.
module pulsed_latch (
  input  logic pulse,
  input  logic clr,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b
);
  timeunit 1ps;
  timeprecision 1ps;

  logic take;  // pulse open and one of the two pull-down paths conducts

  assign take = pulse & (d ^ d_b);

  always_latch begin
    if (clr)
      q = 1'b0;
    else if (take)
      q = d;
  end

  assign q_b = ~q;
endmodule
