// pulsed_latch_top: the two pulsed-latch designs side by side, a SR_WIDTH-bit
// shift register and a CNT_BITS-bit Johnson counter.
//
// How it works: both designs replace flip-flops by pulsed latches and avoid
// the latch timing problem with non-overlapping delayed pulsed clocks fired in
// reverse chain order (see pulsed_latch_shift_register). Each has its own
// source clock and its own delayed pulsed clock generator; they share only the
// asynchronous clear. Placing them together, with separate clocks, is this
// design's choice.
//
// Interface and timing:
//   clr            asynchronous clear of both designs
//   sr_clk         shift register clock, one shift per rising edge
//   sr_in          serial input, stable while sr_clk is high
//   sr_q, sr_out   parallel outputs (sr_q[0] newest bit) and serial output
//   cnt_clk        counter clock, one count per rising edge
//   cnt_q          Johnson counter state
// Each clock must stay high at least 700 ps (default pulse timing) so that
// its pulse train completes.
module pulsed_latch_top #(
  parameter int unsigned SR_WIDTH = 16,
  parameter int unsigned CNT_BITS = 4
) (
  input  logic                clr,
  input  logic                sr_clk,
  input  logic                sr_in,
  output logic [SR_WIDTH-1:0] sr_q,
  output logic                sr_out,
  input  logic                cnt_clk,
  output logic [CNT_BITS-1:0] cnt_q
);
  timeunit 1ps;
  timeprecision 1ps;

  pulsed_latch_shift_register #(
    .WIDTH(SR_WIDTH)
  ) u_shift_register (
    .clk (sr_clk),
    .clr (clr),
    .sin (sr_in),
    .q   (sr_q),
    .sout(sr_out)
  );

  pulsed_latch_johnson_counter #(
    .BITS(CNT_BITS)
  ) u_counter (
    .clk(cnt_clk),
    .clr(clr),
    .q  (cnt_q)
  );
endmodule
