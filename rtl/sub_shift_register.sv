// sub_shift_register: a SUB_WIDTH-bit sub shift register of pulsed latches
// (4 bits by default), the repeating unit of the shift register.
//
// How it works: SUB_WIDTH data latches Q1..Q4 are chained, and a fifth,
// temporary latch T copies the last data latch. Each latch has its own pulsed
// clock, and the pulses come in the reverse order of the chain: first
// `pulse_t` (T takes Q4), then pulse_q[3] (Q4 takes Q3), pulse_q[2],
// pulse_q[1], and last pulse_q[0] (Q1 takes the serial input). Every latch
// therefore samples while the latch before it is closed and holds the previous
// cycle's value, which is what a pulsed latch needs. T holds the bit leaving
// this sub register while Q4 is overwritten, so the next sub register's first
// latch, which fires with pulse_q[0], still sees it. Latches pass their data
// differentially (Q/Qb into D/Db).
//
// Interface and timing:
//   clr            asynchronous clear of all latches
//   pulse_t        Clock pulse [T], must fire first
//   pulse_q[j]     Clock pulse [j+1] for latch Q(j+1), fired from j =
//                  SUB_WIDTH-1 down to 0; pulses must not overlap
//   d, d_b         serial input, differential; stable during pulse_q[0]
//   q[j]           Q(j+1); q[0] is the first latch
//   t, t_b         temporary latch, to the next sub register's d, d_b
// The five-latch structure and the pulse order follow the pulsed-latch shift
// register architecture. When a Johnson counter closes this chain into a ring,
// the linter reports the loop through the latches as circular logic; see
// pulsed_latch_johnson_counter.
module sub_shift_register #(
  parameter int unsigned SUB_WIDTH = pulsed_latch_pkg::SUB_WIDTH
) (
  input  logic                 clr,
  input  logic                 pulse_t,
  input  logic [SUB_WIDTH-1:0] pulse_q,
  input  logic                 d,
  input  logic                 d_b,
  output logic [SUB_WIDTH-1:0] q,
  output logic                 t,
  output logic                 t_b
);
  timeunit 1ps;
  timeprecision 1ps;

  // Each latch has its own scalar nets in its generate block, so every latch
  // is a separate storage node; latch j+1 reads the Q/Qb of latch j.
  for (genvar j = 0; j < SUB_WIDTH; j++) begin : g_bit
    logic din, din_b;  // D/Db of latch Q(j+1)
    logic ql, ql_b;    // Q/Qb of latch Q(j+1)

    if (j == 0) begin : g_src
      assign din   = d;
      assign din_b = d_b;
    end else begin : g_src
      assign din   = g_bit[j-1].ql;
      assign din_b = g_bit[j-1].ql_b;
    end

    pulsed_latch u_latch (
      .pulse(pulse_q[j]),
      .clr  (clr),
      .d    (din),
      .d_b  (din_b),
      .q    (ql),
      .q_b  (ql_b)
    );

    assign q[j] = ql;
  end

  // Temporary latch T: keeps the bit leaving Q(SUB_WIDTH).
  pulsed_latch u_temp (
    .pulse(pulse_t),
    .clr  (clr),
    .d    (g_bit[SUB_WIDTH-1].ql),
    .d_b  (g_bit[SUB_WIDTH-1].ql_b),
    .q    (t),
    .q_b  (t_b)
  );
endmodule
