// pulsed_latch_shift_register: a WIDTH-bit serial-in, parallel-out shift
// register made of pulsed latches instead of master-slave flip-flops.
//
// How it works: a pulsed latch is half the size of a flip-flop, but a chain
// of latches clocked by one pulse fails, because a latch's input changes while
// it is still open. This register fires the latches one after another with
// non-overlapping delayed pulses, last latch first, so each latch samples a
// value that is not moving. To keep the number of pulses small, the register
// is cut into M = WIDTH/SUB_WIDTH sub shift registers of SUB_WIDTH bits. All
// of them share the same SUB_WIDTH+1 pulses from one delayed pulsed clock
// generator; a temporary latch at the end of each sub register carries the
// bit across to the next one. Pulse order per clock: T, Q4, Q3, Q2, Q1.
//
// Interface and timing:
//   clk      source clock; each rising edge shifts by one bit
//   clr      asynchronous clear (this design's addition)
//   sin      serial input; sampled by the last pulse of the train, so it must
//            be stable from the rising edge until the train has ended
//            (700 ps by default; changing it on the falling edge is safe)
//   q        parallel outputs, q[0] = Q1 holds the bit entered last; a bit
//            entered at one rising edge reaches q[k] at that edge's pulse
//            train and moves one place per later edge
//   sout     serial output, q[WIDTH-1]: a bit appears here WIDTH-1 clock
//            edges after the edge that took it in
// The sub-register structure, the temporary latches and the shared generator
// follow the architecture; WIDTH = 16, the pulse timing and the single
// inverter that makes the complement of `sin` are this design's choices.
// Every sub register keeps its temporary latch so that all are identical; the
// last one's T/Tb are read by nothing, which the linter reports as unused.
module pulsed_latch_shift_register #(
  parameter int unsigned WIDTH          = 16,
  parameter int unsigned SUB_WIDTH      = pulsed_latch_pkg::SUB_WIDTH,
  parameter int unsigned PULSE_WIDTH_PS = pulsed_latch_pkg::PULSE_WIDTH_PS,
  parameter int unsigned STAGE_DELAY_PS = pulsed_latch_pkg::STAGE_DELAY_PS
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             sin,
  output logic [WIDTH-1:0] q,
  output logic             sout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NUM_SUB = WIDTH / SUB_WIDTH;

  // Generator output pulse[0] fires first; it clocks the temporary latches.
  // pulse[SUB_WIDTH-j] clocks latch Q(j+1) of every sub register.
  logic [SUB_WIDTH:0]   pulse;
  logic                 pulse_t;
  logic [SUB_WIDTH-1:0] pulse_q;

  delayed_pulse_clock_gen #(
    .NUM_PULSES    (SUB_WIDTH + 1),
    .PULSE_WIDTH_PS(PULSE_WIDTH_PS),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_pulse_gen (
    .clk  (clk),
    .pulse(pulse)
  );

  assign pulse_t = pulse[0];
  for (genvar j = 0; j < SUB_WIDTH; j++) begin : g_pulse_map
    assign pulse_q[j] = pulse[SUB_WIDTH-j];
  end

  // Sub register m takes its serial input from the temporary latch of sub
  // register m-1 (from `sin` and one inverter for m = 0). Each sub register's
  // T/Tb are scalar nets of its own generate block.
  for (genvar m = 0; m < NUM_SUB; m++) begin : g_sub
    logic din, din_b;  // serial input of this sub register
    logic t, t_b;      // its temporary latch

    if (m == 0) begin : g_src
      assign din   = sin;
      assign din_b = ~sin;
    end else begin : g_src
      assign din   = g_sub[m-1].t;
      assign din_b = g_sub[m-1].t_b;
    end

    sub_shift_register #(
      .SUB_WIDTH(SUB_WIDTH)
    ) u_sub (
      .clr    (clr),
      .pulse_t(pulse_t),
      .pulse_q(pulse_q),
      .d      (din),
      .d_b    (din_b),
      .q      (q[m*SUB_WIDTH +: SUB_WIDTH]),
      .t      (t),
      .t_b    (t_b)
    );
  end

  assign sout = q[WIDTH-1];

  initial begin
    assert (WIDTH % SUB_WIDTH == 0 && WIDTH >= SUB_WIDTH)
      else $error("pulsed_latch_shift_register: WIDTH must be a multiple of SUB_WIDTH");
  end
endmodule
