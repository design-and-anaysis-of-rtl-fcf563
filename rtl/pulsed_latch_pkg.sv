// pulsed_latch_pkg: constants shared by the pulsed-latch shift register, its
// delayed pulsed clock generator and the Johnson counter built from the same
// parts.
//
// The timing numbers are this design's own choice; the structure they
// parameterise (a 4-bit sub shift register that needs five pulses) follows
// the pulsed-latch shift register architecture. All times are in picoseconds.
//
//   SUB_WIDTH        data latches per sub shift register (4)
//   PULSE_WIDTH_PS   width of one pulsed clock, i.e. the latch transparency
//                    window
//   STAGE_DELAY_PS   delay from one pulsed clock to the next; it exceeds the
//                    pulse width so consecutive pulses never overlap
package pulsed_latch_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SUB_WIDTH      = 4;
  localparam int unsigned PULSE_WIDTH_PS = 100;
  localparam int unsigned STAGE_DELAY_PS = 150;

  // Time from the rising source-clock edge until the last of N delayed
  // pulses has closed. The source clock must stay high at least this long,
  // and the serial input must be stable until then.
  function automatic int unsigned pulse_train_ps(int unsigned n_pulses,
                                                 int unsigned stage_ps,
                                                 int unsigned width_ps);
    return (n_pulses - 1) * stage_ps + width_ps;
  endfunction
endpackage
