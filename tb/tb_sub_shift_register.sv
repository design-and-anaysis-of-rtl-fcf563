// tb_sub_shift_register: self-checking test of one 4-bit sub shift register.
//
// The testbench makes the pulsed clocks itself: per shift, the temporary latch
// pulse first, then the data latch pulses from Q4 down to Q1, each 100 ps wide
// with 50 ps gaps. Random serial data is shifted in; a reference model (a
// plain 5-bit shift of Q1..Q4 and T) predicts q and t after every shift.
// Directed checks cover the clear and that the temporary latch holds the bit
// that left Q4 while Q4 already holds the new one. Also checks that the
// register keeps its contents when no pulse comes.
module tb_sub_shift_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 4;
  localparam int unsigned SHIFTS = 100;

  logic         clr, pulse_t, d, d_b, t, t_b;
  logic [K-1:0] pulse_q, q;
  logic [K-1:0] ref_q;
  logic         ref_t;
  int           checks = 0, failures = 0;

  sub_shift_register #(.SUB_WIDTH(K)) dut (.clr, .pulse_t, .pulse_q, .d, .d_b, .q, .t, .t_b);

  task automatic fire(ref logic p);
    p = 1'b1; #100; p = 1'b0; #50;
  endtask

  // One shift: pulse T, then Q4, Q3, Q2, Q1.
  task automatic shift_once();
    pulse_t = 1'b1; #100; pulse_t = 1'b0; #50;
    for (int j = K - 1; j >= 0; j--) begin
      pulse_q[j] = 1'b1; #100; pulse_q[j] = 1'b0; #50;
    end
  endtask

  task automatic compare(input string what);
    checks++;
    if (q !== ref_q || t !== ref_t || t_b !== ~ref_t) begin
      failures++;
      $display("FAIL %s: q=%b t=%b expected q=%b t=%b", what, q, t, ref_q, ref_t);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse_t = 0; pulse_q = '0; d = 0; d_b = 1;
    clr = 1; #100;
    ref_q = '0; ref_t = 0;
    compare("after clear");
    clr = 0; #100;

    // Walk a single one through: it must reach Q4 after 4 shifts and T after 5.
    d = 1; d_b = 0;
    shift_once();
    ref_q = 4'b0001; ref_t = 0;
    compare("one enters Q1");
    d = 0; d_b = 1;
    for (int s = 2; s <= K + 1; s++) begin
      shift_once();
      {ref_t, ref_q} = {ref_q, 1'b0};
      compare($sformatf("single one after %0d shifts", s));
    end

    // No pulses: contents stay.
    d = 1; d_b = 0;
    #2000;
    compare("hold without pulses");

    // Random serial data.
    repeat (SHIFTS) begin
      d = 1'($urandom); d_b = ~d;
      shift_once();
      {ref_t, ref_q} = {ref_q, d};
      compare("random shift");
    end

    clr = 1; #100; clr = 0;
    ref_q = '0; ref_t = 0;
    compare("clear after data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
