// tb_pulsed_latch_top: end-to-end self-checking test of the whole design at
// its default parameters (16-bit shift register, 4-bit Johnson counter).
//
// The two designs run at once on unrelated clocks, 2 ns for the shift
// register and 3 ns for the counter, sharing the clear. Each clock domain
// keeps its own reference model and compares it with the outputs once the
// pulse train of every rising edge has ended. The test counts how often each
// mechanism of the design was exercised and fails if one never was:
//   shifts             a bit shifted in by the pulse train
//   boundary_moves     a one passed from one sub register to the next through
//                      a temporary latch
//   serial_outs        a one reached the serial output
//   twisted_feedback   the counter's inverted feedback put a zero into a full
//                      row of ones (1111 -> 0111)
//   counter_wraps      the counter went through all 8 states back to 0000
//   clears             the asynchronous clear reset both designs mid-run
module tb_pulsed_latch_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SR_WIDTH  = 16;
  localparam int unsigned CNT_BITS  = 4;
  localparam int unsigned SUB_WIDTH = 4;
  localparam int unsigned SR_PERIOD  = 2000;
  localparam int unsigned CNT_PERIOD = 3000;
  localparam int unsigned SR_CYCLES  = 400;

  logic                clr, sr_clk, sr_in, sr_out, cnt_clk;
  logic [SR_WIDTH-1:0] sr_q, ref_sr;
  logic [CNT_BITS-1:0] cnt_q, ref_cnt;
  int  checks = 0, failures = 0;
  int  shifts = 0, boundary_moves = 0, serial_outs = 0;
  int  twisted_feedback = 0, counter_wraps = 0, clears = 0;
  bit  done = 0;
  bit  clearing = 0;

  pulsed_latch_top dut (.clr, .sr_clk, .sr_in, .sr_q, .sr_out, .cnt_clk, .cnt_q);

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    #100_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift register domain.
  initial begin : sr_domain
    logic [SR_WIDTH-1:0] prev_sr;
    sr_clk = 0; sr_in = 0;
    wait (!clr);
    repeat (SR_CYCLES) begin
      #(SR_PERIOD / 4);
      prev_sr = ref_sr;
      sr_clk = 1'b1;
      #(SR_PERIOD / 2);
      if (!clearing) begin
        ref_sr = {ref_sr[SR_WIDTH-2:0], sr_in};
        shifts++;
        for (int m = 1; m < SR_WIDTH / SUB_WIDTH; m++)
          if (prev_sr[m*SUB_WIDTH-1] && sr_q[m*SUB_WIDTH]) boundary_moves++;
        if (sr_out) serial_outs++;
        checks++;
        if (sr_q !== ref_sr || sr_out !== ref_sr[SR_WIDTH-1])
          fail($sformatf("shift register q=%h expected %h", sr_q, ref_sr));
      end
      sr_clk = 1'b0;
      #(SR_PERIOD / 4);
      sr_in = 1'($urandom);
    end
    done = 1;
  end

  // Counter domain: reference q_next[0] = ~q[last], q_next[i] = q[i-1].
  initial begin : cnt_domain
    cnt_clk = 0;
    wait (!clr);
    while (!done) begin
      #(CNT_PERIOD / 4);
      cnt_clk = 1'b1;
      #(CNT_PERIOD / 2);
      if (!clearing) begin
        if (&ref_cnt) twisted_feedback++;
        ref_cnt = {ref_cnt[CNT_BITS-2:0], ~ref_cnt[CNT_BITS-1]};
        if (ref_cnt == '0) counter_wraps++;
        checks++;
        if (cnt_q !== ref_cnt) fail($sformatf("counter q=%b expected %b", cnt_q, ref_cnt));
      end
      cnt_clk = 1'b0;
      #(CNT_PERIOD / 4);
    end
  end

  // Clear at the start and twice mid-run, while both clocks are low.
  initial begin
    clr = 1'b1;
    ref_sr = '0; ref_cnt = '0;
    #1000;
    clr = 1'b0;
    repeat (2) begin
      #(SR_CYCLES * SR_PERIOD / 3);
      clearing = 1;
      wait (!sr_clk && !cnt_clk);
      clr = 1'b1;
      #10;
      ref_sr = '0; ref_cnt = '0;
      checks++;
      if (sr_q !== '0 || cnt_q !== '0) fail("clear");
      clears++;
      clr = 1'b0;
      clearing = 0;
    end
  end

  initial begin
    wait (done);
    #5000;
    checks++; if (shifts == 0)           fail("no shift happened");
    checks++; if (boundary_moves == 0)   fail("no bit crossed a sub register boundary");
    checks++; if (serial_outs == 0)      fail("no one reached the serial output");
    checks++; if (twisted_feedback == 0) fail("counter feedback never inverted a full row");
    checks++; if (counter_wraps == 0)    fail("counter never wrapped");
    checks++; if (clears == 0)           fail("no clear");
    $display("shifts=%0d boundary_moves=%0d serial_outs=%0d twisted_feedback=%0d counter_wraps=%0d clears=%0d",
             shifts, boundary_moves, serial_outs, twisted_feedback, counter_wraps, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
