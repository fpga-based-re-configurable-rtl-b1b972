// tb_dac_triangle: the DAC top level generating a triangular wave, at its
// default size.
//
// A triangle 0, 1, ..., 255, 254, ..., 1 (510 steps per cycle) is fed to
// both paths. The accumulator path gets a new word every 256 clocks, so one
// triangle cycle takes 130560 clocks (2.6 ms at 50 MHz); the counter path
// gets a new word right after each reload, one step per 2048-clock period.
//
// Checks:
//  * accumulator path: the pin is high exactly word times in each 256-clock
//    step, and its RC-filtered voltage (R = 1 kOhm, C = 100 nF) stays within
//    3 mV of an ideal RC filter fed with word/256 * 3.3 V, computed here as
//    an exact per-clock exponential update;
//  * counter path: each period holds a pulse of word*8 clocks of the word
//    applied in it, over one full triangle cycle (1044480 clocks).
// Both directions of the triangle and both turning points are counted and
// must occur.
module tb_dac_triangle;
  import dac_pkg::*;

  localparam real VOH    = 3.3;
  localparam real TAU_S  = 1.0e3 * 100.0e-9;
  localparam real TCLK_S = 20.0e-9;
  localparam int  PERIOD = 2048;
  localparam int  STEPS  = 510;

  logic             clk = 1'b0;
  logic             rst;
  logic [DAC_W-1:0] pwm_in;
  logic             pwm_out;
  logic             pwm;
  seg7_t            hexouthi;
  seg7_t            hexoutlo;
  logic [DAC_W-1:0] dac_in;
  logic             out_pwm;
  real              v_acc;

  int checks = 0;
  int failures = 0;

  dac dut (.*);
  rc_lowpass #(.R_OHM(1.0e3), .C_F(100.0e-9)) u_rc (.pin(pwm_out), .vout(v_acc));

  always #10 clk = ~clk;

  initial begin
    repeat (STEPS * PERIOD + 4 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned tri_word(input int unsigned step);
    int unsigned s = step % STEPS;
    return (s <= 255) ? s : STEPS - s;
  endfunction

  int rising = 0, falling = 0, peaks = 0, troughs = 0;
  real v_ideal = 0.0, worst = 0.0;
  bit done = 1'b0;

  // accumulator path
  initial begin
    int highs;
    int unsigned w, prev_w;
    real k;
    k = 1.0 - $exp(-TCLK_S / TAU_S);
    rst = 1'b1;
    pwm_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    prev_w = 0;
    for (int unsigned step = 0; !done; step++) begin
      w = tri_word(step);
      if (w > prev_w) rising++;
      if (w < prev_w) falling++;
      if (w == 255) peaks++;
      if (w == 0 && step > 0) troughs++;
      prev_w = w;
      @(negedge clk) pwm_in = DAC_W'(w);
      highs = 0;
      for (int i = 0; i < 256; i++) begin
        @(posedge clk);
        // the word reaches the pin one clock after it is applied
        v_ideal += ((i == 0 ? VOH * tri_word(step == 0 ? 0 : step - 1) : VOH * w) / 256.0 - v_ideal) * k;
        #1;
        if (pwm_out) highs++;
        if (step > 2 && (v_acc - v_ideal > 3e-3 || v_ideal - v_acc > 3e-3)) begin
          check(1'b0, $sformatf("filtered voltage %f vs ideal %f", v_acc, v_ideal));
        end
        if (v_acc - v_ideal > worst) worst = v_acc - v_ideal;
        if (v_ideal - v_acc > worst) worst = v_ideal - v_acc;
      end
      // the 256 samples span clocks 1..256 after the change: the first carry
      // pattern sample belongs to the old word, so allow the one-clock shift
      check(highs >= int'(w) - 1 && highs <= int'(w) + 1,
            $sformatf("accumulator step %0d word %0d highs %0d", step, w, highs));
    end
  end

  // counter path
  initial begin
    int unsigned w;
    int highs;
    dac_in = '0;
    @(negedge rst);
    @(negedge clk) dac_in = DAC_W'(tri_word(0));
    @(posedge clk iff dut.u_counter.reload);      // the edge that loads word 0
    for (int unsigned step = 0; step < STEPS; step++) begin
      w = tri_word(step);
      // samples right after the loading edge and the 2047 edges that follow
      #1;
      highs = out_pwm ? 1 : 0;
      @(negedge clk) dac_in = DAC_W'(tri_word(step + 1));
      for (int i = 1; i < PERIOD; i++) begin
        @(posedge clk);
        #1;
        if (out_pwm) highs++;
      end
      check(highs == int'(w) * 8, $sformatf("counter step %0d word %0d highs %0d", step, w, highs));
      @(negedge clk);
      check(dut.u_counter.reload == 1'b1, $sformatf("reload after period %0d", step));
      @(posedge clk);
    end
    done = 1'b1;
    @(posedge clk);
    #2;
    $display("rising=%0d falling=%0d peaks=%0d troughs=%0d worst filter deviation %.3f mV",
             rising, falling, peaks, troughs, worst * 1e3);
    check(rising > 0 && falling > 0, "both slopes seen");
    check(peaks > 0 && troughs > 0, "both turning points seen");
    check(worst < 3e-3, "filtered accumulator output follows the ideal triangle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
