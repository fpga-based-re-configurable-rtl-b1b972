// tb_dac: end-to-end test of the DAC top level at its default size, with the
// off-chip RC filter modelled.
//
// Clock 50 MHz (one simulation time unit stands for 1 ns; the filter model is told so by its TIME_UNIT_S parameter). Both DAC paths get the same word and
// each output pin drives a model of the RC filter (R = 1 kOhm, C = 100 nF,
// tau = 100 us); the accumulator output also drives a second filter with a
// 10 kOhm pull-up to 5 V, the modified filter for open-collector drive.
//
// For each of the words 0, 1, 3, 7, 15, 31, 63, 127, 255 the test waits ten
// time constants for the filter to settle and then averages the filter
// output over eight counter periods (16384 clocks). In the steady state of a
// periodic RC circuit that average equals the average pin voltage, so it is
// compared with word/256 * 3.3 V within 1 mV (12.89 mV per step). The
// pull-up filter is compared with (v*R' + 5 V*R)/(R + R'). The hexadecimal
// displays are checked for every word, and pwm_out must equal pwm.
//
// Mechanisms counted, each must occur: accumulator carries, counter
// reloads, counter pulses ending when the down counter reaches zero, a
// period with no pulse (word 0) and a period with the 2040-clock pulse of
// word 255.
module tb_dac;
  import dac_pkg::*;

  localparam real VOH    = 3.3;
  localparam real R      = 1.0e3;
  localparam real RP     = 10.0e3;
  localparam real VREF   = 5.0;
  localparam int  PERIOD = 2048;
  localparam int  SETTLE = 50000;        // clocks, 10 tau at 50 MHz
  localparam int  AVG    = 8 * PERIOD;

  logic             clk = 1'b0;
  logic             rst;
  logic [DAC_W-1:0] pwm_in;
  logic             pwm_out;
  logic             pwm;
  seg7_t            hexouthi;
  seg7_t            hexoutlo;
  logic [DAC_W-1:0] dac_in;
  logic             out_pwm;

  real v_acc, v_cnt, v_pull;

  int checks = 0;
  int failures = 0;

  dac dut (.*);

  rc_lowpass #(.R_OHM(R), .C_F(100.0e-9))                  u_rc_acc  (.pin(pwm_out), .vout(v_acc));
  rc_lowpass #(.R_OHM(R), .C_F(100.0e-9))                  u_rc_cnt  (.pin(out_pwm), .vout(v_cnt));
  rc_lowpass #(.R_OHM(R), .C_F(100.0e-9), .R_PULL_OHM(RP),
               .V_REF(VREF))                               u_rc_pull (.pin(pwm),     .vout(v_pull));

  always #10 clk = ~clk;

  initial begin
    repeat (9 * (SETTLE + AVG + 2 * PERIOD) + 20000) @(posedge clk);
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

  // seven-segment glyphs as lit segment letters, a = bit 0, active low
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic seg7_t pattern(input int unsigned nib);
    seg7_t p = '1;
    for (int i = 0; i < glyph[nib].len(); i++) p[glyph[nib][i] - "a"] = 1'b0;
    return p;
  endfunction

  // mechanism counters
  int carries = 0, reloads = 0, pulse_ends = 0, empty_periods = 0, full_periods = 0;
  int highs_in_period = 0;
  logic out_pwm_q = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      if (pwm_out) carries++;
      if (out_pwm_q && !out_pwm) pulse_ends++;
      out_pwm_q <= out_pwm;
      if (dut.u_counter.reload) begin
        if (reloads > 0 && highs_in_period == 0) empty_periods++;
        if (highs_in_period == 2040) full_periods++;
        reloads++;
        highs_in_period = 0;
      end else if (out_pwm) highs_in_period++;
      if (pwm_out != pwm) begin
        failures++;
        $display("FAIL pwm_out and pwm differ at %0t", $time);
      end
    end
  end

  int unsigned words[9] = '{0, 1, 3, 7, 15, 31, 63, 127, 255};
  real sum_acc, sum_cnt, sum_pull, a_acc, a_cnt, a_pull, expect_v, expect_pull;

  initial begin
    rst = 1'b1;
    pwm_in = '0;
    dac_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (words[k]) begin
      @(negedge clk);
      pwm_in = DAC_W'(words[k]);
      dac_in = DAC_W'(words[k]);
      #1;
      check(hexouthi == pattern(words[k] / 16) && hexoutlo == pattern(words[k] % 16),
            $sformatf("display of %0d", words[k]));
      repeat (SETTLE) @(posedge clk);
      sum_acc = 0.0; sum_cnt = 0.0; sum_pull = 0.0;
      for (int i = 0; i < AVG; i++) begin
        @(posedge clk);
        sum_acc  += v_acc;
        sum_cnt  += v_cnt;
        sum_pull += v_pull;
      end
      a_acc  = sum_acc / AVG;
      a_cnt  = sum_cnt / AVG;
      a_pull = sum_pull / AVG;
      expect_v    = VOH * words[k] / 256.0;
      expect_pull = (expect_v * RP + VREF * R) / (R + RP);
      $display("word %3d: expected %7.1f mV, accumulator %7.1f mV, counter %7.1f mV, pull-up filter %7.1f mV (expected %7.1f)",
               words[k], expect_v * 1e3, a_acc * 1e3, a_cnt * 1e3, a_pull * 1e3, expect_pull * 1e3);
      check(a_acc  > expect_v - 1e-3 && a_acc  < expect_v + 1e-3, $sformatf("accumulator voltage, word %0d", words[k]));
      check(a_cnt  > expect_v - 1e-3 && a_cnt  < expect_v + 1e-3, $sformatf("counter voltage, word %0d", words[k]));
      check(a_pull > expect_pull - 1e-3 && a_pull < expect_pull + 1e-3, $sformatf("pull-up filter voltage, word %0d", words[k]));
    end
    $display("carries=%0d reloads=%0d pulse_ends=%0d empty_periods=%0d full_periods=%0d",
             carries, reloads, pulse_ends, empty_periods, full_periods);
    check(carries > 0,       "accumulator carry seen");
    check(reloads > 0,       "counter reload seen");
    check(pulse_ends > 0,    "counter pulse end seen");
    check(empty_periods > 0, "period without pulse seen");
    check(full_periods > 0,  "2040-clock pulse seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
