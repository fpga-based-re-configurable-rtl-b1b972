// tb_pwm_accumulator: self-checking test of the accumulator DAC core.
//
// Inputs change on the falling clock edge; outputs are sampled just before
// the rising edge. Three kinds of check:
//  * cycle by cycle, pwm_out against a reference that keeps the phase as an
//    integer and emits a carry whenever phase + word reaches 256;
//  * the duty: in every 256-clock window with a constant word the number of
//    high cycles equals the word exactly;
//  * the pulse patterns of the words 0x80, 0x40, 0x20 (one pulse every 2, 4
//    and 8 clocks) and 0x27, and the extremes 0x00 (never high) and 0xFF.
// Also checks the one-clock latency: the first carry of word D (D >= 128)
// after reset appears on the second rising edge.
module tb_pwm_accumulator;
  localparam int W = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] pwm_in;
  logic [W:0]   acc;
  logic         pwm_out;

  int checks = 0;
  int failures = 0;

  pwm_accumulator #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned phase;   // reference phase, 0..255

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run the word d for n clocks, checking each cycle; return the high count.
  task automatic run_word(input int unsigned d, input int n, output int highs);
    int unsigned sum;
    bit exp_out;
    highs = 0;
    @(negedge clk) pwm_in = W'(d);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      sum   = phase + d;
      exp_out = (sum >= 256);
      phase = sum % 256;
      #1;
      check(pwm_out == exp_out, $sformatf("pwm_out word=%0d cycle=%0d", d, i));
      check(acc[W-1:0] == W'(phase), $sformatf("acc low bits word=%0d", d));
      if (pwm_out) highs++;
    end
  endtask

  int highs;
  int prev_high_at, gap;
  int unsigned words[$];

  initial begin
    rst = 1'b1;
    pwm_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    phase = 0;

    // latency: with 0xC0 the first add gives 0xC0 (no carry), the second 0x180
    pwm_in = 8'hC0;
    @(posedge clk); #1;
    check(pwm_out == 1'b0 && acc == 9'h0C0, "first add, no carry");
    @(posedge clk); #1;
    check(pwm_out == 1'b1 && acc == 9'h180, "second add, carry");
    phase = 'h80;

    // exact duty in 256-clock windows, after aligning phase to a clean start
    words = '{8'h00, 8'h01, 8'h27, 8'h80, 8'h40, 8'h20, 8'hAA, 8'hFF, 8'h7F};
    foreach (words[k]) begin
      run_word(words[k], 256, highs);
      check(highs == int'(words[k]), $sformatf("duty word=%0d highs=%0d", words[k], highs));
    end

    // pulse spacing of powers of two (Fig.6 words): pulse every 256/d clocks
    for (int p = 1; p <= 3; p++) begin
      int unsigned d;
      d = 256 >> p;
      @(negedge clk) pwm_in = W'(d);
      // let the phase reach a multiple of d, then measure gaps
      repeat (300) begin
        @(posedge clk);
        phase = (phase + d) % 256;
      end
      prev_high_at = -1;
      for (int i = 0; i < 64; i++) begin
        @(posedge clk);
        phase = (phase + d) % 256;
        #1;
        if (pwm_out) begin
          if (prev_high_at >= 0) begin
            gap = i - prev_high_at;
            check(gap == (1 << p), $sformatf("gap for word %0d is %0d", d, gap));
          end
          prev_high_at = i;
        end
      end
    end

    // random words with random hold times
    for (int r = 0; r < 200; r++) begin
      run_word($urandom_range(0, 255), $urandom_range(1, 40), highs);
    end

    // reset in the middle clears the register
    @(negedge clk) rst = 1'b1;
    @(posedge clk); #1;
    check(acc == '0 && pwm_out == 1'b0, "reset clears accumulator");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
