// tb_pwm_counter: self-checking test of the counter-based PWM at its default
// size (8-bit word, load value word*8, period 2048 clocks).
//
// The testbench keeps its own count of clocks since the last reload and the
// word captured there, and expects out_pwm high in the first word*8 clocks
// after each reload. It checks: the reload strobe comes every 2048 clocks
// (the first one 2048 clocks after reset), the per-period high count is
// word*8, a word that changes in mid-period takes effect only at the next
// reload, word 0 gives no pulse and word 255 a pulse of 2040 clocks.
module tb_pwm_counter;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned PERIOD = 2048;

  logic              clk = 1'b0;
  logic              rst;
  logic [DATA_W-1:0] dac_in;
  logic              reload;
  logic              out_pwm;

  int checks = 0;
  int failures = 0;

  pwm_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (PERIOD * 80) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state, updated at every rising edge after reset
  int unsigned since_reload;   // clocks since the reload edge (0 = none yet)
  int unsigned cycles;         // clocks since reset release
  int unsigned held;           // word captured at the last reload
  bit          seen_reload;
  int unsigned highs, periods;
  int unsigned high_log[$];

  always @(posedge clk) begin
    if (rst) begin
      since_reload <= 0;
      cycles       <= 0;
      seen_reload  <= 1'b0;
      highs        <= 0;
    end else begin
      // values sampled just before this edge
      cycles <= cycles + 1;
      if (reload) begin
        check(seen_reload ? (since_reload == PERIOD) : (cycles == PERIOD),
              $sformatf("reload spacing %0d", seen_reload ? since_reload : cycles));
        if (seen_reload) high_log.push_back(highs);
        held         <= dac_in;
        since_reload <= 1;
        seen_reload  <= 1'b1;
        highs        <= 0;
      end else begin
        since_reload <= since_reload + 1;
        if (seen_reload && since_reload > 0) begin
          check(out_pwm == (since_reload <= held * 8),
                $sformatf("out_pwm at %0d after reload, word %0d", since_reload, held));
        end else begin
          check(out_pwm == 1'b0, "low before first reload");
        end
        if (out_pwm) highs <= highs + 1;
      end
    end
  end

  int unsigned words[$];

  initial begin
    rst = 1'b1;
    dac_in = 8'd0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    words = '{8'd5, 8'd0, 8'd255, 8'd128, 8'd1, 8'd37, 8'd200, 8'd3};
    @(negedge clk) dac_in = 8'(words[0]);
    // each word is applied shortly after a reload; one mid-period change
    // per period must not disturb the pulse already running
    foreach (words[k]) begin
      @(posedge reload);
      @(negedge clk);
      @(negedge clk) dac_in = 8'(words[(k + 1) % words.size()]);
      repeat (100) @(negedge clk);
      if (k % 2 == 0) begin
        dac_in = 8'($urandom_range(0, 255));   // disturbance
        repeat (300) @(negedge clk);
        dac_in = 8'(words[(k + 1) % words.size()]);
      end
    end
    @(posedge reload);
    @(posedge clk);
    #1;
    // high count per full period = word * 8; periods start with words[0..]
    for (int p = 0; p < high_log.size(); p++) begin
      check(high_log[p] == words[p % words.size()] * 8,
            $sformatf("period %0d high count %0d, word %0d", p, high_log[p], words[p % words.size()]));
    end
    check(high_log.size() >= words.size(), "enough periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
