// pwm_counter: counter-based PWM with a fixed period and a reloaded duty count.
//
// A period counter (slow_cnt) steps every clock. When it reaches
// CNT_SLOW_RANGE it is cleared and the duty counter (duty_cnt) is loaded with
// dac_in * 2**SCALE_SHIFT; otherwise the duty counter counts down to zero and
// stays there. out_pwm is registered and is high in every cycle in which the
// duty counter, after that cycle's update, is non-zero. The result is one
// pulse per period of CNT_SLOW_RANGE clocks, high for exactly
// dac_in * 2**SCALE_SHIFT clocks (the whole period when that count reaches
// the period length).
//
// Interface: clk, rst (synchronous, active high), dac_in (DATA_W bits,
// sampled only in the reload cycle, so a change takes effect at the next
// period), reload (high in the reload cycle) and out_pwm.
//
// Timing: out_pwm rises in the cycle after a reload with a non-zero word and
// falls dac_in * 2**SCALE_SHIFT cycles later. After reset the period counter
// starts at 0, so the first reload happens CNT_SLOW_RANGE cycles after reset
// is released and out_pwm stays low until then.
//
// The load-by-8, the count-down to zero and the period counter follow the
// original behavioural description; the 8-bit word width is implied by its
// 0..2047 duty range. The period length CNT_SLOW_RANGE is not given there:
// 2048 is this design's choice, making the duty dac_in/256 like the
// accumulator DAC. Reset and the reload strobe are also this design's own.
module pwm_counter #(
  parameter int unsigned DATA_W         = 8,
  parameter int unsigned SCALE_SHIFT    = 3,
  parameter int unsigned CNT_SLOW_RANGE = 2048
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] dac_in,
  output logic              reload,
  output logic              out_pwm
);

  localparam int unsigned DUTY_W = DATA_W + SCALE_SHIFT;
  localparam int unsigned SLOW_W = $clog2(CNT_SLOW_RANGE + 1);

  logic [SLOW_W-1:0] slow_cnt;
  logic [DUTY_W-1:0] duty_cnt;
  logic [DUTY_W-1:0] duty_next;

  assign reload = (slow_cnt >= SLOW_W'(CNT_SLOW_RANGE));

  always_comb begin
    if (reload)              duty_next = {dac_in, {SCALE_SHIFT{1'b0}}};
    else if (duty_cnt != '0) duty_next = duty_cnt - 1'b1;
    else                     duty_next = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slow_cnt <= '0;
      duty_cnt <= '0;
      out_pwm  <= 1'b0;
    end else begin
      slow_cnt <= reload ? SLOW_W'(1) : slow_cnt + 1'b1;
      duty_cnt <= duty_next;
      out_pwm  <= (duty_next != '0);
    end
  end

endmodule
