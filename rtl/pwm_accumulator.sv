// pwm_accumulator: accumulator-style time-proportioning 1-bit DAC core.
//
// Every clock the low WIDTH bits of the accumulator register are added to the
// input word and the WIDTH+1-bit sum is stored back. The top bit of the
// register is the carry of that addition and is the output pulse stream.
// Because the low WIDTH bits return to their starting value after 2**WIDTH
// clocks of constant input, exactly pwm_in carries are produced in every
// window of 2**WIDTH consecutive clocks: the average output equals
// pwm_in / 2**WIDTH of the high level, and the pulses are spread as evenly as
// the word allows (a first-order sigma-delta modulator).
//
// Interface: clk, rst (synchronous, active high, clears the register),
// pwm_in (WIDTH bits), acc (the WIDTH+1-bit register) and pwm_out (its top
// bit). pwm_out is registered: a new input word affects it one clock later.
//
// The adder, the 9-bit PWM_Accumulator register and the carry as output follow
// the RTL view of the original design. The reset input is this design's own
// addition; the original register has no reset connected.
module pwm_accumulator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] pwm_in,
  output logic [WIDTH:0]   acc,
  output logic             pwm_out
);

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= {1'b0, acc[WIDTH-1:0]} + {1'b0, pwm_in};
  end

  assign pwm_out = acc[WIDTH];

endmodule
