// dac: FPGA top level of the time-proportioning DAC.
//
// Two 1-bit DACs share the clock and reset. Each turns an 8-bit word into a
// pulse stream whose average, after an external RC low-pass filter, is
// word/256 of the I/O high level (about 12.9 mV per step at 3.3 V).
//
//  * pwm_accumulator (the main path): adds pwm_in to an 8-bit accumulator
//    every clock and outputs the carry on pwm_out and pwm. The pulses are
//    short and spread evenly, which keeps the filter ripple small. Two seg7
//    decoders show pwm_in in hexadecimal on hexouthi (high nibble) and
//    hexoutlo (low nibble).
//  * pwm_counter: a classic fixed-period PWM. Every CNT_SLOW_RANGE clocks it
//    loads dac_in*8 into a down counter; out_pwm is high while that counter
//    is non-zero, i.e. one pulse of dac_in*8 clocks per period.
//
// Ports: clk, rst (synchronous, active high); pwm_in, pwm_out, pwm,
// hexouthi, hexoutlo for the accumulator DAC; dac_in, out_pwm for the
// counter PWM. Each digital output drives an output pin; the RC filter is
// off chip.
//
// The accumulator path with its two displays follows the RTL view of the
// original design (clock, 8 inputs, 2 + 14 outputs); the counter PWM follows
// its behavioural description and is placed beside it with its own pins. The
// reset pin appears in the original block diagram; wiring it to both cores,
// and the counter's period length, are this design's choices. The
// accumulator register and the counter's reload strobe stay internal (no pins
// in the original pin count); lint reports them as unused for that reason.
module dac
  import dac_pkg::*;
#(
  parameter int unsigned CNT_SLOW_RANGE = 2048
) (
  input  logic             clk,
  input  logic             rst,
  // accumulator DAC
  input  logic [DAC_W-1:0] pwm_in,
  output logic             pwm_out,
  output logic             pwm,
  output seg7_t            hexouthi,
  output seg7_t            hexoutlo,
  // counter PWM
  input  logic [DAC_W-1:0] dac_in,
  output logic             out_pwm
);

  logic [DAC_W:0] acc;
  logic           acc_carry;
  logic           reload;

  pwm_accumulator #(.WIDTH(DAC_W)) u_accum (
    .clk    (clk),
    .rst    (rst),
    .pwm_in (pwm_in),
    .acc    (acc),
    .pwm_out(acc_carry)
  );

  assign pwm_out = acc_carry;
  assign pwm     = acc_carry;

  seg7 u_seg7hi (.binary(pwm_in[7:4]), .hex(hexouthi));
  seg7 u_seg7lo (.binary(pwm_in[3:0]), .hex(hexoutlo));

  pwm_counter #(
    .DATA_W        (DAC_W),
    .SCALE_SHIFT   (3),
    .CNT_SLOW_RANGE(CNT_SLOW_RANGE)
  ) u_counter (
    .clk    (clk),
    .rst    (rst),
    .dac_in (dac_in),
    .reload (reload),
    .out_pwm(out_pwm)
  );

endmodule
