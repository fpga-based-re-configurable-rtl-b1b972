// rc_lowpass: behavioural model of the off-chip RC low-pass filter that turns
// the DAC's pulse stream into a voltage. Not synthesizable: it uses real
// numbers and delays, and stands for a resistor and a capacitor on the board.
//
// Circuit: the pin drives R into the output node, C goes from the node to
// ground. With R_PULL_OHM > 0 a second resistor R' ties the node to V_REF
// (the modified filter used with an open-collector or tri-state driver);
// R_PULL_OHM = 0 leaves it out.
//
// The pin is a two-level source (0 V or V_OH), so between two pin edges the
// node follows an exact exponential towards
//   v_inf = (v_pin*R' + V_REF*R) / (R + R')   (v_pin without R')
// with time constant tau = C * (R || R'). The model re-anchors the curve at
// every pin edge and publishes vout every STEP time units.
//
// Ports: pin (logic), vout (real, volts). TIME_UNIT_S gives the seconds per
// simulation time unit used by the testbench.
module rc_lowpass #(
  parameter real R_OHM       = 1.0e3,
  parameter real C_F         = 100.0e-9,
  parameter real R_PULL_OHM  = 0.0,
  parameter real V_REF       = 5.0,
  parameter real V_OH        = 3.3,
  parameter real TIME_UNIT_S = 1.0e-9,
  parameter int  STEP        = 10
) (
  input  logic pin,
  output real  vout
);

  real tau_s;
  real v0;       // node voltage at the last anchor
  real t0;       // time of the last anchor, in time units
  real v_inf;    // asymptote for the current pin level

  function automatic real target(input logic level);
    real v_pin = level ? V_OH : 0.0;
    if (R_PULL_OHM > 0.0) return (v_pin * R_PULL_OHM + V_REF * R_OHM) / (R_OHM + R_PULL_OHM);
    return v_pin;
  endfunction

  function automatic real value_at(input real t);
    return v_inf + (v0 - v_inf) * $exp(-(t - t0) * TIME_UNIT_S / tau_s);
  endfunction

  initial begin
    if (R_PULL_OHM > 0.0) tau_s = C_F * (R_OHM * R_PULL_OHM) / (R_OHM + R_PULL_OHM);
    else                  tau_s = C_F * R_OHM;
    v0    = 0.0;
    t0    = 0.0;
    v_inf = target(1'b0);
    vout  = 0.0;
  end

  always @(pin) begin
    v0    = value_at($realtime);
    t0    = $realtime;
    v_inf = target(pin);
  end

  always begin
    #(STEP);
    vout = value_at($realtime);
  end

endmodule
