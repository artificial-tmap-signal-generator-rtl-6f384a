// active_lpf - behavioural model of the op-amp active low-pass filter.
//
// Not synthesizable: an analog model for simulation only. The board-level
// filter is an inverting op-amp stage with input resistor R_IN and a feedback
// resistor R_F in parallel with capacitor C_F. That is a first-order low-pass
// with DC gain -R_F/R_IN and time constant R_F*C_F; with the default
// 100 kOhm, 10 kOhm and 47 nF the gain is -0.1 and the -3 dB point is 338 Hz.
// It smooths each one-bit stream into the analog TMAP (or noise) voltage and
// scales it down. The model integrates dv/dt = (-(R_F/R_IN)*vin - v)/(R_F*C_F)
// with forward Euler every STEP_NS nanoseconds; vin is the voltage the
// bitstream drives into R_IN (see level_shifter). The output is 'vout' in
// volts, inverted as in the real stage. Ideal op-amp; no rail limits.
module active_lpf #(
  parameter real R_IN    = 100.0e3,
  parameter real R_F     = 10.0e3,
  parameter real C_F     = 47.0e-9,
  parameter int  STEP_NS = 10
) (
  input  real vin,
  output real vout
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAU  = R_F * C_F;
  localparam real GAIN = -R_F / R_IN;
  localparam real K    = STEP_NS * 1.0e-9 / TAU;

  real v = 0.0;

  always #(STEP_NS) v = v + K * (GAIN * vin - v);

  assign vout = v;

endmodule
