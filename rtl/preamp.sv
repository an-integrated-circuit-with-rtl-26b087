// Behavioural model (not synthesizable) of one receive channel's
// transimpedance preamplifier.
//
// An NMOS common-source stage followed by a source follower, with a 430 kOhm
// resistor fed back from the output to the input, turns the current from the
// selected element into a voltage: out_v = -R_F * in_i. The amplifiers are
// powered on for reception only; a powered-down amplifier outputs 0 V.
//
// Interface: en powers the amplifier, in_i the column-line current in amps,
// out_v the output voltage (small-signal, about the bias point) in volts.
//
// The 430 kOhm feedback resistor and the inverting topology follow the
// published circuit. The ideal (infinite-bandwidth, unclipped) response and
// the 0 V output when off are this model's assumptions.
module preamp #(
  parameter real R_F = 430.0e3  // feedback resistor, ohms
) (
  input  logic en,
  input  real  in_i,
  output real  out_v
);
  timeunit 1ns; timeprecision 1ps;

  always_comb out_v = en ? -R_F * in_i : 0.0;

endmodule
