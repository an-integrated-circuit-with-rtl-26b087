// Behavioural model (not synthesizable) of the 25-V element pulser.
//
// In silicon a level shifter built from high-voltage transistors (a
// cross-coupled load under a 19 V reference, driven differentially from the
// 5 V one-shot output) swings the element's bond pad between ground and the
// 25 V supply. The model reproduces that transfer: the pad voltage out_v is
// V_HV while in is high and 0 V otherwise, after a propagation delay.
//
// Interface: in the one-shot pulse (5 V logic), out_v the pad voltage in
// volts.
//
// The 25 V swing follows the published pulser; the 5 ns propagation delay is
// this model's assumption.
module hv_pulser #(
  parameter real V_HV    = 25.0,  // high-voltage supply, V
  parameter real T_PD_NS = 5.0    // input to output delay, ns
) (
  input  logic in,
  output real  out_v
);
  timeunit 1ns; timeprecision 1ps;

  logic level;

  // Transport delay: every change of in reaches the output T_PD_NS later.
  initial level = 1'b0;
  always @(in) level <= #(T_PD_NS) in;

  always_comb out_v = level ? V_HV : 0.0;

endmodule
