// Behavioural model (not synthesizable) of the element's high-voltage
// receive switch.
//
// The switch connects the element's bond pad to the amplifier shared by its
// column when its receive select is high, and isolates it otherwise. On
// receive the element delivers a current; the model passes that current to
// the column line when closed and contributes nothing when open. The column
// line of the array sums the N switch outputs of a column, of which the
// aperture decoder closes at most one.
//
// Interface: sel the receive select of this element (high = closed), in_i
// the element current in amps, out_i the current onto the column line.
//
// The published cell labels this input OPEN and drives it from the element's
// receive select; taking high as "connect" is this model's assumption, as is
// the ideal (lossless) on state.
module hv_switch (
  input  logic sel,
  input  real  in_i,
  output real  out_i
);
  timeunit 1ns; timeprecision 1ps;

  always_comb out_i = sel ? in_i : 0.0;

endmodule
