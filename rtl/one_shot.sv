// Behavioural model (not synthesizable) of the current-controlled one-shot.
//
// In silicon the one-shot is an analog delay stage: when the comparator
// output falls, a bias current charges a 1.5 pF capacitor, and the output
// pulse ends when the capacitor voltage reaches the switching threshold of
// the following inverter. The pulse width is therefore C * V_trip / I, set
// for the whole array by one DC bias current chosen to suit the transducer's
// centre frequency; a larger current gives a shorter pulse.
//
// Model: trig = !in. osh_out = trig AND NOT delayed(trig), where the delayed
// copy rises width_ns after trig rises and falls at once when trig falls
// (precharge). A zero bias current never ends the pulse early, so the
// output then stays high until the comparator is reset.
//
// Interface: in the comparator output (active low), osh_bias_ua the bias
// current in microamps (a stand-in for the analog bias line), osh_out the
// pulse to the pulser.
//
// The 1.5 pF capacitor and the current-controlled width follow the published
// circuit. The 2.5 V trip point (half of the 5 V supply), and hence the
// constant 3750 / I ns, are this model's assumptions.
module one_shot #(
  parameter real C_PF   = 1.5,  // timing capacitor, pF
  parameter real V_TRIP = 2.5   // inverter switching threshold, V
) (
  input  logic       in,
  input  logic [7:0] osh_bias_ua,
  output logic       osh_out
);
  timeunit 1ns; timeprecision 1ps;

  logic trig;
  logic delayed;
  int   gen;

  assign trig = ~in;

  // Pulse width in ns: C[pF] * V[V] / I[uA] * 1000.
  function automatic real width_ns(input logic [7:0] i_ua);
    return C_PF * V_TRIP * 1000.0 / real'(i_ua);
  endfunction

  initial begin
    delayed = 1'b0;
    gen     = 0;
  end

  // Every change of trig starts a new generation, so a timer started by an
  // earlier trigger can no longer end the current pulse.
  always @(trig) begin
    automatic int my_gen;
    gen    = gen + 1;
    my_gen = gen;
    if (!trig) begin
      delayed = 1'b0;
    end else if (osh_bias_ua != 8'd0) begin
      fork
        begin
          #(width_ns(osh_bias_ua));
          if (gen == my_gen) delayed = 1'b1;
        end
      join_none
    end
  end

  assign osh_out = trig & ~delayed;

endmodule
