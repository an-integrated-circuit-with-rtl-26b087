// Global transmit counter that counts in Gray code.
//
// The system drives the same 8-bit count to every element of the array. A
// binary counter advances when en is high and its Gray-code image is
// registered, so exactly one output bit changes per step and the elements'
// asynchronous comparators never see a false intermediate value.
//
// Interface: clk, rst_n (asynchronous, active low); ld loads the binary
// value ld_val (the start of a count sweep); en advances the count by one
// (wrapping 255 -> 0); count is the Gray code, bin the same value in binary.
//
// Timing: count changes on the clock edge after en. Gray coding and the
// range 0..255 follow the published scheme; the enable and load interface
// is this design's choice.
module gray_counter
  import us_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] ld_val,
  input  logic         en,
  output logic [W-1:0] count,
  output logic [W-1:0] bin
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] bin_next;

  assign bin_next = bin + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin   <= '0;
      count <= '0;
    end else if (ld) begin
      bin   <= ld_val;
      count <= ld_val ^ (ld_val >> 1);
    end else if (en) begin
      bin   <= bin_next;
      count <= bin_next ^ (bin_next >> 1);
    end
  end

  // Between two clock edges, at most one bit of the Gray count may change.
  a_one_bit : assert property (@(posedge clk) disable iff (!rst_n)
                               $countones(count ^ $past(count)) <= 1 || $past(ld))
    else $error("gray_counter: more than one bit changed");

endmodule
