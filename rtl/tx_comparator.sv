// Per-element count comparator with a precharged, sticky output.
//
// The comparator checks the stored delay (a) against the global Gray-code
// count (b). Its output eq_n is precharged high while rs is high. Once rs is
// low, the output is pulled low the first time a == b and then stays low,
// whatever the count does afterwards, until rs precharges it again. The
// falling edge of eq_n triggers the element's one-shot.
//
// Interface: a stored delay, b global count (both Gray code, compared bit by
// bit), rs precharge/reset (active high), eq_n output (low = fired).
//
// Timing: no clock. The count changes one bit per step because it is a Gray
// code, so the bit-wise compare never passes through a false match between
// two count values. The sticky, precharged output and the reset follow the
// published circuit (XOR and NAND gates ending in a precharged NAND); the
// active-high polarity of rs is this design's choice.
//
// The latch is intended: it stands for the precharged dynamic output node,
// which holds its state between precharge and discharge.
module tx_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         rs,
  output logic         eq_n
);
  timeunit 1ns; timeprecision 1ps;

  logic match;

  // Bit-wise XNOR then AND of all bits, as the XOR/NAND gate tree does.
  assign match = &(~(a ^ b));

  // Precharge wins over discharge; discharge is held until the next precharge.
  always_latch begin
    if (rs)         eq_n = 1'b1;
    else if (match) eq_n = 1'b0;
  end

endmodule
