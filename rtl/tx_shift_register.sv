// Two-phase serial shift register that holds one element's transmit delay.
//
// Each bit is a master latch, transparent while clk_ph1 is high, followed by
// a slave latch, transparent while clk_ph2 is high, as in a transmission-gate
// master-slave stage. With two non-overlapping clock phases, one ph1 pulse
// followed by one ph2 pulse moves every bit one place: dl_in enters dl[0],
// dl[k] moves to dl[k+1], and dl[W-1] (the cell's "delay out") feeds the
// next cell in the row. The cells of a row form one long chain, so a row of
// 16 cells loads 128 bits from a single serial line.
//
// Interface: dl_in serial data; clk_ph1, clk_ph2 the two clock phases, which
// must never be high together; dl parallel contents, also read by the
// comparator. dl_in must be stable while clk_ph1 is high.
//
// Timing: one bit per ph1/ph2 pair; at a 100 MHz shift rate a 128-bit row
// chain loads in 1.28 us. The bit cell and the two-phase clocking follow the
// published circuit; which end of the register the serial input enters is this
// design's choice.
//
// The latches are intended: this is a latch-based register clocked by two
// phases, not an edge-triggered flip-flop chain. Lint tools see the chain
// master -> slave -> next master as a combinational loop; it is not one,
// because the two phases are never transparent together.
module tx_shift_register #(
  parameter int unsigned W = 8
) (
  input  logic         dl_in,
  input  logic         clk_ph1,
  input  logic         clk_ph2,
  output logic [W-1:0] dl
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] master;
  logic [W-1:0] slave;
  logic [W-1:0] d;

  assign d = {slave[W-2:0], dl_in};

  for (genvar k = 0; k < W; k++) begin : g_bit
    // Master latch: samples the previous stage while ph1 is high.
    always_latch begin
      if (clk_ph1) master[k] = d[k];
    end
    // Slave latch: takes the master value while ph2 is high.
    always_latch begin
      if (clk_ph2) slave[k] = master[k];
    end
  end

  assign dl = slave;

  // The two phases must not overlap, or data would race through a stage.
  always_comb begin
    a_nonoverlap : assert (!(clk_ph1 && clk_ph2))
      else $error("tx_shift_register: clock phases overlap");
  end

endmodule
