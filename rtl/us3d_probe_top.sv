// Real-time 3-D ultrasound probe front end: acquisition sequencer plus
// front-end IC.
//
// A 16 x 16 element transducer array sits on a chip that stores one 8-bit
// transmit delay per element, so the full array can transmit focused,
// steered beams over only a handful of cables: 16 serial delay lines, a
// two-phase shift clock, an 8-bit Gray-code count, a comparator reset, a
// 6-bit receive aperture select and a pulse-width bias. The chip returns 16
// parallel receive channels, one per column, taken along a row or either
// diagonal. This top joins the system-side sequencer, which produces those
// cable signals beam by beam, to the chip.
//
// Interface: clk (400 MHz gives the published 100 MHz shift rate), rst_n,
// start, num_beams; load_in_rx loads each next beam during the current
// receive window; cnt_lo..cnt_hi is the count sweep (0..255 for the full
// range); delay source dly_beam, dly_col, dly_val[i] (binary delay
// of element (i, dly_col) of beam dly_beam) and beam_ap (aperture of beam
// dly_beam); osh_bias_ua one-shot bias in microamps; elem_i current from
// each element (A); pad_v pulser voltage on each element (V); rx_out the 16
// receive channels (V); fired comparator states; busy, done.
//
// Timing: per beam, N*W*4 cycles of loading (hidden in the previous receive
// window when load_in_rx is set), RST_CYCLES of reset, one count step of
// CNT_DIV cycles per value from cnt_lo to cnt_hi, then RX_CYCLES of
// reception.
module us3d_probe_top
  import us_pkg::*;
#(
  parameter int unsigned NE         = 16,
  parameter int unsigned W          = 8,
  parameter int unsigned CNT_DIV    = 4,
  parameter int unsigned RST_CYCLES = 4,
  parameter int unsigned RX_CYCLES  = 2048
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [7:0]            num_beams,
  input  logic                  load_in_rx,
  input  logic [W-1:0]          cnt_lo,
  input  logic [W-1:0]          cnt_hi,
  output logic [7:0]            dly_beam,
  output logic [$clog2(NE)-1:0] dly_col,
  input  logic [W-1:0]          dly_val [NE],
  input  ap_sel_t               beam_ap,
  input  logic [7:0]            osh_bias_ua,
  input  real                   elem_i [NE][NE],
  output real                   pad_v  [NE][NE],
  output real                   rx_out [NE],
  output logic [NE-1:0]         fired  [NE],
  output logic                  busy,
  output logic                  done
);
  timeunit 1ns; timeprecision 1ps;

  logic         dl_in [NE];
  logic         clk_ph1;
  logic         clk_ph2;
  logic [W-1:0] count;
  logic         cmp_reset;
  ap_sel_t      ap;
  logic         amp_en;

  acq_sequencer #(
    .NE(NE), .W(W), .CNT_DIV(CNT_DIV), .RST_CYCLES(RST_CYCLES), .RX_CYCLES(RX_CYCLES)
  ) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .num_beams(num_beams),
    .load_in_rx(load_in_rx),
    .cnt_lo   (cnt_lo),
    .cnt_hi   (cnt_hi),
    .dly_beam (dly_beam),
    .dly_col  (dly_col),
    .dly_val  (dly_val),
    .beam_ap  (beam_ap),
    .dl_in    (dl_in),
    .clk_ph1  (clk_ph1),
    .clk_ph2  (clk_ph2),
    .count    (count),
    .cmp_reset(cmp_reset),
    .ap       (ap),
    .amp_en   (amp_en),
    .busy     (busy),
    .done     (done)
  );

  frontend_ic #(.NE(NE), .W(W)) u_ic (
    .dl_in      (dl_in),
    .clk_ph1    (clk_ph1),
    .clk_ph2    (clk_ph2),
    .count      (count),
    .reset      (cmp_reset),
    .ap         (ap),
    .osh_bias_ua(osh_bias_ua),
    .amp_en     (amp_en),
    .elem_i     (elem_i),
    .pad_v      (pad_v),
    .rx_out     (rx_out),
    .fired      (fired)
  );

endmodule
