// Front-end integrated circuit for a 16 x 16 element transducer array.
//
// The chip sits under the array, one transmit cell per element. For
// transmit, all N x N elements fire focused, steered beams: before each
// transmit the system shifts one 8-bit Gray-code delay into every cell over
// N serial lines (one per row, the row's cells chained), clocked by a
// two-phase clock; it then resets the comparators and steps a global 8-bit
// Gray-code count from 0 to 255. Each element pulses when the count reaches
// its delay. For receive, a 6-bit aperture code closes one element switch
// per column; the N columns share N transimpedance preamplifiers, so N
// channels are received in parallel along a row or a diagonal.
//
// Interface (the chip's pins): dl_in[i] serial delay line of row i;
// clk_ph1/clk_ph2 shift clock phases; count global count (Gray); reset
// comparator precharge; ap receive aperture select; osh_bias_ua one-shot
// bias; amp_en powers the preamplifiers; rx_out[j] channel j output (V).
// Towards the array: elem_i[i][j] current from element (i, j) (A) and
// pad_v[i][j] pulser voltage on its pad (V). fired[i][j] shows which
// comparators have fired.
//
// Timing: loading takes N*W shift clock pairs (128 at the published size);
// an element's comparator fires as soon as the count equals its delay, and
// its pad pulse follows through the one-shot and pulser. Everything here follows the published chip, except the output
// buffers, which are left out (unity gain is not given), and the aperture
// code assignment and amplifier enable pin, which are this design's.
module frontend_ic
  import us_pkg::*;
#(
  parameter int unsigned NE = 16,
  parameter int unsigned W  = 8
) (
  input  logic          dl_in [NE],
  input  logic          clk_ph1,
  input  logic          clk_ph2,
  input  logic [W-1:0]  count,
  input  logic          reset,
  input  ap_sel_t       ap,
  input  logic [7:0]    osh_bias_ua,
  input  logic          amp_en,
  input  real           elem_i [NE][NE],
  output real           pad_v  [NE][NE],
  output real           rx_out [NE],
  output logic [NE-1:0] fired  [NE]
);
  timeunit 1ns; timeprecision 1ps;

  logic [NE-1:0] col_sel [NE];     // [column][row]
  logic          chain [NE][NE+1]; // serial delay chain of each row
  real           cell_i [NE][NE];  // [row][column] switch output currents
  real           col_line [NE];    // summed current of each column

  rx_aperture_decoder #(.NE(NE)) u_dec (
    .ap     (ap),
    .col_sel(col_sel)
  );

  for (genvar i = 0; i < NE; i++) begin : g_row
    assign chain[i][0] = dl_in[i];
    for (genvar j = 0; j < NE; j++) begin : g_col
      tx_cell #(.W(W)) u_cell (
        .rx_sel     (col_sel[j][i]),
        .reset      (reset),
        .count      (count),
        .dl_in      (chain[i][j]),
        .clk_ph1    (clk_ph1),
        .clk_ph2    (clk_ph2),
        .osh_bias_ua(osh_bias_ua),
        .dl_out     (chain[i][j+1]),
        .elem_i     (elem_i[i][j]),
        .pad_v      (pad_v[i][j]),
        .col_i      (cell_i[i][j]),
        .fired      (fired[i][j])
      );
    end
  end

  // Column line: the switches of a column are wired together.
  always_comb begin
    for (int j = 0; j < NE; j++) begin
      col_line[j] = 0.0;
      for (int i = 0; i < NE; i++) col_line[j] = col_line[j] + cell_i[i][j];
    end
  end

  for (genvar j = 0; j < NE; j++) begin : g_amp
    preamp u_amp (
      .en   (amp_en),
      .in_i (col_line[j]),
      .out_v(rx_out[j])
    );
  end

endmodule
