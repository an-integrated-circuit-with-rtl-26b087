// Receive aperture decoder: 6-bit aperture code to per-element switch selects.
//
// Each of the N columns has one receive channel, shared by the N elements of
// that column through high-voltage switches. The decoder closes at most one
// switch per column: for AP_ROW the element in row ap.row of every column,
// for AP_DIAG element (j, j) of column j, for AP_ANTIDIAG element (N-1-j, j),
// and none for AP_NONE. The two diagonals together make the X-shaped
// aperture, received one diagonal at a time.
//
// Interface: ap the 6-bit select (see us_pkg::ap_sel_t); col_sel[j][i] is
// high when element (row i, column j) is connected to amplifier j. Rows are
// counted from the top of the array, columns from the left.
//
// Timing: purely combinational. The aperture shapes follow the published
// scheme; the code assignment is this design's choice.
module rx_aperture_decoder
  import us_pkg::*;
#(
  parameter int unsigned NE = 16
) (
  input  ap_sel_t         ap,
  output logic [NE-1:0]   col_sel [NE]
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    for (int j = 0; j < NE; j++) begin
      col_sel[j] = '0;
      unique case (ap.mode)
        AP_ROW:      if (int'(ap.row) < NE) col_sel[j][ap.row] = 1'b1;
        AP_DIAG:     col_sel[j][j] = 1'b1;
        AP_ANTIDIAG: col_sel[j][NE-1-j] = 1'b1;
        AP_NONE:     col_sel[j] = '0;
      endcase
    end
  end

endmodule
