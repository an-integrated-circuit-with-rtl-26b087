// Shared constants, types and helper functions of the 3-D ultrasound front end.
//
// The front end drives a square array of N x N transducer elements. Every
// element stores a DW-bit transmit delay, held in Gray code, and fires when a
// system-wide Gray-code count equals it. On receive, one element per column is
// switched to that column's preamplifier; a 6-bit aperture code picks which.
//
// The array size (16 x 16), the 8-bit delay, the Gray-code count and the 6-bit
// aperture select are the published architecture. The encoding of the aperture
// code (ap_sel_t below) is this design's own choice: the architecture only
// says that six bits choose between the two diagonals and any single row.
package us_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Elements per side of the square array; also the number of receive channels.
  localparam int unsigned N  = 16;
  // Bits of transmit delay stored per element.
  localparam int unsigned DW = 8;

  // Receive aperture shape.
  typedef enum logic [1:0] {
    AP_ROW      = 2'b00,  // all elements of one row, given by ap_sel_t.row
    AP_DIAG     = 2'b01,  // main diagonal: element (i, j) with i == j
    AP_ANTIDIAG = 2'b10,  // other diagonal: element (i, j) with i == N-1-j
    AP_NONE     = 2'b11   // no element connected (all switches open)
  } ap_mode_e;

  // 6-bit receive aperture select as carried on the chip's select pins.
  typedef struct packed {
    ap_mode_e   mode;  // bits 5:4
    logic [3:0] row;   // bits 3:0, used by AP_ROW only
  } ap_sel_t;

  // Binary to reflected Gray code.
  function automatic logic [DW-1:0] bin2gray(input logic [DW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected Gray code to binary.
  function automatic logic [DW-1:0] gray2bin(input logic [DW-1:0] g);
    logic [DW-1:0] b;
    b[DW-1] = g[DW-1];
    for (int k = DW - 2; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

endpackage
