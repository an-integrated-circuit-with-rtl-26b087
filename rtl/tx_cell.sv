// Transmit circuit of one array element (row i, column j).
//
// The cell stores its transmit delay in an 8-bit two-phase shift register,
// which is one link of the serial chain running along its row: dl_in comes
// from the cell to its left and dl_out (the register's last bit) goes to the
// cell to its right. A comparator watches the global Gray-code count; when
// the count equals the stored value, its precharged output falls and stays
// low until reset, which triggers a one-shot whose width is set by the
// shared bias current. The one-shot pulse drives the 25-V pulser onto the
// element's bond pad. On receive, a high-voltage switch connects the element
// to its column's amplifier when the aperture decoder selects it.
//
// Interface: rx_sel receive select; reset precharges the comparator; count
// global count (Gray); dl_in, clk_ph1, clk_ph2 delay loading; osh_bias_ua
// one-shot bias; dl_out delay out to the next cell; elem_i current received
// from the element (A); pad_v pulser voltage on the pad (V); col_i current
// onto the column line (A); fired is the comparator output inverted, for
// observation.
//
// Timing: the pulse starts when the count reaches the stored value and lasts
// the one-shot width. The block structure and connections follow the
// published cell. The bond pad node, which in silicon carries both the pulse
// out and the echo in, is split here into pad_v and elem_i.
//
// Contains behavioural models (one_shot, hv_pulser, hv_switch); only the
// shift register and comparator are synthesizable logic.
module tx_cell #(
  parameter int unsigned W = 8
) (
  input  logic         rx_sel,
  input  logic         reset,
  input  logic [W-1:0] count,
  input  logic         dl_in,
  input  logic         clk_ph1,
  input  logic         clk_ph2,
  input  logic [7:0]   osh_bias_ua,
  output logic         dl_out,
  input  real          elem_i,
  output real          pad_v,
  output real          col_i,
  output logic         fired
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] dl;
  logic         eq_n;
  logic         osh_out;

  tx_shift_register #(.W(W)) u_sr (
    .dl_in  (dl_in),
    .clk_ph1(clk_ph1),
    .clk_ph2(clk_ph2),
    .dl     (dl)
  );

  assign dl_out = dl[W-1];

  tx_comparator #(.W(W)) u_cmp (
    .a   (dl),
    .b   (count),
    .rs  (reset),
    .eq_n(eq_n)
  );

  assign fired = ~eq_n;

  one_shot u_osh (
    .in         (eq_n),
    .osh_bias_ua(osh_bias_ua),
    .osh_out    (osh_out)
  );

  hv_pulser u_pulser (
    .in   (osh_out),
    .out_v(pad_v)
  );

  hv_switch u_sw (
    .sel  (rx_sel),
    .in_i (elem_i),
    .out_i(col_i)
  );

endmodule
