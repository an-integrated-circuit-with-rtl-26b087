// Self-checking testbench for tx_cell: loads a delay through the serial
// input, precharges, steps the Gray-code count at 10 ns per step and checks
// that the element fires at the step equal to its delay, that the pad pulse
// starts 5 ns later and lasts 3750 / I ns, that it fires only once, that the
// stored bits leave through dl_out in order, and that the receive switch
// passes the element current only when selected.
module tb_tx_cell;
  timeunit 1ns; timeprecision 1ps;

  logic       rx_sel = 1'b0, reset = 1'b1, dl_in = 1'b0, ph1 = 1'b0, ph2 = 1'b0;
  logic [7:0] count = '0;
  logic [7:0] bias = 8'd42;
  logic       dl_out, fired;
  real        elem_i = 0.0, pad_v, col_i;
  int checks = 0, failures = 0;
  realtime t_fire, t_rise, t_fall;
  int pulses = 0;

  tx_cell #(.W(8)) dut (
    .rx_sel(rx_sel), .reset(reset), .count(count), .dl_in(dl_in),
    .clk_ph1(ph1), .clk_ph2(ph2), .osh_bias_ua(bias), .dl_out(dl_out),
    .elem_i(elem_i), .pad_v(pad_v), .col_i(col_i), .fired(fired)
  );

  always @(posedge fired) t_fire = $realtime;
  always @(pad_v) begin
    if (pad_v > 12.5) begin t_rise = $realtime; pulses++; end
    else t_fall = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] gray(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction

  task automatic shift(input logic b);
    dl_in = b;   #2.5;
    ph1 = 1'b1;  #2.5;
    ph1 = 1'b0;  #2.5;
    ph2 = 1'b1;  #2.5;
    ph2 = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int delays[6] = '{0, 1, 37, 128, 200, 255};
    foreach (delays[k]) begin
      logic [7:0] g, out_bits;
      realtime t_start, expect_w;
      g = gray(8'(delays[k]));
      bias = 8'(18 + 8 * k);
      expect_w = 3750.0 / real'(bias);
      reset = 1'b1;
      for (int b = 7; b >= 0; b--) shift(g[b]);
      check(dut.u_sr.dl == g, $sformatf("stored %h, want %h", dut.u_sr.dl, g));
      check(dl_out == g[7], "dl_out is the last stored bit");
      count = 8'd0;
      #5 reset = 1'b0;
      pulses = 0;
      t_start = $realtime;
      for (int c = 0; c < 256; c++) begin
        logic [7:0] cb;
        cb = 8'(c);
        count = gray(cb);
        #10;
      end
      #300;
      check(pulses == 1, $sformatf("delay %0d: %0d pulses", delays[k], pulses));
      check(t_fire - t_start > 10.0 * delays[k] - 0.01 && t_fire - t_start < 10.0 * delays[k] + 0.01,
            $sformatf("delay %0d: fired at %0.2f ns", delays[k], t_fire - t_start));
      check(t_rise - t_fire > 4.99 && t_rise - t_fire < 5.01, "pad rises 5 ns after the match");
      check(t_fall - t_rise > expect_w - 0.01 && t_fall - t_rise < expect_w + 0.01,
            $sformatf("pulse width %0.2f, want %0.2f", t_fall - t_rise, expect_w));
      check(fired == 1'b1, "comparator stays fired until reset");
      // The next 8 shifts push the stored word out through dl_out, MSB first.
      reset = 1'b1;
      for (int b = 7; b >= 0; b--) begin
        out_bits[b] = dl_out;
        shift(1'b0);
      end
      check(out_bits == g, $sformatf("shifted out %h, want %h", out_bits, g));
      #5;
      check(fired == 1'b0, "reset clears the comparator");
    end
    // Receive switch.
    elem_i = 2.0e-6;
    rx_sel = 1'b0; #1;
    check(col_i == 0.0, "switch open");
    rx_sel = 1'b1; #1;
    check(col_i == 2.0e-6, "switch closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
