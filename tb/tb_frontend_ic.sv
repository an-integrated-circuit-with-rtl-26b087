// Self-checking testbench for frontend_ic, driven pin by pin as the system
// would: it shifts random delays into all 16 rows at 100 MHz, precharges
// the comparators, steps the Gray-code count 0..255 at 10 ns per step, and
// checks that every one of the 256 pads pulses once, at its own delay, with
// the one-shot width. It then sets random element currents and checks the
// 16 receive channels for both diagonals, several rows, no aperture, and
// the amplifiers powered down.
module tb_frontend_ic;
  import us_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NE = 16, W = 8;

  logic          dl_in [NE];
  logic          ph1 = 1'b0, ph2 = 1'b0, reset = 1'b1, amp_en = 1'b0;
  logic [W-1:0]  count = '0;
  ap_sel_t       ap = '{mode: AP_NONE, row: 4'd0};
  logic [7:0]    bias = 8'd34;
  real           elem_i [NE][NE];
  real           pad_v  [NE][NE];
  real           rx_out [NE];
  logic [NE-1:0] fired  [NE];
  int checks = 0, failures = 0;

  logic [7:0] delay [NE][NE];
  realtime    t_rise [NE][NE];
  realtime    t_fall [NE][NE];
  int         pulses [NE][NE];

  frontend_ic #(.NE(NE), .W(W)) dut (
    .dl_in(dl_in), .clk_ph1(ph1), .clk_ph2(ph2), .count(count), .reset(reset),
    .ap(ap), .osh_bias_ua(bias), .amp_en(amp_en), .elem_i(elem_i),
    .pad_v(pad_v), .rx_out(rx_out), .fired(fired)
  );

  for (genvar i = 0; i < NE; i++) begin : g_r
    for (genvar j = 0; j < NE; j++) begin : g_c
      always @(pad_v[i][j]) begin
        if (pad_v[i][j] > 12.5) begin t_rise[i][j] = $realtime; pulses[i][j]++; end
        else t_fall[i][j] = $realtime;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t_load;
    for (int i = 0; i < NE; i++) begin
      dl_in[i] = 1'b0;
      for (int j = 0; j < NE; j++) begin
        delay[i][j] = 8'($urandom);
        pulses[i][j] = 0;
        elem_i[i][j] = 0.0;
      end
    end
    delay[0][0] = 8'd0;
    delay[15][15] = 8'd255;
    // Load: column 15 first, MSB first, all rows in parallel.
    t_load = $realtime;
    for (int j = NE - 1; j >= 0; j--) begin
      for (int b = W - 1; b >= 0; b--) begin
        for (int i = 0; i < NE; i++) dl_in[i] = (delay[i][j] ^ (delay[i][j] >> 1)) >> b;
        #2.5 ph1 = 1'b1;
        #2.5 ph1 = 1'b0;
        #2.5 ph2 = 1'b1;
        #2.5 ph2 = 1'b0;
      end
    end
    check($realtime - t_load == 1280.0, $sformatf("load of 256 delays took %0t ns", $realtime - t_load));
    #10 reset = 1'b0;
    t0 = $realtime;
    for (int c = 0; c < 256; c++) begin
      logic [7:0] cb;
      cb = 8'(c);
      count = cb ^ (cb >> 1);
      #10;
    end
    #200;
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++) begin
        realtime want;
        want = t0 + 10.0 * delay[i][j] + 5.0;
        check(pulses[i][j] == 1, $sformatf("(%0d,%0d): %0d pulses", i, j, pulses[i][j]));
        check(t_rise[i][j] > want - 0.01 && t_rise[i][j] < want + 0.01,
              $sformatf("(%0d,%0d) delay %0d: rose at %0.2f, want %0.2f", i, j, delay[i][j], t_rise[i][j], want));
        check(t_fall[i][j] - t_rise[i][j] > 3750.0 / 34 - 0.01 && t_fall[i][j] - t_rise[i][j] < 3750.0 / 34 + 0.01,
              "pulse width");
        check(fired[i][j], "comparator stays fired");
      end
    reset = 1'b1;
    #5;
    for (int i = 0; i < NE; i++) check(fired[i] == '0, "reset precharges all comparators");
    // Receive.
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++) elem_i[i][j] = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-9;
    for (int t = 0; t < 8; t++) begin
      int want_row [NE];
      case (t)
        0: ap = '{mode: AP_DIAG, row: 4'd0};
        1: ap = '{mode: AP_ANTIDIAG, row: 4'd0};
        2: ap = '{mode: AP_NONE, row: 4'd0};
        default: ap = '{mode: AP_ROW, row: 4'($urandom_range(0, 15))};
      endcase
      amp_en = (t != 7);
      #1;
      for (int j = 0; j < NE; j++) begin
        real want;
        case (ap.mode)
          AP_DIAG:     want = -430.0e3 * elem_i[j][j];
          AP_ANTIDIAG: want = -430.0e3 * elem_i[NE-1-j][j];
          AP_ROW:      want = -430.0e3 * elem_i[ap.row][j];
          default:     want = 0.0;
        endcase
        if (!amp_en) want = 0.0;
        check(rx_out[j] - want < 1e-9 && want - rx_out[j] < 1e-9,
              $sformatf("aperture %0d column %0d: %g want %g", t, j, rx_out[j], want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
