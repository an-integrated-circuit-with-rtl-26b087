// End-to-end testbench of the probe at its default size (16 x 16 elements,
// 8-bit delays, 400 MHz system clock). It plays the system's delay memory
// and the transducer array and runs two acquisitions:
//   run 1: three beams, delays loaded between beams, full count 0..255,
//          apertures main diagonal, other diagonal, row 9;
//   run 2: two beams, each next beam loaded during the current receive
//          window, count swept only through 100..180 (the range the
//          beams' delays occupy), apertures row 2 and main diagonal.
// Per beam it checks the load time (1.28 us), that every element pulses
// exactly once, 5 ns after the count reaches its delay, with the one-shot
// width, that no element pulses during a later load, and that the 16
// receive channels carry the currents of the beam's aperture. It counts how
// often each mechanism occurred and fails if one never did.
module tb_us3d_probe_top;
  import us_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NE = 16, W = 8;
  localparam real TCLK = 2.5;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]    num_beams = 8'd3;
  logic          load_in_rx = 1'b0;
  logic [W-1:0]  cnt_lo = 8'd0, cnt_hi = 8'd255;
  logic [7:0]    dly_beam;
  logic [3:0]    dly_col;
  logic [W-1:0]  dly_val [NE];
  ap_sel_t       beam_ap;
  logic [7:0]    bias = 8'd26;
  real           elem_i [NE][NE];
  real           pad_v  [NE][NE];
  real           rx_out [NE];
  logic [NE-1:0] fired  [NE];
  logic          busy, done;
  int checks = 0, failures = 0;
  int beam_base = 0;   // run 1 uses beams 0..2 of the table, run 2 beams 3..4

  us3d_probe_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_beams(num_beams),
    .load_in_rx(load_in_rx), .cnt_lo(cnt_lo), .cnt_hi(cnt_hi),
    .dly_beam(dly_beam), .dly_col(dly_col), .dly_val(dly_val), .beam_ap(beam_ap),
    .osh_bias_ua(bias), .elem_i(elem_i), .pad_v(pad_v), .rx_out(rx_out),
    .fired(fired), .busy(busy), .done(done)
  );

  always #(TCLK / 2) clk = ~clk;

  // System delay memory. Beams 0..2: focal spots over the full 0..255 range,
  // including delays 0 and 255. Beams 3..4: delays within 100..180.
  function automatic logic [7:0] delay_of(input int beam, input int row, input int col);
    int fr, fc, d;
    if (beam >= 3) return 8'(100 + (row * 5 + col * (beam + 1)) % 81);
    fr = 3 + 5 * beam; fc = 12 - 4 * beam;
    d  = 2 * ((row - fr) * (row - fr) + (col - fc) * (col - fc));
    d  = (d > 255) ? 255 : d;
    if (beam == 0 && row == 0 && col == 0) d = 255;
    return 8'(255 - d);
  endfunction

  function automatic ap_sel_t aperture_of(input int beam);
    case (beam)
      0:       return '{mode: AP_DIAG, row: 4'd0};
      1:       return '{mode: AP_ANTIDIAG, row: 4'd0};
      2:       return '{mode: AP_ROW, row: 4'd9};
      3:       return '{mode: AP_ROW, row: 4'd2};
      default: return '{mode: AP_DIAG, row: 4'd0};
    endcase
  endfunction

  function automatic int row_of(input ap_sel_t a, input int j);
    case (a.mode)
      AP_DIAG:     return j;
      AP_ANTIDIAG: return NE - 1 - j;
      AP_ROW:      return int'(a.row);
      default:     return -1;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < NE; i++) dly_val[i] = delay_of(beam_base + int'(dly_beam), i, int'(dly_col));
    beam_ap = aperture_of(beam_base + int'(dly_beam));
  end

  realtime t_rise [NE][NE];
  realtime t_fall [NE][NE];
  int      pulses [NE][NE];
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

  // Mechanism counters.
  int n_stray = 0, n_load = 0, n_load_in_rx = 0, n_reset = 0, n_pulse = 0;
  int n_zero_delay = 0, n_max_delay = 0, n_partial = 0;
  int n_diag = 0, n_antidiag = 0, n_row = 0, n_amp_on = 0, n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;
  always @(posedge dut.amp_en) n_amp_on++;

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int base, input int beams, input bit overlap,
                     input logic [7:0] lo, input logic [7:0] hi, input bit first);
    beam_base = base; num_beams = 8'(beams); load_in_rx = overlap; cnt_lo = lo; cnt_hi = hi;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int b = 0; b < beams; b++) begin
      realtime t_start, t_fire;
      real     width;
      int      rx_samples;
      ap_sel_t a;
      t_start = $realtime;
      @(posedge dut.cmp_reset);
      if (overlap && b > 0) begin
        n_load_in_rx++;
        check($realtime - t_start < 20.0, "reset follows reception directly when loading during reception");
      end else begin
        n_load++;
        check($realtime - t_start <= 1300.0,
              $sformatf("beam %0d: delays loaded in %0.1f ns", b, $realtime - t_start));
      end
      // Comparators hold no defined state at power-up, so some may fire while
      // the very first delays are shifted in. Any other load must be quiet.
      // Pulses started by the last shift reach the pad through the pulser's
      // delay, so the count is taken late in the reset.
      #6;
      for (int i = 0; i < NE; i++)
        for (int j = 0; j < NE; j++) begin
          if (first && b == 0) n_stray += pulses[i][j];
          else check(pulses[i][j] == 0, $sformatf("beam %0d (%0d,%0d): pulse during load", b, i, j));
          pulses[i][j] = 0;
        end
      for (int i = 0; i < NE; i++) check(fired[i] == '0, "reset precharges the comparators");
      n_reset++;
      @(negedge dut.cmp_reset);
      t_fire = $realtime;
      if (lo != 8'd0 || hi != 8'd255) n_partial++;
      // Echo currents for this beam, then wait for the receive aperture.
      for (int i = 0; i < NE; i++)
        for (int j = 0; j < NE; j++) elem_i[i][j] = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-9;
      wait (dut.ap.mode != AP_NONE);
      width = 3750.0 / real'(bias);
      #(width + 20.0);  // let the last pulses end
      for (int i = 0; i < NE; i++)
        for (int j = 0; j < NE; j++) begin
          realtime want;
          logic [7:0] d;
          int steps;
          d = delay_of(base + b, i, j);
          steps = int'(d) - int'(lo);
          want = t_fire + 4.0 * TCLK * steps + 5.0;
          check(pulses[i][j] == 1, $sformatf("beam %0d (%0d,%0d): %0d pulses", b, i, j, pulses[i][j]));
          check(t_rise[i][j] > want - 0.01 && t_rise[i][j] < want + 0.01,
                $sformatf("beam %0d (%0d,%0d) delay %0d: pulse at %0.2f, want %0.2f", b, i, j, d, t_rise[i][j], want));
          check(t_fall[i][j] - t_rise[i][j] > width - 0.01 && t_fall[i][j] - t_rise[i][j] < width + 0.01,
                "pulse width");
          n_pulse += pulses[i][j];
          if (d == 8'd0)   n_zero_delay++;
          if (d == 8'd255) n_max_delay++;
          pulses[i][j] = 0;
        end
      // Receive channels.
      check(dut.amp_en, "amplifiers on for reception");
      a = aperture_of(base + b);
      check(dut.ap == a, "aperture of this beam applied");
      case (a.mode)
        AP_DIAG:     n_diag++;
        AP_ANTIDIAG: n_antidiag++;
        AP_ROW:      n_row++;
        default: ;
      endcase
      rx_samples = 0;
      while (dut.ap.mode != AP_NONE && rx_samples < 4) begin
        for (int j = 0; j < NE; j++) begin
          real want;
          want = -430.0e3 * elem_i[row_of(a, j)][j];
          check(rx_out[j] - want < 1e-9 && want - rx_out[j] < 1e-9,
                $sformatf("beam %0d channel %0d: %g want %g", b, j, rx_out[j], want));
        end
        rx_samples++;
        #100;
      end
      wait (dut.ap.mode == AP_NONE);
      // With loading during reception, the next beam's load has happened by
      // now: every element must have stayed quiet through it.
      for (int i = 0; i < NE; i++)
        for (int j = 0; j < NE; j++)
          if (overlap) check(pulses[i][j] == 0, $sformatf("(%0d,%0d) pulsed during reception", i, j));
    end
    wait (!busy);
    repeat (2) @(posedge clk);
    check(!dut.amp_en, "amplifiers off after the run");
  endtask

  initial begin
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++) begin elem_i[i][j] = 0.0; pulses[i][j] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    run(0, 3, 1'b0, 8'd0, 8'd255, 1'b1);
    run(3, 2, 1'b1, 8'd100, 8'd180, 1'b0);
    check(n_load == 4 && n_load_in_rx == 1 && n_reset == 5, "loads and resets per beam");
    check(n_pulse == 5 * NE * NE, $sformatf("%0d pulses", n_pulse));
    check(n_zero_delay > 0, "an element with delay 0 fired");
    check(n_max_delay > 0, "an element with delay 255 fired");
    check(n_partial == 2, "partial count sweeps ran");
    check(n_diag > 0 && n_antidiag > 0 && n_row > 0, "all three aperture shapes received");
    check(n_amp_on == 2, "amplifiers powered on once per run");
    check(n_done == 2, "done once per run");
    $display("mechanisms: stray_first_load_pulses=%0d loads=%0d loads_during_rx=%0d resets=%0d pulses=%0d zero_delay=%0d max_delay=%0d partial_sweeps=%0d diag=%0d antidiag=%0d row=%0d amp_on=%0d done=%0d",
             n_stray, n_load, n_load_in_rx, n_reset, n_pulse, n_zero_delay, n_max_delay, n_partial,
             n_diag, n_antidiag, n_row, n_amp_on, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
