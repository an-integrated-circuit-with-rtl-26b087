// Self-checking testbench for acq_sequencer. The testbench supplies a delay
// table and per-beam apertures, rebuilds the contents of every row's serial
// chain from the dl_in lines and clock phases, and checks for each beam:
// the loaded Gray-code words, 128 shift clocks per load, the 512-cycle load
// time, that the phases never overlap, the comparator reset, the count
// stepping through Gray cnt_lo..cnt_hi with CNT_DIV cycles per step, and
// the aperture and amplifier enable during reception. A first run loads
// between beams and sweeps 0..255; a second loads during reception and
// sweeps a partial range.
module tb_acq_sequencer;
  import us_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NE = 16, W = 8, CNT_DIV = 4, RX = 64, BEAMS = 3;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]    num_beams = 8'(BEAMS);
  logic          load_in_rx = 1'b0;
  logic [W-1:0]  cnt_lo = 8'd0, cnt_hi = 8'd255;
  logic [7:0]    dly_beam;
  logic [3:0]    dly_col;
  logic [W-1:0]  dly_val [NE];
  ap_sel_t       beam_ap;
  logic          dl_in [NE];
  logic          ph1, ph2, cmp_reset, amp_en, busy, done;
  logic [W-1:0]  count;
  ap_sel_t       ap;
  int checks = 0, failures = 0;

  acq_sequencer #(.NE(NE), .W(W), .CNT_DIV(CNT_DIV), .RST_CYCLES(4), .RX_CYCLES(RX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_beams(num_beams),
    .load_in_rx(load_in_rx), .cnt_lo(cnt_lo), .cnt_hi(cnt_hi),
    .dly_beam(dly_beam), .dly_col(dly_col), .dly_val(dly_val), .beam_ap(beam_ap),
    .dl_in(dl_in), .clk_ph1(ph1), .clk_ph2(ph2), .count(count), .cmp_reset(cmp_reset),
    .ap(ap), .amp_en(amp_en), .busy(busy), .done(done)
  );

  always #1.25 clk = ~clk;

  function automatic logic [7:0] delay_of(input int beam, input int row, input int col);
    return 8'((beam * 97 + row * 31 + col * 7 + row * col) % 256);
  endfunction

  function automatic ap_sel_t aperture_of(input int beam);
    case (beam % 3)
      0:       return '{mode: AP_DIAG, row: 4'd0};
      1:       return '{mode: AP_ANTIDIAG, row: 4'd0};
      default: return '{mode: AP_ROW, row: 4'(beam + 4)};
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < NE; i++) dly_val[i] = delay_of(int'(dly_beam), i, int'(dly_col));
    beam_ap = aperture_of(int'(dly_beam));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Shadow of the array's shift chains: bit p of a row is bit p%8 of cell p/8.
  logic [NE*W-1:0] chain [NE];
  logic            sampled [NE];
  int              ph1_pulses = 0;
  int              ph1_in_rx = 0;
  always @(posedge ph1) begin
    ph1_pulses++;
    if (ap.mode != AP_NONE) ph1_in_rx++;
    for (int i = 0; i < NE; i++) sampled[i] = dl_in[i];
  end
  always @(posedge ph2) for (int i = 0; i < NE; i++) chain[i] = {chain[i][NE*W-2:0], sampled[i]};

  always @(posedge clk) if (ph1 && ph2) begin failures++; $display("FAIL: phases overlap"); end

  int done_pulses = 0;
  always @(posedge clk) if (rst_n && done) done_pulses++;

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit overlap, input logic [7:0] lo, input logic [7:0] hi);
    int d0;
    load_in_rx = overlap; cnt_lo = lo; cnt_hi = hi;
    d0 = done_pulses;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    ph1_pulses = 0;
    for (int b = 0; b < BEAMS; b++) begin
      int load_cycles, steps, hold, rx_cycles;
      logic [7:0] expect_bin;
      load_cycles = 0; steps = 0; hold = 0; rx_cycles = 0;
      // Up to the comparator reset: the load (unless done during the last RX).
      while (!cmp_reset) begin
        @(posedge clk);
        load_cycles++;
        if (!cmp_reset) begin
          checks++;
          if (ap.mode != AP_NONE) begin failures++; $display("FAIL: aperture open during load"); end
        end
      end
      check(ph1_pulses == NE * W, $sformatf("beam %0d: %0d shift clocks", b, ph1_pulses));
      ph1_pulses = 0;
      if (overlap && b > 0)
        check(load_cycles <= 3, $sformatf("beam %0d: %0d cycles from RX to reset", b, load_cycles));
      else
        check(load_cycles >= 512 && load_cycles <= 516,
              $sformatf("beam %0d: load took %0d cycles (%0.2f us at 400 MHz)", b, load_cycles, load_cycles * 2.5e-3));
      for (int i = 0; i < NE; i++)
        for (int j = 0; j < NE; j++) begin
          logic [7:0] d;
          d = delay_of(b, i, j);
          check(chain[i][j*W +: W] == (d ^ (d >> 1)),
                $sformatf("beam %0d cell (%0d,%0d): %h want gray(%h)", b, i, j, chain[i][j*W +: W], d));
        end
      // Reset.
      while (cmp_reset) begin
        @(posedge clk);
        if (cmp_reset) check(count == (lo ^ (lo >> 1)), "count held at cnt_lo during reset");
      end
      // Count: Gray lo..hi, CNT_DIV cycles each.
      expect_bin = lo;
      while (busy && ap.mode == AP_NONE) begin
        if (count == (expect_bin ^ (expect_bin >> 1))) begin
          hold++;
        end else begin
          check(hold == CNT_DIV, $sformatf("count step %0d held %0d cycles", expect_bin, hold));
          expect_bin++;
          steps++;
          check(count == (expect_bin ^ (expect_bin >> 1)),
                $sformatf("count %h, want gray(%0d)", count, expect_bin));
          hold = 1;
        end
        @(posedge clk);
      end
      check(steps == int'(hi) - int'(lo), $sformatf("beam %0d: %0d count steps", b, steps));
      // Receive.
      while (busy && ap.mode != AP_NONE) begin
        rx_cycles++;
        check(ap == aperture_of(b) && amp_en, $sformatf("beam %0d: receive aperture", b));
        @(posedge clk);
      end
      if (overlap && b < BEAMS - 1)
        check(rx_cycles >= 512 && rx_cycles <= 520, $sformatf("receive window with load %0d cycles", rx_cycles));
      else
        check(rx_cycles >= RX - 1 && rx_cycles <= RX + 1, $sformatf("receive window %0d cycles", rx_cycles));
    end
    repeat (4) @(posedge clk);
    check(!busy && !amp_en, "idle and amplifiers off after the last beam");
    check(done_pulses == d0 + 1, $sformatf("%0d done pulses", done_pulses - d0));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 8'd0, 8'd255);
    check(ph1_in_rx == 0, "no loading during reception when load_in_rx is low");
    run(1'b1, 8'd20, 8'd200);
    check(ph1_in_rx == (BEAMS - 1) * NE * W, $sformatf("%0d shift clocks during reception", ph1_in_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
