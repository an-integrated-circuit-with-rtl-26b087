// Workload testbench: partial count range on the front-end IC. One row is
// loaded at a 50 MHz shift rate with seven delays between 135 and 145; the
// other elements hold delay 0. After the comparator reset, the count is set
// straight to 135 and stepped only to 145, one step per 200 ns. Each of the
// seven elements must pulse once, at the step equal to its delay, and no
// other element may pulse, since the count never passes 0: the system only
// counts through the range where pulses are wanted.
module tb_workload_partial_count;
  import us_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NE = 16, W = 8;
  localparam real STEP = 200.0;

  logic          dl_in [NE];
  logic          ph1 = 1'b0, ph2 = 1'b0, reset = 1'b1;
  logic [W-1:0]  count = '0;
  ap_sel_t       ap = '{mode: AP_NONE, row: 4'd0};
  real           elem_i [NE][NE];
  real           pad_v  [NE][NE];
  real           rx_out [NE];
  logic [NE-1:0] fired  [NE];
  int checks = 0, failures = 0;

  logic [7:0] delay [NE];  // row 0
  realtime    t_rise [NE][NE];
  int         pulses [NE][NE];

  frontend_ic dut (
    .dl_in(dl_in), .clk_ph1(ph1), .clk_ph2(ph2), .count(count), .reset(reset),
    .ap(ap), .osh_bias_ua(8'd42), .amp_en(1'b0), .elem_i(elem_i),
    .pad_v(pad_v), .rx_out(rx_out), .fired(fired)
  );

  for (genvar i = 0; i < NE; i++) begin : g_r
    for (genvar j = 0; j < NE; j++) begin : g_c
      always @(pad_v[i][j]) if (pad_v[i][j] > 12.5) begin t_rise[i][j] = $realtime; pulses[i][j]++; end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t_load;
    int seven[7] = '{137, 139, 141, 142, 143, 144, 145};
    for (int j = 0; j < NE; j++) delay[j] = (j < 7) ? 8'(seven[j]) : 8'd0;
    for (int i = 0; i < NE; i++) begin
      dl_in[i] = 1'b0;
      for (int j = 0; j < NE; j++) begin pulses[i][j] = 0; elem_i[i][j] = 0.0; end
    end
    // 50 MHz shift: 20 ns per bit.
    t_load = $realtime;
    for (int j = NE - 1; j >= 0; j--)
      for (int b = W - 1; b >= 0; b--) begin
        for (int i = 0; i < NE; i++) dl_in[i] = (i == 0) ? 1'((delay[j] ^ (delay[j] >> 1)) >> b) : 1'b0;
        #5 ph1 = 1'b1;
        #5 ph1 = 1'b0;
        #5 ph2 = 1'b1;
        #5 ph2 = 1'b0;
      end
    check($realtime - t_load == 2560.0, "row loaded in 128 bits x 20 ns");
    count = 8'(135 ^ (135 >> 1));
    #10 reset = 1'b0;
    t0 = $realtime;
    for (int c = 135; c <= 145; c++) begin
      count = 8'(c ^ (c >> 1));
      #(STEP);
    end
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++) begin
        if (i == 0 && j < 7) begin
          realtime want;
          want = t0 + STEP * (seven[j] - 135) + 5.0;
          check(pulses[i][j] == 1, $sformatf("pulser %0d: %0d pulses", j + 1, pulses[i][j]));
          check(t_rise[i][j] > want - 0.01 && t_rise[i][j] < want + 0.01,
                $sformatf("pulser %0d at %0.1f ns, want %0.1f", j + 1, t_rise[i][j] - t0, want - t0));
        end else begin
          check(pulses[i][j] == 0, $sformatf("(%0d,%0d) must not fire", i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
