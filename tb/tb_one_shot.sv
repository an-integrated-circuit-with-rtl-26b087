// Self-checking testbench for the one_shot model: measures the pulse width
// for several bias currents against C * V_trip / I = 3750 / I ns, checks
// that a held trigger gives one pulse only, and that precharge ends a pulse.
module tb_one_shot;
  timeunit 1ns; timeprecision 1ps;

  logic       in = 1'b1;
  logic [7:0] bias = 8'd50;
  logic       out;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;
  int rises = 0;

  one_shot dut (.in(in), .osh_bias_ua(bias), .osh_out(out));

  always @(posedge out) begin t_rise = $realtime; rises++; end
  always @(negedge out) t_fall = $realtime;

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
    int currents[5] = '{50, 42, 34, 26, 18};
    #10;
    foreach (currents[k]) begin
      realtime expect_w;
      bias = 8'(currents[k]);
      rises = 0;
      expect_w = 1.5 * 2.5 * 1000.0 / currents[k];
      #10 in = 1'b0;                 // comparator fires
      #1;
      check(out == 1'b1, "pulse starts at once");
      #(expect_w + 200.0);           // trigger held low well past the pulse
      check(out == 1'b0, "pulse has ended");
      check(rises == 1, "one pulse per trigger");
      check((t_fall - t_rise) > expect_w - 0.01 && (t_fall - t_rise) < expect_w + 0.01,
            $sformatf("I=%0d uA: width %0.3f ns, expected %0.3f", currents[k], t_fall - t_rise, expect_w));
      in = 1'b1;                     // precharge
      #50;
    end
    // Precharge in mid-pulse ends the pulse and its timer.
    bias = 8'd18;
    #10 in = 1'b0;
    #50 in = 1'b1;
    #1;
    check(out == 1'b0, "precharge ends the pulse");
    #20 in = 1'b0;
    #100;
    check(out == 1'b1, "retrigger gets a full-width pulse");
    #150;
    check(out == 1'b0, "retriggered pulse ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
