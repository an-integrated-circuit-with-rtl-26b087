// Self-checking testbench for the hv_pulser model: the pad swings to 25 V
// 5 ns after the input rises and back to 0 V 5 ns after it falls.
module tb_hv_pulser;
  timeunit 1ns; timeprecision 1ps;

  logic in = 1'b0;
  real  v;
  int checks = 0, failures = 0;

  hv_pulser dut (.in(in), .out_v(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    check(v == 0.0, "idle at 0 V");
    for (int k = 0; k < 5; k++) begin
      in = 1'b1;
      #4;  check(v == 0.0, "still low before the delay");
      #2;  check(v == 25.0, $sformatf("high at 25 V, got %f", v));
      #(20 * (k + 1));
      check(v == 25.0, "stays high while driven");
      in = 1'b0;
      #4;  check(v == 25.0, "still high before the delay");
      #2;  check(v == 0.0, "back to 0 V");
      #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
