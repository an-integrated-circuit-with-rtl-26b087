// Self-checking testbench for the preamp model: output is -430 kOhm times
// the input current while powered and 0 V while off.
module tb_preamp;
  timeunit 1ns; timeprecision 1ps;

  logic en = 1'b0;
  real  in_i = 0.0, out_v, expect_v;
  int checks = 0, failures = 0;

  preamp dut (.en(en), .in_i(in_i), .out_v(out_v));

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
    for (int k = 0; k < 50; k++) begin
      en   = (k % 5 != 0);
      in_i = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-9;  // +-1 uA
      #1;
      expect_v = en ? -430000.0 * in_i : 0.0;
      check(out_v - expect_v < 1e-9 && expect_v - out_v < 1e-9,
            $sformatf("en=%b in=%g out=%g expected %g", en, in_i, out_v, expect_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
