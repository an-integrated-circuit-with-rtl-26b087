// Self-checking testbench for the hv_switch model: the element current
// reaches the column line only while the switch is selected.
module tb_hv_switch;
  timeunit 1ns; timeprecision 1ps;

  logic sel = 1'b0;
  real  in_i = 0.0, out_i;
  int checks = 0, failures = 0;

  hv_switch dut (.sel(sel), .in_i(in_i), .out_i(out_i));

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
      sel  = 1'($urandom_range(0, 1));
      in_i = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-9;
      #1;
      check(out_i == (sel ? in_i : 0.0), $sformatf("sel=%b in=%g out=%g", sel, in_i, out_i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
