// Self-checking testbench for tx_shift_register: shifts random bits with a
// non-overlapping two-phase clock at 100 MHz and compares the parallel
// contents after every bit with a software shift register. Also checks that
// holding both phases low keeps the contents, and that 8 bits load in 80 ns.
module tb_tx_shift_register;
  timeunit 1ns; timeprecision 1ps;

  logic       dl_in = 1'b0, ph1 = 1'b0, ph2 = 1'b0;
  logic [7:0] dl;
  logic [7:0] model = '0;
  int checks = 0, failures = 0;

  tx_shift_register #(.W(8)) dut (.dl_in(dl_in), .clk_ph1(ph1), .clk_ph2(ph2), .dl(dl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One bit at 100 MHz: data change, ph1 pulse, ph2 pulse, 2.5 ns each.
  task automatic shift(input logic b);
    dl_in = b;   #2.5;
    ph1 = 1'b1;  #2.5;
    ph1 = 1'b0;  #2.5;
    ph2 = 1'b1;  #2.5;
    ph2 = 1'b0;
    model = {model[6:0], b};
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    // Flush the random power-up state.
    for (int k = 0; k < 8; k++) shift(1'b0);
    check(dl == 8'h00, "flush to zero");
    for (int n = 0; n < 200; n++) begin
      shift(1'($urandom_range(0, 1)));
      #1;
      check(dl == model, $sformatf("after shift %0d: %b vs %b", n, dl, model));
    end
    // Hold: data line toggles with both phases low.
    dl_in = ~dl_in; #20; dl_in = ~dl_in; #20;
    check(dl == model, "hold with phases low");
    // Only ph1: the slave must not change.
    dl_in = ~model[0]; ph1 = 1'b1; #5; ph1 = 1'b0; #1;
    check(dl == model, "ph1 alone does not move the output");
    ph2 = 1'b1; #5; ph2 = 1'b0;
    model = {model[6:0], dl_in};
    #1;
    check(dl == model, "ph2 completes the shift");
    // Load a full byte, MSB first, and time it.
    t0 = $realtime;
    for (int k = 7; k >= 0; k--) shift(1'(8'hA7 >> k));
    check($realtime - t0 == 80.0, $sformatf("8-bit load takes %0t", $realtime - t0));
    #1;
    check(dl == 8'hA7, $sformatf("loaded byte %h", dl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
