// Self-checking testbench for gray_counter: checks the Gray-code sequence
// against b ^ (b >> 1) of an independent binary count, one bit change per
// step, hold when disabled, loading a start value, and wrap from 255 to 0.
module tb_gray_counter;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       ld = 1'b0;
  logic [7:0] ld_val = '0;
  logic       en = 1'b0;
  logic [7:0] count, bin;
  int checks = 0, failures = 0;
  int unsigned ref_bin = 0;

  gray_counter #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .ld(ld), .ld_val(ld_val), .en(en), .count(count), .bin(bin));

  always #1.25 clk = ~clk;

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
    logic [7:0] prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 8'd0 && bin == 8'd0, "reset value");
    prev = count;
    for (int s = 0; s < 600; s++) begin
      en = ($urandom_range(0, 3) != 0);
      ld = (s % 97 == 50);
      ld_val = 8'($urandom);
      @(posedge clk);
      if (ld) ref_bin = ld_val;
      else if (en) ref_bin = (ref_bin + 1) % 256;
      @(negedge clk);
      check(bin == 8'(ref_bin), $sformatf("binary %0d vs %0d", bin, ref_bin));
      check(count == 8'(ref_bin ^ (ref_bin >> 1)), $sformatf("gray %h for %0d", count, ref_bin));
      if (!ld) check($countones(count ^ prev) <= 1, "one bit per step");
      ld = 1'b0;
      prev = count;
    end
    ld = 1'b1; ld_val = 8'd135; en = 1'b1;
    @(negedge clk);
    ld = 1'b0; en = 1'b0;
    check(bin == 8'd135 && count == 8'(135 ^ (135 >> 1)), "load 135");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
