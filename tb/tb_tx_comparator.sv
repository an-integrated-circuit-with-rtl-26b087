// Self-checking testbench for tx_comparator: random stored values and count
// sequences, compared with a reference that goes low on the first equality
// after reset and stays low until the next reset.
module tb_tx_comparator;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] a = '0, b = '0;
  logic       rs = 1'b1;
  logic       eq_n;
  logic       ref_n;
  int checks = 0, failures = 0, fires = 0;

  tx_comparator #(.W(8)) dut (.a(a), .b(b), .rs(rs), .eq_n(eq_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 40; trial++) begin
      a  = 8'($urandom);
      b  = a;                      // equal during precharge: must stay high
      rs = 1'b1; #5;
      check(eq_n == 1'b1, "precharged high while reset");
      b  = 8'd0; #1;
      rs = 1'b0; #5;
      ref_n = (a != 8'd0) ? 1'b1 : 1'b0;
      check(eq_n == ref_n, "after reset release");
      // Count 0..255 in Gray code, then a few random values.
      for (int c = 1; c < 256 + 20; c++) begin
        logic [7:0] bin;
        bin = (c < 256) ? 8'(c) : 8'($urandom);
        b = bin ^ (bin >> 1);
        #2;
        if (b == a) ref_n = 1'b0;
        check(eq_n == ref_n, $sformatf("a=%h b=%h eq_n=%b", a, b, eq_n));
      end
      check(eq_n == 1'b0, "fired once the full range was counted");
      if (eq_n == 1'b0) fires++;
    end
    check(fires == 40, "every trial fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
