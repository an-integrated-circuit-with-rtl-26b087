// Self-checking testbench for rx_aperture_decoder: for every one of the 64
// select codes, checks that each column connects exactly the expected row
// (the chosen row, the main diagonal or the other diagonal) or none.
module tb_rx_aperture_decoder;
  import us_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  ap_sel_t     ap;
  logic [15:0] col_sel [16];
  int checks = 0, failures = 0;

  rx_aperture_decoder #(.NE(16)) dut (.ap(ap), .col_sel(col_sel));

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
    for (int code = 0; code < 64; code++) begin
      ap = ap_sel_t'(6'(code));
      #1;
      for (int j = 0; j < 16; j++) begin
        int want;  // expected row, -1 for none
        case (code >> 4)
          0:       want = code & 15;
          1:       want = j;
          2:       want = 15 - j;
          default: want = -1;
        endcase
        if (want < 0)
          check(col_sel[j] == 16'h0, $sformatf("code %0d col %0d: none", code, j));
        else
          check(col_sel[j] == (16'h1 << want),
                $sformatf("code %0d col %0d: %h, want row %0d", code, j, col_sel[j], want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
