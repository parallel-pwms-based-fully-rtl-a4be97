// tb_quarter_shift: sweeps every envelope level Y and checks the tap pair
// against M - Y and M + Y, and that the taps straddle M symmetrically.
module tb_quarter_shift;
  timeunit 1ns; timeprecision 1ps;

  logic [6:0] y;
  logic [7:0] tap_lo, tap_hi;
  int checks = 0, failures = 0;

  quarter_shift dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      y = 7'(k);
      #1;
      checks++;
      if (int'(tap_lo) != 128 - k || int'(tap_hi) != 128 + k) begin
        failures++;
        $display("y=%0d: taps %0d %0d", k, tap_lo, tap_hi);
      end
      checks++;
      if (int'(tap_lo) + int'(tap_hi) != 256) begin failures++; $display("taps not symmetric"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
