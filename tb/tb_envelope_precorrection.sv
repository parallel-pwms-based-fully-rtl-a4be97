// tb_envelope_precorrection: checks the arcsine precorrection for every
// envelope code against Y = round(M * (2/pi) * asin((pi/2) * A/A_std)),
// clipped at M - 1, computed with the floating-point $asin. Codes within
// 1e-6 of a rounding boundary accept either neighbour. It also checks that
// the filtered amplitude (2/pi) sin(pi * 0.5 * Y/M) reproduces A/A_std to
// within one level, which is the purpose of the block.
module tb_envelope_precorrection;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [AMP_W-1:0] amp = '0;
  logic out_valid;
  logic [6:0] y;
  int checks = 0, failures = 0, clipped = 0;

  envelope_precorrection dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a_n, u, yr, back;
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      amp = AMP_W'(a); in_valid = 1;
      @(negedge clk);
      a_n = real'(a) / 2048.0;
      u   = PI / 2.0 * a_n;
      if (u > 1.0) u = 1.0;
      yr  = 128.0 * (2.0 / PI) * $asin(u);
      e   = int'($floor(yr + 0.5));
      if (e > 127) begin e = 127; end
      checks++;
      if (!out_valid || !(int'(y) == e ||
          ((yr - $floor(yr) - 0.5 < 1e-6) && (yr - $floor(yr) - 0.5 > -1e-6) && int'(y) == e - 1))) begin
        failures++;
        if (failures < 10) $display("amp %0d: y=%0d expected %0d (%f)", a, y, e, yr);
      end
      if (int'(y) == 127) clipped++;
      // inverse check below the clipping point
      if (a_n < 0.63) begin
        back = (2.0 / PI) * $sin(PI * 0.5 * real'(y) / 128.0);
        checks++;
        if (back - a_n > 0.0125 || a_n - back > 0.0125) begin
          failures++;
          $display("amp %0d: filtered amplitude %f, wanted %f", a, back, a_n);
        end
      end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("clipping never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
