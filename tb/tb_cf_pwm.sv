// tb_cf_pwm: runs the CF-PWM with M = 128 on a carrier of 4M unit delays
// and, for a set of envelope levels Y (taps M-Y and M+Y), measures every
// carrier period: exactly one pulse (none for Y = 0), 2Y units wide, starting
// M-Y units after the carrier's rising edge, so that it is centred on the
// 90-degree point (M units) whatever its width.
module tb_cf_pwm;
  timeunit 1ns; timeprecision 1ps;

  localparam int M = 128;

  logic clk = 0, rst_n = 0, carrier = 0;
  logic [7:0] tap_lo = 8'(M), tap_hi = 8'(M);
  logic pwm;
  int checks = 0, failures = 0;
  int cnt = 0;

  cf_pwm dut (.clk_unit(clk), .rst_n, .carrier, .tap_lo, .tap_hi, .pwm);

  always #5 clk = ~clk;

  // carrier: 4M units per period, high for 2M; cnt = units since rising edge
  always @(posedge clk) begin
    cnt     <= (cnt == 4 * M - 1) ? 0 : cnt + 1;
    carrier <= (cnt < 2 * M - 1) || (cnt == 4 * M - 1);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv[9] = '{0, 1, 5, 32, 64, 77, 100, 126, 127};
    int first, last, highs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (lv[i]) begin
      tap_lo = 8'(M - lv[i]);
      tap_hi = 8'(M + lv[i]);
      repeat (2 * 4 * M) @(negedge clk);
      for (int per = 0; per < 3; per++) begin
        // wait for the start of a carrier period (cnt == 0 after the edge)
        while (cnt != 0) @(negedge clk);
        first = -1; last = -1; highs = 0;
        for (int u = 0; u < 4 * M; u++) begin
          if (pwm) begin
            if (first < 0) first = u;
            last = u;
            highs++;
          end
          @(negedge clk);
        end
        checks++;
        if (lv[i] == 0) begin
          if (highs != 0) begin failures++; $display("Y=0: %0d high units", highs); end
        end else if (highs != 2 * lv[i] || last - first + 1 != highs || first != M - lv[i]) begin
          failures++;
          $display("Y=%0d: width %0d from %0d to %0d, expected %0d from %0d",
                   lv[i], highs, first, last, 2 * lv[i], M - lv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
