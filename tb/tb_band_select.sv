// tb_band_select: drives a carrier-frequency sweep up and down through the
// 80..100 MHz overlap and checks the mode against a reference hysteresis
// model, the reset mode, and the one-clock mode_changed pulse.
module tb_band_select;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [FC_W-1:0] fc_word = 14'd500;
  tx_mode_e mode;
  logic mode_changed;
  int checks = 0, failures = 0, switches = 0, holds = 0;
  tx_mode_e ref_mode;

  band_select dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int f);
    tx_mode_e prev;
    prev = ref_mode;
    fc_word = FC_W'(f);
    if (f > 1000) ref_mode = MODE_HIGH_CF;
    else if (f < 800) ref_mode = MODE_LOW_CF;
    @(negedge clk);
    checks++;
    if (mode != ref_mode || mode_changed != (prev != ref_mode)) begin
      failures++;
      $display("fc=%0d: mode=%0d changed=%0b, expected %0d", f, mode, mode_changed, ref_mode);
    end
    if (prev != ref_mode) switches++;
    if (f >= 800 && f <= 1000) holds++;
  endtask

  initial begin
    ref_mode = MODE_LOW_CF;
    fc_word = 14'd5000;  // high band while in reset: reset must still give mode 1
    repeat (2) @(negedge clk);
    checks++;
    if (mode != MODE_LOW_CF) begin failures++; $display("reset mode wrong"); end
    fc_word = 14'd500;
    rst_n = 1;
    for (int f = 20; f <= 10000; f += 37) apply(f);
    for (int f = 10000; f >= 20; f -= 41) apply(f);
    for (int k = 0; k < 500; k++) apply(700 + $urandom_range(400));
    checks++;
    if (switches < 4 || holds == 0) begin failures++; $display("sweep did not exercise both bands"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
