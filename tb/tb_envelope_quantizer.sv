// tb_envelope_quantizer: checks the L-level envelope quantizer against
// min(round(A * L / A_std), L - 1) computed in floating point for every
// envelope code, and its one-clock latency.
module tb_envelope_quantizer;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [AMP_W-1:0] amp = '0;
  logic out_valid;
  logic [6:0] y;
  int checks = 0, failures = 0;

  envelope_quantizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      amp = AMP_W'(a); in_valid = 1;
      @(negedge clk);
      e = int'($floor(real'(a) * 128.0 / 2048.0 + 0.5));
      if (e > 127) e = 127;
      checks++;
      if (!out_valid || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("amp %0d: y=%0d expected %0d", a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
