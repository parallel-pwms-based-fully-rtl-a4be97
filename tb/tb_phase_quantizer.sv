// tb_phase_quantizer: checks the N-level phase quantizer against
// round(phase * N / 2^PH_W) mod N computed in floating point, for an
// exhaustive sweep of the 2^16 phase codes, and its one-clock latency.
module tb_phase_quantizer;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PH_W-1:0] phase = '0;
  logic out_valid;
  logic [7:0] x;
  int checks = 0, failures = 0;

  phase_quantizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 65536; p++) begin
      phase = PH_W'(p); in_valid = 1;
      @(negedge clk);
      e = int'($floor(real'(p) * 256.0 / 65536.0 + 0.5)) % 256;
      checks++;
      if (!out_valid || int'(x) != e) begin
        failures++;
        if (failures < 10) $display("phase %0d: x=%0d valid=%0b expected %0d", p, x, out_valid, e);
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
