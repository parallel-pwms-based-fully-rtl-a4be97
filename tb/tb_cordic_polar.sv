// tb_cordic_polar: self-checking test of the I/Q-to-polar CORDIC.
// Random and corner I/Q samples are streamed one per clock; each result is
// compared with sqrt(I^2+Q^2) and atan2(Q, I) computed in floating point
// (tolerance 2 LSB in magnitude; in phase 16 LSB of a 2^16 turn,
// a sixteenth of a 256-level phase step, for magnitudes above 64). A separate
// single-sample run checks the ITER+2 clock latency.
module tb_cordic_polar;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  localparam int ITER = 14;
  localparam int LAT  = ITER + 2;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IQ_W-1:0] i_in = '0, q_in = '0;
  logic out_valid;
  logic [AMP_W-1:0] amp;
  logic [PH_W-1:0]  phase;
  int checks = 0, failures = 0;

  cordic_polar #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-value queue, filled when a sample is presented
  int exp_i[$], exp_q[$];

  always @(posedge clk) if (in_valid) begin
    exp_i.push_back(int'(i_in));
    exp_q.push_back(int'(q_in));
  end

  always @(posedge clk) if (out_valid && exp_i.size() > 0) begin
    int ei, eq, pe;
    real ea, ep;
    ei = exp_i.pop_front();
    eq = exp_q.pop_front();
    ea = $sqrt(real'(ei) * ei + real'(eq) * eq);
    ep = $atan2(real'(eq), real'(ei)) / (2.0 * PI);
    if (ep < 0) ep += 1.0;
    pe = int'(ep * 65536.0) % 65536;
    checks++;
    if ((real'(amp) - ea > 2.0) || (ea - real'(amp) > 2.0)) begin
      failures++;
      $display("amp mismatch I=%0d Q=%0d got %0d exp %f", ei, eq, amp, ea);
    end
    if (ea > 64.0) begin
      int d;
      d = (int'(phase) - pe + 65536 + 32768) % 65536 - 32768;
      checks++;
      if (d > 16 || d < -16) begin
        failures++;
        $display("phase mismatch I=%0d Q=%0d got %0d exp %0d", ei, eq, phase, pe);
      end
    end
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: one sample, count clocks to out_valid
    i_in = 12'sd1000; q_in = -12'sd500; in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT) begin failures++; $display("latency %0d, expected %0d", lat, LAT); end
    repeat (4) @(negedge clk);
    // corners
    for (int k = 0; k < 8; k++) begin
      int ci[8] = '{2047, -2047, 0, 0, 2047, -2047, 2047, -2048};
      int cq[8] = '{0, 0, 2047, -2047, 2047, -2047, -2047, -2048};
      i_in = IQ_W'(ci[k]); q_in = IQ_W'(cq[k]); in_valid = 1;
      @(negedge clk);
    end
    // random stream
    for (int k = 0; k < 2000; k++) begin
      i_in = IQ_W'($urandom_range(4095)); q_in = IQ_W'($urandom_range(4095));
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
