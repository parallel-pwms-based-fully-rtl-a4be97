// envelope_precorrection: envelope precorrection and M-quantizer of the
// CF-PWM path. A band-pass filter driven by a square wave of duty d delivers a
// fundamental of amplitude (2/pi) sin(pi d). To make that amplitude follow the
// envelope, the pulse width must be the inverse function of it:
//     Y / M = (2/pi) * asin((pi/2) * A / A_std),
// so that with d = 0.5 * Y/M the filter output is exactly A / A_std.
// The argument (pi/2) A/A_std reaches 1 at A/A_std = 2/pi, the largest
// fundamental a square wave can carry; larger envelopes clip at Y = M - 1.
//
// How it works: rather than evaluate asin, the block compares A against the
// M-1 decision thresholds
//     T_k = A_std * (2/pi) * sin(pi * (k - 0.5) / (2M)),   k = 1 .. M-1,
// and Y is the number of thresholds that A reaches. This is the rounded
// inverse function. The thresholds are computed at elaboration with an
// integer Taylor series of sin in 30-bit fixed point.
//
// The transfer function and M = 128 levels follow the published design.
// Merging quantizer and precorrection, rounding to nearest, clipping, A_std
// and the one-clock registered output are this implementation's choices.
module envelope_precorrection #(
  parameter int unsigned AMP_W = ptx_pkg::AMP_W,
  parameter int unsigned M     = ptx_pkg::M_LEVELS,
  parameter int unsigned A_STD = 1 << (ptx_pkg::IQ_W - 1),
  localparam int unsigned Y_W  = $clog2(M)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [AMP_W-1:0] amp,
  output logic             out_valid,
  output logic [Y_W-1:0]   y
);
  timeunit 1ps; timeprecision 1ps;

  localparam longint PI_Q30 = 64'd3373259426;  // pi * 2^30

  // sin(x) for x in Q30, 0 <= x <= pi/2.
  function automatic longint sin_q30(input longint x);
    longint term, acc;
    term = x;
    acc  = x;
    for (int n = 1; n < 10; n++) begin
      term = -(((term * x) >>> 30) * x >>> 30) / ((2 * n) * (2 * n + 1));
      acc  = acc + term;
    end
    return acc;
  endfunction

  // Threshold T_k, rounded up so that "amp >= T_k" means amp/A_std >= exact value.
  function automatic longint threshold(input int unsigned k);
    longint x;
    x = (PI_Q30 * longint'(2 * k - 1)) / longint'(4 * M);
    return (longint'(2 * A_STD) * sin_q30(x) + PI_Q30 - 1) / PI_Q30;
  endfunction

  logic [M-1:1] reached;
  for (genvar k = 1; k < M; k++) begin : g_thr
    localparam longint T = threshold(k);
    assign reached[k] = (longint'(amp) >= T);
  end

  // The thresholds grow with k, so 'reached' is a thermometer code: count it.
  logic [Y_W-1:0] level;
  always_comb begin
    level = '0;
    for (int k = 1; k < M; k++) level += Y_W'(reached[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= level;
    end
  end
endmodule
