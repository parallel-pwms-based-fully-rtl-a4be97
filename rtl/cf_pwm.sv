// cf_pwm: carrier-frequency pulse-width modulator of the low-carrier mode.
// The position-modulated carrier from the phase path feeds two delay lines
// with a unit delay of 1/(4M f_C): the M-stage line at tap M-Y gives
// PHI1 = (1 - Y/M) * 90 degrees of lag, the 2M-stage line at tap M+Y gives
// PHI2 = (1 + Y/M) * 90 degrees. PHI1 AND NOT PHI2 is a single pulse per
// carrier period, 2Y units = 0.5*Y/M of a period wide, centred on the
// 90-degree point of the carrier. Its width carries the (precorrected)
// envelope and its centre the phase; only the carrier clock is involved.
//
// The two lines, the inverter and the AND follow the published design. The
// "M-stage" line is given M+1 taps here so that Y = 0 (tap M, zero width) is
// representable. Interface: clk_unit runs at 4M f_C and the carrier must be
// synchronous to it; the taps come from quarter_shift and are sampled by the
// lines one unit before they act.
module cf_pwm #(
  parameter int unsigned M      = ptx_pkg::M_LEVELS,
  localparam int unsigned TAP_W = $clog2(2 * M),
  localparam int unsigned LO_W  = $clog2(M + 1)
) (
  input  logic             clk_unit,
  input  logic             rst_n,
  input  logic             carrier,   // position-modulated carrier
  input  logic [TAP_W-1:0] tap_lo,    // M - Y
  input  logic [TAP_W-1:0] tap_hi,    // M + Y
  output logic             pwm        // env: pulse-width modulated carrier
);
  timeunit 1ps; timeprecision 1ps;

  logic phi1, phi2;

  tapped_delay_line #(.TAPS(M + 1)) u_m_line (
    .clk_unit (clk_unit),
    .rst_n    (rst_n),
    .d        (carrier),
    .sel      (LO_W'(tap_lo)),
    .q        (phi1)
  );

  tapped_delay_line #(.TAPS(2 * M)) u_2m_line (
    .clk_unit (clk_unit),
    .rst_n    (rst_n),
    .d        (carrier),
    .sel      (tap_hi),
    .q        (phi2)
  );

  assign pwm = phi1 & ~phi2;
endmodule
