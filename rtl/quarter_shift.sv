// quarter_shift: the 90-degree shift of the CF-PWM. From the precorrected
// envelope level Y it forms the two tap numbers M - Y and M + Y for the M- and
// 2M-stage delay lines. With a unit delay of 1/(4M*f_C), M units are a quarter
// carrier period, so the two lags (1 -/+ Y/M) * 90 degrees sit symmetrically
// about the 90-degree point of the position-modulated carrier, and the pulse
// cut out between them is centred there whatever its width.
//
// The tap arithmetic follows the published block diagram. The block is
// combinational; Y must not exceed M.
module quarter_shift #(
  parameter int unsigned M      = ptx_pkg::M_LEVELS,
  localparam int unsigned Y_W   = $clog2(M),
  localparam int unsigned TAP_W = $clog2(2 * M)
) (
  input  logic [Y_W-1:0]   y,
  output logic [TAP_W-1:0] tap_lo,  // M - Y, for the M-stage line
  output logic [TAP_W-1:0] tap_hi   // M + Y, for the 2M-stage line
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    tap_lo = TAP_W'(M) - TAP_W'(y);
    tap_hi = TAP_W'(M) + TAP_W'(y);
  end
endmodule
