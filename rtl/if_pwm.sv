// if_pwm: intermediate-frequency pulse-width modulator of the high-carrier
// mode. The IF clock passes through an L-stage delay line (unit delay
// 1/(2L f_IF)) at tap Y, and an XOR of the clock with its delayed copy is high
// for Y unit delays after every IF edge. The envelope thus becomes an IF
// pulse train of duty Y/L: one pulse of Y/L * 180 degrees in each IF half
// period. Downstream, an AND with the carrier turns it into a pulse density
// of the carrier.
//
// The structure (L-stage line, XOR) and the unit delay follow the published
// design. Interface: clk_unit runs at 2L f_IF and f_if must be derived from
// it; y is sampled by the delay line one unit before it acts. env is
// combinational from the line's taps.
module if_pwm #(
  parameter int unsigned L    = ptx_pkg::L_LEVELS,
  localparam int unsigned Y_W = $clog2(L)
) (
  input  logic           clk_unit,
  input  logic           rst_n,
  input  logic           f_if,
  input  logic [Y_W-1:0] y,
  output logic           env
);
  timeunit 1ps; timeprecision 1ps;

  logic f_if_lag;

  tapped_delay_line #(.TAPS(L)) u_l_line (
    .clk_unit (clk_unit),
    .rst_n    (rst_n),
    .d        (f_if),
    .sel      (y),
    .q        (f_if_lag)
  );

  assign env = f_if ^ f_if_lag;
endmodule
