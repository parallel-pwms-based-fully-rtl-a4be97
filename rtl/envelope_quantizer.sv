// envelope_quantizer: the L-quantizer of the IF-PWM envelope path. The
// envelope A from the CORDIC is normalized to A_std and mapped onto L levels,
// Y = min(round(A * L / A_std), L - 1). Y is the tap number of the L-stage
// delay line, whose lag of Y unit delays of 1/(2L*f_IF) becomes an IF pulse
// of duty Y/L.
//
// L = 128 levels is the published value. The normalization value A_std
// (default: the full scale 2^(IQ_W-1) of one I or Q component), rounding to
// nearest, clipping at L-1 and the one-clock registered output are this
// implementation's choices.
module envelope_quantizer #(
  parameter int unsigned AMP_W = ptx_pkg::AMP_W,
  parameter int unsigned L     = ptx_pkg::L_LEVELS,
  parameter int unsigned A_STD = 1 << (ptx_pkg::IQ_W - 1),
  localparam int unsigned Y_W  = $clog2(L)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [AMP_W-1:0] amp,
  output logic             out_valid,
  output logic [Y_W-1:0]   y
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned PW = AMP_W + Y_W + 2;

  logic [PW-1:0] level;
  always_comb begin
    level = (PW'(amp) * PW'(L) + PW'(A_STD / 2)) / PW'(A_STD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= (level > PW'(L - 1)) ? Y_W'(L - 1) : Y_W'(level);
    end
  end
endmodule
