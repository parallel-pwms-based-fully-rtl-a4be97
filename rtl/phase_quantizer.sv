// phase_quantizer: the N-quantizer of the phase path. It maps the continuous
// phase 0..360 degrees (an unsigned PH_W-bit fraction of a turn) onto one of
// N equidistant levels X = round(phase * N / 2^PH_W) mod N. The N-stage
// delay line turns X into a carrier phase of X/N * 360 degrees (the top
// selects tap (N - X) mod N, a lag that equals a lead of X unit delays of
// 1/(N*f_C)).
//
// The N levels (256) are the published value. Rounding to the nearest level,
// wrap-around at 360 degrees and the one-clock registered output with
// out_valid are this implementation's choices. N must be a power of two no
// larger than 2^PH_W.
module phase_quantizer #(
  parameter int unsigned PH_W = ptx_pkg::PH_W,
  parameter int unsigned N    = ptx_pkg::N_LEVELS,
  localparam int unsigned X_W = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [PH_W-1:0] phase,
  output logic            out_valid,
  output logic [X_W-1:0]  x
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DROP = PH_W - X_W;

  logic [PH_W-1:0] rounded;
  always_comb begin
    if (DROP == 0) rounded = phase;
    else           rounded = phase + PH_W'(1 << (DROP - 1));  // wraps mod 360
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x         <= '0;
    end else begin
      out_valid <= in_valid;
      x         <= rounded[PH_W-1 -: X_W];
    end
  end

  initial assert (N >= 2 && (1 << X_W) == N && X_W <= PH_W)
    else $error("phase_quantizer: N must be a power of two not above 2^PH_W");
endmodule
