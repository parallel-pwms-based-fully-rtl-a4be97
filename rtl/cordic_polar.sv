// cordic_polar: pipelined CORDIC in vectoring mode, converting the baseband
// I/Q sample to the polar envelope A and phase PHI that the two modulation
// paths of the transmitter consume.
//
// How it works: a pre-rotation stage folds the left half plane onto the right
// one (adding 180 degrees to the angle accumulator), then ITER micro-rotation
// stages drive y towards zero, adding or subtracting atan(2^-i) each time.
// The x register then holds the magnitude times the CORDIC gain (about
// 1.6468); a last stage multiplies by its inverse. The phase is an unsigned
// fraction of a full turn: 2^PH_W equals 360 degrees, 0 is the +I axis and
// the angle grows counter-clockwise towards +Q.
//
// Interface and timing: one sample per clock when in_valid is high; results
// appear with out_valid exactly ITER+2 clocks later. rst_n is asynchronous
// and active low and clears every pipeline register.
//
// The use of CORDIC for the I/Q to polar conversion follows the published
// architecture; the pipelined structure, iteration count, word widths,
// rounding and reset are choices of this implementation. The arctangent
// table is computed at elaboration from the series
// atan(x) = x - x^3/3 + x^5/5 - ... in 40-bit fixed point.
module cordic_polar #(
  parameter int unsigned IQ_W  = ptx_pkg::IQ_W,
  parameter int unsigned AMP_W = ptx_pkg::AMP_W,
  parameter int unsigned PH_W  = ptx_pkg::PH_W,
  parameter int unsigned ITER  = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IQ_W-1:0]  i_in,
  input  logic signed [IQ_W-1:0]  q_in,
  output logic                    out_valid,
  output logic        [AMP_W-1:0] amp,
  output logic        [PH_W-1:0]  phase
);

  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned GUARD = 6;
  localparam int unsigned XW    = IQ_W + 2 + GUARD;  // room for gain and sqrt(2)
  localparam longint      PI_Q40 = 64'd3454217652358;  // pi * 2^40
  localparam longint      INV_GAIN_Q16 = 64'd39797;    // 2^16 / 1.6468

  // atan(2^-i) as a fraction of a full turn, scaled to 2^PH_W.
  function automatic logic [PH_W-1:0] atan_turn(input int unsigned i);
    longint acc, term;
    if (i == 0) begin
      acc = PI_Q40 / 4;
    end else begin
      acc = 0;
      for (int k = 0; k < 20; k++) begin
        int unsigned sh;
        sh = (2 * k + 1) * i;
        term = (sh < 40) ? ((64'sd1 <<< (40 - sh)) / (2 * k + 1)) : 64'sd0;
        acc  = (k % 2 == 0) ? acc + term : acc - term;
      end
    end
    // turn fraction = acc / (2 pi); scale by 2^PH_W with rounding
    return PH_W'(((acc <<< PH_W) + PI_Q40) / (2 * PI_Q40));
  endfunction

  logic signed [XW-1:0]   x_q [ITER+1];
  logic signed [XW-1:0]   y_q [ITER+1];
  logic        [PH_W-1:0] z_q [ITER+1];
  logic        [ITER:0]   v_q;

  // Stage 0: fold into the right half plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q[0] <= '0;
      y_q[0] <= '0;
      z_q[0] <= '0;
      v_q[0] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      if (i_in < 0) begin
        x_q[0] <= -(XW'(i_in) <<< GUARD);
        y_q[0] <= -(XW'(q_in) <<< GUARD);
        z_q[0] <= PH_W'(1) << (PH_W - 1);  // 180 degrees
      end else begin
        x_q[0] <= XW'(i_in) <<< GUARD;
        y_q[0] <= XW'(q_in) <<< GUARD;
        z_q[0] <= '0;
      end
    end
  end

  // Micro-rotation stages.
  for (genvar s = 0; s < ITER; s++) begin : g_stage
    localparam logic [PH_W-1:0] ATAN = atan_turn(s);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q[s+1] <= '0;
        y_q[s+1] <= '0;
        z_q[s+1] <= '0;
        v_q[s+1] <= 1'b0;
      end else begin
        v_q[s+1] <= v_q[s];
        if (y_q[s] >= 0) begin
          x_q[s+1] <= x_q[s] + (y_q[s] >>> s);
          y_q[s+1] <= y_q[s] - (x_q[s] >>> s);
          z_q[s+1] <= z_q[s] + ATAN;
        end else begin
          x_q[s+1] <= x_q[s] - (y_q[s] >>> s);
          y_q[s+1] <= y_q[s] + (x_q[s] >>> s);
          z_q[s+1] <= z_q[s] - ATAN;
        end
      end
    end
  end

  // Gain compensation, rounding and saturation.
  logic [XW+16-1:0] mag_scaled;
  logic [XW+16-1:0] mag_round;
  always_comb begin
    mag_scaled = (XW+16)'(unsigned'(x_q[ITER])) * (XW+16)'(INV_GAIN_Q16);
    mag_round  = (mag_scaled + ((XW+16)'(1) << (16 + GUARD - 1))) >> (16 + GUARD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      amp       <= '0;
      phase     <= '0;
    end else begin
      out_valid <= v_q[ITER];
      amp       <= (mag_round > (XW+16)'({AMP_W{1'b1}})) ? {AMP_W{1'b1}} : AMP_W'(mag_round);
      phase     <= z_q[ITER];
    end
  end

endmodule
