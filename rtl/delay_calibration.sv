// delay_calibration: the control part of the unit-delay autocalibration loop.
// A replica of K delay cells delays the reference clock f_in; when K unit
// delays equal a quarter period (tau = 0.25 / (K f_in)), the reference and its
// delayed copy are 90 degrees apart and their XOR is high exactly half of the
// time. A low-pass filter averages the XOR output, a comparator sets it
// against the half-level reference, and an integrator steps the delay-cell
// supply code up by STEP when the XOR is high too long (delay too large:
// raise the supply, cells get faster) and down by STEP otherwise. Under this
// negative feedback the supply settles, dithering by one step, where the
// replica delay is a quarter period; matched delay lines on the same supply
// then have the unit delay of eq. tau = 0.25/(K f_in): K = N/4, L/2 or M for
// the phase, IF and CF lines.
//
// How it is realised here: the published loop is analog (XOR gate, RC
// low-pass, comparator, integrator with supply driver). This block is a
// sampled digital equivalent: both clocks are brought into the clk_s domain
// by two-flop synchronizers of equal length, the XOR is taken on the samples,
// the low-pass filter is an integrate-and-dump counter over 2^WIN_LOG2
// samples, the comparator compares the count with half the window, and the
// integrator is a saturating up/down register whose code sets the supply
// (VDD_MIN .. VDD_MAX). clk_s must run much faster than f_in; its period sets
// the phase resolution. The XOR detector, the comparator and the +/-Delta
// integrator follow the published loop; the sampling, window length, step,
// code width and reset value are this implementation's choices.
//
// Timing: the supply code changes once per window, on the clock after the
// last sample; cmp_up shows the direction of the last step and step_strobe
// pulses with each update.
module delay_calibration #(
  parameter int unsigned VDD_W    = 10,
  parameter int unsigned WIN_LOG2 = 10,
  parameter int unsigned STEP     = 4,
  parameter int unsigned VDD_MIN  = 0,
  parameter int unsigned VDD_MAX  = (1 << VDD_W) - 1,
  parameter int unsigned VDD_INIT = 1 << (VDD_W - 1)
) (
  input  logic             clk_s,        // sampling clock
  input  logic             rst_n,
  input  logic             f_in,         // reference clock (f_C or f_IF)
  input  logic             f_dly,        // f_in after the K-cell replica
  output logic [VDD_W-1:0] vdd_code,     // delay-cell supply setting
  output logic             cmp_up,       // last comparator decision
  output logic             step_strobe   // one clock per supply update
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CW = WIN_LOG2 + 1;

  logic [1:0]          sync_ref, sync_dly;
  logic [WIN_LOG2-1:0] sample_cnt;
  logic [CW-1:0]       high_cnt;
  logic                xor_s;

  // 90-degree detector on synchronized samples.
  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      sync_ref <= '0;
      sync_dly <= '0;
    end else begin
      sync_ref <= {sync_ref[0], f_in};
      sync_dly <= {sync_dly[0], f_dly};
    end
  end
  assign xor_s = sync_ref[1] ^ sync_dly[1];

  // Low-pass filter (integrate and dump), comparator and integrator.
  logic [CW-1:0] high_total;
  logic          decide_up;
  always_comb begin
    high_total = high_cnt + CW'(xor_s);
    decide_up  = high_total > CW'(1 << (WIN_LOG2 - 1));
  end

  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      sample_cnt  <= '0;
      high_cnt    <= '0;
      vdd_code    <= VDD_W'(VDD_INIT);
      cmp_up      <= 1'b0;
      step_strobe <= 1'b0;
    end else begin
      sample_cnt  <= sample_cnt + 1'b1;
      step_strobe <= 1'b0;
      if (&sample_cnt) begin
        high_cnt    <= '0;
        cmp_up      <= decide_up;
        step_strobe <= 1'b1;
        if (decide_up) begin
          vdd_code <= (int'(vdd_code) + STEP > VDD_MAX) ? VDD_W'(VDD_MAX) : vdd_code + VDD_W'(STEP);
        end else begin
          vdd_code <= (int'(vdd_code) < VDD_MIN + STEP) ? VDD_W'(VDD_MIN) : vdd_code - VDD_W'(STEP);
        end
      end else begin
        high_cnt <= high_total;
      end
    end
  end

  // The supply code never leaves its range.
  a_vdd_range: assert property (@(posedge clk_s) disable iff (!rst_n)
    int'(vdd_code) >= VDD_MIN && int'(vdd_code) <= VDD_MAX);
endmodule
