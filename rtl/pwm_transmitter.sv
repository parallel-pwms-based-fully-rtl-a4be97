// pwm_transmitter: fully digital polar transmitter with parallel IF- and
// CF-pulse-width modulators, covering a wide carrier range with one switched-
// mode power amplifier.
//
// Signal flow. A CORDIC turns each baseband I/Q sample into envelope A and
// phase PHI. The phase path quantizes PHI to X (N levels) and delays the
// carrier f_C by (N - X) mod N unit delays of 1/(N f_C) in the N-stage line,
// which is the same as advancing it by X units, so the carrier edges carry
// the phase with the sign of square(w_C t + PHI). The envelope goes two ways at once:
//  * IF-PWM (mode 2, high carrier band): A is quantized to Y (L levels); an
//    L-stage line on the IF clock plus an XOR makes an IF pulse train of duty
//    Y/L, and an AND gate lets through only the carrier pulses that fall in
//    it, so the envelope becomes a pulse density of the carrier.
//  * CF-PWM (mode 1, low carrier band): A is precorrected by the inverse of
//    the band-pass filter's duty-to-amplitude law and quantized to Y (M
//    levels); the 90-degree shift forms taps M-Y and M+Y, and the M- and
//    2M-stage lines on the phase-shifted carrier cut out one pulse of 0.5*Y/M
//    of a period per carrier cycle, centred on its 90-degree point. Only the
//    carrier clock is involved.
// Two switches, set by the mode, route the phase-path carrier to the CF-PWM
// or to the AND gate and pick which result drives the class-D amplifier
// (pa_drive). The mode follows the carrier frequency word with the 80..100
// MHz band overlap as hysteresis. Three unit-delay calibration loops, one
// per group of delay lines (phase path, IF-PWM, CF-PWM), tune a delay-cell
// supply each so that K replica cells span a quarter period of their
// reference clock (K = N/4 on f_C, L/2 on f_IF, M on f_C); the supply codes
// are outputs for the delay cells. With the published cell delays the
// phase and IF loops lock for carriers of 0.5-1 GHz and the CF loop for
// 50-100 MHz; outside its range a loop rests at a supply limit. Lower
// carriers are covered as in the published design, by more matched inverter
// groups per cell (CAL_STAGES_*), which scales a group's delay range.
//
// Clocks. clk_bb runs the baseband (CORDIC, quantizers, precorrection,
// band selection). The delay lines are flip-flop chains whose clock period is
// the unit delay: clk_ph_unit = N f_C, clk_cf_unit = 4M f_C, clk_if_unit =
// 2L f_IF; f_c must be derived from clk_ph_unit, clk_cf_unit must be twice
// clk_ph_unit with coincident rising edges, and f_if must be derived from
// clk_if_unit. clk_cal samples the calibration detector. Baseband results
// must be held stable across the unit clocks' sampling of them (they are
// registered once per unit clock inside each line).
//
// Latency. X and both Y values appear ITER+3 clk_bb cycles after a sample is
// presented (CORDIC ITER+2, quantizer or precorrection 1). Each line then
// adopts a new tap one unit clock later.
//
// The architecture, the quantization levels (N = 256, M = L = 128), the unit
// delays, the band limits and the calibration principle follow the published
// design. Flip-flop delay cells, the sampled digital calibration loop, the
// word widths and the clocking scheme are this implementation's choices. The
// replica delay chains inside are behavioural models of the published
// supply-controlled inverter cells, so this top is a simulation model; the
// synthesizable datapath is every other block.
module pwm_transmitter
  import ptx_pkg::*;
#(
  parameter int unsigned N         = N_LEVELS,
  parameter int unsigned M         = M_LEVELS,
  parameter int unsigned L         = L_LEVELS,
  parameter int unsigned ITER      = 14,
  parameter int unsigned A_STD     = 1 << (IQ_W - 1),
  parameter int unsigned VDD_W     = 10,
  parameter int unsigned CAL_STEP  = 4,
  // calibration window (samples of clk_cal) per delay-line group
  parameter int unsigned CAL_WIN_LOG2_PH = 10,
  parameter int unsigned CAL_WIN_LOG2_IF = 12,
  parameter int unsigned CAL_WIN_LOG2_CF = 12,
  // matched inverter groups per delay cell, per delay-line group (1 = the
  // published cells; larger values cover lower carriers)
  parameter int unsigned CAL_STAGES_PH = 1,
  parameter int unsigned CAL_STAGES_IF = 1,
  parameter int unsigned CAL_STAGES_CF = 1,
  localparam int unsigned X_W      = $clog2(N),
  localparam int unsigned YL_W     = $clog2(L),
  localparam int unsigned YM_W     = $clog2(M)
) (
  // baseband
  input  logic                   clk_bb,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IQ_W-1:0] i_in,
  input  logic signed [IQ_W-1:0] q_in,
  input  logic [FC_W-1:0]        fc_word,      // carrier frequency, 100 kHz units
  // carrier and unit-delay clocks
  input  logic                   f_c,
  input  logic                   clk_ph_unit,  // N * f_C
  input  logic                   clk_cf_unit,  // 4M * f_C
  input  logic                   f_if,
  input  logic                   clk_if_unit,  // 2L * f_IF
  input  logic                   clk_cal,      // calibration sampling clock
  // to the class-D power amplifier
  output logic                   pa_drive,
  // status and observation
  output tx_mode_e               mode,
  output logic                   mode_changed,
  output logic [X_W-1:0]         phase_x,
  output logic [YL_W-1:0]        env_y_if,
  output logic [YM_W-1:0]        env_y_cf,
  output logic                   env_valid,
  output logic                   carrier_ph,   // position-modulated carrier
  output logic                   if_env,       // IF-PWM pulse train
  // delay-cell supply settings of the three delay-line groups
  output logic [VDD_W-1:0]       vdd_code_ph,  // phase path (N-stage line)
  output logic [VDD_W-1:0]       vdd_code_if,  // IF-PWM (L-stage line)
  output logic [VDD_W-1:0]       vdd_code_cf,  // CF-PWM (M- and 2M-stage lines)
  output logic [CAL_GROUPS-1:0]  cal_up,       // last decision, indexed by cal_group_e
  output logic [CAL_GROUPS-1:0]  cal_step      // update strobe, indexed by cal_group_e
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TAP_W = $clog2(2 * M);

  // ---------------- baseband: CORDIC, quantizers, precorrection ----------
  logic             pol_valid;
  logic [AMP_W-1:0] amp;
  logic [PH_W-1:0]  phi;

  cordic_polar #(.ITER(ITER)) u_cordic (
    .clk(clk_bb), .rst_n, .in_valid, .i_in, .q_in,
    .out_valid(pol_valid), .amp, .phase(phi)
  );

  logic x_valid, yl_valid, ym_valid;

  phase_quantizer #(.N(N)) u_n_quant (
    .clk(clk_bb), .rst_n, .in_valid(pol_valid), .phase(phi),
    .out_valid(x_valid), .x(phase_x)
  );

  envelope_quantizer #(.L(L), .A_STD(A_STD)) u_l_quant (
    .clk(clk_bb), .rst_n, .in_valid(pol_valid), .amp,
    .out_valid(yl_valid), .y(env_y_if)
  );

  envelope_precorrection #(.M(M), .A_STD(A_STD)) u_precorr (
    .clk(clk_bb), .rst_n, .in_valid(pol_valid), .amp,
    .out_valid(ym_valid), .y(env_y_cf)
  );

  assign env_valid = x_valid & yl_valid & ym_valid;

  band_select u_band (
    .clk(clk_bb), .rst_n, .fc_word, .mode, .mode_changed
  );

  // ---------------- phase path: N-stage delay line -----------------------
  // A positive phase is a lead: a lag of N - X units of a periodic carrier
  // equals a lead of X units.
  logic [X_W-1:0] ph_sel;
  assign ph_sel = (phase_x == '0) ? '0 : X_W'(N - 32'(phase_x));

  tapped_delay_line #(.TAPS(N)) u_n_line (
    .clk_unit(clk_ph_unit), .rst_n, .d(f_c), .sel(ph_sel), .q(carrier_ph)
  );

  // ---------------- IF-PWM envelope path ----------------------------------
  if_pwm #(.L(L)) u_if_pwm (
    .clk_unit(clk_if_unit), .rst_n, .f_if, .y(env_y_if), .env(if_env)
  );

  // ---------------- CF-PWM envelope path ----------------------------------
  logic [TAP_W-1:0] tap_lo, tap_hi;
  logic             cf_carrier, cf_out;

  quarter_shift #(.M(M)) u_shift (
    .y(env_y_cf), .tap_lo, .tap_hi
  );

  cf_pwm #(.M(M)) u_cf_pwm (
    .clk_unit(clk_cf_unit), .rst_n, .carrier(cf_carrier),
    .tap_lo, .tap_hi, .pwm(cf_out)
  );

  // ---------------- mode switches and AND gate ----------------------------
  output_select u_out (
    .mode, .carrier(carrier_ph), .if_env, .cf_pwm_out(cf_out),
    .cf_carrier, .pa_drive
  );

  // ---------------- unit-delay autocalibration ----------------------------
  // One loop per group of delay lines, each with its own replica of K cells
  // and its own reference: K = N/4 on f_C (phase path), K = L/2 on f_IF
  // (IF-PWM), K = M on f_C (CF-PWM). The replica cell delays at 1.4 V and
  // 2.2 V are the published ones of each group.
  logic f_c_rep_ph, f_if_rep, f_c_rep_cf;

  replica_delay_line #(.K(N / 4), .VDD_W(VDD_W),
                       .TAU_SLOW_FS(7800), .TAU_FAST_FS(3900),
                       .STAGES(CAL_STAGES_PH)) u_replica_ph (
    .d(f_c), .vdd_code(vdd_code_ph), .q(f_c_rep_ph)
  );
  delay_calibration #(.VDD_W(VDD_W), .WIN_LOG2(CAL_WIN_LOG2_PH), .STEP(CAL_STEP)) u_cal_ph (
    .clk_s(clk_cal), .rst_n, .f_in(f_c), .f_dly(f_c_rep_ph),
    .vdd_code(vdd_code_ph), .cmp_up(cal_up[CAL_PH]), .step_strobe(cal_step[CAL_PH])
  );

  replica_delay_line #(.K(L / 2), .VDD_W(VDD_W),
                       .TAU_SLOW_FS(120300), .TAU_FAST_FS(60100),
                       .STAGES(CAL_STAGES_IF)) u_replica_if (
    .d(f_if), .vdd_code(vdd_code_if), .q(f_if_rep)
  );
  delay_calibration #(.VDD_W(VDD_W), .WIN_LOG2(CAL_WIN_LOG2_IF), .STEP(CAL_STEP)) u_cal_if (
    .clk_s(clk_cal), .rst_n, .f_in(f_if), .f_dly(f_if_rep),
    .vdd_code(vdd_code_if), .cmp_up(cal_up[CAL_IF]), .step_strobe(cal_step[CAL_IF])
  );

  replica_delay_line #(.K(M), .VDD_W(VDD_W),
                       .TAU_SLOW_FS(39000), .TAU_FAST_FS(19500),
                       .STAGES(CAL_STAGES_CF)) u_replica_cf (
    .d(f_c), .vdd_code(vdd_code_cf), .q(f_c_rep_cf)
  );
  delay_calibration #(.VDD_W(VDD_W), .WIN_LOG2(CAL_WIN_LOG2_CF), .STEP(CAL_STEP)) u_cal_cf (
    .clk_s(clk_cal), .rst_n, .f_in(f_c), .f_dly(f_c_rep_cf),
    .vdd_code(vdd_code_cf), .cmp_up(cal_up[CAL_CF]), .step_strobe(cal_step[CAL_CF])
  );

endmodule
