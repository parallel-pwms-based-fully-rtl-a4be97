// tb_low_carrier: runs the full transmitter at the bottom of its carrier
// range, f_C = 2 MHz in mode 1 (CF-PWM), with the delay-cell groups widened
// as the published design does for low carriers: more matched inverter
// groups per cell (32 per CF-PWM cell, 320 per phase-path cell), so that the
// unit delays 1/(4M f_C) = 976.6 ps and 1/(N f_C) = 1953 ps fall inside the
// cells' 1.4-2.2 V tuning range. Sizes N, M, L are the defaults.
//
// Checks:
//  * the frequency word 20 (2 MHz) selects mode 1;
//  * for two symbols, every CF unit of two carrier periods of the drive
//    matches the expected pulse: 2*Y_cf units starting 2*((N-X) mod N) + M -
//    Y_cf units after the carrier edge (X, Y_cf read from the top's outputs,
//    which the block tests verify);
//  * the phase-path and CF-PWM calibration loops lock their replicas to a
//    quarter of the measured carrier period within 2.5 %, averaged over 40
//    windows.
// The calibration sampling clock is 97.3 ps and the windows 2^15 samples
// (3.2 us, about 6 carrier periods); both are this test's choices.
module tb_low_carrier;
  timeunit 1ps; timeprecision 1fs;
  import ptx_pkg::*;

  localparam int  N = 256, M = 128, L = 128;
  localparam real PI = 3.14159265358979323846;
  localparam int  ST_PH = 320, ST_CF = 32;

  // ---------------- clocks: f_C = 2 MHz ----------------
  logic clk_bb = 0, clk_cf_unit = 0, clk_ph_unit = 0, clk_if_unit = 0, clk_cal = 0;
  logic f_c = 0, f_if = 0;
  int ph_cnt = N - 1, if_cnt = 2 * L - 1;

  always #500 clk_bb = ~clk_bb;
  always #(488.28125) clk_cf_unit = ~clk_cf_unit;   // 4M f_C = 1.024 GHz
  always @(posedge clk_cf_unit) clk_ph_unit <= ~clk_ph_unit;
  always @(posedge clk_ph_unit) begin
    ph_cnt <= (ph_cnt + 1) % N;
    f_c    <= ((ph_cnt + 1) % N) < N / 2;
  end
  always #(15035.15625) clk_if_unit = ~clk_if_unit; // 2L f_IF, f_IF = f_C/15.4
  always @(posedge clk_if_unit) begin
    if_cnt <= (if_cnt + 1) % (2 * L);
    f_if   <= ((if_cnt + 1) % (2 * L)) < L;
  end
  always #(48.65) clk_cal = ~clk_cal;

  // ---------------- DUT ----------------
  logic rst_n = 0, in_valid = 0;
  logic signed [IQ_W-1:0] i_in = '0, q_in = '0;
  logic [FC_W-1:0] fc_word = 14'd20;
  logic pa_drive, mode_changed, env_valid, carrier_ph, if_env;
  logic [2:0] cal_up, cal_step;
  tx_mode_e mode;
  logic [7:0] phase_x;
  logic [6:0] env_y_if, env_y_cf;
  logic [9:0] vdd_code_ph, vdd_code_if, vdd_code_cf;

  pwm_transmitter #(
    .CAL_WIN_LOG2_PH(15), .CAL_WIN_LOG2_CF(15),
    .CAL_STAGES_PH(ST_PH), .CAL_STAGES_CF(ST_CF)
  ) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CF-PWM pulse check ----------------
  task automatic send(input real a, input real deg);
    @(negedge clk_bb);
    i_in = IQ_W'(int'($floor(2048.0 * a * $cos(deg * PI / 180.0) + 0.5)));
    q_in = IQ_W'(int'($floor(2048.0 * a * $sin(deg * PI / 180.0) + 0.5)));
    in_valid = 1;
    repeat (20) @(negedge clk_bb);
  endtask

  task automatic check_cf_periods(input int periods);
    logic fc_prev;
    logic got [4 * M];
    int s, y, x, bad;
    y = int'(env_y_cf);
    x = int'(phase_x);
    s = (2 * ((N - x) % N) + M - y) % (4 * M);
    fc_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) break;
      fc_prev = f_c;
    end
    repeat (2 * 4 * M) @(negedge clk_cf_unit);   // flush the lines
    for (int p = 0; p < periods; p++) begin
      for (int k = 0; k < 4 * M; k++) begin
        got[k] = pa_drive;
        @(negedge clk_cf_unit);
      end
      bad = 0;
      for (int k = 0; k < 4 * M; k++)
        if (got[k] != (((k - s + 4 * M) % (4 * M)) < 2 * y)) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("2 MHz: %0d units differ (X=%0d Y=%0d)", bad, x, y);
      end
    end
  endtask

  // ---------------- calibration lock ----------------
  task automatic check_lock(input int g, input real target_ps);
    real sum, chain;
    sum = 0;
    for (int w = 0; w < 40; w++) begin
      @(posedge clk_cal iff cal_step[g]);
      if (g == CAL_PH) chain = 64.0 * ST_PH * (7.8 - 3.9 * real'(vdd_code_ph) / 1023.0);
      else             chain = 128.0 * ST_CF * (39.0 - 19.5 * real'(vdd_code_cf) / 1023.0);
      sum += chain;
    end
    checks++;
    if (sum / 40.0 > 1.025 * target_ps || sum / 40.0 < 0.975 * target_ps) begin
      failures++;
      $display("group %0d: mean replica delay %f ps, target %f", g, sum / 40.0, target_ps);
    end else
      $display("group %0d locked: mean replica delay %f ps, target %f", g, sum / 40.0, target_ps);
  endtask

  initial begin
    realtime t0, t_c;
    #3000 rst_n = 1;
    repeat (3) @(negedge clk_bb);
    checks++;
    if (mode != MODE_LOW_CF) begin failures++; $display("2 MHz did not select mode 1"); end
    // measured carrier period
    @(posedge f_c) t0 = $realtime;
    @(posedge f_c) t_c = $realtime - t0;
    send(0.3, 100.0);
    check_cf_periods(2);
    send(0.6, 250.0);
    check_cf_periods(2);
    // loops: about 20 windows to reach lock from mid supply, then measure
    repeat (30) @(posedge clk_cal iff cal_step[CAL_CF]);
    fork
      check_lock(CAL_PH, t_c / 4.0);
      check_lock(CAL_CF, t_c / 4.0);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
