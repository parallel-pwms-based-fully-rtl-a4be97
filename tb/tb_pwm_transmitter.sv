// tb_pwm_transmitter: end-to-end test of the transmitter at its default
// parameters (N = 256, M = L = 128). It sends constant baseband symbols and
// checks the pulse train that would drive the power amplifier against an
// independent floating-point model of the modulation:
//  * mode 1 (62.5 MHz carrier, CF-PWM): in every checked carrier period the
//    drive is one pulse of 2*Y_cf unit delays (1/(4M f_C)) starting
//    2*((N-X) mod N) + M - Y_cf units after the carrier edge (a phase X is a
//    lead of X phase units), i.e. centred on the
//    90-degree point of the phase-shifted carrier; X and Y_cf must be within
//    one level of round(phase*N/360) and of the arcsine precorrection;
//    an envelope above 2/pi of full scale must clip at Y_cf = M-1;
//  * mode 2 (781 MHz carrier, f_IF = f_C/15.4, IF-PWM): the phase-path
//    carrier lags the carrier by (N-X) mod N unit delays, each IF half period holds one
//    IF pulse of Y_if unit delays (1/(2L f_IF)), the drive equals carrier AND
//    IF pulse at every sample, and the fraction of carrier pulse time let
//    through is close to Y_if/L;
//  * band selection: a carrier in the 80..100 MHz overlap keeps the current
//    mode, and the mode switches both ways outside it;
//  * calibration: each of the three loops locks its replica to a quarter
//    period of its reference within 2.5 %, with both up and down steps: the
//    CF-PWM loop (128 cells) at the 62.5 MHz carrier of mode 1, the phase loop
//    (64 cells) and the IF loop (64 cells on f_IF) at the 781 MHz carrier of
//    mode 2.
// Each of these mechanisms is counted, and one that never happened is a
// failure.
module tb_pwm_transmitter;
  timeunit 1ps; timeprecision 1fs;
  import ptx_pkg::*;

  localparam int  N  = 256, M = 128, L = 128;
  localparam real PI = 3.14159265358979323846;

  // ---------------- clocks ----------------
  realtime cf_half = 15.625;   // half of the CF unit delay
  realtime if_half = 481.25;   // half of the IF unit delay
  logic clk_bb = 0, clk_cf_unit = 0, clk_ph_unit = 0, clk_if_unit = 0, clk_cal = 0;
  logic f_c = 0, f_if = 0;
  int ph_cnt = N - 1, if_cnt = 2 * L - 1;

  always #500 clk_bb = ~clk_bb;
  always #(cf_half) clk_cf_unit = ~clk_cf_unit;
  always @(posedge clk_cf_unit) clk_ph_unit <= ~clk_ph_unit;
  always @(posedge clk_ph_unit) begin
    ph_cnt <= (ph_cnt + 1) % N;
    f_c    <= ((ph_cnt + 1) % N) < N / 2;
  end
  always #(if_half) clk_if_unit = ~clk_if_unit;
  always @(posedge clk_if_unit) begin
    if_cnt <= (if_cnt + 1) % (2 * L);
    f_if   <= ((if_cnt + 1) % (2 * L)) < L;
  end
  always #(9.85) clk_cal = ~clk_cal;

  // ---------------- DUT ----------------
  logic rst_n = 0, in_valid = 0;
  logic signed [IQ_W-1:0] i_in = '0, q_in = '0;
  logic [FC_W-1:0] fc_word = 14'd625;
  logic pa_drive, mode_changed, env_valid, carrier_ph, if_env;
  logic [2:0] cal_up, cal_step;
  tx_mode_e mode;
  logic [7:0] phase_x;
  logic [6:0] env_y_if, env_y_cf;
  logic [9:0] vdd_code_ph, vdd_code_if, vdd_code_cf;

  pwm_transmitter dut (.*);

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_cf_pulses = 0, n_clip = 0, n_hold = 0, n_sw_up = 0, n_sw_down = 0;
  int n_and_pass = 0, n_and_block = 0, n_if_pulses = 0;
  int n_cal_up[3] = '{0, 0, 0}, n_cal_down[3] = '{0, 0, 0}, n_lock[3] = '{0, 0, 0};

  always @(posedge clk_cal) for (int g = 0; g < 3; g++) if (cal_step[g]) begin
    if (cal_up[g]) n_cal_up[g]++; else n_cal_down[g]++;
  end
  always @(posedge clk_bb) if (mode_changed) begin
    if (mode == MODE_HIGH_CF) n_sw_up++; else n_sw_down++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  initial begin
    #80000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int exp_x, exp_yif, exp_ycf;

  task automatic send_symbol(input real a_n, input real deg);
    real ii, qq, a, ph, u;
    ii = a_n * 2048.0 * $cos(deg * PI / 180.0);
    qq = a_n * 2048.0 * $sin(deg * PI / 180.0);
    if (ii > 2047.0) ii = 2047.0;
    if (qq > 2047.0) qq = 2047.0;
    @(negedge clk_bb);
    i_in = IQ_W'(int'($floor(ii + 0.5)));
    q_in = IQ_W'(int'($floor(qq + 0.5)));
    in_valid = 1;
    a  = $sqrt(real'(i_in) * real'(i_in) + real'(q_in) * real'(q_in)) / 2048.0;
    ph = $atan2(real'(q_in), real'(i_in)) / (2.0 * PI);
    if (ph < 0) ph += 1.0;
    exp_x   = int'($floor(ph * N + 0.5)) % N;
    exp_yif = int'($floor(a * L + 0.5));
    if (exp_yif > L - 1) exp_yif = L - 1;
    u = PI / 2.0 * a;
    if (u > 1.0) u = 1.0;
    exp_ycf = int'($floor(M * 2.0 / PI * $asin(u) + 0.5));
    if (exp_ycf > M - 1) exp_ycf = M - 1;
    repeat (20) @(negedge clk_bb);  // through CORDIC and quantizers
    checks++;
    if (!env_valid) fail("baseband results not valid");
    checks++;
    if (((int'(phase_x) - exp_x + N + N / 2) % N) - N / 2 > 1 ||
        ((int'(phase_x) - exp_x + N + N / 2) % N) - N / 2 < -1)
      fail($sformatf("X=%0d, model %0d", phase_x, exp_x));
    checks++;
    if (int'(env_y_if) - exp_yif > 1 || exp_yif - int'(env_y_if) > 1)
      fail($sformatf("Y_if=%0d, model %0d", env_y_if, exp_yif));
    checks++;
    if (int'(env_y_cf) - exp_ycf > 1 || exp_ycf - int'(env_y_cf) > 1)
      fail($sformatf("Y_cf=%0d, model %0d", env_y_cf, exp_ycf));
    if (exp_ycf == M - 1 && env_y_cf == 7'(M - 1) && a > 2.0 / PI) n_clip++;
  endtask

  task automatic set_fc(input int f, input tx_mode_e want, input bit hold);
    fc_word = FC_W'(f);
    repeat (3) @(negedge clk_bb);
    checks++;
    if (mode != want) fail($sformatf("fc=%0d: mode %0d, expected %0d", f, mode, want));
    else if (hold) n_hold++;
  endtask

  // ---------------- mode 1 measurement ----------------
  // Samples mid-unit; unit 0 is the first unit after a carrier rising edge.
  task automatic check_cf_periods(input int periods);
    logic fc_prev;
    int s, y, x;
    logic got [4 * M];
    y = int'(env_y_cf);
    x = int'(phase_x);
    s = (2 * ((N - x) % N) + M - y) % (4 * M);
    // align to a carrier rising edge
    fc_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) break;
      fc_prev = f_c;
    end
    // let the new taps flush through the lines (up to 2 carrier periods)
    repeat (2 * 4 * M) @(negedge clk_cf_unit);
    for (int p = 0; p < periods; p++) begin
      int bad;
      for (int k = 0; k < 4 * M; k++) begin
        got[k] = pa_drive;
        @(negedge clk_cf_unit);
      end
      bad = 0;
      for (int k = 0; k < 4 * M; k++) begin
        logic want;
        want = ((k - s + 4 * M) % (4 * M)) < 2 * y;
        if (got[k] != want) bad++;
      end
      checks++;
      if (bad != 0) fail($sformatf("mode 1: %0d units differ (X=%0d Y=%0d)", bad, x, y));
      else if (y > 0) n_cf_pulses++;
    end
  endtask

  // ---------------- mode 2 measurement ----------------
  task automatic check_if_mode(input int if_periods);
    logic fc_prev, cph_prev, fif_prev;
    int k, run, x, y;
    real pa_time, car_time;
    x = int'(phase_x);
    y = int'(env_y_if);
    // carrier lag: first carrier_ph rise after an f_c rise, in CF units (2 per phase unit)
    fc_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) break;
      fc_prev = f_c;
    end
    k = 0;
    cph_prev = carrier_ph;
    while (!(carrier_ph && !cph_prev) && k < 4 * M) begin
      cph_prev = carrier_ph;
      @(negedge clk_cf_unit);
      k++;
    end
    checks++;
    if (k != 2 * ((N - x) % N))
      fail($sformatf("mode 2: carrier lag %0d CF units, expected %0d", k, 2 * ((N - x) % N)));
    // IF pulse widths and AND gate, over whole IF half periods
    fif_prev = f_if;
    @(negedge clk_if_unit);
    while (f_if == fif_prev) begin fif_prev = f_if; @(negedge clk_if_unit); end
    fork
      begin : if_widths
        logic fp;
        fp = f_if;
        run = 0;
        for (int h = 0; h < 2 * if_periods; ) begin
          if (if_env) run++;
          @(negedge clk_if_unit);
          if (f_if != fp) begin
            checks++;
            if (run != y) fail($sformatf("mode 2: IF pulse %0d units, expected %0d", run, y));
            else n_if_pulses++;
            run = 0;
            fp = f_if;
            h++;
          end
        end
      end
      begin : and_gate
        pa_time = 0; car_time = 0;
        for (int u = 0; u < 2 * if_periods * L * int'(if_half / cf_half); u++) begin
          @(negedge clk_cf_unit);
          if (pa_drive != (carrier_ph & if_env)) begin
            checks++;
            fail("mode 2: drive differs from carrier AND IF pulse");
          end
          if (carrier_ph && if_env) n_and_pass++;
          if (carrier_ph && !if_env) n_and_block++;
          if (carrier_ph) car_time += 1.0;
          if (pa_drive) pa_time += 1.0;
        end
      end
    join
    checks++;
    if (pa_time / car_time - real'(y) / L > 0.08 || real'(y) / L - pa_time / car_time > 0.08)
      fail($sformatf("mode 2: pulse density %f, expected %f", pa_time / car_time, real'(y) / L));
    else
      $display("mode 2: pulse density %f for Y/L = %f", pa_time / car_time, real'(y) / L);
  endtask

  // Mean replica delay over 30 updates of one loop against a quarter period.
  task automatic check_lock(input int g, input real target_ps);
    real sum, chain;
    int n;
    sum = 0; n = 0;
    for (int w = 0; w < 30; w++) begin
      @(posedge clk_cal iff cal_step[g]);
      case (g)
        CAL_PH:  chain = 64.0  * (7.8   - 3.9   * real'(vdd_code_ph) / 1023.0);
        CAL_IF:  chain = 64.0  * (120.3 - 60.2  * real'(vdd_code_if) / 1023.0);
        default: chain = 128.0 * (39.0  - 19.5  * real'(vdd_code_cf) / 1023.0);
      endcase
      sum += chain; n++;
    end
    checks++;
    if (sum / n - target_ps > 0.025 * target_ps || target_ps - sum / n > 0.025 * target_ps)
      fail($sformatf("calibration group %0d: mean replica delay %f ps, expected %f", g, sum / n, target_ps));
    else begin
      n_lock[g]++;
      $display("calibration group %0d locked: mean replica delay %f ps for %f", g, sum / n, target_ps);
    end
  endtask

  task automatic mode1_clocks();  // f_C = 62.5 MHz, f_IF = f_C/15.4
    cf_half = 15.625;   // unit 31.25 ps = 1/(4M f_C), T_C = 16 ns
    if_half = 481.25;   // unit 962.5 ps = 1/(2L f_IF), T_IF = 15.4 T_C
  endtask
  task automatic mode2_clocks();  // f_C = 781.25 MHz
    cf_half = 1.25;     // unit 2.5 ps, T_C = 1.28 ns
    if_half = 38.5;     // unit 77 ps, T_IF = 19.712 ns = 15.4 T_C
  endtask

  // ---------------- scenario ----------------
  initial begin
    mode1_clocks();
    #3000 rst_n = 1;
    // mode 1, CF-PWM
    set_fc(625, MODE_LOW_CF, 0);
    send_symbol(0.40, 100.0);
    check_cf_periods(4);
    repeat (60) @(posedge clk_cal iff cal_step[CAL_CF]);  // CF loop lock
    check_lock(CAL_CF, 4000.0);
    send_symbol(0.25, 300.0);
    check_cf_periods(3);
    send_symbol(0.80, 250.0);   // above 2/pi: precorrection clips
    check_cf_periods(3);
    set_fc(900, MODE_LOW_CF, 1);  // inside the overlap: stays in mode 1
    check_cf_periods(2);
    // mode 2, IF-PWM
    set_fc(7812, MODE_HIGH_CF, 0);
    mode2_clocks();
    send_symbol(0.50, 30.0);
    repeat (230) @(posedge clk_cal iff cal_step[CAL_IF]);  // IF and phase loops lock
    check_lock(CAL_PH, 320.0);
    check_lock(CAL_IF, 19712.0 / 4.0);
    check_if_mode(3);
    send_symbol(0.90, 200.0);
    check_if_mode(2);
    set_fc(850, MODE_HIGH_CF, 1);  // inside the overlap: stays in mode 2
    // back to mode 1
    set_fc(500, MODE_LOW_CF, 0);
    mode1_clocks();
    send_symbol(0.55, 170.0);
    check_cf_periods(3);

    checks++; if (n_cf_pulses == 0) fail("no CF-PWM pulse checked");
    checks++; if (n_clip == 0) fail("precorrection never clipped");
    checks++; if (n_hold < 2) fail("overlap hysteresis not exercised in both modes");
    checks++; if (n_sw_up == 0 || n_sw_down == 0) fail("mode did not switch both ways");
    checks++; if (n_and_pass == 0 || n_and_block == 0) fail("AND gate never passed and blocked");
    checks++; if (n_if_pulses == 0) fail("no IF pulse checked");
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_cal_up[g] == 0 || n_cal_down[g] == 0) fail($sformatf("calibration group %0d did not step both ways", g));
      checks++;
      if (n_lock[g] == 0) fail($sformatf("calibration group %0d never locked", g));
    end
    $display("mechanisms: cf_pulses=%0d clip=%0d hold=%0d switch_up=%0d switch_down=%0d and_pass=%0d and_block=%0d if_pulses=%0d",
             n_cf_pulses, n_clip, n_hold, n_sw_up, n_sw_down, n_and_pass, n_and_block, n_if_pulses);
    for (int g = 0; g < 3; g++)
      $display("calibration group %0d: up=%0d down=%0d locked=%0d", g, n_cal_up[g], n_cal_down[g], n_lock[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
