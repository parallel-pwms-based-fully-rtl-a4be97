// tb_two_tone_spectrum: measures the spectrum of the amplifier drive around
// the carrier for a two-tone baseband, in both modes, with the full
// transmitter at its default parameters.
//
// The baseband is I + jQ = a (e^{j2pi 2t/P} + e^{j2pi 3t/P}), two tones
// 2/P and 3/P above the carrier, whose envelope swings between 0 and 2a.
// The period P is a whole number of carrier periods (mode 1: 64 periods of
// 62.5 MHz; mode 2: 616 periods of 781.25 MHz = 40 IF periods at f_IF =
// f_C/15.4) and of baseband clocks, so after a settling period the drive is
// exactly periodic in P and a DFT over one P has no leakage. The drive is
// sampled once per CF unit (T_C/512) and the bins f_C + k/P, k = -8..8, are
// evaluated directly; an ideal band-pass filter would keep only these.
// Third-order intermodulation lands on k = 1 and 4, images on k = -2 and -3,
// carrier leakage on k = 0.
// Checks: each tone amplitude equals a (mode 1, eq. y = A/A_std after
// precorrection) or (2/pi) a (mode 2), within 0.5 dB; every bin with
// |k| <= 5 (carrier leak, images, third- and fifth-order products) is at
// least 40 dB below the tones, and the bins with |k| = 6..8 at least 30 dB.
// With a linear envelope mapping in place of the arcsine precorrection the
// CF-PWM third-order products at this level (a = 0.3, envelope peak 0.6)
// measure about -27 dBc and the tones are 0.8 dB low; with it the products
// are about -43 dBc. In mode 2 the products of the carrier's harmonics with
// the IF pulse train fall every f_IF/5 = 8/P from the carrier (f_C/f_IF =
// 15.4 = 77/5); the one at k = 8 is about -36 dBc, the rest below -43 dBc.
// The limits are this testbench's own choice; the published spectra
// (noise floor 60 dB below the carrier) include the shaping filter, band-pass
// filter and amplifier, which are not modelled here.
module tb_two_tone_spectrum;
  timeunit 1ps; timeprecision 1fs;
  import ptx_pkg::*;

  localparam int  N = 256, M = 128, L = 128, S = 4 * M;
  localparam real PI = 3.14159265358979323846;
  localparam real A1 = 0.3;
  localparam int  KMAX = 8;

  // ---------------- clocks ----------------
  realtime cf_half = 15.625, if_half = 481.25, bb_half = 500.0;
  logic clk_bb = 0, clk_cf_unit = 0, clk_ph_unit = 0, clk_if_unit = 0, clk_cal = 0;
  logic f_c = 0, f_if = 0;
  int ph_cnt = N - 1, if_cnt = 2 * L - 1;

  always #(bb_half) clk_bb = ~clk_bb;
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

  int checks = 0, failures = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- two-tone source, periodic in bb_per cycles ----------------
  int bb_per = 1024, bb_n = 0;
  always @(posedge clk_bb) begin
    real t;
    bb_n <= (bb_n + 1) % bb_per;
    t = real'(bb_n) / real'(bb_per);
    i_in <= IQ_W'(int'($floor(2048.0 * A1 * ($cos(2.0 * PI * 2.0 * t) + $cos(2.0 * PI * 3.0 * t)) + 0.5)));
    q_in <= IQ_W'(int'($floor(2048.0 * A1 * ($sin(2.0 * PI * 2.0 * t) + $sin(2.0 * PI * 3.0 * t)) + 0.5)));
    in_valid <= 1'b1;
  end

  // ---------------- DFT of the drive over one period ----------------
  // U carrier periods per baseband period; bin k sits at (U + k) cycles per
  // U*S samples, so its phase at sample n is exactly n(U+k) mod U*S.
  task automatic measure(input int md, input int u);
    real re [2*KMAX+1], im [2*KMAX+1], amp [2*KMAX+1];
    real tone, exp_amp, worst, db;
    logic fc_prev;
    longint ns, ph;
    int worst_k;
    foreach (re[j]) begin re[j] = 0.0; im[j] = 0.0; end
    ns = longint'(u) * S;
    fc_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) break;
      fc_prev = f_c;
    end
    for (longint n = 0; n < ns; n++) begin
      if (pa_drive) begin
        for (int j = 0; j <= 2 * KMAX; j++) begin
          ph = (n * (longint'(u) + longint'(j) - longint'(KMAX))) % ns;
          re[j] += $cos(2.0 * PI * real'(ph) / real'(ns));
          im[j] -= $sin(2.0 * PI * real'(ph) / real'(ns));
        end
      end
      @(negedge clk_cf_unit);
    end
    foreach (amp[j]) amp[j] = 2.0 * $sqrt(re[j] * re[j] + im[j] * im[j]) / real'(ns);
    exp_amp = (md == 1) ? A1 : (2.0 / PI) * A1;
    for (int j = KMAX + 2; j <= KMAX + 3; j++) begin
      db = 20.0 * $log10(amp[j] / exp_amp);
      checks++;
      if (db > 0.5 || db < -0.5) begin
        failures++;
        $display("mode %0d: tone at k=%0d is %f, expected %f", md, j - KMAX, amp[j], exp_amp);
      end
    end
    tone = (amp[KMAX + 2] + amp[KMAX + 3]) / 2.0;
    for (int j = 0; j <= 2 * KMAX; j++)
      $display("mode %0d: bin k=%0d  %0.1f dBc", md, j - KMAX, 20.0 * $log10(amp[j] / tone + 1.0e-12));
    // in band (|k| <= 5: carrier leak, images, 3rd and 5th order products)
    // limit -40 dBc; further out (|k| = 6..8) limit -30 dBc
    worst = 0.0; worst_k = 0;
    for (int j = 0; j <= 2 * KMAX; j++)
      if (j != KMAX + 2 && j != KMAX + 3 && amp[j] > worst) begin worst = amp[j]; worst_k = j - KMAX; end
    db = 20.0 * $log10(worst / tone + 1.0e-12);
    $display("mode %0d: tones %f %f (expected %f); IMD3 k=1 %0.1f dBc, k=4 %0.1f dBc; worst other bin k=%0d at %0.1f dBc",
             md, amp[KMAX + 2], amp[KMAX + 3], exp_amp,
             20.0 * $log10(amp[KMAX + 1] / tone + 1.0e-12), 20.0 * $log10(amp[KMAX + 4] / tone + 1.0e-12),
             worst_k, db);
    for (int j = 0; j <= 2 * KMAX; j++) begin
      real lim;
      if (j == KMAX + 2 || j == KMAX + 3) continue;
      lim = (j - KMAX <= 5 && j - KMAX >= -5) ? -40.0 : -30.0;
      db = 20.0 * $log10(amp[j] / tone + 1.0e-12);
      checks++;
      if (db > lim) begin
        failures++;
        $display("mode %0d: bin k=%0d at %0.1f dBc, limit %0.1f", md, j - KMAX, db, lim);
      end
    end
  endtask

  initial begin
    #3000 rst_n = 1;
    repeat (3) @(negedge clk_bb);
    checks++;
    if (mode != MODE_LOW_CF) begin failures++; $display("not in mode 1"); end
    #1100000;                       // settle for more than one baseband period
    measure(1, 64);

    // mode 2: T_C = 1.28 ns, T_IF = 15.4 T_C, baseband clock = T_C
    fc_word = 14'd7812;
    cf_half = 1.25;
    if_half = 38.5;
    bb_half = 640.0;
    bb_per  = 616;
    repeat (3) @(negedge clk_bb);
    checks++;
    if (mode != MODE_HIGH_CF) begin failures++; $display("not in mode 2"); end
    #900000;
    measure(2, 616);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
