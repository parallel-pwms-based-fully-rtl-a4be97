// tb_8psk_workload: sends an 8PSK signal through the full transmitter at its
// default parameters, once in mode 1 (62.5 MHz carrier, CF-PWM) and once in
// mode 2 (781.25 MHz carrier, f_IF = f_C/15.4, IF-PWM), and measures the
// error vector magnitude (EVM) of what an ideal receiver would recover from
// the amplifier drive alone.
//
// The baseband is a random 8PSK symbol stream of radius 0.55 of full scale
// with three intermediate points on the straight line to the next symbol, so
// the envelope sweeps from 0 to 0.55 and the phase takes any value. Each
// point is held until the delay lines have settled, then the drive is
// measured:
//  * mode 1: over one carrier period, the pulse centre gives the phase
//    (90 degrees minus the centre's lag behind the carrier edge) and the
//    pulse duty d gives the filtered amplitude (2/pi) sin(pi d), which the
//    precorrection makes equal to A/A_std;
//  * mode 2: over 5 IF periods (exactly 77 carrier periods) the fraction of
//    time the drive is high, divided by the carrier's 0.5 duty, gives
//    A/A_std, and the most frequent lag of the drive's rising edges behind
//    the carrier's gives minus the phase.
// EVM = sqrt(sum |recovered - ideal|^2 / sum |ideal|^2) must not exceed 3 %,
// and each point's phase error must stay within 1.5 phase levels whenever
// its envelope is at least 0.1.
module tb_8psk_workload;
  timeunit 1ps; timeprecision 1fs;
  import ptx_pkg::*;

  localparam int  N  = 256, M = 128, L = 128;
  localparam real PI = 3.14159265358979323846;
  localparam real R  = 0.55;
  localparam int  SYMBOLS = 24;

  // ---------------- clocks (as in the end-to-end test) ----------------
  realtime cf_half = 15.625, if_half = 481.25;
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

  int checks = 0, failures = 0;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- receivers ----------------
  // Mode 1: one carrier period of the drive, sampled mid-unit from the carrier edge.
  task automatic rx_mode1(output real a_est, output real ph_est);
    logic fc_prev;
    logic got [4 * M];
    int s, w;
    fc_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) break;
      fc_prev = f_c;
    end
    for (int k = 0; k < 4 * M; k++) begin
      got[k] = pa_drive;
      @(negedge clk_cf_unit);
    end
    w = 0; s = 0;
    for (int k = 0; k < 4 * M; k++) begin
      if (got[k]) w++;
      if (got[k] && !got[(k + 4 * M - 1) % (4 * M)]) s = k;
    end
    a_est  = (2.0 / PI) * $sin(PI * real'(w) / real'(4 * M));
    // the pulse centre lags the carrier edge by 90 degrees minus the phase
    ph_est = -(real'(s) + real'(w) / 2.0 - real'(M)) / real'(4 * M) * 2.0 * PI;
  endtask

  // Mode 2: 5 IF periods = 77 carrier periods of the drive.
  task automatic rx_mode2(output real a_est, output real ph_est);
    logic fc_prev, pa_prev, fif_prev;
    int hist [4 * M];
    int u, hi, total, best;
    foreach (hist[k]) hist[k] = 0;
    // align to an IF rising edge
    fif_prev = 1;
    forever begin
      @(negedge clk_cf_unit);
      if (f_if && !fif_prev) break;
      fif_prev = f_if;
    end
    u = -1; hi = 0; total = 0;
    fc_prev = f_c; pa_prev = pa_drive;
    for (int k = 0; k < 77 * 4 * M; k++) begin
      @(negedge clk_cf_unit);
      if (f_c && !fc_prev) u = 0; else if (u >= 0) u++;
      if (pa_drive && !pa_prev && u >= 0) hist[u % (4 * M)]++;
      if (pa_drive) hi++;
      total++;
      fc_prev = f_c; pa_prev = pa_drive;
    end
    best = 0;
    foreach (hist[k]) if (hist[k] > hist[best]) best = k;
    a_est  = 2.0 * real'(hi) / real'(total);
    ph_est = -real'(best) / real'(4 * M) * 2.0 * PI;   // a lag is a negative phase
    if (hist[best] == 0) a_est = 0.0;
  endtask

  // ---------------- one pass of the signal ----------------
  task automatic run_signal(input int md, output real evm);
    real err2, ref2, ia, qa, ib, qb, i_id, q_id, a_id, a_est, ph_est, e_i, e_q, dph;
    int sym, nxt;
    err2 = 0; ref2 = 0;
    sym = $urandom_range(7);
    for (int k = 0; k < SYMBOLS; k++) begin
      nxt = $urandom_range(7);
      ia = R * $cos(sym * PI / 4.0); qa = R * $sin(sym * PI / 4.0);
      ib = R * $cos(nxt * PI / 4.0); qb = R * $sin(nxt * PI / 4.0);
      for (int t = 0; t < 4; t++) begin
        i_id = ia + (ib - ia) * t / 4.0;
        q_id = qa + (qb - qa) * t / 4.0;
        @(negedge clk_bb);
        i_in = IQ_W'(int'($floor(i_id * 2048.0 + 0.5)));
        q_in = IQ_W'(int'($floor(q_id * 2048.0 + 0.5)));
        in_valid = 1;
        repeat (20) @(negedge clk_bb);          // through the baseband pipeline
        if (md == 1) begin
          repeat (3 * 4 * M) @(negedge clk_cf_unit);  // flush the lines
          rx_mode1(a_est, ph_est);
        end else begin
          repeat (2 * 4 * M) @(negedge clk_cf_unit);
          rx_mode2(a_est, ph_est);
        end
        e_i = a_est * $cos(ph_est) - i_id;
        e_q = a_est * $sin(ph_est) - q_id;
        err2 += e_i * e_i + e_q * e_q;
        ref2 += i_id * i_id + q_id * q_id;
        a_id = $sqrt(i_id * i_id + q_id * q_id);
        if (a_id >= 0.1) begin
          dph = ph_est - $atan2(q_id, i_id);
          while (dph > PI) dph -= 2.0 * PI;
          while (dph < -PI) dph += 2.0 * PI;
          checks++;
          if (dph > 1.5 * 2.0 * PI / N || dph < -1.5 * 2.0 * PI / N) begin
            failures++;
            $display("mode %0d: phase error %f deg at envelope %f", md, dph * 180.0 / PI, a_id);
          end
        end
      end
      sym = nxt;
    end
    evm = $sqrt(err2 / ref2);
  endtask

  task automatic set_fc(input int f, input tx_mode_e want);
    fc_word = FC_W'(f);
    repeat (3) @(negedge clk_bb);
    checks++;
    if (mode != want) begin failures++; $display("mode %0d, expected %0d", mode, want); end
  endtask

  initial begin
    real evm1, evm2;
    #3000 rst_n = 1;
    set_fc(625, MODE_LOW_CF);
    run_signal(1, evm1);
    set_fc(7812, MODE_HIGH_CF);
    cf_half = 1.25;   // T_C = 1.28 ns
    if_half = 38.5;   // T_IF = 15.4 T_C
    run_signal(2, evm2);
    $display("8PSK EVM: mode 1 (CF-PWM) %f %%, mode 2 (IF-PWM) %f %%", 100.0 * evm1, 100.0 * evm2);
    checks++;
    if (evm1 > 0.03) begin failures++; $display("mode 1 EVM above 3 %%"); end
    checks++;
    if (evm2 > 0.03) begin failures++; $display("mode 2 EVM above 3 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
