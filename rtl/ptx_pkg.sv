// ptx_pkg: shared constants and types of the parallel-PWM polar transmitter.
//
// The quantization levels follow the published design: 256 phase levels (N)
// and 128 envelope levels (M for the carrier-frequency PWM, L for the
// intermediate-frequency PWM). Word widths of the baseband datapath
// (I/Q, envelope, phase) and the frequency word of the band selector are
// this implementation's own choices.
package ptx_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Quantization levels.
  localparam int unsigned N_LEVELS = 256;  // phase path, N-stage delay line
  localparam int unsigned M_LEVELS = 128;  // CF-PWM envelope, M/2M-stage lines
  localparam int unsigned L_LEVELS = 128;  // IF-PWM envelope, L-stage line

  // Baseband word widths.
  localparam int unsigned IQ_W  = 12;  // signed I and Q
  localparam int unsigned AMP_W = 12;  // unsigned envelope A (full scale = A_std)
  localparam int unsigned PH_W  = 16;  // phase, 2^PH_W = 360 degrees

  // Carrier-frequency word: units of 100 kHz (1 GHz = 10000).
  localparam int unsigned FC_W = 14;
  localparam int unsigned FC_LOW_MAX  = 1000;  // 100 MHz: top of the low band
  localparam int unsigned FC_HIGH_MIN = 800;   //  80 MHz: bottom of the high band

  // Transmitter mode, numbered as in the switch labels "1" and "2".
  typedef enum logic [1:0] {
    MODE_LOW_CF  = 2'd1,  // CF-PWM enabled, low carrier band
    MODE_HIGH_CF = 2'd2   // IF-PWM enabled, high carrier band
  } tx_mode_e;

  // Groups of delay lines, each with its own calibration loop.
  localparam int unsigned CAL_GROUPS = 3;
  typedef enum int unsigned {
    CAL_PH = 0,  // phase path, K = N/4 cells on f_C
    CAL_IF = 1,  // IF-PWM, K = L/2 cells on f_IF
    CAL_CF = 2   // CF-PWM, K = M cells on f_C
  } cal_group_e;

endpackage
