// band_select: chooses the transmitter mode from the carrier frequency word.
// The carrier range is split into a low band (up to 100 MHz, mode 1, CF-PWM)
// and a high band (from 80 MHz, mode 2, IF-PWM). The 20 MHz where the bands
// overlap is used as hysteresis: the mode changes to 2 only when f_C rises
// above 100 MHz and back to 1 only when it falls below 80 MHz, so a carrier
// that hovers near one boundary does not toggle the mode.
//
// The band limits are the published ones. Expressing f_C as a word in units
// of 100 kHz, registering the decision on clk, starting in mode 1 after
// reset and the mode_changed pulse are this implementation's choices.
module band_select
  import ptx_pkg::*;
#(
  parameter int unsigned W        = FC_W,
  parameter int unsigned LOW_MAX  = FC_LOW_MAX,   // 100 MHz
  parameter int unsigned HIGH_MIN = FC_HIGH_MIN   //  80 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [W-1:0] fc_word,      // carrier frequency, 100 kHz units
  output tx_mode_e   mode,
  output logic       mode_changed  // one-clock pulse on each switch
);
  timeunit 1ps; timeprecision 1ps;

  tx_mode_e mode_next;
  always_comb begin
    mode_next = mode;
    if (fc_word > W'(LOW_MAX))       mode_next = MODE_HIGH_CF;
    else if (fc_word < W'(HIGH_MIN)) mode_next = MODE_LOW_CF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_LOW_CF;
      mode_changed <= 1'b0;
    end else begin
      mode         <= mode_next;
      mode_changed <= (mode_next != mode);
    end
  end

  initial assert (HIGH_MIN < LOW_MAX)
    else $error("band_select: the bands must overlap");
endmodule
