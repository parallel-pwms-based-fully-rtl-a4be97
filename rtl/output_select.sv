// output_select: the two mode switches and the AND gate of the transmitter.
// In mode 1 (low carrier band) the position-modulated carrier from the phase
// path goes to the CF-PWM, and the CF-PWM output drives the power amplifier.
// In mode 2 (high carrier band) the carrier goes to the AND gate, where the IF
// envelope pulse train gates it, and the AND output drives the amplifier.
//
// The switch positions and the AND follow the published block diagram. Holding
// the unused switch output low is this implementation's choice. The block is
// combinational.
module output_select
  import ptx_pkg::*;
(
  input  tx_mode_e mode,
  input  logic     carrier,      // from the phase-path delay line
  input  logic     if_env,       // IF-PWM output
  input  logic     cf_pwm_out,   // CF-PWM output
  output logic     cf_carrier,   // carrier into the CF-PWM (switch "1")
  output logic     pa_drive      // to the class-D power amplifier
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    cf_carrier = 1'b0;
    pa_drive   = 1'b0;
    unique case (mode)
      MODE_LOW_CF: begin
        cf_carrier = carrier;
        pa_drive   = cf_pwm_out;
      end
      MODE_HIGH_CF: begin
        pa_drive   = carrier & if_env;
      end
      default: ;
    endcase
  end
endmodule
