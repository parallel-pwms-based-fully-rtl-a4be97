// tb_output_select: exhaustive check of the mode switches and the AND gate
// for both modes and every input combination, against the switch table of
// the block diagram.
module tb_output_select;
  timeunit 1ns; timeprecision 1ps;
  import ptx_pkg::*;

  tx_mode_e mode;
  logic carrier, if_env, cf_pwm_out, cf_carrier, pa_drive;
  int checks = 0, failures = 0;

  output_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_pa, exp_cf;
    for (int m = 1; m <= 2; m++) begin
      for (int v = 0; v < 8; v++) begin
        mode = tx_mode_e'(m);
        {carrier, if_env, cf_pwm_out} = 3'(v);
        #1;
        exp_cf = (m == 1) ? carrier : 1'b0;
        exp_pa = (m == 1) ? cf_pwm_out : (carrier && if_env);
        checks++;
        if (pa_drive !== exp_pa || cf_carrier !== exp_cf) begin
          failures++;
          $display("mode %0d in %b: pa=%b cf=%b", m, v[2:0], pa_drive, cf_carrier);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
