// tb_if_pwm: runs the IF-PWM with L = 128 (one unit-delay clock per 1/(2L
// f_IF)) and, for a set of envelope levels Y, measures the pulse train: in
// every IF half period there must be exactly one pulse, starting at the IF
// edge and Y unit delays long (duty Y/L).
module tb_if_pwm;
  timeunit 1ns; timeprecision 1ps;

  localparam int L = 128;

  logic clk = 0, rst_n = 0, f_if = 0;
  logic [6:0] y = '0;
  logic env;
  int checks = 0, failures = 0;
  int cnt = 0;

  if_pwm dut (.clk_unit(clk), .rst_n, .f_if, .y, .env);

  always #5 clk = ~clk;

  // IF clock: 2L unit periods, high for the first L
  always @(posedge clk) begin
    cnt  <= (cnt == 2 * L - 1) ? 0 : cnt + 1;
    f_if <= (cnt < L - 1) || (cnt == 2 * L - 1);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv[10] = '{0, 1, 2, 17, 45, 64, 90, 100, 126, 127};
    int high_run, pulses, width_err;
    bit started;
    logic prev_if;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (lv[i]) begin
      y = 7'(lv[i]);
      repeat (4 * L) @(negedge clk);  // settle: the line holds old IF edges
      // measure 4 half periods, sampling env once per unit
      pulses = 0; width_err = 0; high_run = 0;
      prev_if = f_if;
      started = 0;
      for (int k = 0; k < 5 * L; k++) begin
        @(negedge clk);
        if (f_if != prev_if) begin  // an IF half period ended
          if (started) begin
            checks++;
            if (high_run != lv[i]) begin
              failures++;
              $display("Y=%0d: pulse of %0d units", lv[i], high_run);
            end
          end
          high_run = 0;
          started = 1;
          prev_if = f_if;
        end
        if (env) high_run++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
