// tb_replica_delay_line: measures the delay of the 64-cell replica chain at
// the two supply extremes and mid-range and compares it with K times the
// linearly interpolated cell delay (7.8 ps at 1.4 V, 3.9 ps at 2.2 V),
// within 0.1 ps (the model rounds the cell delay down to whole femtoseconds).
// A second chain with 4 inverter groups per cell must give 4 times the delay
// (within 0.4 ps).
module tb_replica_delay_line;
  timeunit 1ps; timeprecision 1fs;

  logic d = 0, q, q4;
  logic [9:0] vdd_code = '0;
  int checks = 0, failures = 0;

  replica_delay_line dut (.*);
  replica_delay_line #(.STAGES(4)) dut4 (.d, .vdd_code, .q(q4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[4] = '{0, 1023, 512, 300};
    realtime t0, t1, t4;
    real expect_ps;
    foreach (codes[i]) begin
      vdd_code = 10'(codes[i]);
      #3000;
      for (int e = 0; e < 2; e++) begin
        d = ~d;
        t0 = $realtime;
        @(q);
        t1 = $realtime;
        expect_ps = 64.0 * (7.8 - 3.9 * real'(codes[i]) / 1023.0);
        checks++;
        if ((t1 - t0) - expect_ps > 0.1 || expect_ps - (t1 - t0) > 0.1) begin
          failures++;
          $display("code %0d: delay %f ps, expected %f", codes[i], t1 - t0, expect_ps);
        end
        @(q4);            // the 4-group chain is always the slower one
        t4 = $realtime;
        checks++;
        if ((t4 - t0) - 4.0 * expect_ps > 0.4 || 4.0 * expect_ps - (t4 - t0) > 0.4) begin
          failures++;
          $display("code %0d, 4 groups: delay %f ps, expected %f", codes[i], t4 - t0, 4.0 * expect_ps);
        end
        #1000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
