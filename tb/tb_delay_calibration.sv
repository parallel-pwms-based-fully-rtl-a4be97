// tb_delay_calibration: closes the unit-delay calibration loop around the
// 64-cell replica model and checks that it locks: for a 1.28 ns reference
// (target unit delay 5 ps) and then a 1.8 ns reference (7.03 ps), the replica
// delay must settle within 8 ps of a quarter period, the supply code must
// move in the right direction, and both up and down steps must occur (the
// loop dithers around lock). The comparator decision of each window is also
// checked against an independent count of the sampled XOR.
// A second loop runs alongside with 8 inverter groups per replica cell on a
// 10.24 ns reference (a carrier 8 times lower): it must lock its replica to
// 2.56 ns within 64 ps, showing how lower carriers are covered.
module tb_delay_calibration;
  timeunit 1ps; timeprecision 1fs;

  localparam int WIN = 1024;

  logic clk_s = 0, rst_n = 0, f_in = 0, f_dly;
  logic [9:0] vdd_code;
  logic cmp_up, step_strobe;
  int checks = 0, failures = 0, ups = 0, downs = 0;
  realtime t_ref = 1280.0;

  replica_delay_line u_rep (.d(f_in), .vdd_code, .q(f_dly));
  delay_calibration dut (.*);

  // slow group: 8 inverter groups per cell, reference 8x slower
  logic f_in8 = 0, f_dly8, cmp_up8, step_strobe8;
  logic [9:0] vdd_code8;
  replica_delay_line #(.STAGES(8)) u_rep8 (.d(f_in8), .vdd_code(vdd_code8), .q(f_dly8));
  delay_calibration dut8 (
    .clk_s, .rst_n, .f_in(f_in8), .f_dly(f_dly8),
    .vdd_code(vdd_code8), .cmp_up(cmp_up8), .step_strobe(step_strobe8)
  );
  always #(5120.0) f_in8 = ~f_in8;

  always #(9.85) clk_s = ~clk_s;   // 19.7 ps sampling, incommensurate with f_in
  always #(t_ref / 2.0) f_in = ~f_in;

  always @(posedge clk_s) if (step_strobe) begin
    if (cmp_up) ups++; else downs++;
  end

  // independent detector model: count sampled XOR (after the same 2-flop delay)
  logic [1:0] r_s, d_s;
  int hi_cnt = 0, smp = 0;
  always @(posedge clk_s) if (rst_n) begin
    r_s <= {r_s[0], f_in};
    d_s <= {d_s[0], f_dly};
  end
  always @(posedge clk_s) begin
    if (!rst_n) begin hi_cnt <= 0; smp <= 0; end
    else begin
      if (smp == WIN - 1) begin
        int tot;
        tot = hi_cnt + int'(r_s[1] ^ d_s[1]);
        hi_cnt <= 0; smp <= 0;
        @(negedge clk_s);
        checks++;
        if (!step_strobe || cmp_up != (tot > WIN / 2)) begin
          failures++;
          $display("window decision %0b, expected %0b (count %0d)", cmp_up, tot > WIN / 2, tot);
        end
      end else begin
        hi_cnt <= hi_cnt + int'(r_s[1] ^ d_s[1]);
        smp <= smp + 1;
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lock(input realtime period);
    real chain_ps, sum;
    int n;
    sum = 0; n = 0;
    for (int w = 0; w < 40; w++) begin
      @(posedge step_strobe);
      chain_ps = 64.0 * (7.8 - 3.9 * real'(vdd_code) / 1023.0);
      sum += chain_ps; n++;
    end
    checks++;
    if (sum / n - period / 4.0 > 8.0 || period / 4.0 - sum / n > 8.0) begin
      failures++;
      $display("no lock at %f ps: mean replica delay %f ps", period, sum / n);
    end else
      $display("locked at %f ps: mean replica delay %f ps, code %0d", period, sum / n, vdd_code);
  endtask

  initial begin
    int code_a;
    r_s = '0; d_s = '0;
    #100 rst_n = 1;
    // 1.28 ns: target 320 ps, start at mid supply (374 ps): supply must rise
    repeat (150) @(posedge step_strobe);
    code_a = int'(vdd_code);
    checks++;
    if (code_a <= 512) begin failures++; $display("supply did not rise: %0d", code_a); end
    check_lock(1280.0);
    // 1.8 ns: target 450 ps: supply must fall
    t_ref = 1800.0;
    repeat (250) @(posedge step_strobe);
    checks++;
    if (int'(vdd_code) >= code_a) begin failures++; $display("supply did not fall"); end
    check_lock(1800.0);
    begin
      real sum8;
      sum8 = 0;
      for (int w = 0; w < 40; w++) begin
        @(posedge step_strobe8);
        sum8 += 8.0 * 64.0 * (7.8 - 3.9 * real'(vdd_code8) / 1023.0);
      end
      checks++;
      if (sum8 / 40.0 - 2560.0 > 64.0 || 2560.0 - sum8 / 40.0 > 64.0) begin
        failures++;
        $display("8-group loop: no lock, mean replica delay %f ps", sum8 / 40.0);
      end else
        $display("8-group loop locked: mean replica delay %f ps, code %0d", sum8 / 40.0, vdd_code8);
    end
    checks++;
    if (ups < 10 || downs < 10) begin failures++; $display("ups %0d downs %0d", ups, downs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
