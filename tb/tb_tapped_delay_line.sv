// tb_tapped_delay_line: drives a random bit stream through a 256-tap line
// and, for random tap choices, checks every output against the input
// history: q at a clock must equal d of 'sel' clocks earlier. It also checks
// that a new tap acts one unit clock after it is presented and that taps past
// the end select the last one (on a 129-tap line, as used for the M-stage
// CF-PWM line).
module tb_tapped_delay_line;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, d = 0;
  logic [7:0] sel = '0;
  logic q;
  logic [7:0] sel129;
  logic q129;
  int checks = 0, failures = 0;
  logic hist[$];

  tapped_delay_line #(.TAPS(256)) dut (.clk_unit(clk), .rst_n, .d, .sel, .q);
  tapped_delay_line #(.TAPS(129)) dut129 (.clk_unit(clk), .rst_n, .d, .sel(sel129), .q(q129));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of d as seen at each rising edge (newest first)
  always @(posedge clk) if (rst_n) begin
    hist.push_front(d);
    if (hist.size() > 300) void'(hist.pop_back());
  end

  initial begin
    int cur, cur129;
    sel129 = 8'd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill the line
    for (int k = 0; k < 300; k++) begin d = 1'($urandom); @(negedge clk); end
    for (int blk = 0; blk < 60; blk++) begin
      cur = $urandom_range(255);
      cur129 = $urandom_range(255);
      sel = 8'(cur);
      sel129 = 8'(cur129);
      @(negedge clk);  // tap adopted at this rising edge
      if (cur129 > 128) cur129 = 128;
      for (int k = 0; k < 20; k++) begin
        d = 1'($urandom);
        #1;
        // tap 0 is d itself; tap s is d from s rising edges ago
        checks++;
        if (q != ((cur == 0) ? d : hist[cur - 1])) begin
          failures++;
          if (failures < 10) $display("sel=%0d: q=%0b", cur, q);
        end
        checks++;
        if (q129 != ((cur129 == 0) ? d : hist[cur129 - 1])) begin
          failures++;
          if (failures < 10) $display("129-tap sel=%0d: q=%0b", cur129, q129);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
