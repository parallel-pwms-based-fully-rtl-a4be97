// tapped_delay_line: a delay line with TAPS selectable lags of 0 .. TAPS-1
// unit delays, the building block of the N-stage phase line, the L-stage IF
// line and the M- and 2M-stage CF-PWM lines. Tap 0 is the input itself and
// tap k follows k delay cells, as in the published N-stage line (cells 1 to
// N-1 and a multiplexer). The selected tap sets the rising-edge lag of the
// clock that passes through.
//
// How it works: each delay cell is a D flip-flop clocked by clk_unit, whose
// period is the unit delay (1/(N f_C), 1/(2L f_IF) or 1/(4M f_C)). This is the
// flip-flop form of delay cell that suits large unit delays. The published
// chip uses supply-controlled inverter cells for small unit delays, tuned by
// the calibration loop; that form is modelled separately for the loop itself.
// The input must be synchronous to clk_unit (for instance a clock derived
// from it).
//
// Timing: 'sel' is registered on clk_unit and takes effect one unit later; a
// tap above TAPS-1 selects the last tap. The output is a multiplexer on the
// chain, so tap 0 passes the input combinationally.
module tapped_delay_line #(
  parameter int unsigned TAPS  = ptx_pkg::N_LEVELS,
  localparam int unsigned SEL_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic             clk_unit,
  input  logic             rst_n,
  input  logic             d,
  input  logic [SEL_W-1:0] sel,
  output logic             q
);
  timeunit 1ps; timeprecision 1ps;

  logic [TAPS-1:0]  taps;
  logic [SEL_W-1:0] sel_q;

  assign taps[0] = d;

  if (TAPS > 1) begin : g_cells
    logic [TAPS-1:1] cells;
    always_ff @(posedge clk_unit or negedge rst_n) begin
      if (!rst_n) cells <= '0;
      else        cells <= {cells[TAPS-2:1], d};
    end
    assign taps[TAPS-1:1] = cells;
  end

  always_ff @(posedge clk_unit or negedge rst_n) begin
    if (!rst_n)                       sel_q <= '0;
    else if (sel > SEL_W'(TAPS - 1))  sel_q <= SEL_W'(TAPS - 1);
    else                              sel_q <= sel;
  end

  assign q = taps[sel_q];
endmodule
