// replica_delay_line: behavioural model (not synthesizable) of a chain of K
// supply-controlled inverter delay cells, the replica in the unit-delay
// calibration loop and the cell type of the published delay lines.
//
// The supply voltage is 1.4 V + vdd_code * 0.8 V / (2^VDD_W - 1), covering the
// published 1.4 .. 2.2 V range. The delay of one cell falls linearly from
// TAU_SLOW_FS at 1.4 V to TAU_FAST_FS at 2.2 V (in femtoseconds); the defaults
// are the published phase-path unit delays, 7.8 ps and 3.9 ps, with K = N/4 =
// 64 cells, so the chain spans a quarter period of carriers between 0.5 and
// 1 GHz. The linear delay-versus-supply law is a modelling choice: only the
// two end points are published. Both edges are delayed equally (transport
// delay); the delay in force when an edge enters is the one it gets.
module replica_delay_line #(
  parameter int unsigned K           = ptx_pkg::N_LEVELS / 4,
  parameter int unsigned VDD_W       = 10,
  parameter int unsigned TAU_SLOW_FS = 7800,
  parameter int unsigned TAU_FAST_FS = 3900,
  parameter int unsigned STAGES      = 1
) (
  input  logic             d,
  input  logic [VDD_W-1:0] vdd_code,
  output logic             q
);
  timeunit 1fs; timeprecision 1fs;

  localparam longint CODE_MAX = (64'd1 << VDD_W) - 1;

  longint tau_fs, chain_fs;

  always_comb begin
    tau_fs   = longint'(TAU_SLOW_FS)
             - ((longint'(TAU_SLOW_FS) - longint'(TAU_FAST_FS)) * longint'(vdd_code)) / CODE_MAX;
    chain_fs = longint'(K) * longint'(STAGES) * tau_fs;
  end

  initial q = 1'b0;
  always @(d) q <= #(chain_fs) d;
endmodule
