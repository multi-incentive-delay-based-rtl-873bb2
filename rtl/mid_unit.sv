// mid_unit: one MID unit, the core delay element of the MID PUF.
//
// Two nominally identical delay lines (upper and lower), built from FCL
// blocks and reconfigured by the same challenge, carry the same excitation
// clock. Two banks of edge-sensitive registers, enabled by EN, sample every
// inverter output of both lines on one rising edge of clk. Because gate and
// net delays differ slightly between the lines, the in-flight edges sit at
// slightly different positions in the two snapshots; the response generator
// turns these differences into response bits with XOR gates.
//
// Interface: exc is the gated clock into both lines, chal the stage
// selection, clr/en control the capture registers (see mid_sampler), q_up and
// q_lo the sampled levels, 4*N_STAGES bits each. Timing: q_* change one clk
// edge after en. CHIP_SEED and UNIT only seed the timing model of the FCL
// blocks, standing in for one physical placement on one chip.
module mid_unit
  import mid_pkg::*;
#(
  parameter int unsigned N_STAGES   = N_STAGES_DEF,
  parameter int unsigned CHIP_SEED  = 1,
  parameter int unsigned UNIT       = 0,
  parameter int unsigned NOMINAL_PS = NOMINAL_PS_DEF,
  parameter int unsigned SPREAD_PS  = SPREAD_PS_DEF
) (
  input  logic                               clk,
  input  logic                               exc,
  input  logic [N_STAGES-1:0]                chal,
  input  logic                               clr,
  input  logic                               en,
  output logic [TAPS_PER_BLOCK*N_STAGES-1:0] q_up,
  output logic [TAPS_PER_BLOCK*N_STAGES-1:0] q_lo
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = TAPS_PER_BLOCK * N_STAGES;

  logic [W-1:0] taps_up, taps_lo;

  mid_delay_line #(
    .N_STAGES  (N_STAGES),
    .LINE_SEED (line_seed(CHIP_SEED, UNIT, 0)),
    .NOMINAL_PS(NOMINAL_PS),
    .SPREAD_PS (SPREAD_PS)
  ) u_line_up (
    .exc (exc),
    .chal(chal),
    .taps(taps_up)
  );

  mid_delay_line #(
    .N_STAGES  (N_STAGES),
    .LINE_SEED (line_seed(CHIP_SEED, UNIT, 1)),
    .NOMINAL_PS(NOMINAL_PS),
    .SPREAD_PS (SPREAD_PS)
  ) u_line_lo (
    .exc (exc),
    .chal(chal),
    .taps(taps_lo)
  );

  mid_sampler #(.WIDTH(W)) u_smp_up (
    .clk(clk), .clr(clr), .en(en), .d(taps_up), .q(q_up)
  );

  mid_sampler #(.WIDTH(W)) u_smp_lo (
    .clk(clk), .clr(clr), .en(en), .d(taps_lo), .q(q_lo)
  );

endmodule
