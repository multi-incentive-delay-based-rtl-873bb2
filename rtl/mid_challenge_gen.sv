// mid_challenge_gen: challenge generation module of the MID PUF.
//
// A CHAL_W-bit Galois LFSR produces the challenges applied to the stage
// multiplexers of the delay lines. Each step shifts right and, when the bit
// shifted out is 1, XORs the feedback mask POLY into the register. The default
// mask 16'hB400 (x^16 + x^14 + x^13 + x^11 + 1) is maximal length, so the
// generator visits all 65,535 non-zero 16-bit challenges.
//
// Interface: load copies seed into the register (an all-zero seed, which
// would lock the LFSR, is replaced by 1); step advances it by one; load wins
// over step. chal is the register itself, valid the cycle after load or step.
// That the design has a challenge generator is from the described design; the
// LFSR, its polynomial and the seed handling are this design's choices.
module mid_challenge_gen
  import mid_pkg::*;
#(
  parameter int unsigned     CHAL_W = N_STAGES_DEF,
  parameter logic [CHAL_W-1:0] POLY = CHAL_W'(16'hB400)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [CHAL_W-1:0] seed,
  input  logic              step,
  output logic [CHAL_W-1:0] chal
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chal <= CHAL_W'(1);
    end else if (load) begin
      chal <= (seed == '0) ? CHAL_W'(1) : seed;
    end else if (step) begin
      chal <= (chal >> 1) ^ (chal[0] ? POLY : '0);
    end
  end

  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) chal != '0);

endmodule
