// mid_puf_top: the complete MID PUF.
//
// A challenge (from the input port or from the on-chip LFSR challenge
// generator) is latched by the signal control unit, which then lets the clock
// into the delay lines of NUM_UNITS MID units, samples all their taps on one
// clock edge, and has the response generator compare the upper and lower
// snapshots with XOR gates and register a TAPS_PER_BLOCK*N_STAGES-bit
// response (64 bits at the defaults, with a 16-bit challenge).
//
// Interface: clk is the excitation and sampling clock (100 MHz in the
// described design, from an external signal generator or a PLL); a start
// pulse while busy is low begins one measurement. chal_src selects the LFSR
// (1) or chal_ext (0). seed_load loads the LFSR. resp_valid pulses for one
// cycle with resp and the challenge used, resp_chal; when chal_src is 1 the
// LFSR then steps so the next start uses a fresh challenge.
// Timing: if start is sampled on clock edge 0, the lines are sampled on edge
// FILL_CYCLES + 1 and resp_valid is high for the cycle after edge
// FILL_CYCLES + 2 (see mid_signal_ctrl). CHIP_SEED, NOMINAL_PS and SPREAD_PS
// only parameterise the delay model and stand for a particular chip.
// The challenge generator, signal control, MID units and response generation
// are the parts the described design names; how they hand over (start, busy,
// resp_valid, the chal_src select) is this design's own choice.
module mid_puf_top
  import mid_pkg::*;
#(
  parameter int unsigned N_STAGES    = N_STAGES_DEF,
  parameter int unsigned NUM_UNITS   = 1,
  parameter int unsigned FILL_CYCLES = 4,
  parameter int unsigned CHIP_SEED   = 1,
  parameter int unsigned NOMINAL_PS  = NOMINAL_PS_DEF,
  parameter int unsigned SPREAD_PS   = SPREAD_PS_DEF,
  localparam int unsigned RESP_W     = TAPS_PER_BLOCK * N_STAGES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                chal_src,
  input  logic [N_STAGES-1:0] chal_ext,
  input  logic                seed_load,
  input  logic [N_STAGES-1:0] seed,
  output logic                busy,
  output logic                resp_valid,
  output logic [RESP_W-1:0]   resp,
  output logic [N_STAGES-1:0] resp_chal
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES-1:0] lfsr_chal, chal_q;
  logic                exc, clr, en, load, done;
  logic [NUM_UNITS*RESP_W-1:0] q_up, q_lo;

  mid_challenge_gen #(.CHAL_W(N_STAGES)) u_chal_gen (
    .clk  (clk),
    .rst_n(rst_n),
    .load (seed_load),
    .seed (seed),
    .step (done && chal_src),
    .chal (lfsr_chal)
  );

  mid_signal_ctrl #(
    .CHAL_W     (N_STAGES),
    .FILL_CYCLES(FILL_CYCLES)
  ) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .chal_in(chal_src ? lfsr_chal : chal_ext),
    .chal_q (chal_q),
    .exc    (exc),
    .clr    (clr),
    .en     (en),
    .load   (load),
    .done   (done),
    .busy   (busy)
  );

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_unit
    mid_unit #(
      .N_STAGES  (N_STAGES),
      .CHIP_SEED (CHIP_SEED),
      .UNIT      (u),
      .NOMINAL_PS(NOMINAL_PS),
      .SPREAD_PS (SPREAD_PS)
    ) u_unit (
      .clk (clk),
      .exc (exc),
      .chal(chal_q),
      .clr (clr),
      .en  (en),
      .q_up(q_up[u*RESP_W +: RESP_W]),
      .q_lo(q_lo[u*RESP_W +: RESP_W])
    );
  end

  mid_response_gen #(
    .WIDTH    (RESP_W),
    .NUM_UNITS(NUM_UNITS)
  ) u_resp (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .q_up (q_up),
    .q_lo (q_lo),
    .resp (resp),
    .valid(resp_valid)
  );

  assign resp_chal = chal_q;

  // resp_valid is the cycle after load, which is the control unit's done.
  a_valid_done: assert property (@(posedge clk) disable iff (!rst_n) resp_valid == done);

endmodule
