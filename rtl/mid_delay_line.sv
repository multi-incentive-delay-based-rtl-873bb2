// mid_delay_line: one reconfigurable MID delay line.
//
// The line is N_STAGES stages long. Each stage holds two parallel FCL blocks,
// both fed by the stage input and both configured as four chained inverters
// (DI, CYINIT and CI tied high, O[i] wired to S[i+1]). A 2:1 multiplexer per
// stage, steered by one challenge bit, picks which of the two blocks drives
// the next stage and the stage's four taps. The challenge thus reconfigures
// the path; the upper and lower lines of a MID unit get the same challenge so
// both change at once.
//
// Interface: exc is the excitation (the gated clock); chal[s] selects block 1
// (1) or block 0 (0) of stage s; taps[4*s+i] is the output of inverter i of
// stage s, taps[0] being nearest the input. The line is purely combinational
// apart from the modelled element delays. Tap k carries exc inverted k+1 times
// and delayed by the sum of the selected element delays up to it.
//
// Each FCL block's four delays come from mid_pkg::element_delay_ps with seed
// LINE_SEED and the element's index, so two lines with different seeds model
// two physically different but nominally identical lines. The multiplexers
// are modelled without delay (this design's choice: their delay is common to
// both alternatives of a stage in the timing model).
//
// The FCL instances and tap nets carry keep/dont_touch attributes: the upper
// and lower lines are logically identical, and a synthesis tool that is free
// to merge them would remove the whole PUF. On an FPGA they must also be
// placed by hand, side by side, so that both lines see the same routing.
// Lint tools report a combinational loop through each FCL block's S port;
// it is a false loop seen at vector granularity (O[i] feeds S[i+1], never
// S[i]), which is how the carry block is chained in the device.
module mid_delay_line
  import mid_pkg::*;
#(
  parameter int unsigned N_STAGES   = N_STAGES_DEF,
  parameter int unsigned LINE_SEED  = 1,
  parameter int unsigned NOMINAL_PS = NOMINAL_PS_DEF,
  parameter int unsigned SPREAD_PS  = SPREAD_PS_DEF
) (
  input  logic                                 exc,
  input  logic [N_STAGES-1:0]                  chal,
  output logic [TAPS_PER_BLOCK*N_STAGES-1:0]   taps
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES-1:0] stage_in;
  assign stage_in[0] = exc;

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    (* keep = "true" *) logic [3:0] o_alt [2];

    for (genvar a = 0; a < 2; a++) begin : g_alt
      localparam int unsigned D_PS [4] = '{
        element_delay_ps(LINE_SEED, element_index(s, a, 0), NOMINAL_PS, SPREAD_PS),
        element_delay_ps(LINE_SEED, element_index(s, a, 1), NOMINAL_PS, SPREAD_PS),
        element_delay_ps(LINE_SEED, element_index(s, a, 2), NOMINAL_PS, SPREAD_PS),
        element_delay_ps(LINE_SEED, element_index(s, a, 3), NOMINAL_PS, SPREAD_PS)
      };
      logic [3:0] co_unused;

      // Four inverters end to end: O[i] drives S[i+1] outside the block.
      (* dont_touch = "true" *)
      mid_fcl_block #(.D_PS(D_PS)) u_fcl (
        .CI     (1'b1),
        .CYINIT (1'b1),
        .DI     (4'hF),
        .S      ({o_alt[a][2:0], stage_in[s]}),
        .O      (o_alt[a]),
        .CO     (co_unused)
      );
    end

    // Challenge-driven stage multiplexer.
    logic [3:0] o_sel;
    assign o_sel = chal[s] ? o_alt[1] : o_alt[0];
    assign taps[TAPS_PER_BLOCK*s +: TAPS_PER_BLOCK] = o_sel;
    if (s + 1 < N_STAGES) begin : g_next
      assign stage_in[s+1] = o_sel[3];
    end
  end

endmodule
