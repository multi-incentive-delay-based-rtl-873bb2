// mid_signal_ctrl: signal control unit of the MID PUF.
//
// It decides when the clock excites the delay lines and when the capture
// registers sample them. On start it latches the challenge (so the lines keep
// one configuration for the whole measurement), clears the capture registers,
// and opens a glitch-free clock gate so that clk itself becomes the
// excitation exc: a stream of rising and falling edges, several of which are
// in flight along the lines at once (multiple excitation). After FILL_CYCLES
// full excitation periods, long enough for the first edge to have crossed the
// whole line, EN is raised for one cycle so that every tap is sampled on the
// same clock edge; the next cycle asks the response generator to load, and the
// gate closes again so the lines rest between measurements.
//
// Timing from start seen high at edge 0: exc rises at edges 1..FILL_CYCLES+1,
// en is high between edges FILL_CYCLES and FILL_CYCLES+1 (so the sample is
// taken at edge FILL_CYCLES+1), load follows for one cycle, then done for one
// cycle (aligned with the response generator's valid). The gate enable is
// retimed on the falling edge of clk, so exc has no runt pulses.
// That the unit gates the clock into the chain and raises EN "at the
// appropriate time" is from the described design; the state sequence, the
// FILL_CYCLES count and the clear are this design's choices.
module mid_signal_ctrl
  import mid_pkg::*;
#(
  parameter int unsigned CHAL_W      = N_STAGES_DEF,
  parameter int unsigned FILL_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CHAL_W-1:0] chal_in,
  output logic [CHAL_W-1:0] chal_q,
  output logic              exc,
  output logic              clr,
  output logic              en,
  output logic              load,
  output logic              done,
  output logic              busy
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = (FILL_CYCLES > 1) ? $clog2(FILL_CYCLES) : 1;

  ctrl_state_t       state;
  logic [CW-1:0]     cnt;
  logic              run;
  logic              gate_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      cnt    <= '0;
      chal_q <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          chal_q <= chal_in;
          cnt    <= '0;
          state  <= ST_FILL;
        end
        ST_FILL: begin
          if (cnt == CW'(FILL_CYCLES - 1)) state <= ST_SAMPLE;
          else                             cnt   <= cnt + 1'b1;
        end
        ST_SAMPLE: state <= ST_LOAD;
        ST_LOAD:   state <= ST_DONE;
        ST_DONE:   state <= ST_IDLE;
        default:   state <= ST_IDLE;
      endcase
    end
  end

  assign run  = (state == ST_FILL) || (state == ST_SAMPLE);
  assign clr  = (state == ST_IDLE) && start;
  assign en   = (state == ST_SAMPLE);
  assign load = (state == ST_LOAD);
  assign done = (state == ST_DONE);
  assign busy = (state != ST_IDLE);

  // Clock gate: enable retimed on the falling edge, while clk is low.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= run;
  end

  assign exc = clk & gate_q;

  // The challenge must not change while the lines are excited.
  property p_chal_stable;
    @(posedge clk) disable iff (!rst_n) (run && $past(run)) |-> $stable(chal_q);
  endproperty
  a_chal_stable: assert property (p_chal_stable);

endmodule
