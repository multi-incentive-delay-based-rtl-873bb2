// mid_sampler: edge-sensitive capture registers for one delay line.
//
// One flip-flop per tap samples the level on the line at the rising edge of
// clk when en is high; a synchronous clr (higher priority) zeroes the bank so
// that a response never carries levels left from an earlier challenge.
// Because the line carries the same clock it is sampled with, each sample is a
// snapshot of where the in-flight clock edges are along the line.
//
// Timing: q changes one clk edge after en (or clr) is seen high. The enable
// and the capture at the clock edge follow the described design; the clear is
// this design's choice.
module mid_sampler #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (clr)     q <= '0;
    else if (en) q <= d;
  end

endmodule
