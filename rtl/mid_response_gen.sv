// mid_response_gen: response generation of the MID PUF.
//
// First an XOR per tap discriminates whether the upper and lower lines held
// the same level at the sampling edge: where one line's edge has passed a tap
// and the other's has not, the bit is 1. With several MID units the
// per-unit comparison vectors are then folded by a second XOR layer, bit by
// bit, which pulls the zero-heavy comparison bits towards a balanced response.
// The result is registered when load is high, and valid pulses for one cycle
// with it.
//
// Interface: q_up/q_lo hold the sampled levels of all units, unit u in bits
// [u*WIDTH +: WIDTH]. Timing: resp and valid appear one clk edge after load.
// Invalid data (levels taken before the excitation has filled the lines, which
// are equal in both lines and so compare as zero) never reach the response,
// because load is raised only after a sample taken with the lines filled.
// The XOR comparison follows the described design; the folding across units
// and the load/valid handshake are this design's choices.
module mid_response_gen #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned NUM_UNITS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic [NUM_UNITS*WIDTH-1:0] q_up,
  input  logic [NUM_UNITS*WIDTH-1:0] q_lo,
  output logic [WIDTH-1:0]           resp,
  output logic                       valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] folded;

  always_comb begin
    folded = '0;
    for (int u = 0; u < int'(NUM_UNITS); u++) begin
      folded ^= q_up[u*WIDTH +: WIDTH] ^ q_lo[u*WIDTH +: WIDTH];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) resp <= folded;
    end
  end

endmodule
