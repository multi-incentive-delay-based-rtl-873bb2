// mid_fcl_block: behavioural model of one FPGA fast-carry-logic block
// (a Spartan-6 CARRY4: four MUXCY carry multiplexers and four XOR gates)
// with its process-dependent delays.
//
// This is a behavioural model, not synthesizable logic: the delays that make
// a PUF work come from the silicon, so they are modelled with one transport
// delay per XOR output, D_PS[i] picoseconds, set per instance.
//
// Logic: the carry into bit 0 is CI | CYINIT; carry into bit i+1 is
// S[i] ? carry[i] : DI[i]; O[i] = S[i] ^ carry[i]; CO[i] = carry[i+1].
// With DI, CYINIT and CI all high every carry is 1, whatever S is, so each
// XOR sees a constant 1 on its upper input and O[i] = ~S[i]: four inverters.
// With them low the XORs are buffers. Chaining O[i] to S[i+1] outside the
// block gives four inverters end to end, which is how the delay lines use it.
// Treating CI and CYINIT as OR-ed (rather than the device's carry-in mux) is
// a simplification that changes nothing when both are tied high.
//
// Interface and timing: the ports are those of the device primitive; O[i]
// follows S[i] after D_PS[i] ps, CO has no delay. When blocks are chained
// O[i] -> S[i+1], Verilator reports a circular path through S; it treats the
// 4-bit port as one signal, and the loop does not exist bit by bit.
module mid_fcl_block #(
  parameter int unsigned D_PS [4] = '{400, 400, 400, 400}
) (
  input  logic       CI,
  input  logic       CYINIT,
  input  logic [3:0] DI,
  input  logic [3:0] S,
  output logic [3:0] O,
  output logic [3:0] CO
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [4:0] carry;

  assign carry[0] = CI | CYINIT;
  for (genvar i = 0; i < 4; i++) begin : g_mux
    assign carry[i+1] = S[i] ? carry[i] : DI[i];
  end

  assign CO = carry[4:1];

  // XOR outputs with per-element propagation delay.
  assign #(D_PS[0]) O[0] = S[0] ^ carry[0];
  assign #(D_PS[1]) O[1] = S[1] ^ carry[1];
  assign #(D_PS[2]) O[2] = S[2] ^ carry[2];
  assign #(D_PS[3]) O[3] = S[3] ^ carry[3];

endmodule
