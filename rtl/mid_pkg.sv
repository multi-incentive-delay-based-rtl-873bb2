// mid_pkg: constants and helpers shared by the MID PUF modules.
//
// The MID PUF races a clock through two nominally identical inverter chains
// built from FPGA fast-carry-logic (FCL) blocks. Each FCL block provides four
// XOR gates; with their upper inputs held high they act as four inverters, so
// a chain of N_STAGES blocks has 4*N_STAGES taps. Each stage is reconfigurable:
// a challenge bit selects one of two parallel FCL blocks.
//
// The defaults follow the described design: four inverters per FCL block,
// sixteen FCL stages per line, giving a 64-bit response, and a 100 MHz
// excitation clock. The delay figures (nominal inverter-plus-route delay and
// its spread) exist only for the timing model of the FCL block; they are this
// design's own choice, picked so that several clock edges are in flight in
// the 64-tap line at 100 MHz, which is the point of multiple excitation.
package mid_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Inverters (XOR gates) per FCL block.
  localparam int unsigned TAPS_PER_BLOCK = 4;
  // FCL stages per delay line; one challenge bit per stage.
  localparam int unsigned N_STAGES_DEF   = 16;
  // Timing model: nominal XOR-plus-route delay per inverter, and the full
  // width of its uniform spread across instances (process variation).
  localparam int unsigned NOMINAL_PS_DEF = 400;
  localparam int unsigned SPREAD_PS_DEF  = 200;

  // Per-element delay of the timing model. A 32-bit integer hash of the
  // instance seed and the element index is mapped onto
  // [nominal - spread/2, nominal - spread/2 + spread]:
  //   h  = seed*0x9E3779B1 ^ idx*0x85EBCA77
  //   h ^= h >> 15; h *= 0xC2B2AE3D; h ^= h >> 13
  //   d  = nominal - spread/2 + (h mod (spread+1))
  function automatic int unsigned element_delay_ps(int unsigned seed,
                                                   int unsigned idx,
                                                   int unsigned nominal,
                                                   int unsigned spread);
    logic [31:0] h;
    h = (seed * 32'h9E3779B1) ^ (idx * 32'h85EBCA77);
    h = h ^ (h >> 15);
    h = h * 32'hC2B2AE3D;
    h = h ^ (h >> 13);
    return nominal - spread / 2 + (h % (spread + 1));
  endfunction

  // Seed of one delay line: chip seed, MID unit index, and 0 for the upper
  // line or 1 for the lower line.
  function automatic int unsigned line_seed(int unsigned chip_seed,
                                            int unsigned unit,
                                            int unsigned lower);
    return chip_seed * 1024 + unit * 2 + lower;
  endfunction

  // Index of one inverter inside a line: stage, alternative (0/1), bit.
  function automatic int unsigned element_index(int unsigned stage,
                                                int unsigned alt,
                                                int unsigned bitpos);
    return (stage * 2 + alt) * TAPS_PER_BLOCK + bitpos;
  endfunction

  // States of the signal control unit.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_FILL,
    ST_SAMPLE,
    ST_LOAD,
    ST_DONE
  } ctrl_state_t;

endpackage
