// mid_tb_ref_pkg: reference model used by the MID PUF testbenches.
//
// It recomputes, independently of the RTL, the element delays of the FCL
// timing model and the cumulative delay from the line input to every tap for
// a given challenge, so a testbench can predict the level each tap holds at
// a sampling instant from the excitation waveform alone.
//   element delay: h = seed*0x9E3779B1 ^ idx*0x85EBCA77, h ^= h>>15,
//                  h *= 0xC2B2AE3D, h ^= h>>13,
//                  d = nominal - spread/2 + h mod (spread+1)
//   element index: (stage*2 + alternative)*4 + bit
//   line seed:     chip*1024 + unit*2 + (0 upper, 1 lower)
package mid_tb_ref_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  function automatic longint ref_elem_ps(longint seed, longint idx,
                                         longint nominal, longint spread);
    bit [31:0] a, b, h;
    a = 32'(seed) * 32'd2654435761;
    b = 32'(idx)  * 32'd2246822519;
    h = a ^ b;
    h = h ^ {15'b0, h[31:15]};
    h = h * 32'd3266489917;
    h = h ^ {13'b0, h[31:13]};
    return nominal - spread / 2 + longint'(h % 32'(spread + 1));
  endfunction

  function automatic longint ref_line_seed(longint chip, longint unit, longint lower);
    return chip * 1024 + unit * 2 + lower;
  endfunction

  // Cumulative delay from the line input to tap k (k = 4*stage + bit).
  function automatic longint ref_tap_ps(longint seed, bit [63:0] chal, int k,
                                        longint nominal, longint spread);
    longint acc;
    acc = 0;
    for (int j = 0; j <= k; j++) begin
      int s, b;
      s = j / 4;
      b = j % 4;
      acc += ref_elem_ps(seed, (s * 2 + int'(chal[s])) * 4 + b, nominal, spread);
    end
    return acc;
  endfunction

endpackage
