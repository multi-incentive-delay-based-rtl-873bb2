// tb_mid_delay_line: checks one reconfigurable delay line against the
// reference model. The testbench drives the excitation with a 100 MHz square
// wave that starts after a rest period, and at a set of sampling instants
// compares every tap with the level predicted from the excitation waveform
// and the cumulative tap delays (tap k is the input inverted k+1 times,
// delayed by the sum of the selected element delays). Several challenges are
// used, so both alternatives of every stage are exercised; a tap whose
// predicted instant falls exactly on an excitation edge is not compared.
module tb_mid_delay_line;
  import mid_tb_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  N     = 16;
  localparam int  W     = 4 * N;
  localparam int  SEED  = 77;
  localparam longint NOM = 400, SPR = 200, T = 10_000;

  logic          exc;
  logic [N-1:0]  chal;
  logic [W-1:0]  taps;
  int checks = 0, failures = 0, skipped = 0;
  time t_on;

  mid_delay_line #(.N_STAGES(N), .LINE_SEED(SEED), .NOMINAL_PS(NOM), .SPREAD_PS(SPR))
    dut (.exc(exc), .chal(chal), .taps(taps));

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Excitation level at time t for a square wave starting high at t_on.
  function automatic int exc_at(longint t);
    longint ph;
    if (t < longint'(t_on)) return 0;
    ph = (t - longint'(t_on)) % T;
    if (ph == 0 || ph == T / 2) return -1;
    return (ph < T / 2) ? 1 : 0;
  endfunction

  initial begin
    bit [N-1:0] chals [5] = '{16'h0000, 16'hFFFF, 16'hA5C3, 16'h1234, 16'h8001};
    exc = 0;
    foreach (chals[c]) begin
      exc  = 0;
      chal = chals[c];
      #100_000;                       // rest: line settles to static levels
      t_on = $time;
      for (int cyc = 0; cyc < 6; cyc++) begin
        exc = 1; #(T / 2);
        exc = 0; #(T / 2 - 1300);
        // sample late in the low phase
        for (int k = 0; k < W; k++) begin
          int e;
          longint d;
          d = ref_tap_ps(SEED, 64'(chal), k, NOM, SPR);
          e = exc_at(longint'($time) - d);
          if (e < 0) begin skipped++; continue; end
          checks++;
          if (taps[k] !== ((k % 2 == 0) ? ~e[0] : e[0])) begin
            failures++;
            $display("FAIL chal=%h t=%0t tap %0d = %b", chal, $time, k, taps[k]);
          end
        end
        #1300;
      end
    end
    $display("skipped %0d ambiguous tap samples", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
