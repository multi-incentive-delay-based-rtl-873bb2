// tb_mid_unit: one MID unit driven by a 100 MHz clock that the testbench
// gates into the lines for a few periods before raising EN for one cycle.
// Both capture banks are compared with the reference model's prediction of
// every tap at the sampling edge; the first sample (EN at the first exc edge,
// before the lines are filled) must show identical levels in both lines, and
// clear must zero both banks. Over many challenges the number of taps where
// the lines differ is reported.
module tb_mid_unit;
  import mid_tb_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int     N = 16, W = 64, CHIP = 5, UNIT = 1, F = 4;
  localparam longint NOM = 400, SPR = 200, T = 10_000;

  logic clk = 0, gate = 0, clr = 0, en = 0;
  logic exc;
  logic [N-1:0] chal;
  logic [W-1:0] q_up, q_lo;
  int checks = 0, failures = 0, skipped = 0, diff_bits = 0;
  longint t_first;

  always #(T / 2) clk = ~clk;
  assign exc = clk & gate;

  mid_unit #(.N_STAGES(N), .CHIP_SEED(CHIP), .UNIT(UNIT), .NOMINAL_PS(NOM), .SPREAD_PS(SPR))
    dut (.clk(clk), .exc(exc), .chal(chal), .clr(clr), .en(en), .q_up(q_up), .q_lo(q_lo));

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exc level at t: high in [t_first + kT, t_first + kT + T/2), -1 on an edge.
  function automatic int exc_at(longint t);
    longint ph;
    if (t < t_first) return (t == t_first) ? -1 : 0;
    ph = (t - t_first) % T;
    if (ph == 0 || ph == T / 2) return -1;
    return (ph < T / 2) ? 1 : 0;
  endfunction

  task automatic compare(longint ts, logic [W-1:0] q, longint lseed, string name);
    for (int k = 0; k < W; k++) begin
      int e;
      e = exc_at(ts - ref_tap_ps(lseed, 64'(chal), k, NOM, SPR));
      if (e < 0) begin skipped++; continue; end
      checks++;
      if (q[k] !== ((k % 2 == 0) ? ~e[0] : e[0])) begin
        failures++;
        $display("FAIL %s chal=%h tap %0d = %b", name, chal, k, q[k]);
      end
    end
  endtask

  initial begin
    longint ts;
    chal = '0;
    repeat (4) @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      chal = 16'($urandom);
      // rest so both lines settle
      repeat (5) @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      checks++;
      if (q_up !== '0 || q_lo !== '0) begin failures++; $display("FAIL clear"); end
      gate = 1;
      t_first = longint'($time) + T / 2;
      for (int k = 1; k <= F; k++) @(negedge clk);
      en = 1;
      @(posedge clk);
      ts = longint'($time);
      @(negedge clk);
      en = 0;
      gate = 0;
      compare(ts, q_up, ref_line_seed(CHIP, UNIT, 0), "upper");
      compare(ts, q_lo, ref_line_seed(CHIP, UNIT, 1), "lower");
      diff_bits += $countones(q_up ^ q_lo);
    end
    // Sample on the very first excitation edge: lines not yet filled, the
    // captured levels are the static pattern, equal in both lines.
    repeat (5) @(negedge clk);
    gate = 1; en = 1;
    @(posedge clk);
    @(negedge clk);
    en = 0; gate = 0;
    checks++;
    if (q_up !== q_lo || q_up !== {(W/2){2'b01}}) begin
      failures++;
      $display("FAIL unfilled sample up=%h lo=%h", q_up, q_lo);
    end
    $display("differing taps: %0d over 40 challenges (%0d bits), skipped %0d", diff_bits, 40 * W, skipped);
    checks++;
    if (diff_bits == 0) begin failures++; $display("FAIL lines never differ"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
