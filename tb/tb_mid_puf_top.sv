// tb_mid_puf_top: end-to-end test of the MID PUF.
//
// Three PUFs share clock and stimulus: chip A (all defaults), chip B (another
// chip seed, i.e. another physical device) and chip M (two MID units, so the
// response goes through the cross-unit XOR layer). For every measurement the
// testbench predicts each response bit from the reference delay model and
// the excitation timing (exc rises on edges 1..F after the start edge, the
// sample is taken on edge F+1), and checks resp, resp_chal and that
// resp_valid comes exactly F+2 edges after start. It counts how often each
// mechanism was exercised and fails if one never was: external and LFSR
// challenges, LFSR stepping, capture clear at start, clock gate closed while
// idle, several excitation edges in flight at the sample (multiple
// excitation), path reconfiguration changing the response, the cross-unit
// XOR layer, repeatability and chip-to-chip difference. The mean inter-chip
// Hamming distance between A and B is printed.
module tb_mid_puf_top;
  import mid_tb_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int     N = 16, W = 64, F = 4, NOPS = 120;
  localparam longint NOM = 400, SPR = 200, T = 10_000;

  logic clk = 0, rst_n = 0, start = 0, chal_src = 0, seed_load = 0;
  logic [N-1:0] chal_ext = '0, seed = '0;
  logic busy_a, busy_b, busy_m, val_a, val_b, val_m;
  logic [W-1:0] resp_a, resp_b, resp_m;
  logic [N-1:0] rc_a, rc_b, rc_m;
  int checks = 0, failures = 0, skipped = 0;

  always #(T / 2) clk = ~clk;

  mid_puf_top chip_a (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_src(chal_src), .chal_ext(chal_ext),
    .seed_load(seed_load), .seed(seed), .busy(busy_a), .resp_valid(val_a),
    .resp(resp_a), .resp_chal(rc_a)
  );
  mid_puf_top #(.CHIP_SEED(2)) chip_b (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_src(chal_src), .chal_ext(chal_ext),
    .seed_load(seed_load), .seed(seed), .busy(busy_b), .resp_valid(val_b),
    .resp(resp_b), .resp_chal(rc_b)
  );
  mid_puf_top #(.CHIP_SEED(3), .NUM_UNITS(2)) chip_m (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_src(chal_src), .chal_ext(chal_ext),
    .seed_load(seed_load), .seed(seed), .busy(busy_m), .resp_valid(val_m),
    .resp(resp_m), .resp_chal(rc_m)
  );

  // Mechanism counters.
  int n_ext = 0, n_lfsr = 0, n_lfsr_step = 0, n_clear = 0, n_idle_quiet = 0;
  int n_multi_exc = 0, n_reconfig = 0, n_xor_layer = 0, n_repeat = 0, n_unique = 0;
  longint hd_sum = 0, ones_sum = 0;
  int exc_idle_edges = 0;

  // The clock gate must stay closed while the PUF is idle.
  always @(posedge chip_a.exc) if (!busy_a) exc_idle_edges++;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_first;
  function automatic int exc_at(longint t);
    longint ph;
    if (t <= t_first) return (t == t_first) ? -1 : 0;
    ph = (t - t_first) % T;
    if (ph == 0 || ph == T / 2) return -1;
    return (ph < T / 2) ? 1 : 0;
  endfunction

  // Predicted response and mask of bits whose prediction is unambiguous.
  task automatic predict(longint chip, int units, logic [N-1:0] c, longint ts,
                         output logic [W-1:0] r, output logic [W-1:0] m);
    r = '0;
    m = '1;
    for (int u = 0; u < units; u++) begin
      for (int ln = 0; ln < 2; ln++) begin
        for (int k = 0; k < W; k++) begin
          int e;
          e = exc_at(ts - ref_tap_ps(ref_line_seed(chip, u, ln), 64'(c), k, NOM, SPR));
          if (e < 0) m[k] = 1'b0;
          else r[k] = r[k] ^ ((k % 2 == 0) ? ~e[0] : e[0]);
        end
      end
    end
  endtask

  task automatic chk_resp(string nm, logic [W-1:0] got, logic [W-1:0] exp_r,
                          logic [W-1:0] m);
    checks++;
    if ((got & m) !== (exp_r & m)) begin
      failures++;
      $display("FAIL %s resp=%h exp=%h mask=%h", nm, got, exp_r, m);
    end
    skipped += W - $countones(m);
  endtask

  function automatic logic [N-1:0] lfsr_next(logic [N-1:0] v);
    return {1'b0, v[N-1:1]} ^ (v[0] ? 16'hB400 : 16'h0000);
  endfunction

  // One measurement; returns the responses.
  task automatic measure(logic src, logic [N-1:0] ext, logic [N-1:0] exp_chal,
                         output logic [W-1:0] ra, output logic [W-1:0] rb,
                         output logic [W-1:0] rm);
    longint t0, ts;
    logic [W-1:0] ea, ma, eb, mb, em, mm;
    int lat;
    @(negedge clk);
    chal_src = src;
    chal_ext = ext;
    start = 1;
    @(posedge clk);
    t0 = longint'($time);
    t_first = t0 + T;
    ts = t0 + (F + 1) * T;
    @(negedge clk);
    start = 0;
    chal_ext = ~ext;                      // latched challenge must hold
    // capture registers cleared at start
    checks++;
    if (chip_a.g_unit[0].u_unit.q_up == '0 && chip_a.g_unit[0].u_unit.q_lo == '0) n_clear++;
    else begin failures++; $display("FAIL capture not cleared"); end
    lat = 0;
    while (!val_a) begin
      @(posedge clk); lat++;
      #1;
      if (lat > 20) break;
    end
    checks++;
    if (lat != F + 2 || !val_b || !val_m) begin
      failures++;
      $display("FAIL latency %0d (exp %0d) valid b=%b m=%b", lat, F + 2, val_b, val_m);
    end
    checks++;
    if (rc_a !== exp_chal || rc_b !== exp_chal || rc_m !== exp_chal) begin
      failures++;
      $display("FAIL resp_chal %h exp %h", rc_a, exp_chal);
    end
    predict(1, 1, exp_chal, ts, ea, ma);
    predict(2, 1, exp_chal, ts, eb, mb);
    predict(3, 2, exp_chal, ts, em, mm);
    chk_resp("A", resp_a, ea, ma);
    chk_resp("B", resp_b, eb, mb);
    chk_resp("M", resp_m, em, mm);
    // the cross-unit layer: M's response differs from either unit alone
    begin
      logic [W-1:0] e0, m0;
      predict(3, 1, exp_chal, ts, e0, m0);
      if (((e0 ^ em) & m0 & mm) != '0) n_xor_layer++;
    end
    // edges in flight over the whole line at the sample (longest tap)
    begin
      longint dmax;
      int edges;
      dmax = ref_tap_ps(ref_line_seed(1, 0, 0), 64'(exp_chal), W - 1, NOM, SPR);
      edges = 0;
      for (longint te = t_first; te < ts; te += T / 2) if (te > ts - dmax) edges++;
      if (edges >= 2) n_multi_exc++;
    end
    ra = resp_a; rb = resp_b; rm = resp_m;
    hd_sum += $countones(resp_a ^ resp_b);
    ones_sum += $countones(resp_a);
    if (resp_a != resp_b) n_unique++;
    repeat (2) @(negedge clk);
    if (!busy_a) n_idle_quiet++;
  endtask

  initial begin
    logic [W-1:0] ra, rb, rm, ra2, rb2, rm2, prev_ra;
    logic [N-1:0] lf, c;
    int ops;
    #22_000 rst_n = 1;
    repeat (3) @(negedge clk);
    // external challenges
    prev_ra = '0;
    for (int i = 0; i < NOPS / 2; i++) begin
      c = 16'($urandom);
      measure(1'b0, c, c, ra, rb, rm);
      n_ext++;
      if (i > 0 && ra != prev_ra) n_reconfig++;
      prev_ra = ra;
      if (i % 10 == 0) begin
        // repeat the same challenge: identical response expected
        measure(1'b0, c, c, ra2, rb2, rm2);
        checks++;
        if (ra2 !== ra || rb2 !== rb || rm2 !== rm) begin
          failures++;
          $display("FAIL repeat differs for %h", c);
        end else n_repeat++;
      end
    end
    // LFSR challenges
    @(negedge clk);
    seed = 16'h5EED; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    lf = 16'h5EED;
    for (int i = 0; i < NOPS / 2; i++) begin
      measure(1'b1, 16'h0000, lf, ra, rb, rm);
      n_lfsr++;
      checks++;
      if (chip_a.lfsr_chal == lfsr_next(lf)) n_lfsr_step++;
      else begin failures++; $display("FAIL LFSR did not step"); end
      lf = lfsr_next(lf);
    end
    checks++;
    if (exc_idle_edges != 0) begin failures++; $display("FAIL %0d exc edges while idle", exc_idle_edges); end

    ops = n_ext + n_lfsr + n_repeat;
    $display("mechanisms: ext=%0d lfsr=%0d lfsr_step=%0d clear=%0d idle_quiet=%0d multi_exc=%0d reconfig=%0d xor_layer=%0d repeat=%0d unique=%0d",
             n_ext, n_lfsr, n_lfsr_step, n_clear, n_idle_quiet, n_multi_exc, n_reconfig,
             n_xor_layer, n_repeat, n_unique);
    $display("inter-chip HD A/B: %0d.%02d %% of %0d bits; ones in A: %0d.%02d %%; skipped bits %0d",
             (hd_sum * 100) / (ops * W), ((hd_sum * 10000) / (ops * W)) % 100, W,
             (ones_sum * 100) / (ops * W), ((ones_sum * 10000) / (ops * W)) % 100, skipped);
    begin
      int cnt [10];
      cnt = '{n_ext, n_lfsr, n_lfsr_step, n_clear, n_idle_quiet, n_multi_exc,
              n_reconfig, n_xor_layer, n_repeat, n_unique};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
