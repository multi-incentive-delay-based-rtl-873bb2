// tb_mid_puf_full: the MID PUF with every parameter at its default (16 FCL
// stages, 64-bit response, one MID unit, 100 MHz clock) taken through
// complete measurements: one with an external challenge, one with a challenge
// from the LFSR after loading a seed. Each response is compared bit by bit
// with the reference delay model's prediction, the latency from start to
// resp_valid is checked, and the LFSR must have stepped afterwards.
module tb_mid_puf_full;
  import mid_tb_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int     N = 16, W = 64, F = 4;
  localparam longint NOM = 400, SPR = 200, T = 10_000;

  logic clk = 0, rst_n = 0, start = 0, chal_src = 0, seed_load = 0;
  logic [N-1:0] chal_ext = '0, seed = '0;
  logic busy, resp_valid;
  logic [W-1:0] resp;
  logic [N-1:0] resp_chal;
  int checks = 0, failures = 0;
  longint t_first;

  always #(T / 2) clk = ~clk;

  mid_puf_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_src(chal_src), .chal_ext(chal_ext),
    .seed_load(seed_load), .seed(seed), .busy(busy), .resp_valid(resp_valid),
    .resp(resp), .resp_chal(resp_chal)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exc_at(longint t);
    longint ph;
    if (t <= t_first) return (t == t_first) ? -1 : 0;
    ph = (t - t_first) % T;
    if (ph == 0 || ph == T / 2) return -1;
    return (ph < T / 2) ? 1 : 0;
  endfunction

  task automatic measure(logic src, logic [N-1:0] ext, logic [N-1:0] exp_chal);
    longint t0, ts;
    logic [W-1:0] exp_r, mask;
    int lat;
    @(negedge clk);
    chal_src = src; chal_ext = ext; start = 1;
    @(posedge clk);
    t0 = longint'($time);
    t_first = t0 + T;
    ts = t0 + (F + 1) * T;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!resp_valid && lat < 20) begin @(posedge clk); lat++; #1; end
    checks++;
    if (lat != F + 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (resp_chal !== exp_chal) begin failures++; $display("FAIL chal %h", resp_chal); end
    exp_r = '0; mask = '1;
    for (int ln = 0; ln < 2; ln++)
      for (int k = 0; k < W; k++) begin
        int e;
        e = exc_at(ts - ref_tap_ps(ref_line_seed(1, 0, ln), 64'(exp_chal), k, NOM, SPR));
        if (e < 0) mask[k] = 0;
        else exp_r[k] ^= (k % 2 == 0) ? ~e[0] : e[0];
      end
    checks++;
    if ((resp & mask) !== (exp_r & mask)) begin
      failures++;
      $display("FAIL resp %h exp %h", resp, exp_r);
    end
    $display("challenge %h -> response %h", exp_chal, resp);
  endtask

  initial begin
    #22_000 rst_n = 1;
    repeat (3) @(negedge clk);
    measure(1'b0, 16'hC0DE, 16'hC0DE);
    @(negedge clk);
    seed = 16'h0042; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    measure(1'b1, 16'h0000, 16'h0042);
    @(posedge clk); #1;
    checks++;
    if (dut.lfsr_chal !== 16'h0021) begin failures++; $display("FAIL lfsr %h", dut.lfsr_chal); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
