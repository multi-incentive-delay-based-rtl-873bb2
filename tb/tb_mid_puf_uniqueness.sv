// tb_mid_puf_uniqueness: the uniqueness experiment run on simulated chips.
//
// Four MID PUF instances at default size, each with its own chip seed
// (standing for four devices), answer the same NCRP challenges from a
// common LFSR seed. For every challenge the testbench adds up the Hamming
// distance over all 6 instance pairs and prints the mean inter-chip
// distance in percent of the 64 response bits, and the fraction of ones.
// Every tenth challenge is asked twice and must give the same response (the
// model is noise-free, so the intra-chip distance must be 0). Checks: all
// instances report the expected challenge, responses repeat, no instance
// answers with all zeros throughout, and the mean inter-chip distance is
// above zero.
module tb_mid_puf_uniqueness;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NCHIP = 4, N = 16, W = 64, NCRP = 100;
  localparam longint T = 10_000;

  logic clk = 0, rst_n = 0, start = 0, seed_load = 0;
  logic [N-1:0] seed = '0;
  logic [NCHIP-1:0] busy, val;
  logic [W-1:0] resp [NCHIP];
  logic [N-1:0] rchal [NCHIP];
  int checks = 0, failures = 0;

  always #(T / 2) clk = ~clk;

  for (genvar i = 0; i < NCHIP; i++) begin : g_chip
    mid_puf_top #(.CHIP_SEED(i + 11)) u_puf (
      .clk(clk), .rst_n(rst_n), .start(start), .chal_src(1'b1), .chal_ext('0),
      .seed_load(seed_load), .seed(seed), .busy(busy[i]), .resp_valid(val[i]),
      .resp(resp[i]), .resp_chal(rchal[i])
    );
  end

  initial begin
    #4_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(output logic [W-1:0] r [NCHIP], output logic [N-1:0] c);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!val[0]) @(negedge clk);
    checks++;
    if (val !== '1) begin failures++; $display("FAIL valid not common"); end
    for (int i = 0; i < NCHIP; i++) begin
      r[i] = resp[i];
      if (rchal[i] !== rchal[0]) begin failures++; $display("FAIL challenge differs"); end
    end
    c = rchal[0];
    @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] r [NCHIP], r2 [NCHIP];
    logic [N-1:0] c, c2;
    longint hd = 0, ones = 0, pairs = 0;
    logic [NCHIP-1:0] nonzero = '0;
    #22_000 rst_n = 1;
    @(negedge clk);
    seed = 16'h1D5; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    for (int n = 0; n < NCRP; n++) begin
      measure(r, c);
      for (int i = 0; i < NCHIP; i++) begin
        ones += $countones(r[i]);
        if (r[i] != '0) nonzero[i] = 1'b1;
        for (int j = i + 1; j < NCHIP; j++) begin
          hd += $countones(r[i] ^ r[j]);
          pairs++;
        end
      end
      if (n % 10 == 0) begin
        // reload the LFSR with this challenge and ask again
        @(negedge clk);
        seed = c; seed_load = 1;
        @(negedge clk);
        seed_load = 0;
        measure(r2, c2);
        checks++;
        if (c2 !== c || r2 != r) begin failures++; $display("FAIL repeat of %h differs", c); end
      end
    end
    checks++;
    if (nonzero !== '1) begin failures++; $display("FAIL some chip always answered 0: %b", nonzero); end
    checks++;
    if (hd == 0) begin failures++; $display("FAIL no inter-chip difference"); end
    $display("%0d chips, %0d challenges: mean inter-chip HD %0d.%02d %%, ones %0d.%02d %%",
             NCHIP, NCRP, (hd * 100) / (pairs * W), ((hd * 10000) / (pairs * W)) % 100,
             (ones * 100) / (NCRP * NCHIP * W), ((ones * 10000) / (NCRP * NCHIP * W)) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
