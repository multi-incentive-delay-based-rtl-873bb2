// tb_mid_challenge_gen: the 16-bit LFSR must step through all 65,535
// non-zero values before repeating (maximal length), follow hand-worked
// first steps from seed 1, replace a zero seed by 1, give load priority over
// step and hold when neither is asserted.
module tb_mid_challenge_gen;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] seed = '0, chal;
  int checks = 0, failures = 0;
  bit seen [65536];

  mid_challenge_gen #(.CHAL_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .step(step), .chal(chal)
  );

  always #5000 clk = ~clk;

  task automatic expect_chal(logic [15:0] e, string what);
    checks++;
    if (chal !== e) begin
      failures++;
      $display("FAIL %s: chal=%h exp=%h", what, chal, e);
    end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked: from 1, shift right and XOR B400 when bit 0 was 1.
    logic [15:0] first [12] = '{16'hB400, 16'h5A00, 16'h2D00, 16'h1680, 16'h0B40,
                                16'h05A0, 16'h02D0, 16'h0168, 16'h00B4, 16'h005A,
                                16'h002D, 16'hB416};
    int period;
    #12_000 rst_n = 1;
    @(negedge clk); expect_chal(16'h0001, "reset value");
    step = 1;
    foreach (first[i]) begin
      @(negedge clk); expect_chal(first[i], "first steps");
    end
    // Zero seed becomes 1; load beats step.
    load = 1; seed = 16'h0000;
    @(negedge clk); expect_chal(16'h0001, "zero seed");
    seed = 16'hACE1;
    @(negedge clk); expect_chal(16'hACE1, "load over step");
    load = 0; step = 0;
    repeat (3) @(negedge clk);
    expect_chal(16'hACE1, "hold");
    // Period: count steps until the seed returns, all values distinct.
    step = 1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      if (chal == 16'h0000 || seen[chal]) begin
        failures++;
        $display("FAIL repeated or zero value %h after %0d steps", chal, period);
        break;
      end
      seen[chal] = 1;
    end while (chal != 16'hACE1 && period < 70000);
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
