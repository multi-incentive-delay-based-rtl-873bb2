// tb_mid_puf_freq: the same simulated chip clocked at 100 MHz and 200 MHz.
//
// A faster clock puts more edges into the line at once, and every edge in
// flight is a place where the two lines can disagree, so the number of
// response bits that carry information grows with the clock frequency. Two
// instances with the same chip seed run the same NCRP external challenges,
// one at 100 MHz (FILL_CYCLES 4) and one at 200 MHz (FILL_CYCLES 8, so both
// wait 40 ns before sampling). The testbench counts the edges in flight along
// the upper line at the sample, from the reference delay model, and the ones
// in the responses. Checks: resp_valid is seen on the falling edge after
// edge FILL_CYCLES + 2 of its own clock (counted from the edge that took
// start, that is FILL_CYCLES + 3 falling edges after start was raised), the faster clock has more edges in flight and
// more ones in total.
module tb_mid_puf_freq;
  import mid_tb_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int     N = 16, W = 64, NCRP = 60;
  localparam longint NOM = 400, SPR = 200;
  localparam longint T1 = 10_000, T2 = 5_000;

  logic clk1 = 0, clk2 = 0, rst_n = 0, start1 = 0, start2 = 0;
  logic [N-1:0] chal = '0;
  logic busy1, busy2, val1, val2;
  logic [W-1:0] resp1, resp2;
  logic [N-1:0] rc1, rc2;
  int checks = 0, failures = 0;

  always #(T1 / 2) clk1 = ~clk1;
  always #(T2 / 2) clk2 = ~clk2;

  mid_puf_top #(.CHIP_SEED(7), .FILL_CYCLES(4)) puf100 (
    .clk(clk1), .rst_n(rst_n), .start(start1), .chal_src(1'b0), .chal_ext(chal),
    .seed_load(1'b0), .seed('0), .busy(busy1), .resp_valid(val1), .resp(resp1), .resp_chal(rc1)
  );
  mid_puf_top #(.CHIP_SEED(7), .FILL_CYCLES(8)) puf200 (
    .clk(clk2), .rst_n(rst_n), .start(start2), .chal_src(1'b0), .chal_ext(chal),
    .seed_load(1'b0), .seed('0), .busy(busy2), .resp_valid(val2), .resp(resp2), .resp_chal(rc2)
  );

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Edges in flight along the whole line when sampled fill periods after
  // the first excitation edge: edges at multiples of T/2 within the line delay.
  function automatic int in_flight(longint t_per, int fill, logic [N-1:0] c);
    longint dmax;
    int e;
    dmax = ref_tap_ps(ref_line_seed(7, 0, 0), 64'(c), W - 1, NOM, SPR);
    e = 0;
    for (longint t = t_per / 2; t <= fill * t_per; t += t_per / 2) if (t < dmax) e++;
    return e;
  endfunction

  initial begin
    longint ones1 = 0, ones2 = 0, fl1 = 0, fl2 = 0;
    #22_000 rst_n = 1;
    #100_000;
    for (int n = 0; n < NCRP; n++) begin
      int lat1, lat2;
      chal = 16'($urandom);
      fork
        begin
          @(negedge clk1); start1 = 1; @(negedge clk1); start1 = 0;
          lat1 = 1;
          while (!val1) begin @(negedge clk1); lat1++; end
        end
        begin
          @(negedge clk2); start2 = 1; @(negedge clk2); start2 = 0;
          lat2 = 1;
          while (!val2) begin @(negedge clk2); lat2++; end
        end
      join
      checks++;
      if (lat1 != 4 + 3 || lat2 != 8 + 3 || rc1 !== chal || rc2 !== chal) begin
        failures++;
        $display("FAIL latency %0d/%0d or challenge %h/%h", lat1, lat2, rc1, rc2);
      end
      ones1 += $countones(resp1);
      ones2 += $countones(resp2);
      fl1 += in_flight(T1, 4, chal);
      fl2 += in_flight(T2, 8, chal);
      #50_000;
    end
    $display("100 MHz: %0d.%02d edges in flight, %0d ones in %0d responses",
             fl1 / NCRP, (fl1 * 100 / NCRP) % 100, ones1, NCRP);
    $display("200 MHz: %0d.%02d edges in flight, %0d ones in %0d responses",
             fl2 / NCRP, (fl2 * 100 / NCRP) % 100, ones2, NCRP);
    checks++;
    if (fl2 <= fl1) begin failures++; $display("FAIL faster clock has no more edges in flight"); end
    checks++;
    if (ones2 <= ones1) begin failures++; $display("FAIL faster clock gives no more ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
