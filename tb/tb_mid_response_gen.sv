// tb_mid_response_gen: three units' upper/lower samples, random; the
// response must be the bit-wise XOR of all six vectors, loaded only when
// load is high, with valid exactly one cycle after load.
module tb_mid_response_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 64, U = 3;
  logic clk = 0, rst_n = 0, load, valid;
  logic [U*W-1:0] q_up, q_lo;
  logic [W-1:0] resp, model;
  int checks = 0, failures = 0;

  mid_response_gen #(.WIDTH(W), .NUM_UNITS(U)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .q_up(q_up), .q_lo(q_lo),
    .resp(resp), .valid(valid)
  );

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; q_up = '0; q_lo = '0;
    #12_000 rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] x;
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      for (int k = 0; k < U * W; k += 32) begin
        q_up[k +: 32] = $urandom;
        q_lo[k +: 32] = $urandom;
      end
      x = '0;
      for (int u = 0; u < U; u++) x = x ^ q_up[u*W +: W] ^ q_lo[u*W +: W];
      @(posedge clk); #1;
      if (load) model = x;
      checks++;
      if (resp !== model || valid !== load) begin
        failures++;
        $display("FAIL %0d load=%b resp=%h exp=%h valid=%b", i, load, resp, model, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
