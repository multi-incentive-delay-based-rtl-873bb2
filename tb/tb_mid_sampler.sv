// tb_mid_sampler: random clear/enable/data sequence against a register model
// kept in the testbench: clear wins, then enable loads, otherwise hold.
module tb_mid_sampler;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 64;
  logic clk = 0, clr, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  mid_sampler #(.WIDTH(W)) dut (.clk(clk), .clr(clr), .en(en), .d(d), .q(q));

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; d = '0;
    @(posedge clk); #1;
    model = '0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 9) == 0);
      en  = ($urandom_range(0, 2) == 0);
      d   = {$urandom, $urandom};
      @(posedge clk); #1;
      if (clr) model = '0;
      else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d clr=%b en=%b q=%h exp=%h", i, clr, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
