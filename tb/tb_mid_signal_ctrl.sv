// tb_mid_signal_ctrl: checks the measurement sequence cycle by cycle.
// With start seen at edge 0: en must be high only between edges F and F+1,
// load between F+1 and F+2, done between F+2 and F+3; exc must show exactly
// F+1 rising edges, at edges 1..F+1, and none while idle; the challenge must
// be latched at start and the capture clear given with start. Run for
// several FILL_CYCLES values through two instances.
module tb_mid_signal_ctrl;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] chal_in = '0;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  typedef struct packed {
    logic [15:0] chal_q;
    logic exc, clr, en, load, done, busy;
  } ctrl_out_t;

  ctrl_out_t o4, o1;

  mid_signal_ctrl #(.CHAL_W(16), .FILL_CYCLES(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_in(chal_in),
    .chal_q(o4.chal_q), .exc(o4.exc), .clr(o4.clr), .en(o4.en), .load(o4.load),
    .done(o4.done), .busy(o4.busy)
  );
  mid_signal_ctrl #(.CHAL_W(16), .FILL_CYCLES(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start), .chal_in(chal_in),
    .chal_q(o1.chal_q), .exc(o1.exc), .clr(o1.clr), .en(o1.en), .load(o1.load),
    .done(o1.done), .busy(o1.busy)
  );

  int exc4_rises = 0, exc1_rises = 0;
  always @(posedge o4.exc) exc4_rises++;
  always @(posedge o1.exc) exc1_rises++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: %b exp %b", what, cyc, got, exp);
    end
  endtask

  task automatic run_one(int f, logic [15:0] c);
    int r0;
    ctrl_out_t o;
    // start applied before edge 0
    @(negedge clk);
    o = (f == 4) ? o4 : o1;
    r0 = (f == 4) ? exc4_rises : exc1_rises;
    chal_in = c;
    start = 1;
    #1 o = (f == 4) ? o4 : o1;
    chk(o.clr, 1'b1, "clr with start", 0);
    for (int e = 1; e <= f + 4; e++) begin
      @(negedge clk);
      start = 0;
      chal_in = ~c;                   // must not disturb the latched challenge
      o = (f == 4) ? o4 : o1;
      // now between edge e-1 and e
      chk(o.en,   (e - 1 == f),     "en", e);
      chk(o.load, (e - 1 == f + 1), "load", e);
      chk(o.done, (e - 1 == f + 2), "done", e);
      chk(o.busy, (e - 1 <= f + 2), "busy", e);
      chk(o.clr,  1'b0,             "clr", e);
      checks++;
      if (o.chal_q !== c) begin failures++; $display("FAIL chal_q %h", o.chal_q); end
    end
    checks++;
    if (((f == 4) ? exc4_rises : exc1_rises) - r0 != f + 1) begin
      failures++;
      $display("FAIL F=%0d exc rising edges %0d", f, ((f == 4) ? exc4_rises : exc1_rises) - r0);
    end
  endtask

  initial begin
    int r4, r1;
    #12_000 rst_n = 1;
    repeat (2) @(negedge clk);
    r4 = exc4_rises; r1 = exc1_rises;
    repeat (10) @(negedge clk);
    checks++;
    if (exc4_rises != r4 || exc1_rises != r1) begin failures++; $display("FAIL exc while idle"); end
    // only one instance sees each sequence? both get start; check each in turn
    run_one(4, 16'h1234);
    repeat (3) @(negedge clk);
    run_one(1, 16'hBEEF);
    repeat (10) @(negedge clk);
    run_one(4, 16'h0F0F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
