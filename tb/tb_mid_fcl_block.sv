// tb_mid_fcl_block: checks the FCL block model.
// Logic: for every combination of CI, CYINIT, DI and S, after the outputs
// settle, O and CO must equal the carry-chain equations computed here.
// Timing: with DI, CYINIT and CI high (inverter mode) a toggle on S[i] must
// reach O[i] exactly D_PS[i] ps later and not earlier.
module tb_mid_fcl_block;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D [4] = '{311, 402, 487, 353};

  logic       ci, cyinit;
  logic [3:0] di, s, o, co;
  int checks = 0, failures = 0;

  mid_fcl_block #(.D_PS(D)) dut (
    .CI(ci), .CYINIT(cyinit), .DI(di), .S(s), .O(o), .CO(co)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] c;
    logic [3:0] exp_o;
    for (int v = 0; v < 1024; v++) begin
      {ci, cyinit, di, s} = 10'(v);
      #1000;
      c[0] = ci | cyinit;
      for (int i = 0; i < 4; i++) begin
        exp_o[i] = s[i] ^ c[i];
        c[i+1]   = s[i] ? c[i] : di[i];
      end
      checks++;
      if (o !== exp_o || co !== c[4:1]) begin
        failures++;
        $display("FAIL logic ci=%b cyinit=%b di=%b s=%b: o=%b/%b co=%b/%b",
                 ci, cyinit, di, s, o, exp_o, co, c[4:1]);
      end
    end
    // Inverter mode: check the XOR-path delay of each bit.
    ci = 1; cyinit = 1; di = 4'hF; s = 4'h0;
    #1000;
    for (int i = 0; i < 4; i++) begin
      for (int rep = 0; rep < 2; rep++) begin
        logic prev_o;
        prev_o = o[i];
        s[i] = ~s[i];
        #(D[i] - 1);
        checks++;
        if (o[i] !== prev_o) begin
          failures++;
          $display("FAIL bit %0d changed prev_o %0d ps", i, D[i]);
        end
        #1;
        checks++;
        if (o[i] !== ~s[i]) begin
          failures++;
          $display("FAIL bit %0d not inverted %0d ps after toggle", i, D[i]);
        end
        #1000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
