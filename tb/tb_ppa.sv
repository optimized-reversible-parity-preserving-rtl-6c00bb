// tb_ppa: exhaustive test of the partial-product adder in both modes,
// unsigned 4x4 (default) and signed 5x5 (Baugh-Wooley).
// The testbench builds the adder's inputs itself from the operands (plain
// ANDs, NANDs for the sign terms, the half-adder sums and duplicate copies)
// and checks the 2N-bit result against x*y computed with integer arithmetic.
// It also counts the cases where a two-by-two sub-product carries (MEAM r = 1)
// and requires that they occur.
module tb_ppa;
  localparam int NU = 4, NS = 5;
  localparam int GU = NU / 2, GS = (NS - 1) / 2;

  logic [NU-1:0] uprod [NU];
  logic [GU-1:0] uhs, udup;
  logic [2*NU-1:0] up;
  logic [NS-1:0] sprod [NS];
  logic [GS-1:0] shs, sdup;
  logic [2*NS-1:0] sp;

  int checks = 0, failures = 0, carries = 0;

  ppa dut_u (.prod(uprod), .hs(uhs), .dup(udup), .p(up), .garbage());
  ppa #(.N(NS), .SIGNED(1'b1)) dut_s (.prod(sprod), .hs(shs), .dup(sdup), .p(sp), .garbage());

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NU-1:0] ux, uy;
    logic signed [NS-1:0] sx, sy;
    for (int v = 0; v < (1 << (2 * NU)); v++) begin
      {ux, uy} = (2 * NU)'(v);
      for (int j = 0; j < NU; j++)
        for (int i = 0; i < NU; i++)
          uprod[j][i] = ux[i] & uy[j];
      for (int k = 0; k < GU; k++) begin
        uhs[k]  = (ux[2*k] & uy[1]) ^ (ux[2*k+1] & uy[0]);
        udup[k] = ux[2*k+1] & uy[1];
        uprod[0][2*k+1] = 1'b0;
        uprod[1][2*k]   = 1'b0;
        if (ux[2*k] & uy[1] & ux[2*k+1] & uy[0]) carries++;
      end
      #1;
      check(up == (2*NU)'(int'(ux) * int'(uy)), $sformatf("unsigned %0d*%0d got %0d", ux, uy, up));
    end
    for (int v = 0; v < (1 << (2 * NS)); v++) begin
      {sx, sy} = (2 * NS)'(v);
      for (int j = 0; j < NS; j++)
        for (int i = 0; i < NS; i++)
          sprod[j][i] = ((i == NS-1) != (j == NS-1)) ? ~(sx[i] & sy[j]) : (sx[i] & sy[j]);
      for (int k = 0; k < GS; k++) begin
        shs[k]  = (sx[2*k] & sy[1]) ^ (sx[2*k+1] & sy[0]);
        sdup[k] = sx[2*k+1] & sy[1];
        sprod[0][2*k+1] = 1'b0;
        sprod[1][2*k]   = 1'b0;
      end
      #1;
      check($signed(sp) == (2*NS)'(int'(sx) * int'(sy)),
            $sformatf("signed %0d*%0d got %0d", sx, sy, $signed(sp)));
    end
    check(carries > 0, "sub-product carry never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
