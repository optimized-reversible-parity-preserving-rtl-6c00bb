// tb_rpm_top: end-to-end test of the whole design at its default sizes
// (unsigned 4x4 and signed 5x5, no parameter overrides).
// Every operand pair of both multipliers is applied at the same time. Each
// product is compared with integer multiplication, and the parity rule of a
// parity-preserving circuit, ^{operands} == ^{product, garbage}, is checked.
// The mechanisms of the design are counted and each must occur: the carry of
// a two-by-two sub-product out of a MEAM block (both multipliers), a NAND
// sign term at 0, the constant 1 turning the signed MSB from 0 to 1, and
// negative signed products. It finally flips, one at a time, every output
// line of one operand pair and checks that the parity rule catches it.
module tb_rpm_top;
  logic [3:0]         ux, uy;
  logic [7:0]         up;
  logic [51:0]        ug;
  logic signed [4:0]  sx, sy;
  logic signed [9:0]  sp;
  logic [86:0]        sg;

  int checks = 0, failures = 0;
  int n_ucarry = 0, n_scarry = 0, n_nand0 = 0, n_msbinv = 0, n_neg = 0;

  rpm_top dut (.ux, .uy, .up, .ugarbage(ug), .sx, .sy, .sp, .sgarbage(sg));

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
    logic [59:0] line;
    for (int v = 0; v < 1024; v++) begin
      {sx, sy} = 10'(v);
      {ux, uy} = 8'(v);
      #1;
      check(up == 8'(int'(ux) * int'(uy)), $sformatf("unsigned %0d*%0d got %0d", ux, uy, up));
      check(sp == 10'(int'(sx) * int'(sy)), $sformatf("signed %0d*%0d got %0d", sx, sy, sp));
      check((^{ux, uy}) == (^{up, ug}), "unsigned parity");
      check((^{sx, sy}) == (^{sp, sg}), "signed parity");
      if (|dut.u_unsigned.u_ppa.mr) n_ucarry++;
      if (|dut.u_signed.u_ppa.mr) n_scarry++;
      if (!dut.u_signed.u_ppg.prod[0][4] || !dut.u_signed.u_ppg.prod[4][0]) n_nand0++;
      if (!dut.u_signed.u_ppa.g_colm[8].g_fa[0].u_zplg.mj && sp[9]) n_msbinv++;
      if (sp < 0) n_neg++;
    end
    // single flipped output line on one operand pair: parity must flag it
    {sx, sy} = 10'sd0;
    {ux, uy} = {4'd13, 4'd11};
    #1;
    for (int b = 0; b < 60; b++) begin
      line = {up, ug};
      line[b] = ~line[b];
      check((^{ux, uy}) != (^line), $sformatf("flip of line %0d not detected", b));
    end
    $display("mechanisms: unsigned MEAM carry=%0d signed MEAM carry=%0d NAND at 0=%0d MSB set by constant 1=%0d negative products=%0d",
             n_ucarry, n_scarry, n_nand0, n_msbinv, n_neg);
    check(n_ucarry > 0, "unsigned MEAM carry never happened");
    check(n_scarry > 0, "signed MEAM carry never happened");
    check(n_nand0 > 0, "NAND sign term never 0");
    check(n_msbinv > 0, "constant-1 MSB inversion never happened");
    check(n_neg > 0, "no negative product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
