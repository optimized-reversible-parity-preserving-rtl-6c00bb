// tb_ppg: exhaustive test of the partial-product generator in both modes,
// unsigned 4x4 (default) and signed 5x5.
// For every operand pair it checks each product line (AND, or NAND for the
// Baugh-Wooley sign terms), the half-adder sums x[2k]y[1] ^ x[2k+1]y[0], the
// duplicate copies of x[2k+1]y[1], that the lines consumed inside read 0, and
// that the parity of {x, y} equals the parity of all outputs.
module tb_ppg;
  localparam int NU = 4, NS = 5;
  localparam int GU = NU / 2, GS = (NS - 1) / 2;

  logic [NU-1:0] ux, uy;
  logic [NU-1:0] uprod [NU];
  logic [GU-1:0] uhs, udup;
  logic [NU*NU+2*NU-1:0] ug;

  logic [NS-1:0] sx, sy;
  logic [NS-1:0] sprod [NS];
  logic [GS-1:0] shs, sdup;
  logic [NS*NS+2*NS-1:0] sg;

  int checks = 0, failures = 0;

  ppg dut_u (.x(ux), .y(uy), .prod(uprod), .hs(uhs), .dup(udup), .garbage(ug));
  ppg #(.N(NS), .SIGNED(1'b1)) dut_s (.x(sx), .y(sy), .prod(sprod), .hs(shs),
                                     .dup(sdup), .garbage(sg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Expected product line (i, j) for operand bits xi, yj.
  function automatic bit exp_line(int n, bit sgn, int i, int j, bit xi, bit yj);
    int g;
    g = sgn ? (n - 1) / 2 : n / 2;
    if (j == 0 && i < 2 * g && i % 2 == 1) return 1'b0;   // consumed
    if (j == 1 && i < 2 * g && i % 2 == 0) return 1'b0;   // replaced by hs
    if (sgn && ((i == n - 1) != (j == n - 1))) return !(xi && yj);
    return xi && yj;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit par;
    for (int v = 0; v < (1 << (2 * NU)); v++) begin
      {ux, uy} = (2 * NU)'(v);
      #1;
      par = 1'b0;
      for (int j = 0; j < NU; j++)
        for (int i = 0; i < NU; i++) begin
          check(uprod[j][i] == exp_line(NU, 1'b0, i, j, ux[i], uy[j]),
                $sformatf("unsigned prod[%0d][%0d] x=%0d y=%0d", j, i, ux, uy));
          par ^= uprod[j][i];
        end
      for (int k = 0; k < GU; k++) begin
        check(uhs[k] == ((ux[2*k] & uy[1]) ^ (ux[2*k+1] & uy[0])), $sformatf("unsigned hs[%0d]", k));
        check(udup[k] == (ux[2*k+1] & uy[1]), $sformatf("unsigned dup[%0d]", k));
      end
      check((par ^ (^uhs) ^ (^udup) ^ (^ug)) == (^{ux, uy}), "unsigned parity");
    end
    for (int v = 0; v < (1 << (2 * NS)); v++) begin
      {sx, sy} = (2 * NS)'(v);
      #1;
      par = 1'b0;
      for (int j = 0; j < NS; j++)
        for (int i = 0; i < NS; i++) begin
          check(sprod[j][i] == exp_line(NS, 1'b1, i, j, sx[i], sy[j]),
                $sformatf("signed prod[%0d][%0d] x=%0d y=%0d", j, i, sx, sy));
          par ^= sprod[j][i];
        end
      for (int k = 0; k < GS; k++) begin
        check(shs[k] == ((sx[2*k] & sy[1]) ^ (sx[2*k+1] & sy[0])), $sformatf("signed hs[%0d]", k));
        check(sdup[k] == (sx[2*k+1] & sy[1]), $sformatf("signed dup[%0d]", k));
      end
      // 2N-2 constant ones enter the NAND blocks: an even number
      check((par ^ (^shs) ^ (^sdup) ^ (^sg)) == (^{sx, sy}), "signed parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
