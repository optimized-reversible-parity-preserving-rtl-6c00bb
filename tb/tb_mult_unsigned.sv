// tb_mult_unsigned: end-to-end test of the unsigned multiplier at N = 4
// (default), 6 and 8, every operand pair.
// Checks the product against integer multiplication and the parity rule
// ^{x,y} == ^{p,garbage}. It then checks the structure counts against the
// figures of the design: for 4x4, quantum cost 168 and 44 constant inputs
// and 44 garbage outputs (comparison table); for every size, the block
// counts (2N-2 FRG, N/2 MEAM, N(N-2) ZPLG) and equations (6) and (7).
// Equation (8) for garbage outputs is checked at N = 4, the only size where
// it equals the constant-input count that a reversible circuit with 2N
// inputs and 2N outputs must have.
module tb_mult_unsigned;
  import rpm_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [3:0] x4, y4; logic [7:0]  p4;
  logic [5:0] x6, y6; logic [11:0] p6;
  logic [7:0] x8, y8; logic [15:0] p8;
  logic [4*4+8+4+3*8-1:0]     g4;
  logic [6*6+12+6+3*24-1:0]   g6;
  logic [8*8+16+8+3*48-1:0]   g8;

  mult_unsigned dut4 (.x(x4), .y(y4), .p(p4), .garbage(g4));
  mult_unsigned #(.N(6)) dut6 (.x(x6), .y(y6), .p(p6), .garbage(g6));
  mult_unsigned #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8), .garbage(g8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic costs(input int n);
    check(count_frg(n, 1'b0) == 2 * n - 2, $sformatf("FRG count n=%0d", n));
    check(count_e1(n, 1'b0) == n * n - 2 * n + 2, $sformatf("E1 count n=%0d", n));
    check(n_groups(n, 1'b0) == n / 2, $sformatf("MEAM count n=%0d", n));
    check(total_fa(n, 1'b0) == n * (n - 2), $sformatf("ZPLG count n=%0d", n));
    check(2 * quantum_cost(n, 1'b0) == eq_qc_x2(n, 1'b0), $sformatf("Eq.6 n=%0d", n));
    check(2 * const_inputs(n, 1'b0) == eq_ci_x2(n, 1'b0), $sformatf("Eq.7 n=%0d", n));
    check(garbage_outputs(n, 1'b0) == const_inputs(n, 1'b0), $sformatf("GO==CI n=%0d", n));
    $display("unsigned %0dx%0d: QC=%0d CI=%0d GO=%0d (Eq.8 gives %0d)", n, n,
             quantum_cost(n, 1'b0), const_inputs(n, 1'b0), garbage_outputs(n, 1'b0),
             eq_go_x2(n, 1'b0) / 2);
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      check(p4 == 8'(int'(x4) * int'(y4)), $sformatf("4x4 %0d*%0d got %0d", x4, y4, p4));
      check((^{x4, y4}) == (^{p4, g4}), "4x4 parity");
    end
    for (int v = 0; v < 4096; v++) begin
      {x6, y6} = 12'(v);
      #1;
      check(p6 == 12'(int'(x6) * int'(y6)), $sformatf("6x6 %0d*%0d got %0d", x6, y6, p6));
      check((^{x6, y6}) == (^{p6, g6}), "6x6 parity");
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      check(p8 == 16'(int'(x8) * int'(y8)), $sformatf("8x8 %0d*%0d got %0d", x8, y8, p8));
      check((^{x8, y8}) == (^{p8, g8}), "8x8 parity");
    end
    check(quantum_cost(4, 1'b0) == 168, "4x4 QC 168");
    check(const_inputs(4, 1'b0) == 44, "4x4 CI 44");
    check(garbage_outputs(4, 1'b0) == 44, "4x4 GO 44");
    check(2 * 44 == eq_go_x2(4, 1'b0), "Eq.8 at n=4");
    costs(4); costs(6); costs(8); costs(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
