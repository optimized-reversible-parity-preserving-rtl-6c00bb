// tb_mult_signed: end-to-end test of the signed (two's complement)
// multiplier at N = 5 (default), 3 and 7, every operand pair.
// Checks the product against signed integer multiplication and the parity
// rule ^{x,y} == ^{p,garbage}; then the structure counts against the design:
// for 5x5 quantum cost 286 and 79 constant inputs and 79 garbage outputs
// (comparison table), and for every odd size from 5 up the block counts
// ((N-1)^2+3 E1, 2N-4 FRG, floor(N/2) MEAM, (N-1)^2 ZPLG) and equations (9)
// and (10). Equation (11) for garbage outputs is checked at N = 5, the only
// odd size where it equals the constant-input count that a reversible
// circuit with 2N inputs and 2N outputs must have. At N = 3 the Fredkin row
// falls on row y[1], so only the products are checked there.
module tb_mult_signed;
  import rpm_pkg::*;
  int checks = 0, failures = 0;
  int neg = 0, extreme = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic signed [4:0] x5, y5; logic signed [9:0]  p5;
  logic signed [2:0] x3, y3; logic signed [5:0]  p3;
  logic signed [6:0] x7, y7; logic signed [13:0] p7;
  logic [5*5+10+4+3*16-1:0] g5;
  logic [3*3+6+2+3*4-1:0]   g3;
  logic [7*7+14+6+3*36-1:0] g7;

  mult_signed dut5 (.x(x5), .y(y5), .p(p5), .garbage(g5));
  mult_signed #(.N(3)) dut3 (.x(x3), .y(y3), .p(p3), .garbage(g3));
  mult_signed #(.N(7)) dut7 (.x(x7), .y(y7), .p(p7), .garbage(g7));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic costs(input int n);
    check(count_frg(n, 1'b1) == 2 * n - 4, $sformatf("FRG count n=%0d", n));
    check(count_e1(n, 1'b1) == (n - 1) * (n - 1) + 3, $sformatf("E1 count n=%0d", n));
    check(count_kind(n, 1'b1, K_E1_NAND) == 2 * n - 2, $sformatf("NAND count n=%0d", n));
    check(n_groups(n, 1'b1) == n / 2, $sformatf("MEAM count n=%0d", n));
    check(total_fa(n, 1'b1) == (n - 1) * (n - 1), $sformatf("ZPLG count n=%0d", n));
    check(2 * quantum_cost(n, 1'b1) == eq_qc_x2(n, 1'b1), $sformatf("Eq.9 n=%0d", n));
    check(2 * const_inputs(n, 1'b1) == eq_ci_x2(n, 1'b1), $sformatf("Eq.10 n=%0d", n));
    check(garbage_outputs(n, 1'b1) == const_inputs(n, 1'b1), $sformatf("GO==CI n=%0d", n));
    $display("signed %0dx%0d: QC=%0d CI=%0d GO=%0d (Eq.11 gives %0d)", n, n,
             quantum_cost(n, 1'b1), const_inputs(n, 1'b1), garbage_outputs(n, 1'b1),
             eq_go_x2(n, 1'b1) / 2);
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      check(p5 == 10'(int'(x5) * int'(y5)), $sformatf("5x5 %0d*%0d got %0d", x5, y5, p5));
      check((^{x5, y5}) == (^{p5, g5}), "5x5 parity");
      if (p5 < 0) neg++;
      if (x5 == -16 && y5 == -16) extreme++;
    end
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v);
      #1;
      check(p3 == 6'(int'(x3) * int'(y3)), $sformatf("3x3 %0d*%0d got %0d", x3, y3, p3));
      check((^{x3, y3}) == (^{p3, g3}), "3x3 parity");
    end
    for (int v = 0; v < 16384; v++) begin
      {x7, y7} = 14'(v);
      #1;
      check(p7 == 14'(int'(x7) * int'(y7)), $sformatf("7x7 %0d*%0d got %0d", x7, y7, p7));
      check((^{x7, y7}) == (^{p7, g7}), "7x7 parity");
    end
    check(neg > 0 && extreme == 1, "negative and most-negative products exercised");
    check(quantum_cost(5, 1'b1) == 286, "5x5 QC 286");
    check(const_inputs(5, 1'b1) == 79, "5x5 CI 79");
    check(garbage_outputs(5, 1'b1) == 79, "5x5 GO 79");
    check(2 * 79 == eq_go_x2(5, 1'b1), "Eq.11 at n=5");
    costs(5); costs(7); costs(9); costs(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
