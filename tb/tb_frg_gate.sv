// tb_frg_gate: exhaustive test of the Fredkin gate.
// For all 8 inputs it checks the controlled-swap behaviour (worked out here
// as "swap b and c when a is 1"), parity preservation, that the 8 outputs
// are all distinct (reversibility) and the AND on r when c = 0.
module tb_frg_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  frg_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> %0b%0b%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "p");
      check({q, r} == (a ? {c, b} : {b, c}), "swap");
      check((p ^ q ^ r) == (a ^ b ^ c), "parity");
      if (c == 1'b0) check(r == (a & b), "and");
      check(!seen[{p, q, r}], "bijection");
      seen[{p, q, r}] = 1'b1;
    end
    check(&seen, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
