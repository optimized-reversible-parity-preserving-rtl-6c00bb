// tb_e1_block: exhaustive test of the E1 block over all 16 inputs.
// Checks the three uses the multipliers rely on (two AND copies with
// c = d = 0, NAND with c = 1, half-adder sum ab ^ c with c a product),
// operand pass-through, parity preservation and reversibility.
module tb_e1_block;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  e1_block dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%0b%0b%0b%0b out=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(p == a && q == b, "pass");
      if (!c && !d) check(r == (a && b) && s == (a && b), "two ANDs");
      if (c && !d)  check(r == !(a && b) && s == (a && b), "NAND");
      if (!d)       check(r == ((a && b) != c), "half-adder sum");
      if (!c)       check(s == ((a && b) != d), "second copy");
      check((p ^ q ^ r ^ s) == (a ^ b ^ c ^ d), "parity");
      check(!seen[{p, q, r, s}], "bijection");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
