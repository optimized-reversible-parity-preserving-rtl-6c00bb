// tb_meam_block: exhaustive test of the MEAM block.
// Part 1 checks all 32 inputs for reversibility and parity preservation and
// the printed output equations. Part 2 uses the block as in the multiplier:
// for every 2-bit x and y, with the middle product bit made outside, MEAM
// must give product bits 0 and 2 and the carry into bit 3 of x*y.
module tb_meam_block;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  logic [31:0] seen;

  meam_block dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%0b%0b%0b%0b%0b out=%0b%0b%0b%0b%0b", what, a, b, c, d, e, p, q, r, s, t);
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
    logic [3:0] prod;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      check(p == (a ^ c), "p");
      check(r == (d ? c : a), "r");
      check(s == (d ? !c : a), "s");
      check(q == (r ^ b) && t == (r ^ e), "q,t");
      check((p ^ q ^ r ^ s ^ t) == (a ^ b ^ c ^ d ^ e), "parity");
      check(!seen[{p, q, r, s, t}], "bijection");
      seen[{p, q, r, s, t}] = 1'b1;
    end
    for (int v = 0; v < 16; v++) begin
      logic [1:0] x, y;
      {x, y} = 4'(v);
      prod = 4'(x * y);
      a = 1'b0; e = 1'b0;
      b = x[1] & y[1]; d = x[1] & y[1]; c = x[0] & y[0];
      #1;
      check(p == prod[0], "2x2 bit0");
      check(q == prod[2], "2x2 bit2");
      check(r == prod[3], "2x2 bit3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
