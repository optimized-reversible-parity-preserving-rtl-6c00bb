// tb_zplg_block: exhaustive test of the ZPLG full adder over all 32 inputs.
// Checks sum and carry against a + b + ci (with the constant inputs XORed
// in), parity preservation and reversibility.
module tb_zplg_block;
  logic ks, kc, a, b, ci, g1, carry, sum, g2, g3;
  int checks = 0, failures = 0;
  logic [31:0] seen;

  zplg_block dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%0b%0b%0b%0b%0b", what, ks, kc, a, b, ci);
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
    int tot;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {ks, kc, a, b, ci} = 5'(v);
      #1;
      tot = int'(a) + int'(b) + int'(ci);
      check(sum == (tot[0] ^ ks), "sum");
      check(carry == (tot[1] ^ kc), "carry");
      check((g1 ^ carry ^ sum ^ g2 ^ g3) == (ks ^ kc ^ a ^ b ^ ci), "parity");
      check(!seen[{g1, carry, sum, g2, g3}], "bijection");
      seen[{g1, carry, sum, g2, g3}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
