// tb_red_mult_r2: all 81 operand pairs of the two-digit redundant multiplier (digits -1..1,
// operands -3..3); the product digits must be legal <2^1> patterns whose weighted sum is
// the product.
module tb_red_mult_r2;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a [2], b [2], p [4];

  red_mult_r2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 81; i++) begin
      int a0, a1, b0, b1, got;
      bit bad;
      a0 = i % 3 - 1; a1 = (i / 3) % 3 - 1; b0 = (i / 9) % 3 - 1; b1 = i / 27 - 1;
      a[0] = f2(1, a0); a[1] = f2(1, a1); b[0] = f2(1, b0); b[1] = f2(1, b1);
      #1;
      got = 0;
      bad = 0;
      for (int k = 0; k < 4; k++) begin
        if (v2(1, p[k]) == 99) bad = 1;
        got += (1 << k) * v2(1, p[k]);
      end
      checks++;
      if (bad || got != (2 * a1 + a0) * (2 * b1 + b0)) begin
        failures++;
        $display("FAIL (%0d)*(%0d) got %0d", 2 * a1 + a0, 2 * b1 + b0, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
