// tb_srcg12_6: every legal operand pair of the radix-4 super redundant carry generator
// (9 x 9 digit combinations): 4*h + 2*l1 + l0 = (2*a1 + a0) + (2*b1 + b0), legal ternary
// patterns, and both outputs inside their digit sets.
module tb_srcg12_6;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a1, a0, b1, b0, h, l0;
  logic l1;

  srcg12_6 dut (.a1(a1), .a0(a0), .b1(b1), .b0(b0), .h(h), .l1(l1), .l0(l0));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 81; i++) begin
      int want, got;
      a0 = f2(0, i % 3); a1 = f2(0, (i / 3) % 3); b0 = f2(0, (i / 9) % 3); b1 = f2(0, i / 27);
      #1;
      want = 2 * (i / 3 % 3) + i % 3 + 2 * (i / 27) + (i / 9) % 3;
      got  = 4 * v2(0, h) + 2 * int'(l1) + v2(0, l0);
      checks++;
      if (v2(0, h) == 99 || v2(0, l0) == 99 || got != want) begin
        failures++;
        $display("FAIL want %0d got %0d (h=%b l1=%b l0=%b)", want, got, h, l1, l0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
