// tb_elem_mult: all nine products of two <2^1> digits, including the rule that a zero
// product uses the all-zeros pattern.
module tb_elem_mult;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a, b, p;

  elem_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -1; va <= 1; va++)
      for (int vb = -1; vb <= 1; vb++) begin
        a = f2(1, va);
        b = f2(1, vb);
        #1;
        checks++;
        if (v2(1, p) != va * vb || (va * vb == 0 && p != 2'b00)) begin
          failures++;
          $display("FAIL %0d * %0d gave %b", va, vb, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
