// tb_r5_cg: all twelve legal inputs of the radix-5 carry generator; checks
// 5k + 2p + q = 4a + 2b + c, legal output patterns, and that the carry is taken exactly
// when the input value reaches 5.
module tb_r5_cg;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic a, c, k, p;
  logic [1:0] b, q;

  r5_cg dut (.a(a), .b(b), .c(c), .k(k), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 2; ia++)
      for (int vb = 0; vb < 3; vb++)
        for (int ic = 0; ic < 2; ic++) begin
          int v;
          a = ia[0];
          b = f2(0, vb);
          c = ic[0];
          v = 4 * ia + 2 * vb + ic;
          #1;
          checks++;
          if (v2(0, q) == 99 || 5 * int'(k) + 2 * int'(p) + v2(0, q) != v || k != (v >= 5)) begin
            failures++;
            $display("FAIL v=%0d k=%b p=%b q=%b", v, k, p, q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
