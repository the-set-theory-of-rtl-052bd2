// tb_rcg42: exhaustive check of six RCG4.2 offset variants: 2*carry + digit = a + b, and the
// digit output is a legal pattern. For RCG4.2(0000) it also checks the resolution of the
// coupled don't cares of the format-2 design: a ternary input of value 2 produces the carry
// (2+0 -> carry 1, digit 0), while 1+1 leaves carry 0 and digit 2.
module tb_rcg42;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a [6], b [6], s [6];
  logic [5:0] c;

  localparam int OC [6] = '{0, 0, 1, 1, 0, 1};
  localparam int OS [6] = '{0, 1, 0, 0, 2, 2};
  localparam int OA [6] = '{0, 0, 1, 2, 1, 2};
  localparam int OB [6] = '{0, 1, 1, 0, 1, 2};

  for (genvar k = 0; k < 6; k++) begin : g_v
    rcg42 #(.O_C(OC[k]), .O_S(OS[k]), .O_A(OA[k]), .O_B(OB[k]))
      u (.a(a[k]), .b(b[k]), .c(c[k]), .s(s[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++) begin
        for (int k = 0; k < 6; k++) begin
          a[k] = f2(OA[k], va - OA[k]);
          b[k] = f2(OB[k], vb - OB[k]);
        end
        #1;
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (v2(OS[k], s[k]) == 99 ||
              2 * v1(OC[k], c[k]) + v2(OS[k], s[k]) != v2(OA[k], a[k]) + v2(OB[k], b[k])) begin
            failures++;
            $display("FAIL variant %0d a=%b b=%b c=%b s=%b", k, a[k], b[k], c[k], s[k]);
          end
        end
        if (va + vb == 2) begin
          checks++;
          if ((va == 1) ? (c[0] !== 1'b0 || s[0] !== 2'b10) : (c[0] !== 1'b1 || s[0] !== 2'b00)) begin
            failures++;
            $display("FAIL RCG4.2(0000) don't-care choice a=%0d b=%0d c=%b s=%b", va, vb, c[0], s[0]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
