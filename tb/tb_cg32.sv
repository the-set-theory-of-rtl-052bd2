// tb_cg32: exhaustive check of six CG3.2 offset variants. For every legal input the
// outputs must satisfy 2*carry + sum = a + b (as values).
module tb_cg32;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a [6];
  logic b;
  logic [5:0] c, s;

  localparam int OC [6] = '{0, 0, 0, 1, 1, 1};
  localparam int OS [6] = '{0, 1, 1, 0, 0, 1};
  localparam int OA [6] = '{0, 0, 1, 1, 2, 2};
  localparam int OB [6] = '{0, 1, 0, 1, 0, 1};

  for (genvar k = 0; k < 6; k++) begin : g_v
    cg32 #(.O_C(OC[k]), .O_S(OS[k]), .O_A(OA[k]), .O_B(OB[k]))
      u (.a(a[k]), .b(b), .c(c[k]), .s(s[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 3; va++)
      for (int ib = 0; ib < 2; ib++) begin
        for (int k = 0; k < 6; k++) a[k] = f2(OA[k], va - OA[k]);
        b = ib[0];
        #1;
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (2 * v1(OC[k], c[k]) + v1(OS[k], s[k]) != v2(OA[k], a[k]) + v1(OB[k], b)) begin
            failures++;
            $display("FAIL variant %0d a=%b b=%b c=%b s=%b", k, a[k], b, c[k], s[k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
