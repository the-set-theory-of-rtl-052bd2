// tb_full_adder_r2: exhaustive check of the four radix-2 full adder offset variants
// (carry, sum | a, b, d) = (0,0|0,0,0), (0,1|0,0,1), (1,0|0,1,1), (1,1|1,1,1).
module tb_full_adder_r2;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic a, b, d;
  logic [3:0] c, s;

  localparam int OC [4] = '{0, 0, 1, 1};
  localparam int OS [4] = '{0, 1, 0, 1};
  localparam int OA [4] = '{0, 0, 0, 1};
  localparam int OB [4] = '{0, 0, 1, 1};
  localparam int OD [4] = '{0, 1, 1, 1};

  for (genvar k = 0; k < 4; k++) begin : g_v
    full_adder_r2 #(.O_C(OC[k]), .O_S(OS[k]), .O_A(OA[k]), .O_B(OB[k]), .O_D(OD[k]))
      u (.a(a), .b(b), .d(d), .c(c[k]), .s(s[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, d} = 3'(i);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (2 * v1(OC[k], c[k]) + v1(OS[k], s[k]) != v1(OA[k], a) + v1(OB[k], b) + v1(OD[k], d)) begin
          failures++;
          $display("FAIL variant %0d in=%b c=%b s=%b", k, {a, b, d}, c[k], s[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
