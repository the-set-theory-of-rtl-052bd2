// tb_pa21: exhaustive check of the four PA2.1 offset variants (000), (101), (110), (211).
// For every input pair the output must be a legal pattern of its digit set whose value is
// the sum of the input values.
module tb_pa21;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic a, b;
  logic [1:0] s [4];

  pa21 #(.O_S(0), .O_A(0), .O_B(0)) u0 (.a(a), .b(b), .s(s[0]));
  pa21 #(.O_S(1), .O_A(0), .O_B(1)) u1 (.a(a), .b(b), .s(s[1]));
  pa21 #(.O_S(1), .O_A(1), .O_B(0)) u2 (.a(a), .b(b), .s(s[2]));
  pa21 #(.O_S(2), .O_A(1), .O_B(1)) u3 (.a(a), .b(b), .s(s[3]));

  localparam int OA [4] = '{0, 0, 1, 1};
  localparam int OB [4] = '{0, 1, 0, 1};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (v2(OA[k] + OB[k], s[k]) != v1(OA[k], a) + v1(OB[k], b)) begin
          failures++;
          $display("FAIL variant %0d a=%b b=%b s=%b", k, a, b, s[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
