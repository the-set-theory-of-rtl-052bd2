// tb_rop: exhaustive check of radix-3 operators built from the generic operator: the
// default CG5.3, the super carry generator SCG8.4 and the partial adder PA4.2. Checks
// R*hi + lo = a + b and that each output stays inside its digit set.
module tb_rop;
  int checks = 0, failures = 0;
  logic [2:0] a, b;
  logic [2:0] hi [3], lo [3];

  localparam int DA [3] = '{3, 4, 2};
  localparam int DB [3] = '{2, 4, 2};
  localparam int DH [3] = '{1, 2, 0};
  localparam int DL [3] = '{2, 2, 4};

  rop dut0 (.a(a), .b(b), .hi(hi[0]), .lo(lo[0]));
  rop #(.R(3), .DA(4), .DB(4), .DH(2), .DL(2)) dut1 (.a(a), .b(b), .hi(hi[1]), .lo(lo[1]));
  rop #(.R(3), .DA(2), .DB(2), .DH(0), .DL(4)) dut2 (.a(a), .b(b), .hi(hi[2]), .lo(lo[2]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va <= 4; va++)
      for (int vb = 0; vb <= 4; vb++) begin
        a = 3'(va);
        b = 3'(vb);
        #1;
        for (int k = 0; k < 3; k++)
          if (va <= DA[k] && vb <= DB[k]) begin
            checks++;
            if (3 * int'(hi[k]) + int'(lo[k]) != va + vb || int'(hi[k]) > DH[k] || int'(lo[k]) > DL[k]) begin
              failures++;
              $display("FAIL op %0d %0d+%0d -> hi=%0d lo=%0d", k, va, vb, hi[k], lo[k]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
