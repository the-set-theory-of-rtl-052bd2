// tb_decimal_adder: every pair of legal digit patterns (12 x 12, several patterns per value)
// with both carry-in values: 10*cout + z = x + y + cin, and z is a legal <9^0> pattern.
module tb_decimal_adder;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] x, y, z;
  logic cin, cout;

  decimal_adder dut (.x(x), .y(y), .cin(cin), .z(z), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          x = 4'(i);
          y = 4'(j);
          cin = c[0];
          if (x[2:1] != 2'b11 && y[2:1] != 2'b11) begin
            #1;
            checks++;
            if (z[2:1] == 2'b11 || 10 * int'(cout) + vdec(z) != vdec(x) + vdec(y) + c) begin
              failures++;
              if (failures < 10) $display("FAIL %0d + %0d + %0d -> cout=%b z=%0d", vdec(x), vdec(y), c, cout, vdec(z));
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
