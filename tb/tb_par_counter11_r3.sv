// tb_par_counter11_r3: all 2048 input patterns of the radix-3 eleven-input counter; the
// output 9*y9 + 3*y3 + y1 must equal the number of ones, with ternary digits in 0..2.
module tb_par_counter11_r3;
  int checks = 0, failures = 0;
  logic [10:0] x;
  logic [1:0] y3, y1;
  logic y9;

  par_counter11_r3 dut (.x(x), .y9(y9), .y3(y3), .y1(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      x = 11'(i);
      #1;
      checks++;
      if (y3 == 2'b11 || y1 == 2'b11 || 9 * int'(y9) + 3 * int'(y3) + int'(y1) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y9=%b y3=%0d y1=%0d", x, y9, y3, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
