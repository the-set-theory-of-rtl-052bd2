// tb_par_counter11: all 2048 input patterns of the radix-2 eleven-input counter; the output
// 4*y4 + 2*y2 + y1 must equal the number of ones, with a legal ternary digit y4.
module tb_par_counter11;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] x;
  logic [1:0] y4;
  logic y2, y1;

  par_counter11 dut (.x(x), .y4(y4), .y2(y2), .y1(y1));

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
      if (v2(0, y4) == 99 || 4 * v2(0, y4) + 2 * int'(y2) + int'(y1) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y4=%b y2=%b y1=%b", x, y4, y2, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
