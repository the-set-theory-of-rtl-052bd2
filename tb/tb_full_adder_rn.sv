// tb_full_adder_rn: exhaustive test of the radix-R full adder at its default radix 4 and at
// radices 3, 10 and 16: every a, b in 0..R-1 and both carry-ins, checking
// R*cout + s = a + b + cin with s in 0..R-1.
module tb_full_adder_rn;
  int checks = 0, failures = 0;

  logic [1:0] a4, b4, s4;
  logic [1:0] a3, b3, s3;
  logic [3:0] a10, b10, s10, a16, b16, s16;
  logic       cin, c4, c3, c10, c16;

  full_adder_rn                        u4  (.a(a4),  .b(b4),  .cin(cin), .cout(c4),  .s(s4));
  full_adder_rn #(.R(3))               u3  (.a(a3),  .b(b3),  .cin(cin), .cout(c3),  .s(s3));
  full_adder_rn #(.R(10))              u10 (.a(a10), .b(b10), .cin(cin), .cout(c10), .s(s10));
  full_adder_rn #(.R(16))              u16 (.a(a16), .b(b16), .cin(cin), .cout(c16), .s(s16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int r, int x, int y, int ci, int co, int sum);
    checks++;
    if (sum >= r || r * co + sum != x + y + ci) begin
      failures++;
      if (failures < 10) $display("FAIL radix %0d: %0d + %0d + %0d gave carry %0d digit %0d", r, x, y, ci, co, sum);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a4 = 2'(x % 4); b4 = 2'(y % 4); a3 = 2'(x % 3); b3 = 2'(y % 3);
          a10 = 4'(x % 10); b10 = 4'(y % 10); a16 = 4'(x); b16 = 4'(y);
          cin = 1'(ci);
          #1;
          if (x < 4 && y < 4)   check(4, x, y, ci, int'(c4), int'(s4));
          if (x < 3 && y < 3)   check(3, x, y, ci, int'(c3), int'(s3));
          if (x < 10 && y < 10) check(10, x, y, ci, int'(c10), int'(s10));
          check(16, x, y, ci, int'(c16), int'(s16));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
