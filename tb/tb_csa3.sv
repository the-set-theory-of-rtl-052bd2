// tb_csa3: every accumulator state (27), addend (8) and carry-in (2). The new carry-save
// value sum + 8*cout must equal acc + x + cin, with legal ternary digits.
module tb_csa3;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] acc [3], sum [3];
  logic [2:0] x;
  logic cin, cout;

  csa3 dut (.acc(acc), .x(x), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 27; s++)
      for (int i = 0; i < 16; i++) begin
        int want, got;
        acc[0] = f2(0, s % 3);
        acc[1] = f2(0, (s / 3) % 3);
        acc[2] = f2(0, s / 9);
        {x, cin} = 4'(i);
        #1;
        want = (s % 3) + 2 * ((s / 3) % 3) + 4 * (s / 9) + int'(x) + int'(cin);
        got  = v2(0, sum[0]) + 2 * v2(0, sum[1]) + 4 * v2(0, sum[2]) + 8 * int'(cout);
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("FAIL acc=%0d x=%0d cin=%b got %0d", s, x, cin, got);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
