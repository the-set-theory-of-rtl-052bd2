// tb_red_mult_rn: the N-digit redundant multiplier at its default N = 4 with random operand
// digits (plus all-(+1) and all-(-1) operands), and exhaustively at N = 2 (all 3^4 patterns
// of the four operand digits). Products are decoded with the testbench's own
// <2^1> table and compared with integer multiplication; every product digit must be a legal
// pattern.
module tb_red_mult_rn;
  import tb_stad_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0] a4 [4], b4 [4], p4 [8];
  logic [1:0] a2 [2], b2 [2], p2 [4];

  red_mult_rn          u4 (.a(a4), .b(b4), .p(p4));
  red_mult_rn #(.N(2)) u2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int want, int got, bit bad, string tag);
    checks++;
    if (bad || got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s want %0d got %0d", tag, want, got);
    end
  endtask

  initial begin
    int va, vb, got;
    bit bad;
    // exhaustive N = 2: x enumerates the four operand digits
    for (int x = 0; x < 81; x++) begin
      a2[0] = f2(1, x % 3 - 1);       a2[1] = f2(1, (x / 3) % 3 - 1);
      b2[0] = f2(1, (x / 9) % 3 - 1); b2[1] = f2(1, (x / 27) % 3 - 1);
      #1;
      va = 2 * v2(1, a2[1]) + v2(1, a2[0]);
      vb = 2 * v2(1, b2[1]) + v2(1, b2[0]);
      got = 0; bad = 0;
      for (int k = 0; k < 4; k++) begin
        if (v2(1, p2[k]) == 99) bad = 1;
        else got += (1 << k) * v2(1, p2[k]);
      end
      check(va * vb, got, bad, "N=2");
    end
    // random N = 4
    for (int n = 0; n < 20000; n++) begin
      for (int j = 0; j < 4; j++) begin
        a4[j] = (n == 0) ? f2(1, 1) : (n == 1) ? f2(1, -1) : f2(1, int'($urandom_range(0, 2)) - 1);
        b4[j] = (n == 0) ? f2(1, 1) : (n == 1) ? f2(1, 1)  : f2(1, int'($urandom_range(0, 2)) - 1);
      end
      #1;
      va = 0; vb = 0;
      for (int j = 3; j >= 0; j--) begin
        va = 2 * va + v2(1, a4[j]);
        vb = 2 * vb + v2(1, b4[j]);
      end
      got = 0; bad = 0;
      for (int k = 0; k < 8; k++) begin
        if (v2(1, p4[k]) == 99) bad = 1;
        else got += (1 << k) * v2(1, p4[k]);
      end
      check(va * vb, got, bad, "N=4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
