// tb_sd_adder_r16: radix-16 signed-digit adder at its default width (8 digits). Random
// legal operands plus the extremes (all digits +10, all digits -10). Checks legal result
// patterns and  sum z[i]*16^i + 16^N * t_out = X + Y.
module tb_sd_adder_r16;
  import tb_stad_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  stad_pkg::sd16_t x [N], y [N], z [N];
  logic [1:0] t_out;

  sd_adder_r16 dut (.x(x), .y(y), .z(z), .t_out(t_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(stad_pkg::sd16_t d [N]);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--) v = 16 * v + longint'(vsd16(d[i]));
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 20002; n++) begin
      longint got;
      bit bad;
      for (int i = 0; i < N; i++) begin
        case (n)
          0:       begin x[i] = 6'b010010; y[i] = 6'b010010; end   // 8 + 2 = +10
          1:       begin x[i] = 6'b100100; y[i] = 6'b100100; end   // -8 - 2 = -10
          default: begin x[i] = rnd_sd16(); y[i] = rnd_sd16(); end
        endcase
      end
      #1;
      bad = (v2(1, t_out) == 99);
      for (int i = 0; i < N; i++) if (z[i].l0 == 2'b11 || z[i].l1 == 2'b11) bad = 1;
      got = val(z) + (longint'(1) << (4 * N)) * longint'(v2(1, t_out));
      checks++;
      if (bad || got != val(x) + val(y)) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d Y=%0d got %0d", val(x), val(y), got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
