// tb_sd_adder_r4: radix-4 signed-digit adder at its default width (8 digits). Random legal
// operands plus the two extreme cases (all digits +2, all digits -2). Checks that every
// result digit is a legal <4^2> pattern and that
//   sum z[i]*4^i + 4^N*(t2_out - t_out) = X + Y.
module tb_sd_adder_r4;
  import tb_stad_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  stad_pkg::sd4_t x [N], y [N], z [N];
  logic t_out, t2_out;

  sd_adder_r4 dut (.x(x), .y(y), .z(z), .t_out(t_out), .t2_out(t2_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(stad_pkg::sd4_t d [N]);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--) v = 4 * v + longint'(vsd4(d[i]));
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 20002; n++) begin
      longint got;
      bit bad;
      for (int i = 0; i < N; i++) begin
        case (n)
          0:       begin x[i] = 3'b010; y[i] = 3'b010; end   // +2
          1:       begin x[i] = 3'b100; y[i] = 3'b100; end   // -2
          default: begin x[i] = rnd_sd4(); y[i] = rnd_sd4(); end
        endcase
      end
      #1;
      bad = 0;
      for (int i = 0; i < N; i++) if (z[i].l == 2'b11) bad = 1;
      got = val(z) + (longint'(1) << (2 * N)) * (longint'(t2_out) - longint'(t_out));
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
