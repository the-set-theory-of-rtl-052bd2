// tb_sd_adder_even: the general even-radix signed-digit adder at its defaults (radix 4,
// 8 digits) and at radix 16 (4 digits). Random digit codes plus all-maximum and all-minimum
// words; checks every result code lies in 0..R and
//   sum (z[i]-R/2)*R^i + R^N*(t2_out - t_out) = X + Y.
module tb_sd_adder_even;
  int checks = 0, failures = 0;
  localparam int N1 = 8, W1 = 3;
  localparam longint R1 = 4, H1 = 2;
  localparam int N2 = 4, W2 = 5;
  localparam longint R2 = 16, H2 = 8;

  logic [W1-1:0] x1 [N1], y1 [N1], z1 [N1];
  logic [W2-1:0] x2 [N2], y2 [N2], z2 [N2];
  logic t1, t21, t2o, t22;

  sd_adder_even dut1 (.x(x1), .y(y1), .z(z1), .t_out(t1), .t2_out(t21));
  sd_adder_even #(.R(16), .N(4)) dut2 (.x(x2), .y(y2), .z(z2), .t_out(t2o), .t2_out(t22));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10002; n++) begin
      longint vx, vy, vz;
      bit bad;
      for (int i = 0; i < N1; i++) begin
        x1[i] = (n == 0) ? W1'(R1) : (n == 1) ? '0 : W1'($urandom_range(0, 4));
        y1[i] = (n == 0) ? W1'(R1) : (n == 1) ? '0 : W1'($urandom_range(0, 4));
      end
      for (int i = 0; i < N2; i++) begin
        x2[i] = (n == 0) ? W2'(R2) : (n == 1) ? '0 : W2'($urandom_range(0, 16));
        y2[i] = (n == 0) ? W2'(R2) : (n == 1) ? '0 : W2'($urandom_range(0, 16));
      end
      #1;
      vx = 0; vy = 0; vz = 0; bad = 0;
      for (int i = N1 - 1; i >= 0; i--) begin
        vx = R1 * vx + longint'(x1[i]) - H1;
        vy = R1 * vy + longint'(y1[i]) - H1;
        vz = R1 * vz + longint'(z1[i]) - H1;
        if (z1[i] > W1'(R1)) bad = 1;
      end
      vz += (longint'(1) << (2 * N1)) * (longint'(t21) - longint'(t1));
      checks++;
      if (bad || vz != vx + vy) begin
        failures++;
        if (failures < 10) $display("FAIL radix 4: %0d + %0d got %0d", vx, vy, vz);
      end
      vx = 0; vy = 0; vz = 0; bad = 0;
      for (int i = N2 - 1; i >= 0; i--) begin
        vx = R2 * vx + longint'(x2[i]) - H2;
        vy = R2 * vy + longint'(y2[i]) - H2;
        vz = R2 * vz + longint'(z2[i]) - H2;
        if (z2[i] > W2'(R2)) bad = 1;
      end
      vz += (longint'(1) << (4 * N2)) * (longint'(t22) - longint'(t2o));
      checks++;
      if (bad || vz != vx + vy) begin
        failures++;
        if (failures < 10) $display("FAIL radix 16: %0d + %0d got %0d", vx, vy, vz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
