// tb_stad_top: end-to-end test of every structure in stad_top at its default sizes.
//
// Each round drives all eleven circuits with fresh random legal operands (with some rounds
// forced to extremes) and checks each result against integer arithmetic. It also counts how
// often each mechanism of the designs occurred and fails if one never did:
//   counter full scale (11 ones), radix-3 counter using its weight-9 digit, carry-save
//   carry-out, radix-4 negative transfer t and positive transfer t2 leaving the word,
//   radix-16 transfer of +1 and of -1 leaving the word, multiplier products +9 and -9,
//   decimal carry-out, an RCG4.2 coupled don't care (inputs 1+1) inside the counter, and a
//   super carry of value 2 from the radix-4 super redundant carry generator, and both
//   transfers leaving the radix-8 general signed-digit adder, a carry out of the radix-4
//   full adder, and the largest product +225 of the four-digit multiplier.
module tb_stad_top;
  import tb_stad_pkg::*;
  localparam int N4 = 8, N16 = 8, NR = 4, ROUNDS = 20000;
  localparam longint RR = 8, HR = 4;
  int checks = 0, failures = 0;

  logic [10:0] pc2_x, pc3_x;
  logic [1:0]  pc2_y4, pc3_y3, pc3_y1;
  logic        pc2_y2, pc2_y1, pc3_y9;
  logic [1:0]  csa_acc [3], csa_sum [3];
  logic [2:0]  csa_x;
  logic        csa_cin, csa_cout;
  stad_pkg::sd4_t  sd4_x [N4], sd4_y [N4], sd4_z [N4];
  logic            sd4_t_out, sd4_t2_out;
  stad_pkg::sd16_t sd16_x [N16], sd16_y [N16], sd16_z [N16];
  logic [1:0]      sd16_t_out;
  logic [1:0]  mul_a [2], mul_b [2], mul_p [4];
  stad_pkg::dec_t dec_x, dec_y, dec_z;
  logic        dec_cin, dec_cout;
  logic [1:0]  srcg_a1, srcg_a0, srcg_b1, srcg_b0, srcg_h, srcg_l0;
  logic        srcg_l1;
  logic [3:0]  sdr_x [NR], sdr_y [NR], sdr_z [NR];
  logic        sdr_t_out, sdr_t2_out;
  logic [1:0]  fa_a, fa_b, fa_s;
  logic        fa_cin, fa_cout;
  logic [1:0]  muln_a [4], muln_b [4], muln_p [8];

  stad_top dut (.*);

  // mechanism counters
  int n_full, n_r3w9, n_csaco, n_sd4t, n_sd4t2, n_sd16p, n_sd16n, n_mulp9, n_muln9, n_decco, n_kdc, n_sc2, n_sdrt, n_sdrt2, n_facout, n_mulnmax;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint vx, vy, vz;
    int want, got;
    int a0, a1, b0, b1;
    for (int n = 0; n < ROUNDS; n++) begin
      bit ext;
      ext = (n % 97 == 0);
      // parallel counters
      pc2_x = (n % 50 == 0) ? 11'h7ff : 11'($urandom);
      pc3_x = (n % 50 == 1) ? 11'h7ff : 11'($urandom);
      // carry save adder
      foreach (csa_acc[i]) csa_acc[i] = rnd2(0);
      csa_x = 3'($urandom);
      csa_cin = 1'($urandom);
      // signed-digit adders
      for (int i = 0; i < N4; i++) begin
        sd4_x[i] = ext ? ((n % 2 == 1) ? 3'b100 : 3'b010) : rnd_sd4();
        sd4_y[i] = ext ? ((n % 2 == 1) ? 3'b100 : 3'b010) : rnd_sd4();
      end
      for (int i = 0; i < N16; i++) begin
        sd16_x[i] = ext ? ((n % 2 == 1) ? 6'b100100 : 6'b010010) : rnd_sd16();
        sd16_y[i] = ext ? ((n % 2 == 1) ? 6'b100100 : 6'b010010) : rnd_sd16();
      end
      // multiplier
      a0 = int'($urandom_range(0, 2)) - 1; a1 = int'($urandom_range(0, 2)) - 1;
      b0 = int'($urandom_range(0, 2)) - 1; b1 = int'($urandom_range(0, 2)) - 1;
      mul_a[0] = f2(1, a0); mul_a[1] = f2(1, a1); mul_b[0] = f2(1, b0); mul_b[1] = f2(1, b1);
      // decimal adder
      dec_x = rnd_dec();
      dec_y = rnd_dec();
      dec_cin = 1'($urandom);
      // super redundant carry generator
      srcg_a1 = rnd2(0); srcg_a0 = rnd2(0); srcg_b1 = rnd2(0); srcg_b0 = rnd2(0);
      // four-digit multiplier: every 89th round all digits +1
      for (int j = 0; j < 4; j++) begin
        muln_a[j] = (n % 89 == 0) ? f2(1, 1) : f2(1, int'($urandom_range(0, 2)) - 1);
        muln_b[j] = (n % 89 == 0) ? f2(1, 1) : f2(1, int'($urandom_range(0, 2)) - 1);
      end
      // radix-4 full adder
      fa_a = 2'($urandom); fa_b = 2'($urandom); fa_cin = 1'($urandom);
      // general even-radix adder (digit codes 0..8, value = code - 4)
      for (int i = 0; i < NR; i++) begin
        sdr_x[i] = ext ? ((n % 2 == 1) ? 4'd8 : 4'd0) : 4'($urandom_range(0, 8));
        sdr_y[i] = ext ? ((n % 2 == 1) ? 4'd8 : 4'd0) : 4'($urandom_range(0, 8));
      end
      #1;

      // radix-2 counter
      got = 4 * v2(0, pc2_y4) + 2 * int'(pc2_y2) + int'(pc2_y1);
      check(got == $countones(pc2_x), $sformatf("pc2 x=%b got %0d", pc2_x, got));
      if ($countones(pc2_x) == 11) n_full++;
      if (dut.u_pc2.p[0] == 2'b01 && dut.u_pc2.p[1] == 2'b01) n_kdc++;
      // radix-3 counter
      got = 9 * int'(pc3_y9) + 3 * int'(pc3_y3) + int'(pc3_y1);
      check(got == $countones(pc3_x) && pc3_y3 != 2'b11 && pc3_y1 != 2'b11,
            $sformatf("pc3 x=%b got %0d", pc3_x, got));
      if (pc3_y9) n_r3w9++;
      // carry save adder
      want = v2(0, csa_acc[0]) + 2 * v2(0, csa_acc[1]) + 4 * v2(0, csa_acc[2]) + int'(csa_x) + int'(csa_cin);
      got  = v2(0, csa_sum[0]) + 2 * v2(0, csa_sum[1]) + 4 * v2(0, csa_sum[2]) + 8 * int'(csa_cout);
      check(got == want, $sformatf("csa want %0d got %0d", want, got));
      if (csa_cout) n_csaco++;
      // radix-4 SD adder
      vx = 0; vy = 0; vz = 0;
      for (int i = N4 - 1; i >= 0; i--) begin
        vx = 4 * vx + longint'(vsd4(sd4_x[i]));
        vy = 4 * vy + longint'(vsd4(sd4_y[i]));
        vz = 4 * vz + longint'(vsd4(sd4_z[i]));
      end
      vz += (longint'(1) << (2 * N4)) * (longint'(sd4_t2_out) - longint'(sd4_t_out));
      check(vz == vx + vy, $sformatf("sd4 %0d + %0d got %0d", vx, vy, vz));
      if (sd4_t_out) n_sd4t++;
      if (sd4_t2_out) n_sd4t2++;
      // radix-16 SD adder
      vx = 0; vy = 0; vz = 0;
      for (int i = N16 - 1; i >= 0; i--) begin
        vx = 16 * vx + longint'(vsd16(sd16_x[i]));
        vy = 16 * vy + longint'(vsd16(sd16_y[i]));
        vz = 16 * vz + longint'(vsd16(sd16_z[i]));
      end
      vz += (longint'(1) << (4 * N16)) * longint'(v2(1, sd16_t_out));
      check(vz == vx + vy, $sformatf("sd16 %0d + %0d got %0d", vx, vy, vz));
      if (v2(1, sd16_t_out) == 1) n_sd16p++;
      if (v2(1, sd16_t_out) == -1) n_sd16n++;
      // multiplier
      want = (2 * a1 + a0) * (2 * b1 + b0);
      got = 0;
      for (int k = 0; k < 4; k++) got += (1 << k) * v2(1, mul_p[k]);
      check(got == want, $sformatf("mul want %0d got %0d", want, got));
      if (want == 9) n_mulp9++;
      if (want == -9) n_muln9++;
      // decimal adder
      want = vdec(dec_x) + vdec(dec_y) + int'(dec_cin);
      got  = 10 * int'(dec_cout) + vdec(dec_z);
      check(got == want && dec_z.b != 2'b11, $sformatf("dec want %0d got %0d", want, got));
      if (dec_cout) n_decco++;
      // super redundant carry generator
      want = 2 * v2(0, srcg_a1) + v2(0, srcg_a0) + 2 * v2(0, srcg_b1) + v2(0, srcg_b0);
      got  = 4 * v2(0, srcg_h) + 2 * int'(srcg_l1) + v2(0, srcg_l0);
      check(got == want && srcg_h != 2'b11 && srcg_l0 != 2'b11, $sformatf("srcg want %0d got %0d", want, got));
      if (srcg_h == 2'b10) n_sc2++;
      // general even-radix adder
      vx = 0; vy = 0; vz = 0;
      begin
        bit bad;
        bad = 0;
        for (int i = NR - 1; i >= 0; i--) begin
          vx = RR * vx + longint'(sdr_x[i]) - HR;
          vy = RR * vy + longint'(sdr_y[i]) - HR;
          vz = RR * vz + longint'(sdr_z[i]) - HR;
          if (sdr_z[i] > 4'd8) bad = 1;
        end
        vz += (longint'(1) << (3 * NR)) * (longint'(sdr_t2_out) - longint'(sdr_t_out));
        check(!bad && vz == vx + vy, $sformatf("sdr %0d + %0d got %0d", vx, vy, vz));
      end
      if (sdr_t_out) n_sdrt++;
      if (sdr_t2_out) n_sdrt2++;
      // radix-4 full adder
      want = int'(fa_a) + int'(fa_b) + int'(fa_cin);
      got  = 4 * int'(fa_cout) + int'(fa_s);
      check(got == want, $sformatf("fa want %0d got %0d", want, got));
      if (fa_cout) n_facout++;
      // four-digit multiplier
      begin
        int ma, mb, mp;
        bit bad;
        ma = 0; mb = 0; mp = 0; bad = 0;
        for (int j = 3; j >= 0; j--) begin
          ma = 2 * ma + v2(1, muln_a[j]);
          mb = 2 * mb + v2(1, muln_b[j]);
        end
        for (int k = 7; k >= 0; k--) begin
          if (v2(1, muln_p[k]) == 99) bad = 1;
          else mp = 2 * mp + v2(1, muln_p[k]);
        end
        check(!bad && mp == ma * mb, $sformatf("muln want %0d got %0d", ma * mb, mp));
        if (ma * mb == 225) n_mulnmax++;
      end
    end

    $display("mechanisms: pc2_full=%0d pc3_w9=%0d csa_cout=%0d sd4_t=%0d sd4_t2=%0d sd16_t+=%0d sd16_t-=%0d mul+9=%0d mul-9=%0d dec_cout=%0d rcg_dontcare=%0d srcg_super2=%0d sdr_t=%0d sdr_t2=%0d fa_cout=%0d muln_225=%0d",
             n_full, n_r3w9, n_csaco, n_sd4t, n_sd4t2, n_sd16p, n_sd16n, n_mulp9, n_muln9, n_decco, n_kdc, n_sc2,
             n_sdrt, n_sdrt2, n_facout, n_mulnmax);
    check(n_full > 0, "counter never reached 11");
    check(n_r3w9 > 0, "radix-3 counter never used weight 9");
    check(n_csaco > 0, "carry save adder never carried out");
    check(n_sd4t > 0, "radix-4 adder never sent t out");
    check(n_sd4t2 > 0, "radix-4 adder never sent t2 out");
    check(n_sd16p > 0, "radix-16 adder never sent +1 out");
    check(n_sd16n > 0, "radix-16 adder never sent -1 out");
    check(n_mulp9 > 0, "multiplier never produced +9");
    check(n_muln9 > 0, "multiplier never produced -9");
    check(n_decco > 0, "decimal adder never carried out");
    check(n_kdc > 0, "RCG4.2 coupled don't care never exercised");
    check(n_sc2 > 0, "super carry of 2 never produced");
    check(n_sdrt > 0, "radix-8 adder never sent t out");
    check(n_sdrt2 > 0, "radix-8 adder never sent t2 out");
    check(n_facout > 0, "radix-4 full adder never carried out");
    check(n_mulnmax > 0, "four-digit multiplier never produced 225");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
