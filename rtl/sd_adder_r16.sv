// sd_adder_r16: two-stage radix-16 signed-digit adder with <20^10> digits (values -10..10).
//
// The extra redundancy of <20^10> (radix 16 would need only <16^8>) lets the addition
// finish in two stages per digit:
//   stage 1  16<2^1> + <16^8>  <=  x + y      digit sum -20..20 -> transfer t in {-1,0,1}
//                                             and interim digit w in -8..8
//   stage 2  <20^10>  <=  w + t(from below)   result digit -9..9
// Digits are held as 8<1^1> + 4<2^0> + 2<1^1> + <2^0> (struct sd16_t); the interim digit as
// 8<1^1> + 4<1^0> + 2<1^0> + <2^0> and the transfer as one <2^1> field.
// Neither stage has equal diminished cardinality on both sides, so each takes constant-zero
// mythical digits chosen by the mythical-input algorithm: 4<2^1> in stage 1, <2^1> in stage
// 2. Both stages are decomposed (by this design) into binary operators:
//   stage 1  w1: RCG4.2(0000)  w2: full adder (1|1,1,0)  w4: RCG4.2(0000), RCG4.2(0101),
//            CG3.2(1011)  w8: PA2.1(211), PA2.1(000), RCG4.2(1020), CG3.2(0101)
//            w16: PA2.1(101) -> t
//   stage 2  w1: RCG4.2(0101), RCG4.2(1011)  w2: full adder (0|1, 0,0,1)  w4: PA2.1(000)
//            w8: the <1^1> bit passes
// Value identity: sum z[i]*16^i + 16^N * t_out = X + Y. Transfer into digit 0 is zero.
// Purely combinational.
module sd_adder_r16 #(
  parameter int unsigned N = 8   // digits per operand
) (
  input  stad_pkg::sd16_t x [N],
  input  stad_pkg::sd16_t y [N],
  output stad_pkg::sd16_t z [N],
  output logic [1:0]      t_out   // <2^1>, weight 16^N
);
  localparam logic [1:0] MYTH = 2'b00;   // mythical <2^1> input, always zero

  logic [1:0] t [N+1];   // t[i+1]: <2^1> transfer out of digit i
  assign t[0] = 2'b00;

  for (genvar i = 0; i < N; i++) begin : g_dig
    logic [1:0] w0, a, b, d, e, g;
    logic       c1, c2, c3, c4, c5, f, h, w1, w2, w3;
    logic [1:0] s;
    logic       k1, k2, k3;

    // ---- stage 1: x + y -> 16 t + w
    // weight 1
    rcg42 u_s1_w1 (.a(x[i].l0), .b(y[i].l0), .c(c1), .s(w0));
    // weight 2
    full_adder_r2 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1), .O_D(0))
      u_s1_w2 (.a(x[i].h0), .b(y[i].h0), .d(c1), .c(c2), .s(w1));
    // weight 4 (with the mythical digit)
    rcg42 u_s1_w4a (.a(x[i].l1), .b(y[i].l1), .c(c3), .s(a));
    rcg42 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_s1_w4b (.a(a), .b(MYTH), .c(c4), .s(b));
    cg32  #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_s1_w4c (.a(b), .b(c2), .c(c5), .s(w2));
    // weight 8
    pa21  #(.O_S(2), .O_A(1), .O_B(1)) u_s1_w8a (.a(x[i].h1), .b(y[i].h1), .s(d));
    pa21  u_s1_w8b (.a(c3), .b(c4), .s(e));
    rcg42 #(.O_C(1), .O_S(0), .O_A(2), .O_B(0)) u_s1_w8c (.a(d), .b(e), .c(f), .s(g));
    cg32  #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_s1_w8d (.a(g), .b(c5), .c(h), .s(w3));
    // weight 16
    pa21  #(.O_S(1), .O_A(0), .O_B(1)) u_s1_w16 (.a(h), .b(f), .s(t[i+1]));

    // ---- stage 2: w + t(from below) -> z
    rcg42 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_s2_w1a (.a(w0), .b(t[i]), .c(k1), .s(s));
    rcg42 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_s2_w1b (.a(s), .b(MYTH), .c(k2), .s(z[i].l0));
    full_adder_r2 #(.O_C(0), .O_S(1), .O_A(0), .O_B(0), .O_D(1))
      u_s2_w2 (.a(w1), .b(k1), .d(k2), .c(k3), .s(z[i].h0));
    pa21  u_s2_w4 (.a(w2), .b(k3), .s(z[i].l1));
    assign z[i].h1 = w3;
  end

  assign t_out = t[N];
endmodule
