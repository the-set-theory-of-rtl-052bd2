// sd_adder_r4: radix-4 signed-digit adder with <4^2> digits (values -2..2).
//
// Each digit is held as 2<1^1> + <2^0> (struct sd4_t). Every digit position evaluates three
// decomposition equations, so no carry travels more than two positions and the delay is
// independent of the word length N:
//   1  4<1^1> + 2<1^0> + <2^0>  <=  x + y
//      the digit sum (-4..4) becomes a transfer t in {-1,0} to the next position and an
//      interim digit w in 0..4;
//   2  4<1^0> + 2<1^1> + <1^0>  <=  w + t(from below)     [plus a zero mythical input]
//      the sum (-1..4) becomes a second transfer t2 in {0,1} and a remainder r in -2..1;
//   3  2<1^1> + <2^0>  <=  r + t2(from below)
//      giving the result digit, again in -2..2.
// Equation 2 has a wider output than input; a constant-zero mythical digit <2^1> at
// weight 1 (the choice of the mythical-input algorithm, and the <(r-2)^(r/2-1)> term of the
// general even-radix adder at r = 4, see sd_adder_even) makes it decomposable. Binary
// operators per digit (this design's decomposition of the three equations):
//   eq 1  RCG4.2(0000) on the low ternary digits; a full adder 2<1^1>+<1^0> <= <1^1>+<1^1>+<1^0>
//         on the two high bits and that carry
//   eq 2  RCG4.2(0101) with the mythical digit; CG3.2(1011) with t; a full adder
//         2<1^0>+<1^1> <= <1^0>+<1^0>+<1^1> at weight 2
//   eq 3  PA2.1(000) at weight 1; the weight-2 bit passes straight through
// The value identity is  sum z[i]*4^i + 4^N*(t2_out - t_out) = X + Y, with t_out = 1 meaning
// -1. Transfers into digit 0 are zero, so digit 0 of the result never takes the value +2
// and the upper bit of its ternary field stays 0 (it is kept for a uniform digit format).
// Purely combinational.
module sd_adder_r4 #(
  parameter int unsigned N = 8   // digits per operand
) (
  input  stad_pkg::sd4_t x [N],
  input  stad_pkg::sd4_t y [N],
  output stad_pkg::sd4_t z [N],
  output logic           t_out,   // <1^1>, weight 4^N: 1 means -1
  output logic           t2_out   // <1^0>, weight 4^N
);
  localparam logic [1:0] MYTH = 2'b00;   // mythical <2^1> input, always zero

  logic [N:0] t;    // t[i+1]: <1^1> transfer out of digit i
  logic [N:0] t2;   // t2[i+1]: <1^0> transfer out of digit i
  assign t[0]  = 1'b0;
  assign t2[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_dig
    logic       c, w1, c1, c2, r0, r1;
    logic [1:0] w0, v;
    // Equation 1
    rcg42 u_e1_rcg (.a(x[i].l), .b(y[i].l), .c(c), .s(w0));
    full_adder_r2 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1), .O_D(0))
      u_e1_fa (.a(x[i].h), .b(y[i].h), .d(c), .c(t[i+1]), .s(w1));
    // Equation 2
    rcg42 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_e2_rcg (.a(w0), .b(MYTH), .c(c1), .s(v));
    cg32  #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_e2_cg  (.a(v), .b(t[i]), .c(c2), .s(r0));
    full_adder_r2 #(.O_C(0), .O_S(1), .O_A(0), .O_B(0), .O_D(1))
      u_e2_fa (.a(w1), .b(c1), .d(c2), .c(t2[i+1]), .s(r1));
    // Equation 3
    pa21 u_e3_pa (.a(r0), .b(t2[i]), .s(z[i].l));
    assign z[i].h = r1;
  end

  assign t_out  = t[N];
  assign t2_out = t2[N];
endmodule
