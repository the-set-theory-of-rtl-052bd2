// decimal_adder: radix-10 digit adder, 10<1^0> + <9^0>  <=  <9^0> + <9^0> + <1^0>.
//
// Decimal digits are held in the minimum-information binary form of <9^0>,
// 4<1^0> + 2<2^0> + <1^0> (struct dec_t, 4 bits), not in BCD. The digit sum (0..19) is
// decomposed with binary operators and one radix-5 carry generator; the operator count is
// the one predicted by the cost formulas (information loss 4 -> four binary carry
// generators, three partial adders, one radix-5 carry generator):
//   weight 1  PA2.1 on the two low bits, CG3.2 with the carry-in -> result bit c
//   weight 2  RCG4.2 on the two ternary digits, CG3.2 with the weight-1 carry
//   weight 4  two PA2.1 (operand bits, the two carries) and an RCG4.2, giving 8<1^0> + 4<2^0>
//   r5_cg     turns 8<1^0> + 4<2^0> + 2<1^0> into the decimal carry (weight 10) and the
//             result bit a and ternary digit b
// Digits of a wider decimal adder chain through cin/cout. The arrangement of the operators
// is this design's; the document gives the equation and the operator counts. Purely
// combinational.
module decimal_adder (
  input  stad_pkg::dec_t x,
  input  stad_pkg::dec_t y,
  input  logic           cin,    // <1^0>, weight 1
  output stad_pkg::dec_t z,
  output logic           cout    // <1^0>, weight 10
);
  logic [1:0] u, v, m1, m2, n;
  logic       k, c1, c2, q, h;

  // Weight 1
  pa21  u_w1_pa  (.a(x.c), .b(y.c), .s(u));
  cg32  u_w1_cg  (.a(u), .b(cin), .c(k), .s(z.c));
  // Weight 2
  rcg42 u_w2_rcg (.a(x.b), .b(y.b), .c(c1), .s(v));
  cg32  u_w2_cg  (.a(v), .b(k), .c(c2), .s(q));
  // Weight 4
  pa21  u_w4_pa0 (.a(x.a), .b(y.a), .s(m1));
  pa21  u_w4_pa1 (.a(c1), .b(c2), .s(m2));
  rcg42 u_w4_rcg (.a(m1), .b(m2), .c(h), .s(n));
  // Radix-5 carry generator, in units of 2: 4<1^0> + 2<2^0> + <1^0> = h, n, q
  r5_cg u_r5     (.a(h), .b(n), .c(q), .k(cout), .p(z.a), .q(z.b));
endmodule
