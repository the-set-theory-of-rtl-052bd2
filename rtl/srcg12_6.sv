// srcg12_6: radix-4 super redundant carry generator SRCG12.6, 4<2^0> + <4^0> <= <6^0> + <6^0>,
// built hierarchically from radix-2 operators.
//
// Written at weighting radix 2 the operator is
//   4<2^0> + 2<1^0> + <2^0>  <=  (2<2^0> + <2^0>) + (2<2^0> + <2^0>),
// i.e. each <6^0> input is a pair of ternary digits (weights 2 and 1), the <4^0> output is a
// bit of weight 2 over a ternary digit of weight 1, and the super carry is a ternary digit
// of weight 4. Three operator levels, as the decomposition prescribes:
//   L1  RCG4.2 at weight 1 and at weight 2
//   L2  CG3.2 at weight 2 (weight-2 digit with the carry from weight 1)
//   L3  PA2.1 at weight 4 (the two carries into weight 4)
// Only the zero-offset variant is built. Purely combinational.
module srcg12_6 (
  input  logic [1:0] a1, a0,   // first <6^0> operand: 2*a1 + a0, ternary digits (format 2)
  input  logic [1:0] b1, b0,   // second <6^0> operand
  output logic [1:0] h,        // super carry <2^0>, weight 4
  output logic       l1,       // <1^0>, weight 2
  output logic [1:0] l0        // <2^0>, weight 1
);
  logic       c1, c2, c3;
  logic [1:0] s1;

  rcg42 u_l1_w1 (.a(a0), .b(b0), .c(c1), .s(l0));
  rcg42 u_l1_w2 (.a(a1), .b(b1), .c(c2), .s(s1));
  cg32  u_l2_w2 (.a(s1), .b(c1), .c(c3), .s(l1));
  pa21  u_l3_w4 (.a(c2), .b(c3), .s(h));
endmodule
