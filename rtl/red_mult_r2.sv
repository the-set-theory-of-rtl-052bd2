// red_mult_r2: two-digit radix-2 redundant array multiplier.
//
// Operands and product are radix-2 numbers whose digits are <2^1> = {-1, 0, 1}:
//   A = 2*a[1] + a[0],  B = 2*b[1] + b[0],  P = 8*p[3] + 4*p[2] + 2*p[1] + p[0].
// Four elementary multipliers form the partial products a[i]*b[j] (weight 2^(i+j)); a
// summation network then reduces
//   4<2^1> + 2<2^1> + 2<2^1> + <2^1>  (plus the mythical input 4<2^1> + 2<2^1>)
// to one <2^1> digit per weight. The mythical digits are constant zero: they give the
// equation equal diminished cardinality on both sides and so let it be decomposed. The
// network follows the multiplier's information loss table:
//   L1  RCG4.2(1011) at weight 4 (product a1*b1 with the mythical digit) and at weight 2
//       (the two cross products)
//   L2  CG3.2(0101) at weight 4, RCG4.2(0101) at weight 2 (with the second mythical digit)
//   L3  PA2.1(101) at weights 8 and 4
// Which weight-2 digits pair up in L1 is this design's choice. Purely combinational: one
// elementary multiplier plus three operator levels.
module red_mult_r2 (
  input  logic [1:0] a [2],   // multiplicand digits <2^1>
  input  logic [1:0] b [2],   // multiplier digits <2^1>
  output logic [1:0] p [4]    // product digits <2^1>
);
  localparam logic [1:0] MYTH = 2'b00;   // mythical <2^1> input, always zero

  logic [1:0] pp00, pp01, pp10, pp11;    // partial products
  logic       c8a, c4a, c8b, c4b;        // carries
  logic [1:0] s4a, s2a;                  // <2^0> digits after L1
  logic       s4b;                       // <1^1> at weight 4 after L2

  elem_mult u_m00 (.a(a[0]), .b(b[0]), .p(pp00));
  elem_mult u_m01 (.a(a[0]), .b(b[1]), .p(pp01));
  elem_mult u_m10 (.a(a[1]), .b(b[0]), .p(pp10));
  elem_mult u_m11 (.a(a[1]), .b(b[1]), .p(pp11));

  // Level 1
  rcg42 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_l1_w4 (.a(pp11), .b(MYTH), .c(c8a), .s(s4a));
  rcg42 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_l1_w2 (.a(pp01), .b(pp10), .c(c4a), .s(s2a));
  // Level 2
  cg32  #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_l2_w4 (.a(s4a), .b(c4a), .c(c8b), .s(s4b));
  rcg42 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_l2_w2 (.a(s2a), .b(MYTH), .c(c4b), .s(p[1]));
  // Level 3
  pa21  #(.O_S(1), .O_A(0), .O_B(1)) u_l3_w8 (.a(c8b), .b(c8a), .s(p[3]));
  pa21  #(.O_S(1), .O_A(0), .O_B(1)) u_l3_w4 (.a(c4b), .b(s4b), .s(p[2]));

  assign p[0] = pp00;
endmodule
