// par_counter11: radix-2 parallel counter with eleven inputs,
//   4<2^0> + 2<1^0> + <1^0>  <=  eleven <1^0>.
//
// Counts the ones among eleven bits. The count (0..11) leaves in a redundant binary form:
// a ternary digit y4 of weight 4 and single bits y2 and y1, count = 4*y4 + 2*y2 + y1.
// The structure is the seven-level, fifteen-operator decomposition of the counter's
// information loss table: eight PA2.1 partial adders and seven carry generators (four
// RCG4.2, three CG3.2), one carry generator per bit of information removed (11 -> 4):
//   L1  five PA2.1 pair up x[9:0]; x[10] passes
//   L2  two RCG4.2 and one CG3.2 at weight 1
//   L3  PA2.1 at weight 2, RCG4.2 at weight 1
//   L4  PA2.1 at weight 2, CG3.2 at weight 1 (gives y1)
//   L5  RCG4.2 at weight 2
//   L6  CG3.2 at weight 2 (gives y2)
//   L7  PA2.1 at weight 4 (gives y4)
// All operators use zero offsets. How the inputs are paired within a level is this
// design's choice. Purely combinational, seven operator levels deep.
module par_counter11 (
  input  logic [10:0] x,    // eleven <1^0> inputs
  output logic [1:0]  y4,   // <2^0>, weight 4, format 2
  output logic        y2,   // <1^0>, weight 2
  output logic        y1    // <1^0>, weight 1
);
  logic [1:0] p [5];               // L1 ternary digits, weight 1
  logic       c0, c1, c2;          // L2 carries, weight 2
  logic [1:0] s0, s1;              // L2 ternary digits, weight 1
  logic       u;                   // L2 bit, weight 1
  logic [1:0] q, s2;               // L3: q weight 2, s2 weight 1
  logic       c3;                  // L3 carry, weight 2
  logic [1:0] q2;                  // L4 ternary digit, weight 2
  logic       c4;                  // L4 carry, weight 2
  logic       c5;                  // L5 carry, weight 4
  logic [1:0] s3;                  // L5 ternary digit, weight 2
  logic       c6;                  // L6 carry, weight 4

  // Level 1
  for (genvar i = 0; i < 5; i++) begin : g_l1
    pa21 u_pa (.a(x[2*i]), .b(x[2*i+1]), .s(p[i]));
  end
  // Level 2
  rcg42 u_l2_rcg0 (.a(p[0]), .b(p[1]), .c(c0), .s(s0));
  rcg42 u_l2_rcg1 (.a(p[2]), .b(p[3]), .c(c1), .s(s1));
  cg32  u_l2_cg   (.a(p[4]), .b(x[10]), .c(c2), .s(u));
  // Level 3
  pa21  u_l3_pa   (.a(c0), .b(c1), .s(q));
  rcg42 u_l3_rcg  (.a(s0), .b(s1), .c(c3), .s(s2));
  // Level 4
  pa21  u_l4_pa   (.a(c2), .b(c3), .s(q2));
  cg32  u_l4_cg   (.a(s2), .b(u), .c(c4), .s(y1));
  // Level 5
  rcg42 u_l5_rcg  (.a(q), .b(q2), .c(c5), .s(s3));
  // Level 6
  cg32  u_l6_cg   (.a(s3), .b(c4), .c(c6), .s(y2));
  // Level 7
  pa21  u_l7_pa   (.a(c5), .b(c6), .s(y4));
endmodule
