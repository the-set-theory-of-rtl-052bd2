// par_counter11_r3: radix-3 parallel counter with eleven inputs,
//   9<1^0> + 3<2^0> + <2^0>  <=  eleven <1^0>   (plus the mythical input 3<2^0>).
//
// Counts the ones among eleven bits and returns the count (0..11) as radix-3 digits:
// count = 9*y9 + 3*y3 + y1, y9 in {0,1}, y3 and y1 in {0,1,2}. The output can hold 0..17,
// six more values than the input produces, so a constant-zero ternary digit at weight 3
// (the mythical input) is added to make the equation decomposable. Radix-3 operators (rop):
//   L1  five PA2.1 pair up x[9:0]
//   L2  two PA4.2 and one PA3.2 (with x[10]) at weight 1
//   L3  SCG8.4: 3<2^0> + <2^0> <= <4^0> + <4^0>
//   L4  CG5.3 at weight 1 -> y1; PA4.2 at weight 3 merges the super carry with the mythical digit
//   L5  CG5.4 at weight 3 -> y9 and y3
// The decomposition itself is this design's; the document gives the equation and the
// mythical input. Ternary digits are plain binary (format 2). Purely combinational.
module par_counter11_r3 (
  input  logic [10:0] x,    // eleven <1^0> inputs
  output logic        y9,   // <1^0>, weight 9
  output logic [1:0]  y3,   // <2^0>, weight 3
  output logic [1:0]  y1    // <2^0>, weight 1
);
  localparam logic [2:0] MYTH = 3'd0;   // mythical <2^0> at weight 3, always zero

  logic [2:0] p [5];
  logic [2:0] f0, f1, f2, sc, sl, cl, n9, n3, n1, n1_w3;
  logic [2:0] unused_hi [9];   // partial adders have no carry output

  // Level 1: <2> <= <1> + <1>
  for (genvar i = 0; i < 5; i++) begin : g_l1
    rop #(.R(3), .DA(1), .DB(1), .DH(0), .DL(2)) u_pa
      (.a({2'b00, x[2*i]}), .b({2'b00, x[2*i+1]}), .hi(unused_hi[i]), .lo(p[i]));
  end
  // Level 2: <4> <= <2> + <2> twice, <3> <= <2> + <1>
  rop #(.R(3), .DA(2), .DB(2), .DH(0), .DL(4)) u_l2_pa0 (.a(p[0]), .b(p[1]), .hi(unused_hi[5]), .lo(f0));
  rop #(.R(3), .DA(2), .DB(2), .DH(0), .DL(4)) u_l2_pa1 (.a(p[2]), .b(p[3]), .hi(unused_hi[6]), .lo(f1));
  rop #(.R(3), .DA(2), .DB(1), .DH(0), .DL(3)) u_l2_pa2 (.a(p[4]), .b({2'b00, x[10]}), .hi(unused_hi[7]), .lo(f2));
  // Level 3: 3<2> + <2> <= <4> + <4>
  rop #(.R(3), .DA(4), .DB(4), .DH(2), .DL(2)) u_l3_scg (.a(f0), .b(f1), .hi(sc), .lo(sl));
  // Level 4: 3<1> + <2> <= <3> + <2> at weight 1; <4> <= <2> + <2> at weight 3
  rop #(.R(3), .DA(3), .DB(2), .DH(1), .DL(2)) u_l4_cg (.a(f2), .b(sl), .hi(cl), .lo(n1));
  rop #(.R(3), .DA(2), .DB(2), .DH(0), .DL(4)) u_l4_pa (.a(sc), .b(MYTH), .hi(unused_hi[8]), .lo(n3));
  // Level 5: 3<1> + <2> <= <4> + <1> at weight 3
  rop #(.R(3), .DA(4), .DB(1), .DH(1), .DL(2)) u_l5_cg (.a(n3), .b(cl), .hi(n9), .lo(n1_w3));

  assign y1 = n1[1:0];
  assign y3 = n1_w3[1:0];
  assign y9 = n9[0];
  // The operator fields are W bits wide; the digit-set bounds keep the bits above each
  // output digit's width at zero.
  always_comb assert #0 ({n9[2:1], n1[2], n1_w3[2]} == 4'b0);
endmodule
