// csa3: 3-bit radix-2 unsigned carry save adder,
//   8<1^0> + 4<2^0> + 2<2^0> + <2^0>  <=  (4<2^0> + 2<2^0> + <2^0>) + (4<1^0> + 2<1^0> + <1^0>) + <1^0>.
//
// Adds a 3-bit unsigned number x and a carry-in to a carry-save accumulator whose digits
// are ternary (<2^0>, values 0..2, format 2). The result is again a carry-save word plus a
// carry-out bit of weight 8. Two operator levels, exactly as the information loss table:
//   L1  a CG3.2 at each weight combines accumulator digit and x bit into a carry one place
//       up and a bit in place;
//   L2  a PA2.1 at each weight merges that bit with the carry from below (carry-in at
//       weight 1) into the new ternary digit.
// No carry crosses more than one position, so the delay does not depend on the width.
// Purely combinational.
module csa3 (
  input  logic [1:0] acc [3],   // accumulator digits <2^0>, weights 1, 2, 4
  input  logic [2:0] x,         // unsigned addend, bit i has weight 2^i
  input  logic       cin,       // <1^0>, weight 1
  output logic [1:0] sum [3],   // new accumulator digits <2^0>, weights 1, 2, 4
  output logic       cout       // <1^0>, weight 8
);
  logic [3:0] k;   // k[i+1]: carry from weight 2^i, k[0] = carry-in
  logic [2:0] r;   // bit left in place at weight 2^i

  assign k[0] = cin;
  for (genvar i = 0; i < 3; i++) begin : g_pos
    cg32 u_cg (.a(acc[i]), .b(x[i]), .c(k[i+1]), .s(r[i]));
    pa21 u_pa (.a(r[i]), .b(k[i]), .s(sum[i]));
  end
  assign cout = k[3];
endmodule
