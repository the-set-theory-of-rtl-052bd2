// full_adder_r2: radix-2 full adder, 2<1^O_C> + <1^O_S> <= <1^O_A> + <1^O_B> + <1^O_D>.
//
// A hierarchical decomposition operator: a partial adder PA2.1 merges inputs a and b into a
// ternary digit, and a carry generator CG3.2 combines that digit with input d into the
// carry (weight 2) and sum (weight 1). With all offsets 0 it is the ordinary full adder;
// the other offset variants are the signed full adders used in array multipliers. The
// offsets must satisfy 2*O_C + O_S = O_A + O_B + O_D, which also requires O_S to have the
// parity of that sum. Purely combinational, two operator levels deep.
module full_adder_r2 #(
  parameter int unsigned O_C = 0,
  parameter int unsigned O_S = 0,
  parameter int unsigned O_A = 0,
  parameter int unsigned O_B = 0,
  parameter int unsigned O_D = 0
) (
  input  logic a,   // <1^O_A>
  input  logic b,   // <1^O_B>
  input  logic d,   // <1^O_D>
  output logic c,   // <1^O_C>, weight 2
  output logic s    // <1^O_S>, weight 1
);
  logic [1:0] ab;   // <2^(O_A+O_B)>

  pa21 #(.O_S(O_A + O_B), .O_A(O_A), .O_B(O_B)) u_pa (.a(a), .b(b), .s(ab));
  cg32 #(.O_C(O_C), .O_S(O_S), .O_A(O_A + O_B), .O_B(O_D)) u_cg (.a(ab), .b(d), .c(c), .s(s));
endmodule
