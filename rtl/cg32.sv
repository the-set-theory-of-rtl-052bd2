// cg32: binary carry generator CG3.2, 2<1^O_C> + <1^O_S> <= <2^O_A> + <1^O_B>.
//
// Takes a ternary digit and a one-bit digit of the same weight (sum code 0..3) and
// re-expresses it as a one-bit carry of twice the weight plus a one-bit digit of this
// weight. The split is unique (no redundancy), so carry = code sum >= 2. Offsets follow
// the operator name CG3.2(O_C O_S O_A O_B) and must satisfy 2*O_C + O_S = O_A + O_B.
// Purely combinational.
module cg32 #(
  parameter int unsigned O_C = 0,
  parameter int unsigned O_S = 0,
  parameter int unsigned O_A = 0,
  parameter int unsigned O_B = 0
) (
  input  logic [1:0] a,   // <2^O_A>
  input  logic       b,   // <1^O_B>
  output logic       c,   // <1^O_C>, weight 2
  output logic       s    // <1^O_S>, weight 1
);
  import stad_pkg::*;

  if (2 * O_C + O_S != O_A + O_B || O_C > 1 || O_S > 1 || O_A > 2 || O_B > 1) begin : g_check
    $error("cg32: offsets not conserved");
  end

  int unsigned t, hc;
  always_comb begin
    t  = to_code(2, O_A, a) + code1(O_B, b);
    hc = (t >= 2) ? 1 : 0;
    c  = bit1(O_C, hc);
    s  = bit1(O_S, t - 2 * hc);
  end
endmodule
