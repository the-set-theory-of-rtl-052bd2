// rcg42: binary redundant carry generator RCG4.2, 2<1^O_C> + <2^O_S> <= <2^O_A> + <2^O_B>.
//
// Adds two ternary digits of one weight (code sum 0..4) and returns a one-bit carry of
// twice the weight plus a ternary digit of this weight. The output is redundant: a code
// sum of 2 may leave as carry 1 / digit 0 or carry 0 / digit 2 (a "coupled don't care").
//
// For the all-zero-offset variant RCG4.2(0000) the gates are the minimised equations of
// the format-2 truth table, where the don't cares were resolved so that a ternary input
// of value 2 produces the carry:
//   c  = g0 | g1,   s.g = g0&g1 | e0&e1,   s.e = e0 ^ e1.
// Other offset variants take the generic route of stad_pkg (carry = code sum >= 2), which
// is this library's choice. Offsets follow the name RCG4.2(O_C O_S O_A O_B) with
// 2*O_C + O_S = O_A + O_B. Purely combinational.
module rcg42 #(
  parameter int unsigned O_C = 0,
  parameter int unsigned O_S = 0,
  parameter int unsigned O_A = 0,
  parameter int unsigned O_B = 0
) (
  input  logic [1:0] a,   // <2^O_A>
  input  logic [1:0] b,   // <2^O_B>
  output logic       c,   // <1^O_C>, weight 2
  output logic [1:0] s    // <2^O_S>, weight 1
);
  import stad_pkg::*;

  if (2 * O_C + O_S != O_A + O_B || O_C > 1 || O_S > 2 || O_A > 2 || O_B > 2) begin : g_check
    $error("rcg42: offsets not conserved");
  end

  if (O_C == 0 && O_S == 0 && O_A == 0 && O_B == 0) begin : g_fmt2
    always_comb begin
      c    = a[1] | b[1];
      s[1] = (a[1] & b[1]) | (a[0] & b[0]);
      s[0] = a[0] ^ b[0];
    end
  end else begin : g_generic
    int unsigned t, hc;
    always_comb begin
      t  = to_code(2, O_A, a) + to_code(2, O_B, b);
      hc = (t >= 2) ? 1 : 0;
      c  = bit1(O_C, hc);
      s  = from_code(2, O_S, t - 2 * hc);
    end
  end
endmodule
