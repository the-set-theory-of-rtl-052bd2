// pa21: binary partial adder PA2.1, <2^O_S> <= <1^O_A> + <1^O_B>.
//
// Merges two one-bit digits of the same weight into one ternary digit of that weight; it
// produces no carry. The offset variant is chosen by the parameters, written in the order
// of the operator's name PA2.1(O_S O_A O_B); O_S must equal O_A + O_B (offset is conserved).
// The inputs use the single-bit format and the output the ternary format of stad_pkg.
// Purely combinational: the output is valid one gate delay after the inputs.
module pa21 #(
  parameter int unsigned O_S = 0,
  parameter int unsigned O_A = 0,
  parameter int unsigned O_B = 0
) (
  input  logic       a,   // <1^O_A>
  input  logic       b,   // <1^O_B>
  output logic [1:0] s    // <2^O_S>
);
  import stad_pkg::*;

  if (O_S != O_A + O_B || O_A > 1 || O_B > 1) begin : g_check
    $error("pa21: offsets not conserved");
  end

  int unsigned t;
  always_comb begin
    t = code1(O_A, a) + code1(O_B, b);
    s = from_code(2, O_S, t);
  end
endmodule
