// full_adder_rn: non-redundant radix-R full adder, r<1^0> + <(R-1)^0> <= <(R-1)^0> + <(R-1)^0> + <1^0>.
//
// Built, as for radix 2, from two diadic operators at weighting radix R:
//   partial adder    <(2R-2)^0>         <= <(R-1)^0> + <(R-1)^0>   (a + b)
//   carry generator  R<1^0> + <(R-1)^0> <= <(2R-2)^0> + <1^0>      (+ cin)
// Digits are plain unsigned binary numbers 0..R-1 on DW bits; the partial sum travels on
// DW+1 bits. Only the zero-offset variant is built. Both operators are rop instances, so
// each is a small integer operation rather than a gate-level decomposition into binary
// operators. Purely combinational.
module full_adder_rn #(
  parameter int unsigned R  = 4,                  // weighting radix, at least 2
  parameter int unsigned DW = $clog2(R)           // bits per digit
) (
  input  logic [DW-1:0] a,      // <(R-1)^0>
  input  logic [DW-1:0] b,      // <(R-1)^0>
  input  logic          cin,    // <1^0>
  output logic          cout,   // <1^0>, weight R
  output logic [DW-1:0] s       // <(R-1)^0>
);
  localparam int unsigned W = $clog2(2 * R - 1);  // holds 0..2R-2

  logic [W-1:0] pa_hi, ps, cg_hi, cg_lo;

  rop #(.R(R), .DA(R - 1), .DB(R - 1), .DH(0), .DL(2 * R - 2), .W(W)) u_pa (
    .a(W'(a)), .b(W'(b)), .hi(pa_hi), .lo(ps));
  rop #(.R(R), .DA(2 * R - 2), .DB(1), .DH(1), .DL(R - 1), .W(W)) u_cg (
    .a(ps), .b(W'(cin)), .hi(cg_hi), .lo(cg_lo));

  assign cout = cg_hi[0];
  assign s    = cg_lo[DW-1:0];

  // The partial adder never carries and the digit-set bounds keep the dropped bits zero.
  always_comb assert #0 (pa_hi == '0 && cg_hi[W-1:1] == '0 && (W == DW || cg_lo[W-1:DW] == '0));
endmodule
