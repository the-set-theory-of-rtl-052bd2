// rop: generic radix-R diadic decomposition operator with zero offsets,
//   R<DH^0> + <DL^0>  <=  <DA^0> + <DB^0>.
//
// Covers the five operator forms at any weighting radix: partial adder (DH = 0), carry
// generator (DH = 1, DL = R-1), redundant carry generator (DH = 1, DL >= R), super carry
// generator (DH = 2, DL = R-1) and super redundant carry generator (DH = 2, DL >= R).
// Digits of <d^0> are plain unsigned binary numbers 0..d on W bits. The output split takes
// the largest carry that fits: hi = min(DH, (a+b) / R), lo = a + b - R*hi; for the
// redundant forms this fixes the coupled don't cares, which is this design's choice.
// DA + DB must equal R*DH + DL, and DL >= R-1 whenever DH > 0. The defaults give the
// radix-3 carry generator CG5.3. Purely combinational.
module rop #(
  parameter int unsigned R  = 3,
  parameter int unsigned DA = 3,
  parameter int unsigned DB = 2,
  parameter int unsigned DH = 1,
  parameter int unsigned DL = 2,
  parameter int unsigned W  = 3    // field width, at least clog2(max digit + 1)
) (
  input  logic [W-1:0] a,   // <DA^0>
  input  logic [W-1:0] b,   // <DB^0>
  output logic [W-1:0] hi,  // <DH^0>, weight R
  output logic [W-1:0] lo   // <DL^0>, weight 1
);
  if (DA + DB != R * DH + DL || (DH > 0 && DL + 1 < R) || (1 << W) <= DA || (1 << W) <= DB || (1 << W) <= DL) begin : g_check
    $error("rop: digit sets do not balance");
  end

  logic [W:0] t, q;
  always_comb begin
    t  = {1'b0, a} + {1'b0, b};
    q  = t / (W+1)'(R);
    if (q > (W+1)'(DH)) q = (W+1)'(DH);
    hi = q[W-1:0];
    lo = W'(t - q * (W+1)'(R));
  end
endmodule
