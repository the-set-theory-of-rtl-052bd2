// elem_mult: elementary multiplier <2^1> = <2^1> * <2^1>.
//
// Multiplies two digits of {-1, 0, 1}; the product is again such a digit, so no carry is
// produced. With the sign/magnitude format of stad_pkg (e = magnitude, g = sign) the product
// magnitude is the AND of the magnitudes and its sign the XOR of the signs, forced to 0 when
// the product is 0 so that zero keeps its single pattern. The gate-level realisation is this
// design's choice; the document gives only the set equation. Purely combinational.
module elem_mult (
  input  logic [1:0] a,   // <2^1>
  input  logic [1:0] b,   // <2^1>
  output logic [1:0] p    // <2^1>
);
  always_comb begin
    p[0] = a[0] & b[0];
    p[1] = p[0] & (a[1] ^ b[1]);
  end
endmodule
