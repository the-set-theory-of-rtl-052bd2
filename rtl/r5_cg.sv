// r5_cg: radix-5 carry generator, 5<1^0> + 2<1^0> + <2^0>  <=  4<1^0> + 2<2^0> + <1^0>.
//
// The one non-binary operator needed for decimal arithmetic (radix 10 = 2 * 5). Its input
// is a value 0..9 held as a bit a of weight 4, a ternary digit b of weight 2 and a bit c of
// weight 1; its output is a carry k of weight 5 and a remainder 0..4 held as a bit p of
// weight 2 and a ternary digit q of weight 1. The remainder split is redundant (2 = 2*1+0 =
// 2*0+2); this design takes p = 1 whenever the remainder is 2 or more. Only the zero-offset
// variant is built. Purely combinational.
module r5_cg (
  input  logic       a,   // <1^0>, weight 4
  input  logic [1:0] b,   // <2^0>, weight 2, format 2
  input  logic       c,   // <1^0>, weight 1
  output logic       k,   // <1^0>, weight 5
  output logic       p,   // <1^0>, weight 2
  output logic [1:0] q    // <2^0>, weight 1, format 2
);
  logic [3:0] v, rem;
  always_comb begin
    v   = {1'b0, a, 2'b00} + {1'b0, b, 1'b0} + {3'b000, c};
    k   = (v >= 4'd5);
    rem = k ? v - 4'd5 : v;
    p   = (rem >= 4'd2);
    q   = p ? rem[1:0] - 2'd2 : rem[1:0];
  end
endmodule
