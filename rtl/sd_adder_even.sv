// sd_adder_even: signed-digit adder for any even radix R with minimally redundant digits
// <R^(R/2)> (values -R/2 .. R/2), N digits.
//
// Each digit position evaluates the three equations of the general even-radix structure:
//   1  R<1^1> + <R^0>            <= x + y                 sum -R..R -> t in {-1,0}, w in 0..R
//   2  R<1^0> + <(R-1)^(R/2)>    <= w + t_in + {mythical}  sum -1..R -> t2 in {0,1},
//                                                          q in -R/2 .. R/2-1
//   3  <R^(R/2)>                 <= q + t2_in              result digit -R/2 .. R/2
// The mythical input of equation 2, <(R-2)^(R/2-1)>, is constant zero and only balances the
// digit sets, so it has no wires here. Because every transfer reaches at most two positions,
// the delay is independent of N.
// Unlike sd_adder_r4, which decomposes the radix-4 case into binary operators, this module
// realises each equation directly as a small integer operation on a digit. That is the
// simplest form that computes the same function and works for any even R; how each digit
// is laid out on wires is this design's choice: a digit travels as its offset code
// (value + R/2) on DW unsigned bits.
// Value identity: sum (z[i]-R/2)*R^i + R^N*(t2_out - t_out) = X + Y, t_out = 1 meaning -1.
// Purely combinational.
module sd_adder_even #(
  parameter int unsigned R  = 4,                 // even radix, at least 4
  parameter int unsigned N  = 8,                 // digits per operand
  parameter int unsigned DW = $clog2(R + 1)      // bits per digit code
) (
  input  logic [DW-1:0] x [N],   // digit codes, value = code - R/2
  input  logic [DW-1:0] y [N],
  output logic [DW-1:0] z [N],
  output logic          t_out,   // <1^1> transfer at weight R^N
  output logic          t2_out   // <1^0> transfer at weight R^N
);
  if (R < 4 || R % 2 != 0) begin : g_check
    $error("sd_adder_even: R must be even and at least 4");
  end

  localparam int H = R / 2;

  logic [N:0] t, t2;
  assign t[0]  = 1'b0;
  assign t2[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_dig
    int s, w, u, q;
    always_comb begin
      // equation 1
      s        = int'(x[i]) + int'(y[i]) - R;        // -R .. R
      t[i+1]   = (s < 0);
      w        = t[i+1] ? s + R : s;                  // 0 .. R
      // equation 2
      u        = w - int'(t[i]);                      // -1 .. R
      t2[i+1]  = (u >= H);
      q        = t2[i+1] ? u - R : u;                 // -R/2 .. R/2-1
      // equation 3
      z[i]     = DW'(q + int'(t2[i]) + H);
    end
  end

  assign t_out  = t[N];
  assign t2_out = t2[N];
endmodule
