// red_mult_rn: N-digit radix-2 redundant array multiplier, operands and product in binary
// signed digits <2^1>:  sum p[k]*2^k  =  (sum a[j]*2^j) * (sum b[i]*2^i).
//
// An N x N array of elementary multipliers (elem_mult) forms the partial products
// a[j]*b[i] at weight 2^(i+j); row i is the signed-digit number a*b[i] shifted by i. A
// summation network then adds the rows one after another, as in an array multiplier. Each
// addition is carry-free and uses, per digit position k, the same three operator types as
// the two-digit multiplier:
//   RCG4.2(1011)  2<1^1> + <2^0> <= acc[k] + row[k]        (transfer c[k] to position k+1)
//   CG3.2(0101)   2<1^0> + <1^1> <= <2^0> + c[k-1]        (transfer e[k] to position k+1)
//   PA2.1(110)    <2^1>          <= <1^1> + e[k-1]        (new accumulator digit)
// so no signal travels more than two positions per row and the delay grows with N only
// through the number of rows. Before row i is added the running sum is zero above
// position i+N-1, and a position whose inputs are all zero passes on only the two
// transfers it receives. So after row i nothing is non-zero above position i+N, and the
// 2N-digit accumulator never sends a transfer out of its top position. An assertion
// checks this. The row-by-row summation network is this design's own; the operators and
// their offset variants are those of the two-digit multiplier (red_mult_r2), whose
// summation network is laid out in detail. <2^1> uses the ternary format of stad_pkg.
// Purely combinational.
module red_mult_rn #(
  parameter int unsigned N = 4                // digits per operand, at least 2
) (
  input  logic [1:0] a [N],        // multiplicand digits <2^1>, a[0] least significant
  input  logic [1:0] b [N],        // multiplier digits <2^1>
  output logic [1:0] p [2*N]       // product digits <2^1>
);
  if (N < 2) begin : g_check
    $error("red_mult_rn: N must be at least 2");
  end

  localparam int unsigned P = 2 * N;       // accumulator digits

  // partial products, row i at weights i .. i+N-1
  logic [1:0] pp [N][N];
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      elem_mult u_em (.a(a[j]), .b(b[i]), .p(pp[i][j]));
    end
  end

  // g_sum[i].acc: running sum of rows 0..i
  for (genvar i = 0; i < N; i++) begin : g_sum
    logic [1:0] acc [P];
    if (i == 0) begin : g_first
      for (genvar k = 0; k < P; k++) begin : g_pos
        if (k < N) begin : g_pp
          assign acc[k] = pp[0][k];
        end else begin : g_zero
          assign acc[k] = 2'b00;
        end
      end
    end else begin : g_add
      logic [P-1:0] c, e, v;       // transfers and kept bits of positions 0 .. 2N-1
      logic [1:0]   u [P];
      for (genvar k = 0; k < P; k++) begin : g_pos
        logic [1:0] r;             // row i digit at weight k
        if (k >= i && k < i + N) begin : g_pp
          assign r = pp[i][k-i];
        end else begin : g_zero
          assign r = 2'b00;
        end
        rcg42 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1)) u_rcg (
          .a(g_sum[i-1].acc[k]), .b(r), .c(c[k]), .s(u[k]));
        if (k == 0) begin : g_lsb
          // nothing arrives from below: zero transfers
          cg32 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_cg (.a(u[k]), .b(1'b0), .c(e[k]), .s(v[k]));
          pa21 #(.O_S(1), .O_A(1), .O_B(0)) u_pa (.a(v[k]), .b(1'b0), .s(acc[k]));
        end else begin : g_mid
          cg32 #(.O_C(0), .O_S(1), .O_A(0), .O_B(1)) u_cg (.a(u[k]), .b(c[k-1]), .c(e[k]), .s(v[k]));
          pa21 #(.O_S(1), .O_A(1), .O_B(0)) u_pa (.a(v[k]), .b(e[k-1]), .s(acc[k]));
        end
      end
      // nothing leaves the top position (both transfers zero)
      always_comb assert #0 (c[P-1] == 1'b0 && e[P-1] == 1'b0);
    end
  end

  assign p = g_sum[N-1].acc;
endmodule
