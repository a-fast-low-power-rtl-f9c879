// modmul_ppgen: partial product generation of the modulo 2^n+1 multiplier.
//
// Operands are (n+1)-bit weighted numbers in [0, 2^n]; the top bit of an
// operand is set only when the operand equals 2^n. The (n+1)x(n+1) product
// matrix is folded into n rows of n bits plus one constant row:
//
//  * At most one of the four product groups (both operands below 2^n;
//    x = 2^n; y = 2^n; both = 2^n) is non-zero, so the groups are merged by
//    OR instead of addition: q_k = x_n y_k | x_k y_n joins the top bit of
//    row k+1, q_(n-1) (weight 2^(2n-1) = 2^(n-1)+1 mod 2^n+1) joins bit n-1
//    and bit 0 of row 0, and x_n y_n (weight 2^(2n) = 1) joins bit 0.
//  * A bit of weight 2^(n+k) is worth -2^k, so it is complemented and moved
//    to column k. The constant this leaves behind, together with the one
//    left by the end-around carries of the reduction array, totals 3; 2 of
//    it is added here as the extra row, 1 is added by the final adder.
//
// Row j, column m (0 <= j, m < n), with p(i,j) = x_i y_j:
//   m >= j : p(m-j, j)            (OR q_(j-1) when m-j = n-1, j > 0)
//   m <  j : NOT p(m-j+n, j)      (OR q_(j-1) inside the NOT when m = j-1)
//   row 0  : bit n-1 ORs q_(n-1); bit 0 ORs q_(n-1) and x_n y_n
//   row n  : the constant 2 (bit 1 set).
// The gates are AND, OR and NOR only (the complex terms are an OR/NOR of
// p, q and a second p); the row layout is the published final n x n matrix.
// Purely combinational; pp[j] is row j, pp[n] the constant row.
module modmul_ppgen #(
  parameter int N = 16
) (
  input  logic [N:0]          x,
  input  logic [N:0]          y,
  output logic [N:0][N-1:0]   pp
);
  logic [N-1:0] q;

  for (genvar k = 0; k < N; k++) begin : g_q
    assign q[k] = (x[N] & y[k]) | (x[k] & y[N]);
  end

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar m = 0; m < N; m++) begin : g_col
      if (m >= j) begin : g_direct
        localparam int I = m - j;
        if (j == 0 && m == 0) begin : g_b00
          assign pp[j][m] = (x[0] & y[0]) | q[N-1] | (x[N] & y[N]);
        end else if (j == 0 && I == N - 1) begin : g_top0
          assign pp[j][m] = (x[I] & y[j]) | q[N-1];
        end else if (I == N - 1) begin : g_top
          assign pp[j][m] = (x[I] & y[j]) | q[j-1];
        end else begin : g_plain
          assign pp[j][m] = x[I] & y[j];
        end
      end else begin : g_wrap
        localparam int I = m - j + N;
        if (I == N - 1) begin : g_top
          assign pp[j][m] = ~((x[I] & y[j]) | q[j-1]);
        end else begin : g_plain
          assign pp[j][m] = ~(x[I] & y[j]);
        end
      end
    end
  end

  // Intermediate correction constant 2.
  assign pp[N] = N'(2);
endmodule
