// ieac_sparse_adder: sparse-tree inverted end-around-carry adder, the final
// stage of the modulo 2^n+1 multiplier.
//
// Adds the n-bit sum and carry vectors S and C of the reduction array and
// returns |S + C + 1| mod 2^n+1 as an (n+1)-bit number, using
//   |S + C + 1| mod (2^n+1) = |S + C + NOT cout| mod 2^n.
// The constant 1 is the part of the multiplier's correction constant that
// this adder supplies for free.
//
// Bit level: g = a AND b, p = a OR b, h = a XOR b. ieac_sparse_carry delivers
// the end-around-aware carry into every K-th bit; one csg per K-bit block
// selects the sum bits with it. The result is 2^n exactly when S and C are
// bitwise complementary (S + C = 2^n - 1), which is the AND of all half sums;
// that AND is the top output bit (the low n bits are then 0).
//
// Purely combinational. N must be a multiple of K.
module ieac_sparse_adder #(
  parameter int N = 16,
  parameter int K = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   r
);
  localparam int B = N / K;

  logic [N-1:0] g, p, h;
  logic [B-1:0] cblk;

  assign g = a & b;
  assign p = a | b;
  assign h = a ^ b;

  ieac_sparse_carry #(.N(N), .K(K)) u_carry (.g(g), .p(p), .cblk(cblk));

  for (genvar bl = 0; bl < B; bl++) begin : g_blk
    csg #(.W(K)) u_csg (
      .g  (g[bl*K +: K]),
      .p  (p[bl*K +: K]),
      .h  (h[bl*K +: K]),
      .cin(cblk[bl]),
      .s  (r[bl*K +: K]));
  end

  assign r[N] = &h;

  if (N % K != 0) begin : g_bad_size
    $error("ieac_sparse_adder: N must be a multiple of K");
  end
endmodule
