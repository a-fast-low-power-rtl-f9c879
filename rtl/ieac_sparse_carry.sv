// ieac_sparse_carry: sparse carry network of the inverted end-around-carry
// (IEAC) adder.
//
// An n-bit IEAC adder computes A + B + NOT(cout) mod 2^n. Feeding the
// inverted carry-out straight back would form a loop, so every carry is
// written directly in terms of group terms instead. With (G,P)[i:j] the
// group generate/propagate of bits i..j:
//   C*(-1) = NOT G[n-1:0]                               (carry into bit 0)
//   C*(i)  = G[i:0] + P[i:0] . NOT G[n-1:i+1]           (0 <= i <= n-2)
// The network is sparse: it only delivers the carry into every K-th bit
// (C*(-1), C*(K-1), C*(2K-1), ...), the carries the conditional sum
// generators need. Each K-bit block is first reduced to one (G,P) pair by
// a tree of merges (n/2 cells, then n/4, as in the published 16-bit adder);
// a Kogge-Stone style prefix over blocks gives G[4b+3:0], a mirrored suffix
// network gives G[n-1:4b], both in ceil(log2(n/K)) levels, and one final
// merge per block forms C*. That is one sparse tree computing the
// forward and the wrapped part of each carry in log depth.
//
// The final merge uses the carry equation above directly. The rewritten
// form that swaps a complemented operand for a complemented output,
// C* = NOT((NOT P, NOT G)[i:0] o (G,P)[n-1:i+1]), only equals it when the
// group generate implies the group propagate, which does not hold for
// OR-propagate groups (G[3:0] = 1 while P[3:0] = 0 is possible), so it is
// not used.
//
// Purely combinational. cblk[b] is the carry into bit b*K. K must be a
// power of two and divide N.
module ieac_sparse_carry
  import modmul_pkg::*;
#(
  parameter int N = 16,
  parameter int K = 4
) (
  input  logic [N-1:0]   g,
  input  logic [N-1:0]   p,
  output logic [N/K-1:0] cblk
);
  localparam int B = N / K;
  localparam int L = (B > 1) ? $clog2(B) : 1;

  gp_t bgp [B];           // (G,P) of each K-bit block
  gp_t pre [L+1][B];      // prefix levels: pre[L][b] = (G,P)[bK+K-1:0]
  gp_t suf [L+1][B];      // suffix levels: suf[L][b] = (G,P)[n-1:bK]

  // Block reduction: a binary tree of merges, pairs of bits first, then
  // pairs of pairs (two levels for K = 4).
  localparam int LK = (K > 1) ? $clog2(K) : 1;
  gp_t tr [LK+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) tr[0][i] = '{g: g[i], p: p[i]};
    for (int l = 0; l < LK; l++) begin
      for (int i = 0; i < N; i++) begin
        if ((i % (1 << (l + 1))) == (1 << (l + 1)) - 1 && (i % K) >= (1 << l))
          tr[l+1][i] = gp_merge(tr[l][i], tr[l][i-(1<<l)]);
        else
          tr[l+1][i] = tr[l][i];
      end
    end
    for (int b = 0; b < B; b++) bgp[b] = tr[LK][b*K+K-1];
  end

  always_comb begin
    for (int b = 0; b < B; b++) begin
      pre[0][b] = bgp[b];
      suf[0][b] = bgp[b];
    end
    for (int l = 0; l < L; l++) begin
      for (int b = 0; b < B; b++) begin
        if (b >= (1 << l)) pre[l+1][b] = gp_merge(pre[l][b], pre[l][b-(1<<l)]);
        else               pre[l+1][b] = pre[l][b];
        if (b + (1 << l) < B) suf[l+1][b] = gp_merge(suf[l][b+(1<<l)], suf[l][b]);
        else                  suf[l+1][b] = suf[l][b];
      end
    end
  end

  assign cblk[0] = ~suf[L][0].g;
  for (genvar b = 1; b < B; b++) begin : g_c
    assign cblk[b] = pre[L][b-1].g | (pre[L][b-1].p & ~suf[L][b].g);
  end
endmodule
