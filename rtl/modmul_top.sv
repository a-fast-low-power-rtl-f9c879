// modmul_top: combinational modulo 2^n+1 multiplier, r = x * y mod (2^n+1).
//
// Operands and result are (n+1)-bit weighted numbers in [0, 2^n]; an input
// with its top bit set must have all other bits clear. The product is built
// in three stages with no clock and no registers:
//   1. modmul_ppgen folds the (n+1)x(n+1) product matrix into n rows of n
//      bits by ORing mutually exclusive terms and complementing and moving
//      bits of weight >= 2^n, then adds the constant row 2.
//   2. modmul_ppr reduces the n+1 rows to a sum and a carry vector with
//      stages of 7:2, 5:2, 4:2 and 3:2 multiplexer-based compressors and
//      complemented end-around carries.
//   3. ieac_sparse_adder adds the two vectors plus 1 modulo 2^n+1 with a
//      sparse-tree inverted end-around-carry adder (carries every 4th bit,
//      4-bit conditional sum generators).
// The constants left by the complemented bits and carries total 3 mod
// 2^n+1; stage 1 adds 2 of it and stage 3 the remaining 1.
//
// Default n = 16 (a 17-bit multiplier), the size of the published 17-bit
// design; other sizes are a parameter override (N a multiple of 4). For the
// IDEA cipher's multiplication, map the 16-bit value 0 to 2^16 on the way in
// and a result of 2^16 back to 0 on the way out.
//
// The three-stage structure, the folding of the matrix and the correction
// constant follow the published design; the combinational-only interface
// and the output assertion are this design's choices.
module modmul_top #(
  parameter int N = 16
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] r
);
  logic [N:0][N-1:0] pp;
  logic [N-1:0]      vs, vc;

  modmul_ppgen      #(.N(N)) u_ppgen (.x(x), .y(y), .pp(pp));
  modmul_ppr        #(.N(N)) u_ppr   (.pp(pp), .sum_o(vs), .carry_o(vc));
  ieac_sparse_adder #(.N(N), .K(4)) u_fsa (.a(vs), .b(vc), .r(r));

  // A result of 2^n has no other bit set.
  always_comb begin
    assert (!r[N] || r[N-1:0] == '0)
      else $error("modmul_top: result above 2^n");
  end
endmodule
