// modmul_ppr: partial product reduction array of the modulo 2^n+1 multiplier.
//
// Adds the n+1 rows of n bits (n partial products and the constant row) down
// to an n-bit sum vector and an n-bit carry vector, modulo 2^n+1.
//
// All n columns are identical. The array is a sequence of stages; in each
// stage every column holds a pool of M equal-weight bits and feeds the
// first bits of its pool to one compressor, the largest that M allows in the
// order 7:2, 5:2, 4:2, 3:2 (see modmul_pkg). The next stage's pool of column
// k is, in this order: the compressor's sum, the weight-2 outputs of column
// k-1, the weight-4 output (7:2 only) of column k-2, then the bits this
// stage left unused. A stage thus takes all its inputs from the previous
// stage and no carry ripples sideways inside a stage. For n = 16 this gives
// the 7:2 / 7:2 / 5:2 / 3:2 / 3:2 array, with rows 0..8, 9..13 and 14..16
// entering the first three stages, as in the published 17-bit design.
//
// A carry leaving column n-1 (weight 2^n = -1 mod 2^n+1) or a weight-4
// carry leaving column n-2 or n-1 re-enters column 0 or 1 complemented.
// Each such end-around carry leaves a constant behind; over any complete
// reduction of n+1 rows these constants total n-1, which modmul_ppgen and
// the final adder account for. The carry leaving column n-1 in the last
// stage is likewise complemented into bit 0 of the carry vector.
//
// Purely combinational. sum_o[k] and carry_o[k] both have weight 2^k.
module modmul_ppr
  import modmul_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N:0][N-1:0] pp,
  output logic [N-1:0]      sum_o,
  output logic [N-1:0]      carry_o
);
  localparam int NST = num_stages(N);

  for (genvar s = 0; s <= NST; s++) begin : stg
    localparam int M = pool_size(N, s);
    logic [M-1:0] pool [N];

    if (s == 0) begin : g_load
      for (genvar k = 0; k < N; k++) begin : g_col
        for (genvar j = 0; j <= N; j++) begin : g_row
          assign pool[k][j] = pp[j][k];
        end
      end
    end else begin : g_red
      localparam int        MP   = pool_size(N, s - 1);
      localparam cmp_kind_e KIND = cmp_choose(MP);
      localparam int        IN   = cmp_inputs(KIND);
      localparam int        W2   = cmp_w2(KIND);
      localparam int        W4   = cmp_w4(KIND);

      // Per-column compressor outputs: o_s = sum, o_c[0..W2-1] weight 2,
      // o_c[W2] weight 4 (7:2 only).
      logic [N-1:0] o_s;
      logic [3:0]   o_c [N];

      for (genvar k = 0; k < N; k++) begin : g_col
        logic [IN-1:0] cin;
        assign cin = stg[s-1].pool[k][IN-1:0];

        if (KIND == CMP_72) begin : g_72
          comp72 u_c (
            .x1(cin[0]), .x2(cin[1]), .x3(cin[2]), .x4(cin[3]),
            .x5(cin[4]), .x6(cin[5]), .x7(cin[6]),
            .cin1(cin[7]), .cin2(cin[8]),
            .sum(o_s[k]), .carry(o_c[k][0]), .cout2(o_c[k][1]),
            .cout1(o_c[k][2]));
          assign o_c[k][3] = 1'b0;
        end else if (KIND == CMP_52) begin : g_52
          comp52 u_c (
            .x1(cin[0]), .x2(cin[1]), .x3(cin[2]), .x4(cin[3]),
            .x5(cin[4]), .cin1(cin[5]), .cin2(cin[6]),
            .sum(o_s[k]), .carry(o_c[k][0]), .cout1(o_c[k][1]),
            .cout2(o_c[k][2]));
          assign o_c[k][3] = 1'b0;
        end else if (KIND == CMP_42) begin : g_42
          comp42 u_c (
            .x1(cin[0]), .x2(cin[1]), .x3(cin[2]), .x4(cin[3]),
            .cin(cin[4]),
            .sum(o_s[k]), .carry(o_c[k][0]), .cout(o_c[k][1]));
          assign o_c[k][3:2] = 2'b00;
        end else begin : g_32
          comp32 u_c (
            .a(cin[0]), .b(cin[1]), .c(cin[2]),
            .sum(o_s[k]), .carry(o_c[k][0]));
          assign o_c[k][3:1] = 3'b000;
        end

        // Assemble the next pool of column k.
        assign pool[k][0] = o_s[k];
        for (genvar t = 0; t < W2; t++) begin : g_w2
          if (k == 0) begin : g_wrap
            assign pool[k][1+t] = ~o_c[N-1][t];
          end else begin : g_in
            assign pool[k][1+t] = o_c[k-1][t];
          end
        end
        if (W4 == 1) begin : g_w4
          if (k < 2) begin : g_wrap
            assign pool[k][1+W2] = ~o_c[k+N-2][W2];
          end else begin : g_in
            assign pool[k][1+W2] = o_c[k-2][W2];
          end
        end
        if (MP > IN) begin : g_left
          assign pool[k][M-1:1+W2+W4] = stg[s-1].pool[k][MP-1:IN];
        end
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign sum_o[k]   = stg[NST].pool[k][0];
    assign carry_o[k] = stg[NST].pool[k][1];
  end
endmodule
