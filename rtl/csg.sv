// csg: conditional sum generator of the sparse-tree adder (one K-bit block).
//
// The block's carry-in is not known while the block works, so two ripple
// rails compute the block's internal carries assuming carry-in 0 (rail0)
// and 1 (rail1); each bit forms both candidate sums h ^ c0 and h ^ c1, and a
// row of 2:1 multiplexers picks one set with the carry-in delivered by the
// sparse carry network. The rails are off the critical path. Bit 0 needs
// no rail: its candidates are h and NOT h.
//
// g, p, h are the bit generate (a AND b), propagate (a OR b) and half sum
// (a XOR b) of the block. Purely combinational. The published cell is
// 4 bits wide (W = 4).
module csg
  import modmul_pkg::*;
#(
  parameter int W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic [W-1:0] h,
  input  logic         cin,
  output logic [W-1:0] s
);
  logic [W-1:0] c0, c1;   // carry into bit t for carry-in 0 / 1

  always_comb begin
    gp_t acc;
    c0[0] = 1'b0;
    c1[0] = 1'b1;
    acc   = '{g: g[0], p: p[0]};
    for (int t = 1; t < W; t++) begin
      c0[t] = acc.g;
      c1[t] = acc.g | acc.p;
      acc   = gp_merge('{g: g[t], p: p[t]}, acc);
    end
  end

  for (genvar t = 0; t < W; t++) begin : g_mux
    assign s[t] = cin ? (h[t] ^ c1[t]) : (h[t] ^ c0[t]);
  end
endmodule
