// comp52: multiplexer-based 5:2 compressor.
//
// Five bits x1..x5 and two carry inputs, all of weight 2^i, give a sum of
// weight 2^i and three bits of weight 2^(i+1):
//   x1 + .. + x5 + cin1 + cin2 = sum + 2 (carry + cout1 + cout2).
// Structure: a CGEN (majority) cell makes cout1 from x1..x3 off the
// critical path; an XOR/XNOR of x1,x2 and a MUX form t = x1^x2^x3; an
// XOR/XNOR of x4,x5 selects the MUXes that give cout2 = maj(x4,x5,cin1) and
// u = x4^x5^cin1; two further MUX levels combine t, u and cin2 into sum and
// carry. The critical path is one XOR/XNOR and three MUXes. The block
// names and their order follow the published 5:2 cell; the true and
// complemented select rails of the CMOS cells are plain inverted signals here.
// cout1 and cout2 do not depend on cin2, and cout1 not on either carry input.
// Purely combinational.
module comp52 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic d12, t, d45, u, v;

  cgen u_cgen (.x(x1), .y(x2), .z(x3), .cout(cout1));

  assign d12   = x1 ^ x2;
  assign t     = d12 ? ~x3 : x3;
  assign d45   = x4 ^ x5;
  assign cout2 = d45 ? cin1 : x4;
  assign u     = d45 ? ~cin1 : cin1;
  assign v     = t ? ~u : u;
  assign sum   = v ? ~cin2 : cin2;
  assign carry = v ? cin2 : t;
endmodule
