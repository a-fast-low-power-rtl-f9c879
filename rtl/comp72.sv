// comp72: multiplexer-based 7:2 compressor.
//
// Seven bits x1..x7 and two carry inputs, all of weight 2^i, give
//   x1 + .. + x7 + cin1 + cin2 = sum + 2 (carry + cout2) + 4 cout1,
// i.e. a sum of weight 2^i, carry and cout2 of weight 2^(i+1) and cout1 of
// weight 2^(i+2). Nine bits therefore leave the column as four.
//
// Structure (after the published 7:2 cell): two CGEN cells and two
// XOR/XNOR+MUX pairs reduce {x5,x6,x7} and {x2,x3,x4} to sum/carry pairs
// (sa,ca) and (sb,cb). A MUX chain forms s1 = sa^sb^x1, and a third CGEN
// forms cm = maj(sa,sb,x1). An XOR/XNOR of ca,cb selects two MUXes that
// give the carry-outs: cout1 = maj(ca,cb,cm) and cout2 = ca^cb^cm. Two
// final MUX levels add cin2 and cin1 to s1 for sum and carry. The carry-outs
// never depend on the carry inputs. The weight of each carry-out (cout1 to
// 2^(i+2), cout2 to 2^(i+1)) follows the column diagram of the 8-bit
// reduction; the internal equations are this design's reading of the cell.
// Purely combinational.
module comp72 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic x6,
  input  logic x7,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic ca, cb, cm;
  logic d67, sa, d34, sb, dab, s1, dc, e;

  // Upper groups: {x5,x6,x7} and {x2,x3,x4}.
  cgen u_cgen_a (.x(x5), .y(x6), .z(x7), .cout(ca));
  cgen u_cgen_b (.x(x2), .y(x3), .z(x4), .cout(cb));
  assign d67 = x6 ^ x7;
  assign sa  = d67 ? ~x5 : x5;
  assign d34 = x3 ^ x4;
  assign sb  = d34 ? ~x2 : x2;

  // Second level: sa + sb + x1 = s1 + 2 cm.
  cgen u_cgen_m (.x(sa), .y(sb), .z(x1), .cout(cm));
  assign dab = sa ^ sb;
  assign s1  = dab ? ~x1 : x1;

  // Carry-outs: ca + cb + cm = cout2 + 2 cout1.
  assign dc    = ca ^ cb;
  assign cout1 = dc ? cm : ca;
  assign cout2 = dc ? ~cm : cm;

  // Carry inputs: s1 + cin2 + cin1 = sum + 2 carry.
  assign e     = s1 ? ~cin2 : cin2;
  assign sum   = e ? ~cin1 : cin1;
  assign carry = e ? cin1 : s1;
endmodule
