// comp42: multiplexer-based 4:2 compressor.
//
// Four bits x1..x4 plus a carry input, all of weight 2^i, give a sum of
// weight 2^i and two bits of weight 2^(i+1):
//   x1 + x2 + x3 + x4 + cin = sum + 2 (carry + cout).
// cout depends only on x1..x3, so a row of these cells has no rippling
// carry. The construction (an XOR/XNOR on x1,x2 selecting the multiplexers,
// two more MUX levels to the outputs) follows the same style as the 5:2 and
// 7:2 cells; the reduction scheme only names this cell and gives its delay of
// one XOR/XNOR and two MUXes, so the exact wiring is this design's own.
// Purely combinational.
module comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic d12;  // x1 ^ x2
  logic t;    // x1 ^ x2 ^ x3
  logic u;    // t ^ x4

  assign d12   = x1 ^ x2;
  assign cout  = d12 ? x3 : x1;
  assign t     = d12 ? ~x3 : x3;
  assign u     = t ? ~x4 : x4;
  assign sum   = u ? ~cin : cin;
  assign carry = u ? cin : x4;
endmodule
