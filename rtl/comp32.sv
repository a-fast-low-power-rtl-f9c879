// comp32: multiplexer-based 3:2 compressor (full adder).
//
// Three bits of weight 2^i give a sum bit of weight 2^i and a carry of weight
// 2^(i+1): a + b + c = sum + 2 carry. The half sum a^b is formed once and
// used as the select of two 2:1 multiplexers, so the critical path is one
// XOR/XNOR and one MUX, as the reduction scheme specifies for its 3:2 cell.
// Purely combinational.
module comp32 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic hs;
  assign hs    = a ^ b;
  assign sum   = hs ? ~c : c;
  assign carry = hs ? c : a;
endmodule
