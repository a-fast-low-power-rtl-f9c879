// cgen: carry generator cell of the multiplexer-based compressors.
//
// Cout = (X + Y) Z + X Y, i.e. the majority of three equal-weight bits. It
// is the carry of a full adder and sits off the critical path of the 5:2
// and 7:2 compressors. Purely combinational.
module cgen (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic cout
);
  assign cout = ((x | y) & z) | (x & y);
endmodule
