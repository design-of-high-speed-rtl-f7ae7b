// comp_7_2: 7-2 adder compressor.
//
// Reduces seven bits of one column to one sum bit of the same weight and
// three bits of twice the weight:
//   x[0] + ... + x[6] = sum + 2*(cout1 + cout2 + carry)
// Two 3-2 compressors take x[0..2] and x[3..5]; a third adds their two sum
// bits and x[6]. Their carries are cout1, cout2 and carry. Inputs x[6] and
// x[3..5] are the late inputs: in the 8-2 cell they receive the lateral
// carries of the neighbouring column, so that no carry ripples across more
// than one column. Purely combinational.
//
// The arithmetic identity is the published one. The internal wiring of the
// 3-2 compressors is this design's own choice (the simplest tree that meets
// the identity); its longest path is four XOR gates.
module comp_7_2 (
  input  logic [6:0] x,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);

  logic s1, s2;

  comp_3_2 u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1),  .carry(cout1));
  comp_3_2 u_fa2 (.a(x[3]), .b(x[4]), .c(x[5]), .sum(s2),  .carry(cout2));
  comp_3_2 u_fa3 (.a(s1),   .b(s2),   .c(x[6]), .sum(sum), .carry(carry));

endmodule
