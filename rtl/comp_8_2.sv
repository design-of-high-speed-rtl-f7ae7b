// comp_8_2: 8-2 adder compressor cell (one column).
//
// Adds eight operand bits x[7:0] of one column and five lateral carries
// cin[4:0] coming from the column below:
//   sum(x) + sum(cin) = sum + 2*(cout[0] + ... + cout[4] + carry)
// cout[4:0] go to the cin[4:0] of the column above; sum and carry go to the
// final recombination adder (carry with weight two).
//
// Structure: two 3-2 compressors reduce x[0..2] and x[3..5] (giving cout[0]
// and cout[1]); a 7-2 compressor adds their sums, x[6], x[7], cin[0],
// cin[1] and cin[2] (giving cout[2], cout[3], cout[4]); a last 3-2
// compressor adds the 7-2 sum to cin[3] and cin[4] (giving sum and carry).
// Each cout depends on the operand bits of at most the two columns below,
// never on a chain of columns, so a row of these cells has a constant delay
// whatever its width. Purely combinational.
//
// The identity and the use of one 7-2 and 3-2 compressors follow the
// published design; which input goes to which compressor is this design's
// own choice.
module comp_8_2
  import amul_pkg::*;
(
  input  logic [NUM_OPS-1:0] x,
  input  logic [NUM_LAT-1:0] cin,
  output logic               sum,
  output logic               carry,
  output logic [NUM_LAT-1:0] cout
);

  logic sa, sb, s7;

  comp_3_2 u_fa_a (.a(x[0]), .b(x[1]), .c(x[2]), .sum(sa), .carry(cout[0]));
  comp_3_2 u_fa_b (.a(x[3]), .b(x[4]), .c(x[5]), .sum(sb), .carry(cout[1]));

  comp_7_2 u_c72 (
    .x    ({cin[2], cin[1], cin[0], x[7], x[6], sb, sa}),
    .sum  (s7),
    .carry(cout[4]),
    .cout1(cout[2]),
    .cout2(cout[3])
  );

  comp_3_2 u_fa_c (.a(s7), .b(cin[3]), .c(cin[4]), .sum(sum), .carry(carry));

endmodule
