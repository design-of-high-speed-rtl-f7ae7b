// amul_pkg: constants shared by the adder-compressor approximate multiplier.
//
// The multiplier reduces its partial products with 8-2 adder compressors.
// An 8-2 compressor cell takes eight operand bits of one column plus five
// lateral carries from the column below it, and produces one sum bit, one
// carry bit and five lateral carries for the column above it. The final
// sum and carry vectors are recombined by a carry look-ahead adder built
// from 4-bit groups. These numbers are fixed by the cell structure and are
// collected here so that every module agrees on them.
package amul_pkg;

  // Operand rows accepted by one 8-2 adder compressor.
  localparam int unsigned NUM_OPS = 8;

  // Lateral carries between neighbouring 8-2 cells (Cout0..Cout4 / Cin0..Cin4).
  localparam int unsigned NUM_LAT = 5;

  // Bits per group of the carry look-ahead adder.
  localparam int unsigned CLA_GROUP = 4;

endpackage
