// ac82_slice: a W-column slice of 8-2 adder compressor cells.
//
// Reduces eight W-bit operands op[0..7] to a sum vector s and a carry
// vector c such that, including the lateral carries entering at the bottom
// column (cin) and leaving at the top column (cout):
//   sum(op) + sum(cin) = s + 2*c + 2^W * sum(cout)
// c[i] has weight 2^(i+1). Column i of every operand feeds one comp_8_2
// cell; the cell's five lateral carries go to the cell of column i+1.
// Slices chain through cin/cout to make wider compressors. Purely
// combinational.
//
// The default width of four columns follows the reading that the 16-bit
// adder compressor is made of four 8-2 compressor blocks.
module ac82_slice
  import amul_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [NUM_OPS-1:0][W-1:0] op,
  input  logic [NUM_LAT-1:0]        cin,
  output logic [W-1:0]              s,
  output logic [W-1:0]              c,
  output logic [NUM_LAT-1:0]        cout
);

  // lat[i] enters column i; lat[W] leaves the slice.
  logic [NUM_LAT-1:0] lat [W+1];

  assign lat[0] = cin;
  assign cout   = lat[W];

  for (genvar i = 0; i < W; i++) begin : g_col
    logic [NUM_OPS-1:0] colbits;
    for (genvar r = 0; r < NUM_OPS; r++) begin : g_row
      assign colbits[r] = op[r][i];
    end
    comp_8_2 u_cell (
      .x    (colbits),
      .cin  (lat[i]),
      .sum  (s[i]),
      .carry(c[i]),
      .cout (lat[i+1])
    );
  end

endmodule
