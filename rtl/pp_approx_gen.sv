// pp_approx_gen: approximate partial-product matrix for an N x N unsigned
// multiplier, packed into the eight operand rows of an 8-2 adder compressor.
//
// Partial product a_{m,n} = a[m] & b[n] has weight 2^(m+n). In the columns
// k = APPROX_LO..APPROX_HI every symmetric pair a_{m,n}, a_{n,m} (m < n,
// m + n = k) is replaced by
//   propagate p_{m,n} = a_{m,n} | a_{n,m}     (same weight 2^k)
//   generate  g_{m,n} = a_{m,n} & a_{n,m}     (same weight 2^k)
// which is exact, since a + b = (a|b) + (a&b). The approximation is that
// all generate bits of a column are ORed into a single bit. A generate bit
// is 1 with probability 1/16 for uniform operands, so two or more of them
// are rarely 1 together; when they are, the column loses (count - 1) * 2^k
// and the product comes out low. It is never high. The diagonal product
// a_{k/2,k/2} of an even column has no partner and is kept. Columns outside
// the range keep their plain partial products.
//
// Every column's bits are then stacked from row 0 upwards, so that
// rows[r][k] is the r-th bit of column k and unused positions are 0. With
// N = 8 and the default range the tallest column holds 5 bits, so rows 5
// to 7 and the top column stay zero; they are kept so that any column
// range (up to an exact matrix, whose middle column holds 8 bits) fits the
// eight inputs of the 8-2 compressor. Purely combinational.
//
// The operand size, the column range, the propagate/generate equations
// and the OR of the generate bits follow the published design. The order
// of the bits inside a column is this design's own choice; it does not
// change the sum.
module pp_approx_gen
  import amul_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned APPROX_LO = 3,
  parameter int unsigned APPROX_HI = 11
) (
  input  logic [N-1:0]                  a,
  input  logic [N-1:0]                  b,
  output logic [NUM_OPS-1:0][2*N-1:0]   rows
);

  if (N > NUM_OPS || N < 2) begin : g_bad_n
    $error("pp_approx_gen: N must be in 2..8 to fit the 8-2 adder compressor");
  end

  logic [N-1:0][N-1:0] pp;   // pp[m][n] = a[m] & b[n]

  always_comb begin
    for (int unsigned m = 0; m < N; m++)
      for (int unsigned n = 0; n < N; n++)
        pp[m][n] = a[m] & b[n];
  end

  always_comb begin
    rows = '0;
    for (int unsigned k = 0; k < 2*N - 1; k++) begin
      int unsigned cnt;
      logic        gor;
      logic        approx;
      cnt    = 0;
      gor    = 1'b0;
      approx = (k >= APPROX_LO) && (k <= APPROX_HI);
      for (int unsigned m = 0; m < N; m++) begin
        int unsigned n;
        n = k - m;
        if (m <= k && n < N) begin
          if (!approx) begin
            rows[cnt][k] = pp[m][n];
            cnt++;
          end else if (m < n) begin
            rows[cnt][k] = pp[m][n] | pp[n][m];   // propagate, eq. (1)
            cnt++;
            gor |= pp[m][n] & pp[n][m];            // generate, eq. (2), ORed
          end else if (m == n) begin
            rows[cnt][k] = pp[m][m];              // diagonal bit
            cnt++;
          end
        end
      end
      if (approx) rows[cnt][k] = gor;
    end
  end

endmodule
