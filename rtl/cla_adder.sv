// cla_adder: W-bit carry look-ahead adder, two levels.
//
// sum + 2^W*cout = a + b + cin. Bit generate g = a&b and propagate
// p = a^b are formed for every bit. The bits are split into groups of
// CLA_GROUP (4) bits; each group gives a group generate GG and propagate
// GP. A second look-ahead level computes the carry into every group
// directly from GG, GP and cin, and inside each group the carry into every
// bit is computed directly from g, p and the group carry. Every carry is a
// flat sum of products (c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]cin),
// so no carry ripples through a chain of cells. Purely combinational.
//
// The use of a carry look-ahead adder for the final recombination follows
// the published design; the group size and the two-level organisation are
// this design's own choice. W must be a multiple of 4.
module cla_adder
  import amul_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = W / CLA_GROUP;

  if (W % CLA_GROUP != 0 || W == 0) begin : g_bad_width
    $error("cla_adder: W must be a positive multiple of 4");
  end

  // Carries c[0..n] of an n-bit look-ahead unit, each as a flat sum of
  // products of the generate and propagate terms below it.
  function automatic logic [W:0] lookahead(input logic [W-1:0] gv,
                                           input logic [W-1:0] pv,
                                           input logic         c0,
                                           input int unsigned  n);
    logic [W:0] c;
    logic       term;
    c = '0;
    c[0] = c0;
    for (int unsigned i = 1; i <= n; i++) begin
      // carry-in term: all propagates p[0..i-1] and c0
      term = c0;
      for (int unsigned k = 0; k < i; k++) term &= pv[k];
      c[i] = term;
      // generate terms: g[j] and all propagates above it up to i-1
      for (int unsigned j = 0; j < i; j++) begin
        term = gv[j];
        for (int unsigned k = j + 1; k < i; k++) term &= pv[k];
        c[i] |= term;
      end
    end
    return c;
  endfunction

  logic [W-1:0] g, p, c;
  logic [W-1:0] gg, gp;   // group generate / propagate (low NG bits used)
  logic [W:0]   gc;       // carry into each group, gc[NG] = carry out

  always_comb begin
    g = a & b;
    p = a ^ b;

    // group generate and propagate
    gg = '0;
    gp = '0;
    for (int unsigned j = 0; j < NG; j++) begin
      logic [W-1:0] lg, lp;
      logic [W:0]   lc;
      lg = '0;
      lp = '0;
      for (int unsigned k = 0; k < CLA_GROUP; k++) begin
        lg[k] = g[j*CLA_GROUP + k];
        lp[k] = p[j*CLA_GROUP + k];
      end
      lc    = lookahead(lg, lp, 1'b0, CLA_GROUP);
      gg[j] = lc[CLA_GROUP];
      gp[j] = &lp[CLA_GROUP-1:0];
    end

    // second level: carry into every group
    gc = lookahead(gg, gp, cin, NG);

    // first level: carry into every bit
    c = '0;
    for (int unsigned j = 0; j < NG; j++) begin
      logic [W-1:0] lg, lp;
      logic [W:0]   lc;
      lg = '0;
      lp = '0;
      for (int unsigned k = 0; k < CLA_GROUP; k++) begin
        lg[k] = g[j*CLA_GROUP + k];
        lp[k] = p[j*CLA_GROUP + k];
      end
      lc = lookahead(lg, lp, gc[j], CLA_GROUP);
      for (int unsigned k = 0; k < CLA_GROUP; k++) c[j*CLA_GROUP + k] = lc[k];
    end

    sum  = p ^ c;
    cout = gc[NG];
  end

endmodule
