// comp_3_2: 3-2 adder compressor (a full adder built from XORs and a MUX).
//
// Adds three bits of equal weight: a + b + c = sum + 2*carry. The XOR of a
// and b selects the carry: when a and b differ the carry equals c, when they
// are equal it equals a (both are the same bit). The longest path is two XOR
// gates (a/b to sum). When c is used as the carry input the cell is an
// ordinary MUX-based full adder. Purely combinational, no clock.
//
// The MUX/XOR structure and the two-XOR critical path follow the published
// description of the cell; the port names are this design's own.
module comp_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic x;

  always_comb begin
    x     = a ^ b;
    sum   = x ^ c;
    carry = x ? c : a;
  end

endmodule
