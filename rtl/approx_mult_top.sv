// approx_mult_top: N x N unsigned approximate multiplier (default 8 x 8)
// whose partial products are reduced by a 16-bit 8-2 adder compressor.
//
// Datapath, one operation per clock:
//   cycle 0  a, b and in_valid are registered.
//   cycle 1  pp_approx_gen forms the partial products, turns symmetric
//            pairs in columns APPROX_LO..APPROX_HI into propagate/generate
//            bits and ORs the generate bits of each column (the only
//            source of error); the eight rows enter the line of 8-2
//            compressor cells of ac16_8_2, whose sum and carry vectors are
//            registered in its pipeline register.
//   cycle 2  the carry look-ahead adder of ac16_8_2 recombines them and
//            the product is registered at the output.
// p and out_valid therefore follow a, b and in_valid by three clock edges,
// and a new pair of operands can enter every cycle. rst_n is synchronous
// and clears the valid flags only.
//
// The arithmetic (partial products, propagate/generate, OR of the generate
// bits, 8-2 compressor reduction, pipeline register before a CLA) follows
// the published design. The input and output registers, the valid flags
// and the synchronous reset are this design's own choice.
module approx_mult_top
  import amul_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned APPROX_LO = 3,
  parameter int unsigned APPROX_HI = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  if (W % 4 != 0) begin : g_bad_n
    $error("approx_mult_top: N must be even");
  end

  // input register
  logic [N-1:0] a_q, b_q;
  logic         v_in_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    if (!rst_n) v_in_q <= 1'b0;
    else        v_in_q <= in_valid;
  end

  // approximate partial products
  logic [NUM_OPS-1:0][W-1:0] rows;

  pp_approx_gen #(
    .N        (N),
    .APPROX_LO(APPROX_LO),
    .APPROX_HI(APPROX_HI)
  ) u_pp (
    .a   (a_q),
    .b   (b_q),
    .rows(rows)
  );

  // 16-bit 8-2 adder compressor (compressor line, pipeline register, CLA)
  logic [W-1:0] sum;
  logic         ovf;
  logic         v_ac;

  ac16_8_2 #(.W(W), .SLICE(4)) u_ac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_in_q),
    .op       (rows),
    .out_valid(v_ac),
    .sum      (sum),
    .ovf      (ovf)
  );

  // output register
  always_ff @(posedge clk) begin
    p <= sum;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_ac;
  end

  // The approximate product never exceeds the exact one, so it always
  // fits in 2N bits.
  always_ff @(posedge clk) begin
    if (rst_n && v_ac) assert (!ovf)
      else $error("approx_mult_top: product overflowed %0d bits", W);
  end

endmodule
