// ac16_8_2: W-bit 8-2 adder compressor (default 16 bits), pipelined.
//
// Adds eight W-bit operands. Stage 1 is a line of 8-2 compressor cells,
// organised as W/SLICE slices (four slices of four columns at the default
// size) chained through their lateral carries; it reduces the eight
// operands to a sum vector and a carry vector. A pipeline register sits
// between the compressor line and the recombination adder. Stage 2 is a
// W-bit carry look-ahead adder that adds the registered sum vector to the
// registered carry vector shifted left by one.
//
// Interface: op/in_valid are sampled at a rising clock edge; sum/ovf/
// out_valid show the result from that edge on, i.e. one cycle of latency
// and one new set of operands accepted every cycle. sum is the total
// modulo 2^W; ovf is set when the total did not fit in W bits (a carry or
// lateral carry left the top column). rst_n is synchronous and clears only
// the valid flag; the data registers need no reset.
//
// The compressor line, the pipeline register in front of the adder and the
// use of a carry look-ahead adder follow the published design. The slice
// size, the ovf flag and the valid flag are this design's own.
module ac16_8_2
  import amul_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned SLICE = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [NUM_OPS-1:0][W-1:0] op,
  output logic                      out_valid,
  output logic [W-1:0]              sum,
  output logic                      ovf
);

  localparam int unsigned NS = W / SLICE;

  if (W % SLICE != 0 || SLICE == 0) begin : g_bad_slice
    $error("ac16_8_2: W must be a multiple of SLICE");
  end

  // ---------------- stage 1: compressor line ----------------
  logic [NUM_LAT-1:0] lat [NS+1];
  logic [W-1:0]       s_vec, c_vec;

  assign lat[0] = '0;

  for (genvar j = 0; j < NS; j++) begin : g_slice
    logic [NUM_OPS-1:0][SLICE-1:0] sop;
    for (genvar r = 0; r < NUM_OPS; r++) begin : g_op
      assign sop[r] = op[r][j*SLICE +: SLICE];
    end
    ac82_slice #(.W(SLICE)) u_slice (
      .op  (sop),
      .cin (lat[j]),
      .s   (s_vec[j*SLICE +: SLICE]),
      .c   (c_vec[j*SLICE +: SLICE]),
      .cout(lat[j+1])
    );
  end

  // ---------------- pipeline register ----------------
  logic [W-1:0] s_q, c_q;
  logic         top_q, v_q;

  always_ff @(posedge clk) begin
    s_q   <= s_vec;
    c_q   <= c_vec;
    top_q <= |lat[NS];
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  // ---------------- stage 2: recombination adder ----------------
  logic cla_cout;

  cla_adder #(.W(W)) u_cla (
    .a   (s_q),
    .b   ({c_q[W-2:0], 1'b0}),
    .cin (1'b0),
    .sum (sum),
    .cout(cla_cout)
  );

  assign ovf       = top_q | c_q[W-1] | cla_cout;
  assign out_valid = v_q;

endmodule
