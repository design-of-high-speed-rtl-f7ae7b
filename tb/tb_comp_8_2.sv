// tb_comp_8_2: exhaustive self-checking test of the 8-2 adder compressor
// cell. All 2^13 combinations of the eight operand bits and five lateral
// carry inputs are applied and the identity
//   popcount(x) + popcount(cin) = sum + 2*(popcount(cout) + carry)
// is checked. The cell's constant-delay property is checked too: cout[0]
// and cout[1] must not depend on any cin bit.
module tb_comp_8_2;
  import amul_pkg::*;
  logic [NUM_OPS-1:0] x;
  logic [NUM_LAT-1:0] cin, cout;
  logic               sum, carry;
  int                 checks = 0, failures = 0;

  comp_8_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (NUM_OPS + NUM_LAT)); v++) begin
      int lhs, rhs;
      logic [1:0] early;
      {cin, x} = 13'(v);
      #1;
      lhs = $countones(x) + $countones(cin);
      rhs = int'(sum) + 2 * ($countones(cout) + int'(carry));
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b cin=%b: in %0d out %0d", x, cin, lhs, rhs);
      end
      early = cout[1:0];
      cin   = ~cin;
      #1;
      checks++;
      if (cout[1:0] != early) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b: cout[1:0] depends on cin", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
