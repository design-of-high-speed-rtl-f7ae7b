// tb_comp_7_2: exhaustive self-checking test of the 7-2 adder compressor.
// All 128 input patterns are applied and the identity
//   popcount(x) = sum + 2*(cout1 + cout2 + carry)
// is checked. cout1 must depend on x[0..2] only (it is the early carry);
// that is checked against the testbench's own majority function.
module tb_comp_7_2;
  logic [6:0] x;
  logic       sum, carry, cout1, cout2;
  int         checks = 0, failures = 0;

  comp_7_2 dut (.x(x), .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int lhs, rhs;
      logic maj;
      x = 7'(v);
      #1;
      lhs = $countones(x);
      rhs = int'(sum) + 2 * (int'(cout1) + int'(cout2) + int'(carry));
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL x=%b: inputs add to %0d, outputs to %0d", x, lhs, rhs);
      end
      maj = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
      checks++;
      if (cout1 != maj) begin
        failures++;
        $display("FAIL x=%b: cout1=%0d expected %0d", x, cout1, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
