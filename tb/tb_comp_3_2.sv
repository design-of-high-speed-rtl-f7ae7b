// tb_comp_3_2: exhaustive self-checking test of the 3-2 adder compressor.
// All eight input combinations are applied; sum and carry are compared with
// the two bits of a + b + c computed by the testbench.
module tb_comp_3_2;
  logic a, b, c, sum, carry;
  int   checks = 0, failures = 0;

  comp_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({carry, sum} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d: got carry=%0d sum=%0d", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
