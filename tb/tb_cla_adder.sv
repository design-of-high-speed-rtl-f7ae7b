// tb_cla_adder: self-checking test of the carry look-ahead adder at its
// default width (16) and at 8 bits. Carry-propagation corners (all ones
// plus one, alternating patterns) and random operands with random carry-in
// are compared with the sum the testbench computes.
module tb_cla_adder;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [7:0]  a8, b8, sum8;
  logic        cout8;
  int          checks = 0, failures = 0;

  cla_adder            dut   (.a(a),  .b(b),  .cin(cin), .sum(sum),  .cout(cout));
  cla_adder #(.W(8))   dut8  (.a(a8), .b(b8), .cin(cin), .sum(sum8), .cout(cout8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] ref16;
    logic [8:0]  ref8;
    a = x;  b = y;  cin = ci;
    a8 = x[7:0];  b8 = y[7:0];
    #1;
    ref16 = 17'(x) + 17'(y) + 17'(ci);
    ref8  = 9'(x[7:0]) + 9'(y[7:0]) + 9'(ci);
    checks++;
    if ({cout, sum} != ref16) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h, got %h", x, y, ci, ref16, {cout, sum});
    end
    checks++;
    if ({cout8, sum8} != ref8) begin
      failures++;
      if (failures < 10) $display("FAIL(8) %h + %h + %0d = %h, got %h", x[7:0], y[7:0], ci, ref8, {cout8, sum8});
    end
  endtask

  initial begin
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h0F0F, 16'h00F1, 1'b0);
    apply(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 50000; i++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
