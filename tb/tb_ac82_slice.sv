// tb_ac82_slice: self-checking test of a 4-column slice of 8-2 compressor
// cells. Random operands and lateral carry inputs (plus all-zero and
// all-one corners) are applied and the slice identity
//   sum(op) + popcount(cin) = s + 2*c + 2^W * popcount(cout)
// is checked with integers computed by the testbench.
module tb_ac82_slice;
  import amul_pkg::*;
  localparam int unsigned W = 4;

  logic [NUM_OPS-1:0][W-1:0] op;
  logic [NUM_LAT-1:0]        cin, cout;
  logic [W-1:0]              s, c;
  int                        checks = 0, failures = 0;

  ac82_slice #(.W(W)) dut (.op(op), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint lhs, rhs;
    #1;
    lhs = $countones(cin);
    for (int r = 0; r < NUM_OPS; r++) lhs += longint'(op[r]);
    rhs = longint'(s) + 2 * longint'(c) + (longint'(1) << W) * $countones(cout);
    checks++;
    if (lhs != rhs) begin
      failures++;
      if (failures < 10) $display("FAIL op=%h cin=%b: in %0d out %0d", op, cin, lhs, rhs);
    end
  endtask

  initial begin
    op = '0;  cin = '0;  check();
    op = '1;  cin = '1;  check();
    op = '1;  cin = '0;  check();
    for (int i = 0; i < 20000; i++) begin
      for (int r = 0; r < NUM_OPS; r++) op[r] = W'($urandom);
      cin = NUM_LAT'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
