// tb_ac16_8_2: self-checking test of the pipelined 16-bit 8-2 adder
// compressor. Eight random operands enter every cycle (with random idle
// cycles in between); each result must appear exactly one clock edge after
// its operands, equal to their total modulo 2^16, with ovf set exactly
// when the total does not fit in 16 bits. Operand sets with use_small values
// make sure both the overflow and the no-overflow case occur.
module tb_ac16_8_2;
  import amul_pkg::*;
  localparam int unsigned W = 16;
  localparam int unsigned LATENCY = 1;

  logic                      clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [NUM_OPS-1:0][W-1:0] op;
  logic                      out_valid, ovf;
  logic [W-1:0]              sum;
  int                        checks = 0, failures = 0;
  int                        cycle = 0;
  int                        n_ovf = 0, n_fit = 0;

  typedef struct {
    longint total;
    int     cyc;
  } exp_t;
  exp_t q[$];

  ac16_8_2 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op),
    .out_valid(out_valid), .sum(sum), .ovf(ovf)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = q.pop_front();
        if (sum != W'(e.total) || ovf != (e.total >= (longint'(1) << W))) begin
          failures++;
          if (failures < 10) $display("FAIL total=%0d got sum=%0d ovf=%0d", e.total, sum, ovf);
        end
        checks++;
        if (cycle - e.cyc != LATENCY) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - e.cyc, LATENCY);
        end
        if (e.total >= (longint'(1) << W)) n_ovf++; else n_fit++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
      end else begin
        exp_t e;
        bit   use_small;
        use_small = ($urandom_range(0, 1) == 0);
        e.total = 0;
        for (int r = 0; r < NUM_OPS; r++) begin
          op[r] = use_small ? W'($urandom_range(0, 8191)) : W'($urandom);
          e.total += longint'(op[r]);
        end
        e.cyc = cycle;
        in_valid = 1'b1;
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_ovf == 0 || n_fit == 0) begin
      failures++;
      $display("FAIL pending=%0d overflow cases=%0d fitting cases=%0d", q.size(), n_ovf, n_fit);
    end
    $display("results: %0d fitting, %0d overflowing", n_fit, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
