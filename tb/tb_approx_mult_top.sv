// tb_approx_mult_top: end-to-end, full-size test of the 8 x 8 approximate
// multiplier at its default parameters.
//
// All 65536 operand pairs are streamed through the pipeline, mostly back to
// back with random idle cycles. Every product is compared with the
// approximate product computed by the testbench (exact product minus the
// weight lost where two or more generate terms of a column are ORed) and
// must appear exactly three clock edges after its operands. The test counts
// how often each mechanism of the design occurred and fails if one never
// did: the OR of the generate terms losing weight in a column with two,
// three and four generate terms, products that stay exact, back-to-back
// issue and idle cycles. Per column it measures the probability that the
// OR loses weight and compares it with the binomial value for independent
// generate terms of probability 1/16 (0.00390, 0.01123 and 0.02153 for
// two, three and four terms). It also reports the mean relative error.
module tb_approx_mult_top;
  localparam int unsigned N = 8;
  localparam int unsigned LO = 3, HI = 11;
  localparam int unsigned LATENCY = 3;

  logic           clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           out_valid;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;
  int             cycle = 0;

  // mechanism counters
  int n_inexact = 0, n_exact = 0, n_b2b = 0, n_idle = 0;
  int col_loss [2*N];
  int loss_by_m [N];

  typedef struct {
    int     prod;
    int     cyc;
    int     va, vb;
  } exp_t;
  exp_t q[$];

  real red_sum = 0.0;
  int  red_n = 0;

  approx_mult_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // number of generate terms of column k (pairs m < n with m + n = k)
  function automatic int gen_terms(int k);
    int cnt = 0;
    for (int m = 0; m < N; m++)
      if (k - m > m && k - m < N) cnt++;
    return cnt;
  endfunction

  // independent model of the approximate product
  function automatic int model(int va, int vb, bit count_it);
    int res = va * vb;
    for (int k = LO; k <= HI; k++) begin
      int ones = 0;
      for (int m = 0; m < N; m++) begin
        int n = k - m;
        if (n > m && n < N && va[m] && vb[n] && va[n] && vb[m]) ones++;
      end
      if (ones > 1) begin
        res -= (ones - 1) << k;
        if (count_it) begin
          col_loss[k]++;
          loss_by_m[gen_terms(k)]++;
        end
      end
    end
    return res;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected product");
      end else begin
        e = q.pop_front();
        if (int'(p) != e.prod) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", e.va, e.vb, p, e.prod);
        end
        checks++;
        if (cycle - e.cyc != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d, expected %0d", cycle - e.cyc, LATENCY);
        end
      end
    end
  end

  initial begin
    bit prev_valid;
    prev_valid = 1'b0;
    for (int k = 0; k < 2 * N; k++) col_loss[k] = 0;
    for (int m = 0; m < N; m++) loss_by_m[m] = 0;

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int v = 0; v < 65536; v++) begin
      exp_t e;
      int   ex;
      // random idle cycles
      while ($urandom_range(0, 15) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        a = N'($urandom);
        b = N'($urandom);
        prev_valid = 1'b0;
        n_idle++;
        #1;
      end
      @(negedge clk);
      e.va = v >> N;
      e.vb = v & ((1 << N) - 1);
      ex = e.va * e.vb;
      e.prod = model(e.va, e.vb, 1'b1);
      e.cyc  = cycle;
      if (e.prod != ex) n_inexact++; else n_exact++;
      if (ex != 0) begin
        red_sum += real'(ex - e.prod) / real'(ex);
        red_n++;
      end
      if (prev_valid) n_b2b++;
      a = N'(e.va);
      b = N'(e.vb);
      in_valid = 1'b1;
      prev_valid = 1'b1;
      q.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", q.size());
    end

    // error statistics per column
    for (int k = LO; k <= HI; k++) begin
      int   m;
      real  pe, pg, pz, bin;
      m   = gen_terms(k);
      pe  = real'(col_loss[k]) / 65536.0;
      pg  = 1.0 / 16.0;
      pz  = 1.0 - pg;
      bin = 1.0 - pz ** m - real'(m) * pg * pz ** (m - 1);
      $display("column %0d: %0d generate terms, loses weight in %0d of 65536 (P=%.5f, binomial %.5f)",
               k, m, col_loss[k], pe, bin);
      checks++;
      if (pe - bin > 1.0e-6 || bin - pe > 1.0e-6) begin
        failures++;
        $display("FAIL column %0d loss probability", k);
      end
    end

    // every mechanism must have happened
    for (int m = 2; m <= 4; m++) begin
      checks++;
      $display("losses in columns with %0d generate terms: %0d", m, loss_by_m[m]);
      if (loss_by_m[m] == 0) begin
        failures++;
        $display("FAIL no loss in a column with %0d generate terms", m);
      end
    end
    $display("inexact products %0d, exact products %0d, back-to-back issues %0d, idle cycles %0d",
             n_inexact, n_exact, n_b2b, n_idle);
    checks++;
    if (n_inexact == 0 || n_exact == 0 || n_b2b == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mean relative error over non-zero products: %.6f %%", 100.0 * red_sum / real'(red_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
