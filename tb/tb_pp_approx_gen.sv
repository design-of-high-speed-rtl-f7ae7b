// tb_pp_approx_gen: exhaustive self-checking test of the approximate
// partial-product generator for 8-bit operands. For all 65536 operand
// pairs the eight output rows are added as integers and compared with the
// approximate product worked out independently:
//   exact a*b minus, for each column k in 3..11, (G_k - 1) * 2^k where G_k
//   > 1 is the number of generate terms a_m b_n a_n b_m (m < n, m + n = k)
//   that are 1 (ORing them keeps only one).
// A second independent property is checked too: the outputs in columns
// outside 3..11 must hold exactly the plain partial-product bits, so their
// per-column bit count equals the number of a[m] & b[n] that are 1. A
// second instance with an empty approximate range must give the exact
// product for every pair.
module tb_pp_approx_gen;
  import amul_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned LO = 3, HI = 11;

  logic [N-1:0]                a, b;
  logic [NUM_OPS-1:0][2*N-1:0] rows;
  int                          checks = 0, failures = 0;
  int                          n_lossy = 0;

  logic [NUM_OPS-1:0][2*N-1:0] rows_exact;

  pp_approx_gen dut (.a(a), .b(b), .rows(rows));

  // empty approximate range: the matrix must add up to the exact product
  pp_approx_gen #(.N(N), .APPROX_LO(15), .APPROX_HI(0)) dut_exact (
    .a(a), .b(b), .rows(rows_exact)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        longint got, expv;
        a = N'(va);
        b = N'(vb);
        #1;
        got = 0;
        for (int r = 0; r < NUM_OPS; r++) got += longint'(rows[r]);
        expv = longint'(va * vb);
        for (int k = LO; k <= HI; k++) begin
          int gcount;
          gcount = 0;
          for (int m = 0; m < N; m++) begin
            int n;
            n = k - m;
            if (n > m && n < N && a[m] && b[n] && a[n] && b[m]) gcount++;
          end
          if (gcount > 1) expv -= (longint'(gcount) - 1) << k;
        end
        if (expv != longint'(va * vb)) n_lossy++;
        begin
          longint gx;
          gx = 0;
          for (int r = 0; r < NUM_OPS; r++) gx += longint'(rows_exact[r]);
          checks++;
          if (gx != longint'(va * vb)) begin
            failures++;
            if (failures < 10) $display("FAIL exact matrix a=%0d b=%0d: %0d", va, vb, gx);
          end
        end
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: rows add to %0d, expected %0d", va, vb, got, expv);
        end
        for (int k = 0; k < 2 * N - 1; k++) begin
          if (k < LO || k > HI) begin
            int have, want;
            have = 0;
            want = 0;
            for (int r = 0; r < NUM_OPS; r++) have += int'(rows[r][k]);
            for (int m = 0; m < N; m++)
              if (k - m >= 0 && k - m < N) want += (a[m] && b[k - m]) ? 1 : 0;
            checks++;
            if (have != want) begin
              failures++;
              if (failures < 10) $display("FAIL a=%0d b=%0d column %0d: %0d bits, expected %0d", va, vb, k, have, want);
            end
          end
        end
      end
    end
    checks++;
    if (n_lossy == 0) begin
      failures++;
      $display("FAIL the approximation never changed a product");
    end
    $display("operand pairs with an approximate product: %0d of 65536", n_lossy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
