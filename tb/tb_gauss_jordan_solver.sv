// tb_gauss_jordan_solver: random well-conditioned systems (diagonally
// dominant, like the tangent matrix of the integrator), systems whose rows
// are shuffled so that pivoting is needed, and one singular system. The
// solution is checked by a double-precision residual test ||A x - r|| and
// against a double-precision elimination; the cycle count is checked against
// N(N+1)/2 + N + N*N + 2.
module tb_gauss_jordan_solver;
  import mbfp_pkg::*;
  import mbtb_pkg::*;

  localparam int N = 9;
  localparam int IW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic in_we = 0, start = 0, busy, done, singular;
  logic [IW-1:0] in_row = 0, in_col = 0, out_idx = 0;
  fp32_t in_data = 0, out_data;
  int checks = 0, failures = 0;

  gauss_jordan_solver #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic run_case(int kind);
    real ar[N][N+1], w[N][N+1], x[N], t, piv;
    int cyc, exp_cyc, p, tmp;
    int perm[N];
    for (int r = 0; r < N; r++) perm[r] = r;
    if (kind == 1)
      for (int r = N - 1; r > 0; r--) begin
        p = int'($urandom % (r + 1)); tmp = perm[r]; perm[r] = perm[p]; perm[p] = tmp;
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c <= N; c++) begin
        ar[perm[r]][c] = f2r(r2f((c == r) ? rr(5, 10) * ((($urandom & 1) != 0) ? 1.0 : -1.0) : rr(-1, 1)));
      end
    if (kind == 2) for (int c = 0; c <= N; c++) ar[3][c] = ar[5][c];  // singular
    for (int r = 0; r < N; r++)
      for (int c = 0; c <= N; c++) begin
        @(negedge clk);
        in_we = 1; in_row = IW'(r); in_col = IW'(c); in_data = r2f(ar[r][c]);
      end
    @(negedge clk); in_we = 0;
    // reference: double-precision Gauss-Jordan with partial pivoting
    w = ar;
    for (int k = 0; k < N; k++) begin
      p = k;
      for (int r = k + 1; r < N; r++) if ((w[r][k] < 0 ? -w[r][k] : w[r][k]) > (w[p][k] < 0 ? -w[p][k] : w[p][k])) p = r;
      for (int c = 0; c <= N; c++) begin t = w[k][c]; w[k][c] = w[p][c]; w[p][c] = t; end
      piv = w[k][k];
      if (piv != 0.0) begin
        for (int c = 0; c <= N; c++) w[k][c] = w[k][c] / piv;
        for (int r = 0; r < N; r++)
          if (r != k) begin
            t = w[r][k];
            for (int c = 0; c <= N; c++) w[r][c] = w[r][c] - t * w[k][c];
          end
      end
    end
    for (int r = 0; r < N; r++) x[r] = w[r][N];
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = N * (N + 1) / 2 + N + N * N + 2;
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL latency %0d expected %0d", cyc, exp_cyc); end
    checks++;
    if (singular != (kind == 2)) begin failures++; $display("FAIL singular flag %0d kind %0d", singular, kind); end
    if (kind != 2) begin
      for (int r = 0; r < N; r++) begin
        out_idx = IW'(r); #1;
        checks++;
        if (!near(out_data, x[r], 1e-4, 1e-3)) begin
          failures++;
          $display("FAIL kind %0d x(%0d) got %f exp %f", kind, r, f2r(out_data), x[r]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) run_case(t % 2);
    run_case(2);
    run_case(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
