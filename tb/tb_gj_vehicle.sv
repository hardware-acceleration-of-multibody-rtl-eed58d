// tb_gj_vehicle: the solver at the size of the vehicle model's
// Newton-Raphson system, 42 unknowns. Random diagonally dominant systems,
// one with its rows shuffled so that pivot exchanges are needed; each
// solution is checked by its double-precision residual, and the run time
// against N(N+1)/2 + N + N*N + 2 = 2795 cycles.
module tb_gj_vehicle;
  import mbfp_pkg::*;
  import mbtb_pkg::*;

  localparam int N = 42;
  localparam int IW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, in_we = 0, start = 0, busy, done, singular;
  logic [IW-1:0] in_row = 0, in_col = 0, out_idx = 0;
  fp32_t in_data = 0, out_data;
  int checks = 0, failures = 0;

  gauss_jordan_solver #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic run_case(bit shuffle);
    real a[N][N+1], x[N], res;
    int perm[N], p, t, cyc;
    for (int r = 0; r < N; r++) perm[r] = r;
    if (shuffle)
      for (int r = N - 1; r > 0; r--) begin
        p = int'($urandom % (r + 1)); t = perm[r]; perm[r] = perm[p]; perm[p] = t;
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c <= N; c++)
        a[perm[r]][c] = f2r(r2f((c == r) ? rr(20, 40) : rr(-1, 1)));
    for (int r = 0; r < N; r++)
      for (int c = 0; c <= N; c++) begin
        @(negedge clk);
        in_we = 1; in_row = IW'(r); in_col = IW'(c); in_data = r2f(a[r][c]);
      end
    @(negedge clk); in_we = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != N * (N + 1) / 2 + N + N * N + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    if (singular) begin failures++; $display("FAIL singular"); end
    for (int r = 0; r < N; r++) begin out_idx = IW'(r); #1; x[r] = f2r(out_data); end
    for (int r = 0; r < N; r++) begin
      res = -a[r][N];
      for (int c = 0; c < N; c++) res += a[r][c] * x[c];
      checks++;
      if ((res < 0 ? -res : res) > 1e-4) begin failures++; $display("FAIL residual row %0d %g", r, res); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(0);
    run_case(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
