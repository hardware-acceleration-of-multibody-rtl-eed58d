// tb_mass_matrix_unit: loads random bodies and random tree topologies into
// mass_matrix_unit, runs it and compares every entry of M with a
// double-precision reference that forms the full matrices R (6NB x NB) and
// Mbar (block diagonal) and multiplies R^T * Mbar * R directly, with no use of
// the recursive assembly. Also checks the cycle count from start to done
// against the schedule formula NB + sum(parent ? 6 : 1) + sum(7 + depth) + 2,
// counted from the clock edge that samples start to the one after done rises.
module tb_mass_matrix_unit;
  import mbfp_pkg::*;
  import mbtb_pkg::*;
  import mb_types_pkg::*;

  localparam int NB = 9;
  logic clk = 0, rst_n = 0;
  logic in_we = 0, start = 0, busy, done;
  logic [3:0] in_body = 0, out_row = 0, out_col = 0;
  logic [4:0] in_word = 0;
  fp32_t in_data = 0, out_data;
  int checks = 0, failures = 0;

  mass_matrix_unit #(.NB(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  real mb_r[NB][6][6], b_r[NB][6];
  int  par[NB];

  task automatic wr(int body, logic [4:0] word, fp32_t v);
    @(negedge clk);
    in_we = 1; in_body = 4'(body); in_word = word; in_data = v;
    @(negedge clk);
    in_we = 0;
  endtask

  task automatic run_case(int kind);
    real mr, gr[3], jr[3][3], gt[3][3], acc, rm[6*NB][NB], ref_m[NB][NB], mx;
    fp32_t f;
    int depth, k, cyc, exp_cyc;
    for (int i = 0; i < NB; i++) begin
      case (kind)
        0: par[i] = i;                                  // open chain
        1: par[i] = (i == 0) ? 0 : int'($urandom % (i + 1));  // random tree
        default: par[i] = (i == 7) ? 2 : (i == 8) ? 8 : (i < 5 ? i : 0);
      endcase
      f = r2f(rr(0.5, 5.0)); mr = f2r(f); wr(i, W_MASS, f);
      for (int c = 0; c < 3; c++) begin f = r2f(rr(-2, 2)); gr[c] = f2r(f); wr(i, W_G0 + 5'(c), f); end
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) jr[r][c] = 0.0;
      jr[0][0] = f2r(r2f(rr(0.1, 1))); jr[1][1] = f2r(r2f(rr(0.1, 1))); jr[2][2] = f2r(r2f(rr(0.1, 1)));
      jr[0][1] = f2r(r2f(rr(-0.05, 0.05))); jr[0][2] = f2r(r2f(rr(-0.05, 0.05))); jr[1][2] = f2r(r2f(rr(-0.05, 0.05)));
      jr[1][0] = jr[0][1]; jr[2][0] = jr[0][2]; jr[2][1] = jr[1][2];
      wr(i, W_J0, r2f(jr[0][0])); wr(i, W_J0 + 1, r2f(jr[1][1])); wr(i, W_J0 + 2, r2f(jr[2][2]));
      wr(i, W_J0 + 3, r2f(jr[0][1])); wr(i, W_J0 + 4, r2f(jr[0][2])); wr(i, W_J0 + 5, r2f(jr[1][2]));
      for (int c = 0; c < 6; c++) begin f = r2f(rr(-1, 1)); b_r[i][c] = f2r(f); wr(i, W_B0 + 5'(c), f); end
      wr(i, W_PARENT, 32'(par[i]));
      gt = '{'{0.0, -gr[2], gr[1]}, '{gr[2], 0.0, -gr[0]}, '{-gr[1], gr[0], 0.0}};
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          mb_r[i][r][c] = (r == c) ? mr : 0.0;
          mb_r[i][r][c+3] = -mr * gt[r][c];
          mb_r[i][r+3][c] = mr * gt[r][c];
          acc = 0.0;
          for (int q = 0; q < 3; q++) acc += gt[r][q] * gt[q][c];
          mb_r[i][r+3][c+3] = jr[r][c] - mr * acc;
        end
    end
    // R: column j holds b_j in the rows of body j and all its descendants
    for (int r = 0; r < 6 * NB; r++) for (int j = 0; j < NB; j++) rm[r][j] = 0.0;
    for (int i = 0; i < NB; i++) begin
      k = i;
      while (1) begin
        for (int c = 0; c < 6; c++) rm[6*i + c][k] = b_r[k][c];
        if (par[k] == 0) break;
        k = par[k] - 1;
      end
    end
    mx = 0.0;
    for (int a = 0; a < NB; a++)
      for (int b = 0; b < NB; b++) begin
        acc = 0.0;
        for (int i = 0; i < NB; i++)
          for (int r = 0; r < 6; r++)
            for (int c = 0; c < 6; c++)
              acc += rm[6*i + r][a] * mb_r[i][r][c] * rm[6*i + c][b];
        ref_m[a][b] = acc;
        if (acc > mx) mx = acc;
        if (-acc > mx) mx = -acc;
      end
    exp_cyc = NB + 2;
    for (int i = 0; i < NB; i++) begin
      depth = 0; k = i;
      while (par[k] != 0) begin depth++; k = par[k] - 1; end
      exp_cyc += (par[i] != 0 ? 6 : 1) + 7 + depth;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL kind %0d latency %0d expected %0d", kind, cyc, exp_cyc);
    end
    for (int a = 0; a < NB; a++)
      for (int b = 0; b < NB; b++) begin
        out_row = 4'(a); out_col = 4'(b); #1;
        checks++;
        if (!near(out_data, ref_m[a][b], 1e-4, mx)) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d M(%0d,%0d) got %f exp %f", kind, a, b, f2r(out_data), ref_m[a][b]);
        end
      end
    $display("case %0d: latency %0d cycles", kind, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) run_case(t < 2 ? t : (t == 2 ? 2 : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
