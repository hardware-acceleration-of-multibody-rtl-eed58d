// tb_body_mass_matrix: drives random masses, centre-of-mass positions and
// inertia tensors into body_mass_matrix and compares all 36 entries with a
// double-precision reference built from the skew-matrix products directly
// (m*I, -m*skew(g), m*skew(g), J - m*skew(g)*skew(g)).
module tb_body_mass_matrix;
  import mbfp_pkg::*;
  import mbtb_pkg::*;

  fp32_t m, g[3], j[6], mbar[6][6];
  int checks = 0, failures = 0;

  body_mass_matrix dut (.m(m), .g(g), .j(j), .mbar(mbar));

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mr, gr[3], jr[3][3], gt[3][3], ref_m[6][6], acc;
    for (int t = 0; t < 200; t++) begin
      mr = rr(0.1, 20.0);
      for (int k = 0; k < 3; k++) gr[k] = rr(-3.0, 3.0);
      jr[0][0] = rr(0.1, 2); jr[1][1] = rr(0.1, 2); jr[2][2] = rr(0.1, 2);
      jr[0][1] = rr(-0.1, 0.1); jr[0][2] = rr(-0.1, 0.1); jr[1][2] = rr(-0.1, 0.1);
      jr[1][0] = jr[0][1]; jr[2][0] = jr[0][2]; jr[2][1] = jr[1][2];
      // hand the single-precision inputs to both sides
      m = r2f(mr); mr = f2r(m);
      for (int k = 0; k < 3; k++) begin g[k] = r2f(gr[k]); gr[k] = f2r(g[k]); end
      j[0] = r2f(jr[0][0]); j[1] = r2f(jr[1][1]); j[2] = r2f(jr[2][2]);
      j[3] = r2f(jr[0][1]); j[4] = r2f(jr[0][2]); j[5] = r2f(jr[1][2]);
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) jr[r][c] = f2r(r2f(jr[r][c]));
      gt = '{'{0.0, -gr[2], gr[1]}, '{gr[2], 0.0, -gr[0]}, '{-gr[1], gr[0], 0.0}};
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          ref_m[r][c] = (r == c) ? mr : 0.0;
          ref_m[r][c+3] = -mr * gt[r][c];
          ref_m[r+3][c] = mr * gt[r][c];
          acc = 0.0;
          for (int k = 0; k < 3; k++) acc += gt[r][k] * gt[k][c];
          ref_m[r+3][c+3] = jr[r][c] - mr * acc;
        end
      #10;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++) begin
          checks++;
          if (!near(mbar[r][c], ref_m[r][c], 1e-5, 1e-3)) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d (%0d,%0d) got %f exp %f", t, r, c, f2r(mbar[r][c]), ref_m[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
