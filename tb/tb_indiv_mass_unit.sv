// tb_indiv_mass_unit: loads 29 random bodies into indiv_mass_unit, starts it
// once and checks all 29 x 36 body-matrix entries against a double-precision
// reference (m*I, -m*skew(g), m*skew(g), J - m*skew(g)^2), and that done
// follows start by one cycle. A second run with new data checks that the
// results are replaced.
module tb_indiv_mass_unit;
  import mbfp_pkg::*;
  import mbtb_pkg::*;
  import mb_types_pkg::*;

  localparam int NB = 29;
  logic clk = 0, rst_n = 0, in_we = 0, start = 0, done;
  logic [4:0] in_body = 0, out_body = 0, in_word = 0;
  logic [2:0] out_row = 0, out_col = 0;
  fp32_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  real ref_m[NB][6][6];

  indiv_mass_unit #(.NB(NB)) dut (.*);

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

  task automatic wr(int body, logic [4:0] word, real v);
    @(negedge clk);
    in_we = 1; in_body = 5'(body); in_word = word; in_data = r2f(v);
    @(negedge clk);
    in_we = 0;
  endtask

  task automatic run_case();
    real mr, gr[3], jr[3][3], gt[3][3], acc;
    for (int i = 0; i < NB; i++) begin
      mr = f2r(r2f(rr(1, 400)));
      for (int k = 0; k < 3; k++) gr[k] = f2r(r2f(rr(-2, 2)));
      for (int a = 0; a < 3; a++) for (int b = a; b < 3; b++) begin
        jr[a][b] = f2r(r2f((a == b) ? rr(1, 50) : rr(-1, 1)));
        jr[b][a] = jr[a][b];
      end
      wr(i, W_MASS, mr);
      for (int k = 0; k < 3; k++) wr(i, W_G0 + 5'(k), gr[k]);
      wr(i, W_J0, jr[0][0]); wr(i, W_J0 + 1, jr[1][1]); wr(i, W_J0 + 2, jr[2][2]);
      wr(i, W_J0 + 3, jr[0][1]); wr(i, W_J0 + 4, jr[0][2]); wr(i, W_J0 + 5, jr[1][2]);
      gt = '{'{0.0, -gr[2], gr[1]}, '{gr[2], 0.0, -gr[0]}, '{-gr[1], gr[0], 0.0}};
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          ref_m[i][r][c] = (r == c) ? mr : 0.0;
          ref_m[i][r][c+3] = -mr * gt[r][c];
          ref_m[i][r+3][c] = mr * gt[r][c];
          acc = 0.0;
          for (int q = 0; q < 3; q++) acc += gt[r][q] * gt[q][c];
          ref_m[i][r+3][c+3] = jr[r][c] - mr * acc;
        end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL done not one cycle after start"); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    for (int i = 0; i < NB; i++)
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++) begin
          out_body = 5'(i); out_row = 3'(r); out_col = 3'(c); #1;
          checks++;
          if (!near(out_data, ref_m[i][r][c], 1e-5, 1e-2)) begin
            failures++;
            if (failures < 10) $display("FAIL body %0d (%0d,%0d) got %f exp %f", i, r, c, f2r(out_data), ref_m[i][r][c]);
          end
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case();
    run_case();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
