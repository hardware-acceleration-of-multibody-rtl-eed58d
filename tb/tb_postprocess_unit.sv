// tb_postprocess_unit: random tree mechanisms (open chain, random trees)
// with random unit joint axes, joint points, centres of mass, angles and
// rates. A double-precision model in the testbench walks the tree with
// $sin/$cos, the Rodrigues rotation and 3x3 products and gives all 27
// results per body; the unit's results must agree to 1e-4 relative to the
// magnitude of the mechanism. The cycle count must be the fixed
// 330 cycles of the default configuration (NB = 9).
module tb_postprocess_unit;
  import mbfp_pkg::*;
  import mbtb_pkg::*;
  import mb_types_pkg::*;

  localparam int NB = 9;
  localparam int EXP_CYC = 330;  // fixed: trig-bound, see the design notes
  logic clk = 0, rst_n = 0, in_we = 0, start = 0, busy, done;
  logic [3:0] in_body = 0, out_body = 0;
  logic [4:0] in_word = 0, out_word = 0;
  fp32_t in_data = 0, out_data;
  int checks = 0, failures = 0;

  postprocess_unit #(.NB(NB)) dut (.*);

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

  task automatic wr(int body, logic [4:0] word, fp32_t v);
    @(negedge clk);
    in_we = 1; in_body = 4'(body); in_word = word; in_data = v;
    @(negedge clk);
    in_we = 0;
  endtask

  real res[NB][27];

  task automatic run_case(int kind);
    real z, zd, u[3], r[3], g[3], nrm, s, c, rl[3][3], rp[27], d[3], e[3];
    int par, cyc;
    for (int i = 0; i < NB; i++) begin
      par = (kind == 0) ? i : ((i == 0) ? 0 : int'($urandom % (i + 1)));
      z = f2r(r2f(rr(-7, 7))); zd = f2r(r2f(rr(-3, 3)));
      if (kind == 2) begin u[0] = 0; u[1] = 0; u[2] = 1; end   // planar
      else begin
        for (int k = 0; k < 3; k++) u[k] = rr(-1, 1);
        nrm = $sqrt(u[0]*u[0] + u[1]*u[1] + u[2]*u[2]);
        for (int k = 0; k < 3; k++) u[k] = u[k] / nrm;
      end
      for (int k = 0; k < 3; k++) begin
        u[k] = f2r(r2f(u[k])); r[k] = f2r(r2f(rr(-1, 1))); g[k] = f2r(r2f(rr(-0.5, 0.5)));
      end
      wr(i, P_Z, r2f(z)); wr(i, P_ZD, r2f(zd));
      for (int k = 0; k < 3; k++) begin
        wr(i, P_U0 + 5'(k), r2f(u[k])); wr(i, P_R0 + 5'(k), r2f(r[k])); wr(i, P_G0 + 5'(k), r2f(g[k]));
      end
      wr(i, P_PARENT, 32'(par));
      // reference
      for (int w = 0; w < 27; w++) rp[w] = (w == 0 || w == 4 || w == 8) ? 1.0 : 0.0;
      if (par != 0) for (int w = 0; w < 27; w++) rp[w] = res[par-1][w];
      s = $sin(z); c = $cos(z);
      rl = '{'{c + (1-c)*u[0]*u[0], (1-c)*u[0]*u[1] - s*u[2], (1-c)*u[0]*u[2] + s*u[1]},
             '{(1-c)*u[1]*u[0] + s*u[2], c + (1-c)*u[1]*u[1], (1-c)*u[1]*u[2] - s*u[0]},
             '{(1-c)*u[2]*u[0] - s*u[1], (1-c)*u[2]*u[1] + s*u[0], c + (1-c)*u[2]*u[2]}};
      for (int a = 0; a < 3; a++) begin
        for (int b = 0; b < 3; b++) begin
          res[i][3*a+b] = 0;
          for (int k = 0; k < 3; k++) res[i][3*a+b] += rp[3*a+k] * rl[k][b];
        end
        res[i][12+a] = rp[3*a]*u[0] + rp[3*a+1]*u[1] + rp[3*a+2]*u[2];
        d[a] = rp[3*a]*r[0] + rp[3*a+1]*r[1] + rp[3*a+2]*r[2];
        res[i][9+a] = rp[9+a] + d[a];
        res[i][15+a] = rp[15+a] + res[i][12+a] * zd;
      end
      for (int a = 0; a < 3; a++) begin
        res[i][18+a] = rp[18+a] + rp[15+(a+1)%3]*d[(a+2)%3] - rp[15+(a+2)%3]*d[(a+1)%3];
        e[a] = res[i][3*a]*g[0] + res[i][3*a+1]*g[1] + res[i][3*a+2]*g[2];
        res[i][21+a] = res[i][9+a] + e[a];
      end
      for (int a = 0; a < 3; a++)
        res[i][24+a] = res[i][18+a] + res[i][15+(a+1)%3]*e[(a+2)%3] - res[i][15+(a+2)%3]*e[(a+1)%3];
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != EXP_CYC) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i < NB; i++)
      for (int w = 0; w < 27; w++) begin
        out_body = 4'(i); out_word = 5'(w); #1;
        checks++;
        if (!near(out_data, res[i][w], 2e-4, 10.0)) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d body %0d word %0d got %f exp %f", kind, i, w, f2r(out_data), res[i][w]);
        end
      end
    $display("case %0d latency %0d", kind, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(0); run_case(1); run_case(2); run_case(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
