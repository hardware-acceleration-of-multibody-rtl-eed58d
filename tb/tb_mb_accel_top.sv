// tb_mb_accel_top: end-to-end run of the co-processor at its default sizes
// on one time step of a nine-body planar linkage shaped like the four-bar
// chain (five cranks on the ground, four couplers; the loop closures are
// left to the host as constraints, so the accelerator sees a tree):
//
//  1. post-process: joint angles and rates -> absolute motion of every body,
//     checked against a double-precision model;
//  2. the testbench, acting as host, turns the absolute motion into body
//     data (global centre of mass, global inertia, joint vectors
//     b = [r x u; u]) and the mass-matrix unit assembles M, checked against
//     R^T Mbar R formed in double precision; the individual-matrix unit is
//     loaded with the same bodies plus twenty more and run at the same time;
//  3. the solver solves (M + D) x = f for a diagonal D and a random f, and
//     once more with the rows shuffled; x is checked by the double-precision
//     residual; a system with two equal rows must raise 'singular'.
//
// It counts how often each mechanism of the design happened and fails when
// one never did: the post-process waiting for the sine/cosine, the next
// body's sine/cosine running while the lanes work, the sine/
// cosine argument fold, a body hanging from the ground and from another body
// in the accumulation, a pivot row exchange, a singular system, and two
// units busy at the same time.
module tb_mb_accel_top;
  import mbfp_pkg::*;
  import mbtb_pkg::*;
  import mb_types_pkg::*;

  localparam int NB = 9;
  localparam int NBI = 29;

  logic clk = 0, rst_n = 0, wr_en = 0, start = 0, singular;
  unit_t wr_unit = UNIT_MASS, start_unit = UNIT_MASS, rd_unit = UNIT_MASS;
  logic [7:0] wr_a = 0, rd_a = 0;
  logic [5:0] wr_b = 0, rd_b = 0;
  fp32_t wr_data = 0, rd_data;
  logic [3:0] busy, done;
  int checks = 0, failures = 0;

  mb_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ event counters
  int n_trig_wait = 0, n_fold = 0, n_acc_child = 0, n_root = 0, n_swap = 0, n_sing = 0, n_overlap = 0, n_prefetch = 0;
  always @(posedge clk) begin
    if (dut.u_post.state == dut.u_post.S_RUN && !dut.u_post.exec) n_trig_wait++;
    if (dut.u_post.exec && dut.u_post.u_trig.busy) n_prefetch++;
    if (dut.u_post.u_trig.state == dut.u_post.u_trig.S_IDLE && dut.u_post.u_trig.start && dut.u_post.u_trig.neg_in) n_fold++;
    if (dut.u_mass.state == dut.u_mass.S_B && dut.u_mass.ri == 0) begin
      if (dut.u_mass.p_par[dut.u_mass.bi] != 0) n_acc_child++;
      else n_root++;
    end
    if ($countones(busy) > 1) n_overlap++;
  end

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic wr(unit_t u, int a, int b, fp32_t v);
    @(negedge clk);
    wr_en = 1; wr_unit = u; wr_a = 8'(a); wr_b = 6'(b); wr_data = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  fp32_t rv;
  task automatic rd(unit_t u, int a, int b);
    rd_unit = u; rd_a = 8'(a); rd_b = 6'(b);
    #1;
    rv = rd_data;
  endtask

  task automatic go(unit_t u);
    @(negedge clk); start = 1; start_unit = u; @(negedge clk); start = 0;
  endtask

  task automatic wait_done(int u);
    while (!done[u]) @(negedge clk);
  endtask

  task automatic check(string what, fp32_t got, real exp_v, real rel, real fl);
    checks++;
    if (!near(got, exp_v, rel, fl)) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %f exp %f", what, f2r(got), exp_v);
    end
  endtask

  // model data
  int    par[NB];
  real   z[NB], zd[NB], ul[NB][3], rl[NB][3], gl[NB][3], mass[NB], jl[NB][3];
  real   post[NB][27];
  real   gG[NB][3], jG[NB][3][3], bv[NB][6], mref[NB][NB];

  task automatic build_model();
    for (int i = 0; i < NB; i++) begin
      // bodies 0..4: crank 1 then the four couplers in a chain; 5..8: cranks 2..5
      par[i] = (i == 0) ? 0 : (i <= 4 ? i : 0);
      z[i]  = f2r(r2f(rr(-3.1, 3.1)));
      zd[i] = f2r(r2f(rr(-2, 2)));
      ul[i] = '{0.0, 0.0, 1.0};
      if (i == 0 || i >= 5) begin
        rl[i] = '{2.0 * real'(i >= 5 ? i - 4 : 0), 0.0, 0.0};     // crank pivots on the ground
        gl[i] = '{0.5, 0.0, 0.0}; mass[i] = 1.0;
      end else begin
        rl[i] = (i == 1) ? '{1.0, 0.0, 0.0} : '{2.0, 0.0, 0.0};   // joint at the end of the previous bar
        gl[i] = '{1.0, 0.0, 0.0}; mass[i] = 2.0;
      end
      jl[i] = '{0.001 * mass[i], 0.08 * mass[i], 0.08 * mass[i]};
      for (int k = 0; k < 3; k++) begin rl[i][k] = f2r(r2f(rl[i][k])); gl[i][k] = f2r(r2f(gl[i][k])); end
    end
  endtask

  task automatic ref_post();
    real rp[27], s, c, rot[3][3], d[3], e[3];
    for (int i = 0; i < NB; i++) begin
      for (int w = 0; w < 27; w++) rp[w] = (w == 0 || w == 4 || w == 8) ? 1.0 : 0.0;
      if (par[i] != 0) rp = post[par[i] - 1];
      s = $sin(z[i]); c = $cos(z[i]);
      // rotation about z
      rot = '{'{c, -s, 0.0}, '{s, c, 0.0}, '{0.0, 0.0, 1.0}};
      for (int a = 0; a < 3; a++) begin
        for (int b = 0; b < 3; b++) begin
          post[i][3*a+b] = 0;
          for (int k = 0; k < 3; k++) post[i][3*a+b] += rp[3*a+k] * rot[k][b];
        end
        post[i][12+a] = rp[3*a+2];
        d[a] = rp[3*a]*rl[i][0] + rp[3*a+1]*rl[i][1] + rp[3*a+2]*rl[i][2];
        post[i][9+a] = rp[9+a] + d[a];
        post[i][15+a] = rp[15+a] + post[i][12+a] * zd[i];
      end
      for (int a = 0; a < 3; a++) begin
        post[i][18+a] = rp[18+a] + rp[15+(a+1)%3]*d[(a+2)%3] - rp[15+(a+2)%3]*d[(a+1)%3];
        e[a] = post[i][3*a]*gl[i][0] + post[i][3*a+1]*gl[i][1] + post[i][3*a+2]*gl[i][2];
        post[i][21+a] = post[i][9+a] + e[a];
      end
      for (int a = 0; a < 3; a++)
        post[i][24+a] = post[i][18+a] + post[i][15+(a+1)%3]*e[(a+2)%3] - post[i][15+(a+2)%3]*e[(a+1)%3];
    end
  endtask

  // host side: body data for the mass matrix from the unit's post-process results
  task automatic host_body_data();
    real rot[3][3], pos[3], ax[3];
    for (int i = 0; i < NB; i++) begin
      for (int a = 0; a < 3; a++) begin
        for (int b = 0; b < 3; b++) begin rd(UNIT_POST, i, 3*a+b); rot[a][b] = f2r(rv); end
        rd(UNIT_POST, i, 9+a); pos[a] = f2r(rv);
        rd(UNIT_POST, i, 12+a); ax[a]  = f2r(rv);
        rd(UNIT_POST, i, 21+a); gG[i][a] = f2r(rv);
      end
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          jG[i][a][b] = 0;
          for (int k = 0; k < 3; k++) jG[i][a][b] += rot[a][k] * jl[i][k] * rot[b][k];
          jG[i][a][b] = f2r(r2f(jG[i][a][b]));
        end
      for (int a = 0; a < 3; a++) begin
        bv[i][a] = f2r(r2f(pos[(a+1)%3]*ax[(a+2)%3] - pos[(a+2)%3]*ax[(a+1)%3]));
        bv[i][3+a] = f2r(r2f(ax[a]));
      end
    end
  endtask

  task automatic ref_mass();
    real mb[NB][6][6], gt[3][3], acc, rm[6*NB][NB];
    int k;
    for (int i = 0; i < NB; i++) begin
      gt = '{'{0.0, -gG[i][2], gG[i][1]}, '{gG[i][2], 0.0, -gG[i][0]}, '{-gG[i][1], gG[i][0], 0.0}};
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          mb[i][r][c] = (r == c) ? mass[i] : 0.0;
          mb[i][r][c+3] = -mass[i] * gt[r][c];
          mb[i][r+3][c] = mass[i] * gt[r][c];
          acc = 0.0;
          for (int q = 0; q < 3; q++) acc += gt[r][q] * gt[q][c];
          mb[i][r+3][c+3] = jG[i][r][c] - mass[i] * acc;
        end
    end
    for (int r = 0; r < 6 * NB; r++) for (int j = 0; j < NB; j++) rm[r][j] = 0.0;
    for (int i = 0; i < NB; i++) begin
      k = i;
      while (1) begin
        for (int c = 0; c < 6; c++) rm[6*i + c][k] = bv[k][c];
        if (par[k] == 0) break;
        k = par[k] - 1;
      end
    end
    for (int a = 0; a < NB; a++)
      for (int b = 0; b < NB; b++) begin
        acc = 0.0;
        for (int i = 0; i < NB; i++)
          for (int r = 0; r < 6; r++)
            for (int c = 0; c < 6; c++)
              acc += rm[6*i + r][a] * mb[i][r][c] * rm[6*i + c][b];
        mref[a][b] = acc;
      end
  endtask

  task automatic solve_and_check(int kind);
    real a[NB][NB+1], x[NB], res, mx;
    int perm[NB], p, t;
    fp32_t mq;
    for (int r = 0; r < NB; r++) perm[r] = r;
    if (kind == 1)
      for (int r = NB - 1; r > 0; r--) begin
        p = int'($urandom % (r + 1)); t = perm[r]; perm[r] = perm[p]; perm[p] = t;
      end
    for (int r = 0; r < NB; r++) begin
      for (int c = 0; c < NB; c++) begin
        rd(UNIT_MASS, r, c); mq = rv;
        a[perm[r]][c] = f2r(mq) + ((r == c) ? 0.5 : 0.0);
        a[perm[r]][c] = f2r(r2f(a[perm[r]][c]));
      end
      a[perm[r]][NB] = f2r(r2f(rr(-1, 1)));
    end
    if (kind == 2) for (int c = 0; c <= NB; c++) a[4][c] = a[2][c];
    for (int r = 0; r < NB; r++) for (int c = 0; c <= NB; c++) wr(UNIT_GJ, r, c, r2f(a[r][c]));
    go(UNIT_GJ);
    wait_done(UNIT_GJ);
    for (int r = 0; r < NB; r++)
      if (dut.u_gj.prow[r] != 4'(r)) begin n_swap++; break; end
    checks++;
    if (singular != (kind == 2)) begin failures++; $display("FAIL singular flag"); end
    if (singular) n_sing++;
    if (kind != 2) begin
      for (int r = 0; r < NB; r++) begin rd(UNIT_GJ, r, 0); x[r] = f2r(rv); end
      for (int r = 0; r < NB; r++) begin
        res = -a[r][NB]; mx = 1.0;
        for (int c = 0; c < NB; c++) res += a[r][c] * x[c];
        checks++;
        if ((res < 0 ? -res : res) > 1e-4 * mx) begin
          failures++;
          $display("FAIL residual row %0d = %g", r, res);
        end
      end
    end
  endtask

  initial begin
    real imr[NBI], igr[NBI][3], ijr[NBI][6], gt[3][3], acc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_model();
    ref_post();
    // 1. post-process
    for (int i = 0; i < NB; i++) begin
      wr(UNIT_POST, i, P_Z, r2f(z[i])); wr(UNIT_POST, i, P_ZD, r2f(zd[i]));
      for (int k = 0; k < 3; k++) begin
        wr(UNIT_POST, i, P_U0 + k, r2f(ul[i][k]));
        wr(UNIT_POST, i, P_R0 + k, r2f(rl[i][k]));
        wr(UNIT_POST, i, P_G0 + k, r2f(gl[i][k]));
      end
      wr(UNIT_POST, i, P_PARENT, 32'(par[i]));
    end
    go(UNIT_POST);
    wait_done(UNIT_POST);
    for (int i = 0; i < NB; i++)
      for (int w = 0; w < 27; w++) begin rd(UNIT_POST, i, w); check($sformatf("post body %0d word %0d", i, w), rv, post[i][w], 1e-4, 10.0); end
    // 2. mass matrix, with the individual-matrix unit running alongside
    host_body_data();
    ref_mass();
    for (int i = 0; i < NB; i++) begin
      wr(UNIT_MASS, i, W_MASS, r2f(mass[i]));
      for (int k = 0; k < 3; k++) wr(UNIT_MASS, i, W_G0 + k, r2f(gG[i][k]));
      wr(UNIT_MASS, i, W_J0, r2f(jG[i][0][0])); wr(UNIT_MASS, i, W_J0 + 1, r2f(jG[i][1][1]));
      wr(UNIT_MASS, i, W_J0 + 2, r2f(jG[i][2][2])); wr(UNIT_MASS, i, W_J0 + 3, r2f(jG[i][0][1]));
      wr(UNIT_MASS, i, W_J0 + 4, r2f(jG[i][0][2])); wr(UNIT_MASS, i, W_J0 + 5, r2f(jG[i][1][2]));
      for (int k = 0; k < 6; k++) wr(UNIT_MASS, i, W_B0 + k, r2f(bv[i][k]));
      wr(UNIT_MASS, i, W_PARENT, 32'(par[i]));
    end
    for (int i = 0; i < NBI; i++) begin
      imr[i] = (i < NB) ? mass[i] : f2r(r2f(rr(1, 300)));
      for (int k = 0; k < 3; k++) igr[i][k] = (i < NB) ? gG[i][k] : f2r(r2f(rr(-2, 2)));
      ijr[i] = (i < NB) ? '{jG[i][0][0], jG[i][1][1], jG[i][2][2], jG[i][0][1], jG[i][0][2], jG[i][1][2]}
                        : '{f2r(r2f(rr(1, 9))), f2r(r2f(rr(1, 9))), f2r(r2f(rr(1, 9))), 0.0, 0.0, 0.0};
      wr(UNIT_IND, i, W_MASS, r2f(imr[i]));
      for (int k = 0; k < 3; k++) wr(UNIT_IND, i, W_G0 + k, r2f(igr[i][k]));
      for (int k = 0; k < 6; k++) wr(UNIT_IND, i, W_J0 + k, r2f(ijr[i][k]));
    end
    go(UNIT_MASS);
    repeat (5) @(negedge clk);
    go(UNIT_POST);              // a second post-process run overlaps the mass matrix
    go(UNIT_IND);
    wait_done(UNIT_MASS);
    for (int a = 0; a < NB; a++)
      for (int b = 0; b < NB; b++) begin rd(UNIT_MASS, a, b); check($sformatf("M(%0d,%0d)", a, b), rv, mref[a][b], 1e-4, 10.0); end
    for (int i = 0; i < NBI; i++) begin
      gt = '{'{0.0, -igr[i][2], igr[i][1]}, '{igr[i][2], 0.0, -igr[i][0]}, '{-igr[i][1], igr[i][0], 0.0}};
      for (int r = 0; r < 3; r++) begin
        rd(UNIT_IND, i, 8*r + r); check("ind translational", rv, imr[i], 1e-6, 1e-3);
        for (int c = 0; c < 3; c++) begin
          acc = 0.0;
          for (int q = 0; q < 3; q++) acc += gt[r][q] * gt[q][c];
          rd(UNIT_IND, i, 8*r + c + 3); check("ind coupling", rv, -imr[i] * gt[r][c], 1e-5, 1e-2);
          rd(UNIT_IND, i, 8*(r+3) + c + 3); check("ind rotational", rv,
                ((r == c) ? ijr[i][r] : (r + c == 1 ? ijr[i][3] : (r + c == 2 ? ijr[i][4] : ijr[i][5]))) - imr[i] * acc,
                1e-5, 1e-1);
        end
      end
    end
    while (busy[UNIT_POST]) @(negedge clk);
    // 3. Newton-Raphson corrections
    solve_and_check(0);
    solve_and_check(1);
    solve_and_check(2);

    $display("events: trig_wait=%0d fold=%0d acc_into_parent=%0d root_bodies=%0d pivot_swaps=%0d singular=%0d overlap=%0d prefetch=%0d",
             n_trig_wait, n_fold, n_acc_child, n_root, n_swap, n_sing, n_overlap, n_prefetch);
    checks += 7;
    if (n_trig_wait == 0) failures++;
    if (n_prefetch == 0) failures++;
    if (n_fold == 0) failures++;
    if (n_acc_child == 0) failures++;
    if (n_root == 0) failures++;
    if (n_swap == 0) failures++;
    if (n_sing == 0) failures++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
