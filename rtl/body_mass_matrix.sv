// body_mass_matrix: mass matrix of one rigid body in body coordinates.
//
// The body coordinates of a body are the velocity of the body point that
// coincides with the global origin and the angular velocity, so the 6x6 mass
// matrix of a body with mass m, global centre-of-mass position g and global
// inertia tensor J about the centre of mass is
//
//     Mbar = [  m*I        -m*gt           ]
//            [  m*gt    J - m*gt*gt        ]      gt = skew(g)
//
// with J - m*gt*gt = J + m*((g.g)*I - g*g^T). This is operation "A" of the
// mass-matrix schedule. The formula is the document's; computing the whole
// matrix in one combinational pass (six multiplies for m*g and g*g^T terms and
// the adds behind them) is this design's choice, so that one instance can serve
// a sequential assembler or be replicated per body.
//
// Interface: single-precision inputs m, g[0..2] (x,y,z) and the six distinct
// entries of the symmetric J in the order xx, yy, zz, xy, xz, yz; output the
// full 6x6 matrix, row-major in mbar[row][col]. Purely combinational.
module body_mass_matrix
  import mbfp_pkg::*;
(
  input  fp32_t m,
  input  fp32_t g   [3],
  input  fp32_t j   [6],
  output fp32_t mbar[6][6]
);

  fp32_t mg [3];      // m*g
  fp32_t mgg[3][3];   // m*g_r*g_c

  always_comb begin
    for (int k = 0; k < 3; k++) mg[k] = fp_mul(m, g[k]);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        mgg[r][c] = fp_mul(mg[r], g[c]);

    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++)
        mbar[r][c] = FP_ZERO;

    // translational block m*I
    for (int k = 0; k < 3; k++) mbar[k][k] = m;

    // coupling blocks: upper right -m*skew(g), lower left m*skew(g)
    mbar[0][4] = mg[2];          mbar[0][5] = fp_neg(mg[1]);
    mbar[1][3] = fp_neg(mg[2]);  mbar[1][5] = mg[0];
    mbar[2][3] = mg[1];          mbar[2][4] = fp_neg(mg[0]);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        mbar[3 + c][r] = mbar[r][3 + c];

    // rotational block J + m*((g.g)I - g g^T)
    mbar[3][3] = fp_add(j[0], fp_add(mgg[1][1], mgg[2][2]));
    mbar[4][4] = fp_add(j[1], fp_add(mgg[0][0], mgg[2][2]));
    mbar[5][5] = fp_add(j[2], fp_add(mgg[0][0], mgg[1][1]));
    mbar[3][4] = fp_sub(j[3], mgg[0][1]);
    mbar[3][5] = fp_sub(j[4], mgg[0][2]);
    mbar[4][5] = fp_sub(j[5], mgg[1][2]);
    mbar[4][3] = mbar[3][4];
    mbar[5][3] = mbar[3][5];
    mbar[5][4] = mbar[4][5];
  end

endmodule
