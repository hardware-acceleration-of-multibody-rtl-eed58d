// dot6: single-precision dot product of two 6-vectors, the length of a body
// coordinate vector. Six multipliers feed a balanced three-level adder tree;
// purely combinational. Used by the mass-matrix assembler.
module dot6
  import mbfp_pkg::*;
(
  input  fp32_t a[6],
  input  fp32_t b[6],
  output fp32_t y
);
  fp32_t p[6];
  always_comb begin
    for (int k = 0; k < 6; k++) p[k] = fp_mul(a[k], b[k]);
    y = fp_add(fp_add(fp_add(p[0], p[1]), fp_add(p[2], p[3])), fp_add(p[4], p[5]));
  end
endmodule
