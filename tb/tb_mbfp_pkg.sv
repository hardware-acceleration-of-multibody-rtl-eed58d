// tb_mbfp_pkg: checks the single-precision add, multiply, divide and fixed
// point conversions of mbfp_pkg against the simulator's own real arithmetic
// on random operands. A result counts as correct within 1 unit in the last
// place (the reference rounds from double, which can differ by one ulp).
module tb_mbfp_pkg;
  import mbfp_pkg::*;
  import mbtb_pkg::*;
  int checks = 0, failures = 0;

  function automatic fp32_t rnd_fp();
    fp32_t v;
    v = $urandom;
    v[30:23] = 8'(100 + ($urandom % 55));
    return v;
  endfunction
  task automatic chk(string what, fp32_t got, fp32_t exp_v);
    int diff;
    checks++;
    diff = int'(got[30:0]) - int'(exp_v[30:0]);
    if (got[31] != exp_v[31] && !(fp_is_zero(got) && fp_is_zero(exp_v))) diff = 99;
    if (diff > 1 || diff < -1) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    fp32_t a, b;
    for (int i = 0; i < 3000; i++) begin
      a = rnd_fp(); b = rnd_fp();
      if (i % 4 == 0) b[30:23] = a[30:23];
      if (i % 8 == 0) b = {~a[31], a[30:1], ~a[0]};
      chk("add", fp_add(a, b), r2f(f2r(a) + f2r(b)));
      chk("sub", fp_sub(a, b), r2f(f2r(a) - f2r(b)));
      chk("mul", fp_mul(a, b), r2f(f2r(a) * f2r(b)));
      chk("div", fp_div(a, b), r2f(f2r(a) / f2r(b)));
    end
    chk("a-a", fp_sub(32'h3fc00000, 32'h3fc00000), FP_ZERO);
    chk("fix2fp", fix_to_fp(-64'sd3 <<< 29, 30), r2f(-1.5));
    checks++;
    if (fp_to_fix(r2f(-2.25), 24) != -64'sd37748736) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
