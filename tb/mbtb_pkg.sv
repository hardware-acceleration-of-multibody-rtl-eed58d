// mbtb_pkg: testbench helpers shared by the accelerator testbenches:
// conversions between the simulator's double-precision reals and single
// precision bit patterns, and a tolerance compare for results that the
// hardware computes in single precision while the reference uses double.
package mbtb_pkg;
  import mbfp_pkg::*;

  // double <-> single conversions through the bit patterns (round to
  // nearest even, subnormals flushed to zero)
  function automatic fp32_t r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction
  function automatic real f2r(fp32_t f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  // true when got is within rel*max(|exp|, floor) of exp
  function automatic logic near(fp32_t got, real exp_v, real rel, real floor_v);
    real d, m;
    d = f2r(got) - exp_v;
    if (d < 0) d = -d;
    m = (exp_v < 0) ? -exp_v : exp_v;
    if (m < floor_v) m = floor_v;
    return d <= rel * m;
  endfunction
endpackage
