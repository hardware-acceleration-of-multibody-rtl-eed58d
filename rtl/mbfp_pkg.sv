// mbfp_pkg: IEEE-754 single-precision arithmetic shared by the multibody
// accelerators.
//
// The accelerators compute in single precision, the same precision the host
// simulation uses, so results can be exchanged bit for bit with it. The
// functions here are combinational and synthesizable: add, multiply, divide,
// multiply-add, negate, magnitude compare, and conversions to and from signed
// fixed point (used by the CORDIC sine/cosine unit).
//
// Arithmetic conventions (a choice of this design): round to nearest even;
// subnormal inputs and results are flushed to zero; results too large become
// infinity; NaN is not produced or propagated specially. A multiply-add rounds
// twice (after the product and after the sum), as a separate multiplier
// followed by an adder does.
package mbfp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  // |a| > |b| (zero-exponent values count as zero)
  function automatic logic fp_abs_gt(fp32_t a, fp32_t b);
    logic [30:0] ma, mb;
    ma = (a[30:23] == 8'd0) ? 31'd0 : a[30:0];
    mb = (b[30:23] == 8'd0) ? 31'd0 : b[30:0];
    return ma > mb;
  endfunction

  // Pack sign, biased exponent (may be out of range) and a 24-bit significand
  // with the leading one at bit 23, plus guard and sticky bits; rounds to
  // nearest even and handles overflow / flush-to-zero.
  function automatic fp32_t fp_round_pack(logic s, logic signed [11:0] e,
                                          logic [23:0] m, logic g, logic st);
    logic [24:0] mr;
    logic signed [11:0] er;
    mr = {1'b0, m};
    er = e;
    if (g && (st || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255) return {s, 8'hFF, 23'd0};
    if (er <= 12'sd0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47])
      return fp_round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else
      return fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t x, y;
    logic [7:0] d8;
    int unsigned d;
    logic [27:0] mx, my, sum;
    logic sticky;
    logic signed [11:0] e;
    int unsigned lz;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? {a[31] & b[31], 31'd0} : a;
    if (a[30:23] == 8'd0) return b;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    // x holds the larger magnitude
    if (b[30:0] > a[30:0]) begin x = b; y = a; end
    else                   begin x = a; y = b; end
    d8 = x[30:23] - y[30:23];
    d  = int'(d8);
    mx = {1'b0, 1'b1, x[22:0], 3'b000};
    my = {1'b0, 1'b1, y[22:0], 3'b000};
    if (d >= 27) begin
      my = 28'd1;
    end else if (d > 0) begin
      sticky = |(my & ((28'd1 << d) - 28'd1));
      my = (my >> d) | {27'd0, sticky};
    end
    e = 12'(x[30:23]);
    if (x[31] == y[31]) begin
      sum = mx + my;
      if (sum[27]) begin
        sum = (sum >> 1) | {27'd0, sum[0]};
        e = e + 12'sd1;
      end
    end else begin
      sum = mx - my;
      if (sum == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - 12'(lz);
    end
    return fp_round_pack(x[31], e, sum[26:3], sum[2], |sum[1:0]);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // c + a*b, or c - a*b when neg is set
  function automatic fp32_t fp_mac(fp32_t a, fp32_t b, fp32_t c, logic neg);
    fp32_t p;
    p = fp_mul(a, b);
    return fp_add(c, neg ? fp_neg(p) : p);
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic s;
    logic [49:0] num;
    logic [49:0] q;
    logic [49:0] r;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0) return {s, 31'd0};
    if (b[30:23] == 8'd0 || a[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (b[30:23] == 8'hFF) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q = num / {26'd0, 1'b1, b[22:0]};
    r = num % {26'd0, 1'b1, b[22:0]};
    e = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    // q lies in [2^25, 2^27)
    if (q[26])
      return fp_round_pack(s, e, q[26:3], q[2], (|q[1:0]) || (r != 50'd0));
    else
      return fp_round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] || (r != 50'd0));
  endfunction

  // Signed fixed point with FRAC fractional bits to float.
  function automatic fp32_t fix_to_fp(logic signed [63:0] v, int unsigned frac);
    logic s;
    logic [63:0] mag;
    int unsigned msb;
    logic [63:0] sh;
    logic signed [11:0] e;
    if (v == 64'sd0) return FP_ZERO;
    s = v[63];
    mag = s ? 64'(-v) : 64'(v);
    msb = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) msb = i;
    // bring the leading one to bit 63
    sh = mag << (63 - msb);
    e = 12'(msb) - 12'(frac) + 12'sd127;
    return fp_round_pack(s, e, sh[63:40], sh[39], |sh[38:0]);
  endfunction

  // Float to signed fixed point with FRAC fractional bits, truncated toward
  // zero and saturated to 64 bits.
  function automatic logic signed [63:0] fp_to_fix(fp32_t a, int unsigned frac);
    logic [63:0] m;
    int sh;
    logic signed [63:0] r;
    if (a[30:23] == 8'd0) return 64'sd0;
    sh = int'(a[30:23]) - 127 - 23 + int'(frac);
    m = {40'd0, 1'b1, a[22:0]};
    if (sh >= 39) m = 64'h7FFF_FFFF_FFFF_FFFF;
    else if (sh >= 0) m = m << sh;
    else if (sh > -64) m = m >> (-sh);
    else m = 64'd0;
    r = a[31] ? -$signed(m) : $signed(m);
    return r;
  endfunction

endpackage
