// postprocess_unit: absolute motion of the bodies and revolute joints of a
// tree-structured mechanism from its relative coordinates (the step that
// follows each integrator time step).
//
// Bodies are processed in order, parents before children, because each body's
// motion is built on its parent's. For body i with parent p (the ground has
// R = I and zero position and velocities), joint angle z, joint rate dz, joint
// axis u and joint point r given in the parent frame, and centre of mass g
// given in the body frame, the unit computes
//
//   A  joint axis      a = R_p u,           angular velocity  w = w_p + a dz
//   E  joint position  d = R_p r,           o = o_p + d
//   F  joint velocity  v = v_p + w_p x d
//   B  sin z, cos z    (trig_unit, computed ahead: see below)
//   C  rotation        R = R_p (cos z I + sin z [u]x + (1 - cos z) u u^T)
//   G  centre of mass  e = R g,             G = o + e,   vG = v + w x e
//
// and writes the 27 results (R, o, a, w, v, G, vG) to its output memory. The
// letters are those of the document's schedule of one loop iteration; the
// list of quantities is the document's, while the kinematic formulas above,
// the frame conventions and the order (E and F moved ahead of C) are this
// design's.
//
// Datapath: LANES single-precision multiply-adds (dst = c +/- a*b) per clock,
// driven by a 94-step micro-program built at elaboration time and packed, also
// at elaboration time, into bundles of independent micro-ops (32 bundles for
// LANES = 3). Operand addresses select constants, the body's inputs, the
// parent's results, the body's own results or scratch registers. A bundle
// marked 'wt' waits until the body's sine and cosine are available.
// The sine/cosine of the next body is started as soon as the current body has
// taken its own, so the trig unit runs alongside the multiply-add lanes.
//
// Host interface: while idle, write per-body inputs (word map in mb_types_pkg:
// z, dz, u, r, g, parent) with in_we/in_body/in_word/in_data; pulse start;
// done pulses for one cycle when all NB bodies are finished; results are read
// combinationally through out_body/out_word/out_data.
// Timing: with the default parameters the trig unit sets the pace: a body
// every ITER + 4 = 34 cycles, and 330 cycles for NB = 9 from the edge that
// samples start to the edge after which done is high. The run time does not
// depend on the data.
module postprocess_unit
  import mbfp_pkg::*;
  import mb_types_pkg::*;
#(
  parameter int unsigned NB    = 9,
  parameter int unsigned ITER  = 30,   // CORDIC iterations of the sine/cosine
  parameter int unsigned LANES = 3     // multiply-adds issued per cycle
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_we,
  input  logic [$clog2(NB)-1:0] in_body,
  input  logic [4:0]            in_word,
  input  fp32_t                 in_data,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  input  logic [$clog2(NB)-1:0] out_body,
  input  logic [4:0]            out_word,
  output fp32_t                 out_data
);

  localparam int unsigned IW = $clog2(NB);
  typedef logic [IW-1:0] idx_t;

  // ---------------------------------------------------------------- operand map
  localparam int A_ZERO = 0;
  localparam int A_ONE  = 1;
  localparam int A_IN   = 2;    // 11 input words of the current body
  localparam int A_PAR  = 16;   // 27 result words of the parent
  localparam int A_OWN  = 48;   // 27 result words of the current body
  localparam int A_TMP  = 80;   // 32 scratch registers
  localparam int T_S    = A_TMP + 0;
  localparam int T_C    = A_TMP + 1;
  localparam int T_OMC  = A_TMP + 2;
  localparam int T_D    = A_TMP + 3;    // 3
  localparam int T_E    = A_TMP + 6;    // 3
  localparam int T_RL   = A_TMP + 9;    // 9, joint rotation
  localparam int T_OU   = A_TMP + 18;   // 3, (1 - cos) u

  localparam int IU = A_IN + int'(P_U0);
  localparam int IR = A_IN + int'(P_R0);
  localparam int IG = A_IN + int'(P_G0);
  localparam int IZD = A_IN + int'(P_ZD);

  typedef struct packed {
    logic       wt;    // wait for sine/cosine
    logic       neg;   // dst = c - a*b instead of c + a*b
    logic [6:0] dst;
    logic [6:0] a;
    logic [6:0] b;
    logic [6:0] c;
  } uop_t;

  localparam int unsigned NU = 94;
  typedef uop_t [NU-1:0] uprog_t;

  function automatic uop_t mk(logic wt, logic neg, int dst, int a, int b, int c);
    return '{wt: wt, neg: neg, dst: 7'(dst), a: 7'(a), b: 7'(b), c: 7'(c)};
  endfunction

  function automatic uprog_t build_prog();
    uprog_t p;
    int n;
    n = 0;
    // A: joint axis a = R_p u and angular velocity w = w_p + a dz
    for (int k = 0; k < 3; k++)
      for (int r = 0; r < 3; r++) begin
        p[n] = mk(0, 0, A_OWN + int'(O_AXIS0) + r, A_PAR + int'(O_ROT0) + 3*r + k, IU + k,
                  (k == 0) ? A_ZERO : A_OWN + int'(O_AXIS0) + r);
        n++;
      end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, A_OWN + int'(O_OMG0) + r, A_OWN + int'(O_AXIS0) + r, IZD, A_PAR + int'(O_OMG0) + r);
      n++;
    end
    // E: d = R_p r, o = o_p + d
    for (int k = 0; k < 3; k++)
      for (int r = 0; r < 3; r++) begin
        p[n] = mk(0, 0, T_D + r, A_PAR + int'(O_ROT0) + 3*r + k, IR + k, (k == 0) ? A_ZERO : T_D + r);
        n++;
      end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, A_OWN + int'(O_POS0) + r, A_ONE, T_D + r, A_PAR + int'(O_POS0) + r);
      n++;
    end
    // F: v = v_p + w_p x d
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, A_OWN + int'(O_JVEL0) + r, A_PAR + int'(O_OMG0) + (r+1)%3, T_D + (r+2)%3,
                A_PAR + int'(O_JVEL0) + r);
      n++;
    end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 1, A_OWN + int'(O_JVEL0) + r, A_PAR + int'(O_OMG0) + (r+2)%3, T_D + (r+1)%3,
                A_OWN + int'(O_JVEL0) + r);
      n++;
    end
    // C: joint rotation (Rodrigues) and R = R_p * Rl
    p[n] = mk(1, 1, T_OMC, T_C, A_ONE, A_ONE); n++;
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, T_OU + r, T_OMC, IU + r, A_ZERO); n++;
    end
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 3; q++)
        if (r != q) begin
          p[n] = mk(0, q != (r+2)%3, T_RL + 3*r + q, T_S, IU + (3 - r - q), A_ZERO); n++;
        end
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 3; q++)
        if (r == q) begin
          p[n] = mk(0, 0, T_RL + 3*r + q, T_OU + r, IU + q, T_C); n++;
        end else begin
          p[n] = mk(0, 0, T_RL + 3*r + q, T_OU + r, IU + q, T_RL + 3*r + q); n++;
        end
    for (int k = 0; k < 3; k++)
      for (int r = 0; r < 3; r++)
        for (int q = 0; q < 3; q++) begin
          p[n] = mk(0, 0, A_OWN + int'(O_ROT0) + 3*r + q, A_PAR + int'(O_ROT0) + 3*r + k, T_RL + 3*k + q,
                    (k == 0) ? A_ZERO : A_OWN + int'(O_ROT0) + 3*r + q);
          n++;
        end
    // G: e = R g, G = o + e, vG = v + w x e
    for (int k = 0; k < 3; k++)
      for (int r = 0; r < 3; r++) begin
        p[n] = mk(0, 0, T_E + r, A_OWN + int'(O_ROT0) + 3*r + k, IG + k, (k == 0) ? A_ZERO : T_E + r);
        n++;
      end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, A_OWN + int'(O_COG0) + r, A_ONE, T_E + r, A_OWN + int'(O_POS0) + r);
      n++;
    end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 0, A_OWN + int'(O_CVEL0) + r, A_OWN + int'(O_OMG0) + (r+1)%3, T_E + (r+2)%3,
                A_OWN + int'(O_JVEL0) + r);
      n++;
    end
    for (int r = 0; r < 3; r++) begin
      p[n] = mk(0, 1, A_OWN + int'(O_CVEL0) + r, A_OWN + int'(O_OMG0) + (r+2)%3, T_E + (r+1)%3,
                A_OWN + int'(O_CVEL0) + r);
      n++;
    end
    return p;
  endfunction

  localparam uprog_t PROG = build_prog();

  // ---------------------------------------------------------------- issue bundles
  // The scalar program is packed, in order, into bundles of up to LANES
  // micro-ops that can run in the same cycle: a bundle is closed when it is
  // full, when the next micro-op reads or writes a register that the bundle
  // writes, or when the next micro-op must wait for the sine/cosine.
  typedef struct packed {
    logic             wt;
    logic [LANES-1:0] v;
    uop_t [LANES-1:0] op;
  } bundle_t;
  typedef bundle_t [NU-1:0] bprog_t;

  function automatic bprog_t pack_prog();
    bprog_t bp;
    uprog_t p;
    int nb, l;
    logic clash;
    p  = build_prog();
    bp = '0;
    nb = 0;
    l  = 0;
    for (int i = 0; i < int'(NU); i++) begin
      clash = 1'b0;
      for (int k = 0; k < l; k++)
        if (bp[nb].op[k].dst == p[i].a || bp[nb].op[k].dst == p[i].b ||
            bp[nb].op[k].dst == p[i].c || bp[nb].op[k].dst == p[i].dst)
          clash = 1'b1;
      if (l != 0 && (l == int'(LANES) || clash || p[i].wt)) begin
        nb++;
        l = 0;
      end
      bp[nb].op[l] = p[i];
      bp[nb].v[l]  = 1'b1;
      if (p[i].wt) bp[nb].wt = 1'b1;
      l++;
    end
    return bp;
  endfunction

  function automatic int unsigned count_bundles();
    bprog_t bp;
    int unsigned n;
    bp = pack_prog();
    n = 0;
    for (int i = 0; i < int'(NU); i++) if (bp[i].v != '0) n++;
    return n;
  endfunction

  localparam bprog_t      BPROG = pack_prog();
  localparam int unsigned NBUN  = count_bundles();

  // ---------------------------------------------------------------- storage
  fp32_t      inp  [NB][11];
  logic [7:0] ppar [NB];        // parent body number + 1, 0 = ground
  fp32_t      outm [NB][O_WORDS];
  fp32_t      tmp  [32];

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;
  idx_t   body;
  logic [6:0] pc;

  idx_t  par_idx;
  logic  has_par;
  assign has_par = (ppar[body] != 8'd0);
  assign par_idx = idx_t'(ppar[body] - 8'd1);

  function automatic fp32_t ground_word(int unsigned w);
    // the ground: identity rotation, everything else zero
    return (w == 0 || w == 4 || w == 8) ? FP_ONE : FP_ZERO;
  endfunction

  function automatic fp32_t rd(logic [6:0] adr);
    int unsigned ad;
    ad = int'(adr);
    if (ad == A_ZERO) return FP_ZERO;
    if (ad == A_ONE)  return FP_ONE;
    if (ad >= A_IN  && ad < A_IN + 11) return inp[body][ad - A_IN];
    if (ad >= A_PAR && ad < A_PAR + O_WORDS)
      return has_par ? outm[par_idx][ad - A_PAR] : ground_word(ad - A_PAR);
    if (ad >= A_OWN && ad < A_OWN + O_WORDS) return outm[body][ad - A_OWN];
    if (ad >= A_TMP && ad < A_TMP + 32) return tmp[ad - A_TMP];
    return FP_ZERO;
  endfunction

  // ---------------------------------------------------------------- trig
  // The sine/cosine of body k+1 is computed while body k is still running:
  // tq is the next body to start, nx_* holds a finished result until the
  // body under work takes it (sc_ok) into the scratch registers.
  logic [IW:0] tq;
  logic        nx_valid, sc_ok;
  fp32_t       nx_s, nx_c;
  logic        trig_start, trig_busy, trig_done;
  fp32_t       trig_sin, trig_cos;
  assign trig_start = (state == S_RUN) && !trig_busy && !trig_done && !nx_valid &&
                      (tq < (IW+1)'(NB));
  trig_unit #(.ITER(ITER)) u_trig (
    .clk, .rst_n, .start(trig_start), .angle(inp[tq[IW-1:0]][P_Z]),
    .busy(trig_busy), .done(trig_done), .sin_o(trig_sin), .cos_o(trig_cos)
  );

  // ---------------------------------------------------------------- execute
  bundle_t bun;
  logic    exec, last;
  fp32_t   res [LANES];
  assign bun  = BPROG[pc];
  assign exec = (state == S_RUN) && !(bun.wt && !sc_ok);
  assign last = (pc == 7'(NBUN - 1));
  always_comb
    for (int l = 0; l < int'(LANES); l++)
      res[l] = fp_mac(rd(bun.op[l].a), rd(bun.op[l].b), rd(bun.op[l].c), bun.op[l].neg);

  always_ff @(posedge clk) begin
    if (in_we && state == S_IDLE) begin
      if (in_word == P_PARENT) ppar[in_body] <= in_data[7:0];
      else if (in_word < 5'd11) inp[in_body][in_word[3:0]] <= in_data;
    end
    if (trig_done) begin
      nx_s <= trig_sin;
      nx_c <= trig_cos;
    end
    if (nx_valid && !sc_ok) begin
      tmp[T_S - A_TMP] <= nx_s;
      tmp[T_C - A_TMP] <= nx_c;
    end
    if (exec)
      for (int l = 0; l < int'(LANES); l++)
        if (bun.v[l]) begin
          if (int'(bun.op[l].dst) >= A_OWN && int'(bun.op[l].dst) < A_OWN + O_WORDS)
            outm[body][int'(bun.op[l].dst) - A_OWN] <= res[l];
          else if (int'(bun.op[l].dst) >= A_TMP && int'(bun.op[l].dst) < A_TMP + 32)
            tmp[int'(bun.op[l].dst) - A_TMP] <= res[l];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      body     <= '0;
      pc       <= '0;
      tq       <= '0;
      nx_valid <= 1'b0;
      sc_ok    <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (trig_start) tq <= tq + 1'b1;
      if (trig_done) nx_valid <= 1'b1;
      else if (nx_valid && !sc_ok) begin
        nx_valid <= 1'b0;
        sc_ok    <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          body     <= '0;
          pc       <= '0;
          tq       <= '0;
          nx_valid <= 1'b0;
          sc_ok    <= 1'b0;
          state    <= S_RUN;
        end
        S_RUN: if (exec) begin
          if (last) begin
            sc_ok <= 1'b0;
            pc    <= '0;
            if (body == idx_t'(NB - 1)) state <= S_DONE;
            else body <= body + 1'b1;
          end else pc <= pc + 1'b1;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign out_data = (out_word < 5'(O_WORDS)) ? outm[out_body][out_word] : FP_ZERO;

endmodule
