// mass_matrix_unit: global mass matrix of a tree-structured multibody model
// in relative (joint) coordinates, M = R^T * Mbar * R.
//
// R maps the joint rates to the body coordinates; column j of R holds the
// 6-vector b_j of joint j in the block rows of body j and of every body after
// it in the kinematic chain. Because of that structure M can be assembled
// recursively instead of by full matrix products:
//
//   A  evaluate the 6x6 body mass matrix Mbar_i of every body
//      (body_mass_matrix, one body per cycle);
//   B  accumulate, from the last body to the first, each body's matrix into
//      its parent's: S_p += S_i, so S_j is the composite inertia of the
//      subtree hanging from body j (one 6-element row per cycle);
//   C  for each joint j form w = S_j * b_j (one row per cycle through a
//      6-term dot-product unit), then M(j,j) = b_j.w and, walking up the
//      chain through every ancestor i of j, M(i,j) = M(j,i) = b_i.w (one entry
//      pair per cycle). Entries between joints on different branches are zero.
//
// The three operations and their order follow the document (Eq. 8 and 13 and
// its schedule of operations A, B and C); the recursive formula for C, the
// degree of parallelism (a 6-lane dot-product unit, a 6-lane adder row) and
// the sequential schedule are this design's choices. Bodies must be numbered
// so that each parent comes before its children.
//
// Host interface: while idle the host writes the per-body inputs through
// in_we/in_body/in_word/in_data (word map in mb_types_pkg: m, g, J, b,
// parent), pulses start, waits for done (one-cycle pulse) and then reads
// M(out_row, out_col) combinationally on out_data. busy is high from the
// cycle after start until done.
//
// Timing: for NB bodies a run takes NB + sum_i(parent_i ? 6 : 1) +
// sum_j(7 + depth_j) + 2 clock cycles, counting from the edge that samples
// start to the edge after which done is high; depth_j is the number of
// ancestors of body j. Nine bodies in an open chain take 159 cycles.
module mass_matrix_unit
  import mbfp_pkg::*;
  import mb_types_pkg::*;
#(
  parameter int unsigned NB = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input loading
  input  logic                    in_we,
  input  logic [$clog2(NB)-1:0]   in_body,
  input  logic [4:0]              in_word,
  input  fp32_t                   in_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // result readout
  input  logic [$clog2(NB)-1:0]   out_row,
  input  logic [$clog2(NB)-1:0]   out_col,
  output fp32_t                   out_data
);

  localparam int unsigned IW = $clog2(NB);
  typedef logic [IW-1:0] idx_t;

  typedef enum logic [2:0] {S_IDLE, S_A, S_B, S_CW, S_CM, S_DONE} state_t;
  state_t state;

  // per-body inputs
  fp32_t p_m  [NB];
  fp32_t p_g  [NB][3];
  fp32_t p_j  [NB][6];
  fp32_t p_b  [NB][6];
  logic [7:0] p_par [NB];   // 0 = ground, otherwise parent body number + 1

  // composite inertias, w vector and result
  fp32_t sig  [NB][6][6];
  fp32_t w    [6];
  fp32_t mm   [NB][NB];

  idx_t        bi;          // body under work (A, B, C's column j)
  idx_t        ki;          // ancestor in C
  logic [2:0]  ri;          // row counter

  // ---------------------------------------------------------------- op A
  fp32_t a_g[3], a_j[6], a_mbar[6][6];
  always_comb begin
    a_g = p_g[bi];
    a_j = p_j[bi];
  end
  body_mass_matrix u_bmm (.m(p_m[bi]), .g(a_g), .j(a_j), .mbar(a_mbar));

  // ---------------------------------------------------------------- op C dot product
  fp32_t dot_a[6], dot_b[6], dot_y;
  always_comb begin
    for (int c = 0; c < 6; c++) begin
      dot_a[c] = (state == S_CW) ? sig[bi][ri][c] : p_b[ki][c];
      dot_b[c] = (state == S_CW) ? p_b[bi][c]     : w[c];
    end
  end
  dot6 u_dot (.a(dot_a), .b(dot_b), .y(dot_y));

  idx_t parent_of_bi, parent_of_ki;
  assign parent_of_bi = idx_t'(p_par[bi] - 8'd1);
  assign parent_of_ki = idx_t'(p_par[ki] - 8'd1);

  always_ff @(posedge clk) begin
    if (in_we && state == S_IDLE) begin
      if (in_word == W_MASS) p_m[in_body] <= in_data;
      else if (in_word == W_PARENT) p_par[in_body] <= in_data[7:0];
      else if (in_word >= W_G0 && in_word < W_G0 + 5'd3) p_g[in_body][in_word - W_G0] <= in_data;
      else if (in_word >= W_J0 && in_word < W_J0 + 5'd6) p_j[in_body][in_word - W_J0] <= in_data;
      else if (in_word >= W_B0 && in_word < W_B0 + 5'd6) p_b[in_body][in_word - W_B0] <= in_data;
    end

    unique case (state)
      S_A: begin
        sig[bi] <= a_mbar;
        for (int c = 0; c < NB; c++) mm[bi][c] <= FP_ZERO;
      end
      S_B: begin
        if (p_par[bi] != 8'd0)
          for (int c = 0; c < 6; c++)
            sig[parent_of_bi][ri][c] <= fp_add(sig[parent_of_bi][ri][c], sig[bi][ri][c]);
      end
      S_CW: w[ri] <= dot_y;
      S_CM: begin
        mm[ki][bi] <= dot_y;
        mm[bi][ki] <= dot_y;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bi    <= '0;
      ki    <= '0;
      ri    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_A;
          bi    <= '0;
        end
        S_A: begin
          if (bi == idx_t'(NB - 1)) begin
            state <= S_B;
            ri    <= '0;
          end else bi <= bi + 1'b1;
        end
        S_B: begin
          if (p_par[bi] == 8'd0 || ri == 3'd5) begin
            ri <= '0;
            if (bi == '0) state <= S_CW;
            else          bi <= bi - 1'b1;
          end else ri <= ri + 1'b1;
        end
        S_CW: begin
          if (ri == 3'd5) begin
            state <= S_CM;
            ki    <= bi;
            ri    <= '0;
          end else ri <= ri + 1'b1;
        end
        S_CM: begin
          if (p_par[ki] != 8'd0) ki <= parent_of_ki;
          else if (bi == idx_t'(NB - 1)) state <= S_DONE;
          else begin
            bi    <= bi + 1'b1;
            state <= S_CW;
          end
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
  assign out_data = mm[out_row][out_col];

endmodule
