// gauss_jordan_solver: solves the dense linear system A x = r of the
// Newton-Raphson iteration (tangent matrix times correction = -residual) by
// Gauss-Jordan elimination in single precision.
//
// The augmented matrix [A | r] is held in registers. For each pivot column k:
//   PIV   scan rows k..N-1 for the largest |a(i,k)|, one row per cycle, then
//         exchange the pivot row into place by swapping two entries of a row
//         permutation table (no data moves);
//   NORM  divide the pivot row by its pivot (one reciprocal, then the row
//         multiplied in parallel, one cycle);
//   ELIM  subtract f = a(i,k) times the pivot row from every other row i,
//         one whole row per cycle (N+1 multiply-add lanes); the cycle that
//         visits the pivot row itself leaves it alone.
// At the end column k holds the unit vector e_k and the last column the
// solution. A pivot whose magnitude does not exceed PIV_MIN (rounding keeps
// the pivot of a singular matrix from being exactly zero) sets 'singular',
// and the solution is then invalid.
//
// The document's solver is Gauss-Jordan elimination sized for the model (nine
// unknowns for the four-bar linkage, 42 for the vehicle); it does not say how
// the elimination is parallelised. Partial pivoting through a permutation
// table and the row-parallel elimination are this design's choices.
//
// Host interface: while idle, write a(row, col) with in_we/in_row/in_col/
// in_data, column N being the right-hand side; pulse start; done pulses for
// one cycle at the end; x(out_idx) is then read combinationally on out_data.
// Timing: N(N+1)/2 + N + N*N + 2 cycles from the edge that samples start
// to the edge after which done is high (137 cycles for N = 9).
module gauss_jordan_solver
  import mbfp_pkg::*;
#(
  parameter int unsigned N       = 9,
  parameter logic [31:0] PIV_MIN = 32'h3586_37BD   // 1.0e-6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_we,
  input  logic [$clog2(N+1)-1:0] in_row,
  input  logic [$clog2(N+1)-1:0] in_col,
  input  fp32_t                  in_data,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   singular,
  input  logic [$clog2(N+1)-1:0] out_idx,
  output fp32_t                  out_data
);

  localparam int unsigned IW = $clog2(N + 1);
  typedef logic [IW-1:0] idx_t;

  typedef enum logic [2:0] {S_IDLE, S_PIV, S_NORM, S_ELIM, S_DONE} state_t;
  state_t state;

  fp32_t a    [N][N+1];
  idx_t  prow [N];      // physical row holding logical row i
  idx_t  k;             // pivot column
  idx_t  i;             // scan / elimination row (logical)
  idx_t  best;          // logical row of the largest pivot candidate
  fp32_t best_v;

  idx_t  pk, pi;
  fp32_t inv, f;
  assign pk  = prow[k];
  assign pi  = prow[i];
  assign inv = fp_div(FP_ONE, a[pk][k]);
  assign f   = a[pi][k];

  // candidate value seen in this scan cycle
  fp32_t cand;
  assign cand = a[pi][k];

  always_ff @(posedge clk) begin
    if (in_we && state == S_IDLE && in_row < idx_t'(N) && in_col <= idx_t'(N))
      a[in_row][in_col] <= in_data;
    unique case (state)
      S_NORM:
        for (int c = 0; c <= N; c++) a[pk][c] <= fp_mul(a[pk][c], inv);
      S_ELIM:
        if (i != k)
          for (int c = 0; c <= N; c++) a[pi][c] <= fp_mac(f, a[pk][c], a[pi][c], 1'b1);
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k        <= '0;
      i        <= '0;
      best     <= '0;
      best_v   <= FP_ZERO;
      done     <= 1'b0;
      singular <= 1'b0;
      for (int r = 0; r < N; r++) prow[r] <= idx_t'(r);
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int r = 0; r < N; r++) prow[r] <= idx_t'(r);
          singular <= 1'b0;
          k        <= '0;
          i        <= '0;
          best     <= '0;
          best_v   <= FP_ZERO;
          state    <= S_PIV;
        end
        S_PIV: begin
          // i runs over k..N-1
          if (i == k || fp_abs_gt(cand, best_v)) begin
            best   <= i;
            best_v <= cand;
          end
          if (i == idx_t'(N - 1)) begin
            // exchange the winner into position k
            if (i == k || fp_abs_gt(cand, best_v)) begin
              prow[k] <= prow[i];
              prow[i] <= prow[k];
              if (!fp_abs_gt(cand, PIV_MIN)) singular <= 1'b1;
            end else begin
              prow[k]    <= prow[best];
              prow[best] <= prow[k];
              if (!fp_abs_gt(best_v, PIV_MIN)) singular <= 1'b1;
            end
            state <= S_NORM;
          end else i <= i + 1'b1;
        end
        S_NORM: begin
          i     <= '0;
          state <= S_ELIM;
        end
        S_ELIM: begin
          if (i == idx_t'(N - 1)) begin
            if (k == idx_t'(N - 1)) state <= S_DONE;
            else begin
              k     <= k + 1'b1;
              i     <= k + 1'b1;
              state <= S_PIV;
            end
          end else i <= i + 1'b1;
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
  assign out_data = (out_idx < idx_t'(N)) ? a[prow[out_idx]][N] : FP_ZERO;

endmodule
