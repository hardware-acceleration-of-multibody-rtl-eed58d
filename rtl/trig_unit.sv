// trig_unit: sine and cosine of a single-precision joint angle, needed to
// build the rotation matrix of a revolute joint.
//
// How it works: the angle is converted to signed fixed point with 28
// fractional bits, reduced to [-pi, pi] by subtracting round(a / 2pi) * 2pi,
// and folded into [-pi/2, pi/2] (a -> a -/+ pi, which negates both results).
// A rotation-mode CORDIC then runs ITER micro-rotations, one per clock, on
// 34-bit values with 30 fractional bits, starting from x = 1/K (the CORDIC
// gain) and y = 0, so that x -> cos and y -> sin. The two results are
// converted back to single precision.
//
// The document computes the trigonometric functions in the accelerator but
// does not say how; the CORDIC method, its word length and iteration count
// are this design's choices. The arctangent table is atan(2^-i) * 2^30,
// rounded; for i >= 10 that equals 2^(30-i) to the last bit and is computed.
//
// Interface: pulse start with angle valid; done pulses for one cycle with
// sin_o / cos_o valid (they hold until the next start). busy is high in
// between. Timing: ITER + 2 clock cycles from the edge that samples start to
// the edge after which done is high (32 for ITER = 30). Absolute error about
// 1e-8 before the final rounding to single precision.
module trig_unit
  import mbfp_pkg::*;
#(
  parameter int unsigned ITER = 30
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t angle,
  output logic  busy,
  output logic  done,
  output fp32_t sin_o,
  output fp32_t cos_o
);

  localparam logic signed [63:0] TWO_PI_Q28  = 64'sd1686629713;
  localparam logic signed [63:0] PI_Q28      = 64'sd843314857;
  localparam logic signed [63:0] HALF_PI_Q28 = 64'sd421657428;
  localparam logic signed [63:0] INV_2PI_Q32 = 64'sd683565276;
  localparam logic signed [33:0] INV_GAIN    = 34'sd652032874;   // 1/K in Q30

  function automatic logic signed [33:0] atan_q30(int unsigned i);
    case (i)
      0: return 34'sd843314857;
      1: return 34'sd497837829;
      2: return 34'sd263043837;
      3: return 34'sd133525159;
      4: return 34'sd67021687;
      5: return 34'sd33543516;
      6: return 34'sd16775851;
      7: return 34'sd8388437;
      8: return 34'sd4194283;
      9: return 34'sd2097149;
      default: return (i > 30) ? 34'sd0 : (34'sd1 <<< (30 - i));
    endcase
  endfunction

  // ------------------------------------------------------------ reduction
  logic signed [63:0]  a_fix, kq, r_red, r_fold;
  logic signed [127:0] prod;
  logic                neg_in;
  always_comb begin
    a_fix = fp_to_fix(angle, 28);
    prod  = 128'(a_fix) * 128'(INV_2PI_Q32);                 // Q60
    kq    = 64'((prod + (128'sd1 <<< 59)) >>> 60);           // round(a / 2pi)
    r_red = a_fix - kq * TWO_PI_Q28;
    neg_in = 1'b0;
    r_fold = r_red;
    if (r_red > HALF_PI_Q28) begin
      r_fold = r_red - PI_Q28;
      neg_in = 1'b1;
    end else if (r_red < -HALF_PI_Q28) begin
      r_fold = r_red + PI_Q28;
      neg_in = 1'b1;
    end
  end

  // ------------------------------------------------------------ iterations
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OUT} state_t;
  state_t state;
  logic signed [33:0] x, y, z;
  logic [5:0]         it;
  logic               neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      neg   <= 1'b0;
      done  <= 1'b0;
      sin_o <= FP_ZERO;
      cos_o <= FP_ONE;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x     <= INV_GAIN;
          y     <= '0;
          z     <= 34'(r_fold <<< 2);   // Q28 -> Q30
          neg   <= neg_in;
          it    <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          if (z[33]) begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_q30(32'(it));
          end else begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_q30(32'(it));
          end
          if (it == 6'(ITER - 1)) state <= S_OUT;
          it <= it + 1'b1;
        end
        S_OUT: begin
          cos_o <= fix_to_fp(neg ? -64'(x) : 64'(x), 30);
          sin_o <= fix_to_fp(neg ? -64'(y) : 64'(y), 30);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
