// indiv_mass_unit: body mass matrices of all NB bodies of a model computed at
// the same time, one body_mass_matrix per body.
//
// This is the reduced mass-matrix accelerator for a model too large for the
// full assembly (the 29-body vehicle): only the 6x6 body matrices Mbar_i are
// computed in the accelerator, and their projection onto the joint
// coordinates is left to the host. Because the body matrices are independent,
// every body has its own evaluator, so all of them finish together and the
// time does not grow with the number of bodies. The per-body replication is
// the document's; evaluating each matrix in a single combinational pass is
// this design's choice.
//
// Host interface: while idle, write m, g and J of each body with in_we/
// in_body/in_word/in_data (same word map as mass_matrix_unit; other words are
// ignored); pulse start. The results are registered at the edge that samples
// start and done pulses on the following cycle; Mbar_body(row, col) is then
// read combinationally on out_data until the next start.
module indiv_mass_unit
  import mbfp_pkg::*;
  import mb_types_pkg::*;
#(
  parameter int unsigned NB = 29
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_we,
  input  logic [$clog2(NB)-1:0] in_body,
  input  logic [4:0]            in_word,
  input  fp32_t                 in_data,
  input  logic                  start,
  output logic                  done,
  input  logic [$clog2(NB)-1:0] out_body,
  input  logic [2:0]            out_row,
  input  logic [2:0]            out_col,
  output fp32_t                 out_data
);

  fp32_t p_m [NB];
  fp32_t p_g [NB][3];
  fp32_t p_j [NB][6];
  fp32_t mb_c[NB][6][6];   // evaluator outputs
  fp32_t mb_q[NB][6][6];   // registered results

  for (genvar b = 0; b < NB; b++) begin : g_body
    body_mass_matrix u_bmm (.m(p_m[b]), .g(p_g[b]), .j(p_j[b]), .mbar(mb_c[b]));
  end

  always_ff @(posedge clk) begin
    if (in_we && !start) begin
      if (in_word == W_MASS) p_m[in_body] <= in_data;
      else if (in_word >= W_G0 && in_word < W_G0 + 5'd3) p_g[in_body][in_word - W_G0] <= in_data;
      else if (in_word >= W_J0 && in_word < W_J0 + 5'd6) p_j[in_body][in_word - W_J0] <= in_data;
    end
    if (start) mb_q <= mb_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= start;
  end

  assign out_data = (out_row < 3'd6 && out_col < 3'd6) ? mb_q[out_body][out_row][out_col] : FP_ZERO;

endmodule
