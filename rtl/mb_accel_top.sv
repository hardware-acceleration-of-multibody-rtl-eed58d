// mb_accel_top: multibody-simulation co-processor for an embedded host
// processor. It holds the accelerators for the costly steps of a
// semi-recursive multibody simulation step, each behind the same simple host
// port:
//
//   UNIT_MASS  mass_matrix_unit     global mass matrix M = R^T Mbar R (NB bodies)
//   UNIT_POST  postprocess_unit     absolute motion of bodies and joints (NB bodies)
//   UNIT_GJ    gauss_jordan_solver  Newton-Raphson correction, N_GJ unknowns
//   UNIT_IND   indiv_mass_unit      body mass matrices only, all NB_IND bodies
//                                   at once (the reduced variant for large models)
//
// The host (which runs the rest of the simulation, builds the tangent matrix
// and residual and integrates) writes a unit's input memory, starts it, waits
// for its done bit and reads its results. The units are independent and may
// run at the same time. Which tasks are offloaded and their sizes (nine bodies
// and nine unknowns for the four-bar linkage; 29 bodies for the vehicle) follow
// the document; the host port, word maps and the combination of all units in
// one top level are this design's choices.
//
// Host port: wr_en with wr_unit selects a unit's input memory; wr_a is the
// body (or matrix row) and wr_b the word (or matrix column). start with
// start_unit starts that unit; busy[u] and done[u] (one-cycle pulse) report per
// unit, indexed by unit_t. rd_unit/rd_a/rd_b select a result combinationally on
// rd_data: mass matrix entry (row, col); post-process word rd_b of body rd_a;
// solution entry rd_a; body-matrix entry (rd_b[5:3], rd_b[2:0]) of body rd_a.
module mb_accel_top
  import mbfp_pkg::*;
  import mb_types_pkg::*;
#(
  parameter int unsigned NB     = 9,    // bodies of the model (mass matrix, post-process)
  parameter int unsigned N_GJ   = 9,    // unknowns of the Newton-Raphson system
  parameter int unsigned NB_IND = 29    // bodies of the individual mass-matrix unit
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  unit_t       wr_unit,
  input  logic [7:0]  wr_a,
  input  logic [5:0]  wr_b,
  input  fp32_t       wr_data,
  input  logic        start,
  input  unit_t       start_unit,
  output logic [3:0]  busy,
  output logic [3:0]  done,
  output logic        singular,
  input  unit_t       rd_unit,
  input  logic [7:0]  rd_a,
  input  logic [5:0]  rd_b,
  output fp32_t       rd_data
);

  localparam int unsigned BW  = $clog2(NB);
  localparam int unsigned GW  = $clog2(N_GJ + 1);
  localparam int unsigned IBW = $clog2(NB_IND);

  logic [3:0] we, st;
  always_comb begin
    we = '0;
    st = '0;
    we[wr_unit]    = wr_en;
    st[start_unit] = start;
  end

  fp32_t mass_q, post_q, gj_q, ind_q;

  mass_matrix_unit #(.NB(NB)) u_mass (
    .clk, .rst_n,
    .in_we(we[UNIT_MASS]), .in_body(wr_a[BW-1:0]), .in_word(wr_b[4:0]), .in_data(wr_data),
    .start(st[UNIT_MASS]), .busy(busy[UNIT_MASS]), .done(done[UNIT_MASS]),
    .out_row(rd_a[BW-1:0]), .out_col(rd_b[BW-1:0]), .out_data(mass_q)
  );

  postprocess_unit #(.NB(NB)) u_post (
    .clk, .rst_n,
    .in_we(we[UNIT_POST]), .in_body(wr_a[BW-1:0]), .in_word(wr_b[4:0]), .in_data(wr_data),
    .start(st[UNIT_POST]), .busy(busy[UNIT_POST]), .done(done[UNIT_POST]),
    .out_body(rd_a[BW-1:0]), .out_word(rd_b[4:0]), .out_data(post_q)
  );

  gauss_jordan_solver #(.N(N_GJ)) u_gj (
    .clk, .rst_n,
    .in_we(we[UNIT_GJ]), .in_row(wr_a[GW-1:0]), .in_col(wr_b[GW-1:0]), .in_data(wr_data),
    .start(st[UNIT_GJ]), .busy(busy[UNIT_GJ]), .done(done[UNIT_GJ]), .singular(singular),
    .out_idx(rd_a[GW-1:0]), .out_data(gj_q)
  );

  indiv_mass_unit #(.NB(NB_IND)) u_ind (
    .clk, .rst_n,
    .in_we(we[UNIT_IND]), .in_body(wr_a[IBW-1:0]), .in_word(wr_b[4:0]), .in_data(wr_data),
    .start(st[UNIT_IND]), .done(done[UNIT_IND]),
    .out_body(rd_a[IBW-1:0]), .out_row(rd_b[5:3]), .out_col(rd_b[2:0]), .out_data(ind_q)
  );
  assign busy[UNIT_IND] = 1'b0;   // finishes in the cycle after start

  always_comb begin
    unique case (rd_unit)
      UNIT_MASS: rd_data = mass_q;
      UNIT_POST: rd_data = post_q;
      UNIT_GJ:   rd_data = gj_q;
      default:   rd_data = ind_q;
    endcase
  end

endmodule
