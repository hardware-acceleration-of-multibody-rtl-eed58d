// mb_types_pkg: word maps of the accelerators' host-visible input memories
// and the unit selector of the top level. The word maps are this design's
// choice; the quantities they carry are those of the document's equations.
package mb_types_pkg;

  // mass_matrix_unit: per-body input words
  localparam logic [4:0] W_MASS   = 5'd0;   // body mass m
  localparam logic [4:0] W_G0     = 5'd1;   // global centre of mass g, 3 words (x, y, z)
  localparam logic [4:0] W_J0     = 5'd4;   // inertia tensor J: xx, yy, zz, xy, xz, yz
  localparam logic [4:0] W_B0     = 5'd10;  // joint vector b (6 words)
  localparam logic [4:0] W_PARENT = 5'd16;  // parent body number + 1, 0 = ground (integer)

  // postprocess_unit: per-body input words
  localparam logic [4:0] P_Z      = 5'd0;   // joint angle z
  localparam logic [4:0] P_ZD     = 5'd1;   // joint rate dz/dt
  localparam logic [4:0] P_U0     = 5'd2;   // joint axis in the parent frame (3 words)
  localparam logic [4:0] P_R0     = 5'd5;   // joint point in the parent frame (3 words)
  localparam logic [4:0] P_G0     = 5'd8;   // centre of mass in the body frame (3 words)
  localparam logic [4:0] P_PARENT = 5'd11;  // parent body number + 1, 0 = ground (integer)

  // postprocess_unit: per-body output words
  localparam logic [4:0] O_ROT0   = 5'd0;   // rotation matrix, row-major (9 words)
  localparam logic [4:0] O_POS0   = 5'd9;   // joint position (3 words)
  localparam logic [4:0] O_AXIS0  = 5'd12;  // joint axis direction, global (3 words)
  localparam logic [4:0] O_OMG0   = 5'd15;  // angular velocity (3 words)
  localparam logic [4:0] O_JVEL0  = 5'd18;  // joint point velocity (3 words)
  localparam logic [4:0] O_COG0   = 5'd21;  // centre-of-mass position (3 words)
  localparam logic [4:0] O_CVEL0  = 5'd24;  // centre-of-mass velocity (3 words)
  localparam int unsigned O_WORDS = 27;

  // top level unit selector
  typedef enum logic [1:0] {
    UNIT_MASS = 2'd0,
    UNIT_POST = 2'd1,
    UNIT_GJ   = 2'd2,
    UNIT_IND  = 2'd3
  } unit_t;

endpackage
