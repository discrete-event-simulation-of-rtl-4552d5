// dmd_pkg: types and constants shared by the discrete molecular dynamics
// (DMD) engine.
//
// Number formats (all fixed point, this design's choice where noted):
//   * Position: 32-bit unsigned per axis, the whole periodic box maps onto
//     0 .. 2^32-1, so the box wraps naturally.  The main datapath is 32 bits
//     wide as in the original design; for a 128 A box one LSB is 2.9e-8 A.
//   * Cell index: the top CELL_BITS (5) bits of each position component,
//     giving a 32 x 32 x 32 cell grid.
//   * Velocity: 32-bit signed, in position LSBs per time tick (own choice).
//   * Time: 32-bit unsigned tick count (own choice of unit).
//   * Bead identifiers ("tags"): BEAD_W bits (own choice: 1024 beads).
package dmd_pkg;

  localparam int unsigned POS_W     = 32;
  localparam int unsigned VEL_W     = 32;
  localparam int unsigned TIME_W    = 32;
  localparam int unsigned BEAD_W    = 10;
  localparam int unsigned CELL_BITS = 5;
  localparam int unsigned CELL_W    = 3 * CELL_BITS;   // flat cell address
  localparam int unsigned SLOTS     = 8;               // beads per cell

  // Bead diameter.  The cell edge (2^(POS_W-CELL_BITS) position units) is
  // taken equal to the bead diameter, so colliding beads are always in
  // neighbouring cells.  The predictor works on positions reduced to
  // RED_W = 17 bits (12 bits below the 5 cell-index bits); one reduced unit
  // is 2^RED_SHIFT position units and the diameter is SIGMA_R of them.
  localparam int unsigned RED_W     = 17;
  localparam int unsigned RED_SHIFT = POS_W - RED_W;               // 15
  localparam int unsigned SIGMA_R   = 1 << (POS_W - CELL_BITS - RED_SHIFT); // 4096

  typedef logic [TIME_W-1:0] time_t;
  typedef logic [BEAD_W-1:0] bead_id_t;
  typedef logic [CELL_BITS-1:0] cidx_t;
  typedef logic [CELL_W-1:0] cell_addr_t;
  typedef logic [SLOTS-1:0] slot_vec_t;

  typedef enum logic {EV_COLLIDE = 1'b0, EV_CROSS = 1'b1} ev_kind_e;

  // One scheduled event.  For a collision, a and b are the two beads.  For a
  // cell crossing, a is the bead, axis (0..2) and dir (1 = towards larger
  // coordinate) give the wall; b repeats a.
  typedef struct packed {
    time_t    t;
    bead_id_t a;
    bead_id_t b;
    ev_kind_e kind;
    logic [1:0] axis;
    logic       dir;
  } event_t;

  // State of one bead, as held in the tag-indexed bead memory.
  typedef struct packed {
    logic [2:0][POS_W-1:0]        pos;
    logic [2:0][VEL_W-1:0]        vel;   // two's complement per axis
    time_t                        t;
  } bead_t;

  // Broadcast that cancels every scheduled event that names a bead.
  typedef struct packed {
    logic     v0;
    bead_id_t tag0;
    logic     v1;
    bead_id_t tag1;
  } inval_t;

  function automatic cell_addr_t cell_of(input logic [2:0][POS_W-1:0] p);
    return {p[2][POS_W-1 -: CELL_BITS], p[1][POS_W-1 -: CELL_BITS],
            p[0][POS_W-1 -: CELL_BITS]};
  endfunction

  // True when an event names a bead cancelled by the broadcast.
  function automatic logic hit(input event_t e, input inval_t iv);
    return (iv.v0 && (e.a == iv.tag0 || e.b == iv.tag0)) ||
           (iv.v1 && (e.a == iv.tag1 || e.b == iv.tag1));
  endfunction

endpackage
