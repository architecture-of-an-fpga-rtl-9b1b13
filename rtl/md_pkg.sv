// md_pkg: number formats, record types and pipeline depths shared by the
// non-bonded force accelerator.
//
// All arithmetic is fixed point. The formats are this design's own choice
// (the accelerator they follow describes the computation, not the number
// representation):
//   coordinates        signed 32 bit, 20 fraction bits (Angstrom, +-2048 A)
//   squared distance   unsigned 32 bit, 20 fraction bits (A^2, below 4096)
//   distance r         unsigned 26 bit, 20 fraction bits
//   1/r                unsigned 41 bit, 40 fraction bits (r >= 1 A)
//   1/r^2,1/r^6,1/r^12 unsigned 49 bit, 48 fraction bits
//   charge             signed 32 bit, 24 fraction bits, pre-scaled by
//                      sqrt(Coulomb constant) so that qi*qj is already k*qi*qj
//   LJ coefficients    A = 12*C12 and B = 6*C6, unsigned 32 bit, 8 fraction bits
//   force              signed 64 bit, 32 fraction bits
// Pairs closer than 1 A (R2_MIN) or not closer than the cut-off contribute no
// force; this also drops the self pair (r = 0).
package md_pkg;

  localparam int unsigned COORD_W  = 32;
  localparam int unsigned COORD_FR = 20;
  localparam int unsigned R2_W     = 32;   // r^2, Q12.20
  localparam int unsigned R_W      = 26;   // r, Q6.20
  localparam int unsigned INVR_W   = 41;   // 1/r, Q1.40
  localparam int unsigned INVR_FR  = 40;
  localparam int unsigned POW_W    = 49;   // 1/r^n, Q1.48
  localparam int unsigned POW_FR   = 48;
  localparam int unsigned Q_W      = 32;   // charge, Q8.24
  localparam int unsigned Q_FR     = 24;
  localparam int unsigned COEF_W   = 32;   // LJ coefficient, Q24.8
  localparam int unsigned COEF_FR  = 8;
  localparam int unsigned FORCE_W  = 64;   // force, Q32.32
  localparam int unsigned FORCE_FR = 32;
  localparam int unsigned TYPE_W   = 5;    // 32 LJ atom types

  // Smallest squared distance that produces a force: 1.0 A^2.
  localparam logic [R2_W-1:0] R2_MIN = R2_W'(1) << COORD_FR;

  // Pipeline depths of the arithmetic units.
  localparam int unsigned SQRT_IN_W  = 2 * R_W;   // r2 << 20, 52 bits
  localparam int unsigned SQRT_LAT   = R_W;       // one root bit per stage
  localparam int unsigned DIV_LAT    = INVR_W;    // one quotient bit per stage
  localparam int unsigned DIST_LAT   = 2;         // pair_distance stages
  localparam int unsigned MUL_LAT    = 7;         // product stages after 1/r
  localparam int unsigned FORCE_LAT  = DIST_LAT + SQRT_LAT + DIV_LAT + MUL_LAT;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic signed [Q_W-1:0]     charge_t;
  typedef logic [TYPE_W-1:0]         atype_t;
  typedef logic signed [FORCE_W-1:0] force_t;

  typedef struct packed {
    coord_t  x;
    coord_t  y;
    coord_t  z;
    charge_t q;
    atype_t  atype;
  } atom_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } vec_t;

  typedef struct packed {
    force_t x;
    force_t y;
    force_t z;
  } fvec_t;

  typedef struct packed {
    logic [COEF_W-1:0] a;   // 12 * C12
    logic [COEF_W-1:0] b;   // 6 * C6
  } ljcoef_t;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_CLEAR = 3'd1,
    ST_RUN   = 3'd2,
    ST_DRAIN = 3'd3,
    ST_DONE  = 3'd4
  } kstate_e;

endpackage
