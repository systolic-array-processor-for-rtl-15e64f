// eig_pkg: types and constants shared by the CORDIC-based QR / eigenvector
// side of the design (cordic_core, givens_cell, qr_array, eigvec_unit,
// eigen_top).
//
// Number formats (this design's choice; the thesis builds its processing
// element for 32-bit floating point but analyses CORDIC in fixed point too):
//   * matrix data: W-bit two's complement, FRAC fractional bits (Q11.20 by
//     default, range about +-2048).
//   * angles:      32-bit two's complement radians with ANG_FRAC = 29
//     fractional bits (range +-4 rad).
// The arctangent table holds atan(2^-i) for i < ATAN_ENTRIES = 11; beyond
// that the small-angle approximation atan(2^-i) ~= 2^-i is used, whose error
// 2^-3i/3 is below one angle LSB.  11 entries is the table size the thesis
// derives for 32-bit fixed-point data (k > b/3).  The hyperbolic table
// holds atanh(2^-i) for i = 1..10 (entry 0 unused) with the same
// approximation beyond it.  KINV_Q30 / KHINV_Q30 are the reciprocal CORDIC
// gains of the circular and hyperbolic iterations used here, in Q2.30.
// Each module that imports the package uses only some of these constants,
// so a lint run of one module reports the others as unused parameters.
package eig_pkg;

  localparam int ANG_W    = 32;
  localparam int ANG_FRAC = 29;
  localparam int ATAN_ENTRIES = 11;

  // round(atan(2^-i) * 2^29), i = 0 .. 10
  localparam logic signed [ANG_W-1:0] ATAN_TABLE [ATAN_ENTRIES] = '{
    32'sd421657428, 32'sd248918915, 32'sd131521918, 32'sd66762579,
    32'sd33510843,  32'sd16771758,  32'sd8387925,   32'sd4194219,
    32'sd2097141,   32'sd1048575,   32'sd524288
  };

  // round(pi * 2^29)
  localparam logic signed [ANG_W-1:0] ANG_PI = 32'sd1686629713;
  // round(pi/2 * 2^29)
  localparam logic signed [ANG_W-1:0] ANG_HALF_PI = 32'sd843314857;

  // round(2^30 / K), K = prod_{i=0}^{30} sqrt(1 + 2^-2i) (circular gain)
  localparam logic signed [31:0] KINV_Q30 = 32'sd652032874;

  // round(atanh(2^-i) * 2^29), i = 1 .. 10 (index 0 unused)
  localparam logic signed [ANG_W-1:0] ATANH_TABLE [ATAN_ENTRIES] = '{
    32'sd0,         32'sd294906491, 32'sd137123709, 32'sd67461703,
    32'sd33598225,  32'sd16782681,  32'sd8389291,   32'sd4194389,
    32'sd2097163,   32'sd1048577,   32'sd524288
  };

  // round(2^30 / Kh), Kh = prod sqrt(1 - 2^-2i) over the hyperbolic
  // sequence i = 1..30 with i = 4 and i = 13 taken twice
  localparam logic signed [31:0] KHINV_Q30 = 32'sd1296540104;

  // CORDIC coordinate system (Walther's m): circular m=1, linear m=0.
  typedef enum logic [1:0] {
    M_CIRCULAR   = 2'd0,
    M_LINEAR     = 2'd1,
    M_HYPERBOLIC = 2'd2
  } cordic_mode_e;

  // One matrix element travelling through the systolic array: a valid bit,
  // the column index of the element within its row, and the value.
  typedef struct packed {
    logic        valid;
    logic [7:0]  col;
    logic [31:0] data;
  } elem_t;

endpackage
