// lesf_pkg: constants and types shared by the Low-Error Squaring Function
// (LESF) datapaths.
//
// The LESF approximates log2(N^2) = 2k + 2x + Rc, where N = 2^k (1 + x), and
// turns the result back into a number with 2^y ~ 1 + y. Rc = 5/128 is the
// constant that gives the lowest mean relative error; it is held here as a
// fraction with RC_FRAC_BITS bits below the binary point (5/128 = 0.0000101b).
// The binary16 structure is the IEEE 754 half-precision layout used by the
// floating-point variant.
package lesf_pkg;

  // Rc = RC_NUM / 2^RC_FRAC_BITS
  localparam int unsigned RC_NUM       = 5;
  localparam int unsigned RC_FRAC_BITS = 7;

  // IEEE 754 binary16 fields
  localparam int unsigned FP16_EXP_W = 5;
  localparam int unsigned FP16_MAN_W = 10;

  typedef struct packed {
    logic                  sign;
    logic [FP16_EXP_W-1:0] exp;
    logic [FP16_MAN_W-1:0] man;
  } fp16_t;

endpackage
