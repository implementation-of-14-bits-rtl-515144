// fp14_pkg: shared format definitions for the 14-bit floating-point units.
//
// The 14-bit format is IEEE 754 half precision with the two least significant
// mantissa bits removed: 1 sign bit, 5 exponent bits with a bias of 15, and
// 8 stored mantissa bits behind an implicit leading one. With the implicit bit
// the significand is 9 bits wide, so one 9x9 hard multiplier covers a product.
//
// Conventions shared by every unit (this design's choices where the format
// itself does not fix them):
//   * exponent field 0 encodes zero; subnormals are not represented and any
//     result below the smallest normal number is flushed to a signed zero;
//   * exponent field 31 is an ordinary exponent: no infinity or NaN;
//   * results are truncated (rounded toward zero), never rounded up.
// The adder works in a two's complement fixed-point domain: an operand becomes
// a FIX_W-bit number whose least significant bit weighs 2^-22, and a sum of two
// such numbers takes SUM_W bits.
package fp14_pkg;

  localparam int unsigned EXP_W = 5;
  localparam int unsigned MAN_W = 8;
  localparam int unsigned SIG_W = MAN_W + 1;          // significand incl. hidden one
  localparam int unsigned BIAS  = 15;                 // exponent shift, F (hex)
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1; // 31

  // Fixed-point domain of the adder: significand shifted left by (exp - 1),
  // plus a sign bit. 9 + 30 magnitude bits + sign = 40; one more for the sum.
  localparam int unsigned FIX_W = SIG_W + (EXP_MAX - 1) + 1; // 40
  localparam int unsigned SUM_W = FIX_W + 1;                 // 41

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp14_t;

endpackage
