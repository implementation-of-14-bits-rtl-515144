// fp14_comparator: compares two 14-bit floating-point numbers and selects the
// larger one, as used for max-pooling in convolutional networks.
//
// Following the source design, the comparison is a subtraction: the
// subtractor forms a - b and only the sign of the difference is used. Sign 1
// means a < b; sign 0 means a >= b. The same sign bit steers a two-way
// multiplexer that passes b when a < b and a otherwise, so max is the larger
// operand. Which operand is the minuend is this design's choice. The
// subtractor's difference keeps its sign even when it is too small to
// represent, so two distinct numbers always compare correctly; +0 and -0
// compare equal.
//
// Interface: a, b operands; lt = (a < b); ge = (a >= b); max = larger operand
// (a when equal). Timing: purely combinational, no clock.
module fp14_comparator
  import fp14_pkg::*;
(
  input  fp14_t a,
  input  fp14_t b,
  output logic  lt,
  output logic  ge,
  output fp14_t max
);

  fp14_t diff;
  logic  unused_uf, unused_of;

  fp14_subtractor u_sub (
    .a        (a),
    .b        (b),
    .d        (diff),
    .underflow(unused_uf),
    .overflow (unused_of)
  );

  always_comb begin
    lt  = diff.sign;
    ge  = ~diff.sign;
    max = diff.sign ? b : a;
  end

endmodule
