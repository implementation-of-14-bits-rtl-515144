// fp14_subtractor: combinational difference of two 14-bit floating-point
// numbers, d = a - b.
//
// As in the source design, subtraction is addition with the sign of the
// second operand inverted: b's sign bit is flipped and the pair goes through
// fp14_adder. The result is therefore exact up to truncation toward zero, and
// a difference too small to represent is a zero carrying the correct sign.
//
// Interface: a minuend, b subtrahend, d difference, underflow/overflow as in
// the adder. Timing: purely combinational, no clock.
module fp14_subtractor
  import fp14_pkg::*;
(
  input  fp14_t a,
  input  fp14_t b,
  output fp14_t d,
  output logic  underflow,
  output logic  overflow
);

  fp14_t b_neg;

  always_comb begin
    b_neg      = b;
    b_neg.sign = ~b.sign;
  end

  fp14_adder u_add (
    .a        (a),
    .b        (b_neg),
    .s        (d),
    .underflow(underflow),
    .overflow (overflow)
  );

endmodule
