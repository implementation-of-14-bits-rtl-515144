// fp14_adder: combinational sum of two 14-bit floating-point numbers.
//
// The adder follows the source design's fixed-point scheme: both operands are
// converted by fp14_to_fixed into signed 40-bit fixed-point numbers on a common
// grid (this replaces the usual align-by-exponent-difference step), the two are
// added exactly into a 41-bit sum, and fixed_to_fp14 converts the sum back to
// floating point with truncation. Because the sum is exact, the only error is
// the final truncation toward zero.
//
// Interface: a, b operands; s = a + b; underflow/overflow from the output
// conversion. Timing: purely combinational, no clock.
module fp14_adder
  import fp14_pkg::*;
(
  input  fp14_t a,
  input  fp14_t b,
  output fp14_t s,
  output logic  underflow,
  output logic  overflow
);

  logic signed [FIX_W-1:0] fix_a, fix_b;
  logic signed [SUM_W-1:0] fix_sum;

  fp14_to_fixed u_conv_a (.x(a), .fix(fix_a));
  fp14_to_fixed u_conv_b (.x(b), .fix(fix_b));

  assign fix_sum = SUM_W'(fix_a) + SUM_W'(fix_b);

  fixed_to_fp14 u_conv_s (
    .fix      (fix_sum),
    .y        (s),
    .underflow(underflow),
    .overflow (overflow)
  );

endmodule
