// fp14_units: the set of 14-bit floating-point calculating units for neural
// network hardware, side by side on one pair of operands.
//
// The units are the ones a neuron or a pooling layer needs: a multiplier for
// weight times input, an adder and a subtractor for accumulation, and a
// comparator for selecting the maximum. Each is an independent combinational
// circuit, as in the source design, so the top has no clock; a user who wants
// pipelining places registers around the unit it uses. All units read the
// same operands a and b, and every result is brought out.
//
// Interface:
//   a, b                  operands (fp14_pkg::fp14_t: sign, 5-bit exponent, 8-bit mantissa)
//   prod, prod_uf/_of     a * b and its underflow / exponent overflow (wrap) flags
//   sum,  sum_uf/_of      a + b and its underflow / saturation flags
//   diff, diff_uf/_of     a - b and its underflow / saturation flags
//   lt, ge, max           a < b, a >= b, and the larger of the two
// Timing: purely combinational.
module fp14_units
  import fp14_pkg::*;
(
  input  fp14_t a,
  input  fp14_t b,
  output fp14_t prod,
  output logic  prod_uf,
  output logic  prod_of,
  output fp14_t sum,
  output logic  sum_uf,
  output logic  sum_of,
  output fp14_t diff,
  output logic  diff_uf,
  output logic  diff_of,
  output logic  lt,
  output logic  ge,
  output fp14_t max
);

  fp14_multiplier u_mul (.a(a), .b(b), .p(prod), .underflow(prod_uf), .overflow(prod_of));
  fp14_adder      u_add (.a(a), .b(b), .s(sum),  .underflow(sum_uf),  .overflow(sum_of));
  fp14_subtractor u_sub (.a(a), .b(b), .d(diff), .underflow(diff_uf), .overflow(diff_of));
  fp14_comparator u_cmp (.a(a), .b(b), .lt(lt), .ge(ge), .max(max));

endmodule
